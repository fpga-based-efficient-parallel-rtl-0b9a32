// cdf22_pkg: shared constants and lifting arithmetic for the CDF(2,2) 2-D DWT.
//
// The two lifting steps of the CDF(2,2) (LeGall 5/3) wavelet, with the
// normalisation factors left out:
//   dual lifting (predict):  d_i <- d_i - 1/2 (s_i + s_i+1)
//   primal lifting (update): s_i <- s_i + 1/4 (d_i-1 + d_i)
// The halving and quartering are arithmetic right shifts, i.e. floor
// division, so the transform maps integers to integers and is exactly
// invertible. No rounding offset is added (the equations carry none).
//
// Word growth: each lifting step at most doubles the magnitude of its
// operands, so a coefficient needs one bit more than the samples it is
// computed from. An 8-bit pixel, zero-extended to 9 signed bits, gives
// 10-bit row coefficients and 11-bit 2-D coefficients.
package cdf22_pkg;

  // Bits per pixel of the input image (8-bit grey levels).
  localparam int unsigned PIXEL_W = 8;
  // Width of a row-processor output: signed pixel (PIXEL_W+1) plus one bit.
  localparam int unsigned ROW_W   = PIXEL_W + 2;
  // Width of a column-processor output (a 2-D subband coefficient).
  localparam int unsigned COEF_W  = ROW_W + 1;

  // Internal arithmetic is carried out on 32-bit signed integers, far wider
  // than any coefficient; callers truncate the result to their output width.

  // Dual lifting (predict): high-pass coefficient from the odd sample and
  // its two even neighbours.
  function automatic int lift_predict(int s_cur, int d_cur, int s_next);
    return d_cur - ((s_cur + s_next) >>> 1);
  endfunction

  // Primal lifting (update): low-pass coefficient from the even sample and
  // the high-pass coefficients on either side of it.
  function automatic int lift_update(int s_cur, int d_prev, int d_cur);
    return s_cur + ((d_prev + d_cur) >>> 2);
  endfunction

endpackage
