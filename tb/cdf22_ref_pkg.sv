// cdf22_ref_pkg: reference model of the one-level CDF(2,2) 2-D DWT used by
// the testbenches.
//
// It transforms whole arrays rather than windows: first every row, then
// every column of the row result, each with whole-sample symmetric
// extension at both ends (x[-1] = x[1], x[n] = x[n-2]) and floor division
// for the 1/2 and 1/4 lifting weights. The divisions are written as
// explicit floor divisions, not as shifts, so the model does not share
// its arithmetic with the RTL. Arrays are flat, row-major, n x n.
package cdf22_ref_pkg;

  function automatic int floor_div(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  // 1-D lifting of x[0..n-1] (n even): lo[k] = s_k, hi[k] = d_k.
  function automatic void lift1d(input int x[], output int lo[], output int hi[]);
    int n, h;
    n  = x.size();
    h  = n / 2;
    lo = new[h];
    hi = new[h];
    for (int k = 0; k < h; k++) begin
      int right;
      right = (2 * k + 2 < n) ? x[2 * k + 2] : x[2 * k];
      hi[k] = x[2 * k + 1] - floor_div(x[2 * k] + right, 2);
    end
    for (int k = 0; k < h; k++) begin
      int left;
      left  = (k > 0) ? hi[k - 1] : hi[0];
      lo[k] = x[2 * k] + floor_div(left + hi[k], 4);
    end
  endfunction

  // 2-D transform of img (n x n). Each subband is (n/2) x (n/2), indexed
  // [row pair * n/2 + column pair]. LL/LH come from the row low-pass
  // half, HL/HH from the row high-pass half; the second letter is the
  // vertical filter.
  function automatic void dwt2d(input int img[], input int n,
                                output int ll[], output int lh[],
                                output int hl[], output int hh[]);
    int h;
    int rl[], rh[];
    h  = n / 2;
    rl = new[n * h];
    rh = new[n * h];
    ll = new[h * h];
    lh = new[h * h];
    hl = new[h * h];
    hh = new[h * h];
    for (int r = 0; r < n; r++) begin
      int x[], lo[], hi[];
      x = new[n];
      for (int c = 0; c < n; c++) x[c] = img[r * n + c];
      lift1d(x, lo, hi);
      for (int c = 0; c < h; c++) begin
        rl[r * h + c] = lo[c];
        rh[r * h + c] = hi[c];
      end
    end
    for (int c = 0; c < h; c++) begin
      int xl[], xh[], lo[], hi[];
      xl = new[n];
      xh = new[n];
      for (int r = 0; r < n; r++) begin
        xl[r] = rl[r * h + c];
        xh[r] = rh[r * h + c];
      end
      lift1d(xl, lo, hi);
      for (int r = 0; r < h; r++) begin
        ll[r * h + c] = lo[r];
        lh[r * h + c] = hi[r];
      end
      lift1d(xh, lo, hi);
      for (int r = 0; r < h; r++) begin
        hl[r * h + c] = lo[r];
        hh[r * h + c] = hi[r];
      end
    end
  endfunction

endpackage
