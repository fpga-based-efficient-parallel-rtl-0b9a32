// tb_cdf22_dwt2d: end-to-end test of the 2-D CDF(2,2) DWT.
//
// Runs six frames of an 8 x 8 image (the size of the FPGA simulation the design was demonstrated with) through the top, back to back, and
// compares every LL, LH, HL and HH coefficient, with its subband
// position, against the whole-image reference of cdf22_ref_pkg. Frames:
// random pixels, the two extreme checkerboards (largest coefficient
// magnitudes), a smooth ramp, and random images again with and without
// stalls. Pixels of a window that lie outside the image are driven with
// random values, so the right and bottom symmetric extension inside the
// top is exercised for real.
//
// Timing checks: first output two cycles after the first window; on a
// frame sent without stalls, `frame_done` exactly N*N/4 + 1 cycles after
// the first window was accepted (N*N/4 windows, one per cycle, plus the
// two-stage pipeline); exactly N*N/4 outputs per frame.
//
// Mechanisms that must occur at least once (a failure is counted for
// each that never does): input stall, left/right/top/bottom image edge,
// back-to-back frames (first window of a frame accepted in the cycle
// after the last window of the previous one), and a full frame without
// stalls.
module tb_cdf22_dwt2d;
  import cdf22_ref_pkg::*;
  localparam int N = 8;
  localparam int H = N / 2;
  localparam int NF = 6;
  localparam int AW = $clog2(H);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] pix [3][3];
  logic out_valid, frame_done;
  logic [AW-1:0] out_row, out_col;
  logic signed [10:0] ll, lh, hl, hh;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_stall = 0, n_left = 0, n_right = 0, n_top = 0, n_bottom = 0;
  int n_b2b = 0, n_nostall_frames = 0;

  int rll[NF][], rlh[NF][], rhl[NF][], rhh[NF][];
  int out_frame = 0, out_count = 0;
  int first_accept_cyc[NF];
  int last_accept_cyc = -10;
  bit nostall[NF];

  cdf22_dwt2d #(.N(N)) dut (.clk, .rst_n, .in_valid, .pix, .out_valid, .out_row,
                            .out_col, .frame_done, .ll, .lh, .hl, .hh);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pixel_of(int f, int r, int c);
    case (f)
      1: return ((r + c) % 2 != 0) ? 255 : 0;
      2: return ((r + c) % 2 != 0) ? 0 : 255;
      3: return (r * 13 + c * 7) % 256;
      default: return $urandom_range(0, 255);
    endcase
  endfunction

  // ---- output monitor ----------------------------------------------------
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int idx;
      idx = int'(out_row) * H + int'(out_col);
      checks++;
      if (out_frame >= NF) begin
        failures++;
        $display("FAIL unexpected output after last frame");
      end else begin
        if (idx != out_count) begin
          failures++;
          $display("FAIL frame %0d output %0d at position %0d", out_frame, out_count, idx);
        end
        checks += 4;
        if (ll !== 11'(rll[out_frame][idx]) || lh !== 11'(rlh[out_frame][idx]) ||
            hl !== 11'(rhl[out_frame][idx]) || hh !== 11'(rhh[out_frame][idx])) begin
          failures++;
          $display("FAIL frame %0d pos (%0d,%0d): LL %0d/%0d LH %0d/%0d HL %0d/%0d HH %0d/%0d",
                   out_frame, out_row, out_col, ll, rll[out_frame][idx], lh, rlh[out_frame][idx],
                   hl, rhl[out_frame][idx], hh, rhh[out_frame][idx]);
        end
        if (out_count == 0) begin
          checks++;
          if (cyc - first_accept_cyc[out_frame] != 2 && nostall[out_frame]) begin
            failures++;
            $display("FAIL first-output latency %0d", cyc - first_accept_cyc[out_frame]);
          end
        end
        checks++;
        if (frame_done != (out_count == H * H - 1)) begin
          failures++;
          $display("FAIL frame_done at output %0d", out_count);
        end
        if (frame_done && nostall[out_frame]) begin
          checks++;
          if (cyc - first_accept_cyc[out_frame] != H * H + 1) begin
            failures++;
            $display("FAIL frame %0d took %0d cycles, expected %0d", out_frame,
                     cyc - first_accept_cyc[out_frame], H * H + 1);
          end else n_nostall_frames++;
        end
        out_count++;
        if (out_count == H * H) begin
          out_count = 0;
          out_frame++;
        end
      end
    end
  end

  // ---- stimulus ------------------------------------------------------------
  initial begin
    foreach (pix[r, c]) pix[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      int img[];
      int stall_pct;
      img = new[N * N];
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) img[r * N + c] = pixel_of(f, r, c);
      dwt2d(img, N, rll[f], rlh[f], rhl[f], rhh[f]);
      stall_pct = (f == 0 || f == 5) ? 0 : 20;
      nostall[f] = (stall_pct == 0);
      for (int rp = 0; rp < H; rp++) begin
        for (int cp = 0; cp < H; cp++) begin
          while (stall_pct != 0 && $urandom_range(0, 99) < stall_pct) begin
            in_valid = 1'b0;
            foreach (pix[r, c]) pix[r][c] = 8'($urandom);
            n_stall++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++) begin
              int y, x;
              y = 2 * rp + r;
              x = 2 * cp + c;
              pix[r][c] = (y < N && x < N) ? 8'(img[y * N + x]) : 8'($urandom);
            end
          if (cp == 0) n_left++;
          if (cp == H - 1) n_right++;
          if (rp == 0) n_top++;
          if (rp == H - 1) n_bottom++;
          @(posedge clk);
          if (rp == 0 && cp == 0) begin
            first_accept_cyc[f] = cyc;
            if (cyc == last_accept_cyc + 1) n_b2b++;
          end
          last_accept_cyc = cyc;
          @(negedge clk);
        end
      end
    end
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (out_frame != NF) begin
      failures++;
      $display("FAIL only %0d of %0d frames came out", out_frame, NF);
    end
    $display("mechanisms: stall=%0d left=%0d right=%0d top=%0d bottom=%0d back_to_back=%0d nostall_frames=%0d",
             n_stall, n_left, n_right, n_top, n_bottom, n_b2b, n_nostall_frames);
    checks += 7;
    if (n_stall == 0) failures++;
    if (n_left == 0) failures++;
    if (n_right == 0) failures++;
    if (n_top == 0) failures++;
    if (n_bottom == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_nostall_frames == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
