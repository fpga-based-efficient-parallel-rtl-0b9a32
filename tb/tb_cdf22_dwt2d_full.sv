// tb_cdf22_dwt2d_full: one full 512 x 512 frame through the top at its
// default parameters.
//
// The 8-bit test image is generated in the testbench: a smooth diagonal
// gradient plus a striped texture plus a small pseudo-random term, so all
// four subbands carry non-trivial energy. The frame is sent without
// stalls, one 3x3 window per cycle; every LL, LH, HL and HH coefficient is
// compared with the whole-image reference of cdf22_ref_pkg, and the frame
// must finish exactly N*N/4 + 1 cycles after its first window was accepted
// (N*N/4 = 65536 windows plus the two-stage pipeline).
module tb_cdf22_dwt2d_full;
  import cdf22_ref_pkg::*;
  localparam int N = 512;
  localparam int H = N / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] pix [3][3];
  logic out_valid, frame_done;
  logic [7:0] out_row, out_col;
  logic signed [10:0] ll, lh, hl, hh;

  int checks = 0, failures = 0, reported = 0;
  int cyc = 0, first_cyc = 0, outs = 0;
  bit done = 1'b0;
  int img[], rll[], rlh[], rhl[], rhh[];

  cdf22_dwt2d dut (.clk, .rst_n, .in_valid, .pix, .out_valid, .out_row,
                   .out_col, .frame_done, .ll, .lh, .hl, .hh);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (H * H + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int idx;
      idx = int'(out_row) * H + int'(out_col);
      checks++;
      if (idx != outs || ll !== 11'(rll[idx]) || lh !== 11'(rlh[idx]) ||
          hl !== 11'(rhl[idx]) || hh !== 11'(rhh[idx])) begin
        failures++;
        if (reported++ < 10)
          $display("FAIL output %0d pos (%0d,%0d): LL %0d/%0d LH %0d/%0d HL %0d/%0d HH %0d/%0d",
                   outs, out_row, out_col, ll, rll[idx], lh, rlh[idx], hl, rhl[idx], hh, rhh[idx]);
      end
      outs++;
      if (frame_done) begin
        checks++;
        done = 1'b1;
        if (outs != H * H || cyc - first_cyc != H * H + 1) begin
          failures++;
          $display("FAIL frame: %0d outputs, %0d cycles", outs, cyc - first_cyc);
        end
      end
    end
  end

  initial begin
    foreach (pix[r, c]) pix[r][c] = '0;
    img = new[N * N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        img[r * N + c] = ((r + c) / 4 + (((r / 3 + c / 5) % 2) * 60) + $urandom_range(0, 15)) % 256;
    dwt2d(img, N, rll, rlh, rhl, rhh);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int rp = 0; rp < H; rp++) begin
      for (int cp = 0; cp < H; cp++) begin
        in_valid = 1'b1;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int y, x;
            y = 2 * rp + r;
            x = 2 * cp + c;
            pix[r][c] = (y < N && x < N) ? 8'(img[y * N + x]) : 8'($urandom);
          end
        @(posedge clk);
        if (rp == 0 && cp == 0) first_cyc = cyc;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL frame_done never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
