// tb_col_wt: self-checking test of the column lifting processor C_WT.
//
// Generates a random N x N/2 array of signed 10-bit row coefficients
// (including the extremes of the range), presents it window by window in
// row-major order of (row pair, column pair) with random stalls, exactly
// as the three row processors of the 2-D top would (rows j, j+1 and j+2,
// row j+2 mirrored to row j on the bottom row pair), and compares every
// output with the column lifting of the reference package. Two frames are
// run back to back to check that the Z line buffer restarts correctly.
module tb_col_wt;
  import cdf22_ref_pkg::*;
  localparam int N = 8;
  localparam int H = N / 2;
  localparam int IN_W = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0, first = 1'b0;
  logic signed [IN_W-1:0] s_i = '0, d_i = '0, s_ip1 = '0;
  logic signed [IN_W:0] s_out, d_out;
  int checks = 0, failures = 0;

  col_wt #(.IN_W(IN_W), .N(N)) dut (.clk, .rst_n, .en, .first, .s_i, .d_i, .s_ip1, .s_out, .d_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 6; frame++) begin
      int a[N][H];
      int lo[H][H], hi[H][H];
      for (int r = 0; r < N; r++)
        for (int c = 0; c < H; c++)
          case (frame % 3)
            0: a[r][c] = $urandom_range(0, 1023) - 512;
            1: a[r][c] = (r % 2) ? -512 : 511;
            default: a[r][c] = (r % 2) ? 511 : -512;
          endcase
      for (int c = 0; c < H; c++) begin
        int x[], l[], h[];
        x = new[N];
        for (int r = 0; r < N; r++) x[r] = a[r][c];
        lift1d(x, l, h);
        for (int r = 0; r < H; r++) begin
          lo[r][c] = l[r];
          hi[r][c] = h[r];
        end
      end
      for (int rp = 0; rp < H; rp++) begin
        for (int cp = 0; cp < H; cp++) begin
          while ($urandom_range(0, 4) == 0) begin
            @(negedge clk);
            en = 1'b0;
            @(posedge clk);
          end
          @(negedge clk);
          en    = 1'b1;
          first = (rp == 0);
          s_i   = IN_W'(a[2 * rp][cp]);
          d_i   = IN_W'(a[2 * rp + 1][cp]);
          s_ip1 = IN_W'((rp == H - 1) ? a[2 * rp][cp] : a[2 * rp + 2][cp]);
          @(posedge clk);
          #1;
          checks += 2;
          if (s_out !== (IN_W+1)'(lo[rp][cp]) || d_out !== (IN_W+1)'(hi[rp][cp])) begin
            failures++;
            $display("FAIL frame %0d (%0d,%0d): got s=%0d d=%0d exp s=%0d d=%0d",
                     frame, rp, cp, s_out, d_out, lo[rp][cp], hi[rp][cp]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
