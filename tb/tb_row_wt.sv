// tb_row_wt: self-checking test of the row lifting processor R_WT.
//
// Transforms random 8-bit rows of length N (several rows back to back,
// with random idle cycles between windows) and compares every low and high
// coefficient with the whole-row reference of cdf22_ref_pkg, which uses
// symmetric extension at both ends. The testbench supplies s_i+1 = s_i on
// the last window of a row, as the 2-D top does. It also checks the
// one-cycle output latency and that outputs hold while `en` is low.
module tb_row_wt;
  import cdf22_ref_pkg::*;
  localparam int N = 16;
  localparam int ROWS = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0, first = 1'b0;
  logic [7:0] s_i = '0, d_i = '0, s_ip1 = '0;
  logic signed [9:0] s_out, d_out;
  int checks = 0, failures = 0;

  row_wt #(.PIX_W(8)) dut (.clk, .rst_n, .en, .first, .s_i, .d_i, .s_ip1, .s_out, .d_out);

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
    for (int row = 0; row < ROWS; row++) begin
      int x[], lo[], hi[];
      x = new[N];
      for (int c = 0; c < N; c++) begin
        case (row % 4)
          0: x[c] = $urandom_range(0, 255);
          1: x[c] = (c % 2) ? 255 : 0;      // extreme alternation
          2: x[c] = (c % 2) ? 0 : 255;
          default: x[c] = $urandom_range(0, 1) * 255;
        endcase
      end
      lift1d(x, lo, hi);
      for (int k = 0; k < N / 2; k++) begin
        // random idle cycles between windows
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          en = 1'b0;
          s_i = 8'($urandom);
          @(posedge clk);
        end
        @(negedge clk);
        en    = 1'b1;
        first = (k == 0);
        s_i   = 8'(x[2 * k]);
        d_i   = 8'(x[2 * k + 1]);
        s_ip1 = 8'((k == N / 2 - 1) ? x[2 * k] : x[2 * k + 2]);
        @(posedge clk);
        #1;
        checks += 2;
        if (s_out !== 10'(lo[k]) || d_out !== 10'(hi[k])) begin
          failures++;
          $display("FAIL row %0d k %0d: got s=%0d d=%0d exp s=%0d d=%0d",
                   row, k, s_out, d_out, lo[k], hi[k]);
        end
        // hold while disabled
        @(negedge clk);
        en = 1'b0;
        s_i = 8'($urandom);
        @(posedge clk);
        #1;
        checks++;
        if (s_out !== 10'(lo[k])) begin
          failures++;
          $display("FAIL hold row %0d k %0d", row, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
