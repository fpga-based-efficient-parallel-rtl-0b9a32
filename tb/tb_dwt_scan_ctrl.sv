// tb_dwt_scan_ctrl: self-checking test of the window position tracker.
//
// Offers windows with random gaps in `in_valid` over three frames of an
// 8 x 8 image and checks, every cycle, the column pair, row pair and
// edge flags against positions derived from a running window count
// (position = count mod 16, column = position mod 4, row = position / 4).
module tb_dwt_scan_ctrl;
  localparam int N = 8;
  localparam int H = N / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0] col_idx, row_idx;
  logic first_col, last_col, first_row, last_row, frame_last;
  int checks = 0, failures = 0;
  int count = 0;

  dwt_scan_ctrl #(.N(N)) dut (.clk, .rst_n, .in_valid, .col_idx, .row_idx,
                              .first_col, .last_col, .first_row, .last_row, .frame_last);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (count < 3 * H * H) begin
      int pos, ec, er;
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      pos = count % (H * H);
      ec  = pos % H;
      er  = pos / H;
      #1;
      checks++;
      if (col_idx != 2'(ec) || row_idx != 2'(er) ||
          first_col != (ec == 0) || last_col != (ec == H - 1) ||
          first_row != (er == 0) || last_row != (er == H - 1) ||
          frame_last != (pos == H * H - 1)) begin
        failures++;
        $display("FAIL count %0d: col %0d row %0d flags %b%b%b%b%b", count, col_idx, row_idx,
                 first_col, last_col, first_row, last_row, frame_last);
      end
      @(posedge clk);
      if (in_valid) count++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
