// dwt_scan_ctrl: window position tracker for the 2-D DWT.
//
// The transform consumes one 3x3 pixel window per accepted cycle: rows
// j, j+1, j+2 and columns 2i, 2i+1, 2i+2 for row pair j/2 and column pair
// i. Windows arrive in row-major order, column pair 0 .. N/2-1 within a
// row pair, row pairs 0 .. N/2-1 within a frame, so a frame takes N*N/4
// accepted cycles. This block counts accepted windows (`in_valid`) and
// reports, for the window currently offered, its column pair and row pair
// and whether it touches an image edge:
//   first_col / last_col : leftmost / rightmost column pair of a row pair
//   first_row / last_row : top / bottom row pair of the frame
//   frame_last           : last window of the frame
// All outputs are combinational from the two counters and describe the
// window presented in the current cycle; counters advance on `in_valid`.
// After the last window both counters wrap to zero for the next frame.
//
// Row-major order and the edge flags are this design's choices; the
// architecture only fixes that one window is consumed per cycle.
module dwt_scan_ctrl #(
  parameter int unsigned N  = 512,
  localparam int unsigned AW = (N > 2) ? $clog2(N / 2) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic [AW-1:0] col_idx,
  output logic [AW-1:0] row_idx,
  output logic          first_col,
  output logic          last_col,
  output logic          first_row,
  output logic          last_row,
  output logic          frame_last
);

  localparam logic [AW-1:0] LAST = AW'(N / 2 - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_idx <= '0;
      row_idx <= '0;
    end else if (in_valid) begin
      if (last_col) begin
        col_idx <= '0;
        row_idx <= last_row ? '0 : row_idx + 1'b1;
      end else begin
        col_idx <= col_idx + 1'b1;
      end
    end
  end

  always_comb begin
    first_col  = (col_idx == '0);
    last_col   = (col_idx == LAST);
    first_row  = (row_idx == '0);
    last_row   = (row_idx == LAST);
    frame_last = last_col && last_row;
  end

  // The position counters never leave the image.
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    col_idx <= LAST && row_idx <= LAST);

endmodule
