// cdf22_dwt2d: one-level 2-D CDF(2,2) lifting DWT, four subbands per cycle.
//
// Main idea: the 2-D transform of a 2x2 pixel block needs the row
// transform of three image rows (j, j+1 and the next even row j+2),
// because the vertical predict step of rows j/j+1 looks one row ahead.
// Instead of buffering row-transformed lines for the column stage, three
// row processors run in parallel on rows j, j+1 and j+2 (row j+2 is
// transformed again as row j of the next row pair), and two column
// processors turn their outputs into LL, LH, HL and HH in the same cycle:
//
//   R_WT1 (row j)   --s--> C_WT1 (s_i)   --> LL, LH
//   R_WT2 (row j+1) --s--> C_WT1 (d_i)
//   R_WT3 (row j+2) --s--> C_WT1 (s_i+1)
//   R_WT1/2/3       --d--> C_WT2 (s_i, d_i, s_i+1) --> HL, HH
//
// Input: one 3x3 window per cycle on `pix` (pix[r][c] = x[j+r][2i+c]),
// qualified by `in_valid`, in row-major order of (row pair j/2, column
// pair i); `in_valid` may drop for any number of cycles (stall). There
// is no back-pressure. Pixels outside the image are not needed: on the
// right-most column pair column 2i+2 is replaced by column 2i, and on
// the bottom row pair row j+2 by row j (symmetric extension, x[N] =
// x[N-2]); the matching left and top rules are applied inside the
// processors. A frame therefore takes exactly N*N/4 accepted windows.
//
// Output: `out_valid` for one cycle per window, two cycles after the
// window was accepted, with the four coefficients of subband position
// (out_row, out_col) and `frame_done` on the last one of a frame. Subband
// coefficients are COEF_W = 11-bit signed for 8-bit pixels.
//
// The processor arrangement and the three-rows-in, four-subbands-out
// dataflow follow the architecture. The window order, edge handling,
// pipeline registers, port set and the N/2-word Z buffers of the column
// processors (needed because the previous vertical high coefficient of a
// column pair was produced one scan line earlier) are this design's.
module cdf22_dwt2d
  import cdf22_pkg::*;
#(
  parameter int unsigned N  = 512,
  localparam int unsigned AW = (N > 2) ? $clog2(N / 2) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [PIXEL_W-1:0]       pix [3][3],
  output logic                     out_valid,
  output logic [AW-1:0]            out_row,
  output logic [AW-1:0]            out_col,
  output logic                     frame_done,
  output logic signed [COEF_W-1:0] ll,
  output logic signed [COEF_W-1:0] lh,
  output logic signed [COEF_W-1:0] hl,
  output logic signed [COEF_W-1:0] hh
);

  // ---- window position and edge flags --------------------------------
  logic [AW-1:0] col_idx, row_idx;
  logic first_col, last_col, first_row, last_row, frame_last;

  dwt_scan_ctrl #(.N(N)) u_scan (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .col_idx   (col_idx),
    .row_idx   (row_idx),
    .first_col (first_col),
    .last_col  (last_col),
    .first_row (first_row),
    .last_row  (last_row),
    .frame_last(frame_last)
  );

  // ---- right and bottom symmetric extension --------------------------
  logic [PIXEL_W-1:0] win [3][3];

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        win[r][c] = pix[(r == 2 && last_row) ? 0 : r][(c == 2 && last_col) ? 0 : c];
      end
    end
  end

  // ---- row processors R_WT1..3 ---------------------------------------
  logic signed [ROW_W-1:0] row_s [3];
  logic signed [ROW_W-1:0] row_d [3];

  for (genvar r = 0; r < 3; r++) begin : g_row
    row_wt #(.PIX_W(PIXEL_W)) u_row_wt (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (in_valid),
      .first(first_col),
      .s_i  (win[r][0]),
      .d_i  (win[r][1]),
      .s_ip1(win[r][2]),
      .s_out(row_s[r]),
      .d_out(row_d[r])
    );
  end

  // ---- stage-1 control pipeline --------------------------------------
  logic          v1, first_row1, frame_last1;
  logic [AW-1:0] row1, col1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1          <= 1'b0;
      first_row1  <= 1'b0;
      frame_last1 <= 1'b0;
      row1        <= '0;
      col1        <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        first_row1  <= first_row;
        frame_last1 <= frame_last;
        row1        <= row_idx;
        col1        <= col_idx;
      end
    end
  end

  // ---- column processors C_WT1 (low rows) and C_WT2 (high rows) -----
  col_wt #(.IN_W(ROW_W), .N(N)) u_col_wt1 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (v1),
    .first(first_row1),
    .s_i  (row_s[0]),
    .d_i  (row_s[1]),
    .s_ip1(row_s[2]),
    .s_out(ll),
    .d_out(lh)
  );

  col_wt #(.IN_W(ROW_W), .N(N)) u_col_wt2 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (v1),
    .first(first_row1),
    .s_i  (row_d[0]),
    .d_i  (row_d[1]),
    .s_ip1(row_d[2]),
    .s_out(hl),
    .d_out(hh)
  );

  // ---- stage-2 control pipeline --------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      frame_done <= 1'b0;
      out_row    <= '0;
      out_col    <= '0;
    end else begin
      out_valid  <= v1;
      frame_done <= v1 && frame_last1;
      if (v1) begin
        out_row <= row1;
        out_col <= col1;
      end
    end
  end

  // frame_done marks an output, never an idle cycle.
  a_done_with_valid: assert property (@(posedge clk) disable iff (!rst_n)
    frame_done |-> out_valid);

endmodule
