// row_wt: row-wise 1-D CDF(2,2) lifting processor (R_WT).
//
// Each enabled cycle it takes three neighbouring pixels of one image row,
// the even sample s_i = x[2i], the odd sample d_i = x[2i+1] and the next
// even sample s_i+1 = x[2i+2], and produces the pair of row coefficients
//   d_i^1 = d_i - floor((s_i + s_i+1) / 2)      (dual lifting)
//   s_i^1 = s_i + floor((d_i-1^1 + d_i^1) / 4)  (primal lifting)
// The previous high coefficient d_i-1^1 comes from the processor's own Z
// feedback register (z_delay, DEPTH = 1), so the windows of one row must
// be presented left to right on consecutive enabled cycles.
//
// Boundary: at the first window of a row (`first` high) there is no
// d_-1^1; with symmetric extension of the row (x[-1] = x[1]) it equals
// d_0^1, so the processor uses its own new high coefficient twice. The
// right edge (x[N] = x[N-2]) is handled by whoever supplies s_i+1.
//
// Timing: one window per cycle, outputs registered, valid one cycle after
// `en`. Outputs hold their value while `en` is low.
//
// The lifting equations, the three-sample input and the Z feedback follow
// the architecture; the floor rounding, edge handling and the output
// register are this design's choices.
module row_wt
  import cdf22_pkg::*;
#(
  parameter int unsigned PIX_W = PIXEL_W,
  localparam int unsigned OUT_W = PIX_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic        [PIX_W-1:0] s_i,
  input  logic        [PIX_W-1:0] d_i,
  input  logic        [PIX_W-1:0] s_ip1,
  output logic signed [OUT_W-1:0] s_out,
  output logic signed [OUT_W-1:0] d_out
);

  logic signed [OUT_W-1:0] d_new, d_prev, d_left, s_new;

  always_comb begin
    d_new  = OUT_W'(lift_predict(int'(s_i), int'(d_i), int'(s_ip1)));
    d_left = first ? d_new : d_prev;
    s_new  = OUT_W'(lift_update(int'(s_i), int'(d_left), int'(d_new)));
  end

  z_delay #(.W(OUT_W), .DEPTH(1)) u_z (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d    (d_new),
    .q    (d_prev)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out <= '0;
      d_out <= '0;
    end else if (en) begin
      s_out <= s_new;
      d_out <= d_new;
    end
  end

endmodule
