// col_wt: column-wise 1-D CDF(2,2) lifting processor (C_WT).
//
// Each enabled cycle it takes three vertically neighbouring row
// coefficients of one column pair position, from image rows j (s_i),
// j+1 (d_i) and j+2 (s_i+1), as produced in that same cycle by the three
// row processors, and applies the same two lifting steps as the row
// processor in the vertical direction:
//   d^2 = d_i - floor((s_i + s_i+1) / 2)
//   s^2 = s_i + floor((d_prev^2 + d^2) / 4)
// Fed with the row low-pass outputs it gives LL (s^2) and LH (d^2); fed
// with the row high-pass outputs it gives HL and HH.
//
// d_prev^2 is the high coefficient of the same column pair one row pair
// higher up. The image is scanned row pair by row pair, so that value was
// produced N/2 windows earlier; the Z feedback is therefore a z_delay of
// depth N/2 (one word per column pair). In the top row pair (`first`
// high) symmetric extension gives d_prev^2 = d^2.
//
// Timing: one window per cycle, outputs registered, valid one cycle after
// `en`; the windows of a frame must be presented in row-major order
// without gaps in `en` other than stalls.
//
// The use of the row-processor lifting structure in the column direction
// follows the architecture; the depth of Z, the edge rule, rounding and
// the output register are this design's choices.
module col_wt
  import cdf22_pkg::*;
#(
  parameter int unsigned IN_W  = ROW_W,
  parameter int unsigned N     = 512,
  localparam int unsigned OUT_W = IN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic signed [IN_W-1:0]  s_i,
  input  logic signed [IN_W-1:0]  d_i,
  input  logic signed [IN_W-1:0]  s_ip1,
  output logic signed [OUT_W-1:0] s_out,
  output logic signed [OUT_W-1:0] d_out
);

  logic signed [OUT_W-1:0] d_new, d_prev, d_up, s_new;

  always_comb begin
    d_new = OUT_W'(lift_predict(int'(s_i), int'(d_i), int'(s_ip1)));
    d_up  = first ? d_new : d_prev;
    s_new = OUT_W'(lift_update(int'(s_i), int'(d_up), int'(d_new)));
  end

  z_delay #(.W(OUT_W), .DEPTH(N / 2)) u_z (
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
