// z_delay: the "Z" feedback delay of a lifting processor.
//
// Delays a stream of signed coefficients by DEPTH accepted samples: the
// value written with `en` is read back on `q` once DEPTH further writes
// have happened. In the row processors the stream advances one sample per
// window, so DEPTH = 1 and Z is a single register holding d_i-1. In the
// column processors the image is scanned row pair by row pair, so the
// previous high coefficient of the same column pair was produced one
// scan line earlier: DEPTH = N/2, and Z is a circular buffer of N/2 words
// (one per column pair) read and rewritten at the same address.
//
// Interface: `d` is written when `en` is high; `q` shows the word written
// DEPTH writes earlier and is valid in the same cycle as the write that
// replaces it (read-before-write). Words not yet written read as zero after
// reset for DEPTH = 1; for DEPTH > 1 the buffer contents are not reset and
// the user must not rely on them before the first DEPTH writes (the
// processors select their own coefficient instead at the image edge).
//
// The single delay follows the Z boxes drawn in the architecture; the
// circular-buffer form for the column direction is this design's choice.
module z_delay #(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  if (DEPTH <= 1) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  q <= '0;
      else if (en) q <= d;
    end
  end else begin : g_ring
    localparam int unsigned AW = $clog2(DEPTH);
    logic signed [W-1:0] mem [DEPTH];
    logic [AW-1:0]       ptr;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ptr <= '0;
      end else if (en) begin
        ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (en) mem[ptr] <= d;
    end

    assign q = mem[ptr];
  end

endmodule
