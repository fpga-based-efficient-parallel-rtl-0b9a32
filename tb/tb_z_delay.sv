// tb_z_delay: self-checking test of the Z feedback delay.
//
// Drives a single-register delay (DEPTH = 1) and a circular-buffer delay
// (DEPTH = 5) with random data and random enable gaps, and checks that
// each read value is the word written DEPTH enabled cycles earlier, kept
// in a queue model. Reads before DEPTH writes are not checked for the
// buffer (its contents are undefined until then), but the register must
// read zero after reset.
module tb_z_delay;
  localparam int W = 10;
  localparam int D2 = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic signed [W-1:0] d, q1, q2;
  int checks = 0, failures = 0;

  z_delay #(.W(W), .DEPTH(1))  u_d1 (.clk, .rst_n, .en, .d, .q(q1));
  z_delay #(.W(W), .DEPTH(D2)) u_d2 (.clk, .rst_n, .en, .d, .q(q2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] hist[$];
    en = 1'b0;
    d  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (q1 !== '0) begin failures++; $display("FAIL reset value %0d", q1); end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      d  = W'($urandom);
      #1;
      if (en) begin
        if (hist.size() >= 1) begin
          checks++;
          if (q1 !== hist[hist.size() - 1]) begin
            failures++;
            $display("FAIL depth1 t=%0d got %0d exp %0d", t, q1, hist[hist.size() - 1]);
          end
        end
        if (hist.size() >= D2) begin
          checks++;
          if (q2 !== hist[hist.size() - D2]) begin
            failures++;
            $display("FAIL depth%0d t=%0d got %0d exp %0d", D2, t, q2, hist[hist.size() - D2]);
          end
        end
        hist.push_back(d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
