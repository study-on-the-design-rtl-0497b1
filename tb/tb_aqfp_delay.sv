// tb_aqfp_delay: self-checking test of the AQFP buffer chain.
//
// Three chains (depth 0, 1 and 7) get random 8-bit words on every phase tick;
// each output must equal the input applied DEPTH ticks earlier.
module tb_aqfp_delay;
  logic clk = 0;
  logic [7:0] d = 0, q0, q1, q7;
  int checks = 0, failures = 0;
  aqfp_delay #(.WIDTH(8), .DEPTH(0)) u0 (.clk(clk), .d(d), .q(q0));
  aqfp_delay #(.WIDTH(8), .DEPTH(1)) u1 (.clk(clk), .d(d), .q(q1));
  aqfp_delay #(.WIDTH(8), .DEPTH(7)) u7 (.clk(clk), .d(d), .q(q7));
  always #5 clk = ~clk;

  logic [7:0] hist [400];
  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d = 8'($urandom);
      hist[i] = d;
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("FAIL: depth 0"); end
      @(posedge clk);
      #1;
      // after tick i the depth-N chain holds the word applied N-1 steps ago
      checks++;
      if (q1 !== hist[i]) begin failures++; $display("FAIL: depth 1 at %0d", i); end
      if (i >= 6) begin
        checks++;
        if (q7 !== hist[i-6]) begin failures++; $display("FAIL: depth 7 at %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
