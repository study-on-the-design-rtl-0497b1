// tb_aqfp_majority_gate: exhaustive test of the clocked majority gate.
//
// Applies every input pattern, one per phase tick, to a plain 3-input gate,
// a 3-input gate with its third input inverted, a 5-input gate, and the
// three constant-input forms: AND (constant 0), OR (constant 1) and NOR
// (both inputs inverted, constant 0, i.e. NOT a AND NOT c). Each
// output is compared, one tick later, with the majority counted here.
module tb_aqfp_majority_gate;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] x3 = 0;
  logic [4:0] x5 = 0;
  logic [1:0] ac = 0;
  logic y3, y3i, y5, y_and, y_or, y_nor;

  aqfp_majority_gate #(.N(3))                u_m3   (.clk(clk), .x(x3), .y(y3));
  aqfp_majority_gate #(.N(3), .INV(3'b100))  u_m3i  (.clk(clk), .x(x3), .y(y3i));
  aqfp_majority_gate #(.N(5))                u_m5   (.clk(clk), .x(x5), .y(y5));
  aqfp_majority_gate #(.N(3))                u_and  (.clk(clk), .x({ac[1], 1'b0, ac[0]}), .y(y_and));
  aqfp_majority_gate #(.N(3))                u_or   (.clk(clk), .x({ac[1], 1'b1, ac[0]}), .y(y_or));
  aqfp_majority_gate #(.N(3), .INV(3'b101))  u_nor  (.clk(clk), .x({ac[1], 1'b0, ac[0]}), .y(y_nor));

  function automatic bit maj(input logic [4:0] v, input int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += int'(v[i]);
    return c > n / 2;
  endfunction

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int p = 0; p < 32; p++) begin
      @(negedge clk);
      x3 = 3'(p); x5 = 5'(p); ac = 2'(p);
      @(posedge clk); #1;
      check("maj3", y3, maj(5'(x3), 3));
      check("maj3 with inverted input", y3i, maj(5'(x3 ^ 3'b100), 3));
      check("maj5", y5, maj(x5, 5));
      check("and", y_and, ac[1] & ac[0]);
      check("or", y_or, ac[1] | ac[0]);
      // NOR: Maj(~a, 0, ~c) = ~a & ~c; with constant 1 the gate would be NAND
      check("nor", y_nor, ~(ac[1] | ac[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
