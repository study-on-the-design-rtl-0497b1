// tb_full_adder_type_a: exhaustive test of the type-A AQFP full adder.
//
// Applies all eight input combinations, several times and in random order, one
// per phase tick, and checks {cout, s} = a + b + c four ticks later.
module tb_full_adder_type_a;
  logic clk = 0, a = 0, b = 0, c = 0, cout, s;
  int checks = 0, failures = 0;
  full_adder_type_a dut (.*);
  always #5 clk = ~clk;

  logic [1:0] expv [200];
  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [2:0] v;
      v = (i < 8) ? 3'(i) : 3'($urandom);
      @(negedge clk);
      {a, b, c} = v;
      expv[i] = 2'(v[0]) + 2'(v[1]) + 2'(v[2]);
      @(posedge clk);
      #1;
      if (i >= 3) begin           // result of step i-3 leaves after four phases
        checks++;
        if ({cout, s} !== expv[i-3]) begin
          failures++;
          $display("FAIL: step %0d got %b expected %b", i - 3, {cout, s}, expv[i-3]);
        end
      end
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
