// tb_priority_encoder4: exhaustive test of the 4-to-2 priority encoder.
//
// Applies all sixteen input words, then random words, one per phase tick, and
// checks {v, idx} three ticks later against the truth table: idx is the
// position of the most significant '1', v = 0 (and idx = 0) for an all-zero
// word.
module tb_priority_encoder4;
  logic clk = 0;
  logic [3:0] a = 0;
  logic [1:0] idx;
  logic v;
  int checks = 0, failures = 0;
  priority_encoder4 dut (.*);
  always #5 clk = ~clk;

  logic [2:0] expv [300];
  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [3:0] w;
      logic [1:0] p;
      w = (i < 16) ? 4'(i) : 4'($urandom);
      p = 0;
      for (int k = 0; k < 4; k++) if (w[k]) p = 2'(k);
      @(negedge clk);
      a = w;
      expv[i] = {w != 0, p};
      @(posedge clk);
      #1;
      if (i >= 2) begin            // result of step i-2 leaves after three phases
        checks++;
        if ({v, idx} !== expv[i-2]) begin
          failures++;
          $display("FAIL: step %0d got %b expected %b", i - 2, {v, idx}, expv[i-2]);
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
