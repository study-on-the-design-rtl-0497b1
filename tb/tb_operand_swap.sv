// tb_operand_swap: self-checking test of operand_swap.
//
// Random operand pairs with a random swap control; x and y must be the pair
// in order or exchanged.
// Inputs change every phase tick; each result is compared with a value
// computed here, and the latency is checked against 6 phase ticks.
module tb_operand_swap;
  localparam int unsigned LATENCY = 6;
  localparam int          N_OPS   = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [15:0] a = 0, b = 0, x, y;
  logic swap = 0;
  int checks = 0, failures = 0;

  operand_swap dut (.*);

  always #5 clk = ~clk;
  longint unsigned tick = 0, t_in = 0, t_out = 0;
  always @(posedge clk) tick <= tick + 1;

  logic [31:0] exp_q[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    if (t_out == 0) t_out = tick;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = exp_q.pop_front();
      if ({x, y} !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: got %h expected %h", {x, y}, e);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [15:0] p, q; logic s;
      p = 16'($urandom); q = 16'($urandom); s = 1'($urandom);
      @(negedge clk);
      if (i == 0) t_in = tick;
      in_valid = 1;
      a = p; b = q; swap = s;
      exp_q.push_back(s ? {q, p} : {p, q});
    end
    @(negedge clk) in_valid = 0;
    repeat (LATENCY + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size()); end
    checks++;
    if (t_out - t_in != LATENCY) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", t_out - t_in, LATENCY);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_OPS + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
