// tb_exp_subtractor: self-checking test of exp_subtractor.
//
// Random exponent pairs with a >= b (including equal and extreme values);
// diff must be a - b and no_borrow 1.
// Inputs change every phase tick; each result is compared with a value
// computed here, and the latency is checked against 13 phase ticks.
module tb_exp_subtractor;
  localparam int unsigned LATENCY = 13;
  localparam int          N_OPS   = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] a = 0, b = 0, diff;
  logic no_borrow;
  int checks = 0, failures = 0;

  exp_subtractor dut (.*);

  always #5 clk = ~clk;
  longint unsigned tick = 0, t_in = 0, t_out = 0;
  always @(posedge clk) tick <= tick + 1;

  logic [8:0] exp_q[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    logic [8:0] e;
    if (t_out == 0) t_out = tick;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = exp_q.pop_front();
      if ({no_borrow, diff} !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: got %h expected %h", {no_borrow, diff}, e);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [7:0] x, y;
      x = 8'($urandom); y = 8'($urandom_range(0, int'(x)));
      if (i == 0) begin x = 8'hFF; y = 8'h00; end
      if (i == 1) begin x = 8'h80; y = 8'h80; end
      @(negedge clk);
      if (i == 0) t_in = tick;
      in_valid = 1;
      a = x; b = y;
      exp_q.push_back({1'b1, x - y});
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
