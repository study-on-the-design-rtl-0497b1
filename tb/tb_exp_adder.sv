// tb_exp_adder: self-checking test of exp_adder.
//
// Random exponents with every leading-one position 0..11; e_res must be
// e + p - 10 as a 10-bit two's-complement value and shamt 11 - p.
// Inputs change every phase tick; each result is compared with a value
// computed here, and the latency is checked against 19 phase ticks.
module tb_exp_adder;
  localparam int unsigned LATENCY = 19;
  localparam int          N_OPS   = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] e = 0;
  logic [3:0] p = 0;
  logic [9:0] e_res;
  logic [3:0] shamt;
  int checks = 0, failures = 0;

  exp_adder dut (.*);

  always #5 clk = ~clk;
  longint unsigned tick = 0, t_in = 0, t_out = 0;
  always @(posedge clk) tick <= tick + 1;

  logic [13:0] exp_q[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    logic [13:0] e;
    if (t_out == 0) t_out = tick;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = exp_q.pop_front();
      if ({e_res, shamt} !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: got %h expected %h", {e_res, shamt}, e);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [7:0] x; logic [3:0] q;
      x = 8'($urandom); q = 4'($urandom_range(0, 11));
      if (i == 0) begin x = 8'd0; q = 4'd0; end
      if (i == 1) begin x = 8'd255; q = 4'd11; end
      @(negedge clk);
      if (i == 0) t_in = tick;
      in_valid = 1;
      e = x; p = q;
      exp_q.push_back({10'(int'(x) + int'(q) - 10), 4'(11 - q)});
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
