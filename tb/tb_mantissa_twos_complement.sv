// tb_mantissa_twos_complement: self-checking test of mantissa_twos_complement.
//
// Random adder results with and without carry-out and subtraction; a
// negative difference (sub and no carry) must come back negated with neg = 1.
// Inputs change every phase tick; each result is compared with a value
// computed here, and the latency is checked against 17 phase ticks.
module tb_mantissa_twos_complement;
  localparam int unsigned LATENCY = 17;
  localparam int          N_OPS   = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [12:0] s = 0;
  logic sub = 0;
  logic [11:0] r;
  logic neg;
  int checks = 0, failures = 0;

  mantissa_twos_complement dut (.*);

  always #5 clk = ~clk;
  longint unsigned tick = 0, t_in = 0, t_out = 0;
  always @(posedge clk) tick <= tick + 1;

  logic [12:0] exp_q[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    logic [12:0] e;
    if (t_out == 0) t_out = tick;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = exp_q.pop_front();
      if ({neg, r} !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: got %h expected %h", {neg, r}, e);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [12:0] v; logic m, n;
      v = 13'($urandom); m = 1'($urandom);
      if (i == 0) begin v = 13'h0000; m = 1; end
      n = m & ~v[12];
      @(negedge clk);
      if (i == 0) t_in = tick;
      in_valid = 1;
      s = v; sub = m;
      exp_q.push_back({n, n ? 12'(-v[11:0]) : v[11:0]});
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
