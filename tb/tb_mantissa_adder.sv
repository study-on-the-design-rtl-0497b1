// tb_mantissa_adder: self-checking test of mantissa_adder.
//
// Random 12-bit significand pairs, added or subtracted; the result must be
// x + y, or x - y modulo 2^12 with carry-out 1 exactly when x >= y.
// Inputs change every phase tick; each result is compared with a value
// computed here, and the latency is checked against 20 phase ticks.
module tb_mantissa_adder;
  localparam int unsigned LATENCY = 20;
  localparam int          N_OPS   = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [11:0] x = 0, y = 0;
  logic sub = 0;
  logic [12:0] s;
  int checks = 0, failures = 0;

  mantissa_adder dut (.*);

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
      if (s !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: got %h expected %h", s, e);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [11:0] p, q; logic m;
      p = 12'($urandom); q = 12'($urandom); m = 1'($urandom);
      if (i < 4) q = p;
      @(negedge clk);
      if (i == 0) t_in = tick;
      in_valid = 1;
      x = p; y = q; sub = m;
      exp_q.push_back(m ? {p >= q, 12'(p - q)} : ({1'b0, p} + {1'b0, q}));
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
