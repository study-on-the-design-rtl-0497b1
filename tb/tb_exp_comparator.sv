// tb_exp_comparator: self-checking test of exp_comparator.
//
// Compares random 8-bit pairs, with equal pairs and pairs that differ only in
// the low bits mixed in, against a == b and a > b.
// Inputs change every phase tick; each result is compared with a value
// computed here, and the latency is checked against 12 phase ticks.
module tb_exp_comparator;
  localparam int unsigned LATENCY = 12;
  localparam int          N_OPS   = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0] a = 0, b = 0;
  logic eq, gt;
  int checks = 0, failures = 0;

  exp_comparator dut (.*);

  always #5 clk = ~clk;
  longint unsigned tick = 0, t_in = 0, t_out = 0;
  always @(posedge clk) tick <= tick + 1;

  logic [1:0] exp_q[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    logic [1:0] e;
    if (t_out == 0) t_out = tick;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = exp_q.pop_front();
      if ({eq, gt} !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: got %h expected %h", {eq, gt}, e);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [7:0] x, y;
      x = 8'($urandom);
      case (i % 4)
        0: y = x;
        1: y = x ^ 8'(1 << $urandom_range(0, 7));
        default: y = 8'($urandom);
      endcase
      @(negedge clk);
      if (i == 0) t_in = tick;
      in_valid = 1;
      a = x; b = y;
      exp_q.push_back({x == y, x > y});
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
