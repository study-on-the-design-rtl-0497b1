// tb_priority_encoder12: self-checking test of priority_encoder12.
//
// Words with a single set bit at every position, random words with the
// leading one at a random position, and zero; idx must be the position of
// the most significant one and v its presence.
// Inputs change every phase tick; each result is compared with a value
// computed here, and the latency is checked against 15 phase ticks.
module tb_priority_encoder12;
  localparam int unsigned LATENCY = 15;
  localparam int          N_OPS   = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [11:0] a = 0;
  logic [3:0] idx;
  logic v;
  int checks = 0, failures = 0;

  priority_encoder12 dut (.*);

  always #5 clk = ~clk;
  longint unsigned tick = 0, t_in = 0, t_out = 0;
  always @(posedge clk) tick <= tick + 1;

  logic [4:0] exp_q[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    logic [4:0] e;
    if (t_out == 0) t_out = tick;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      e = exp_q.pop_front();
      if ({v, idx} !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: got %h expected %h", {v, idx}, e);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [11:0] w; int msb;
      if (i < 12) w = 12'(1) << i;
      else if (i == 12) w = 12'd0;
      else begin
        msb = $urandom_range(0, 11);
        w = (12'(1) << msb) | (12'($urandom) & ((12'(1) << msb) - 12'(1)));
      end
      msb = 0;
      for (int k = 0; k < 12; k++) if (w[k]) msb = k;
      @(negedge clk);
      if (i == 0) t_in = tick;
      in_valid = 1;
      a = w;
      exp_q.push_back({w != 0, 4'(msb)});
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
