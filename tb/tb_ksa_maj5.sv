// tb_ksa_maj5: self-checking test of the 8-bit majority-5 Kogge-Stone adder.
//
// Applies the five critical vectors (carry ripple through every bit, operand
// pass-through, generate at every bit), then random operands with random
// carry-in, first one per excitation cycle (every 4 phase ticks) and then one
// per tick. Every result is compared with a + b + cin computed here, and the
// latency from operand to sum is checked against 3 + log2(8) = 6 phases.
module tb_ksa_maj5;
  localparam int unsigned W       = 8;
  localparam int unsigned LATENCY = 6;

  logic clk = 0, rst_n = 0, in_valid = 0, cin = 0, out_valid;
  logic [W-1:0] a = '0, b = '0;
  logic [W:0]   sum;
  int checks = 0, failures = 0;

  ksa_maj5 #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  // expected results, in order
  logic [W:0] exp_q[$];
  longint unsigned tick = 0, first_in = 0, first_out = 0;
  bit seen_out = 0;
  always @(posedge clk) tick <= tick + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    logic [W:0] e;
    if (!seen_out) begin
      seen_out  = 1;
      first_out = tick;
    end
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected result %h", sum);
    end else begin
      e = exp_q.pop_front();
      if (sum !== e) begin
        failures++;
        $display("FAIL: got %h expected %h", sum, e);
      end
    end
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic c,
                       input int gap);
    @(negedge clk);
    a = x; b = y; cin = c; in_valid = 1;
    if (first_in == 0) first_in = tick;
    exp_q.push_back({1'b0, x} + {1'b0, y} + (W+1)'(c));
    @(negedge clk);
    in_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  // critical vectors
  logic [W-1:0] va [5] = '{8'hFF, 8'h01, 8'hFF, 8'h00, 8'hFF};
  logic [W-1:0] vb [5] = '{8'h01, 8'hFF, 8'h00, 8'hFF, 8'hFF};
  logic [W:0]   vs [5] = '{9'h100, 9'h100, 9'h0FF, 9'h0FF, 9'h1FE};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      checks++;
      if ({1'b0, va[i]} + {1'b0, vb[i]} !== vs[i]) begin
        failures++;
        $display("FAIL: critical vector %0d inconsistent", i);
      end
      apply(va[i], vb[i], 1'b0, 2);     // one addition per excitation cycle
    end
    for (int i = 0; i < 300; i++) apply(W'($urandom), W'($urandom), 1'($urandom), 2);
    for (int i = 0; i < 300; i++) begin   // back to back, one per tick
      logic [W-1:0] x, y; logic c;
      x = W'($urandom); y = W'($urandom); c = 1'($urandom);
      @(negedge clk);
      a = x; b = y; cin = c; in_valid = 1;
      exp_q.push_back({1'b0, x} + {1'b0, y} + (W+1)'(c));
    end
    @(negedge clk) in_valid = 0;
    repeat (LATENCY + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    checks++;
    if (first_out - first_in != LATENCY) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", first_out - first_in, LATENCY);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
