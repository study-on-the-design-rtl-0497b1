// tb_ksa_maj3: self-checking test of the 16-bit majority-3 Kogge-Stone adder.
//
// Applies the five critical vectors (carry ripple through every bit, operand
// pass-through, generate at every bit), the first twenty published random test
// additions with their published sums, then random operands with random
// carry-in, first one per excitation cycle (every 4 phase ticks) and then one
// per tick. Every result is compared with a + b + cin computed here, and the
// latency from operand to sum is checked against 4 + 2*log2(16) = 12 phases.
module tb_ksa_maj3;
  localparam int unsigned W       = 16;
  localparam int unsigned LATENCY = 12;

  logic clk = 0, rst_n = 0, in_valid = 0, cin = 0, out_valid;
  logic [W-1:0] a = '0, b = '0;
  logic [W:0]   sum;
  int checks = 0, failures = 0;

  ksa_maj3 #(.WIDTH(W)) dut (.*);

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

  // published critical vectors and the first twenty published random vectors
  logic [W-1:0] va [25] = '{16'hFFFF,16'h0001,16'hFFFF,16'h0000,16'hFFFF,
    16'h0E4A,16'h349A,16'h3291,16'hAF9C,16'hD6CC,16'h3EDA,16'h85FA,16'h78A4,
    16'hCA13,16'hE972,16'h6B60,16'h4F84,16'hA2E6,16'h8C19,16'h1B0A,16'hB3FC,
    16'h60C3,16'h4FEC,16'h6661,16'hB11F};
  logic [W-1:0] vb [25] = '{16'h0001,16'hFFFF,16'h0000,16'hFFFF,16'hFFFF,
    16'h075B,16'hBDB1,16'h05B0,16'h234D,16'h7EB3,16'h120A,16'hF866,16'h8059,
    16'h3397,16'h75A9,16'h7107,16'hC01C,16'h3A5E,16'h19D4,16'h7944,16'hCE35,
    16'h2B20,16'h4CE9,16'h13C2,16'hFF4A};
  logic [W:0]   vs [25] = '{17'h10000,17'h10000,17'h0FFFF,17'h0FFFF,17'h1FFFE,
    17'h015A5,17'h0F24B,17'h03841,17'h0D2E9,17'h1557F,17'h050E4,17'h17E60,17'h0F8FD,
    17'h0FDAA,17'h15F1B,17'h0DC67,17'h10FA0,17'h0DD44,17'h0A5ED,17'h0944E,17'h18231,
    17'h08BE3,17'h09CD5,17'h07A23,17'h1B069};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 25; i++) begin
      checks++;
      if ({1'b0, va[i]} + {1'b0, vb[i]} !== vs[i]) begin
        failures++;
        $display("FAIL: published vector %0d inconsistent", i);
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
