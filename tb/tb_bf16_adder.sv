// tb_bf16_adder: self-checking test of the pipelined bfloat16 adder.
//
// Drives operand pairs from several classes (random, close exponents, equal
// exponents with opposite signs, far-apart exponents, zeros, values near the
// overflow and underflow limits), one pair per phase tick, and compares every
// result with the exact truncating model in bf16_ref_pkg. It checks the
// pipeline latency of 149 phase ticks (the sum of the block depths) and counts
// how often each mechanism of the adder was exercised: operand swap,
// effective subtraction, negative difference, carry, cancellation, sticky
// alignment, overflow, underflow and exact zero. A mechanism never exercised
// counts as a failure.
module tb_bf16_adder;
  import aqfp_pkg::*;
  import bf16_ref_pkg::*;

  localparam int unsigned LATENCY = 149;
  localparam int          N_OPS   = 4000;

  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  bf16_t a, b, y;
  int checks = 0, failures = 0;

  bf16_adder dut (.*);

  always #5 clk = ~clk;

  logic [15:0] exp_q[$];
  logic [31:0] op_q[$];
  longint unsigned tick = 0, t_in = 0, t_out = 0;
  bit got_first = 0;
  always @(posedge clk) tick <= tick + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    logic [15:0] e;
    logic [31:0] op;
    if (!got_first) begin got_first = 1; t_out = tick; end
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output %h", y);
    end else begin
      e  = exp_q.pop_front();
      op = op_q.pop_front();
      if (y !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: %h + %h = %h, expected %h", op[31:16], op[15:0], y, e);
      end
    end
  end

  int n_swap = 0, n_sub = 0, n_neg = 0, n_carry = 0, n_cancel = 0, n_sticky = 0,
      n_ovf = 0, n_unf = 0, n_zero = 0;

  function automatic logic [15:0] rnd_operand(input int cls, input logic [15:0] other);
    logic [15:0] v;
    v = 16'($urandom);
    case (cls)
      0: ;                                                        // anything
      1: v[14:7] = 8'(int'(other[14:7]) + int'($urandom_range(0, 4)) - 2);  // close
      2: begin v[14:7] = other[14:7]; v[15] = ~other[15]; end     // cancellation
      3: v[14:7] = 8'($urandom_range(250, 254));                  // near overflow
      4: v[14:7] = 8'($urandom_range(1, 4));                      // near underflow
      5: v[14:7] = 8'd0;                                          // zero
      6: v = {~other[15], other[14:0]};                           // exact zero sum
      default: ;
    endcase
    if (v[14:7] == 8'hFF) v[14:7] = 8'hFE;                       // no Inf/NaN inputs
    return v;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [15:0] x, z;
      ref_t r;
      int cls;
      x = rnd_operand(0, 16'h0);
      cls = $urandom_range(0, 7);
      if (cls == 3) x[14:7] = 8'($urandom_range(250, 254));
      if (cls == 4) x[14:7] = 8'($urandom_range(1, 4));
      if (x[14:7] == 8'hFF) x[14:7] = 8'hFE;
      z = rnd_operand(cls == 7 ? 1 : cls, x);
      if ($urandom_range(0, 1) == 1) begin logic [15:0] t; t = x; x = z; z = t; end
      r = bf16_add_ref(x, z);
      n_swap += int'(r.swap);   n_sub += int'(r.sub);     n_neg += int'(r.negative);
      n_carry += int'(r.carry); n_cancel += int'(r.cancel); n_sticky += int'(r.sticky);
      n_ovf += int'(r.overflow); n_unf += int'(r.underflow); n_zero += int'(r.zero);
      @(negedge clk);
      a = x; b = z; in_valid = 1;
      if (i == 0) t_in = tick;
      exp_q.push_back(r.y);
      op_q.push_back({x, z});
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
    $display("mechanisms: swap=%0d sub=%0d negative=%0d carry=%0d cancel=%0d sticky=%0d overflow=%0d underflow=%0d zero=%0d",
             n_swap, n_sub, n_neg, n_carry, n_cancel, n_sticky, n_ovf, n_unf, n_zero);
    checks++; if (n_swap == 0)   begin failures++; $display("FAIL: no swap"); end
    checks++; if (n_sub == 0)    begin failures++; $display("FAIL: no subtraction"); end
    checks++; if (n_neg == 0)    begin failures++; $display("FAIL: no negative difference"); end
    checks++; if (n_carry == 0)  begin failures++; $display("FAIL: no carry"); end
    checks++; if (n_cancel == 0) begin failures++; $display("FAIL: no cancellation"); end
    checks++; if (n_sticky == 0) begin failures++; $display("FAIL: no sticky alignment"); end
    checks++; if (n_ovf == 0)    begin failures++; $display("FAIL: no overflow"); end
    checks++; if (n_unf == 0)    begin failures++; $display("FAIL: no underflow"); end
    checks++; if (n_zero == 0)   begin failures++; $display("FAIL: no exact zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_OPS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
