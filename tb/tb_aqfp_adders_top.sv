// tb_aqfp_adders_top: end-to-end test of the whole design at its default
// parameters.
//
// Drives all four circuits of the top at once, one operation per phase tick:
//  - the 16-bit majority-3 adder with the five critical vectors and all 110
//    published random test additions (each printed result is checked against
//    a + b first), followed by random operands;
//  - the 8-bit majority-5 adder with its critical vectors and random operands;
//  - the bfloat16 adder with mixed operand classes, checked against the exact
//    truncating model in bf16_ref_pkg;
//  - the type-A full adder with every input combination.
// It checks the latencies (12, 6 and 149 phase ticks, 4 for the full adder)
// and counts the mechanisms each circuit has: carry out of the top bit and a
// carry rippling through all bits in the integer adders; operand swap,
// subtraction, negative difference, carry, cancellation, sticky alignment,
// overflow, underflow and exact zero in the floating-point adder. A mechanism
// that never happened counts as a failure.
module tb_aqfp_adders_top;
  import aqfp_pkg::*;
  import bf16_ref_pkg::*;

  localparam int N_RAND = 1500;

  logic        clk = 0, rst_n = 0;
  logic        ksa16_in_valid = 0, ksa16_out_valid;
  logic [15:0] ksa16_a = '0, ksa16_b = '0;
  logic [16:0] ksa16_sum;
  logic        ksa8_in_valid = 0, ksa8_out_valid;
  logic [7:0]  ksa8_a = '0, ksa8_b = '0;
  logic [8:0]  ksa8_sum;
  logic        fp_in_valid = 0, fp_out_valid;
  bf16_t       fp_a = '0, fp_b = '0, fp_y;
  logic        fa_a = 0, fa_b = 0, fa_c = 0, fa_cout, fa_s;

  int checks = 0, failures = 0;

  aqfp_adders_top dut (.*);

  always #5 clk = ~clk;
  longint unsigned tick = 0;
  always @(posedge clk) tick <= tick + 1;

  typedef struct { logic [15:0] a; logic [15:0] b; logic [16:0] s; } vec16_t;
  vec16_t pub [115] = '{
    '{16'hFFFF, 16'h0001, 17'h10000},
    '{16'h0001, 16'hFFFF, 17'h10000},
    '{16'hFFFF, 16'h0000, 17'h0FFFF},
    '{16'h0000, 16'hFFFF, 17'h0FFFF},
    '{16'hFFFF, 16'hFFFF, 17'h1FFFE},
    '{16'h0E4A, 16'h075B, 17'h015A5},
    '{16'h349A, 16'hBDB1, 17'h0F24B},
    '{16'h3291, 16'h05B0, 17'h03841},
    '{16'hAF9C, 16'h234D, 17'h0D2E9},
    '{16'hD6CC, 16'h7EB3, 17'h1557F},
    '{16'h3EDA, 16'h120A, 17'h050E4},
    '{16'h85FA, 16'hF866, 17'h17E60},
    '{16'h78A4, 16'h8059, 17'h0F8FD},
    '{16'hCA13, 16'h3397, 17'h0FDAA},
    '{16'hE972, 16'h75A9, 17'h15F1B},
    '{16'h6B60, 16'h7107, 17'h0DC67},
    '{16'h4F84, 16'hC01C, 17'h10FA0},
    '{16'hA2E6, 16'h3A5E, 17'h0DD44},
    '{16'h8C19, 16'h19D4, 17'h0A5ED},
    '{16'h1B0A, 16'h7944, 17'h0944E},
    '{16'hB3FC, 16'hCE35, 17'h18231},
    '{16'h60C3, 16'h2B20, 17'h08BE3},
    '{16'h4FEC, 16'h4CE9, 17'h09CD5},
    '{16'h6661, 16'h13C2, 17'h07A23},
    '{16'hB11F, 16'hFF4A, 17'h1B069},
    '{16'hB380, 16'h6BFB, 17'h11F7B},
    '{16'h7C9D, 16'h3E3B, 17'h0BAD8},
    '{16'hC93A, 16'h836B, 17'h14CA5},
    '{16'h2204, 16'hA274, 17'h0C478},
    '{16'h2DEC, 16'h3876, 17'h06662},
    '{16'h6D5B, 16'hB819, 17'h12574},
    '{16'hF5DB, 16'h25BA, 17'h11B95},
    '{16'h9FE5, 16'hF771, 17'h19756},
    '{16'hE74F, 16'hC095, 17'h1A7E4},
    '{16'hF4A2, 16'h9B2B, 17'h18FCD},
    '{16'h6230, 16'h579F, 17'h0B9CF},
    '{16'h0974, 16'h0209, 17'h00B7D},
    '{16'hC993, 16'h5F24, 17'h128B7},
    '{16'hEAB9, 16'hB0ED, 17'h19BA6},
    '{16'hE074, 16'h2F86, 17'h10FFA},
    '{16'h82E9, 16'h8309, 17'h105F2},
    '{16'h63A3, 16'h04B5, 17'h06858},
    '{16'h1895, 16'hF683, 17'h10F18},
    '{16'h3590, 16'hC2BE, 17'h0F84E},
    '{16'h69C9, 16'h6D0D, 17'h0D6D6},
    '{16'h267C, 16'hB06B, 17'h0D6E7},
    '{16'hC602, 16'h5098, 17'h1169A},
    '{16'hD320, 16'h6D40, 17'h14060},
    '{16'h95FB, 16'h6603, 17'h0FBFE},
    '{16'h513A, 16'h6B27, 17'h0BC61},
    '{16'hDD7A, 16'hFBD7, 17'h1D951},
    '{16'h3FDC, 16'hF748, 17'h13724},
    '{16'hF5B9, 16'h1601, 17'h10BBA},
    '{16'h3DF8, 16'h3EA8, 17'h07CA0},
    '{16'h4741, 16'hCA1D, 17'h1115E},
    '{16'h6063, 16'h6A60, 17'h0CAC3},
    '{16'h0242, 16'h2884, 17'h02AC6},
    '{16'h2BD4, 16'hCC85, 17'h0F859},
    '{16'hA4C7, 16'hEB0C, 17'h18FD3},
    '{16'h4E1B, 16'hC9B8, 17'h117D3},
    '{16'h6C45, 16'h68A6, 17'h0D4EB},
    '{16'hF8A2, 16'hF681, 17'h1EF23},
    '{16'h1514, 16'h502C, 17'h06540},
    '{16'hFC3D, 16'h004D, 17'h0FC8A},
    '{16'h01D2, 16'hBBBB, 17'h0BD8D},
    '{16'hA57A, 16'h37FF, 17'h0DD79},
    '{16'hD00E, 16'h4853, 17'h11861},
    '{16'hD35E, 16'h19E1, 17'h0ED3F},
    '{16'hD4C9, 16'hCA61, 17'h19F2A},
    '{16'h84AB, 16'hD785, 17'h15C30},
    '{16'hBF4A, 16'h70B6, 17'h13000},
    '{16'h93DC, 16'h73A3, 17'h1077F},
    '{16'h113F, 16'hE1FF, 17'h0F33E},
    '{16'h2164, 16'h40F9, 17'h0625D},
    '{16'h040F, 16'h584F, 17'h05C5E},
    '{16'hBDF2, 16'hA60D, 17'h163FF},
    '{16'hA42F, 16'hC89B, 17'h16CCA},
    '{16'h7B1D, 16'h8CA0, 17'h107BD},
    '{16'hC6D8, 16'h25C5, 17'h0EC9D},
    '{16'h20D9, 16'h876A, 17'h0A843},
    '{16'h0BCD, 16'hF39F, 17'h0FF6C},
    '{16'hBADB, 16'hE50B, 17'h19FE6},
    '{16'h3CC6, 16'hEE08, 17'h12ACE},
    '{16'h6D36, 16'h312F, 17'h09E65},
    '{16'h2DC6, 16'hC74D, 17'h0F513},
    '{16'h335F, 16'h0204, 17'h03563},
    '{16'h12A9, 16'h76DB, 17'h08984},
    '{16'h69B4, 16'h1A8C, 17'h08440},
    '{16'h8984, 16'hEFEB, 17'h1796F},
    '{16'hA5DF, 16'hF479, 17'h19A58},
    '{16'h4F7B, 16'h795E, 17'h0C8D9},
    '{16'h0210, 16'h2F62, 17'h03172},
    '{16'h3748, 16'h676E, 17'h09EB6},
    '{16'hBDD1, 16'h13DD, 17'h0D1AE},
    '{16'h315A, 16'h7E86, 17'h0AFE0},
    '{16'h114D, 16'h0A20, 17'h01B6D},
    '{16'h6D6A, 16'h6551, 17'h0D2BB},
    '{16'h2259, 16'hBE0A, 17'h0E063},
    '{16'h2862, 16'h2DF4, 17'h05656},
    '{16'h8B3E, 16'hFF92, 17'h18AD0},
    '{16'h32AF, 16'hCD67, 17'h10016},
    '{16'h5C8B, 16'h42A1, 17'h09F2C},
    '{16'h3A3A, 16'h3AD2, 17'h0750C},
    '{16'hCE5D, 16'h742A, 17'h14287},
    '{16'h6619, 16'hAFEB, 17'h11604},
    '{16'h987D, 16'h6624, 17'h0FEA1},
    '{16'hD2C9, 16'h52C0, 17'h12589},
    '{16'hD7BB, 16'h0CC1, 17'h0E47C},
    '{16'h0D6F, 16'h8F55, 17'h09CC4},
    '{16'hF4F7, 16'h0D7D, 17'h10274},
    '{16'h7391, 16'h5937, 17'h0CCC8},
    '{16'h0B7B, 16'h59C2, 17'h0653D},
    '{16'h32EA, 16'h4471, 17'h0775B},
    '{16'h2DB1, 16'hA351, 17'h0D102},
    '{16'hF361, 16'h91C1, 17'h18522}
  };

  logic [16:0] q16[$];
  logic [8:0]  q8[$];
  logic [15:0] qfp[$];
  longint unsigned t16_in, t8_in, tfp_in, t16_out = 0, t8_out = 0, tfp_out = 0;
  int n_c16 = 0, n_rip16 = 0, n_c8 = 0, n_rip8 = 0, n_fa = 0;
  int n_swap = 0, n_sub = 0, n_neg = 0, n_carry = 0, n_cancel = 0, n_sticky = 0,
      n_ovf = 0, n_unf = 0, n_zero = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // result monitors
  always @(negedge clk) if (rst_n) begin
    if (ksa16_out_valid) begin
      if (t16_out == 0) t16_out = tick;
      check(q16.size() > 0 && ksa16_sum === q16.pop_front(), $sformatf("ksa16 sum %h", ksa16_sum));
    end
    if (ksa8_out_valid) begin
      if (t8_out == 0) t8_out = tick;
      check(q8.size() > 0 && ksa8_sum === q8.pop_front(), $sformatf("ksa8 sum %h", ksa8_sum));
    end
    if (fp_out_valid) begin
      if (tfp_out == 0) tfp_out = tick;
      check(qfp.size() > 0 && fp_y === qfp.pop_front(), $sformatf("fp result %h", fp_y));
    end
  end

  // full adder: just after a tick, the output belongs to the inputs applied
  // four ticks before (the oldest of the four queued)
  logic [1:0] fa_hist [$];
  always @(posedge clk) begin
    #1;
    if (fa_hist.size() == 4) begin
      check({fa_cout, fa_s} === fa_hist.pop_front(), "full adder");
      n_fa++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (pub[i]) check({1'b0, pub[i].a} + {1'b0, pub[i].b} == pub[i].s,
                           $sformatf("published vector %0d inconsistent", i));
    for (int i = 0; i < 115 + N_RAND; i++) begin
      logic [15:0] x16, y16;
      logic [7:0]  x8, y8;
      logic [15:0] fa, fb;
      logic [2:0]  fav;
      ref_t r;
      int cls;
      if (i < 115) begin x16 = pub[i].a; y16 = pub[i].b; end
      else begin x16 = 16'($urandom); y16 = 16'($urandom); end
      case (i)
        0: begin x8 = 8'hFF; y8 = 8'h01; end
        1: begin x8 = 8'h01; y8 = 8'hFF; end
        2: begin x8 = 8'hFF; y8 = 8'h00; end
        3: begin x8 = 8'h00; y8 = 8'hFF; end
        4: begin x8 = 8'hFF; y8 = 8'hFF; end
        default: begin x8 = 8'($urandom); y8 = 8'($urandom); end
      endcase
      fa = 16'($urandom);
      if (fa[14:7] == 8'hFF) fa[14:7] = 8'hFE;
      fb = 16'($urandom);
      cls = $urandom_range(0, 7);
      case (cls)
        1: fb[14:7] = 8'(int'(fa[14:7]) + int'($urandom_range(0, 4)) - 2);
        2: begin fb[14:7] = fa[14:7]; fb[15] = ~fa[15]; end
        3: begin fa[14:7] = 8'($urandom_range(250, 254)); fb[14:7] = 8'($urandom_range(250, 254)); fb[15] = fa[15]; end
        4: begin fa[14:7] = 8'($urandom_range(1, 3)); fb[14:7] = fa[14:7]; fb[15] = ~fa[15]; end
        5: fb[14:7] = 8'd0;
        6: fb = {~fa[15], fa[14:0]};
        default: ;
      endcase
      if (fb[14:7] == 8'hFF) fb[14:7] = 8'hFE;
      r = bf16_add_ref(fa, fb);
      n_swap += int'(r.swap);   n_sub += int'(r.sub);       n_neg += int'(r.negative);
      n_carry += int'(r.carry); n_cancel += int'(r.cancel); n_sticky += int'(r.sticky);
      n_ovf += int'(r.overflow); n_unf += int'(r.underflow); n_zero += int'(r.zero);
      n_c16 += int'(({1'b0, x16} + {1'b0, y16}) >> 16);
      n_c8  += int'(({1'b0, x8} + {1'b0, y8}) >> 8);
      n_rip16 += int'(x16[0] & y16[0] && (x16[15:1] ^ y16[15:1]) == 15'h7FFF);
      n_rip8  += int'(x8[0] & y8[0] && (x8[7:1] ^ y8[7:1]) == 7'h7F);
      fav = (i < 8) ? 3'(i) : 3'($urandom);
      @(negedge clk);
      if (i == 0) begin t16_in = tick; t8_in = tick; tfp_in = tick; end
      ksa16_a = x16; ksa16_b = y16; ksa16_in_valid = 1;
      ksa8_a = x8;   ksa8_b = y8;   ksa8_in_valid = 1;
      fp_a = fa;     fp_b = fb;     fp_in_valid = 1;
      {fa_a, fa_b, fa_c} = fav;
      q16.push_back({1'b0, x16} + {1'b0, y16});
      q8.push_back({1'b0, x8} + {1'b0, y8});
      qfp.push_back(r.y);
      fa_hist.push_back(2'(fav[0]) + 2'(fav[1]) + 2'(fav[2]));
    end
    @(negedge clk);
    ksa16_in_valid = 0; ksa8_in_valid = 0; fp_in_valid = 0;
    repeat (160) @(negedge clk);
    check(q16.size() == 0 && q8.size() == 0 && qfp.size() == 0, "results missing");
    check(t16_out - t16_in == 12, $sformatf("ksa16 latency %0d", t16_out - t16_in));
    check(t8_out - t8_in == 6, $sformatf("ksa8 latency %0d", t8_out - t8_in));
    check(tfp_out - tfp_in == 149, $sformatf("fp latency %0d", tfp_out - tfp_in));
    $display("ksa16: carry-out=%0d full-ripple=%0d; ksa8: carry-out=%0d full-ripple=%0d; full adder checks=%0d",
             n_c16, n_rip16, n_c8, n_rip8, n_fa);
    $display("fp: swap=%0d sub=%0d negative=%0d carry=%0d cancel=%0d sticky=%0d overflow=%0d underflow=%0d zero=%0d",
             n_swap, n_sub, n_neg, n_carry, n_cancel, n_sticky, n_ovf, n_unf, n_zero);
    check(n_c16 > 0, "ksa16 carry-out never happened");
    check(n_rip16 > 0, "ksa16 full carry ripple never happened");
    check(n_c8 > 0, "ksa8 carry-out never happened");
    check(n_rip8 > 0, "ksa8 full carry ripple never happened");
    check(n_fa > 0, "full adder never checked");
    check(n_swap > 0, "fp swap never happened");
    check(n_sub > 0, "fp subtraction never happened");
    check(n_neg > 0, "fp negative difference never happened");
    check(n_carry > 0, "fp carry never happened");
    check(n_cancel > 0, "fp cancellation never happened");
    check(n_sticky > 0, "fp sticky alignment never happened");
    check(n_ovf > 0, "fp overflow never happened");
    check(n_unf > 0, "fp underflow never happened");
    check(n_zero > 0, "fp exact zero never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (115 + N_RAND + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
