// bf16_adder: pipelined bfloat16 floating-point adder built from AQFP blocks.
//
// bfloat16 keeps the 8-bit exponent of IEEE 754 single precision and cuts the
// fraction to 7 bits, which keeps the mantissa datapath small enough for AQFP.
// The result y = a + b passes through nine blocks, each a fixed number of
// AQFP phases deep, with every other field of the operation carried beside it
// in buffer chains (path balancing):
//   1 exp_comparator           exponent A > B / A = B                12 phases
//   2 operand_swap             larger exponent first (x), other (y)   6
//   3 exp_subtractor           d = e_x - e_y                         13
//   4 barrel_shifter (right)   align y's significand by d, sticky    26
//   5 mantissa_adder           x + y or x - y (signs differ)         20
//   6 mantissa_twos_complement magnitude, flip sign if negative      17
//   7 priority_encoder12       position p of the leading '1'         15
//   8 exp_adder                e = e_x + p - 10, shift = 11 - p      19
//   9 barrel_shifter (left)    normalise: leading '1' to the top     21
// Total latency 149 phase ticks (37.25 excitation cycles); one new operand
// pair can enter every tick. `in_valid`/`out_valid` mark the operations.
// Mantissa word (12 bits): [11] headroom for the carry, [10] hidden bit,
// [9:3] fraction, [2:0] guard, round and sticky bits.
// The block list and the phase depths follow the published design, which
// gives them in this order; running them strictly one after another, the
// rounding and the special cases are this implementation's choices:
//  - the result is truncated (rounded toward zero), which the guard, round
//    and sticky bits make exact;
//  - an exponent of 0 is read as zero (subnormals flushed), a result exponent
//    <= 0 gives a signed zero and a result >= 255 gives infinity;
//  - an exact zero sum is +0; exponent 255 inputs are not treated as Inf/NaN.
module bf16_adder
  import aqfp_pkg::*;
#(
  parameter int unsigned P_CMP  = 12,
  parameter int unsigned P_SWAP = 6,
  parameter int unsigned P_ESUB = 13,
  parameter int unsigned P_RSH  = 26,
  parameter int unsigned P_MADD = 20,
  parameter int unsigned P_TC   = 17,
  parameter int unsigned P_PE   = 15,
  parameter int unsigned P_EADD = 19,
  parameter int unsigned P_LSH  = 21
) (
  input  logic  clk,
  input  logic  rst_n,       // clears the valid markers only
  input  logic  in_valid,
  input  bf16_t a,
  input  bf16_t b,
  output logic  out_valid,
  output bf16_t y
);
  localparam int unsigned LATENCY =
    P_CMP + P_SWAP + P_ESUB + P_RSH + P_MADD + P_TC + P_PE + P_EADD + P_LSH;

  // ---- 1: exponent comparator ----
  logic  v1, eq1, gt1;
  bf16_t a1, b1;
  exp_comparator #(.WIDTH(BF_EXP_W), .PHASES(P_CMP)) u_cmp (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a.exp), .b(b.exp),
    .out_valid(v1), .eq(eq1), .gt(gt1));
  aqfp_delay #(.WIDTH(2 * BF_W), .DEPTH(P_CMP)) u_side1 (
    .clk(clk), .d({a, b}), .q({a1, b1}));

  // ---- 2: operand swap ----
  logic  v2;
  bf16_t x2, y2;
  operand_swap #(.WIDTH(BF_W), .PHASES(P_SWAP)) u_swap (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .a(a1), .b(b1), .swap(~gt1 & ~eq1),
    .out_valid(v2), .x(x2), .y(y2));

  // unpack: hidden bit set for a nonzero exponent, exponent 0 reads as zero
  function automatic logic [MANT_W-1:0] unpack(input bf16_t f);
    logic nz;
    nz = |f.exp;
    return {1'b0, nz, f.frac & {BF_FRAC_W{nz}}, 3'b000};
  endfunction

  typedef struct packed {
    logic                sx;
    logic                sub;
    logic [BF_EXP_W-1:0] ex;
    logic [MANT_W-1:0]   mx;
    logic [MANT_W-1:0]   my;
  } side3_t;
  side3_t s2, s3;
  assign s2 = '{sx: x2.sign, sub: x2.sign ^ y2.sign, ex: x2.exp,
                mx: unpack(x2), my: unpack(y2)};

  // ---- 3: exponent subtractor ----
  logic                v3, nb3;
  logic [BF_EXP_W-1:0] d3;
  exp_subtractor #(.WIDTH(BF_EXP_W), .PHASES(P_ESUB)) u_esub (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .a(x2.exp), .b(y2.exp),
    .out_valid(v3), .diff(d3), .no_borrow(nb3));
  aqfp_delay #(.WIDTH($bits(side3_t)), .DEPTH(P_ESUB)) u_side3 (
    .clk(clk), .d(s2), .q(s3));

  // ---- 4: mantissa right shifter ----
  typedef struct packed {
    logic                sx;
    logic                sub;
    logic [BF_EXP_W-1:0] ex;
    logic [MANT_W-1:0]   mx;
  } side4_t;
  side4_t            s4;
  logic              v4;
  logic [MANT_W-1:0] my4;
  barrel_shifter #(.WIDTH(MANT_W), .SHW(BF_EXP_W), .LEFT(1'b0), .STICKY(1'b1),
                   .PHASES(P_RSH)) u_rsh (
    .clk(clk), .rst_n(rst_n), .in_valid(v3), .din(s3.my), .shamt(d3),
    .out_valid(v4), .dout(my4));
  aqfp_delay #(.WIDTH($bits(side4_t)), .DEPTH(P_RSH)) u_side4 (
    .clk(clk), .d({s3.sx, s3.sub, s3.ex, s3.mx}), .q(s4));

  // ---- 5: mantissa adder ----
  typedef struct packed {
    logic                sx;
    logic                sub;
    logic [BF_EXP_W-1:0] ex;
  } side5_t;
  side5_t          s5;
  logic            v5;
  logic [MANT_W:0] sum5;
  mantissa_adder #(.WIDTH(MANT_W), .PHASES(P_MADD)) u_madd (
    .clk(clk), .rst_n(rst_n), .in_valid(v4), .x(s4.mx), .y(my4), .sub(s4.sub),
    .out_valid(v5), .s(sum5));
  aqfp_delay #(.WIDTH($bits(side5_t)), .DEPTH(P_MADD)) u_side5 (
    .clk(clk), .d({s4.sx, s4.sub, s4.ex}), .q(s5));

  // ---- 6: two's complement ----
  logic                v6, neg6, sx6;
  logic [MANT_W-1:0]   r6;
  logic [BF_EXP_W-1:0] ex6;
  mantissa_twos_complement #(.WIDTH(MANT_W), .PHASES(P_TC)) u_tc (
    .clk(clk), .rst_n(rst_n), .in_valid(v5), .s(sum5), .sub(s5.sub),
    .out_valid(v6), .r(r6), .neg(neg6));
  aqfp_delay #(.WIDTH(1 + BF_EXP_W), .DEPTH(P_TC)) u_side6 (
    .clk(clk), .d({s5.sx, s5.ex}), .q({sx6, ex6}));

  // ---- 7: priority encoder ----
  logic                v7, nz7, sg7;
  logic [3:0]          p7;
  logic [MANT_W-1:0]   r7;
  logic [BF_EXP_W-1:0] ex7;
  priority_encoder12 #(.PHASES(P_PE)) u_pe (
    .clk(clk), .rst_n(rst_n), .in_valid(v6), .a(r6),
    .out_valid(v7), .idx(p7), .v(nz7));
  aqfp_delay #(.WIDTH(1 + BF_EXP_W + MANT_W), .DEPTH(P_PE)) u_side7 (
    .clk(clk), .d({sx6 ^ neg6, ex6, r6}), .q({sg7, ex7, r7}));

  // ---- 8: exponent adder ----
  logic              v8, nz8, sg8;
  logic [9:0]        e8;
  logic [3:0]        sh8;
  logic [MANT_W-1:0] r8;
  exp_adder #(.PHASES(P_EADD)) u_eadd (
    .clk(clk), .rst_n(rst_n), .in_valid(v7), .e(ex7), .p(p7),
    .out_valid(v8), .e_res(e8), .shamt(sh8));
  aqfp_delay #(.WIDTH(2 + MANT_W), .DEPTH(P_EADD)) u_side8 (
    .clk(clk), .d({nz7, sg7, r7}), .q({nz8, sg8, r8}));

  // ---- 9: mantissa left shifter ----
  logic              v9, nz9, sg9;
  logic [9:0]        e9;
  logic [MANT_W-1:0] n9;
  barrel_shifter #(.WIDTH(MANT_W), .SHW(4), .LEFT(1'b1), .STICKY(1'b0),
                   .PHASES(P_LSH)) u_lsh (
    .clk(clk), .rst_n(rst_n), .in_valid(v8), .din(r8), .shamt(sh8),
    .out_valid(v9), .dout(n9));
  aqfp_delay #(.WIDTH(12), .DEPTH(P_LSH)) u_side9 (
    .clk(clk), .d({nz8, sg8, e8}), .q({nz9, sg9, e9}));

  // ---- result packing ----
  always_comb begin
    if (!nz9)
      y = '0;                                            // exact zero: +0
    else if (e9[9] || e9 == 10'd0)
      y = '{sign: sg9, exp: '0, frac: '0};               // underflow: signed zero
    else if (e9 >= 10'd255)
      y = '{sign: sg9, exp: '1, frac: '0};               // overflow: infinity
    else
      y = '{sign: sg9, exp: e9[7:0], frac: n9[10:4]};
  end
  assign out_valid = v9;

  // unused: carry of the exponent subtractor (x >= y is guaranteed by the swap)
  logic unused;
  assign unused = nb3;

  // the pipeline latency is the sum of the block depths
  initial assert (LATENCY > 0);
endmodule
