// exp_subtractor: exponent difference d = a - b of the bfloat16 adder.
//
// After the operand swap a >= b, so the difference is the alignment shift of
// the smaller operand. b passes through a row of AQFP inverters (1 phase) and
// a majority-5 Kogge-Stone adder adds a + NOT b + 1 (carry-in tied to 1).
// `diff` is the low WIDTH bits; `no_borrow` (the adder's carry-out) is 1 when
// a >= b. Core depth 1 + ksa_maj5 latency (7 phases for 8 bits), padded with
// buffers to PHASES (13, the depth of the fabricated block). The use of a
// Kogge-Stone adder follows the published design; the choice of the
// majority-5 variant and of the carry-in for the two's complement are this
// implementation's own.
module exp_subtractor #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned PHASES = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             out_valid,
  output logic [WIDTH-1:0] diff,
  output logic             no_borrow
);
  localparam int unsigned CORE = 1 + 3 + $clog2(WIDTH);
  initial assert (PHASES >= CORE) else $error("exp_subtractor: PHASES < %0d", CORE);

  logic [WIDTH-1:0] a_b, nb;
  always_ff @(posedge clk) begin
    a_b <= a;
    nb  <= ~b;
  end

  logic [WIDTH:0] s;
  logic           unused_valid;
  ksa_maj5 #(.WIDTH(WIDTH)) u_ksa (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b0), .a(a_b), .b(nb), .cin(1'b1),
    .out_valid(unused_valid), .sum(s));

  aqfp_delay #(.WIDTH(WIDTH + 1), .DEPTH(PHASES - CORE)) u_pad (
    .clk(clk), .d(s), .q({no_borrow, diff}));

  aqfp_valid_delay #(.DEPTH(PHASES)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));
endmodule
