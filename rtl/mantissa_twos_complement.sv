// mantissa_twos_complement: turns the mantissa adder's result into a
// magnitude and a sign flag.
//
// For a subtraction (sub = 1) the adder returns x - y in two's complement with
// carry-out 1 when the result is non-negative. When the carry-out is 0 the
// result is negative (only possible when both exponents are equal and y's
// significand is larger): it is negated here, r = NOT s + 1, and `neg` tells
// the sign logic to flip the result sign. A row of XOR gates inverts
// conditionally (1 phase), then a majority-5 Kogge-Stone adder adds the
// carry-in neg to zero (3 + ceil(log2 WIDTH) phases). Core depth 8 phases,
// padded with buffers to PHASES (17, the depth of the fabricated block).
// The block's place in the pipeline follows the published design; its gates
// are this implementation's own.
module mantissa_twos_complement #(
  parameter int unsigned WIDTH  = 12,
  parameter int unsigned PHASES = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH:0]   s,      // {carry-out, result} from mantissa_adder
  input  logic             sub,
  output logic             out_valid,
  output logic [WIDTH-1:0] r,      // magnitude
  output logic             neg     // result was negative
);
  localparam int unsigned CORE = 1 + 3 + $clog2(WIDTH);
  initial assert (PHASES >= CORE) else $error("mantissa_twos_complement: PHASES < %0d", CORE);

  logic             n;
  logic [WIDTH-1:0] sx;
  logic             n_b;
  always_comb n = sub & ~s[WIDTH];
  always_ff @(posedge clk) begin
    sx  <= s[WIDTH-1:0] ^ {WIDTH{n}};
    n_b <= n;
  end

  logic [WIDTH:0] sum;
  logic           unused_valid, n_d;
  ksa_maj5 #(.WIDTH(WIDTH)) u_ksa (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b0), .a(sx), .b('0), .cin(n_b),
    .out_valid(unused_valid), .sum(sum));
  aqfp_delay #(.WIDTH(1), .DEPTH(CORE - 1)) u_neg_chain (
    .clk(clk), .d(n_b), .q(n_d));

  aqfp_delay #(.WIDTH(WIDTH + 1), .DEPTH(PHASES - CORE)) u_pad (
    .clk(clk), .d({n_d, sum[WIDTH-1:0]}), .q({neg, r}));

  aqfp_valid_delay #(.DEPTH(PHASES)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));
endmodule
