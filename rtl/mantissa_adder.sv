// mantissa_adder: adds or subtracts the aligned significands of the bfloat16
// adder.
//
// sub = 0: s = x + y. sub = 1: s = x + NOT y + 1 = x - y (mod 2^WIDTH), and
// the carry-out s[WIDTH] is 1 when x >= y. A row of AQFP XOR gates
// conditionally inverts y (1 phase), then a majority-5 Kogge-Stone adder adds
// with carry-in = sub (3 + ceil(log2 WIDTH) phases). Core depth 8 phases for
// 12 bits, padded with buffers to PHASES (20, the depth of the fabricated
// block). The Kogge-Stone adder follows the published design; the majority-5
// variant and the carry-in subtraction are this implementation's choices.
module mantissa_adder #(
  parameter int unsigned WIDTH  = 12,
  parameter int unsigned PHASES = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             sub,
  output logic             out_valid,
  output logic [WIDTH:0]   s
);
  localparam int unsigned CORE = 1 + 3 + $clog2(WIDTH);
  initial assert (PHASES >= CORE) else $error("mantissa_adder: PHASES < %0d", CORE);

  logic [WIDTH-1:0] x_b, yx;
  logic             sub_b;
  always_ff @(posedge clk) begin
    x_b   <= x;
    yx    <= y ^ {WIDTH{sub}};
    sub_b <= sub;
  end

  logic [WIDTH:0] sum;
  logic           unused_valid;
  ksa_maj5 #(.WIDTH(WIDTH)) u_ksa (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b0), .a(x_b), .b(yx), .cin(sub_b),
    .out_valid(unused_valid), .sum(sum));

  aqfp_delay #(.WIDTH(WIDTH + 1), .DEPTH(PHASES - CORE)) u_pad (
    .clk(clk), .d(sum), .q(s));

  aqfp_valid_delay #(.DEPTH(PHASES)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));
endmodule
