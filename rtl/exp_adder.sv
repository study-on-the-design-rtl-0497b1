// exp_adder: result exponent of the bfloat16 adder after normalisation.
//
// The normalised mantissa sum has its leading '1' at position p (0..11) of the
// 12-bit word, where position 10 is the hidden bit of an unshifted result. The
// result exponent is e + p - 10, computed as a 10-bit two's-complement sum so
// that underflow (<= 0) and overflow (>= 255) can be seen. The same stage
// produces the left-shift amount 11 - p that moves the leading '1' to the top
// of the word. The first phase forms the 10-bit offset p - 10 and the shift
// amount from the 4-bit p; then a majority-5 Kogge-Stone adder adds e
// (3 + 4 phases). Core depth 8 phases, padded with buffers to PHASES (19, the
// depth of the fabricated block). The use of a Kogge-Stone adder follows the
// published design; the offset encoding is this implementation's own.
module exp_adder #(
  parameter int unsigned PHASES = 19
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] e,
  input  logic [3:0] p,
  output logic       out_valid,
  output logic [9:0] e_res,    // two's complement
  output logic [3:0] shamt     // 11 - p
);
  localparam int unsigned CORE = 1 + 3 + 4;
  initial assert (PHASES >= CORE) else $error("exp_adder: PHASES < %0d", CORE);

  logic [9:0] e_b, off;
  logic [3:0] sh;
  always_ff @(posedge clk) begin
    e_b <= {2'b00, e};
    off <= 10'({6'b0, p}) - 10'd10;
    sh  <= 4'd11 - p;
  end

  logic [10:0] sum;
  logic        unused_valid;
  logic [3:0]  sh_d;
  ksa_maj5 #(.WIDTH(10)) u_ksa (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b0), .a(e_b), .b(off), .cin(1'b0),
    .out_valid(unused_valid), .sum(sum));
  aqfp_delay #(.WIDTH(4), .DEPTH(CORE - 1)) u_sh_chain (
    .clk(clk), .d(sh), .q(sh_d));

  aqfp_delay #(.WIDTH(14), .DEPTH(PHASES - CORE)) u_pad (
    .clk(clk), .d({sum[9:0], sh_d}), .q({e_res, shamt}));

  aqfp_valid_delay #(.DEPTH(PHASES)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));
endmodule
