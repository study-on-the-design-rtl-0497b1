// operand_swap: puts the bfloat16 operand with the larger exponent first.
//
// Two rows of AQFP 2-to-1 multiplexers controlled by `swap` (from the exponent
// comparator): x = swap ? b : a and y = swap ? a : b. One multiplexer level is
// three phases (input buffers, AND terms, OR); the result is padded with
// buffers to PHASES (6, the depth of the fabricated block). A new operand pair
// is accepted every phase tick.
module operand_swap #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned PHASES = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             swap,
  output logic             out_valid,
  output logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);
  localparam int unsigned CORE = 3;
  initial assert (PHASES >= CORE) else $error("operand_swap: PHASES < %0d", CORE);

  logic [WIDTH-1:0] a_b, b_b, xa, xb, ya, yb, xo, yo;
  logic             s_b;
  always_ff @(posedge clk) begin
    a_b <= a;
    b_b <= b;
    s_b <= swap;
    xa  <= b_b & {WIDTH{s_b}};
    xb  <= a_b & {WIDTH{~s_b}};
    ya  <= a_b & {WIDTH{s_b}};
    yb  <= b_b & {WIDTH{~s_b}};
    xo  <= xa | xb;
    yo  <= ya | yb;
  end

  aqfp_delay #(.WIDTH(2 * WIDTH), .DEPTH(PHASES - CORE)) u_pad (
    .clk(clk), .d({xo, yo}), .q({x, y}));

  aqfp_valid_delay #(.DEPTH(PHASES)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));
endmodule
