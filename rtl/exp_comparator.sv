// exp_comparator: binary-tree magnitude comparator (A > B, A = B) for the
// exponents of the bfloat16 adder.
//
// A bit-serial comparison walks from the MSB down and needs O(n) levels; here
// the operands are split in halves recursively and the halves' results are
// merged, so an n-bit compare takes log2(n) merge levels:
//   1-bit cell   input buffers, then eq = (a == b) and gt = a AND NOT b
//                (2 phases)
//   merge level  buffers; then eq_h AND eq_l, eq_h AND gt_l and a buffer on
//                gt_h; then a buffer on the eq product and gt = gt_h OR
//                (eq_h AND gt_l) (3 phases)
// Core depth is 2 + 3*log2(WIDTH) phases (11 for 8 bits); the output is then
// padded with buffers to PHASES (12, the depth of the fabricated block).
// The tree, the 1-bit and 2-bit cell structures and the merge equations follow
// the published design; the 1-bit equality uses an XNOR because an AND of the
// two bits would report 0 = 0 as unequal. Inputs are accepted every phase tick.
module exp_comparator #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned PHASES = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             out_valid,
  output logic             eq,      // a == b
  output logic             gt       // a >  b
);
  localparam int unsigned L    = $clog2(WIDTH);
  localparam int unsigned CORE = 2 + 3 * L;

  initial assert (WIDTH == (1 << L) && PHASES >= CORE)
    else $error("exp_comparator: WIDTH must be a power of two and PHASES >= %0d", CORE);

  logic [WIDTH-1:0] a_b, b_b;
  logic [WIDTH-1:0] eq_t [L+1];
  logic [WIDTH-1:0] gt_t [L+1];

  always_ff @(posedge clk) begin
    a_b <= a;
    b_b <= b;
    eq_t[0] <= ~(a_b ^ b_b);
    gt_t[0] <= a_b & ~b_b;
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned N = WIDTH >> l;      // cells at this level
    logic [N-1:0] eqh, eql, gth, gtl;            // phase A buffers
    logic [N-1:0] eqp, gtp, gth_b;               // phase B
    always_ff @(posedge clk) begin
      for (int j = 0; j < N; j++) begin
        eqh[j] <= eq_t[l-1][2*j+1];
        eql[j] <= eq_t[l-1][2*j];
        gth[j] <= gt_t[l-1][2*j+1];
        gtl[j] <= gt_t[l-1][2*j];
      end
      eqp   <= eqh & eql;
      gtp   <= eqh & gtl;
      gth_b <= gth;
      eq_t[l] <= WIDTH'(eqp);
      gt_t[l] <= WIDTH'(gth_b | gtp);
    end
  end

  aqfp_delay #(.WIDTH(2), .DEPTH(PHASES - CORE)) u_pad (
    .clk(clk), .d({eq_t[L][0], gt_t[L][0]}), .q({eq, gt}));

  aqfp_valid_delay #(.DEPTH(PHASES)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));
endmodule
