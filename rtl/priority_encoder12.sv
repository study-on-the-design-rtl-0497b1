// priority_encoder12: 12-to-4 priority encoder for normalising the mantissa
// sum of the bfloat16 adder.
//
// The 12 inputs are split into three 4-bit groups, each with its own
// priority_encoder4 (3 phases). A fourth priority_encoder4 picks the highest
// non-empty group from the three group-valid flags (3 phases) while the three
// in-group indices wait in buffers; a 3-to-1 multiplexer (AND with the one-hot
// group select, then OR; 3 phases) then passes the chosen group's index.
// idx = {group, index in group} is the position of the most significant '1'
// (0..11); v = 0 when the input is all zeros (idx is then 0).
// Core depth 9 phases, padded with buffers to PHASES (15, the depth of the
// fabricated block). The split into four 4-bit encoders and a 3-to-1
// multiplexer follows the published design; the multiplexer gates are this
// implementation's choice.
module priority_encoder12 #(
  parameter int unsigned PHASES = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [11:0] a,
  output logic        out_valid,
  output logic [3:0]  idx,
  output logic        v
);
  localparam int unsigned CORE = 9;
  initial assert (PHASES >= CORE) else $error("priority_encoder12: PHASES < %0d", CORE);

  logic [1:0] gidx [3];
  logic [2:0] gv;
  for (genvar g = 0; g < 3; g++) begin : g_grp
    priority_encoder4 u_pe (.clk(clk), .a(a[4*g +: 4]), .idx(gidx[g]), .v(gv[g]));
  end

  // group selection
  logic [1:0] grp;
  logic       any;
  priority_encoder4 u_pe_grp (.clk(clk), .a({1'b0, gv}), .idx(grp), .v(any));

  logic [5:0] gidx_d;
  aqfp_delay #(.WIDTH(6), .DEPTH(3)) u_gidx_chain (
    .clk(clk), .d({gidx[2], gidx[1], gidx[0]}), .q(gidx_d));

  // 3-to-1 multiplexer: buffers, AND terms, OR
  logic [5:0] m_in;
  logic [1:0] m_grp, grp_b2, grp_b3;
  logic       any_b1, any_b2, any_b3;
  logic [1:0] t0, t1, t2;
  logic [1:0] low;
  always_ff @(posedge clk) begin
    m_in   <= gidx_d;
    m_grp  <= grp;
    any_b1 <= any;
    t0     <= m_in[1:0] & {2{m_grp == 2'd0}};
    t1     <= m_in[3:2] & {2{m_grp == 2'd1}};
    t2     <= m_in[5:4] & {2{m_grp == 2'd2}};
    grp_b2 <= m_grp;
    any_b2 <= any_b1;
    low    <= t0 | t1 | t2;
    grp_b3 <= grp_b2;
    any_b3 <= any_b2;
  end

  logic [4:0] core_out;
  assign core_out = {any_b3, grp_b3, low};   // low and grp are 0 when nothing is set

  aqfp_delay #(.WIDTH(5), .DEPTH(PHASES - CORE)) u_pad (
    .clk(clk), .d(core_out), .q({v, idx}));

  aqfp_valid_delay #(.DEPTH(PHASES)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));
endmodule
