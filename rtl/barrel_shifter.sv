// barrel_shifter: logarithmic shifter made of rows of AQFP 2-to-1 multiplexers.
//
// Shifts `din` by `shamt` places, right (LEFT = 0) or left (LEFT = 1), filling
// with zeros. Stage k shifts by 2^k when shamt[k] is set; a stage whose shift
// is at least WIDTH clears the word. Each stage is one row of 2-to-1
// multiplexers, O = (a AND s) OR (b AND NOT s), three phases deep (input
// buffers, the two AND gates, the OR gate); the unused shift bits travel beside
// the data through buffers. With STICKY = 1 (right shifts only) the bits
// shifted out at the bottom are ORed together and folded into bit 0, so a
// later truncation still sees that something nonzero was lost.
// Core depth 3*SHW phases, padded with buffers to PHASES. The defaults are the
// mantissa right shifter of the bfloat16 adder (12-bit word, 8-bit exponent
// difference, 26 phases); the left shifter uses WIDTH 12, SHW 4, PHASES 21.
// The multiplexer cell and the barrel arrangement follow the published design;
// the sticky bit is this implementation's addition.
module barrel_shifter #(
  parameter int unsigned WIDTH  = 12,
  parameter int unsigned SHW    = 8,
  parameter bit          LEFT   = 1'b0,
  parameter bit          STICKY = 1'b1,
  parameter int unsigned PHASES = 26
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] din,
  input  logic [SHW-1:0]   shamt,
  output logic             out_valid,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned CORE = 3 * SHW;
  initial assert (PHASES >= CORE && !(LEFT && STICKY))
    else $error("barrel_shifter: PHASES must be >= %0d; STICKY only for right shifts", CORE);

  logic [WIDTH-1:0] data [SHW+1];
  logic [SHW-1:0]   sa   [SHW+1];
  logic             stk  [SHW+1];

  assign data[0] = din;
  assign sa[0]   = shamt;
  assign stk[0]  = 1'b0;

  for (genvar k = 0; k < SHW; k++) begin : g_stage
    localparam longint unsigned SH = 64'd1 << k;
    logic [WIDTH-1:0] shifted, lost;
    always_comb begin
      if (SH >= 64'(WIDTH)) begin
        shifted = '0;
        lost    = data[k];
      end else if (LEFT) begin
        shifted = data[k] << SH;
        lost    = '0;
      end else begin
        shifted = data[k] >> SH;
        lost    = data[k] & ((WIDTH'(1) << SH) - WIDTH'(1));
      end
    end
    // phase 1: buffers, phase 2: AND terms, phase 3: OR
    logic [WIDTH-1:0] a_b, b_b, and_a, and_b;
    logic             s_b, lost_b, lost_and, stk_b1, stk_b2;
    logic [SHW-1:0]   sa_b1, sa_b2, sa_b3;
    logic [WIDTH-1:0] o;
    logic             stk_o;
    always_ff @(posedge clk) begin
      a_b      <= shifted;
      b_b      <= data[k];
      s_b      <= sa[k][k];
      lost_b   <= |lost;
      stk_b1   <= stk[k];
      sa_b1    <= sa[k];
      and_a    <= a_b & {WIDTH{s_b}};
      and_b    <= b_b & {WIDTH{~s_b}};
      lost_and <= lost_b & s_b;
      stk_b2   <= stk_b1;
      sa_b2    <= sa_b1;
      o        <= and_a | and_b;
      stk_o    <= stk_b2 | lost_and;
      sa_b3    <= sa_b2;
    end
    assign data[k+1] = o;
    assign stk[k+1]  = stk_o;
    assign sa[k+1]   = sa_b3;
  end

  logic [WIDTH-1:0] core_out;
  assign core_out = STICKY ? (data[SHW] | WIDTH'(stk[SHW])) : data[SHW];

  aqfp_delay #(.WIDTH(WIDTH), .DEPTH(PHASES - CORE)) u_pad (
    .clk(clk), .d(core_out), .q(dout));

  aqfp_valid_delay #(.DEPTH(PHASES)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));
endmodule
