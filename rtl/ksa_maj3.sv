// ksa_maj3: Kogge-Stone adder built from AQFP 3-input majority logic.
//
// Adds two WIDTH-bit operands (plus a carry-in) and returns the WIDTH+1-bit
// sum, carry-out in the top bit. Every logic level is one AQFP clock phase,
// modelled as one register stage on the phase tick `clk`; signals that skip a
// level go through buffer stages (path balancing), so a new operand pair can be
// accepted on every tick and each result appears LATENCY ticks later.
//
// Levels, from the operands to the sum:
//   GP block     input buffers, then g_i = a_i AND b_i and t_i = a_i OR b_i
//                (2 phases). The "propagate" signal is the OR (transmit) form,
//                which guarantees g implies t.
//   CM level 1   a single 3-input majority gate, G' = Maj(G_v, G_h, P_v), which
//                equals G_v + P_v G_h because G_v implies P_v at this level;
//                P' = P_v AND P_h (1 phase).
//   CM level 2.. the standard block: buffer and AND, then OR, G' = G_v +
//                (G_h AND P_v); P' = P_v AND P_h (2 phases per level).
//                Columns with no partner (i < 2^(k-1)) only buffer.
//   SUM block    input buffers, then M1 = Maj(g,t,c) and M2 = Maj(g,t,~c), then
//                s = Maj(~M1, c, M2), which is g XOR t XOR c for g = ab, t = a|b
//                (3 phases). g_i and t_i reach it through a buffer chain.
// LATENCY = 4 + 2*ceil(log2(WIDTH)) phases (12 for 16 bits, i.e. 3 excitation
// cycles). The prefix algorithm, the GP/CM/SUM partition, the majority-3 first
// CM level and the 3-majority-gate SUM block follow the published design; the
// exact wiring of the SUM majority gates, the carry-in (folded into bit 0 as
// g_0 = Maj(a_0,b_0,cin)) and the valid marker are this implementation's own.
// The fabricated chip adds repeater buffers for long wires, which are not
// modelled here, so its measured latency is longer.
module ksa_maj3 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,     // clears the valid marker only
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH:0]   sum        // {carry-out, sum bits}
);
  import aqfp_pkg::*;

  localparam int unsigned L       = $clog2(WIDTH);
  localparam int unsigned LATENCY = 4 + 2 * L;

  initial assert (WIDTH >= 2) else $error("ksa_maj3 needs WIDTH >= 2");

  // ---------------- GP block ----------------
  logic [WIDTH-1:0] a_b, b_b;       // input buffers
  logic             cin_b;
  logic [WIDTH-1:0] gr, tr;         // raw generate / transmit for SUM
  logic [WIDTH-1:0] G [L+1];        // prefix tree levels, level 0 = GP output
  logic [WIDTH-1:0] P [L+1];
  logic             cin_gp;

  always_ff @(posedge clk) begin
    a_b   <= a;
    b_b   <= b;
    cin_b <= cin;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < WIDTH; i++) begin
      gr[i]   <= a_b[i] & b_b[i];
      tr[i]   <= a_b[i] | b_b[i];
      G[0][i] <= (i == 0) ? maj3(a_b[0], b_b[0], cin_b) : (a_b[i] & b_b[i]);
      P[0][i] <= a_b[i] | b_b[i];
    end
    cin_gp <= cin_b;
  end

  // ---------------- CM level 1: majority-3 block ----------------
  always_ff @(posedge clk) begin
    for (int i = 0; i < WIDTH; i++) begin
      if (i >= 1) begin
        G[1][i] <= maj3(G[0][i], G[0][i-1], P[0][i]);
        P[1][i] <= P[0][i] & P[0][i-1];
      end else begin
        G[1][i] <= G[0][i];
        P[1][i] <= P[0][i];
      end
    end
  end

  // ---------------- CM levels 2..L: standard blocks ----------------
  for (genvar k = 2; k <= L; k++) begin : g_cm
    localparam int D = 1 << (k - 1);
    logic [WIDTH-1:0] gv_b, x_and, pv_b, ph_b;
    always_ff @(posedge clk) begin
      for (int i = 0; i < WIDTH; i++) begin
        gv_b[i]  <= G[k-1][i];
        pv_b[i]  <= P[k-1][i];
        x_and[i] <= (i >= D) ? (G[k-1][i-D] & P[k-1][i]) : 1'b0;
        ph_b[i]  <= (i >= D) ? P[k-1][i-D] : 1'b1;
      end
    end
    always_ff @(posedge clk) begin
      for (int i = 0; i < WIDTH; i++) begin
        G[k][i] <= gv_b[i] | x_and[i];
        P[k][i] <= pv_b[i] & ph_b[i];
      end
    end
  end

  // ---------------- path balancing for the SUM inputs ----------------
  localparam int unsigned TREE_PH = 1 + 2 * (L - 1);   // phases of CM levels
  logic [WIDTH-1:0] gr_d, tr_d;
  logic             cin_d;
  aqfp_delay #(.WIDTH(2 * WIDTH + 1), .DEPTH(TREE_PH)) u_gp_chain (
    .clk(clk), .d({gr, tr, cin_gp}), .q({gr_d, tr_d, cin_d}));

  // ---------------- SUM block ----------------
  logic [WIDTH-1:0] c_in;           // carry into each bit
  always_comb begin
    c_in[0] = cin_d;
    for (int i = 1; i < WIDTH; i++) c_in[i] = G[L][i-1];
  end

  logic [WIDTH-1:0] sg_b, st_b, sc_b, m1, m2, sc_bb, s;
  logic             co_b, co_bb, co_bbb;
  always_ff @(posedge clk) begin
    sg_b  <= gr_d;
    st_b  <= tr_d;
    sc_b  <= c_in;
    co_b  <= G[L][WIDTH-1];
    for (int i = 0; i < WIDTH; i++) begin
      m1[i] <= maj3(sg_b[i], st_b[i], sc_b[i]);
      m2[i] <= maj3(sg_b[i], st_b[i], ~sc_b[i]);
    end
    sc_bb  <= sc_b;
    co_bb  <= co_b;
    for (int i = 0; i < WIDTH; i++) s[i] <= maj3(~m1[i], sc_bb[i], m2[i]);
    co_bbb <= co_bb;
  end

  assign sum = {co_bbb, s};

  aqfp_valid_delay #(.DEPTH(LATENCY)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));

endmodule
