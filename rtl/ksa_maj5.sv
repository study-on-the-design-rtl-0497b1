// ksa_maj5: Kogge-Stone adder whose carry-merge cells are AQFP 5-input
// majority gates.
//
// Adds two WIDTH-bit operands (plus a carry-in) and returns the WIDTH+1-bit
// sum, carry-out in the top bit. As in ksa_maj3, each logic level is one AQFP
// phase, modelled as a register stage on the phase tick `clk`, with buffer
// stages for path balancing; one operand pair can enter per tick.
//   GP block  input buffers, then g_i = a_i AND b_i and p_i = a_i XOR b_i
//             (2 phases).
//   CM level  one phase per level: G' = Maj5(P_v, G_h, G_v, G_v, 1), which is
//             G_v + P_v G_h (the merge needs a single gate, against two for the
//             majority-3 design); P' = P_v AND P_h. Columns with no partner
//             only buffer.
//   SUM block one XOR per bit: s_i = p_i XOR c_i, c_i = G_{i-1:0} (1 phase).
// LATENCY = 3 + ceil(log2(WIDTH)) phases (6 for 8 bits).
// The gate choices follow the published majority-5 design. The constant input
// of the merge gate is '1' here, as the algebra G_v + P_v G_h requires. The
// carry-in (folded into bit 0 as g_0 = Maj(a_0,b_0,cin)) and the valid marker
// are this implementation's own; repeater buffers of a physical layout are not
// modelled.
module ksa_maj5 #(
  parameter int unsigned WIDTH = 8
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
  localparam int unsigned LATENCY = 3 + L;

  initial assert (WIDTH >= 2) else $error("ksa_maj5 needs WIDTH >= 2");

  logic [WIDTH-1:0] a_b, b_b;
  logic             cin_b, cin_gp;
  logic [WIDTH-1:0] pr;               // bit propagate (XOR) for SUM
  logic [WIDTH-1:0] G [L+1];
  logic [WIDTH-1:0] P [L+1];

  always_ff @(posedge clk) begin
    a_b   <= a;
    b_b   <= b;
    cin_b <= cin;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < WIDTH; i++) begin
      G[0][i] <= (i == 0) ? maj3(a_b[0], b_b[0], cin_b) : (a_b[i] & b_b[i]);
      P[0][i] <= a_b[i] ^ b_b[i];
      pr[i]   <= a_b[i] ^ b_b[i];
    end
    cin_gp <= cin_b;
  end

  for (genvar k = 1; k <= L; k++) begin : g_cm
    localparam int D = 1 << (k - 1);
    always_ff @(posedge clk) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (i >= D) begin
          G[k][i] <= maj5(P[k-1][i], G[k-1][i-D], G[k-1][i], G[k-1][i], 1'b1);
          P[k][i] <= P[k-1][i] & P[k-1][i-D];
        end else begin
          G[k][i] <= G[k-1][i];
          P[k][i] <= P[k-1][i];
        end
      end
    end
  end

  logic [WIDTH-1:0] pr_d;
  logic             cin_d;
  aqfp_delay #(.WIDTH(WIDTH + 1), .DEPTH(L)) u_p_chain (
    .clk(clk), .d({pr, cin_gp}), .q({pr_d, cin_d}));

  logic [WIDTH-1:0] s;
  logic             co;
  always_ff @(posedge clk) begin
    s[0] <= pr_d[0] ^ cin_d;
    for (int i = 1; i < WIDTH; i++) s[i] <= pr_d[i] ^ G[L][i-1];
    co <= G[L][WIDTH-1];
  end

  assign sum = {co, s};

  aqfp_valid_delay #(.DEPTH(LATENCY)) u_valid (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .out_valid(out_valid));

endmodule
