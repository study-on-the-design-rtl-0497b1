// aqfp_majority_gate: one clocked AQFP majority gate with 2N+1 inputs.
//
// An AQFP majority gate puts a buffer on each input to even out the input
// currents and merges them in a branch cell; the output follows the direction
// most of the input currents have. Putting an inverter in place of an input
// buffer negates that input, so the gate computes
//   y = 1  when more than half of (x[i] XOR INV[i]) are 1.
// With one input tied to a constant the 3-input gate becomes an AND (constant
// 0) or an OR (constant 1); with both inputs inverted and constant 0 it is a
// NOR (constant 1 there would give NAND).
// Interface: x holds the N inputs (N odd: 3 and 5 are the gates the cell
// library provides), INV marks the inverted ones. Timing: like every AQFP
// cell the gate holds its result for one phase, so y is the value of x one
// phase tick earlier.
// The majority function, the inverted-input form and the constant-input AND
// and OR follow the published cell descriptions; describing the gate as a
// register clocked by the phase tick is this model's timing abstraction.
module aqfp_majority_gate #(
  parameter int unsigned N   = 3,
  parameter bit [N-1:0]  INV = '0
) (
  input  logic         clk,
  input  logic [N-1:0] x,
  output logic         y
);
  initial assert (N % 2 == 1) else $error("aqfp_majority_gate: N must be odd");

  logic [N-1:0] xi;
  int unsigned  ones;
  always_comb begin
    xi   = x ^ INV;
    ones = 0;
    for (int i = 0; i < int'(N); i++) ones += int'(xi[i]);
  end

  always_ff @(posedge clk) y <= (ones > N / 2);
endmodule
