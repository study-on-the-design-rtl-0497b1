// full_adder_type_a: 1-bit AQFP full adder built from majority gates with
// splitters and buffers inserted for timing ("type-A" arrangement).
//
//   Cout = Maj(a, b, c)
//   S    = Maj(NOT Maj(a, b, c), Maj(a, b, NOT c), c)
// Every cell, splitters included, is clocked by one phase, so the netlist is
// four phases deep and both outputs leave in the same phase:
//   phase 1  splitters on a, b and c
//   phase 2  Maj1 = Maj(a,b,c), Maj2 = Maj(a,b,NOT c), buffer on c
//   phase 3  splitter on Maj1, buffers on Maj2 and c
//   phase 4  buffer on Maj1 -> Cout, Maj3 = Maj(NOT Maj1, Maj2, c) -> S
// The equations, the cells and their phases follow the published type-A
// netlist. A new input triple is accepted on every phase tick. The netlist is
// written as instances of aqfp_majority_gate and one-phase buffer cells.
module full_adder_type_a (
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic cout,
  output logic s
);
  logic spl_a, spl_b, spl_c;            // phase 1
  logic maj1, maj2, bfr1;               // phase 2
  logic spl4, bfr4, bfr2;               // phase 3

  // splitters and buffers are one-phase cells that copy their input
  aqfp_delay #(.WIDTH(3), .DEPTH(1)) u_spl123 (
    .clk(clk), .d({a, b, c}), .q({spl_a, spl_b, spl_c}));
  aqfp_majority_gate #(.N(3), .INV(3'b000)) u_maj1 (
    .clk(clk), .x({spl_c, spl_b, spl_a}), .y(maj1));
  aqfp_majority_gate #(.N(3), .INV(3'b100)) u_maj2 (   // c inverted
    .clk(clk), .x({spl_c, spl_b, spl_a}), .y(maj2));
  aqfp_delay #(.WIDTH(1), .DEPTH(1)) u_bfr1 (.clk(clk), .d(spl_c), .q(bfr1));
  aqfp_delay #(.WIDTH(3), .DEPTH(1)) u_spl4_bfr4_bfr2 (
    .clk(clk), .d({maj1, maj2, bfr1}), .q({spl4, bfr4, bfr2}));
  aqfp_delay #(.WIDTH(1), .DEPTH(1)) u_bfr3 (.clk(clk), .d(spl4), .q(cout));
  aqfp_majority_gate #(.N(3), .INV(3'b001)) u_maj3 (   // spl4 inverted
    .clk(clk), .x({bfr2, bfr4, spl4}), .y(s));
endmodule
