// aqfp_pkg: shared cell functions and constants for the AQFP adder designs.
//
// An adiabatic quantum-flux-parametron (AQFP) gate is excited by a 4-phase AC
// power-clock: every gate, buffer included, latches its result for one phase
// and hands it to the gate of the next phase. The RTL in this library models
// that as one register per logic level, clocked by a "phase tick" (four ticks
// per excitation cycle). The functions below are the logic of the basic cells:
// the 3-input and 5-input majority gates; AND and OR are majority gates with a
// constant input (Maj(a,b,0) and Maj(a,b,1)). The bfloat16 field widths follow
// the format (1 sign, 8 exponent, 7 fraction bits).
package aqfp_pkg;

  // Phase ticks per excitation cycle (4-phase clocking).
  localparam int unsigned PHASES_PER_CYCLE = 4;

  // Maj(a,b,c) = ab + bc + ca
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (b & c) | (c & a);
  endfunction

  // 5-input majority: '1' when three or more inputs are '1'.
  function automatic logic maj5(input logic a, input logic b, input logic c,
                                input logic d, input logic e);
    logic [2:0] n;
    n = 3'(a) + 3'(b) + 3'(c) + 3'(d) + 3'(e);
    return n >= 3'd3;
  endfunction

  // bfloat16 fields
  localparam int unsigned BF_EXP_W  = 8;
  localparam int unsigned BF_FRAC_W = 7;
  localparam int unsigned BF_W      = 1 + BF_EXP_W + BF_FRAC_W;

  // Mantissa datapath: [11] headroom, [10:3] significand (hidden bit at 10),
  // [2:0] guard, round and sticky bits.
  localparam int unsigned MANT_W = 12;

  typedef struct packed {
    logic                 sign;
    logic [BF_EXP_W-1:0]  exp;
    logic [BF_FRAC_W-1:0] frac;
  } bf16_t;

endpackage
