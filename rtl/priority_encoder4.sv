// priority_encoder4: 4-to-2 priority encoder, latency-minimised AQFP form.
//
// Returns the index of the most significant '1' of `a` on `idx` and v = 1 when
// any bit is set (idx = 0 when v = 0):
//   a3 a2 a1 a0 | idx v
//    0  0  0  0 |  0  0
//    0  0  0  1 |  0  1
//    0  0  1  x |  1  1
//    0  1  x  x |  2  1
//    1  x  x  x |  3  1
// Three phases: input buffers; then a3|a2, a1|a0, a1 AND NOT a2 and a buffered
// a3; then v = (a3|a2)|(a1|a0), idx[1] = a3|a2 (buffered) and idx[0] = a3 |
// (a1 AND NOT a2). The truth table and the two-level gate arrangement follow
// the published cell; a new input is accepted every phase tick.
module priority_encoder4 (
  input  logic       clk,
  input  logic [3:0] a,
  output logic [1:0] idx,
  output logic       v
);

  logic [3:0] a_b;
  logic       or32, or10, n1, a3_b;
  always_ff @(posedge clk) begin
    a_b    <= a;
    or32   <= a_b[3] | a_b[2];
    or10   <= a_b[1] | a_b[0];
    n1     <= a_b[1] & ~a_b[2];
    a3_b   <= a_b[3];
    v      <= or32 | or10;
    idx[1] <= or32;
    idx[0] <= a3_b | n1;
  end
endmodule
