// aqfp_delay: a chain of AQFP buffer gates used for path balancing.
//
// Every AQFP gate is clocked by one phase of the power-clock, so a signal that
// skips logic levels must pass through one buffer per level it skips; the same
// chain of buffers also repeats signals over long interconnects. This module is
// DEPTH buffers in series: data presented on `d` at phase tick t appears on `q`
// at tick t+DEPTH. DEPTH = 0 is a plain wire. There is no reset: like the real
// buffers the chain simply forgets old data as new data is clocked in.
module aqfp_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_chain
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int unsigned k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
