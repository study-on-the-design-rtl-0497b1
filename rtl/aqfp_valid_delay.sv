// aqfp_valid_delay: resettable marker that travels with the data wave.
//
// AQFP logic has no reset; the power-clock alone moves data. For simulation
// and for the host side of a test fixture, each datapath carries a 1-bit
// "valid" marker through a chain of DEPTH registers that is cleared by an
// active-low synchronous reset, so the output side can tell which phase ticks
// hold a result. `out_valid` is `in_valid` delayed by DEPTH ticks.
module aqfp_valid_delay #(
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic out_valid
);
  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
  end else begin : g_chain
    logic sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= rst_n & in_valid;
      for (int unsigned k = 1; k < DEPTH; k++) sr[k] <= rst_n & sr[k-1];
    end
    assign out_valid = sr[DEPTH-1];
  end
endmodule
