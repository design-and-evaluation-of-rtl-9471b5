// pmu: path metric unit of one trellis step.
//
// Holds the path metrics of the four states between two pipelined trellis
// steps (the W_PM_i_to_j wires of the reference simulation). It loads
// pm_in on every rising clock edge; a synchronous active-high reset clears
// all metrics to 0, the start of a block in which every state is equally
// likely. The loading on every edge follows the clocking of the ACS in the
// design; the reset value is this design's choice.
module pmu #(
  parameter int PM_W    = 7,
  parameter int NSTATES = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [PM_W-1:0] pm_in  [NSTATES],
  output logic [PM_W-1:0] pm_out [NSTATES]
);
  always_ff @(posedge clk) begin
    for (int j = 0; j < NSTATES; j++)
      pm_out[j] <= rst ? '0 : pm_in[j];
  end
endmodule
