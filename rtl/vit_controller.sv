// vit_controller: pipeline controller of the block Viterbi decoder.
//
// A shift register follows each valid block through the NSTAGE trellis
// steps. stage_en[k] is high in the cycle in which stage k holds the inputs
// of a valid block (k cycles after it entered), so the survivor registers of
// that stage load only then
// and hold still otherwise (the gated survivor clock of the design, written
// as a clock enable). sel_en is high NSTAGE cycles after entry, when the last
// stage's registered outputs belong to the block, and out_valid one cycle
// later, when the decoded word sits in the output register. Synchronous active-high reset empties the pipeline.
// The controller and its survivor clock follow the design only by name and
// connection; the valid tracking is this design's choice.
module vit_controller #(
  parameter int NSTAGE = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic stage_en [NSTAGE],
  output logic sel_en,
  output logic out_valid
);
  logic [NSTAGE:0] v_q;   // v_q[k]: a valid block has passed k+1 stages

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= {v_q[NSTAGE-1:0], in_valid};
  end

  always_comb begin
    stage_en[0] = in_valid;
    for (int k = 1; k < NSTAGE; k++) stage_en[k] = v_q[k-1];
  end

  assign sel_en    = v_q[NSTAGE-1];
  assign out_valid = v_q[NSTAGE];
endmodule
