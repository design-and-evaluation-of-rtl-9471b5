// acs_stage: one pipelined trellis step of the block Viterbi decoder.
//
// From the received symbol `sym` the BMU forms the four branch metrics; for
// every state j four ACS units add them to the path metrics pm_in of the two
// predecessors {j[0],0} and {j[0],1} and select the smaller. The new metrics
// are registered in the PMU (pm_out) on every clock edge, and the HREM
// survivor unit registers the exchanged survivors (stored_out) on edges
// where en is high. Both outputs are therefore valid one cycle after pm_in,
// stored_in and sym. The structure (BMU, ACS, path metric and survivor units
// per step, metrics passed from step to step) follows the design; the port
// bundling is this design's choice.
module acs_stage
  import vit_pkg::*;
#(
  parameter int PM_W = 7,
  parameter int L    = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  sym_t            sym,
  input  logic [PM_W-1:0] pm_in      [NSTATES],
  input  logic [L-M-1:0]  stored_in  [NSTATES],
  output logic [PM_W-1:0] pm_out     [NSTATES],
  output logic [L-M-1:0]  stored_out [NSTATES]
);
  bm_t             bm     [4];
  logic [PM_W-1:0] pm_new [NSTATES];
  logic            dec    [NSTATES];

  bmu u_bmu (.rx(sym), .bm(bm));

  for (genvar j = 0; j < NSTATES; j++) begin : g_state
    localparam state_t  J  = state_t'(j);
    localparam logic    U  = J[M-1];              // input bit that leads to j
    localparam state_t  P0 = pred_state(J[0], 1'b0);
    localparam state_t  P1 = pred_state(J[0], 1'b1);
    localparam sym_t    C0 = branch_sym(P0, U);
    localparam sym_t    C1 = branch_sym(P1, U);

    acs #(.PM_W(PM_W)) u_acs (
      .pm0   (pm_in[P0]),
      .pm1   (pm_in[P1]),
      .bm0   (bm[C0]),
      .bm1   (bm[C1]),
      .pm_new(pm_new[j]),
      .dec   (dec[j])
    );
  end

  pmu #(.PM_W(PM_W), .NSTATES(NSTATES)) u_pmu (
    .clk(clk), .rst(rst), .pm_in(pm_new), .pm_out(pm_out)
  );

  smu_hrem #(.L(L), .M(M), .NSTATES(NSTATES)) u_smu (
    .clk(clk), .rst(rst), .en(en),
    .stored_in(stored_in), .dec(dec), .stored_out(stored_out)
  );
endmodule
