// serial_viterbi: Viterbi decoder with one ACS stage in a loop and
// traceback survivor memory.
//
// One received 2-bit symbol per cycle with in_valid high. The BMU forms the
// branch metrics, four ACS units update the path metrics held in the PMU,
// which feeds them back to the ACS for the next symbol, and the decision
// bits of every step go to the traceback survivor memory. The symbols are
// framed into blocks of NSTEP = 8, like the words of the pipelined decoder:
// the first step of a block starts from path metric 0 in every state, and at
// the last step the state of smallest path metric (the lowest on a tie) is
// handed to the traceback, which gives the block's 8 bits. Both decoders
// therefore produce the same bits for the same symbols.
//
// Timing: the block's bits appear on data_out with out_valid high (one
// clk2x cycle) NSTEP + 2 clk2x cycles after the clk edge that sampled the
// block's last symbol. clk2x must run at twice the frequency of clk with
// coincident rising edges. Synchronous active-high reset. The BMU-ACS-PMU
// loop and the traceback memory follow the design; the block framing is
// this design's choice, made so that the two decoders agree.
module serial_viterbi
  import vit_pkg::*;
#(
  parameter int NSTEP = 8,
  parameter int PM_W  = 7
) (
  input  logic             clk,
  input  logic             clk2x,
  input  logic             rst,
  input  logic             in_valid,
  input  sym_t             sym,
  output logic             out_valid,
  output logic [NSTEP-1:0] data_out
);
  localparam int SW = $clog2(NSTEP);

  logic [SW-1:0]   step_q;
  bm_t             bm      [4];
  logic [PM_W-1:0] pm_q    [NSTATES];
  logic [PM_W-1:0] pm_acs  [NSTATES];   // metrics into the ACS
  logic [PM_W-1:0] pm_new  [NSTATES];
  logic [PM_W-1:0] pm_next [NSTATES];
  logic            dec     [NSTATES];
  logic [NSTATES-1:0] dec_v;
  logic            last;
  state_t          best;

  assign last = (step_q == SW'(NSTEP - 1));

  always_ff @(posedge clk) begin
    if (rst)           step_q <= '0;
    else if (in_valid) step_q <= step_q + 1'b1;   // wraps at NSTEP
  end

  bmu u_bmu (.rx(sym), .bm(bm));

  always_comb begin
    for (int j = 0; j < NSTATES; j++) begin
      pm_acs[j]  = (step_q == '0) ? '0 : pm_q[j];
      pm_next[j] = in_valid ? pm_new[j] : pm_q[j];
      dec_v[j]   = dec[j];
    end
  end

  for (genvar j = 0; j < NSTATES; j++) begin : g_state
    localparam state_t J  = state_t'(j);
    localparam logic   U  = J[M-1];
    localparam state_t P0 = pred_state(J[0], 1'b0);
    localparam state_t P1 = pred_state(J[0], 1'b1);
    localparam sym_t   C0 = branch_sym(P0, U);
    localparam sym_t   C1 = branch_sym(P1, U);

    acs #(.PM_W(PM_W)) u_acs (
      .pm0(pm_acs[P0]), .pm1(pm_acs[P1]), .bm0(bm[C0]), .bm1(bm[C1]),
      .pm_new(pm_new[j]), .dec(dec[j])
    );
  end

  pmu #(.PM_W(PM_W), .NSTATES(NSTATES)) u_pmu (
    .clk(clk), .rst(rst), .pm_in(pm_next), .pm_out(pm_q)
  );

  // state of smallest new metric; strict '<' keeps the lowest on a tie
  always_comb begin
    logic [PM_W-1:0] b_pm;
    b_pm = pm_new[0];
    best = '0;
    for (int j = 1; j < NSTATES; j++) begin
      if (pm_new[j] < b_pm) begin
        b_pm = pm_new[j];
        best = state_t'(j);
      end
    end
  end

  path_reconstruction #(.NSTEP(NSTEP), .NSTATES(NSTATES)) u_tb (
    .clk(clk), .clk2x(clk2x), .rst(rst),
    .dec_valid(in_valid), .dec(dec_v), .last(last), .best_state(best),
    .out_valid(out_valid), .data_out(data_out)
  );

  initial assert (PM_W >= $clog2(2 * NSTEP + 1))
    else $fatal(1, "serial_viterbi: PM_W too narrow for NSTEP");
endmodule
