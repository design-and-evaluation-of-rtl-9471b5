// acs_matrix: the pipelined trellis of one received block.
//
// NSTAGE acs_stage instances in a chain: stage k (k = 0..NSTAGE-1) processes
// received symbol data_recv[k] and passes its four path metrics and
// survivors to stage k+1. A block enters every clock cycle; symbol k is
// delayed by k registers so that it meets its block at stage k. The first
// stage starts from path metric 0 in every state and empty survivors. After
// NSTAGE clock edges, data_out[j] is the NSTAGE-bit survivor of state j
// (first decoded bit at the MSB, rebuilt from the stored bits and the state
// number) and pm_out[j] its path metric.
//
// The two lowest bits of each data_out[j] are the constant state number j, as
// hybrid register exchange intends: only the upper NSTAGE-2 bits are stored.
//
// Timing: data_recv sampled at edge 0 gives data_out/pm_out after edge
// NSTAGE-1. stage_en[k] enables the survivor registers of stage k.
// Eight stages, 2-bit symbols, 8-bit survivors and 7-bit path metrics follow
// the design's ACS_matrix; the input skew registers are this design's choice.
module acs_matrix
  import vit_pkg::*;
#(
  parameter int NSTAGE = 8,
  parameter int PM_W   = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              stage_en [NSTAGE],
  input  sym_t              data_recv [NSTAGE],
  output logic [NSTAGE-1:0] data_out [NSTATES],
  output logic [PM_W-1:0]   pm_out   [NSTATES]
);
  localparam int L  = NSTAGE;
  localparam int SW = L - M;

  // Path metrics and stored survivor bits between stages: index k is the
  // input of stage k.
  logic [PM_W-1:0] pm_w     [NSTAGE+1][NSTATES];
  logic [SW-1:0]   stored_w [NSTAGE+1][NSTATES];

  always_comb begin
    for (int j = 0; j < NSTATES; j++) begin
      pm_w[0][j]     = '0;
      stored_w[0][j] = '0;
    end
  end

  for (genvar k = 0; k < NSTAGE; k++) begin : g_stage
    sym_t sym_k;

    if (k == 0) begin : g_nodelay
      assign sym_k = data_recv[0];
    end else begin : g_delay
      sym_t dly_q [k];
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int d = 0; d < k; d++) dly_q[d] <= '0;
        end else begin
          dly_q[0] <= data_recv[k];
          for (int d = 1; d < k; d++) dly_q[d] <= dly_q[d-1];
        end
      end
      assign sym_k = dly_q[k-1];
    end

    acs_stage #(.PM_W(PM_W), .L(L)) u_stage (
      .clk       (clk),
      .rst       (rst),
      .en        (stage_en[k]),
      .sym       (sym_k),
      .pm_in     (pm_w[k]),
      .stored_in (stored_w[k]),
      .pm_out    (pm_w[k+1]),
      .stored_out(stored_w[k+1])
    );
  end

  always_comb begin
    for (int j = 0; j < NSTATES; j++) begin
      state_t s;
      s           = state_t'(j);
      data_out[j] = {stored_w[NSTAGE][j], s[0], s[1]};
      pm_out[j]   = pm_w[NSTAGE][j];
    end
  end

  initial assert (NSTAGE >= K + 1) else $fatal(1, "acs_matrix: NSTAGE too small");
  initial assert (PM_W >= $clog2(2 * NSTAGE + 1))
    else $fatal(1, "acs_matrix: PM_W too narrow for NSTAGE");
endmodule
