// pipe_viterbi: pipelined block Viterbi decoder for the rate-1/2, K = 3 code.
//
// Each 16-bit word data_recv holds NSTAGE = 8 received 2-bit symbols, the
// first one in bits [15:14]. The word runs through the ACS matrix, one
// trellis step per clock, starting from equal path metrics in all states.
// After the last step the state with the smallest path metric (the lowest
// state number on a tie) is chosen and its survivor, the 8 decoded bits
// (first bit at the MSB), is registered into data_dec.
//
// Interface: a word is taken in every cycle in which in_valid is high; its
// decoded bits appear on data_dec with out_valid high NSTAGE = 8 cycles
// later: seven edges through the last trellis step, one into the output
// register (one word per cycle throughput). data_dec holds its value between
// words. Synchronous active-high reset. The 16-bit input, 8-bit output and
// pipelined ACS matrix follow the design; in_valid/out_valid, the choice of
// the output state and the bit order are this design's choices.
module pipe_viterbi
  import vit_pkg::*;
#(
  parameter int NSTAGE = 8,
  parameter int PM_W   = 7
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [2*NSTAGE-1:0] data_recv,
  output logic                out_valid,
  output logic [NSTAGE-1:0]   data_dec
);
  sym_t              syms     [NSTAGE];
  logic              stage_en [NSTAGE];
  logic              sel_en;
  logic [NSTAGE-1:0] surv     [NSTATES];
  logic [PM_W-1:0]   pm       [NSTATES];
  logic [NSTAGE-1:0] best_surv;

  always_comb begin
    for (int k = 0; k < NSTAGE; k++)
      syms[k] = data_recv[2*(NSTAGE-1-k) +: 2];
  end

  vit_controller #(.NSTAGE(NSTAGE)) u_ctrl (
    .clk(clk), .rst(rst), .in_valid(in_valid),
    .stage_en(stage_en), .sel_en(sel_en), .out_valid(out_valid)
  );

  acs_matrix #(.NSTAGE(NSTAGE), .PM_W(PM_W)) u_matrix (
    .clk(clk), .rst(rst), .stage_en(stage_en),
    .data_recv(syms), .data_out(surv), .pm_out(pm)
  );

  // Smallest final path metric; strict '<' keeps the lowest state on a tie.
  always_comb begin
    logic [PM_W-1:0] best_pm;
    best_pm   = pm[0];
    best_surv = surv[0];
    for (int j = 1; j < NSTATES; j++) begin
      if (pm[j] < best_pm) begin
        best_pm   = pm[j];
        best_surv = surv[j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)         data_dec <= '0;
    else if (sel_en) data_dec <= best_surv;
  end
endmodule
