// viterbi_system: top level.
//
// Receive side: 2-bit channel symbols arrive one per cycle (rx_valid) and go
// to two decoders of the rate-1/2, K = 3 code that work on the same blocks
// of NSTAGE = 8 symbols and give the same bits:
//  * the pipelined decoder with hybrid register exchange survivors, behind
//    the serial-to-parallel interface: each block's 8 bits appear on
//    dec_data with dec_valid high NSTAGE + 1 = 9 clk cycles after the clk
//    edge that sampled the block's last symbol, one block per 8 symbols;
//  * the serial decoder with one ACS loop and a traceback survivor memory:
//    each block's bits appear on tb_data with tb_valid high for one clk2x
//    cycle, NSTAGE + 2 clk2x cycles after that same edge (clk2x domain).
// Transmit side: the convolutional encoder that produces such symbols stands
// alongside with its own ports, so that a channel (with errors) can be placed
// between enc_sym and rx_sym outside.
// Beside the link, and unconnected to it: a 2-to-4 line decoder and the
// digital back end (latch and thermometer-to-binary encoder) of a flash ADC
// whose comparator outputs come in on adc_thermo.
// clk2x runs at twice the frequency of clk with coincident rising edges.
// Synchronous active-high reset for all parts. The blocks follow the design;
// the wiring of the top is this design's choice.
module viterbi_system
  import vit_pkg::*;
#(
  parameter int NSTAGE    = 8,
  parameter int PM_W      = 7,
  parameter int ADC_NBITS = 3
) (
  input  logic                      clk,
  input  logic                      clk2x,
  input  logic                      rst,
  // transmit side
  input  logic                      enc_valid,
  input  logic                      enc_bit,
  output logic                      enc_sym_valid,
  output sym_t                      enc_sym,
  // receive side
  input  logic                      rx_valid,
  input  sym_t                      rx_sym,
  output logic                      dec_valid,
  output logic [NSTAGE-1:0]         dec_data,
  output logic                      tb_valid,
  output logic [NSTAGE-1:0]         tb_data,
  // 2-to-4 line decoder
  input  logic [1:0]                dec2_a,
  output logic [3:0]                dec2_y,
  // flash ADC back end
  input  logic [(1<<ADC_NBITS)-2:0] adc_thermo,
  output logic [ADC_NBITS-1:0]      adc_dout
);
  logic                word_valid;
  logic [2*NSTAGE-1:0] word;

  conv_encoder u_enc (
    .clk(clk), .rst(rst), .in_valid(enc_valid), .in_bit(enc_bit),
    .out_valid(enc_sym_valid), .out_sym(enc_sym)
  );

  s2p #(.NSYM(NSTAGE)) u_s2p (
    .clk(clk), .rst(rst), .sym_valid(rx_valid), .sym(rx_sym),
    .word_valid(word_valid), .word(word)
  );

  pipe_viterbi #(.NSTAGE(NSTAGE), .PM_W(PM_W)) u_dec (
    .clk(clk), .rst(rst), .in_valid(word_valid), .data_recv(word),
    .out_valid(dec_valid), .data_dec(dec_data)
  );

  serial_viterbi #(.NSTEP(NSTAGE), .PM_W(PM_W)) u_tbdec (
    .clk(clk), .clk2x(clk2x), .rst(rst), .in_valid(rx_valid), .sym(rx_sym),
    .out_valid(tb_valid), .data_out(tb_data)
  );

  decoder_2to4 u_dec2 (.a(dec2_a), .y(dec2_y));

  flash_adc_encoder #(.NBITS(ADC_NBITS)) u_adc (
    .clk(clk), .rst(rst), .thermo(adc_thermo), .dout(adc_dout)
  );
endmodule
