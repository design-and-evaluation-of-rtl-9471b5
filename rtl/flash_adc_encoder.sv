// flash_adc_encoder: digital back end of a flash ADC.
//
// The comparator bank of a flash converter gives a thermometer code of
// 2**NBITS - 1 bits (bit i high when the input is above reference level i).
// This block latches that code on the rising clock edge and converts the
// latched code to binary by counting its ones, the function of a Wallace
// tree decoder. Unlike a decoder that first turns the thermometer code into
// a 1-out-of-N code with XOR gates of neighbouring bits, a ones counter
// reads the thermometer code directly, and a single out-of-place bit
// ("bubble") moves the result by at most one code instead of producing a
// wild value. Timing: thermo sampled at edge n gives dout after edge n+1
// (latch, then a registered encoder output). Synchronous active-high reset.
// The latch-plus-encoder structure and the ones-count function follow the
// design; NBITS (the design gives no resolution), the registered output
// and writing the ones count as a plain adder loop, which synthesis maps to
// an adder tree, are this design's choices.
module flash_adc_encoder #(
  parameter int NBITS = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [(1<<NBITS)-2:0] thermo,
  output logic [NBITS-1:0]      dout
);
  localparam int NCMP = (1 << NBITS) - 1;

  logic [NCMP-1:0]  thermo_q;
  logic [NBITS-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < NCMP; i++) ones = ones + NBITS'(thermo_q[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      thermo_q <= '0;
      dout     <= '0;
    end else begin
      thermo_q <= thermo;
      dout     <= ones;
    end
  end
endmodule
