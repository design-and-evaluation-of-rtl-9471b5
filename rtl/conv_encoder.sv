// conv_encoder: rate-1/2, constraint-length-3 convolutional encoder
// (generators g1 = 111, g2 = 101), the source of the decoder's input.
//
// Two memory elements hold the previous two input bits. Each cycle with
// in_valid high, the encoder takes in_bit, emits the symbol
// {in_bit ^ u(t-1) ^ u(t-2), in_bit ^ u(t-2)} on out_sym one cycle later
// with out_valid high, and shifts in_bit into its memory. Synchronous,
// active-high reset clears the memory (start in state 0). The generators and
// the two memory elements follow the design; the registered output, the valid
// handshake and the reset are this design's choices.
module conv_encoder
  import vit_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output sym_t out_sym
);
  state_t mem_q;   // {u(t-1), u(t-2)}

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_q     <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= branch_sym(mem_q, in_bit);
        mem_q   <= {in_bit, mem_q[M-1]};
      end
    end
  end
endmodule
