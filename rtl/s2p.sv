// s2p: serial-to-parallel interface in front of the block decoder.
//
// Collects NSYM = 8 received 2-bit symbols, one per cycle with sym_valid
// high, into a 2*NSYM-bit word, the first symbol in the top two bits. The
// cycle after the NSYM-th symbol, word holds the complete block and
// word_valid is high for one cycle; the next block starts filling at once,
// so symbols may arrive back to back. Synchronous active-high reset restarts
// at a block boundary. The interface is named by the design; its framing,
// bit order and handshake are this design's choices.
module s2p #(
  parameter int NSYM = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sym_valid,
  input  logic [1:0]        sym,
  output logic              word_valid,
  output logic [2*NSYM-1:0] word
);
  localparam int CW = $clog2(NSYM);

  logic [CW-1:0]       cnt_q;
  logic [2*NSYM-3:0]   shift_q;   // symbols received so far in this block

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q      <= '0;
      shift_q    <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (sym_valid) begin
        shift_q <= {shift_q[2*NSYM-5:0], sym};
        if (cnt_q == CW'(NSYM - 1)) begin
          cnt_q      <= '0;
          word       <= {shift_q, sym};
          word_valid <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  initial assert (NSYM >= 3 && (1 << CW) == NSYM)
    else $fatal(1, "s2p: NSYM must be a power of two, at least 4");
endmodule
