// path_reconstruction: traceback survivor memory with its optimal path
// reconstruction circuit.
//
// Write side (clk): each cycle with dec_valid high, the four ACS decision
// bits of one trellis step (bit j: oldest bit of the predecessor chosen by
// state j) are written into a dual-port block RAM, NSTEP words per block,
// two blocks (banks) so that one block is written while the previous one is
// traced back. With the last step of a block (last high) the decoder also
// gives best_state, the state of smallest final path metric.
//
// Reconstruction side (clk2x, a clock of twice the frequency of clk with
// coincident rising edges): a register holds the current path number (a
// state), starting at best_state. The RAM is read backwards from the block's
// last step; for each step the path number selects its decision bit out of
// the word read, the decoded bit is the path number's MSB (the input bit that
// led into that state), and the new path number is {path[0], decision}, the
// predecessor. After NSTEP steps, NSTEP + 1 clk2x cycles, the block's bits
// are on data_out (first bit at the MSB) with out_valid high for one clk2x
// cycle. A block ends at most every NSTEP clk cycles, and a traceback needs
// NSTEP/2 + 1 of them, so a block is done long before its bank is reused.
//
// The dual-port RAM, the path-number register, the next-path-number
// calculation and the double-frequency clock follow the design; the bank
// layout, the handover from the write side by a toggle, the backward read
// order and the output word are this design's choices.
module path_reconstruction #(
  parameter int NSTEP   = 8,
  parameter int NSTATES = 4
) (
  input  logic               clk,
  input  logic               clk2x,
  input  logic               rst,
  // write side, clk domain
  input  logic               dec_valid,
  input  logic [NSTATES-1:0] dec,
  input  logic               last,
  input  logic [1:0]         best_state,
  // reconstruction side, clk2x domain
  output logic               out_valid,
  output logic [NSTEP-1:0]   data_out
);
  localparam int SW = $clog2(NSTEP);
  localparam int AW = SW + 1;          // {bank, step}

  // ---- write side
  logic [SW-1:0] wstep_q;
  logic          wbank_q;
  logic          done_tgl_q;           // toggles when a block is complete
  logic          done_bank_q;
  logic [1:0]    done_state_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wstep_q      <= '0;
      wbank_q      <= 1'b0;
      done_tgl_q   <= 1'b0;
      done_bank_q  <= 1'b0;
      done_state_q <= '0;
    end else if (dec_valid) begin
      if (last) begin
        wstep_q      <= '0;
        wbank_q      <= !wbank_q;
        done_tgl_q   <= !done_tgl_q;
        done_bank_q  <= wbank_q;
        done_state_q <= best_state;
      end else begin
        wstep_q <= wstep_q + 1'b1;
      end
    end
  end

  // ---- block RAM
  logic [AW-1:0]      rd_addr;
  logic [NSTATES-1:0] rd_data;

  dp_ram #(.AW(AW), .DW(NSTATES)) u_ram (
    .clk(clk), .wr_en(dec_valid), .wr_addr({wbank_q, wstep_q}), .wr_data(dec),
    .rd_clk(clk2x), .rd_addr(rd_addr), .rd_data(rd_data)
  );

  // ---- reconstruction side
  typedef enum logic [1:0] {TB_IDLE, TB_RUN} tb_state_e;
  tb_state_e     st_q;
  logic          seen_tgl_q;
  logic          bank_q;
  logic [SW-1:0] rstep_q;              // step whose word is being read
  logic [SW-1:0] dstep_q;              // step whose word is on rd_data
  logic          data_ok_q;            // rd_data holds a word of this block
  logic [1:0]    path_q;               // path number
  logic [NSTEP-1:0] bits_q;

  assign rd_addr = {bank_q, rstep_q};

  always_ff @(posedge clk2x) begin
    if (rst) begin
      st_q       <= TB_IDLE;
      seen_tgl_q <= 1'b0;
      bank_q     <= 1'b0;
      rstep_q    <= '0;
      dstep_q    <= '0;
      data_ok_q  <= 1'b0;
      path_q     <= '0;
      bits_q     <= '0;
      out_valid  <= 1'b0;
      data_out   <= '0;
    end else begin
      out_valid <= 1'b0;
      case (st_q)
        TB_IDLE: begin
          data_ok_q <= 1'b0;
          if (done_tgl_q != seen_tgl_q) begin
            seen_tgl_q <= done_tgl_q;
            bank_q     <= done_bank_q;
            rstep_q    <= SW'(NSTEP - 1);
            path_q     <= done_state_q;
            st_q       <= TB_RUN;
          end
        end
        TB_RUN: begin
          // issue the next read; the word of rstep_q arrives next cycle
          data_ok_q <= 1'b1;
          dstep_q   <= rstep_q;
          if (rstep_q != '0) rstep_q <= rstep_q - 1'b1;
          if (data_ok_q) begin
            bits_q[NSTEP-1-int'(dstep_q)] <= path_q[1];
            path_q <= {path_q[0], rd_data[path_q]};
            if (dstep_q == '0) begin
              data_out  <= bits_q;
              data_out[NSTEP-1] <= path_q[1];
              out_valid <= 1'b1;
              st_q      <= TB_IDLE;
            end
          end
        end
        default: st_q <= TB_IDLE;
      endcase
    end
  end

  initial assert (NSTATES == 4) else $fatal(1, "path_reconstruction: written for K = 3");
  initial assert ((1 << SW) == NSTEP) else $fatal(1, "path_reconstruction: NSTEP must be a power of two");
endmodule
