// tb_viterbi_system: end-to-end run of the whole link at its default size.
// Random message bits go into the encoder (with random idle cycles); a
// channel model in the testbench flips symbol bits at random and feeds the
// result back into the receive side. Every decoded block is compared with the
// reference decoder applied to the received symbols and, where the block
// had no error, with the message itself; its latency from the block's last
// symbol must be 9 cycles. Counted mechanisms, each required at least once:
// error-free blocks, blocks with channel errors that were corrected, blocks
// with more errors than the code corrects, ACS compares that were ties,
// cycles in which the survivor enables held a stage still, idle input
// cycles inside a block, and tracebacks of the serial decoder, whose bits
// must equal the pipelined decoder's block by block and arrive NSTAGE + 2
// clk2x cycles after the block's last symbol. The 2-to-4 decoder and the
// flash ADC back end alongside are exercised with random inputs.
module tb_viterbi_system;
  import vit_ref_pkg::*;
  logic clk = 0, clk2x = 0, rst = 1;
  logic tb_valid;
  logic [7:0] tb_data;
  logic [1:0] dec2_a = '0;
  logic [3:0] dec2_y;
  logic [6:0] adc_thermo = '0;
  logic [2:0] adc_dout;
  logic enc_valid = 0, enc_bit = 0, enc_sym_valid;
  logic [1:0] enc_sym, rx_sym, err = '0;
  logic rx_valid, dec_valid;
  logic [7:0] dec_data;
  int checks = 0, failures = 0, cycle = 0;

  viterbi_system dut (.*);

  assign rx_valid = enc_sym_valid;
  assign rx_sym   = enc_sym ^ err;

  always #5   clk = ~clk;
  always #2.5 clk2x = ~clk2x;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel errors: about one flipped bit in 20
  always @(negedge clk) err <= {($urandom_range(0, 19) == 0), ($urandom_range(0, 19) == 0)};

  // receive-side bookkeeping
  logic [7:0]  msg_q [$];        // message bits sent, first at the front
  logic [15:0] rx_word;
  int          rx_n = 0, rx_err = 0;
  int          blk_end [$];
  logic [15:0] blk_word [$];
  logic [7:0]  blk_msg [$];
  int          blk_nerr [$];
  logic [7:0]  cur_msg;
  int          msg_n = 0;
  int n_clean = 0, n_corrected = 0, n_uncorrected = 0, n_ties = 0, n_hold = 0, n_gaps = 0;
  int n_blocks = 0, n_tb = 0, n_dec2 = 0, n_adc = 0, t2 = 0;
  logic [7:0]  tbexp_q [$];
  int          tbdue_q [$];

  always @(posedge clk2x) t2++;

  // serial decoder with traceback: same bits as the pipelined one
  always @(posedge clk2x) begin
    #0.5;
    if (!rst && tb_valid) begin
      checks += 2;
      if (tbexp_q.size() == 0) begin failures++; $display("tb_valid without a block"); end
      else begin
        logic [7:0] e; int due;
        e = tbexp_q.pop_front(); due = tbdue_q.pop_front();
        if (tb_data !== e) begin failures++; $display("traceback %b exp %b", tb_data, e); end
        if (t2 != due) begin failures++; $display("traceback at %0d exp %0d", t2, due); end
        n_tb++;
      end
    end
  end

  // 2-to-4 decoder and flash ADC back end
  logic [2:0] adc_exp [$];
  always @(negedge clk) begin
    if (!rst) begin
      int lvl;
      checks++; n_dec2++;
      if (dec2_y !== 4'(1 << dec2_a)) begin failures++; $display("dec2 %b -> %b", dec2_a, dec2_y); end
      dec2_a <= 2'($urandom);
      if (adc_exp.size() == 2) begin
        logic [2:0] e;
        e = adc_exp.pop_front();
        checks++; n_adc++;
        if (adc_dout !== e) begin failures++; $display("adc %0d exp %0d", adc_dout, e); end
      end
      lvl = $urandom_range(0, 7);
      adc_thermo <= 7'((1 << lvl) - 1);
      adc_exp.push_back(3'(lvl));
    end
  end

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (enc_valid) begin
        cur_msg = {cur_msg[6:0], enc_bit};
        msg_n++;
        if (msg_n == 8) begin msg_q.push_back(cur_msg); msg_n = 0; end
      end
      if (rx_valid) begin
        rx_word = {rx_word[13:0], rx_sym};
        rx_err += $countones(err);
        rx_n++;
        if (rx_n == 8) begin
          blk_end.push_back(cycle);
          tbexp_q.push_back(ref_decode(rx_word));
          tbdue_q.push_back(t2 + 8 + 2);
          blk_word.push_back(rx_word);
          blk_msg.push_back(msg_q.pop_front());
          blk_nerr.push_back(rx_err);
          rx_n = 0; rx_err = 0;
        end
      end else if (rx_n != 0) n_gaps++;
      // survivor registers of some stage held while the pipeline holds data
      for (int k = 1; k < 8; k++)
        if (!dut.u_dec.stage_en[k] && dut.u_dec.u_ctrl.v_q != '0) begin n_hold++; break; end
    end
  end

  // ties in the ACS units of the fourth trellis step
  for (genvar j = 0; j < 4; j++) begin : g_tie
    always @(negedge clk)
      if (!rst && dut.u_dec.stage_en[3] &&
          dut.u_dec.u_matrix.g_stage[3].u_stage.g_state[j].u_acs.sum0 ==
          dut.u_dec.u_matrix.g_stage[3].u_stage.g_state[j].u_acs.sum1) n_ties++;
  end

  always @(posedge clk) begin
    #1;
    if (!rst && dec_valid) begin
      if (blk_word.size() == 0) begin
        failures++; $display("dec_valid without a block");
      end else begin
        logic [15:0] w; logic [7:0] m; int ne, te;
        w = blk_word.pop_front(); m = blk_msg.pop_front();
        ne = blk_nerr.pop_front(); te = blk_end.pop_front();
        n_blocks++;
        checks += 2;
        if (dec_data !== ref_decode(w)) begin
          failures++; $display("block %0d: %b exp %b", n_blocks, dec_data, ref_decode(w));
        end
        if (cycle - te != 9) begin
          failures++; $display("block %0d latency %0d", n_blocks, cycle - te);
        end
        if (ne == 0) begin
          n_clean++;
          checks++;
          if (dec_data !== m) begin failures++; $display("clean block %b -> %b", m, dec_data); end
        end else if (dec_data === m) n_corrected++;
        else n_uncorrected++;
      end
    end
  end

  initial begin
    cur_msg = '0; rx_word = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 8 * 3000; i++) begin
      @(negedge clk);
      enc_valid = 1;
      enc_bit   = $urandom_range(0, 1);
      @(posedge clk);
      #1 enc_valid = 0;
      if ($urandom_range(0, 15) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (blk_word.size() != 0 || n_blocks != 3000) begin
      failures++; $display("%0d blocks decoded, %0d left", n_blocks, blk_word.size());
    end
    $display("blocks=%0d clean=%0d corrected=%0d uncorrected=%0d ties=%0d holds=%0d gaps=%0d tracebacks=%0d dec2=%0d adc=%0d",
             n_blocks, n_clean, n_corrected, n_uncorrected, n_ties, n_hold, n_gaps, n_tb, n_dec2, n_adc);
    checks += 9;
    if (n_tb != 3000) failures++;
    if (n_dec2 == 0) failures++;
    if (n_adc == 0) failures++;
    if (n_clean == 0) failures++;
    if (n_corrected == 0) failures++;
    if (n_uncorrected == 0) failures++;
    if (n_ties == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
