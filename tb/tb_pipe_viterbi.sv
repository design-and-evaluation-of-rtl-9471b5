// tb_pipe_viterbi: the block decoder.
// 1. The published reference word must decode to 10110100, 8 cycles after
//    the edge that sampled it.
// 2. Encoded random messages with 0, 1 or 2 flipped bits per block, sent
//    back to back and with random gaps, must decode to the reference model's
//    result; error-free blocks must give the message itself. out_valid must
//    follow in_valid 8 cycles later and data_dec must hold between words.
module tb_pipe_viterbi;
  import vit_ref_pkg::*;
  localparam int NSTAGE = 8, LAT = NSTAGE;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [15:0] data_recv = '0;
  logic [7:0] data_dec;
  int checks = 0, failures = 0, cycle = 0;
  int sent_at [$];
  logic [7:0] exp_q [$];
  logic [7:0] msg_q [$];
  logic err_free_q [$];
  logic [1:0] enc_state = '0;

  pipe_viterbi dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: every out_valid must match the oldest word sent.
  logic [7:0] last_dec;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (out_valid) begin
        int t0;
        logic [7:0] e, m;
        logic ef;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected out_valid");
        end else begin
          t0 = sent_at.pop_front(); e = exp_q.pop_front();
          m = msg_q.pop_front(); ef = err_free_q.pop_front();
          checks += 2;
          if (cycle - t0 != LAT) begin
            failures++; $display("latency %0d exp %0d", cycle - t0, LAT);
          end
          if (data_dec !== e) begin
            failures++; $display("dec %b exp %b", data_dec, e);
          end
          if (ef) begin
            checks++;
            if (data_dec !== m) begin failures++; $display("error-free block %b -> %b", m, data_dec); end
          end
        end
        last_dec = data_dec;
      end else begin
        checks++;
        if (data_dec !== last_dec) begin failures++; $display("data_dec changed without out_valid"); end
      end
    end
  end

  task automatic send(input logic [15:0] w, input logic [7:0] m, input logic ef);
    @(negedge clk);
    in_valid  = 1;
    data_recv = w;
    sent_at.push_back(cycle + 1);   // sampled at the coming edge
    exp_q.push_back(ref_decode(w));
    msg_q.push_back(m);
    err_free_q.push_back(ef);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    last_dec = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    send(16'b0101010101011011, 8'h00, 1'b0);
    checks++;
    if (ref_decode(16'b0101010101011011) !== 8'b10110100) failures++;
    repeat (12) @(posedge clk);
    checks++;
    if (last_dec !== 8'b10110100) begin failures++; $display("reference word -> %b", last_dec); end
    for (int i = 0; i < 1000; i++) begin
      logic [7:0] m;
      logic [15:0] w;
      int nerr;
      m = 8'($urandom);
      for (int k = 0; k < 8; k++) begin
        w[15-2*k -: 2] = ref_sym(enc_state, m[7-k]);
        enc_state = {m[7-k], enc_state[1]};
      end
      nerr = $urandom_range(0, 2);
      for (int e = 0; e < nerr; e++) w[$urandom_range(0, 15)] ^= 1'b1;
      send(w, m, nerr == 0);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words never came out", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
