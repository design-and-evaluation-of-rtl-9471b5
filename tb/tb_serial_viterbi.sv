// tb_serial_viterbi: the traceback decoder. Random symbols (one per cycle,
// with random gaps) are framed in blocks of 8; every block's output must
// equal the reference decoder's result for those 8 symbols, including the
// published reference word, and arrive NSTEP + 2 clk2x cycles after the clk
// edge that sampled its last symbol.
module tb_serial_viterbi;
  import vit_ref_pkg::*;
  localparam int NSTEP = 8;
  logic clk = 0, clk2x = 0, rst = 1, in_valid = 0, out_valid;
  logic [1:0] sym = '0;
  logic [7:0] data_out;
  int checks = 0, failures = 0, t2 = 0, nblk = 0;
  logic [7:0] exp_q [$];
  int due_q [$];

  serial_viterbi dut (.*);

  always #5   clk = ~clk;
  always #2.5 clk2x = ~clk2x;
  always @(posedge clk2x) t2++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk2x) begin
    #0.5;
    if (!rst && out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        logic [7:0] e;
        int due;
        e = exp_q.pop_front(); due = due_q.pop_front();
        if (data_out !== e) begin failures++; $display("block %0d: %b exp %b", nblk, data_out, e); end
        if (t2 != due) begin failures++; $display("at %0d exp %0d", t2, due); end
        nblk++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < 1000; b++) begin
      logic [15:0] w;
      w = (b == 0) ? 16'b0101010101011011 : 16'($urandom);
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        in_valid = 1; sym = w[15-2*s -: 2];
        @(posedge clk);
        if (s == 7) begin
          exp_q.push_back(ref_decode(w));
          due_q.push_back(t2 + NSTEP + 2);
        end
        #1 in_valid = 0;
        if ($urandom_range(0, 7) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
      end
    end
    repeat (10) @(posedge clk);
    checks += 2;
    if (nblk != 1000) begin failures++; $display("%0d blocks out", nblk); end
    if (ref_decode(16'b0101010101011011) !== 8'b10110100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
