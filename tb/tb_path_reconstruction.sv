// tb_path_reconstruction: random decision words and end states, blocks back
// to back and with gaps. The expected bits come from a traceback in the
// testbench: start at the given state, take its MSB as the step's bit, and
// move to {state[0], decision of that state}, last step first. Each block
// must appear NSTEP + 2 clk2x cycles after the clk edge of its last step.
module tb_path_reconstruction;
  localparam int NSTEP = 8;
  logic clk = 0, clk2x = 0, rst = 1;
  logic dec_valid = 0, last = 0, out_valid;
  logic [3:0] dec = '0;
  logic [1:0] best_state = '0;
  logic [NSTEP-1:0] data_out;
  int checks = 0, failures = 0, t2 = 0, nblk = 0, gaps = 0;
  logic [NSTEP-1:0] exp_q [$];
  int due_q [$];

  path_reconstruction #(.NSTEP(NSTEP), .NSTATES(4)) dut (.*);

  always #5   clk = ~clk;
  always #2.5 clk2x = ~clk2x;

  always @(posedge clk2x) t2++;

  initial begin
    repeat (50000) @(posedge clk);
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
        logic [NSTEP-1:0] e;
        int due;
        e = exp_q.pop_front(); due = due_q.pop_front();
        if (data_out !== e) begin failures++; $display("block: %b exp %b", data_out, e); end
        if (t2 != due) begin failures++; $display("at %0d exp %0d", t2, due); end
        nblk++;
      end
    end
  end

  initial begin
    logic [3:0] w [NSTEP];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < 400; b++) begin
      logic [1:0] st;
      logic [NSTEP-1:0] e;
      for (int s = 0; s < NSTEP; s++) begin
        @(negedge clk);
        w[s] = 4'($urandom);
        dec_valid = 1; dec = w[s]; last = (s == NSTEP - 1);
        if (last) best_state = 2'($urandom);
        @(posedge clk);
        if (last) begin
          st = best_state;
          for (int k = NSTEP - 1; k >= 0; k--) begin
            e[NSTEP-1-k] = st[1];
            st = {st[0], w[k][st]};
          end
          exp_q.push_back(e);
          due_q.push_back(t2 + NSTEP + 2);
        end
        #1 dec_valid = 0; last = 0;
        if ($urandom_range(0, 7) == 0) begin gaps++; repeat ($urandom_range(1, 3)) @(posedge clk); end
      end
    end
    repeat (10) @(posedge clk);
    checks += 2;
    if (nblk != 400) begin failures++; $display("%0d blocks out", nblk); end
    if (gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
