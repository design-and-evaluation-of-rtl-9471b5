// tb_smu_hrem: random decisions and incoming stored bits. The expected
// value is formed from full register-exchange survivors: rebuild the full
// survivor of the chosen predecessor from its stored bits and state number,
// shift in the input bit of the new state, and keep the part above the
// implied bits. Also checks that the registers hold while en is low.
module tb_smu_hrem;
  localparam int L = 8, M = 2, SW = L - M;
  logic clk = 0, rst = 1, en = 0;
  logic [SW-1:0] stored_in [4], stored_out [4], exp_q [4];
  logic dec [4];
  int checks = 0, failures = 0, holds = 0;

  smu_hrem #(.L(L), .M(M), .NSTATES(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 4; j++) begin stored_in[j] = '1; dec[j] = 0; end
    @(posedge clk); #1;
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (stored_out[j] !== '0) failures++;
      exp_q[j] = '0;
    end
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      for (int j = 0; j < 4; j++) begin
        stored_in[j] = SW'($urandom);
        dec[j]       = $urandom_range(0, 1);
      end
      if (en) begin
        for (int j = 0; j < 4; j++) begin
          logic [1:0] p;
          logic [L-1:0] full_p, full_n;
          p      = {j[0], dec[j]};
          full_p = {stored_in[p], p[0], p[1]};
          full_n = {full_p[L-2:0], j[1]};
          exp_q[j] = full_n[L-1:M];
          // the implied part of the new survivor is the new state's number
          checks++;
          if (full_n[1:0] !== {j[0], j[1]}) failures++;
        end
      end else holds++;
      @(posedge clk); #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (stored_out[j] !== exp_q[j]) begin
          failures++; $display("cycle %0d state %0d: %b exp %b", i, j, stored_out[j], exp_q[j]);
        end
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
