// tb_acs_matrix: the eight-step trellis.
// 1. The reference word 0101010101011011 from the published simulation
//    must give survivors 10110100, 01101110, 11011001, 01101111, path
//    metrics 3 in states 3 and 4 (numbered from 1), and the inter-stage
//    metrics 1,0,1,0 after step 1, 1,0,1,1 after step 2 and 1 (state 1)
//    after step 3.
// 2. Random words entered back to back must each appear after 8 cycles with
//    the survivors and metrics of the reference model.
module tb_acs_matrix;
  import vit_ref_pkg::*;
  localparam int NSTAGE = 8, PM_W = 7;
  logic clk = 0, rst = 1;
  logic stage_en [NSTAGE];
  logic [1:0] data_recv [NSTAGE];
  logic [NSTAGE-1:0] data_out [4];
  logic [PM_W-1:0] pm_out [4];
  int checks = 0, failures = 0;
  logic [15:0] words [$];

  acs_matrix #(.NSTAGE(NSTAGE), .PM_W(PM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] w);
    for (int k = 0; k < NSTAGE; k++) data_recv[k] = w[15-2*k -: 2];
  endtask

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("%s: %0d exp %0d", what, got, exp);
    end
  endtask

  localparam logic [15:0] REF_WORD = 16'b0101010101011011;
  localparam logic [7:0]  REF_SURV [4] = '{8'b10110100, 8'b01101110, 8'b11011001, 8'b01101111};

  initial begin
    for (int k = 0; k < NSTAGE; k++) stage_en[k] = 1;
    apply('0);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // --- published reference word, held steady
    @(negedge clk); apply(REF_WORD);
    @(posedge clk); #1;   // after step 1
    chk("W1 s1", dut.pm_w[1][0], 1); chk("W1 s2", dut.pm_w[1][1], 0);
    chk("W1 s3", dut.pm_w[1][2], 1); chk("W1 s4", dut.pm_w[1][3], 0);
    @(posedge clk); #1;   // after step 2
    chk("W2 s1", dut.pm_w[2][0], 1); chk("W2 s2", dut.pm_w[2][1], 0);
    chk("W2 s3", dut.pm_w[2][2], 1); chk("W2 s4", dut.pm_w[2][3], 1);
    @(posedge clk); #1;   // after step 3
    chk("W3 s1", dut.pm_w[3][0], 1);
    repeat (NSTAGE - 3) @(posedge clk);
    #1;
    for (int j = 0; j < 4; j++) chk($sformatf("ref surv %0d", j), data_out[j], REF_SURV[j]);
    chk("ref pm 3", pm_out[2], 3);
    chk("ref pm 4", pm_out[3], 3);
    // --- random words, one per cycle
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          logic [15:0] w;
          @(negedge clk);
          w = 16'($urandom);
          apply(w);
          words.push_back(w);
        end
      end
      begin
        repeat (NSTAGE) @(posedge clk);
        for (int i = 0; i < 300; i++) begin
          trellis_t t;
          logic [15:0] w;
          @(negedge clk);
          w = words.pop_front();
          t = ref_run(w, NSTAGE);
          for (int j = 0; j < 4; j++) begin
            chk($sformatf("word %0d surv %0d", i, j), data_out[j], t.surv[j]);
            chk($sformatf("word %0d pm %0d", i, j), pm_out[j], t.pm[j]);
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
