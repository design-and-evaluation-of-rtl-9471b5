// tb_vit_controller: random in_valid; stage k must be enabled exactly k
// cycles after a block entered, sel_en after NSTAGE and out_valid after
// NSTAGE+1 cycles (counting the entry cycle as 0), and reset must empty the pipeline.
module tb_vit_controller;
  localparam int NSTAGE = 8;
  logic clk = 0, rst = 1, in_valid = 0, sel_en, out_valid;
  logic stage_en [NSTAGE];
  logic hist [NSTAGE+2];   // hist[d]: in_valid d cycles ago
  int checks = 0, failures = 0;

  vit_controller #(.NSTAGE(NSTAGE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d <= NSTAGE + 1; d++) hist[d] = 0;
    in_valid = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i == 200) begin rst = 1; end
      else rst = 0;
      in_valid = ($urandom_range(0, 2) != 0);
      hist[0] = in_valid;
      #1;
      for (int k = 0; k < NSTAGE; k++) begin
        checks++;
        if (stage_en[k] !== hist[k]) begin
          failures++; $display("cycle %0d stage %0d: %b exp %b", i, k, stage_en[k], hist[k]);
        end
      end
      checks += 2;
      if (sel_en !== hist[NSTAGE]) begin failures++; $display("%0d sel_en", i); end
      if (out_valid !== hist[NSTAGE+1]) begin failures++; $display("%0d out_valid", i); end
      @(posedge clk);
      for (int d = NSTAGE + 1; d > 0; d--) hist[d] = rst ? 1'b0 : hist[d-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
