// tb_pmu: the path metrics appear one clock edge after they are presented
// and are cleared by reset.
module tb_pmu;
  localparam int PM_W = 7;
  logic clk = 0, rst = 1;
  logic [PM_W-1:0] pm_in [4], pm_out [4], prev [4];
  int checks = 0, failures = 0;

  pmu #(.PM_W(PM_W), .NSTATES(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 4; j++) pm_in[j] = PM_W'(j + 5);
    @(posedge clk); #1;
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (pm_out[j] !== '0) failures++;
    end
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        pm_in[j] = PM_W'($urandom);
        prev[j]  = pm_in[j];
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (pm_out[j] !== prev[j]) begin
          failures++; $display("state %0d: %0d exp %0d", j, pm_out[j], prev[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
