// tb_acs_stage: drives one trellis step with random path metrics, stored
// survivor bits and symbols, and compares its registered outputs with one
// step of the reference model (full survivors, reduced to the stored part).
module tb_acs_stage;
  import vit_ref_pkg::*;
  localparam int PM_W = 7, L = 8, SW = 6;
  logic clk = 0, rst = 1, en = 1;
  logic [1:0] sym;
  logic [PM_W-1:0] pm_in [4], pm_out [4];
  logic [SW-1:0] stored_in [4], stored_out [4];
  int checks = 0, failures = 0;

  acs_stage #(.PM_W(PM_W), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trellis_t t, n;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      sym = 2'($urandom);
      for (int j = 0; j < 4; j++) begin
        pm_in[j]     = PM_W'($urandom_range(0, 12));
        stored_in[j] = SW'($urandom);
        t.pm[j]      = pm_in[j];
        t.surv[j]    = {stored_in[j], j[0], j[1]};
      end
      n = ref_step(t, sym);
      @(posedge clk); #1;
      for (int j = 0; j < 4; j++) begin
        checks += 2;
        if (pm_out[j] !== PM_W'(n.pm[j])) begin
          failures++; $display("%0d pm[%0d]=%0d exp %0d", i, j, pm_out[j], n.pm[j]);
        end
        if (stored_out[j] !== n.surv[j][7:2]) begin
          failures++; $display("%0d surv[%0d]=%b exp %b", i, j, stored_out[j], n.surv[j][7:2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
