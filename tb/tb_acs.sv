// tb_acs: random path and branch metrics, plus forced ties; expects the
// smaller sum and its decision bit, with a tie going to predecessor 1.
module tb_acs;
  localparam int PM_W = 7;
  logic [PM_W-1:0] pm0, pm1, pm_new;
  logic [1:0] bm0, bm1;
  logic dec;
  int checks = 0, failures = 0, ties = 0;

  acs #(.PM_W(PM_W)) dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int s0, s1, e_pm;
      logic e_dec;
      pm0 = PM_W'($urandom_range(2, 100));
      bm0 = 2'($urandom_range(0, 2));
      bm1 = 2'($urandom_range(0, 2));
      if (i % 4 == 0) pm1 = PM_W'(int'(pm0) + int'(bm0) - int'(bm1));  // tie
      else            pm1 = PM_W'($urandom_range(0, 100));
      #1;
      s0 = pm0 + bm0;
      s1 = pm1 + bm1;
      e_dec = (s0 < s1) ? 1'b0 : 1'b1;
      e_pm  = e_dec ? s1 : s0;
      if (s0 == s1) ties++;
      checks++;
      if (dec !== e_dec || pm_new !== PM_W'(e_pm)) begin
        failures++;
        $display("pm0=%0d bm0=%0d pm1=%0d bm1=%0d -> %0d/%b exp %0d/%b",
                 pm0, bm0, pm1, bm1, pm_new, dec, e_pm, e_dec);
      end
    end
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
