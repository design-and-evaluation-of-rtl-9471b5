// tb_flash_adc_encoder: every clean thermometer code must give its level two
// edges later; codes with one bubble (one bit flipped below the top) must
// give a value within one of the level; ones are counted independently.
module tb_flash_adc_encoder;
  localparam int NBITS = 3, NCMP = 7;
  logic clk = 0, rst = 1;
  logic [NCMP-1:0] thermo = '0;
  logic [NBITS-1:0] dout;
  int checks = 0, failures = 0, bubbles = 0;

  flash_adc_encoder #(.NBITS(NBITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (dout !== '0) failures++;
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      int lvl, ones;
      logic bub;
      lvl = $urandom_range(0, NCMP);
      bub = (i % 3 == 0) && lvl >= 2;
      @(negedge clk);
      thermo = NCMP'((1 << lvl) - 1);
      if (bub) begin thermo[$urandom_range(0, lvl - 2)] ^= 1'b1; bubbles++; end
      ones = 0;
      for (int b = 0; b < NCMP; b++) ones += thermo[b];
      @(negedge clk);
      thermo = '0;
      @(posedge clk); #1;
      checks++;
      if (int'(dout) != ones) begin failures++; $display("thermo -> %0d exp %0d", dout, ones); end
      checks++;
      if (int'(dout) > lvl || int'(dout) < lvl - 1) failures++;
    end
    checks++;
    if (bubbles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
