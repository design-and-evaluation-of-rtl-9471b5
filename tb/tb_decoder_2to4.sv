// tb_decoder_2to4: exhaustive check that exactly output a is high.
module tb_decoder_2to4;
  logic [1:0] a;
  logic [3:0] y;
  int checks = 0, failures = 0;

  decoder_2to4 dut (.*);

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = 2'(i);
      #1;
      checks++;
      if (y !== 4'(1 << i)) begin failures++; $display("a=%0d y=%b", i, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
