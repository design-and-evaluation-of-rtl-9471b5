// tb_bmu: exhaustive check of the branch metrics: for each received symbol
// and each code symbol, the count of differing bits.
module tb_bmu;
  logic [1:0] rx;
  logic [1:0] bm [4];
  int checks = 0, failures = 0;

  bmu dut (.rx(rx), .bm(bm));

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx = 2'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        int exp;
        exp = (r[0] != c[0]) + (r[1] != c[1]);
        checks++;
        if (bm[c] !== 2'(exp)) begin
          failures++; $display("rx=%0d c=%0d bm=%0d exp=%0d", r, c, bm[c], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
