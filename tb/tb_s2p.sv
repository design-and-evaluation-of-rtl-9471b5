// tb_s2p: random symbols with random gaps; every eighth symbol must give a
// one-cycle word_valid with the eight symbols in arrival order, first in the
// top bits; reset in the middle of a block restarts the framing.
module tb_s2p;
  localparam int NSYM = 8;
  logic clk = 0, rst = 1, sym_valid = 0, word_valid;
  logic [1:0] sym = 0;
  logic [15:0] word, acc;
  int checks = 0, failures = 0, n = 0, words = 0;
  logic expect_word = 0;
  logic [15:0] exp_word;

  s2p #(.NSYM(NSYM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i == 1001) begin rst = 1; sym_valid = 1; sym = 2'b11; end
      else begin
        rst = 0;
        sym_valid = ($urandom_range(0, 3) != 0);
        sym = 2'($urandom);
      end
      @(posedge clk); #1;
      if (rst) begin n = 0; acc = '0; expect_word = 0; end
      else if (sym_valid) begin
        acc = {acc[13:0], sym};
        n++;
        if (n == NSYM) begin n = 0; expect_word = 1; exp_word = acc; end
        else expect_word = 0;
      end else expect_word = 0;
      checks++;
      if (word_valid !== expect_word) begin failures++; $display("%0d word_valid %b", i, word_valid); end
      if (expect_word) begin
        words++;
        checks++;
        if (word !== exp_word) begin failures++; $display("word %h exp %h", word, exp_word); end
      end
    end
    checks++;
    if (words < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
