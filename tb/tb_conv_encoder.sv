// tb_conv_encoder: checks the encoder against the generator polynomials
// g1 = 111, g2 = 101 applied to a separately kept bit history, with random
// bits and random gaps in in_valid, and the one-cycle output latency.
module tb_conv_encoder;
  logic clk = 0, rst = 1, in_valid = 0, in_bit = 0, out_valid;
  logic [1:0] out_sym;
  int checks = 0, failures = 0;
  logic [2:0] hist;  // [2] newest bit

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit   = $urandom_range(0, 1);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++; $display("valid mismatch at %0d", i);
      end
      if (in_valid) begin
        hist = {in_bit, hist[2:1]};
        checks++;
        if (out_sym !== {hist[2] ^ hist[1] ^ hist[0], hist[2] ^ hist[0]}) begin
          failures++; $display("symbol mismatch at %0d: %b hist %b", i, out_sym, hist);
        end
      end
    end
    // known sequence from reset: 1,0,1,1 -> 11,10,00,01
    rst = 1; in_valid = 0;
    @(posedge clk); #1 rst = 0;
    foreach (seq[i]) begin
      @(negedge clk); in_valid = 1; in_bit = seq[i];
      @(posedge clk); #1;
      checks++;
      if (out_sym !== exp_sym[i]) begin
        failures++; $display("known seq mismatch %0d: %b", i, out_sym);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       seq     [4] = '{1'b1, 1'b0, 1'b1, 1'b1};
  logic [1:0] exp_sym [4] = '{2'b11, 2'b10, 2'b00, 2'b01};
endmodule
