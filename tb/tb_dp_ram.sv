// tb_dp_ram: rounds of: write random words to every address on clk, then
// read them back on a clock of twice the frequency, each read checked one
// rd_clk edge after its address was given; during the reads the other half
// of the memory is being rewritten, as the survivor memory does with its
// two banks.
module tb_dp_ram;
  localparam int AW = 4, DW = 4, N = 1 << AW;
  logic clk = 0, rd_clk = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [DW-1:0] model [N];
  int checks = 0, failures = 0;

  dp_ram #(.AW(AW), .DW(DW)) dut (.*);

  always #5   clk = ~clk;
  always #2.5 rd_clk = ~rd_clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = DW'($urandom); model[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int r = 0; r < 50; r++) begin
      logic half;
      half = r[0];
      fork
        // rewrite the half not being read
        begin
          for (int a = 0; a < N / 2; a++) begin
            @(negedge clk);
            wr_en = 1; wr_addr = AW'(a); wr_addr[AW-1] = !half;
            wr_data = DW'($urandom);
          end
          @(negedge clk) wr_en = 0;
        end
        // read the other half on rd_clk
        begin
          for (int a = 0; a < N / 2; a++) begin
            @(negedge rd_clk);
            rd_addr = AW'(a); rd_addr[AW-1] = half;
            @(posedge rd_clk); #0.5;
            checks++;
            if (rd_data !== model[rd_addr]) begin
              failures++; $display("addr %0d: %h exp %h", rd_addr, rd_data, model[rd_addr]);
            end
          end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the model follows every write
  always @(posedge clk) if (wr_en) model[wr_addr] <= wr_data;
endmodule
