// dp_ram: simple dual-port RAM, the block RAM of the traceback survivor
// memory.
//
// One write port in the clk domain (wr_en, wr_addr, wr_data, written on the
// rising edge) and one read port in the rd_clk domain with a registered
// output: rd_data holds mem[rd_addr] one rd_clk edge after rd_addr was
// presented. A read of a word being written in the same instant returns the
// old word. The memory is not reset, as a block RAM is not; the survivor
// memory only reads words it has written. Dual-port block RAM follows the
// design; sizes and the read timing are this design's choices.
module dp_ram #(
  parameter int AW = 4,
  parameter int DW = 4
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_clk,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);
  logic [DW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    rd_data <= mem[rd_addr];
  end
endmodule
