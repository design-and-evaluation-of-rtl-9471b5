// smu_hrem: survivor memory of one trellis step, hybrid register exchange.
//
// In plain register exchange each state keeps an L-bit survivor and copies
// its chosen predecessor's survivor, shifted, every step. The newest M = K-1
// bits of the survivor of state j are always the bits of j itself, so this
// unit stores only the older SW = L - M bits and rebuilds the rest from the
// state number: survivor(j) = {stored(j), j[0], j[1]} (oldest bit at the
// MSB). One step is stored(j) <= {stored(pred)[SW-2:0], dec(j)} with
// pred = {j[0], dec(j)}; the decision bit is the bit that leaves the implied
// part. M flip-flops per state fewer than register exchange switch.
//
// The registers load only when en is high (the survivor-unit clock of the
// design's controller, written here as a clock enable). Synchronous
// active-high reset clears them. The hybrid idea follows the design; the
// storage layout, the enable and the reset are this design's choices.
module smu_hrem #(
  parameter int L       = 8,   // survivor length in bits
  parameter int M       = 2,   // encoder memory, K-1
  parameter int NSTATES = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [L-M-1:0]  stored_in  [NSTATES],
  input  logic            dec        [NSTATES],
  output logic [L-M-1:0]  stored_out [NSTATES]
);
  localparam int SW = L - M;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < NSTATES; j++) stored_out[j] <= '0;
    end else if (en) begin
      for (int j = 0; j < NSTATES; j++) begin
        logic [1:0] p;
        p = {j[0], dec[j]};
        stored_out[j] <= {stored_in[p][SW-2:0], dec[j]};
      end
    end
  end

  initial assert (L > M + 1) else $fatal(1, "smu_hrem: L must exceed K");
  initial assert (M == 2) else $fatal(1, "smu_hrem: written for K = 3");
endmodule
