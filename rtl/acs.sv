// acs: add-compare-select for one trellis state.
//
// Adds branch metric bm0 to path metric pm0 of the predecessor whose oldest
// bit is 0, and bm1 to pm1 of the other predecessor, and keeps the smaller
// sum as the new path metric. dec is the oldest bit of the chosen
// predecessor: 0 when pm0+bm0 is strictly smaller, 1 otherwise (a tie goes to
// predecessor 1, the rule that reproduces the reference simulation).
// Combinational. The metrics are PM_W bits wide and are not normalised; with
// 2-bit branch metrics PM_W must hold 2 * (number of trellis steps).
module acs #(
  parameter int PM_W = 7
) (
  input  logic [PM_W-1:0] pm0,
  input  logic [PM_W-1:0] pm1,
  input  logic [1:0]      bm0,
  input  logic [1:0]      bm1,
  output logic [PM_W-1:0] pm_new,
  output logic            dec
);
  logic [PM_W-1:0] sum0, sum1;

  always_comb begin
    sum0   = pm0 + PM_W'(bm0);
    sum1   = pm1 + PM_W'(bm1);
    dec    = !(sum0 < sum1);
    pm_new = dec ? sum1 : sum0;
  end
endmodule
