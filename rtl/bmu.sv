// bmu: branch metric unit (hard decision).
//
// For a received 2-bit symbol it gives the Hamming distance to each of the
// four possible code symbols: bm[c] = popcount(rx ^ c), 0..2. Purely
// combinational; the trellis step that uses it registers the result in its
// path metrics. The Hamming metric follows the design; the indexing of the
// output by code symbol is this design's choice.
module bmu
  import vit_pkg::*;
(
  input  sym_t rx,
  output bm_t  bm [4]
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [1:0] d;
      d     = rx ^ 2'(c);
      bm[c] = bm_t'(d[1]) + bm_t'(d[0]);
    end
  end
endmodule
