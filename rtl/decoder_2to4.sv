// decoder_2to4: 2-to-4 line decoder.
//
// Exactly one of the four outputs is high: y[i] = 1 when a == i. Purely
// combinational. The design builds this decoder at transistor level from
// 3-transistor NAND gates to cut power and delay; that circuit technique
// has no counterpart in RTL, so this module gives only the logic function.
// The active-high output polarity is this design's choice.
module decoder_2to4 (
  input  logic [1:0] a,
  output logic [3:0] y
);
  always_comb begin
    y[0] = !a[1] && !a[0];
    y[1] = !a[1] &&  a[0];
    y[2] =  a[1] && !a[0];
    y[3] =  a[1] &&  a[0];
  end
endmodule
