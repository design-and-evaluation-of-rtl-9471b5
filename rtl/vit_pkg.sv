// vit_pkg: constants, types and the branch-output function shared by the
// Viterbi decoder and its encoder.
//
// The code is the rate-1/2, constraint-length-3 convolutional code with
// generator polynomials g1 = 111 and g2 = 101 (four trellis states), as the
// design specifies. A state is numbered {u(t-1), u(t-2)}: the most recent
// input bit is the MSB of the state number, so input u moves state s to
// {u, s[1]}, and the two predecessors of state j are {j[0], 0} and {j[0], 1}.
// A code symbol is the 2-bit value {g1 output, g2 output}. This numbering and
// bit order are this design's choice; they reproduce the path metrics and
// survivors of the reference simulation exactly.
package vit_pkg;
  localparam int K       = 3;          // constraint length
  localparam int M       = K - 1;      // encoder memory (state bits)
  localparam int NSTATES = 1 << M;     // trellis states
  localparam logic [K-1:0] G1 = 3'b111;
  localparam logic [K-1:0] G2 = 3'b101;

  typedef logic [1:0]   sym_t;         // one received / transmitted symbol
  typedef logic [M-1:0] state_t;       // {u(t-1), u(t-2)}
  typedef logic [1:0]   bm_t;          // Hamming branch metric, 0..2

  // Code symbol emitted when input u arrives in state s.
  function automatic sym_t branch_sym(input state_t s, input logic u);
    logic [K-1:0] taps;
    taps = {u, s};                     // [2]=u(t), [1]=u(t-1), [0]=u(t-2)
    return {^(taps & G1), ^(taps & G2)};
  endfunction

  // Predecessor, with oldest bit b, of a state whose LSB is j0.
  function automatic state_t pred_state(input logic j0, input logic b);
    return {j0, b};
  endfunction
endpackage
