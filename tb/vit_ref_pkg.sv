// vit_ref_pkg: reference model used by the testbenches.
//
// An untimed model of the (2,1,3) code with g1 = 111, g2 = 101: an encoder
// step and a full block Viterbi decoder that keeps complete survivors
// (plain register exchange), so it checks the hardware's hybrid survivor
// storage, its pipelining and its bit order. Conventions: state
// {u(t-1), u(t-2)}, symbol {g1 bit, g2 bit}, first symbol of a 16-bit word in
// bits [15:14], first decoded bit at the MSB, a tie in the compare goes to
// the predecessor whose oldest bit is 1, a tie in the final choice to the
// lowest state.
package vit_ref_pkg;
  typedef struct {
    int unsigned    pm   [4];
    logic [7:0]     surv [4];
  } trellis_t;

  function automatic logic [1:0] ref_sym(input logic [1:0] st, input logic u);
    logic up1, up2;
    up1 = st[1];
    up2 = st[0];
    return {u ^ up1 ^ up2, u ^ up2};
  endfunction

  // One trellis step on the state of the model.
  function automatic trellis_t ref_step(input trellis_t t, input logic [1:0] rx);
    trellis_t n;
    for (int j = 0; j < 4; j++) begin
      int unsigned cost [2];
      logic [1:0]  p    [2];
      logic        u;
      int          pick;
      u = j[1];
      for (int b = 0; b < 2; b++) begin
        p[b]    = {j[0], b[0]};
        cost[b] = t.pm[p[b]] + $countones(ref_sym(p[b], u) ^ rx);
      end
      pick      = (cost[0] < cost[1]) ? 0 : 1;
      n.pm[j]   = cost[pick];
      n.surv[j] = {t.surv[p[pick]][6:0], u};
    end
    return n;
  endfunction

  function automatic trellis_t ref_start();
    trellis_t t;
    for (int j = 0; j < 4; j++) begin
      t.pm[j]   = 0;
      t.surv[j] = '0;
    end
    return t;
  endfunction

  // Run the first `steps` symbols of a 16-bit word.
  function automatic trellis_t ref_run(input logic [15:0] word, input int steps);
    trellis_t t;
    t = ref_start();
    for (int k = 0; k < steps; k++) t = ref_step(t, word[15-2*k -: 2]);
    return t;
  endfunction

  function automatic logic [7:0] ref_decode(input logic [15:0] word);
    trellis_t t;
    int best;
    t = ref_run(word, 8);
    best = 0;
    for (int j = 1; j < 4; j++) if (t.pm[j] < t.pm[best]) best = j;
    return t.surv[best];
  endfunction
endpackage
