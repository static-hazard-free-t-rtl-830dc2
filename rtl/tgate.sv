// tgate: static-hazard-free ternary T-gate.
//
// T(p,q,r;s) passes p when the control trit s is 1, q when s is 0 and r when
// s is -1. It is the universal building block of every other module here.
// The gate is not written as a plain multiplexer but in the consensus form
//
//   T = (p + h1(s)) . q . (r + h-1(s))  +  p . J1(s)  +  r . J-1(s)
//
// where "." is MIN, "+" is MAX, J_k(s) is 1 only when s = k and h_k(s) is its
// negation. The first term holds the output at q while s moves between 1 and
// 0 with p = q (or between -1 and 0 with r = q), so a memory element built by
// feeding the output back to q does not glitch when its clock returns to 0.
// That form, and the seven operators it uses, follow the paper's block
// diagram. In zero-delay simulation the output equals the multiplexer; the
// structure matters once the gate is mapped onto real gates with delays.
//
// Interface: four trit inputs p, q, r, s and the trit output t_out. Purely
// combinational, no clock.
module tgate
  import ternary_pkg::*;
(
  input  trit_t p,
  input  trit_t q,
  input  trit_t r,
  input  trit_t s,
  output trit_t t_out
);

  trit_t j_pos, j_neg;      // J1(s), J-1(s)
  trit_t h_pos, h_neg;      // h1(s), h-1(s)
  trit_t p_or, r_or;        // p + h1(s), r + h-1(s)
  trit_t hold_term;         // consensus term
  trit_t p_term, r_term;    // p . J1(s), r . J-1(s)

  always_comb begin
    j_pos     = t_j(TP, s);
    j_neg     = t_j(TN, s);
    h_pos     = t_h(TP, s);
    h_neg     = t_h(TN, s);
    p_or      = t_max(p, h_pos);
    r_or      = t_max(r, h_neg);
    hold_term = t_min(t_min(p_or, q), r_or);
    p_term    = t_min(p, j_pos);
    r_term    = t_min(r, j_neg);
    t_out     = t_max(t_max(hold_term, p_term), r_term);
  end

endmodule
