// tgate_nand: the static-hazard-free T-gate built only from ternary NAND
// gates and the two literals J1(s) and J-1(s).
//
// Applying De Morgan's law to the consensus form of the T-gate gives
//
//   T = NAND( NAND(p + h1(s), q, r + h-1(s)), NAND(p, J1(s)), NAND(r, J-1(s)) )
//
// and, because J1(s) is only ever 1 or -1, p + h1(s) = NAND(NAND(p,J1),J1)
// (likewise for r). The network therefore has eight NAND gates: two
// NAND(p,J1), one NAND(.,J1), two NAND(r,J-1), one NAND(.,J-1), the
// three-input NAND with q and the output NAND. This gate count is that of the
// published NAND diagram; the wiring given here is derived from the algebra.
// The logic function is identical to tgate.
//
// Interface: trit inputs p, q, r, s and trit output t_out. Combinational.
module tgate_nand
  import ternary_pkg::*;
(
  input  trit_t p,
  input  trit_t q,
  input  trit_t r,
  input  trit_t s,
  output trit_t t_out
);

  trit_t j_pos, j_neg;
  trit_t n_pj_a, n_p_or, n_pj_b;   // NAND(p,J1), p + h1(s), NAND(p,J1)
  trit_t n_rj_a, n_r_or, n_rj_b;   // NAND(r,J-1), r + h-1(s), NAND(r,J-1)
  trit_t n_hold;                   // NAND(p + h1, q, r + h-1)

  always_comb begin
    j_pos = t_j(TP, s);
    j_neg = t_j(TN, s);
  end

  tnand u_pj_a (.a(p),      .b(j_pos), .c(TP),     .y(n_pj_a));
  tnand u_p_or (.a(n_pj_a), .b(j_pos), .c(TP),     .y(n_p_or));
  tnand u_pj_b (.a(p),      .b(j_pos), .c(TP),     .y(n_pj_b));
  tnand u_rj_a (.a(r),      .b(j_neg), .c(TP),     .y(n_rj_a));
  tnand u_r_or (.a(n_rj_a), .b(j_neg), .c(TP),     .y(n_r_or));
  tnand u_rj_b (.a(r),      .b(j_neg), .c(TP),     .y(n_rj_b));
  tnand u_hold (.a(n_p_or), .b(q),     .c(n_r_or), .y(n_hold));
  tnand u_out  (.a(n_hold), .b(n_pj_b),.c(n_rj_b), .y(t_out));

endmodule
