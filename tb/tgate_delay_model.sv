// tgate_delay_model: behavioural T-gate with unequal literal delays, for
// showing the static hazard the consensus form removes. Not synthesizable.
//
// The literals J1(s), J0(s), J-1(s) and h1(s), h-1(s) are produced from the
// control s with separate transport delays (h_k switches together with
// J_k, as complementary outputs of one decoder stage would); MIN and MAX are
// ideal, and the output has a delay of 1 time unit. With CONSENSUS = 0 the
// gate is the sum of products p.J1 + q.J0 + r.J-1; with CONSENSUS = 1 it is
// the static-hazard-free form (p+h1).q.(r+h-1) + p.J1 + r.J-1. When s moves
// from 1 to 0 and J0 rises later than J1 falls, the first form briefly
// outputs -1 even with p = q; the second keeps the output at q.
//
// Interface: trits p, q, r, s in; trit t_out out.
module tgate_delay_model
  import ternary_pkg::*;
#(
  parameter bit          CONSENSUS = 1'b1,
  parameter int unsigned D_J1      = 1,
  parameter int unsigned D_J0      = 3,
  parameter int unsigned D_JN      = 1
) (
  input  trit_t p,
  input  trit_t q,
  input  trit_t r,
  input  trit_t s,
  output trit_t t_out
);

  trit_t j1 = TN, j0 = TP, jn = TN, h1 = TP, hn = TP;
  trit_t y;

  always @(s) begin
    j1 <= #(D_J1) t_j(TP, s);
    h1 <= #(D_J1) t_h(TP, s);
    j0 <= #(D_J0) t_j(TZ, s);
    jn <= #(D_JN) t_j(TN, s);
    hn <= #(D_JN) t_h(TN, s);
  end

  always_comb begin
    if (CONSENSUS)
      y = t_max(t_max(t_min(t_min(t_max(p, h1), q), t_max(r, hn)), t_min(p, j1)), t_min(r, jn));
    else
      y = t_max(t_max(t_min(p, j1), t_min(q, j0)), t_min(r, jn));
  end

  always @(y) t_out <= #1 y;

endmodule
