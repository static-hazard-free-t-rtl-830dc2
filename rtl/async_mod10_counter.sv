// async_mod10_counter: symmetrical modulo-10 counter in ripple form.
//
// Three counting flip-flap-flops (digits S0, S1, S2 of a balanced ternary
// number) counted by one pulse line: 1 counts up, -1 counts down. A decoder
// built from T-gates,
//   clr = T(T(0,T(1,0,0;S2),0;S1), 0, T(0,T(0,0,1;S2),0;S1); S0),
// is 1 exactly when the count is +10 (S2 S1 S0 = 1 0 1) or -10 (-1 0 -1),
// and drives the preset enable of all three digits, whose preset P1 is 0. So
// counting up runs 0..9 and back to 0, counting down 0..-9 and back to 0.
// Decoder and presets follow the paper; P2 is a don't-care there and is
// tied to 0.
//
// Timing: the decoder looks at the registered digits, so the count +-10 is
// visible for one clk cycle (with clr = 1) before it is cleared. The counted
// pulse must stay at 0 during that cycle (the preset acts only with the
// clock at 0). rst_n (synchronous, active low) clears the count.
//
// Interface: i_cp trit in; s[2:0] digits, c2 (carry out of S2) and clr trits
// out.
module async_mod10_counter
  import ternary_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  trit_t        i_cp,
  output trit_t [2:0]  s,
  output trit_t        c2,
  output trit_t        clr
);

  trit_t c0, c1;
  trit_t d_pos2, d_neg2, d_pos1, d_neg1;

  c_fff u_s0 (.clk, .rst_n, .i_cp(i_cp), .pe(clr), .p1(TZ), .p2(TZ), .s(s[0]), .c(c0));
  c_fff u_s1 (.clk, .rst_n, .i_cp(c0),   .pe(clr), .p1(TZ), .p2(TZ), .s(s[1]), .c(c1));
  c_fff u_s2 (.clk, .rst_n, .i_cp(c1),   .pe(clr), .p1(TZ), .p2(TZ), .s(s[2]), .c(c2));

  // Decoder of +-10.
  tgate u_d2p (.p(TP), .q(TZ),     .r(TZ), .s(s[2]), .t_out(d_pos2));
  tgate u_d2n (.p(TZ), .q(TZ),     .r(TP), .s(s[2]), .t_out(d_neg2));
  tgate u_d1p (.p(TZ), .q(d_pos2), .r(TZ), .s(s[1]), .t_out(d_pos1));
  tgate u_d1n (.p(TZ), .q(d_neg2), .r(TZ), .s(s[1]), .t_out(d_neg1));
  tgate u_d0  (.p(d_pos1), .q(TZ), .r(d_neg1), .s(s[0]), .t_out(clr));

endmodule
