// c_fff: counting flip-flap-flop, a one-digit signed ternary up-down counter.
//
// A B-FFF whose clock is the counted pulse I and whose shift inputs are its
// own state moved by one step, as in the paper:
//   R = T(-1, 1, 0; S)   = S + 1 modulo 3   (loaded by a pulse I = 1)
//   L = T(0, -1, 1; S)   = S - 1 modulo 3   (loaded by a pulse I = -1)
//   C = T(T(1,0,0;I), 0, T(0,0,-1;I); S)
// so the next state is the signed ternary sum of I and S and C is its carry:
// C = 1 while I = 1 and S = 1, C = -1 while I = -1 and S = -1, else 0. C is
// itself a return-to-zero pulse that can clock the next digit. The paper
// builds T(1,0,0;I) and T(0,0,-1;I) from diode limiters; they are T-gates
// here.
//
// Timing: C is combinational from I and the registered state S; S takes its
// new value at the first clk edge after I has returned to 0 (see b_ms_fff).
// Presets work as in b_ms_fff. rst_n clears S to 0 (this design's addition).
//
// Interface: i_cp, pe, p1, p2 trits in; s (state) and c (carry) trits out.
module c_fff
  import ternary_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  trit_t i_cp,
  input  trit_t pe,
  input  trit_t p1,
  input  trit_t p2,
  output trit_t s,
  output trit_t c
);

  trit_t up, down;
  trit_t i_pos, i_neg;

  tgate u_up   (.p(TN), .q(TP), .r(TZ), .s(s), .t_out(up));
  tgate u_down (.p(TZ), .q(TN), .r(TP), .s(s), .t_out(down));

  b_ms_fff u_ff (
    .clk, .rst_n,
    .sr(up), .sl(down), .pe, .p1, .p2, .cp(i_cp), .q(s)
  );

  tgate u_ipos  (.p(TP),    .q(TZ), .r(TZ),    .s(i_cp), .t_out(i_pos));
  tgate u_ineg  (.p(TZ),    .q(TZ), .r(TN),    .s(i_cp), .t_out(i_neg));
  tgate u_carry (.p(i_pos), .q(TZ), .r(i_neg), .s(s),    .t_out(c));

endmodule
