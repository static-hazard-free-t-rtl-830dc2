// ternary_pkg: the trit type and the ternary operators shared by every block.
//
// A trit takes the values 1, 0 and -1. It is held in two bits as a signed
// two's-complement number: 1 = 2'b01, 0 = 2'b00, -1 = 2'b11. The pattern
// 2'b10 is not a trit. This binary encoding is a choice of this design; the
// circuit it models carries the three values as three voltage levels.
//
// Operators (all purely combinational):
//   t_min / t_max   ternary product (MIN) and sum (MAX)
//   t_neg           ternary negation, -x
//   t_j(k, s)       literal J_k(s): 1 if s == k, else -1
//   t_h(k, s)       complementary literal h_k(s): -1 if s == k, else 1
//   t_cycle         cycling gate, x + 1 modulo 3 within {-1,0,1}
//   t_dcycle        double-cycling gate, x - 1 modulo 3 within {-1,0,1}
//   t_sel           behavioural T-gate reference, T(p,q,r;s)
//   t_ok            1 when the two bits hold a legal trit
package ternary_pkg;

  typedef logic signed [1:0] trit_t;

  localparam trit_t TP = 2'sb01;  // 1
  localparam trit_t TZ = 2'sb00;  // 0
  localparam trit_t TN = 2'sb11;  // -1

  function automatic trit_t t_min(trit_t a, trit_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic trit_t t_max(trit_t a, trit_t b);
    return (a > b) ? a : b;
  endfunction

  function automatic trit_t t_neg(trit_t a);
    return -a;
  endfunction

  function automatic trit_t t_j(trit_t k, trit_t s);
    return (s == k) ? TP : TN;
  endfunction

  function automatic trit_t t_h(trit_t k, trit_t s);
    return (s == k) ? TN : TP;
  endfunction

  function automatic trit_t t_cycle(trit_t a);
    return (a == TP) ? TN : trit_t'(a + TP);
  endfunction

  function automatic trit_t t_dcycle(trit_t a);
    return (a == TN) ? TP : trit_t'(a - TP);
  endfunction

  function automatic trit_t t_sel(trit_t p, trit_t q, trit_t r, trit_t s);
    return (s == TP) ? p : (s == TZ) ? q : r;
  endfunction

  function automatic logic t_ok(trit_t a);
    return a != 2'sb10;
  endfunction

endpackage
