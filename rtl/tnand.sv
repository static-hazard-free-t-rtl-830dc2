// tnand: ternary NAND gate, the negation of the MIN of its inputs.
//
// NAND(a,b,c) = -(min(a,b,c)). Unused inputs are tied to 1, the identity of
// MIN. It is the only gate of the NAND form of the T-gate (tgate_nand).
// Interface: trit inputs a, b, c and trit output y. Combinational.
module tnand
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  input  trit_t c,
  output trit_t y
);

  always_comb y = t_neg(t_min(t_min(a, b), c));

endmodule
