// tgate_tree3: any ternary function of three trits built as a tree of
// T-gates (a tree-type universal logic module).
//
// y = T( T(T(..;s0),T(..;s0),T(..;s0); s1) [s2 = 1],
//        ...                                [s2 = 0],
//        ...                                [s2 = -1]; s2)
// Nine T-gates controlled by s0 select among the 27 constants of the truth
// table, three controlled by s1 select among those, and one controlled by s2
// gives the output: 13 T-gates in three levels. The truth table is the
// parameter TABLE, entry 9*(s2+1) + 3*(s1+1) + (s0+1). Synthesis removes the
// gates whose inputs are equal constants. Building functions as T-gate trees
// is the paper's method; this unminimised three-level tree is this design's
// own.
//
// Interface: trit inputs s2, s1, s0; trit output y. Combinational.
module tgate_tree3
  import ternary_pkg::*;
#(
  parameter trit_t [26:0] TABLE = '0
) (
  input  trit_t s2,
  input  trit_t s1,
  input  trit_t s0,
  output trit_t y
);

  trit_t [8:0] lvl0;
  trit_t [2:0] lvl1;

  for (genvar a = 0; a < 9; a++) begin : g_l0
    tgate u_t (.p(TABLE[3*a+2]), .q(TABLE[3*a+1]), .r(TABLE[3*a]), .s(s0), .t_out(lvl0[a]));
  end

  for (genvar b = 0; b < 3; b++) begin : g_l1
    tgate u_t (.p(lvl0[3*b+2]), .q(lvl0[3*b+1]), .r(lvl0[3*b]), .s(s1), .t_out(lvl1[b]));
  end

  tgate u_top (.p(lvl1[2]), .q(lvl1[1]), .r(lvl1[0]), .s(s2), .t_out(y));

endmodule
