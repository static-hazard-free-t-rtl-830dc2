// d_fff: ternary D flip-flap-flop, one T-gate with its output fed back.
//
// q = T(d, q_held, preset; cp). While cp = 1 the output follows d, while
// cp = -1 it is forced to the preset value, and while cp = 0 the gate passes
// its own fed-back output, so the last value is stored. This is the
// paper's element.
//
// In the paper the feedback is a wire and the element is level sensitive.
// Here the loop is closed through a register on the binary sampling clock
// clk, which holds the fed-back value q_held; the output itself is the T-gate
// output, so it is transparent while cp is 1 or -1 and is stored at every
// rising clk edge. Every level of cp, d and preset must last at least one clk
// cycle. The synchronous active-low reset rst_n (clearing the stored trit to
// 0) is this design's own addition.
//
// Interface: d, preset, cp trits in; q trit out. Latency: q changes in the
// same cycle as d when cp = 1; the stored value is updated at the next clk edge.
module d_fff
  import ternary_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  trit_t d,
  input  trit_t preset,
  input  trit_t cp,
  output trit_t q
);

  trit_t q_held;

  tgate u_t (.p(d), .q(q_held), .r(preset), .s(cp), .t_out(q));

  always_ff @(posedge clk) begin
    if (!rst_n) q_held <= TZ;
    else        q_held <= q;
  end

endmodule
