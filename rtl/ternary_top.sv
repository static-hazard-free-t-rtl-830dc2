// ternary_top: the ternary memory elements and counters built from the
// static-hazard-free T-gate, placed side by side.
//
// The design is a family of independent circuits that share one building
// block, the ternary T-gate. Each circuit keeps its own ports, named with a
// prefix:
//   tg_   T-gate in consensus (MIN/MAX) form      tgate
//   nd_   T-gate in ternary NAND form            tgate_nand
//   dff_  D flip-flap-flop                       d_fff
//   dms_  D master-slave flip-flap-flop          d_ms_fff
//   bff_  bilateral master-slave FFF             b_ms_fff
//   cff_  counting FFF                           c_fff
//   ac_   asynchronous signed ternary counter    async_counter (AC_N digits)
//   am_   asynchronous symmetric mod-10 counter  async_mod10_counter
//   sm_   synchronous symmetric mod-10 counter   sync_mod10_counter
//   on_   one-of-N ring counter, mod 2*ON_N      one_of_n_counter
//   sr_   switch ring counter, mod 3*SR_N        switch_ring_counter
// Only the binary sampling clock clk and the synchronous active-low reset
// rst_n are shared; both are this design's additions (the circuits they
// model are level-sensitive loops with no reset). Every trit is two bits,
// two's complement: 1 = 01, 0 = 00, -1 = 11. Counted pulses and clock pulses
// are return-to-zero ternary levels, each held for at least one clk cycle.
// Parameter defaults are the paper's sizes: three digits or stages each.
module ternary_top
  import ternary_pkg::*;
#(
  parameter int unsigned AC_N = 3,
  parameter int unsigned ON_N = 3,
  parameter int unsigned SR_N = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // T-gates
  input  trit_t             tg_p, tg_q, tg_r, tg_s,
  output trit_t             tg_out,
  input  trit_t             nd_p, nd_q, nd_r, nd_s,
  output trit_t             nd_out,
  // D-FFF
  input  trit_t             dff_d, dff_preset, dff_cp,
  output trit_t             dff_q,
  // D master-slave FFF
  input  trit_t             dms_d, dms_preset, dms_cp,
  output trit_t             dms_q,
  // B master-slave FFF
  input  trit_t             bff_sr, bff_sl, bff_pe, bff_p1, bff_p2, bff_cp,
  output trit_t             bff_q,
  // Counting FFF
  input  trit_t             cff_i, cff_pe, cff_p1, cff_p2,
  output trit_t             cff_s, cff_c,
  // Asynchronous signed ternary counter
  input  trit_t             ac_i, ac_pe,
  output trit_t [AC_N-1:0]  ac_s, ac_c,
  // Asynchronous symmetrical mod-10 counter
  input  trit_t             am_i,
  output trit_t [2:0]       am_s,
  output trit_t             am_c2, am_clr,
  // Synchronous symmetrical mod-10 counter
  input  trit_t             sm_i, sm_pe,
  output trit_t [2:0]       sm_s,
  // One-of-N counter
  input  trit_t             on_i, on_pe,
  output trit_t [ON_N-1:0]  on_f,
  // Switch ring counter
  input  trit_t             sr_i, sr_pe,
  output trit_t [SR_N-1:0]  sr_f,
  output trit_t [3*SR_N-1:0] sr_hit
);

  tgate      u_tgate  (.p(tg_p), .q(tg_q), .r(tg_r), .s(tg_s), .t_out(tg_out));
  tgate_nand u_tgnand (.p(nd_p), .q(nd_q), .r(nd_r), .s(nd_s), .t_out(nd_out));

  d_fff    u_dff (.clk, .rst_n, .d(dff_d), .preset(dff_preset), .cp(dff_cp), .q(dff_q));
  d_ms_fff u_dms (.clk, .rst_n, .d(dms_d), .preset(dms_preset), .cp(dms_cp), .q(dms_q));

  b_ms_fff u_bff (
    .clk, .rst_n, .sr(bff_sr), .sl(bff_sl), .pe(bff_pe),
    .p1(bff_p1), .p2(bff_p2), .cp(bff_cp), .q(bff_q)
  );

  c_fff u_cff (
    .clk, .rst_n, .i_cp(cff_i), .pe(cff_pe), .p1(cff_p1), .p2(cff_p2),
    .s(cff_s), .c(cff_c)
  );

  async_counter #(.N(AC_N)) u_ac (
    .clk, .rst_n, .i_cp(ac_i), .pe(ac_pe), .s(ac_s), .c(ac_c)
  );

  async_mod10_counter u_am (
    .clk, .rst_n, .i_cp(am_i), .s(am_s), .c2(am_c2), .clr(am_clr)
  );

  sync_mod10_counter u_sm (.clk, .rst_n, .i_cp(sm_i), .pe(sm_pe), .s(sm_s));

  one_of_n_counter #(.N(ON_N)) u_on (
    .clk, .rst_n, .i_cp(on_i), .pe(on_pe), .f_out(on_f)
  );

  switch_ring_counter #(.N(SR_N)) u_sr (
    .clk, .rst_n, .i_cp(sr_i), .pe(sr_pe), .f_out(sr_f), .hit(sr_hit)
  );

endmodule
