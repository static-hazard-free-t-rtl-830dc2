// b_ms_fff: bilateral ternary master-slave flip-flap-flop (B-FFF), the stage
// of a shift register that can shift in both directions on one clock line.
//
// Four T-gates, following the paper:
//   x      = T(p1, master, p2; pe)          preset gate
//   master = T(sr, x, sl; cp)
//   g      = T(0, 1, 0; cp)                 (1 only while cp = 0)
//   slave  = T(master, slave, 0; g)
// A clock pulse cp = 1 loads the shift-right input sr into the master, a
// pulse cp = -1 loads the shift-left input sl; during either pulse the slave
// holds. When cp is back at 0 the slave copies the master. With cp = 0,
// pe = 1 presets master and slave to p1 and pe = -1 presets them to p2;
// with pe = 0 the master holds. The slave's r input is a don't-care in the
// paper and is tied to 0 here.
//
// Each loop is closed through a register on the binary sampling clock clk
// (this design's choice; the paper's element is level sensitive). The
// output q is the registered slave: it changes at the first clk edge with
// cp = 0 after a pulse, or at the first edge of a preset. Every level of cp
// and pe must last at least one clk cycle. Counted pulses must return to 0
// between a 1 and a -1, and pe may be nonzero only while cp = 0, as the
// paper requires; two assertions check these rules.
// rst_n (synchronous, active low, to 0) is this design's addition.
//
// Interface: sr, sl, pe, p1, p2, cp trits in; q trit out.
module b_ms_fff
  import ternary_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  trit_t sr,
  input  trit_t sl,
  input  trit_t pe,
  input  trit_t p1,
  input  trit_t p2,
  input  trit_t cp,
  output trit_t q
);

  trit_t m_reg, m_out, x;
  trit_t g;
  trit_t s_reg, s_next;
  trit_t cp_last;

  tgate u_preset (.p(p1),    .q(m_reg), .r(p2), .s(pe), .t_out(x));
  tgate u_master (.p(sr),    .q(x),     .r(sl), .s(cp), .t_out(m_out));
  tgate u_g      (.p(TZ),    .q(TP),    .r(TZ), .s(cp), .t_out(g));
  tgate u_slave  (.p(m_out), .q(s_reg), .r(TZ), .s(g),  .t_out(s_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_reg   <= TZ;
      s_reg   <= TZ;
      cp_last <= TZ;
    end else begin
      m_reg   <= m_out;
      s_reg   <= s_next;
      cp_last <= cp;
    end
  end

  assign q = s_reg;

  // Return-to-zero clock: no direct step between 1 and -1.
  a_cp_rz: assert property (@(posedge clk) disable iff (!rst_n)
    !((cp == TP && cp_last == TN) || (cp == TN && cp_last == TP)));

  // Presets are defined only while the clock is idle.
  a_pe_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (pe != TZ) |-> (cp == TZ));

endmodule
