// d_ms_fff: ternary D master-slave flip-flap-flop.
//
// Two D-FFF stages and a clock-steering gate, as in the paper:
//   master = T(d, master, preset; cp)
//   g      = T(0, 1, 1; cp)                 (0 while cp = 1, else 1)
//   slave  = T(master, slave, 0; g)
// While cp = 1 the master follows d and the slave holds. When cp returns to
// 0 the master holds and the slave copies it. While cp = -1 the master takes
// the preset value and the slave follows it, so both are preset together.
// The slave's r input is a don't-care in the paper and is tied to 0 here.
//
// Each feedback loop is closed through a register on the binary sampling
// clock clk (this design's choice; the paper's elements are level
// sensitive). The master output is combinational, the slave output q is
// registered, so q takes its new value at the first clk edge after cp has
// left 1 (or at the first edge while cp = -1). Levels of cp must last at
// least one clk cycle. rst_n, synchronous and active low, clears both stages
// to 0 and is this design's addition.
//
// Interface: d, preset, cp trits in; q trit out.
module d_ms_fff
  import ternary_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  trit_t d,
  input  trit_t preset,
  input  trit_t cp,
  output trit_t q
);

  trit_t m_reg, m_out;
  trit_t g;
  trit_t s_reg, s_next;

  tgate u_master (.p(d),     .q(m_reg), .r(preset), .s(cp), .t_out(m_out));
  tgate u_g      (.p(TZ),    .q(TP),    .r(TP),     .s(cp), .t_out(g));
  tgate u_slave  (.p(m_out), .q(s_reg), .r(TZ),     .s(g),  .t_out(s_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_reg <= TZ;
      s_reg <= TZ;
    end else begin
      m_reg <= m_out;
      s_reg <= s_next;
    end
  end

  assign q = s_reg;

endmodule
