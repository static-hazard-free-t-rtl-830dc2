// bilateral_fsr: N-stage bilateral ternary feedback shift register.
//
// N B-FFFs share one clock line. A pulse 1 shifts right: stage 1 loads the
// feedback value f and stage i loads stage i-1. A pulse -1 shifts left:
// stage N loads the feedback value g and stage i loads stage i+1. The
// feedback functions are computed outside from q, so the same register
// serves every shift-register counter. Preset enable pe is common; p1 and p2
// give each stage's two preset values. Structure as in the paper.
//
// Timing: q shifts at the first clk edge after the pulse has returned to 0.
// Pulses must be return-to-zero. rst_n (synchronous, active low) clears all
// stages to 0.
//
// Interface: i_cp, pe, f, g trits and p1[N-1:0], p2[N-1:0] in; q[N-1:0] out,
// q[0] being stage 1 (left end).
module bilateral_fsr
  import ternary_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  trit_t          i_cp,
  input  trit_t          pe,
  input  trit_t [N-1:0]  p1,
  input  trit_t [N-1:0]  p2,
  input  trit_t          f,
  input  trit_t          g,
  output trit_t [N-1:0]  q
);

  trit_t [N-1:0] sr_in, sl_in;

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      sr_in[i] = (i == 0)          ? f : q[(i == 0) ? 0 : i-1];
      sl_in[i] = (i == int'(N)-1)  ? g : q[(i == int'(N)-1) ? i : i+1];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    b_ms_fff u_bff (
      .clk, .rst_n,
      .sr(sr_in[i]), .sl(sl_in[i]),
      .pe, .p1(p1[i]), .p2(p2[i]), .cp(i_cp), .q(q[i])
    );
  end

endmodule
