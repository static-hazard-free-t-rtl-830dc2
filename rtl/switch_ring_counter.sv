// switch_ring_counter: ternary switch ring (Johnson-like) up-down counter,
// modulo 3N.
//
// A bilateral feedback shift register cleared to all 0. Each pulse 1 shifts
// right and feeds the right-hand stage back into the left through a cycling
// gate, f = T(-1,1,0; q_N) = q_N + 1 (mod 3); each pulse -1 shifts left and
// feeds the left-hand stage into the right through a double-cycling gate,
// g = T(0,-1,1; q_1) = q_1 - 1 (mod 3). The register steps through 3N
// states; for N = 3, written as (q1,q2,q3): (0,0,0), (1,0,0), (1,1,0),
// (1,1,1), (-1,1,1), (-1,-1,1), (-1,-1,-1), (0,-1,-1), (0,0,-1), then
// (0,0,0) again. Count n is decoded from two adjacent stages, F_(n-1) and
// F_n, by switch_ring_decoder: hit[n] is 1 at count n and -1 otherwise.
// Feedback functions and the all-zero preset follow the paper (N = 3 gives
// its mod-9 counter); P2 is a don't-care there and is tied to 0.
//
// Timing: as bilateral_fsr. pe = 1 with the pulse at 0, or rst_n, clears it.
//
// Interface: i_cp, pe trits in; f_out[N-1:0] out (f_out[i] = F_i = q_(i+1));
// hit[3N-1:0] decoded counts out.
module switch_ring_counter
  import ternary_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  trit_t          i_cp,
  input  trit_t          pe,
  output trit_t [N-1:0]  f_out,
  output trit_t [3*N-1:0] hit
);

  trit_t [N-1:0] p1, p2;
  trit_t         f, g;

  always_comb begin
    p1 = '0;
    p2 = '0;
  end

  tgate u_f (.p(TN), .q(TP), .r(TZ), .s(f_out[N-1]), .t_out(f));
  tgate u_g (.p(TZ), .q(TN), .r(TP), .s(f_out[0]),   .t_out(g));

  bilateral_fsr #(.N(N)) u_fsr (
    .clk, .rst_n, .i_cp, .pe, .p1, .p2, .f, .g, .q(f_out)
  );

  switch_ring_decoder #(.N(N)) u_dec (.f(f_out), .hit);

endmodule
