// one_of_n_counter: ternary one-of-N (ring) up-down counter, modulo 2N.
//
// A bilateral feedback shift register in which exactly one stage is nonzero.
// Preset puts -1 in the left-hand stage and 0 in the others. Each pulse 1
// shifts right and feeds the negated right-hand stage back into the left,
// f = T(-1,0,1; q_N); each pulse -1 shifts left and feeds the negated
// left-hand stage into the right, g = T(-1,0,1; q_1). So the -1 walks right,
// comes back in as +1, walks right again and returns as -1: 2N states, each
// with its own nonzero output, and count n is read directly as F_(n mod N)
// being nonzero. Feedback functions and presets follow the paper (N = 3
// gives its mod-6 counter); P2 is a don't-care there and is tied to 0.
//
// Timing: as bilateral_fsr. pe = 1 with the pulse at 0 presets the register;
// rst_n clears all stages to 0, which is not a counting state, so preset
// before counting.
//
// Interface: i_cp, pe trits in; f_out[N-1:0] out (f_out[i] = F_i = q_(i+1)).
module one_of_n_counter
  import ternary_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  trit_t          i_cp,
  input  trit_t          pe,
  output trit_t [N-1:0]  f_out
);

  trit_t [N-1:0] p1, p2;
  trit_t         f, g;

  always_comb begin
    p1    = '0;
    p1[0] = TN;
    p2    = '0;
  end

  tgate u_f (.p(TN), .q(TZ), .r(TP), .s(f_out[N-1]), .t_out(f));
  tgate u_g (.p(TN), .q(TZ), .r(TP), .s(f_out[0]),   .t_out(g));

  bilateral_fsr #(.N(N)) u_fsr (
    .clk, .rst_n, .i_cp, .pe, .p1, .p2, .f, .g, .q(f_out)
  );

endmodule
