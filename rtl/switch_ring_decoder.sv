// switch_ring_decoder: one output per count for the switch ring counter.
//
// In an N-stage switch ring counter, count n (0 <= n < 3N) is identified by
// just two adjacent stages, F_(n-1) and F_n (indices modulo N), which is the
// decoding the paper prescribes. Output hit[n] is 1 while the counter is
// at count n and -1 otherwise. Each output is a two-input ternary function
// built from two T-gates: the inner gate, controlled by F_n, gives 1 only for
// the value F_n has at count n; the outer gate, controlled by F_(n-1), passes
// the inner gate's output only for the value F_(n-1) has at count n and -1
// otherwise. The stage values at count n follow from the counting rule:
// stage i is 1 for n in i+1..i+N, -1 for n in i+N+1..i+2N (modulo 3N), and
// 0 otherwise. The gate-level form is this design's own.
//
// Interface: f[N-1:0] (stage outputs F_0..F_(N-1)) in; hit[3N-1:0] out.
// Combinational.
module switch_ring_decoder
  import ternary_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0]    f,
  output trit_t [3*N-1:0]  hit
);

  // Value of stage i at count n.
  function automatic trit_t code(int n, int i);
    int k;
    k = (n - i - 1 + 3 * int'(N)) % (3 * int'(N));
    return (k < int'(N)) ? TP : (k < 2 * int'(N)) ? TN : TZ;
  endfunction

  function automatic trit_t match(trit_t want, trit_t at);
    return (want == at) ? TP : TN;
  endfunction

  for (genvar n = 0; n < 3 * N; n++) begin : g_count
    localparam int A = (n + N - 1) % N;   // stage F_(n-1)
    localparam int B = n % N;             // stage F_n
    localparam trit_t VA = code(n, A);
    localparam trit_t VB = code(n, B);
    trit_t inner;

    tgate u_inner (
      .p(match(VB, TP)), .q(match(VB, TZ)), .r(match(VB, TN)),
      .s(f[B]), .t_out(inner)
    );
    tgate u_outer (
      .p((VA == TP) ? inner : TN), .q((VA == TZ) ? inner : TN), .r((VA == TN) ? inner : TN),
      .s(f[A]), .t_out(hit[n])
    );
  end

endmodule
