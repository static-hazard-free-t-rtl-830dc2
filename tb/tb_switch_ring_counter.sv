// tb_switch_ring_counter: the switch ring counter against its state
// assignment, written out below for N = 3 as (q1,q2,q3) for counts 0..8.
// After a clear the counter is driven by random up and down pulses and
// compared with the row for the count modulo 9, and the decoder output
// for that count must be the only one at 1. Each count must also be
// decodable from two adjacent stages: the pair (F_(n-1), F_n mod N) must
// differ between all counts. Wrapping in both directions must happen.
module tb_switch_ring_counter;
  import ternary_pkg::*;

  localparam int N = 3;
  localparam int M = 3 * N;

  int checks = 0, failures = 0;
  int n_wrap_up = 0, n_wrap_down = 0;
  logic clk = 0, rst_n = 0;
  trit_t i_cp = TZ, pe = TZ;
  trit_t [N-1:0] f_out;
  trit_t [M-1:0] hit;
  int cnt;

  int tab [M][N] = '{
    '{ 0, 0, 0}, '{ 1, 0, 0}, '{ 1, 1, 0}, '{ 1, 1, 1}, '{-1, 1, 1},
    '{-1,-1, 1}, '{-1,-1,-1}, '{ 0,-1,-1}, '{ 0, 0,-1}
  };

  switch_ring_counter #(.N(N)) dut (.clk, .rst_n, .i_cp, .pe, .f_out, .hit);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(f_out[i]) != tab[cnt][i]) begin
        failures++;
        $display("FAIL t=%0t count %0d F%0d = %0d expected %0d", $time, cnt, i, f_out[i], tab[cnt][i]);
      end
    end
    for (int n = 0; n < M; n++) begin
      checks++;
      if (hit[n] !== ((n == cnt) ? TP : TN)) begin
        failures++;
        $display("FAIL t=%0t count %0d decoder output %0d = %0d", $time, cnt, n, hit[n]);
      end
    end
  endtask

  task automatic pulse(trit_t v, int w);
    repeat (w) begin
      @(negedge clk);
      i_cp = v;
    end
    @(negedge clk);
    i_cp = TZ;
    if (v == TP && cnt == M - 1) n_wrap_up++;
    if (v == TN && cnt == 0) n_wrap_down++;
    cnt = (cnt + int'(v) + M) % M;
    @(negedge clk);
    compare();
  endtask

  initial begin
    // Two-stage decoding: the pair (F_(n-1), F_n) is unique for each count.
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) if (b != a) begin
        checks++;
        if (tab[a][(a + N - 1) % N] == tab[b][(a + N - 1) % N] &&
            tab[a][a % N] == tab[b][a % N]) begin
          failures++;
          $display("FAIL counts %0d and %0d share their decoding pair", a, b);
        end
      end
    cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); pe = TP;
    @(negedge clk); pe = TZ;
    compare();
    repeat (11) pulse(TP, 1);
    repeat (13) pulse(TN, 2);
    for (int k = 0; k < 300; k++) pulse(($urandom_range(1) != 0) ? TP : TN, 1 + $urandom_range(2));
    if (n_wrap_up == 0 || n_wrap_down == 0) begin
      failures++;
      $display("FAIL a wrap never happened");
    end
    $display("events: wrap_up=%0d wrap_down=%0d", n_wrap_up, n_wrap_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
