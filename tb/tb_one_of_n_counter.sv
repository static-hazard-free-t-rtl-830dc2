// tb_one_of_n_counter: the one-of-N ring counter against its state
// assignment. For count n (0 <= n < 2N) exactly stage n mod N is nonzero,
// holding -1 for n < N and 1 otherwise; for N = 3 this is the table written
// out below as (q1,q2,q3). After a preset the counter is driven by random up
// and down pulses and compared with the count modulo 2N. Wrapping in both
// directions must happen.
module tb_one_of_n_counter;
  import ternary_pkg::*;

  localparam int N = 3;

  int checks = 0, failures = 0;
  int n_wrap_up = 0, n_wrap_down = 0;
  logic clk = 0, rst_n = 0;
  trit_t i_cp = TZ, pe = TZ;
  trit_t [N-1:0] f_out;
  int cnt;

  int tab [6][3] = '{
    '{-1, 0, 0}, '{0, -1, 0}, '{0, 0, -1}, '{1, 0, 0}, '{0, 1, 0}, '{0, 0, 1}
  };

  one_of_n_counter #(.N(N)) dut (.clk, .rst_n, .i_cp, .pe, .f_out);

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
      int e;
      e = (i != cnt % N) ? 0 : (cnt < N) ? -1 : 1;
      checks++;
      if (int'(f_out[i]) != e) begin
        failures++;
        $display("FAIL t=%0t count %0d F%0d = %0d expected %0d", $time, cnt, i, f_out[i], e);
      end
      checks++;
      if (int'(f_out[i]) != tab[cnt][i]) failures++;
    end
  endtask

  task automatic pulse(trit_t v, int w);
    repeat (w) begin
      @(negedge clk);
      i_cp = v;
    end
    @(negedge clk);
    i_cp = TZ;
    if (v == TP && cnt == 2 * N - 1) n_wrap_up++;
    if (v == TN && cnt == 0) n_wrap_down++;
    cnt = (cnt + int'(v) + 2 * N) % (2 * N);
    @(negedge clk);
    compare();
  endtask

  initial begin
    cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); pe = TP;
    @(negedge clk); pe = TZ;
    compare();
    repeat (8) pulse(TP, 1);
    repeat (9) pulse(TN, 2);
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
