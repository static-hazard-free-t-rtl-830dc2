// tb_async_counter: the ripple signed ternary counter against an integer
// model. Random up and down pulses of random width are counted; after each
// the digits must give the model's count in balanced ternary, wrapping at
// +-(3^N-1)/2, and during each pulse every digit's carry must be the pulse
// value exactly when that digit and all below it equal the pulse value.
// The run must count past both ends (an overflow pulse out of the last
// digit in each direction) and use the common preset.
module tb_async_counter;
  import ternary_pkg::*;

  localparam int N = 3;
  localparam int HALF = (3 ** N - 1) / 2;

  int checks = 0, failures = 0;
  int n_over_up = 0, n_over_down = 0, n_preset = 0;
  logic clk = 0, rst_n = 0;
  trit_t i_cp = TZ, pe = TZ;
  trit_t [N-1:0] s, c;
  int cnt;

  async_counter #(.N(N)) dut (.clk, .rst_n, .i_cp, .pe, .s, .c);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int value(trit_t [N-1:0] d);
    int v = 0;
    for (int i = N - 1; i >= 0; i--) v = 3 * v + int'(d[i]);
    return v;
  endfunction

  task automatic check_count();
    checks++;
    if (value(s) != cnt) begin
      failures++;
      $display("FAIL t=%0t count=%0d expected %0d", $time, value(s), cnt);
    end
  endtask

  task automatic pulse(trit_t v, int w);
    for (int k = 0; k < w; k++) begin
      @(negedge clk);
      i_cp = v;
      #1;
      for (int i = 0; i < N; i++) begin
        bit all_eq = 1;
        for (int j = 0; j <= i; j++) if (s[j] != v) all_eq = 0;
        checks++;
        if (c[i] != (all_eq ? v : TZ)) begin
          failures++;
          $display("FAIL t=%0t carry %0d = %0d", $time, i, c[i]);
        end
      end
      if (k == 0 && c[N-1] == TP) n_over_up++;
      if (k == 0 && c[N-1] == TN) n_over_down++;
    end
    @(negedge clk);
    i_cp = TZ;
    cnt = cnt + int'(v);
    if (cnt > HALF) cnt -= 3 ** N;
    if (cnt < -HALF) cnt += 3 ** N;
    @(negedge clk);
    check_count();
  endtask

  initial begin
    cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Count up through the top, then down through the bottom.
    repeat (3 ** N + 2) pulse(TP, 1);
    repeat (2 * 3 ** N) pulse(TN, 1 + $urandom_range(1));
    // Random walk with occasional presets to 0.
    for (int k = 0; k < 400; k++) begin
      if ($urandom_range(30) == 0) begin
        @(negedge clk); pe = TP;
        @(negedge clk); pe = TZ;
        cnt = 0; n_preset++;
        check_count();
      end else pulse(($urandom_range(9) < 6) ? TP : TN, 1 + $urandom_range(2));
    end
    if (n_over_up == 0 || n_over_down == 0 || n_preset == 0) begin
      failures++;
      $display("FAIL an event never happened");
    end
    $display("events: overflow_up=%0d overflow_down=%0d preset=%0d", n_over_up, n_over_down, n_preset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
