// tb_async_mod10_counter: the ripple symmetrical modulo-10 counter against
// an integer model. Up pulses count 0..9 and the tenth clears to 0; down
// pulses count 0..-9 and the tenth clears to 0. After each pulse the digits
// must show the model's count, and the decoder output must be 1 in the cycle
// in which the count reads +10 or -10. Both clears must happen.
module tb_async_mod10_counter;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  int n_clr_up = 0, n_clr_down = 0;
  logic clk = 0, rst_n = 0;
  trit_t i_cp = TZ, c2, clr;
  trit_t [2:0] s;
  int cnt;

  async_mod10_counter dut (.clk, .rst_n, .i_cp, .s, .c2, .clr);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int value(trit_t [2:0] d);
    return 9 * int'(d[2]) + 3 * int'(d[1]) + int'(d[0]);
  endfunction

  // Watch the decoder: it must be 1 exactly while the digits read +-10.
  always @(negedge clk) if (rst_n) begin
    int v;
    v = value(s);
    checks++;
    if ((clr == TP) != (v == 10 || v == -10) || clr == TN) begin
      failures++;
      $display("FAIL t=%0t decoder=%0d with count %0d", $time, clr, v);
    end
    if (clr == TP && v == 10) n_clr_up++;
    if (clr == TP && v == -10) n_clr_down++;
  end

  task automatic pulse(trit_t v, int w);
    repeat (w) begin
      @(negedge clk);
      i_cp = v;
    end
    @(negedge clk);
    i_cp = TZ;
    cnt = cnt + int'(v);
    if (cnt == 10 || cnt == -10) cnt = 0;
    repeat (3) @(negedge clk);
    #1;
    checks++;
    if (value(s) != cnt) begin
      failures++;
      $display("FAIL t=%0t count=%0d expected %0d", $time, value(s), cnt);
    end
  endtask

  initial begin
    cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (23) pulse(TP, 1);
    repeat (31) pulse(TN, 2);
    for (int k = 0; k < 300; k++) pulse(($urandom_range(1) != 0) ? TP : TN, 1 + $urandom_range(2));
    if (n_clr_up == 0 || n_clr_down == 0) begin
      failures++;
      $display("FAIL a clear never happened");
    end
    $display("events: clear_at_plus10=%0d clear_at_minus10=%0d", n_clr_up, n_clr_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
