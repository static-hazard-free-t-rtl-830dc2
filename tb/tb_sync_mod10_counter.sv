// tb_sync_mod10_counter: the synchronous symmetrical modulo-10 counter
// against its state table. Every one of the 19 states (-9..9) is preset by
// counting to it, then one down pulse and one up pulse are applied and the
// results compared with the table rows written out below (digits S2 S1 S0).
// A random run of pulses is then compared with an integer model, and the
// preset enable is exercised.
module tb_sync_mod10_counter;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  int n_wrap_up = 0, n_wrap_down = 0;
  logic clk = 0, rst_n = 0;
  trit_t i_cp = TZ, pe = TZ;
  trit_t [2:0] s;
  int cnt;

  // State table: present state, next state for a -1 pulse, for a 1 pulse;
  // each as S2 S1 S0.
  int tab [19][9] = '{
    '{-1, 0, 0,   0, 0, 0,  -1, 0, 1},
    '{-1, 0, 1,  -1, 0, 0,  -1, 1,-1},
    '{-1, 1,-1,  -1, 0, 1,  -1, 1, 0},
    '{-1, 1, 0,  -1, 1,-1,  -1, 1, 1},
    '{-1, 1, 1,  -1, 1, 0,   0,-1,-1},
    '{ 0,-1,-1,  -1, 1, 1,   0,-1, 0},
    '{ 0,-1, 0,   0,-1,-1,   0,-1, 1},
    '{ 0,-1, 1,   0,-1, 0,   0, 0,-1},
    '{ 0, 0,-1,   0,-1, 1,   0, 0, 0},
    '{ 0, 0, 0,   0, 0,-1,   0, 0, 1},
    '{ 0, 0, 1,   0, 0, 0,   0, 1,-1},
    '{ 0, 1,-1,   0, 0, 1,   0, 1, 0},
    '{ 0, 1, 0,   0, 1,-1,   0, 1, 1},
    '{ 0, 1, 1,   0, 1, 0,   1,-1,-1},
    '{ 1,-1,-1,   0, 1, 1,   1,-1, 0},
    '{ 1,-1, 0,   1,-1,-1,   1,-1, 1},
    '{ 1,-1, 1,   1,-1, 0,   1, 0,-1},
    '{ 1, 0,-1,   1,-1, 1,   1, 0, 0},
    '{ 1, 0, 0,   1, 0,-1,   0, 0, 0}
  };

  sync_mod10_counter dut (.clk, .rst_n, .i_cp, .pe, .s);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int value(trit_t [2:0] d);
    return 9 * int'(d[2]) + 3 * int'(d[1]) + int'(d[0]);
  endfunction

  function automatic bit digits_are(int a2, int a1, int a0);
    return int'(s[2]) == a2 && int'(s[1]) == a1 && int'(s[0]) == a0;
  endfunction

  task automatic pulse(trit_t v, int w);
    repeat (w) begin
      @(negedge clk);
      i_cp = v;
    end
    @(negedge clk);
    i_cp = TZ;
    if (v == TP && cnt == 9) n_wrap_up++;
    if (v == TN && cnt == -9) n_wrap_down++;
    cnt = (v == TP) ? ((cnt == 9) ? 0 : cnt + 1) : ((cnt == -9) ? 0 : cnt - 1);
    @(negedge clk);
    checks++;
    if (value(s) != cnt) begin
      failures++;
      $display("FAIL t=%0t count=%0d expected %0d", $time, value(s), cnt);
    end
  endtask

  task automatic clear();
    @(negedge clk); pe = TP;
    @(negedge clk); pe = TZ;
    cnt = 0;
    checks++;
    if (value(s) != 0) begin
      failures++;
      $display("FAIL preset");
    end
  endtask

  initial begin
    cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 19; row++) begin
      int target;
      target = row - 9;
      for (int dir = 0; dir < 2; dir++) begin
        clear();
        while (cnt != target) pulse((target > 0) ? TP : TN, 1);
        checks++;
        if (!digits_are(tab[row][0], tab[row][1], tab[row][2])) begin
          failures++;
          $display("FAIL row %0d present state", row);
        end
        pulse((dir == 0) ? TN : TP, 1 + $urandom_range(1));
        checks++;
        if (!digits_are(tab[row][3 + 3 * dir], tab[row][4 + 3 * dir], tab[row][5 + 3 * dir])) begin
          failures++;
          $display("FAIL row %0d dir %0d: %0d %0d %0d", row, dir, s[2], s[1], s[0]);
        end
      end
    end
    for (int k = 0; k < 300; k++) begin
      if ($urandom_range(40) == 0) clear();
      else pulse(($urandom_range(1) != 0) ? TP : TN, 1 + $urandom_range(2));
    end
    if (n_wrap_up == 0 || n_wrap_down == 0) begin
      failures++;
      $display("FAIL a wrap never happened");
    end
    $display("events: wrap_up=%0d wrap_down=%0d", n_wrap_up, n_wrap_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
