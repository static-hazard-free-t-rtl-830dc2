// tb_c_fff: check of the counting flip-flap-flop against its state table.
// For every present state and every input pulse (1, 0 held, -1) the next
// state must be the signed ternary sum of input and state and the carry,
// watched during the pulse, its signed ternary carry. Then a random run of
// return-to-zero pulses of random width is compared with an integer model,
// and both presets (pe = 1 to p1, pe = -1 to p2) are exercised.
module tb_c_fff;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  trit_t i_cp = TZ, pe = TZ, p1 = TZ, p2 = TZ, s, c;
  int st;   // model state, -1..1
  trit_t vals [3] = '{TN, TZ, TP};

  c_fff dut (.clk, .rst_n, .i_cp, .pe, .p1, .p2, .s, .c);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(string what);
    checks++;
    if (int'(s) != st) begin
      failures++;
      $display("FAIL %s t=%0t S=%0d expected %0d", what, $time, s, st);
    end
  endtask

  // One return-to-zero pulse of value v, width w cycles.
  task automatic pulse(trit_t v, int w);
    int sum, cexp;
    sum  = st + int'(v);
    cexp = (sum > 1) ? 1 : (sum < -1) ? -1 : 0;
    for (int k = 0; k < w; k++) begin
      @(negedge clk);
      i_cp = v;
      #1;
      checks++;
      if (int'(c) != cexp) begin
        failures++;
        $display("FAIL carry t=%0t I=%0d S=%0d C=%0d expected %0d", $time, v, st, c, cexp);
      end
      check_state("hold during pulse");
    end
    @(negedge clk);
    i_cp = TZ;
    #1;
    checks++;
    if (c !== TZ) failures++;
    st = sum - 3 * cexp;
    @(negedge clk);
    check_state("after pulse");
  endtask

  task automatic preset(trit_t e, trit_t v1, trit_t v2);
    @(negedge clk);
    pe = e; p1 = v1; p2 = v2;
    @(negedge clk);
    pe = TZ;
    st = (e == TP) ? int'(v1) : int'(v2);
    check_state("preset");
  endtask

  initial begin
    st = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // State table: every state with every pulse.
    foreach (vals[a]) foreach (vals[b]) begin
      preset(TN, TZ, vals[a]);
      if (vals[b] == TZ) begin
        repeat (2) @(negedge clk);
        check_state("input 0");
      end else pulse(vals[b], 1);
    end
    for (int k = 0; k < 300; k++) begin
      if ($urandom_range(15) == 0) preset(($urandom_range(1) != 0) ? TP : TN, vals[$urandom_range(2)], vals[$urandom_range(2)]);
      else pulse(($urandom_range(1) != 0) ? TP : TN, 1 + $urandom_range(2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
