// tb_d_ms_fff: random stimulus check of the D master-slave flip-flap-flop.
// Inputs change on the falling clk edge and are checked before the next
// rising edge. A reference model holds master and slave: clock 1 loads d
// into the master, clock -1 loads the preset into both, clock 0 copies the
// master to the slave. The slave output must never move while the clock is 1.
module tb_d_ms_fff;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  int hold_checks = 0;
  logic clk = 0, rst_n = 0;
  trit_t d = TZ, preset = TZ, cp = TZ, q;
  trit_t m, sl;
  trit_t vals [3] = '{TN, TZ, TP};

  d_ms_fff dut (.clk, .rst_n, .d, .preset, .cp, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(trit_t nd, trit_t npre, trit_t ncp);
    trit_t q_before;
    @(negedge clk);
    d = nd; preset = npre; cp = ncp;
    #1;
    checks++;
    if (q !== sl) begin
      failures++;
      $display("FAIL t=%0t q=%0d expected %0d", $time, q, sl);
    end
    q_before = q;
    if (cp == TP) m = d;
    else if (cp == TN) m = preset;
    if (cp != TP) sl = m;
    @(posedge clk);
    #1;
    if (cp == TP) begin
      checks++;
      hold_checks++;
      if (q !== q_before) begin
        failures++;
        $display("FAIL t=%0t slave moved while CP = 1", $time);
      end
    end
  endtask

  initial begin
    m = TZ; sl = TZ;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 800; k++)
      step(vals[$urandom_range(2)], vals[$urandom_range(2)], vals[$urandom_range(2)]);
    if (hold_checks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
