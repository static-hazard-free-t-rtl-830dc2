// tb_d_fff: random stimulus check of the D flip-flap-flop.
// Inputs change on the falling clk edge. A reference model keeps the stored
// trit: with cp = 1 the output must equal d, with cp = -1 the preset, with
// cp = 0 the value stored at the last rising edge. Directed steps first
// check the paper's example: store a 1 with a clock pulse, then change d
// while the clock is 0 and see the 1 kept.
module tb_d_fff;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  trit_t d = TZ, preset = TZ, cp = TZ, q;
  trit_t held;
  trit_t vals [3] = '{TN, TZ, TP};

  d_fff dut (.clk, .rst_n, .d, .preset, .cp, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(trit_t nd, trit_t npre, trit_t ncp);
    trit_t expv;
    @(negedge clk);
    d = nd; preset = npre; cp = ncp;
    #1;
    expv = (cp == TP) ? d : (cp == TN) ? preset : held;
    checks++;
    if (q !== expv) begin
      failures++;
      $display("FAIL t=%0t d=%0d pre=%0d cp=%0d q=%0d exp=%0d", $time, d, preset, cp, q, expv);
    end
    @(posedge clk);
    held = expv;
  endtask

  initial begin
    held = TZ;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Document's example: p = 1 clocked in, then held while CP = 0.
    step(TP, TZ, TZ);
    step(TP, TZ, TP);
    step(TN, TZ, TZ);
    step(TZ, TZ, TZ);
    checks++;
    if (q !== TP) failures++;
    // Preset with CP = -1.
    step(TP, TN, TN);
    step(TP, TP, TZ);
    checks++;
    if (q !== TN) failures++;
    for (int k = 0; k < 600; k++)
      step(vals[$urandom_range(2)], vals[$urandom_range(2)], vals[$urandom_range(2)]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
