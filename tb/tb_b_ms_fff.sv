// tb_b_ms_fff: random stimulus check of the bilateral master-slave FFF.
// The clock follows the return-to-zero rule (never 1 directly to -1). Preset
// enable is only raised while the clock is 0, as the element expects. A
// reference model: clock 1 loads the shift-right input into the master,
// clock -1 the shift-left input, clock 0 with pe = 1 / -1 loads p1 / p2,
// and the slave copies the master whenever the clock is 0. Each kind of
// event is counted and must occur.
module tb_b_ms_fff;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  int n_right = 0, n_left = 0, n_p1 = 0, n_p2 = 0;
  logic clk = 0, rst_n = 0;
  trit_t sr = TZ, sl = TZ, pe = TZ, p1 = TZ, p2 = TZ, cp = TZ, q;
  trit_t m, s;
  trit_t vals [3] = '{TN, TZ, TP};

  b_ms_fff dut (.clk, .rst_n, .sr, .sl, .pe, .p1, .p2, .cp, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(trit_t ncp, trit_t npe);
    @(negedge clk);
    sr = vals[$urandom_range(2)];
    sl = vals[$urandom_range(2)];
    p1 = vals[$urandom_range(2)];
    p2 = vals[$urandom_range(2)];
    cp = ncp; pe = npe;
    #1;
    checks++;
    if (q !== s) begin
      failures++;
      $display("FAIL t=%0t q=%0d expected %0d", $time, q, s);
    end
    if (cp == TP) begin m = sr; n_right++; end
    else if (cp == TN) begin m = sl; n_left++; end
    else if (pe == TP) begin m = p1; n_p1++; end
    else if (pe == TN) begin m = p2; n_p2++; end
    if (cp == TZ) s = m;
    @(posedge clk);
  endtask

  initial begin
    m = TZ; s = TZ;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      int kind;
      kind = $urandom_range(5);
      case (kind)
        0: begin step(TP, TZ); if ($urandom_range(1) != 0) step(TP, TZ); step(TZ, TZ); end
        1: begin step(TN, TZ); if ($urandom_range(1) != 0) step(TN, TZ); step(TZ, TZ); end
        2: step(TZ, TP);
        3: step(TZ, TN);
        default: step(TZ, TZ);
      endcase
    end
    step(TZ, TZ);
    if (n_right == 0 || n_left == 0 || n_p1 == 0 || n_p2 == 0) begin
      failures++;
      $display("FAIL an event never happened");
    end
    $display("events: right=%0d left=%0d preset1=%0d preset2=%0d", n_right, n_left, n_p1, n_p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
