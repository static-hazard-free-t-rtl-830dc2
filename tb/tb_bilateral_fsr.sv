// tb_bilateral_fsr: the bilateral feedback shift register against a model.
// Random feedback values f and g, random per-stage presets and random
// return-to-zero pulses are applied; after each pulse or preset the stages
// must equal the model: right shift puts f into stage 1, left shift puts g
// into stage N, pe = 1 / -1 loads p1 / p2. Run with N = 4 as well as the
// default so the middle stages are exercised.
module tb_bilateral_fsr;
  import ternary_pkg::*;

  localparam int N = 4;

  int checks = 0, failures = 0;
  int n_right = 0, n_left = 0, n_p1 = 0, n_p2 = 0;
  logic clk = 0, rst_n = 0;
  trit_t i_cp = TZ, pe = TZ, f = TZ, g = TZ;
  trit_t [N-1:0] p1 = '0, p2 = '0, q;
  trit_t model [N];
  trit_t vals [3] = '{TN, TZ, TP};

  bilateral_fsr #(.N(N)) dut (.clk, .rst_n, .i_cp, .pe, .p1, .p2, .f, .g, .q);

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
      if (q[i] !== model[i]) begin
        failures++;
        $display("FAIL t=%0t stage %0d = %0d expected %0d", $time, i + 1, q[i], model[i]);
      end
    end
  endtask

  task automatic pulse(trit_t v, int w);
    @(negedge clk);
    f = vals[$urandom_range(2)];
    g = vals[$urandom_range(2)];
    repeat (w) begin
      i_cp = v;
      @(negedge clk);
    end
    i_cp = TZ;
    if (v == TP) begin
      for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
      model[0] = f;
      n_right++;
    end else begin
      for (int i = 0; i < N - 1; i++) model[i] = model[i+1];
      model[N-1] = g;
      n_left++;
    end
    @(negedge clk);
    compare();
  endtask

  task automatic preset(trit_t e);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      p1[i] = vals[$urandom_range(2)];
      p2[i] = vals[$urandom_range(2)];
    end
    pe = e;
    @(negedge clk);
    pe = TZ;
    for (int i = 0; i < N; i++) model[i] = (e == TP) ? p1[i] : p2[i];
    if (e == TP) n_p1++; else n_p2++;
    compare();
  endtask

  initial begin
    foreach (model[i]) model[i] = TZ;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      int kind;
      kind = $urandom_range(9);
      if (kind == 0) preset(TP);
      else if (kind == 1) preset(TN);
      else pulse((kind < 6) ? TP : TN, 1 + $urandom_range(2));
    end
    if (n_right == 0 || n_left == 0 || n_p1 == 0 || n_p2 == 0) begin
      failures++;
      $display("FAIL an event never happened");
    end
    $display("events: right=%0d left=%0d preset1=%0d preset2=%0d", n_right, n_left, n_p1, n_p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
