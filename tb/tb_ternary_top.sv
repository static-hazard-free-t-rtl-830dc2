// tb_ternary_top: end-to-end run of the whole design at its default sizes.
// Phase 1 sweeps both T-gate forms over all 81 input combinations. Phase 2
// drives the D-FFF, the D master-slave FFF and the B-FFF with random
// stimulus (the B-FFF clock obeying the return-to-zero rule) against
// reference models. Phase 3 sends one stream of random return-to-zero
// up/down pulses to all six counting circuits at once and compares each with
// an integer model after every pulse. Each mechanism of the design is
// counted (shift right/left, both presets, carries, overflows, mod-10
// clears and wraps, ring wraps) and a failure is counted for any that never
// happened.
module tb_ternary_top;
  import ternary_pkg::*;

  localparam int N = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  trit_t tg_p, tg_q, tg_r, tg_s, tg_out, nd_p, nd_q, nd_r, nd_s, nd_out;
  trit_t dff_d = TZ, dff_preset = TZ, dff_cp = TZ, dff_q;
  trit_t dms_d = TZ, dms_preset = TZ, dms_cp = TZ, dms_q;
  trit_t bff_sr = TZ, bff_sl = TZ, bff_pe = TZ, bff_p1 = TZ, bff_p2 = TZ, bff_cp = TZ, bff_q;
  trit_t cff_i = TZ, cff_pe = TZ, cff_p1 = TZ, cff_p2 = TZ, cff_s, cff_c;
  trit_t ac_i = TZ, ac_pe = TZ;
  trit_t [N-1:0] ac_s, ac_c;
  trit_t am_i = TZ, am_c2, am_clr;
  trit_t [2:0] am_s;
  trit_t sm_i = TZ, sm_pe = TZ;
  trit_t [2:0] sm_s;
  trit_t on_i = TZ, on_pe = TZ;
  trit_t [N-1:0] on_f;
  trit_t sr_i = TZ, sr_pe = TZ;
  trit_t [N-1:0] sr_f;
  trit_t [3*N-1:0] sr_hit;

  trit_t vals [3] = '{TN, TZ, TP};

  // Mechanism counters.
  int ev_dff_store = 0, ev_dff_preset = 0, ev_dms_hold = 0, ev_dms_preset = 0;
  int ev_bff_right = 0, ev_bff_left = 0, ev_bff_p1 = 0, ev_bff_p2 = 0;
  int ev_cff_carry_up = 0, ev_cff_carry_down = 0;
  int ev_ac_over_up = 0, ev_ac_over_down = 0, ev_ac_preset = 0;
  int ev_am_clr_up = 0, ev_am_clr_down = 0;
  int ev_sm_wrap_up = 0, ev_sm_wrap_down = 0, ev_sm_preset = 0;
  int ev_on_wrap_up = 0, ev_on_wrap_down = 0, ev_sr_wrap_up = 0, ev_sr_wrap_down = 0;

  ternary_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL t=%0t %s: got %0d expected %0d", $time, what, got, want);
    end
  endtask

  // ---------------------------------------------------------------- phase 2
  trit_t m_dff, m_dms_m, m_dms_s, m_bff_m, m_bff_s;

  task automatic mem_step(bit allow_bff_nonzero);
    trit_t old_dms;
    @(negedge clk);
    dff_d = vals[$urandom_range(2)]; dff_preset = vals[$urandom_range(2)]; dff_cp = vals[$urandom_range(2)];
    dms_d = vals[$urandom_range(2)]; dms_preset = vals[$urandom_range(2)]; dms_cp = vals[$urandom_range(2)];
    bff_sr = vals[$urandom_range(2)]; bff_sl = vals[$urandom_range(2)];
    bff_p1 = vals[$urandom_range(2)]; bff_p2 = vals[$urandom_range(2)];
    // Return-to-zero clock for the B-FFF; preset only with the clock at 0.
    if (bff_cp != TZ) bff_cp = ($urandom_range(1) != 0) ? bff_cp : TZ;
    else bff_cp = allow_bff_nonzero ? vals[$urandom_range(2)] : TZ;
    bff_pe = (bff_cp == TZ) ? vals[$urandom_range(2)] : TZ;
    #1;
    // D-FFF
    if (dff_cp == TP) begin m_dff = dff_d; ev_dff_store++; end
    else if (dff_cp == TN) begin m_dff = dff_preset; ev_dff_preset++; end
    expect_eq(int'(dff_q), int'(m_dff), "d_fff");
    // D master-slave FFF
    expect_eq(int'(dms_q), int'(m_dms_s), "d_ms_fff");
    old_dms = dms_q;
    if (dms_cp == TP) m_dms_m = dms_d;
    else if (dms_cp == TN) begin m_dms_m = dms_preset; ev_dms_preset++; end
    if (dms_cp != TP) m_dms_s = m_dms_m;
    // B-FFF
    expect_eq(int'(bff_q), int'(m_bff_s), "b_ms_fff");
    if (bff_cp == TP) begin m_bff_m = bff_sr; ev_bff_right++; end
    else if (bff_cp == TN) begin m_bff_m = bff_sl; ev_bff_left++; end
    else if (bff_pe == TP) begin m_bff_m = bff_p1; ev_bff_p1++; end
    else if (bff_pe == TN) begin m_bff_m = bff_p2; ev_bff_p2++; end
    if (bff_cp == TZ) m_bff_s = m_bff_m;
    @(posedge clk);
    #1;
    if (dms_cp == TP) begin
      expect_eq(int'(dms_q), int'(old_dms), "d_ms_fff slave holds during pulse");
      ev_dms_hold++;
    end
  endtask

  // ---------------------------------------------------------------- phase 3
  int c_cff, c_ac, c_am, c_sm, c_on, c_sr;

  function automatic int val3(trit_t [2:0] d);
    return 9 * int'(d[2]) + 3 * int'(d[1]) + int'(d[0]);
  endfunction

  function automatic int one_of_n_code(int n, int i);
    return (i != n % N) ? 0 : (n < N) ? -1 : 1;
  endfunction

  // Switch ring state for count n: stage i (0-based) is 1 for n in
  // i+1..i+N, -1 for n in i+N+1..i+2N (mod 3N), otherwise 0.
  function automatic int switch_ring_code(int n, int i);
    int k;
    k = (n - i - 1 + 3 * N) % (3 * N);
    return (k < N) ? 1 : (k < 2 * N) ? -1 : 0;
  endfunction

  task automatic count_pulse(trit_t v, int w);
    int cexp;
    for (int k = 0; k < w; k++) begin
      @(negedge clk);
      cff_i = v; ac_i = v; am_i = v; sm_i = v; on_i = v; sr_i = v;
      #1;
      cexp = (c_cff == int'(v)) ? int'(v) : 0;
      expect_eq(int'(cff_c), cexp, "c_fff carry");
      if (k == 0 && cexp == 1) ev_cff_carry_up++;
      if (k == 0 && cexp == -1) ev_cff_carry_down++;
      if (k == 0 && ac_c[N-1] == TP) ev_ac_over_up++;
      if (k == 0 && ac_c[N-1] == TN) ev_ac_over_down++;
    end
    @(negedge clk);
    cff_i = TZ; ac_i = TZ; am_i = TZ; sm_i = TZ; on_i = TZ; sr_i = TZ;
    // Models.
    c_cff = c_cff + int'(v);
    if (c_cff > 1) c_cff -= 3;
    if (c_cff < -1) c_cff += 3;
    c_ac = c_ac + int'(v);
    if (c_ac > 13) c_ac -= 27;
    if (c_ac < -13) c_ac += 27;
    c_am = c_am + int'(v);
    if (c_am == 10) ev_am_clr_up++;
    if (c_am == -10) ev_am_clr_down++;
    if (c_am == 10 || c_am == -10) c_am = 0;
    if (v == TP && c_sm == 9) ev_sm_wrap_up++;
    if (v == TN && c_sm == -9) ev_sm_wrap_down++;
    c_sm = (v == TP) ? ((c_sm == 9) ? 0 : c_sm + 1) : ((c_sm == -9) ? 0 : c_sm - 1);
    if (v == TP && c_on == 2 * N - 1) ev_on_wrap_up++;
    if (v == TN && c_on == 0) ev_on_wrap_down++;
    c_on = (c_on + int'(v) + 2 * N) % (2 * N);
    if (v == TP && c_sr == 3 * N - 1) ev_sr_wrap_up++;
    if (v == TN && c_sr == 0) ev_sr_wrap_down++;
    c_sr = (c_sr + int'(v) + 3 * N) % (3 * N);
    repeat (3) @(negedge clk);
    #1;
    expect_eq(int'(cff_s), c_cff, "c_fff state");
    expect_eq(val3(ac_s), c_ac, "async counter");
    expect_eq(val3(am_s), c_am, "async mod-10 counter");
    expect_eq(val3(sm_s), c_sm, "sync mod-10 counter");
    for (int i = 0; i < N; i++) begin
      expect_eq(int'(on_f[i]), one_of_n_code(c_on, i), "one-of-N counter");
      expect_eq(int'(sr_f[i]), switch_ring_code(c_sr, i), "switch ring counter");
    end
    for (int n = 0; n < 3 * N; n++)
      expect_eq(int'(sr_hit[n]), (n == c_sr) ? 1 : -1, "switch ring decoder");
  endtask

  task automatic presets();
    @(negedge clk);
    ac_pe = TP; sm_pe = TP; on_pe = TP; sr_pe = TP;
    @(negedge clk);
    ac_pe = TZ; sm_pe = TZ; on_pe = TZ; sr_pe = TZ;
    c_ac = 0; c_sm = 0; c_on = 0; c_sr = 0;
    ev_ac_preset++; ev_sm_preset++;
    #1;
    expect_eq(val3(ac_s), 0, "async counter preset");
    expect_eq(val3(sm_s), 0, "sync counter preset");
    expect_eq(int'(on_f[0]), -1, "one-of-N preset");
  endtask

  initial begin
    // Phase 1: T-gates.
    foreach (vals[a]) foreach (vals[b]) foreach (vals[c]) foreach (vals[d]) begin
      int want;
      tg_p = vals[a]; tg_q = vals[b]; tg_r = vals[c]; tg_s = vals[d];
      nd_p = vals[a]; nd_q = vals[b]; nd_r = vals[c]; nd_s = vals[d];
      #1;
      want = (vals[d] == TP) ? int'(vals[a]) : (vals[d] == TZ) ? int'(vals[b]) : int'(vals[c]);
      expect_eq(int'(tg_out), want, "tgate");
      expect_eq(int'(nd_out), want, "tgate_nand");
    end

    m_dff = TZ; m_dms_m = TZ; m_dms_s = TZ; m_bff_m = TZ; m_bff_s = TZ;
    c_cff = 0; c_ac = 0; c_am = 0; c_sm = 0; c_on = 0; c_sr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Phase 2: memory elements.
    for (int k = 0; k < 500; k++) mem_step(1'b1);

    // Phase 3: counters.
    presets();
    repeat (16) count_pulse(TP, 1);
    repeat (30) count_pulse(TN, 1 + $urandom_range(1));
    for (int k = 0; k < 400; k++) begin
      if ($urandom_range(60) == 0) presets();
      else count_pulse(($urandom_range(9) < 5) ? TP : TN, 1 + $urandom_range(2));
    end

    $display("events: dff_store=%0d dff_preset=%0d dms_hold=%0d dms_preset=%0d",
             ev_dff_store, ev_dff_preset, ev_dms_hold, ev_dms_preset);
    $display("events: bff_right=%0d bff_left=%0d bff_p1=%0d bff_p2=%0d",
             ev_bff_right, ev_bff_left, ev_bff_p1, ev_bff_p2);
    $display("events: cff_carry_up=%0d cff_carry_down=%0d ac_over_up=%0d ac_over_down=%0d ac_preset=%0d",
             ev_cff_carry_up, ev_cff_carry_down, ev_ac_over_up, ev_ac_over_down, ev_ac_preset);
    $display("events: am_clr_up=%0d am_clr_down=%0d sm_wrap_up=%0d sm_wrap_down=%0d sm_preset=%0d",
             ev_am_clr_up, ev_am_clr_down, ev_sm_wrap_up, ev_sm_wrap_down, ev_sm_preset);
    $display("events: on_wrap_up=%0d on_wrap_down=%0d sr_wrap_up=%0d sr_wrap_down=%0d",
             ev_on_wrap_up, ev_on_wrap_down, ev_sr_wrap_up, ev_sr_wrap_down);
    if (ev_dff_store == 0 || ev_dff_preset == 0 || ev_dms_hold == 0 || ev_dms_preset == 0 ||
        ev_bff_right == 0 || ev_bff_left == 0 || ev_bff_p1 == 0 || ev_bff_p2 == 0 ||
        ev_cff_carry_up == 0 || ev_cff_carry_down == 0 || ev_ac_over_up == 0 ||
        ev_ac_over_down == 0 || ev_ac_preset == 0 || ev_am_clr_up == 0 || ev_am_clr_down == 0 ||
        ev_sm_wrap_up == 0 || ev_sm_wrap_down == 0 || ev_sm_preset == 0 ||
        ev_on_wrap_up == 0 || ev_on_wrap_down == 0 || ev_sr_wrap_up == 0 || ev_sr_wrap_down == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
