// tb_tgate_hazard: the static hazard of the T-gate, with gate delays.
//
// Two delay models of the T-gate are driven side by side: the plain sum of
// products and the consensus form used in tgate. Part 1: for every p = q and
// every r, the control moves from 1 to 0 with J0 slower than J1; for every
// r = q and every p it moves from -1 to 0 with J0 slower than J-1. Any output
// sample that differs from q during the change is a glitch. The consensus
// form must never glitch; the plain form must glitch in at least one case
// (otherwise the experiment shows nothing). Part 2: each form is closed into
// a D-FFF loop (output wired back to q) and a 1 is clocked in; when the
// clock returns to 0 the consensus loop must keep the 1, while the plain
// loop is expected to fall to another value. The RTL tgate is then checked
// to have the same logic function as the consensus model.
module tb_tgate_hazard;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  int glitches_plain = 0, glitches_cons = 0;
  trit_t vals [3] = '{TN, TZ, TP};

  trit_t p = TZ, q = TZ, r = TZ, s = TZ;
  trit_t y_plain, y_cons, y_rtl;

  tgate_delay_model #(.CONSENSUS(1'b0)) u_plain (.p, .q, .r, .s, .t_out(y_plain));
  tgate_delay_model #(.CONSENSUS(1'b1)) u_cons  (.p, .q, .r, .s, .t_out(y_cons));
  tgate u_rtl (.p, .q, .r, .s, .t_out(y_rtl));

  // D-FFF loops: D on p, preset 0 on r, clock on s.
  trit_t ff_d = TZ, ff_cp = TZ, ff_plain, ff_cons;
  tgate_delay_model #(.CONSENSUS(1'b0)) u_ff_plain (.p(ff_d), .q(ff_plain), .r(TZ), .s(ff_cp), .t_out(ff_plain));
  tgate_delay_model #(.CONSENSUS(1'b1)) u_ff_cons  (.p(ff_d), .q(ff_cons),  .r(TZ), .s(ff_cp), .t_out(ff_cons));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic transition(trit_t from, trit_t a, trit_t b, trit_t c);
    bit gp = 0, gc = 0;
    s = from; p = a; q = b; r = c;
    #10;
    s = TZ;
    for (int t = 0; t < 10; t++) begin
      #1;
      if (y_plain != q) gp = 1;
      if (y_cons != q) gc = 1;
    end
    checks++;
    if (gc) begin
      failures++;
      $display("FAIL consensus form glitched: s %0d->0, p=%0d q=%0d r=%0d", from, a, b, c);
    end
    if (gp) glitches_plain++;
    if (gc) glitches_cons++;
  endtask

  initial begin
    #5;
    foreach (vals[a]) foreach (vals[c]) transition(TP, vals[a], vals[a], vals[c]);
    foreach (vals[a]) foreach (vals[c]) transition(TN, vals[c], vals[a], vals[a]);
    checks++;
    if (glitches_plain == 0) begin
      failures++;
      $display("FAIL the plain form never glitched");
    end

    // D-FFF loops: clock a 1 in, return the clock to 0, then change D.
    ff_cp = TN;           // preset both loops to 0
    #10;
    ff_d = TP;
    ff_cp = TP;
    #10;
    ff_cp = TZ;
    #10;
    ff_d = TN;
    #10;
    checks++;
    if (ff_cons !== TP) begin
      failures++;
      $display("FAIL consensus D-FFF lost its 1 (holds %0d)", ff_cons);
    end
    checks++;
    if (ff_plain === TP) begin
      failures++;
      $display("FAIL plain D-FFF was expected to lose its 1 through the hazard");
    end

    // Logic function of the RTL gate equals the consensus model.
    foreach (vals[a]) foreach (vals[b]) foreach (vals[c]) foreach (vals[d]) begin
      p = vals[a]; q = vals[b]; r = vals[c]; s = vals[d];
      #10;
      checks++;
      if (y_rtl !== y_cons) failures++;
    end

    $display("glitching cases: plain form %0d of 18, consensus form %0d of 18", glitches_plain, glitches_cons);
    $display("D-FFF after the clock returns to 0: plain loop holds %0d, consensus loop holds %0d", ff_plain, ff_cons);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
