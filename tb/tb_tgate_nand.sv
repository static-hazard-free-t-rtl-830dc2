// tb_tgate_nand: exhaustive check of the T-gate built from ternary NAND gates.
// All 81 combinations of p, q, r, s are applied; the output must equal the
// input selected by s (p for 1, q for 0, r for -1). The same sweep also
// checks the two hold conditions the form is built for: with p = q the output
// is p for s = 1 and s = 0, with r = q it is r for s = -1 and s = 0.
module tb_tgate_nand;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  trit_t p, q, r, s, y;
  trit_t vals [3] = '{TN, TZ, TP};

  tgate_nand dut (.p, .q, .r, .s, .t_out(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (vals[a]) foreach (vals[b]) foreach (vals[c]) foreach (vals[d]) begin
      trit_t expv;
      p = vals[a]; q = vals[b]; r = vals[c]; s = vals[d];
      #1;
      case (s)
        TP:      expv = p;
        TZ:      expv = q;
        default: expv = r;
      endcase
      checks++;
      if (y !== expv) begin
        failures++;
        $display("FAIL T(%0d,%0d,%0d;%0d) = %0d, expected %0d", p, q, r, s, y, expv);
      end
      if (p == q && s != TN) begin
        checks++;
        if (y !== p) failures++;
      end
      if (r == q && s != TP) begin
        checks++;
        if (y !== r) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
