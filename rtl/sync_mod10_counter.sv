// sync_mod10_counter: symmetrical modulo-10 counter in synchronous form.
//
// Three bilateral master-slave flip-flap-flops (B-FFFs) share the counted
// pulse as their clock. Each digit's shift-right input R gets that digit of
// the next count up and its shift-left input L that digit of the next count
// down, so a pulse 1 counts up and a pulse -1 counts down and all digits
// change together. The count is the balanced ternary number
// 9*S2 + 3*S1 + S0 in -9..9: counting up from 9 gives 0, counting down from
// -9 gives 0, otherwise the count moves by one. This is the paper's state
// table. R and L are T-gate networks, as in the paper, but not the
// paper's own minimised networks: each of the six functions is a full
// three-level T-gate tree (tgate_tree3) whose constants are that digit's
// column of the state table.
// PE presets all digits to 0 (P1 = 0); P2 is a don't-care there and is tied
// to 0.
//
// Timing: the new count appears at the first clk edge after the pulse has
// returned to 0. rst_n (synchronous, active low) clears the count.
//
// Interface: i_cp and pe trits in; s[2:0] digits out.
module sync_mod10_counter
  import ternary_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  trit_t        i_cp,
  input  trit_t        pe,
  output trit_t [2:0]  s
);

  // Digit i of the next count for every present state, as the truth table
  // of a T-gate tree: entry 9*(S2+1) + 3*(S1+1) + (S0+1). Computed at
  // elaboration from the counting rule (+1 up, -1 down, +-9 goes to 0).
  function automatic trit_t [26:0] next_table(bit up, int digit);
    trit_t [26:0] t;
    for (int idx = 0; idx < 27; idx++) begin
      int v, n, rem, m;
      v   = 9 * (idx / 9 - 1) + 3 * ((idx / 3) % 3 - 1) + (idx % 3 - 1);
      n   = up ? ((v >= 9) ? 0 : v + 1) : ((v <= -9) ? 0 : v - 1);
      rem = n;
      t[idx] = TZ;
      for (int i = 0; i < 3; i++) begin
        m = ((rem % 3) + 3) % 3;         // 0, 1 or 2; 2 stands for digit -1
        if (i == digit) t[idx] = (m == 2) ? TN : trit_t'(m);
        rem = (m == 2) ? (rem + 1) / 3 : (rem - m) / 3;
      end
    end
    return t;
  endfunction

  trit_t [2:0] up_next, down_next;

  for (genvar i = 0; i < 3; i++) begin : g_logic
    tgate_tree3 #(.TABLE(next_table(1'b1, i))) u_up (
      .s2(s[2]), .s1(s[1]), .s0(s[0]), .y(up_next[i])
    );
    tgate_tree3 #(.TABLE(next_table(1'b0, i))) u_down (
      .s2(s[2]), .s1(s[1]), .s0(s[0]), .y(down_next[i])
    );
  end

  for (genvar i = 0; i < 3; i++) begin : g_digit
    b_ms_fff u_bff (
      .clk, .rst_n,
      .sr(up_next[i]), .sl(down_next[i]),
      .pe, .p1(TZ), .p2(TZ), .cp(i_cp), .q(s[i])
    );
  end

endmodule
