// async_counter: asynchronous (ripple) signed ternary up-down counter.
//
// N counting flip-flap-flops in a chain: the counted pulse clocks digit 0 and
// the carry pulse C_i of digit i clocks digit i+1. A pulse 1 counts up, a
// pulse -1 counts down, so one signal line carries both directions. The count
// is the balanced ternary number sum S_i * 3^i, range -(3^N-1)/2 ..
// +(3^N-1)/2, wrapping around at both ends. Digit 0 is the left-hand stage.
// The structure and N = 3 follow the paper; PE is common to all digits
// and presets every digit to 0 (P1 = 0); P2 is a don't-care there and is
// tied to 0 here.
//
// Timing: carries ripple combinationally while the pulse is high; all digits
// take their new values at the first clk edge after the pulse has returned
// to 0. Pulses must be return-to-zero and each level must last at least one
// clk cycle. rst_n (synchronous, active low) clears the count.
//
// Interface: i_cp and pe trits in; s[N-1:0] state digits and c[N-1:0] carry
// pulses out (c[N-1] is the overflow pulse).
module async_counter
  import ternary_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  trit_t           i_cp,
  input  trit_t           pe,
  output trit_t [N-1:0]   s,
  output trit_t [N-1:0]   c
);

  for (genvar i = 0; i < N; i++) begin : g_digit
    c_fff u_cfff (
      .clk, .rst_n,
      .i_cp((i == 0) ? i_cp : c[(i == 0) ? 0 : i-1]),
      .pe, .p1(TZ), .p2(TZ),
      .s(s[i]), .c(c[i])
    );
  end

endmodule
