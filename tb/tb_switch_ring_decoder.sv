// tb_switch_ring_decoder: the count decoder of the switch ring counter.
// For N = 3 (the default) and N = 4 every counting state is generated by
// stepping a software switch ring (right shift, cycling feedback) from all
// zeros; at count n exactly output n must be 1 and every other output -1.
module tb_switch_ring_decoder;
  import ternary_pkg::*;

  int checks = 0, failures = 0;
  trit_t [2:0] f3;
  trit_t [8:0] hit3;
  trit_t [3:0] f4;
  trit_t [11:0] hit4;

  switch_ring_decoder #(.N(3)) dut3 (.f(f3), .hit(hit3));
  switch_ring_decoder #(.N(4)) dut4 (.f(f4), .hit(hit4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic trit_t cyc(trit_t x);
    return (x == TP) ? TN : (x == TZ) ? TP : TZ;
  endfunction

  initial begin
    f3 = '0;
    for (int n = 0; n < 9; n++) begin
      #1;
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (hit3[k] !== ((k == n) ? TP : TN)) begin
          failures++;
          $display("FAIL N=3 count %0d output %0d = %0d", n, k, hit3[k]);
        end
      end
      f3 = {f3[1:0], cyc(f3[2])};
    end
    f4 = '0;
    for (int n = 0; n < 12; n++) begin
      #1;
      for (int k = 0; k < 12; k++) begin
        checks++;
        if (hit4[k] !== ((k == n) ? TP : TN)) begin
          failures++;
          $display("FAIL N=4 count %0d output %0d = %0d", n, k, hit4[k]);
        end
      end
      f4 = {f4[2:0], cyc(f4[3])};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
