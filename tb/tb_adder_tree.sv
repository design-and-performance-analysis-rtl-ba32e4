// Self-checking test of the three-level adder tree.
// Applies all-zero, all-maximum (7*63 = 441, the largest code) and 2000
// random sets of seven 6-bit values, comparing the 9-bit sum with a
// software total.
`timescale 1ns/1ps
module tb_adder_tree;
  import agro_tdc_pkg::*;
  count_t a [N_COUNTERS];
  code_t  sum;
  int checks = 0, failures = 0;

  adder_tree dut (.a(a), .sum(sum));

  task automatic check(input string what);
    int unsigned total;
    total = 0;
    for (int k = 0; k < N_COUNTERS; k++) total += a[k];
    #1;
    checks++;
    if (sum !== code_t'(total) || total >= (1 << OUT_W)) begin
      failures++;
      $display("FAIL %s: sum=%0d expected %0d", what, sum, total);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N_COUNTERS; k++) a[k] = '0;
    check("zeros");
    for (int k = 0; k < N_COUNTERS; k++) a[k] = '1;
    check("maximum");
    if (sum !== code_t'(441)) begin
      failures++;
      $display("FAIL maximum code is %0d, expected 441", sum);
    end
    checks++;
    for (int j = 0; j < N_COUNTERS; j++) begin
      for (int k = 0; k < N_COUNTERS; k++) a[k] = (k == j) ? count_t'(37) : '0;
      check("single input");
    end
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < N_COUNTERS; k++) a[k] = count_t'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
