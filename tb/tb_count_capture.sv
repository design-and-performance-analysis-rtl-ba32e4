// Self-checking test of the count register bank.
// Drives random counts, pulses STOP and checks that every register holds
// the count present at the rising edge, that it ignores later changes of
// the counts until the next edge, and that rst clears it.
`timescale 1ns/1ps
module tb_count_capture;
  import agro_tdc_pkg::*;
  logic   rst = 1'b0, stop = 1'b0;
  count_t cnt  [N_COUNTERS];
  count_t held [N_COUNTERS];
  count_t exp  [N_COUNTERS];
  int checks = 0, failures = 0;

  count_capture dut (.rst(rst), .stop(stop), .cnt(cnt), .held(held));

  task automatic check_all(input string what);
    for (int k = 0; k < N_COUNTERS; k++) begin
      checks++;
      if (held[k] !== exp[k]) begin
        failures++;
        $display("FAIL %s: reg %0d = %0d expected %0d", what, k, held[k], exp[k]);
      end
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N_COUNTERS; k++) begin
      cnt[k] = count_t'($urandom);
      exp[k] = '0;
    end
    #1 rst = 1'b1;
    #5 check_all("after reset");
    rst = 1'b0;
    for (int n = 0; n < 50; n++) begin
      for (int k = 0; k < N_COUNTERS; k++) cnt[k] = count_t'($urandom);
      #5 stop = 1'b1;
      for (int k = 0; k < N_COUNTERS; k++) exp[k] = cnt[k];
      #1;
      // the counts change right after the edge (the counters are cleared)
      for (int k = 0; k < N_COUNTERS; k++) cnt[k] = count_t'($urandom);
      #5 check_all("captured");
      stop = 1'b0;
      #5 check_all("held until next STOP");
    end
    rst = 1'b1;
    for (int k = 0; k < N_COUNTERS; k++) exp[k] = '0;
    #1 check_all("cleared by rst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
