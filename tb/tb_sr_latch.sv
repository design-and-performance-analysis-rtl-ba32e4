// Self-checking test of the START/STOP set-reset latch.
// Walks through set, hold, reset, hold, both-high (reset wins) and the
// asynchronous clear, then 200 random input steps against a software
// model of the same truth table.
`timescale 1ns/1ps
module tb_sr_latch;
  logic rst = 1'b1, s = 1'b0, r = 1'b0, q;
  logic model;
  int checks = 0, failures = 0;

  sr_latch dut (.rst(rst), .s(s), .r(r), .q(q));

  task automatic check(input logic exp, input string what);
    #1;
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
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
    check(1'b0, "reset");
    rst = 1'b0;       check(1'b0, "idle after reset");
    s = 1'b1;         check(1'b1, "set");
    s = 1'b0;         check(1'b1, "hold set");
    r = 1'b1;         check(1'b0, "reset by STOP");
    r = 1'b0;         check(1'b0, "hold reset");
    s = 1'b1; r = 1'b1; check(1'b0, "both high: reset wins");
    r = 1'b0;         check(1'b1, "STOP released, START still high");
    rst = 1'b1;       check(1'b0, "async clear");
    rst = 1'b0; s = 1'b0; r = 1'b0;
    model = 1'b0;
    #1;
    for (int n = 0; n < 200; n++) begin
      s = 1'($urandom_range(0, 1));
      r = 1'($urandom_range(0, 1));
      if (r) model = 1'b0;
      else if (s) model = 1'b1;
      check(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
