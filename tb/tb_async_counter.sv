// Self-checking test of the ripple up counter.
// Applies a clear, then 150 rising edges on the tap (more than two wraps of
// the 6-bit count) with random spacing, comparing the count after each edge
// with a software count modulo 64. Also checks that clear works mid-count
// and that the count holds while the tap is idle.
`timescale 1ns/1ps
module tb_async_counter;
  localparam int unsigned W = 6;
  logic         clk = 1'b0, clr = 1'b0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  async_counter dut (.clk(clk), .clr(clr), .q(q));

  task automatic check(input int unsigned exp, input string what);
    checks++;
    if (q !== exp[W-1:0]) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, exp[W-1:0]);
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
    #1 clr = 1'b1;
    #10 check(0, "held in clear");
    clr = 1'b0;
    #10;
    for (int n = 1; n <= 150; n++) begin
      clk = 1'b1; #(5 + $urandom_range(0, 20));
      clk = 1'b0; #(5 + $urandom_range(0, 20));
      model++;
      check(model, "count");
    end
    #200 check(model, "hold while idle");
    clr = 1'b1; #5 check(0, "clear mid-count");
    clk = 1'b1; #5 check(0, "edges ignored in clear");
    clk = 1'b0; clr = 1'b0; #5;
    for (int n = 1; n <= 5; n++) begin
      clk = 1'b1; #7 clk = 1'b0; #7;
    end
    check(5, "count after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
