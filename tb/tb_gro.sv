// Self-checking test of the gated ring oscillator model.
// 1. Free run: ten periods of stage 0 must take 10 * 26 * 134.6 ns
//    (285.7 kHz), within two model steps.
// 2. The ring keeps a single travelling edge: exactly one stage has an
//    output equal to its input, checked at every node change.
// 3. Gating: over 300 random enable/disable intervals, no node may change
//    while en is low, and the number of stage toggles must equal the total
//    enabled time divided by the stage delay (within one toggle), which
//    holds only if the partly completed delay is kept across gaps.
`timescale 1ns/1ps
module tb_gro;
  localparam int unsigned N  = 13;
  localparam real         TD = 134.6;
  logic         rst = 1'b0, en = 1'b0;
  logic [N-1:0] node;
  int checks = 0, failures = 0;
  longint toggles = 0;
  longint enabled_ns = 0;

  gro dut (.rst(rst), .en(en), .node(node));

  function automatic int unstable(input logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++)
      if (v[i] == v[(i + N - 1) % N]) c++;
    return c;
  endfunction

  always @(node) if ($time > 0) begin
    checks++;
    if (unstable(node) != 1) begin
      failures++;
      $display("FAIL %0t: %0d unstable stages", $time, unstable(node));
    end
    if (!en && !rst) begin
      failures++;
      $display("FAIL %0t: node changed while gated", $time);
    end
    toggles++;
  end

  initial begin : watchdog
    #50ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    longint expect_toggles;
    #10 rst = 1'b0;
    #10 en = 1'b1;
    @(posedge node[0]) t0 = $realtime;
    repeat (10) @(posedge node[0]);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) < 10 * 26 * TD - 2.0 || (t1 - t0) > 10 * 26 * TD + 2.0) begin
      failures++;
      $display("FAIL ten periods took %0f ns, expected %0f", t1 - t0, 10 * 26 * TD);
    end
    // gating
    #0.5 en = 1'b0;
    #0.5 rst = 1'b1;
    #10 rst = 1'b0;
    toggles = 0;
    #0.5;
    for (int n = 0; n < 300; n++) begin
      int unsigned on_ns, off_ns;
      on_ns  = $urandom_range(20, 700);
      off_ns = $urandom_range(10, 300);
      en = 1'b1;
      #(real'(on_ns) + 0.25);
      en = 1'b0;
      enabled_ns += on_ns;
      #(real'(off_ns) - 0.25);
    end
    expect_toggles = longint'($floor(real'(enabled_ns) / TD));
    checks++;
    if (toggles < expect_toggles - 1 || toggles > expect_toggles + 1) begin
      failures++;
      $display("FAIL %0d toggles in %0d enabled ns, expected %0d", toggles, enabled_ns,
               expect_toggles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
