// End-to-end test of the asynchronous GRO time-to-digital converter at its
// default sizes (13-stage ring, seven 6-bit counters, 9-bit code).
//
// Pulse-width measurements: START follows the pulse and STOP its inverse.
//   * 5 kHz input: 200 us frames, widths 20..180 us in 20 us steps.
//   * 15 kHz input: 66.67 us frames, widths 6.5..58.5 us in 6.5 us steps.
//   * 9.68 kHz duty-cycle-modulated input: 64 frames of 103.3 us whose
//     width follows a sine between 10% and 90% of the frame.
// Checks after every measurement:
//   * the code equals a reference count of rising edges on the seven
//     tapped ring stages while EN was high (counted here, not by the DUT);
//   * linearity: |code - width * 7 / 3.4996 us| <= 2;
//   * noise shaping: the sum of all codes so far stays within 2 of the sum
//     of all widths times 7 / 3.4996 us, however many measurements are made
//     (the residual phase is carried, not lost);
//   * all counters read zero after STOP while the code is held;
//   * the transfer slope over the 5 kHz sweep is 2 codes/us within 2 codes.
// Mechanisms counted (each must occur): the ring resuming from a held,
// non-reset phase; counters cleared by STOP; a level-1 adder carry.
`timescale 1ns/1ps
module tb_agro_tdc;
  import agro_tdc_pkg::*;

  localparam real TD_NS     = 134.6;
  localparam real PERIOD_NS = 2.0 * N_STAGES * TD_NS;          // 3499.6 ns
  localparam real GAIN      = real'(N_COUNTERS) / PERIOD_NS;    // codes per ns

  logic  rst = 1'b0, start = 1'b0, stop = 1'b0;
  logic  en;
  code_t code;

  int checks = 0, failures = 0;
  int unsigned ref_count = 0;
  real cum_time = 0.0;
  longint cum_code = 0;
  int n_phase_held = 0, n_cleared = 0, n_carry = 0;

  agro_tdc dut (.rst(rst), .start(start), .stop(stop), .en(en), .code(code));

  // reference: rising edges of the tapped stages
  for (genvar k = 0; k < N_COUNTERS; k++) begin : g_ref
    always @(posedge dut.node[TAPS[k]]) ref_count++;
  end

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail_if(input bit bad, input string msg);
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // One pulse of width_ns inside a frame of frame_ns; returns the code.
  task automatic measure(input real width_ns, input real frame_ns, output int unsigned c);
    real ideal, cum_err;
    bit  carry;
    if (dut.u_gro.edge_pos != 0 || dut.u_gro.progress > 0.0) n_phase_held++;
    ref_count = 0;
    start = 1'b1; stop = 1'b0;
    #(width_ns + 0.5);   // half a step keeps STOP off the model's 1 ns grid
    start = 1'b0; stop = 1'b1;
    #5;
    c = code;
    ideal = width_ns * GAIN;
    cum_time += width_ns;
    cum_code += c;
    cum_err = real'(cum_code) - cum_time * GAIN;
    fail_if(c != ref_count, $sformatf("code %0d but %0d tap edges", c, ref_count));
    fail_if(real'(c) < ideal - 2.0 || real'(c) > ideal + 2.0,
            $sformatf("width %0.1f ns gave %0d, ideal %0.2f", width_ns, c, ideal));
    fail_if(cum_err < -2.0 || cum_err > 2.0,
            $sformatf("accumulated error %0.3f codes", cum_err));
    begin
      bit all_zero = 1'b1;
      for (int k = 0; k < N_COUNTERS; k++) if (dut.cnt[k] != '0) all_zero = 1'b0;
      fail_if(!all_zero, "counters not cleared by STOP");
      if (all_zero && c != 0) n_cleared++;
    end
    carry = 1'b0;
    for (int k = 0; k < 3; k++)
      if (int'(dut.held[2*k]) + int'(dut.held[2*k+1]) >= (1 << CNT_W)) carry = 1'b1;
    if (carry) n_carry++;
    #(frame_ns - width_ns - 5.5);
  endtask

  initial begin
    int unsigned c, c_first, c_last;
    #1 rst = 1'b1; stop = 1'b1;
    #20 rst = 1'b0;
    #10;
    // 5 kHz sweep
    for (int w = 20; w <= 180; w += 20) begin
      measure(w * 1000.0, 200_000.0, c);
      $display("5 kHz   width %3d us -> code %0d", w, c);
      if (w == 20) c_first = c;
      if (w == 180) c_last = c;
    end
    fail_if(c_last - c_first < 318 || c_last - c_first > 322,
            $sformatf("slope: %0d codes over 160 us", c_last - c_first));
    // 15 kHz sweep
    for (int s = 1; s <= 9; s++) begin
      measure(s * 6500.0, 1.0e6 / 15.0, c);
      $display("15 kHz  width %5.1f us -> code %0d", s * 6.5, c);
    end
    // 9.68 kHz duty-cycle-modulated input
    for (int n = 0; n < 64; n++) begin
      real frame, w;
      frame = 1.0e6 / 9.68;
      w = frame * (0.5 + 0.4 * $sin(2.0 * 3.14159265358979 * n / 16.0));
      w = real'(longint'(w));   // whole ns, so the ideal code is exact
      measure(w, frame, c);
    end
    $display("phase held %0d, counters cleared %0d, adder carries %0d",
             n_phase_held, n_cleared, n_carry);
    fail_if(n_phase_held == 0, "ring never resumed from a held phase");
    fail_if(n_cleared == 0, "counter clear never seen");
    fail_if(n_carry == 0, "no level-1 adder carry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
