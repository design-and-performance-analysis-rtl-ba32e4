// Noise-shaping test of the asynchronous GRO TDC at its default sizes.
//
// Applies 8192 frames of a 9.68 kHz duty-cycle-modulated pulse: the pulse
// width follows a sine (17 cycles over the record) between 15% and 85% of
// the 103.3 us frame. For every frame the quantization error
// e[n] = code[n] - width[n] * 7 / 3.4996 us is recorded.
// Checks:
//   * every code equals a reference count of tapped-stage rising edges;
//   * the running sum of e[n] stays within 2 codes over all 8192 frames
//     (the error of one frame is paid back in the next);
//   * the error spectrum is first-order shaped: the mean power of the
//     lowest 32 DFT bins is at least 20 times below that of the 32 bins
//     just under half the frame rate.
`timescale 1ns/1ps
module tb_agro_tdc_fft;
  import agro_tdc_pkg::*;

  localparam int  NPTS      = 8192;
  localparam int  NBINS     = 32;
  localparam real TD_NS     = 134.6;
  localparam real PERIOD_NS = 2.0 * N_STAGES * TD_NS;
  localparam real GAIN      = real'(N_COUNTERS) / PERIOD_NS;
  localparam real FRAME_NS  = 1.0e6 / 9.68;
  localparam real PI        = 3.14159265358979;

  logic  rst = 1'b0, start = 1'b0, stop = 1'b0;
  logic  en;
  code_t code;

  int checks = 0, failures = 0;
  int unsigned ref_count = 0;
  real err [NPTS];

  agro_tdc dut (.rst(rst), .start(start), .stop(stop), .en(en), .code(code));

  for (genvar k = 0; k < N_COUNTERS; k++) begin : g_ref
    always @(posedge dut.node[TAPS[k]]) ref_count++;
  end

  initial begin : watchdog
    #900ms;
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

  function automatic real bin_power(input int b);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < NPTS; n++) begin
      re += err[n] * $cos(2.0 * PI * b * n / NPTS);
      im -= err[n] * $sin(2.0 * PI * b * n / NPTS);
    end
    return (re * re + im * im) / NPTS;
  endfunction

  initial begin
    real cum_err, max_cum, p_low, p_high;
    int  code_errors;
    cum_err = 0.0; max_cum = 0.0; p_low = 0.0; p_high = 0.0;
    code_errors = 0;
    #1 rst = 1'b1; stop = 1'b1;
    #20 rst = 1'b0;
    #10;
    for (int n = 0; n < NPTS; n++) begin
      real w;
      w = real'(longint'(FRAME_NS * (0.5 + 0.35 * $sin(2.0 * PI * 17.0 * n / NPTS))));
      ref_count = 0;
      start = 1'b1; stop = 1'b0;
      #(w + 0.5);
      start = 1'b0; stop = 1'b1;
      #5;
      checks++;
      if (code != ref_count) begin
        failures++;
        code_errors++;
        if (code_errors < 5) $display("FAIL frame %0d: code %0d, %0d edges", n, code, ref_count);
      end
      err[n] = real'(code) - w * GAIN;
      cum_err += err[n];
      if (cum_err > max_cum) max_cum = cum_err;
      if (-cum_err > max_cum) max_cum = -cum_err;
      #(FRAME_NS - w - 5.5);
    end
    if (code_errors != 0) $display("FAIL %0d codes differ from the edge count", code_errors);
    fail_if(max_cum > 2.0, $sformatf("running error sum reached %0.3f codes", max_cum));
    for (int b = 1; b <= NBINS; b++) p_low += bin_power(b);
    for (int b = NPTS / 2 - NBINS; b < NPTS / 2; b++) p_high += bin_power(b);
    p_low /= NBINS;
    p_high /= NBINS;
    $display("running error sum max %0.3f; error power low band %0.3g, high band %0.3g",
             max_cum, p_low, p_high);
    fail_if(p_high < 20.0 * p_low, "quantization error not first-order shaped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
