// Shared sizes of the asynchronous gated-ring-oscillator TDC.
//
// The converter measures the width of a pulse by letting a 13-stage gated
// ring oscillator (GRO) run only while the pulse is high and counting the
// rising edges of seven of its stage outputs with seven 6-bit ripple
// counters. The seven counts are captured in registers and summed by a
// three-level adder tree into a 9-bit code.
//
// The stage count, counter width, output width and the three adder levels
// follow the published design. The number of counters (seven) is inferred
// from the adder tree and from the published transfer slope of about two
// codes per microsecond at a 285.7 kHz ring frequency. Which seven stages
// are tapped is this design's own choice (see TAPS below).
`timescale 1ns/1ps
package agro_tdc_pkg;

  localparam int unsigned N_STAGES   = 13;  // inverters in the ring
  localparam int unsigned N_COUNTERS = 7;   // counters, one per tapped stage
  localparam int unsigned CNT_W      = 6;   // width of each ripple counter
  localparam int unsigned OUT_W      = 9;   // width of the summed code

  typedef logic [CNT_W-1:0] count_t;
  typedef logic [OUT_W-1:0] code_t;

  // Tapped stages. In a ring of 13 inverters started with its edge at stage 0,
  // stage i rises (i+1) stage delays after the start when i is even and (i+14)
  // delays after it when i is odd, modulo the 26-delay period. Taps
  // 0,4,8,12,3,7,11 rise at 1,5,9,13,17,21,25 delays: spread evenly over the
  // period, so each tap adds about one seventh of a period of resolution.
  typedef int unsigned tap_list_t [N_COUNTERS];
  localparam tap_list_t TAPS = '{0, 3, 4, 7, 8, 11, 12};

endpackage
