// Asynchronous gated-ring-oscillator time-to-digital converter (top level).
//
// Converts the time between a START and a STOP event into a 9-bit code
// without any clock. START sets an S/R latch whose output EN lets the
// 13-stage gated ring oscillator run; STOP clears it, freezing the ring
// with its phase held. Seven 6-bit ripple counters count rising edges on
// seven ring stages while it runs. On the rising edge of STOP the seven
// counts are loaded into registers and the counters are cleared; a
// three-level adder tree sums the registers into the code.
//
// Because the ring is frozen rather than reset, the part of a period left
// over at the end of one measurement is counted in the next one: the sum
// of all codes follows the sum of all measured times to within about one
// code (first-order noise shaping of the quantization error).
//
// Interface: rst (active high) clears latch, counters and registers and
// restarts the ring. For a pulse-width measurement drive start with the
// pulse and stop with its inverse. code is valid from one adder-tree delay
// after the rising edge of stop until the next one. One code is about
// 7/3.5 us = 2 codes per microsecond; the largest code is 7*63 = 441.
//
// Timing rule: the registers load on the same STOP edge that clears the
// counters, so the counter-to-register path must be slower than the
// register hold time (the published design puts buffers in that path).
//
// The block diagram (latch, ring, counters, registers, adders), the sizes
// and the clearing of the counters between measurements follow the
// published design; the tap positions, the STOP-edge loading and rst are
// this design's choices.
`timescale 1ns/1ps
module agro_tdc
  import agro_tdc_pkg::*;
(
  input  logic  rst,
  input  logic  start,
  input  logic  stop,
  output logic  en,
  output code_t code
);

  logic [N_STAGES-1:0] node;
  count_t              cnt  [N_COUNTERS];
  count_t              held [N_COUNTERS];
  logic                cnt_clr;

  assign cnt_clr = stop | rst;

  sr_latch u_latch (.rst(rst), .s(start), .r(stop), .q(en));

  gro u_gro (.rst(rst), .en(en), .node(node));

  for (genvar k = 0; k < N_COUNTERS; k++) begin : g_cnt
    async_counter u_cnt (.clk(node[TAPS[k]]), .clr(cnt_clr), .q(cnt[k]));
  end

  count_capture u_cap (.rst(rst), .stop(stop), .cnt(cnt), .held(held));

  adder_tree u_add (.a(held), .sum(code));

endmodule
