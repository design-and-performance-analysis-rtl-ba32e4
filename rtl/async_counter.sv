// Ripple (asynchronous) up counter driven by one ring-oscillator output.
//
// Bit 0 toggles on every rising edge of clk; bit i toggles on every falling
// edge of bit i-1, so no common clock is needed: the counter runs only when
// the ring oscillates. An asynchronous active-high clr forces all bits to
// zero between measurements. The count wraps modulo 2**W.
// The published design names a 6-bit asynchronous up counter cleared
// between measurements; the toggle flip-flop chain is this design's choice
// of the simplest such counter. Each bit is settled one flip-flop delay
// after the bit below it changes.
`timescale 1ns/1ps
module async_counter #(
  parameter int unsigned W = agro_tdc_pkg::CNT_W
) (
  input  logic         clk,   // ring-oscillator tap
  input  logic         clr,   // asynchronous clear, active high
  output logic [W-1:0] q
);

  // One toggle flip-flop per bit: bit 0 on the rising edge of the tap,
  // every other bit on the falling edge of the bit below it.
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic b;
    if (i == 0) begin : g_first
      always_ff @(posedge clk or posedge clr) begin
        if (clr) b <= 1'b0;
        else     b <= ~b;
      end
    end else begin : g_next
      always_ff @(negedge g_bit[i-1].b or posedge clr) begin
        if (clr) b <= 1'b0;
        else     b <= ~b;
      end
    end
    assign q[i] = b;
  end

endmodule
