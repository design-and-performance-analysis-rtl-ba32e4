// Set/reset latch that gates the ring oscillator.
//
// START sets the enable and STOP clears it, so the enable is high exactly
// for the interval being measured. The latch is level sensitive: with both
// inputs low it holds; with both high, STOP (reset) wins, so a STOP that
// overlaps a START always ends the interval. rst clears it at power-up.
// The S/R element is taken from the published block diagram; the reset
// priority and the power-up clear are this design's choices.
`timescale 1ns/1ps
module sr_latch (
  input  logic rst,    // asynchronous clear, active high
  input  logic s,      // START
  input  logic r,      // STOP
  output logic q       // EN for the gated ring oscillator
);

  always_latch begin
    if (rst || r)
      q = 1'b0;
    else if (s)
      q = 1'b1;
  end

endmodule
