// Bank of count registers, one per ring-oscillator counter.
//
// On the rising edge of STOP every register takes the value its counter
// holds at that moment. STOP also clears the counters, so the registers
// keep the result of the measurement that just ended while the counters
// start from zero for the next one. The values stay until the next STOP.
// rst clears the registers asynchronously.
// One 6-bit register per counter, loaded before the counters are cleared,
// follows the published design; the use of the STOP edge as the load strobe
// follows its block diagram, in which STOP clocks the output register.
`timescale 1ns/1ps
module count_capture
  import agro_tdc_pkg::*;
#(
  parameter int unsigned N = N_COUNTERS,
  parameter int unsigned W = CNT_W
) (
  input  logic         rst,          // asynchronous clear, active high
  input  logic         stop,         // load strobe (rising edge)
  input  logic [W-1:0] cnt [N],      // counter outputs
  output logic [W-1:0] held [N]      // latched counts
);

  always_ff @(posedge stop or posedge rst) begin
    if (rst) begin
      for (int k = 0; k < N; k++) held[k] <= '0;
    end else begin
      for (int k = 0; k < N; k++) held[k] <= cnt[k];
    end
  end

endmodule
