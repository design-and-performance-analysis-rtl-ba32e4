// Three-level adder tree that sums the seven latched counts.
//
// Level 1: three W-bit adders add counts 0+1, 2+3 and 4+5; each sum keeps
//          its carry, giving W+1 bits.
// Level 2: two (W+1)-bit adders add the first two level-1 sums, and the
//          third level-1 sum plus count 6; each gives W+2 bits.
// Level 3: one (W+2)-bit adder gives the W+3-bit result (9 bits for W=6).
// Purely combinational; the result settles one adder-tree delay after the
// registers change. The level structure and widths follow the published
// design; which count joins which adder, and count 6 entering at level 2,
// are this design's choices.
`timescale 1ns/1ps
module adder_tree
  import agro_tdc_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic [W-1:0] a [N_COUNTERS],
  output logic [W+2:0] sum
);

  logic [W:0]   l1 [3];
  logic [W+1:0] l2 [2];

  always_comb begin
    // level 1: three W-bit adders, carry kept
    for (int k = 0; k < 3; k++)
      l1[k] = {1'b0, a[2*k]} + {1'b0, a[2*k+1]};
    // level 2: two (W+1)-bit adders
    l2[0] = {1'b0, l1[0]} + {1'b0, l1[1]};
    l2[1] = {1'b0, l1[2]} + {2'b00, a[6]};
    // level 3: one (W+2)-bit adder
    sum   = {1'b0, l2[0]} + {1'b0, l2[1]};
  end

endmodule
