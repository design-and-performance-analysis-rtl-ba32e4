// Gated ring oscillator (GRO) -- behavioural model, not synthesizable.
//
// The real block is a ring of 13 CMOS inverters, each with a PMOS switch to
// the supply and an NMOS switch to ground that are turned off when the
// enable is low. With the switches off no stage can change, so the ring
// freezes with its partly completed transition held on the stage nodes and
// resumes from exactly that phase when the enable returns. This held phase
// carries the quantization error of one measurement into the next, which
// is what gives the converter first-order noise shaping.
//
// Model: an odd inverter ring started with a single edge has one unstable
// stage at a time. The model keeps the index of that stage and how much of
// its delay TD_NS has elapsed. Time advances in steps of STEP_NS; a step
// counts only if en is high at its end, and the elapsed fraction is kept
// while en is low. When a stage's delay is used up its output toggles and
// the edge moves to the next stage. The ring period is 2*N*TD_NS.
//
// Timing: TD_NS = 134.6 ns gives 2*13*134.6 ns = 3.5 us, the published
// 285.7 kHz ring frequency. The stage count and frequency follow the
// published design; the stage delay is derived from them, and the step
// size, the start state and rst are this model's choices.
//
// Ports: rst (active high) puts the ring into its start state: stage
// outputs alternate 0,1,0,... so that stage 0 is the unstable one. en gates
// the ring. node[i] is the output of inverter i, whose input is node[i-1]
// (node[N-1] for stage 0).
`timescale 1ns/1ps
module gro #(
  parameter int unsigned N       = agro_tdc_pkg::N_STAGES,
  parameter real         TD_NS   = 134.6,
  parameter real         STEP_NS = 1.0
) (
  input  logic         rst,
  input  logic         en,
  output logic [N-1:0] node
);

  int unsigned edge_pos;   // index of the stage whose output is about to toggle
  real         progress;   // ns of its delay already spent while enabled

  task automatic start_state();
    for (int unsigned i = 0; i < N; i++) node[i] = i[0];
    edge_pos = 0;
    progress = 0.0;
  endtask

  initial begin
    start_state();
    forever begin
      if (rst) begin
        start_state();
        @(negedge rst);
      end else if (!en) begin
        @(posedge en or posedge rst);
      end else begin
        #(STEP_NS);
        if (en && !rst) begin
          progress += STEP_NS;
          if (progress >= TD_NS) begin
            progress -= TD_NS;
            node[edge_pos] = ~node[edge_pos];
            edge_pos = (edge_pos == N - 1) ? 0 : edge_pos + 1;
          end
        end
      end
    end
  end

endmodule
