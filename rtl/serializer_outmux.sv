// Output-multiplexed serializer for one LEDR rail pair (S or P).
//
// Every encoded bit has its own differential line driver (M drivers per
// pair), and all driver outputs are tied to the same two wires. Driver i is
// enabled only while phase[i] is high and phase[i+1] is low, so exactly one
// driver is active during a bit window. Each enabled driver pulls the rail
// given by its bit: the true rail when the bit is 1, the complement rail when
// it is 0. The shared wires keep their level when no driver is enabled, which
// is what a non-return-to-zero LEDR line needs.
//
// One driver per bit, the phase-pair enable and the wired connection follow
// the output-multiplexed serializer. The wired connection of the drivers is
// modelled as an OR of the enabled drivers into a set/reset keeper; that and
// the complementary logic levels standing for the differential pair are this
// design's choices. The keeper is a level-sensitive latch by design.
//
// Timing: LINE changes in the same instant as the window of a new bit opens.
module serializer_outmux
  import link_pkg::*;
#(
  parameter int unsigned M = WORD_BITS
) (
  input  logic         rst_n,
  input  logic [M:0]   phase,
  input  logic [M-1:0] d,
  input  logic [M-1:0] d_n,
  output logic         line,
  output logic         line_n
);
  timeunit 1ps; timeprecision 1ps;

  logic [M-1:0] en;
  logic [M-1:0] pull_t;   // driver i pulls the true rail
  logic [M-1:0] pull_f;   // driver i pulls the complement rail

  // One enabled driver per bit.
  for (genvar i = 0; i < M; i++) begin : g_drv
    assign en[i]     = phase[i] & ~phase[i+1];
    assign pull_t[i] = en[i] & d[i];
    assign pull_f[i] = en[i] & d_n[i];
  end

  // Shared wires: the enabled driver sets the level, otherwise it is kept.
  always_latch begin
    if (!rst_n) begin
      line   = 1'b0;
      line_n = 1'b1;
    end else if (|pull_t) begin
      line   = 1'b1;
      line_n = 1'b0;
    end else if (|pull_f) begin
      line   = 1'b0;
      line_n = 1'b1;
    end
  end
endmodule
