// Input-multiplexed serializer for one LEDR rail pair (S or P).
//
// The M encoded bits and their complements are each selected by a multiplexer
// and the two selected values drive a single differential line driver, so the
// whole word needs only one driver per pair. Bit i is selected during its
// window win[i] = phase[i] & ~phase[i+1] from the multiphase clock
// generator. Between windows, and while the link is idle, the line keeps the
// last driven value: LEDR is a non-return-to-zero code and the receiver reacts
// only to transitions.
//
// Multiplexing before the driver and driving both rails from true and
// complement register bits follow the input-multiplexed serializer. The
// one-hot AND-OR multiplexer (rather than a tree) and the line keeper are
// this design's choices; the differential driver is modelled as complementary
// logic levels on LINE and LINE_N. The keeper is a level-sensitive latch by
// design (an asynchronous circuit with no clock).
//
// Timing: LINE changes in the same instant as the window of a new bit opens.
module serializer_inmux
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

  logic [M-1:0] win;
  logic         mux_t, mux_f, drive;

  assign win = phase[M-1:0] & ~phase[M:1];

  // Multiplexers in front of the driver.
  always_comb begin
    mux_t = 1'b0;
    mux_f = 1'b0;
    for (int unsigned i = 0; i < M; i++) begin
      mux_t |= win[i] & d[i];
      mux_f |= win[i] & d_n[i];
    end
  end
  assign drive = |win;

  // Differential driver with the line holding its level between bits.
  always_latch begin
    if (!rst_n) begin
      line   = 1'b0;
      line_n = 1'b1;
    end else if (drive) begin
      line   = mux_t;
      line_n = mux_f;
    end
  end
endmodule
