// Transition latch (XL): one stage of the transition-driven deserializer.
//
// The stage stores D on every transition, rising or falling, of its dual-rail
// control X/X_N, and passes the control on to the next stage as Y/Y_N. The
// control is buffered once into the internal W/W_N and once more onto Y/Y_N.
// Two level-sensitive latches sit side by side on the data path: one holds
// while W is high, the other while W is low, and Q is taken from the one that
// is holding. Q is therefore the value D had at the most recent transition of
// W: a double-edge storage element with no clock.
//
// The buffered control path, the two parallel latches selected by W and the
// X/Y/D/Q ports follow the transition latch circuit. The delays are this
// design's choice and are what the wave-pipelined chain relies on:
// W_DLY_PS + Y_DLY_PS (control to the next stage's W) must be shorter than
// Q_DLY_PS (W to Q), so that the next stage closes on the old Q. Synthesis
// ignores the delays; in silicon they must be met by sizing. The reset input
// (CLR, active high) empties both latches; the completion detection register
// uses it to restart for the next word. The latches are intentional.
module transition_latch
  import link_pkg::*;
#(
  parameter int unsigned W_DLY_PS = XL_W_PS,
  parameter int unsigned Y_DLY_PS = XL_Y_PS,
  parameter int unsigned Q_DLY_PS = XL_Q_PS
) (
  input  logic clr,
  input  logic x,
  input  logic x_n,
  input  logic d,
  output logic y,
  output logic y_n,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  logic w, w_n;
  logic lat_hi;   // holds while W is high (transparent while W is low)
  logic lat_lo;   // holds while W is low  (transparent while W is high)

  assign #(W_DLY_PS) w   = x;
  assign #(W_DLY_PS) w_n = x_n;
  assign #(Y_DLY_PS) y   = w;
  assign #(Y_DLY_PS) y_n = w_n;

  always_latch begin
    if (clr)     lat_hi = 1'b0;
    else if (w_n) lat_hi = d;
  end

  always_latch begin
    if (clr)    lat_lo = 1'b0;
    else if (w) lat_lo = d;
  end

  assign #(Q_DLY_PS) q = w ? lat_hi : lat_lo;
endmodule
