// Dual-rail XOR that turns the two LEDR rails into the deserializer's
// control signal.
//
// In LEDR exactly one of S and P changes per bit, so S xor P changes once per
// bit: every transition of X (and its complement X_N) announces one new bit.
// Both output rails are formed from both input rails, as a dual-rail gate,
// after XOR_DLY_PS.
module dr_xor
  import link_pkg::*;
#(
  parameter int unsigned XOR_DLY_PS = XOR_PS
) (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic x,
  output logic x_n
);
  timeunit 1ps; timeprecision 1ps;

  assign #(XOR_DLY_PS) x   = (a & b_n) | (a_n & b);
  assign #(XOR_DLY_PS) x_n = (a & b)   | (a_n & b_n);
endmodule
