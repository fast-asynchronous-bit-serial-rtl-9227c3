// Behavioural model of the serializer's multiphase clock generator.
//
// The generator is a tapped delay line: phase[0] follows GO, and each further
// tap follows the previous one after TAP_DLY_PS, the bit time. A rising GO
// therefore sends a rising wave across the M+1 phases; the serializer drives
// bit i while phase[i] is high and phase[i+1] is still low. The last tap,
// phase[M], marks the end of the word and is returned as DONE. A falling GO
// sends a falling wave, during which no bit window opens, and DONE falls at
// its end, completing a four-phase handshake with the encoder.
//
// The use of a delay-line based multiphase generator, and the enabling of
// driver i by phase i and phase i+1, follow the serializer description. The
// delay line is a timing element rather than logic, so it is modelled here
// with delays; its adjustment is the TAP_DLY_PS parameter. The number of taps
// (M+1) is this design's choice.
module multiphase_clock_gen
  import link_pkg::*;
#(
  parameter int unsigned M          = WORD_BITS,
  parameter int unsigned TAP_DLY_PS = TAP_PS
) (
  input  logic       go,
  output logic [M:0] phase,
  output logic       done
);
  timeunit 1ps; timeprecision 1ps;

  assign phase[0] = go;
  for (genvar i = 0; i < M; i++) begin : g_tap
    assign #(TAP_DLY_PS) phase[i+1] = phase[i];
  end
  assign done = phase[M];
endmodule
