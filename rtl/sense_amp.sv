// Behavioural model of a receiver sense amplifier.
//
// One amplifier terminates each differential pair (S and P) and restores a
// full-swing level from the small difference between its two inputs. In this
// two-state model the pair is two logic levels: when they differ the output
// takes the value of the + input after SA_DLY_PS, and when they are equal
// (no differential signal) the output keeps its last value. OUT and OUT_N are
// the true and complement rails fed to the dual-rail XOR of the deserializer.
//
// The amplifier is an analog part: only its function, restoring a full-swing
// transition from each differential pair, is modelled here. The reset value
// matches the idle line state after reset.
module sense_amp
  import link_pkg::*;
#(
  parameter int unsigned SA_DLY_PS = SA_PS
) (
  input  logic rst_n,
  input  logic in_p,
  input  logic in_n,
  output logic out,
  output logic out_n
);
  timeunit 1ps; timeprecision 1ps;

  logic level;

  always_latch begin
    if (!rst_n)            level = 1'b0;
    else if (in_p != in_n) level = in_p;
  end

  assign #(SA_DLY_PS) out   = level;
  assign #(SA_DLY_PS) out_n = ~level;
endmodule
