// Receive synchronizer: brings decoded words into the receiver's clock
// domain.
//
// The decoder signals a new word by toggling REQ_S (two-phase) and holds the
// word stable until the toggle is answered. REQ_S passes through a two-flop
// synchronizer; when the synchronized value differs from ACK_S, the word is
// registered onto DATA, REQ pulses high for one cycle and ACK_S toggles to
// answer the decoder. The receiving module has no ACK: it must take every
// REQ pulse.
//
// The synchronizer at the receiving end and its CLK/REQ/DATA ports follow the
// link architecture; the low-latency synchronizer circuit is not specified,
// so this is a plain two-flop design.
//
// Timing: REQ rises three clock edges after REQ_S toggles (two synchronizer
// flops and the output register).
module rx_synchronizer
  import link_pkg::*;
#(
  parameter int unsigned M = WORD_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  // From the decoder (two-phase)
  input  logic         req_s,
  input  logic [M-1:0] data_s,
  output logic         ack_s,
  // Receiver side (clock domain)
  output logic         req,
  output logic [M-1:0] data
);
  timeunit 1ps; timeprecision 1ps;

  logic [1:0] req_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync <= '0;
      ack_s    <= 1'b0;
      req      <= 1'b0;
      data     <= '0;
    end else begin
      req_sync <= {req_sync[0], req_s};
      req      <= 1'b0;
      if (req_sync[1] != ack_s) begin
        data  <= data_s;
        req   <= 1'b1;
        ack_s <= req_sync[1];
      end
    end
  end
endmodule
