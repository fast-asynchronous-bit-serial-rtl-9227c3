// LEDR decoder: turns a received word of State bits back into data and hands
// it to the receive synchronizer.
//
// In LEDR the State bit equals the data bit, so decoding the S word captured
// by the deserializer is a copy; the Phase bits only carry timing and have
// already been used to detect the bit transitions. The decoder stores the
// word in its own register on the rising edge of the deserializer's REQ and
// acknowledges after ACK_DLY_PS, which lets the deserializer restart its
// completion detection while the decoder still holds the word.
//
// Towards the receive synchronizer the decoder uses a two-phase handshake:
// REQ_S toggles once per new word and ACK_S toggles back when the word has
// been taken. A word arriving while REQ_S != ACK_S would overwrite one not yet
// taken; the link has no flow control on the wires, so the receive clock must
// keep up with the word rate, and an assertion flags any overrun.
//
// The decoder's place between deserializer and synchronizer with REQ/ACK on
// both sides follows the link architecture; the register, the two-phase
// protocol and the delay are this design's choices.
module ledr_decoder
  import link_pkg::*;
#(
  parameter int unsigned M          = WORD_BITS,
  parameter int unsigned ACK_DLY_PS = LATCH_PS
) (
  input  logic         rst_n,
  // From the deserializer (four-phase)
  input  logic         req_d,
  input  logic [M-1:0] word_s,
  output logic         ack_d,
  // To the receive synchronizer (two-phase)
  output logic         req_s,
  output logic [M-1:0] data,
  input  logic         ack_s
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge req_d or negedge rst_n) begin
    if (!rst_n) begin
      data  <= '0;
      req_s <= 1'b0;
    end else begin
      data  <= word_s;     // LEDR: data bit = State bit
      req_s <= ~req_s;
    end
  end

  assign #(ACK_DLY_PS) ack_d = req_d;

  // No overrun: the previous word must have been taken.
  property p_no_overrun;
    @(posedge req_d) disable iff (!rst_n) req_s == ack_s;
  endproperty
  a_no_overrun: assert property (p_no_overrun);
endmodule
