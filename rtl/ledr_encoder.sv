// LEDR encoder with its four output registers (S, not-S, P, not-P).
//
// Level Encoded Dual Rail: for the serial bit sequence B(i) the State bit is
// S(i) = B(i), and the Phase bit P(i+1) is the inverse of P(i) when
// S(i+1) = S(i), otherwise equal to P(i). Thus exactly one of the two lines
// changes for every bit sent and S xor P alternates from bit to bit. The
// encoding is done in parallel on a whole M-bit word; bit 0 is serialized
// first. The rule is chained across words: the first bit of a word is encoded
// against the last S/P bit of the previous word, so the line never misses a
// transition at a word boundary. After reset the line state is S = 0, P = 0,
// which plays the role of the initial P(0) = 0 bit and carries no data.
//
// Handshake: a four-phase REQ/ACK with the synchronizer on one side and
// GO/DONE with the serializer (multiphase clock generator) on the other. The
// registers load on the rising edge of REQ. GO follows REQ after a matched
// delay ENC_DLY_PS that covers the register load, so the serializer wave
// starts with the new word in place; ACK is the serializer's DONE. The
// encoder, registers and handshake order follow the transmitter architecture;
// the loading on REQ and the matched delay are this design's choice. The
// delay is ignored by synthesis and must be met by a delay cell.
module ledr_encoder
  import link_pkg::*;
#(
  parameter int unsigned M          = WORD_BITS,
  parameter int unsigned ENC_DLY_PS = ENC_PS
) (
  input  logic         rst_n,
  // From the transmit synchronizer
  input  logic         req,
  input  logic [M-1:0] data,
  output logic         ack,
  // To the serializers
  output logic         go,
  input  logic         done,
  output logic [M-1:0] s,
  output logic [M-1:0] s_n,
  output logic [M-1:0] p,
  output logic [M-1:0] p_n
);
  timeunit 1ps; timeprecision 1ps;

  logic [M-1:0] p_next;

  // Phase bits of the next word, chained from the last bit now on the line.
  always_comb begin
    logic s_prev, p_prev;
    s_prev = s[M-1];
    p_prev = p[M-1];
    for (int unsigned i = 0; i < M; i++) begin
      p_next[i] = (data[i] == s_prev) ? ~p_prev : p_prev;
      s_prev    = data[i];
      p_prev    = p_next[i];
    end
  end

  always_ff @(posedge req or negedge rst_n) begin
    if (!rst_n) begin
      s   <= '0;
      s_n <= '1;
      p   <= '0;
      p_n <= '1;
    end else begin
      s   <= data;
      s_n <= ~data;
      p   <= p_next;
      p_n <= ~p_next;
    end
  end

  assign #(ENC_DLY_PS) go = req & rst_n;
  assign ack = done;
endmodule
