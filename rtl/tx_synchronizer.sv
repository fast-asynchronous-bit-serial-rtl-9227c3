// Transmit synchronizer: boundary between the sender's clock domain and the
// self-timed encoder/serializer.
//
// The sender presents DATA with SEND high and holds both until ACK (a one
// cycle pulse) says the word has been taken. The word is registered and handed
// to the encoder with a four-phase REQ/ACK handshake: REQ rises with the word,
// the encoder's ACK rises when the word has been serialized, REQ falls, ACK
// falls, and only then is the next word accepted. The encoder's ACK is
// asynchronous and is brought into the clock domain by a two-flop
// synchronizer.
//
// The link's use of a synchronizer at each end and its REQ/ACK/SEND/DATA
// ports follow the link architecture; the low-latency synchronizer circuit
// itself is not specified there, so this is a plain two-flop design (2 cycles
// of synchronization latency per ACK edge).
//
// The transmitter is a pipeline: once the encoder's ACK has risen, the
// encoder holds the word in its own registers, so the next word is accepted
// into DATA_E while the handshake returns to zero, and REQ rises for it as
// soon as the encoder's ACK has fallen.
//
// Timing: a word is accepted in the cycle SEND is seen (ACK is high the cycle
// after). From idle, REQ rises at the same edge. A word accepted during the
// return to zero gets its REQ at the edge where the synchronized ACK is low.
module tx_synchronizer
  import link_pkg::*;
#(
  parameter int unsigned M = WORD_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  // Sender side (clock domain)
  input  logic         send,
  input  logic [M-1:0] data,
  output logic         ack,
  // Encoder side (four-phase handshake)
  output logic         req_e,
  output logic [M-1:0] data_e,
  input  logic         ack_e
);
  timeunit 1ps; timeprecision 1ps;

  logic [1:0] ack_sync;
  logic       pending;   // a word is waiting in data_e for the next REQ
  tx_state_e  state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_sync <= '0;
    else        ack_sync <= {ack_sync[0], ack_e};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= TX_IDLE;
      req_e   <= 1'b0;
      data_e  <= '0;
      ack     <= 1'b0;
      pending <= 1'b0;
    end else begin
      ack <= 1'b0;
      unique case (state)
        TX_IDLE: if (send && !ack_sync[1]) begin
          data_e <= data;
          req_e  <= 1'b1;
          ack    <= 1'b1;
          state  <= TX_REQ;
        end
        TX_REQ: if (ack_sync[1]) begin
          req_e <= 1'b0;
          state <= TX_REL;
        end
        // The encoder has registered the word: the next one may be taken
        // while its handshake returns to zero.
        TX_REL: begin
          if (send && !pending && !ack) begin
            data_e  <= data;
            ack     <= 1'b1;
            pending <= 1'b1;
          end
          if (!ack_sync[1]) begin
            if (pending || (send && !ack)) begin
              req_e   <= 1'b1;
              pending <= 1'b0;
              state   <= TX_REQ;
            end else begin
              state <= TX_IDLE;
            end
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  // Four-phase rule: the word stays stable while REQ is high.
  property p_data_stable;
    @(posedge clk) disable iff (!rst_n) (req_e && $past(req_e)) |-> $stable(data_e);
  endproperty
  a_data_stable: assert property (p_data_stable);
endmodule
