// Shared constants of the asynchronous bit-serial link.
//
// The link moves WORD_BITS-bit words over two differential pairs (State S and
// Phase P) using two-phase Level Encoded Dual Rail (LEDR) signalling. The word
// width of 4 is the width of the serializer example; the delay values below
// are this design's own choice and only set the relative timing of the
// self-timed parts in simulation (synthesis ignores them). They are in
// picoseconds.
package link_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Word width M (bits serialized per word).
  parameter int unsigned WORD_BITS = 4;

  // Serializer multiphase clock generator: one delay-line tap = one bit time.
  parameter int unsigned TAP_PS    = 100;
  // Matched delay in the encoder between loading the S/P registers and
  // starting the serializer wave.
  parameter int unsigned ENC_PS    = 40;
  // Sense amplifier resolution delay.
  parameter int unsigned SA_PS     = 20;
  // Dual-rail XOR delay and data-path buffer delay at the deserializer input.
  // The data buffer must be faster than XOR + latch control buffer so that
  // the first transition latch sees the new bit before it closes.
  parameter int unsigned XOR_PS    = 15;
  parameter int unsigned DBUF_PS   = 10;
  // Transition latch: control buffer X->W, W->Y, and data D->Q delay.
  // Wave-pipelining needs W_PS + Y_PS < Q_PS so that each stage closes
  // before its predecessor's output moves.
  parameter int unsigned XL_W_PS   = 10;
  parameter int unsigned XL_Y_PS   = 10;
  parameter int unsigned XL_Q_PS   = 30;
  // Word latch close delay after completion detection.
  parameter int unsigned LATCH_PS  = 20;

  // Four-phase handshake state of the transmit synchronizer.
  typedef enum logic [1:0] {
    TX_IDLE  = 2'd0,   // waiting for SEND
    TX_REQ   = 2'd1,   // REQ high, waiting for encoder ACK to rise
    TX_REL   = 2'd2    // REQ low, waiting for encoder ACK to fall
  } tx_state_e;
endpackage
