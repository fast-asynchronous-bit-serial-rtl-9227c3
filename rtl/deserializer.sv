// Transition-driven deserializer with completion detection.
//
// Inputs are the full-swing S and P rails (true and complement) from the two
// sense amplifiers. A dual-rail XOR of S and P changes once per received bit
// and is the control transition of a chain of M transition latches (XL). The
// S value, through a short buffer, enters the first XL; each control
// transition travels down the chain and shifts the stored bits by one
// position, wave-pipelined, without any acknowledgement. A second chain of M
// XLs, fed with a constant 1 and driven by the same control, is the
// completion detection shift register: its last stage rises at the M-th
// transition of a word. That event closes the word latch on the data chain
// outputs, and, after a further delay, raises REQ to the decoder. The
// decoder's ACK clears the completion register, which lowers REQ and reopens
// the latch: a four-phase handshake with the decoder only, never with the
// transmitter.
//
// Bit 0 (sent first) ends up in the last XL, so WORD[i] = stage M-1-i.
//
// With RECORD_P = 1 a second XL chain, fed by the buffered P rail and driven
// by the same control, records the Phase bits as well (WORD_P), which a code
// other than LEDR would need. LEDR decoding uses only S, so the link leaves
// it off (RECORD_P = 0) and WORD_P is then zero.
//
// The XOR, the XL data chain, the buffered S input, the completion register
// with its constant-1 input and the output latch follow the transition-based
// pipeline; the clearing of the completion register by the decoder's ACK and
// the delay values are this design's choices. The delays (DBUF_DLY_PS < XOR
// + XL control delay, and the XL delays) are what makes the wave pipeline
// capture correctly; synthesis ignores them. The word latch is intentional.
// The path completion register -> REQ -> decoder ACK -> clear of the
// completion register is a closed loop by design: it is the self-timed
// four-phase handshake with the decoder, broken in time by the latch and
// acknowledge delays, and lint reports it as a combinational loop. The last
// stage's control outputs are left open, as the chain ends there.
//
// Timing: REQ rises about XOR + M*(XL control) + XL data + 2*LATCH delays
// after the transition of the last bit. The next word's first bit must not
// arrive before the four-phase cycle with the decoder has completed.
module deserializer
  import link_pkg::*;
#(
  parameter int unsigned M             = WORD_BITS,
  parameter int unsigned DBUF_DLY_PS   = DBUF_PS,
  parameter int unsigned LATCH_DLY_PS  = LATCH_PS,
  parameter bit          RECORD_P      = 1'b0
) (
  input  logic         rst_n,
  input  logic         s,
  input  logic         s_n,
  input  logic         p,
  input  logic         p_n,
  output logic         req,
  input  logic         ack,
  output logic [M-1:0] word,
  output logic [M-1:0] word_p
);
  timeunit 1ps; timeprecision 1ps;

  logic         x, x_n;
  logic         s_buf;
  logic [M:0]   cx, cx_n;      // control along the data chain
  logic [M:0]   kx, kx_n;      // control along the completion chain
  logic [M-1:0] q;             // data chain outputs
  logic [M-1:0] cq;            // completion chain outputs
  logic         clr_data, clr_done;
  logic         done, closed;
  logic [M-1:0] held;

  dr_xor u_xor (.a(s), .a_n(s_n), .b(p), .b_n(p_n), .x(x), .x_n(x_n));

  assign #(DBUF_DLY_PS) s_buf = s;

  assign clr_data = ~rst_n;
  assign clr_done = ~rst_n | ack;

  assign cx[0]   = x;
  assign cx_n[0] = x_n;
  assign kx[0]   = x;
  assign kx_n[0] = x_n;

  for (genvar k = 0; k < M; k++) begin : g_stage
    transition_latch u_data (
      .clr(clr_data), .x(cx[k]), .x_n(cx_n[k]),
      .d  (k == 0 ? s_buf : q[k == 0 ? 0 : k-1]),
      .y  (cx[k+1]), .y_n(cx_n[k+1]), .q(q[k])
    );
    transition_latch u_done (
      .clr(clr_done), .x(kx[k]), .x_n(kx_n[k]),
      .d  (k == 0 ? 1'b1 : cq[k == 0 ? 0 : k-1]),
      .y  (kx[k+1]), .y_n(kx_n[k+1]), .q(cq[k])
    );
  end

  assign done = cq[M-1];
  assign #(LATCH_DLY_PS) closed = done;

  // Word latch: follows the chain until the word is complete.
  always_latch begin
    if (!rst_n)       held = '0;
    else if (!closed) held = q;
  end

  for (genvar i = 0; i < M; i++) begin : g_word
    assign word[i] = held[M-1-i];
  end

  // Optional Phase-bit chain, built like the data chain.
  if (RECORD_P) begin : g_pchain
    logic         p_buf;
    logic [M:0]   px, px_n;
    logic [M-1:0] pq, held_p;

    assign #(DBUF_DLY_PS) p_buf = p;
    assign px[0]   = x;
    assign px_n[0] = x_n;

    for (genvar k = 0; k < M; k++) begin : g_pstage
      transition_latch u_phase (
        .clr(clr_data), .x(px[k]), .x_n(px_n[k]),
        .d  (k == 0 ? p_buf : pq[k == 0 ? 0 : k-1]),
        .y  (px[k+1]), .y_n(px_n[k+1]), .q(pq[k])
      );
    end

    always_latch begin
      if (!rst_n)       held_p = '0;
      else if (!closed) held_p = pq;
    end

    for (genvar i = 0; i < M; i++) begin : g_word_p
      assign word_p[i] = held_p[M-1-i];
    end
  end else begin : g_no_pchain
    assign word_p = '0;
  end

  assign #(LATCH_DLY_PS) req = closed;
endmodule
