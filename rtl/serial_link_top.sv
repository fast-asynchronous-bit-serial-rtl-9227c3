// Asynchronous bit-serial on-chip link, transmitter and receiver.
//
// A word of M bits written in the transmitter's clock domain is carried to
// the receiver's clock domain over only four wires: two differential pairs,
// State (S) and Phase (P), in two-phase LEDR code, with exactly one wire pair
// changing per bit and no acknowledgement travelling back on the wires.
//
//   transmit: tx_synchronizer -> ledr_encoder (S/P registers)
//             -> multiphase_clock_gen -> two serializers (S pair, P pair)
//   wires:    tx_s/tx_s_n/tx_p/tx_p_n out, rx_s/rx_s_n/rx_p/rx_p_n in
//   receive:  two sense_amps -> deserializer (dual-rail XOR, transition
//             latch chain, completion detection, word latch)
//             -> ledr_decoder -> rx_synchronizer
//
// The deserializer's optional Phase-bit chain is off here (LEDR decoding
// needs only the State bits), so word_p is unused.
//
// Each stage talks to its neighbour with REQ/ACK; only the wires run open
// loop. The wires themselves are not part of this module: connect tx_* to
// rx_* directly, or through a model of the interconnect or of routers.
//
// SER_OUTMUX selects the serializer: 0 for the input-multiplexed form (one
// driver per pair, the default), 1 for the output-multiplexed form (one driver
// per bit). Both produce the same line signals.
//
// Timing: a word occupies the wires for M bit times (TAP_DLY_PS each). The
// transmit synchronizer accepts a new word only after the previous
// serializer wave has returned, so words are spaced by the four-phase cycle
// through the transmit synchronizer (several tx_clk cycles). The receiver
// must take words at least at that rate: rx_req is a one-cycle strobe and
// there is no back-pressure.
module serial_link_top
  import link_pkg::*;
#(
  parameter int unsigned M          = WORD_BITS,
  parameter bit          SER_OUTMUX = 1'b0,
  parameter int unsigned TAP_DLY_PS = TAP_PS
) (
  input  logic         rst_n,
  // Transmitting module (tx_clk domain)
  input  logic         tx_clk,
  input  logic         tx_send,
  input  logic [M-1:0] tx_data,
  output logic         tx_ack,
  // Serial wires, transmit end
  output logic         tx_s,
  output logic         tx_s_n,
  output logic         tx_p,
  output logic         tx_p_n,
  // Serial wires, receive end
  input  logic         rx_s,
  input  logic         rx_s_n,
  input  logic         rx_p,
  input  logic         rx_p_n,
  // Receiving module (rx_clk domain)
  input  logic         rx_clk,
  output logic         rx_req,
  output logic [M-1:0] rx_data
);
  timeunit 1ps; timeprecision 1ps;

  // ---------------- transmitter ----------------
  logic         req_e, ack_e, go, done;
  logic [M-1:0] data_e;
  logic [M-1:0] s_reg, s_reg_n, p_reg, p_reg_n;
  logic [M:0]   phase;

  tx_synchronizer #(.M(M)) u_tx_sync (
    .clk(tx_clk), .rst_n(rst_n),
    .send(tx_send), .data(tx_data), .ack(tx_ack),
    .req_e(req_e), .data_e(data_e), .ack_e(ack_e)
  );

  ledr_encoder #(.M(M)) u_enc (
    .rst_n(rst_n),
    .req(req_e), .data(data_e), .ack(ack_e),
    .go(go), .done(done),
    .s(s_reg), .s_n(s_reg_n), .p(p_reg), .p_n(p_reg_n)
  );

  multiphase_clock_gen #(.M(M), .TAP_DLY_PS(TAP_DLY_PS)) u_clkgen (
    .go(go), .phase(phase), .done(done)
  );

  if (SER_OUTMUX) begin : g_outmux
    serializer_outmux #(.M(M)) u_ser_s (
      .rst_n(rst_n), .phase(phase), .d(s_reg), .d_n(s_reg_n),
      .line(tx_s), .line_n(tx_s_n)
    );
    serializer_outmux #(.M(M)) u_ser_p (
      .rst_n(rst_n), .phase(phase), .d(p_reg), .d_n(p_reg_n),
      .line(tx_p), .line_n(tx_p_n)
    );
  end else begin : g_inmux
    serializer_inmux #(.M(M)) u_ser_s (
      .rst_n(rst_n), .phase(phase), .d(s_reg), .d_n(s_reg_n),
      .line(tx_s), .line_n(tx_s_n)
    );
    serializer_inmux #(.M(M)) u_ser_p (
      .rst_n(rst_n), .phase(phase), .d(p_reg), .d_n(p_reg_n),
      .line(tx_p), .line_n(tx_p_n)
    );
  end

  // ---------------- receiver ----------------
  logic         sa_s, sa_s_n, sa_p, sa_p_n;
  logic         req_d, ack_d, req_s, ack_s;
  logic [M-1:0] word_s, word_p, data_s;

  sense_amp u_sa_s (.rst_n(rst_n), .in_p(rx_s), .in_n(rx_s_n), .out(sa_s), .out_n(sa_s_n));
  sense_amp u_sa_p (.rst_n(rst_n), .in_p(rx_p), .in_n(rx_p_n), .out(sa_p), .out_n(sa_p_n));

  deserializer #(.M(M)) u_deser (
    .rst_n(rst_n),
    .s(sa_s), .s_n(sa_s_n), .p(sa_p), .p_n(sa_p_n),
    .req(req_d), .ack(ack_d), .word(word_s), .word_p(word_p)
  );

  ledr_decoder #(.M(M)) u_dec (
    .rst_n(rst_n),
    .req_d(req_d), .word_s(word_s), .ack_d(ack_d),
    .req_s(req_s), .data(data_s), .ack_s(ack_s)
  );

  rx_synchronizer #(.M(M)) u_rx_sync (
    .clk(rx_clk), .rst_n(rst_n),
    .req_s(req_s), .data_s(data_s), .ack_s(ack_s),
    .req(rx_req), .data(rx_data)
  );
endmodule
