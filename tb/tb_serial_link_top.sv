// End-to-end test of the serial link at its default parameters
// (input-multiplexed serializers, 4-bit words).
//
// A sender in the tx_clk domain pushes random words (plus the corner words
// all-zero, all-one and alternating patterns) through the link; the serial
// wires are connected transmit to receive through a fixed wire delay; the
// receiving side in the rx_clk domain, running at a different clock, collects
// rx_req strobes. The test checks:
//   - every word arrives, in order and unchanged;
//   - per LEDR, every bit on the wires changes exactly one of the two pairs,
//     each pair's two wires stay complementary, and a word makes exactly M
//     bit transitions during a serializer wave of M bit times;
//   - the word-to-word spacing, and the latency from acceptance to delivery,
//     stay within bounds.
// It counts the mechanisms exercised (State-pair bits, Phase-pair bits, sender
// stalls while a word is in flight, words accepted while the previous
// handshake returns to zero, completion-register restarts) and fails on any
// that never happened.
module tb_serial_link_top;
  timeunit 1ps; timeprecision 1ps;
  import link_pkg::*;

  localparam int unsigned M       = WORD_BITS;
  localparam int unsigned NWORDS  = 200;
  localparam int unsigned TX_PER  = 1000;
  localparam int unsigned RX_PER  = 770;
  localparam int unsigned WIRE_SEG = 3;
  localparam int unsigned SEG_PS   = 50;

  logic rst_n = 1'b1;
  logic tx_clk = 1'b0, rx_clk = 1'b0;
  logic tx_send = 1'b0;
  logic [M-1:0] tx_data = '0;
  logic tx_ack, rx_req;
  logic [M-1:0] rx_data;
  logic tx_s, tx_s_n, tx_p, tx_p_n;
  logic rx_s, rx_s_n, rx_p, rx_p_n;

  int checks = 0, failures = 0;

  always #(TX_PER/2) tx_clk = ~tx_clk;
  always #(RX_PER/2) rx_clk = ~rx_clk;

  // The wires: WIRE_SEG segments of SEG_PS each, longer in total than one
  // bit time, so more than one bit is in flight at once. Each segment is
  // shorter than a bit, so no bit is swallowed.
  logic [3:0] wire_q [WIRE_SEG+1];
  assign wire_q[0] = {tx_s, tx_s_n, tx_p, tx_p_n};
  for (genvar g = 0; g < WIRE_SEG; g++) begin : g_wire
    assign #(SEG_PS) wire_q[g+1] = wire_q[g];
  end
  assign {rx_s, rx_s_n, rx_p, rx_p_n} = wire_q[WIRE_SEG];

  serial_link_top dut (
    .rst_n, .tx_clk, .tx_send, .tx_data, .tx_ack,
    .tx_s, .tx_s_n, .tx_p, .tx_p_n,
    .rx_s, .rx_s_n, .rx_p, .rx_p_n,
    .rx_clk, .rx_req, .rx_data
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------- sender ----------------
  logic [M-1:0] sent_q[$];
  realtime      sent_t[$];
  int           n_stall = 0;
  int           n_sent  = 0;
  int           gap;
  int           n_overlap = 0;
  tx_state_e    st_prev = TX_IDLE;
  always @(negedge tx_clk) st_prev <= dut.u_tx_sync.state;

  function automatic logic [M-1:0] word_of(int i);
    case (i)
      0: return '0;
      1: return '0;
      2: return '1;
      3: return '1;
      4: return {(M/2){2'b01}};
      5: return {(M/2){2'b10}};
      default: return M'($urandom);
    endcase
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    repeat (5) @(negedge tx_clk);
    rst_n = 1'b1;
    repeat (3) @(negedge tx_clk);
    // Stimulus changes on the falling edge of tx_clk.
    for (int i = 0; i < NWORDS; i++) begin
      @(negedge tx_clk);
      tx_send = 1'b1;
      tx_data = word_of(i);
      @(negedge tx_clk);
      while (!tx_ack) begin
        n_stall++;
        @(negedge tx_clk);
      end
      if (st_prev == TX_REL) n_overlap++;
      sent_q.push_back(tx_data);
      sent_t.push_back($realtime);
      n_sent++;
      tx_send = 1'b0;
      gap = (($urandom % 4) == 0) ? int'($urandom % 6) : 0;
      for (int g = 0; g < gap; g++) @(negedge tx_clk);
    end
  end

  // ---------------- receiver ----------------
  int n_recv = 0;
  realtime max_lat = 0;
  always @(posedge rx_clk) begin
    if (rst_n && rx_req) begin
      if (sent_q.size() == 0) begin
        check(1'b0, "word received that was never sent");
      end else begin
        logic [M-1:0] exp;
        realtime      t0;
        exp = sent_q.pop_front();
        t0  = sent_t.pop_front();
        check(rx_data == exp, $sformatf("word %0d: got %h expected %h", n_recv, rx_data, exp));
        if ($realtime - t0 > max_lat) max_lat = $realtime - t0;
        // Latency bound: sync + encoder + M bits + receiver + rx sync.
        check($realtime - t0 < 4 * TX_PER + M * TAP_PS + 2000 + 4 * RX_PER,
              $sformatf("latency %0t too long", $realtime - t0));
      end
      n_recv++;
    end
  end

  // ---------------- wire monitor ----------------
  int      n_sbits = 0, n_pbits = 0, bits_in_word = 0, n_words_wire = 0;
  realtime t_first, t_last;
  logic    prev_s = 1'b0, prev_p = 1'b0;

  always @(posedge rst_n) begin
    prev_s = tx_s;
    prev_p = tx_p;
  end

  always @(tx_s or tx_p) begin
    if (rst_n) begin
      #1;  // let both wires of the pair settle
      check(tx_s_n == ~tx_s && tx_p_n == ~tx_p, "pair wires not complementary");
      if (tx_s != prev_s || tx_p != prev_p) begin
        check((tx_s != prev_s) != (tx_p != prev_p),
              $sformatf("both pairs changed: s %b->%b p %b->%b", prev_s, tx_s, prev_p, tx_p));
        if (tx_s != prev_s) n_sbits++; else n_pbits++;
        prev_s = tx_s;
        prev_p = tx_p;
      end
    end
  end

  // Count bit windows per word via the serializer phases.
  always @(posedge dut.go) begin
    bits_in_word = 0;
    t_first = $realtime;
  end
  always @(posedge dut.done) if (rst_n) begin
    int unsigned bits_now;
    bits_now = n_sbits + n_pbits;
    n_words_wire++;
    t_last = $realtime;
    // The wave spans M bit times from GO to DONE.
    check(t_last - t_first == M * TAP_PS, $sformatf("word wave took %0t", t_last - t_first));
  end

  int bits_at_go = 0;
  always @(posedge dut.go) if (rst_n) bits_at_go = n_sbits + n_pbits;
  always @(posedge dut.done) if (rst_n) begin
    #2;
    check(n_sbits + n_pbits - bits_at_go == M, "word did not produce M line transitions");
  end

  // Completion register restarts.
  int n_restart = 0;
  always @(negedge dut.req_d) if (rst_n) n_restart++;

  // ---------------- end ----------------
  initial begin
    wait (n_recv == NWORDS);
    repeat (10) @(posedge rx_clk);
    check(n_sent == NWORDS && sent_q.size() == 0, "not all words delivered");
    check(n_sbits > 0,   "no bit carried on the State pair");
    check(n_pbits > 0,   "no bit carried on the Phase pair");
    check(n_stall > 0,   "sender never stalled");
    check(n_overlap > 0, "no word accepted during a return to zero");
    check(n_restart == NWORDS, $sformatf("completion restarts %0d", n_restart));
    check(n_words_wire == NWORDS, "wave count");
    $display("words=%0d S-bits=%0d P-bits=%0d stalls=%0d overlapped=%0d restarts=%0d max_latency=%0t",
             n_recv, n_sbits, n_pbits, n_stall, n_overlap, n_restart, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (NWORDS * 40 + 200) @(posedge tx_clk);
    failures++;
    $display("watchdog: received %0d of %0d words", n_recv, NWORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
