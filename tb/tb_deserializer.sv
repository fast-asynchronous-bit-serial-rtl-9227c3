// Test of the transition-driven deserializer. The testbench produces the
// LEDR rails of random words itself (S = data bit, S xor P alternating per
// bit, bit 0 first), with true and complement rails, first at 100 ps per
// bit and then at a short 30 ps per bit, and plays the decoder: ACK follows
// REQ after 20 ps. Checked: the word at each REQ, no REQ before the last bit, and the REQ latency after the last
// bit's transition, which for these delays is exactly
// XOR + (M-1)*(W+Y) + W + Q + 2*LATCH.
// A second instance with RECORD_P = 1 receives the same rails; its WORD must
// match too and its WORD_P must hold the Phase bits that were sent.
module tb_deserializer;
  timeunit 1ps; timeprecision 1ps;
  import link_pkg::*;

  localparam int unsigned M      = 4;
  localparam int unsigned N      = 200;
  localparam int unsigned BIT_PS [2] = '{100, 30};
  localparam int unsigned REQ_LAT = XOR_PS + (M-1)*(XL_W_PS + XL_Y_PS) + XL_W_PS + XL_Q_PS
                                    + 2*LATCH_PS;

  logic rst_n = 1'b1, s = 1'b0, p = 1'b0, req, ack;
  logic [M-1:0] word;
  int checks = 0, failures = 0;
  int n_req = 0;

  deserializer #(.M(M)) dut (.rst_n, .s, .s_n(~s), .p, .p_n(~p), .req, .ack, .word,
                              .word_p(word_p0));

  logic req2, ack2;
  logic [M-1:0] word2, word_p, word_p0;
  deserializer #(.M(M), .RECORD_P(1'b1)) dut_p (.rst_n, .s, .s_n(~s), .p, .p_n(~p),
                                                .req(req2), .ack(ack2), .word(word2),
                                                .word_p(word_p));
  assign #20 ack2 = req2;

  assign #20 ack = req;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  logic [M-1:0] exp_w, exp_p;
  always @(posedge req2) if (rst_n) begin
    check(word2 == exp_w, "word with the Phase chain built");
    check(word_p == exp_p, $sformatf("Phase word %b expected %b", word_p, exp_p));
  end
  realtime      t_last;
  always @(posedge req) if (rst_n) begin
    n_req++;
    check(word == exp_w, $sformatf("word %h expected %h", word, exp_w));
    check(word_p0 == '0, "Phase word present without the Phase chain");
    check($realtime - t_last == REQ_LAT, $sformatf("REQ latency %0t expected %0d", $realtime - t_last, REQ_LAT));
  end

  initial begin
    int unsigned k;
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    #200;
    k = 0;
    for (int w = 0; w < N; w++) begin
      logic [M-1:0] data;
      int unsigned  bt;
      bt = BIT_PS[w < N/2 ? 0 : 1];
      case (w)
        0, 1: data = '0;
        2, 3: data = '1;
        default: data = M'($urandom);
      endcase
      exp_w = data;
      for (int i = 0; i < M; i++) begin
        k++;
        s = data[i];
        p = data[i] ^ k[0];
        exp_p[i] = p;
        if (i == M-1) t_last = $realtime;
        #(bt);
        if (i < M-1) check(!req, "REQ before the word was complete");
      end
      #(REQ_LAT + 200 + ($urandom % 500));
      check(n_req == w + 1, "one REQ per word");
      check(!req, "REQ did not return to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * (M * 100 + 1000) + 10000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
