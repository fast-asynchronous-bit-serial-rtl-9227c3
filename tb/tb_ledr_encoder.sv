// Test of the LEDR encoder and its four registers. A chain of random words
// (plus all-zero, all-one and alternating words) is encoded; the reference is
// the LEDR property itself: counting bits from the reset state (bit 0 of the
// line, S = P = 0), the k-th bit on the line has S = B and S xor P = k mod 2,
// so every bit changes exactly one of S and P. Also checked: the complement
// registers, GO following REQ after the matched delay, and ACK equal to the
// serializer's DONE (modelled here as GO delayed).
module tb_ledr_encoder;
  timeunit 1ps; timeprecision 1ps;
  import link_pkg::*;

  localparam int unsigned M = 4;
  localparam int unsigned N = 200;

  logic rst_n = 1'b1, req = 1'b0, ack, go, done;
  logic [M-1:0] data = '0, s, s_n, p, p_n;
  int checks = 0, failures = 0;

  ledr_encoder #(.M(M)) dut (.rst_n, .req, .data, .ack, .go, .done, .s, .s_n, .p, .p_n);

  assign #(M * 100) done = go;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    int unsigned k;
    logic prev_s, prev_p;
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #100;
    check(s == '0 && p == '0 && s_n == '1 && p_n == '1, "reset state");
    k = 0;
    prev_s = 1'b0;
    prev_p = 1'b0;
    for (int w = 0; w < N; w++) begin
      realtime t0;
      case (w)
        0, 1: data = '0;
        2, 3: data = '1;
        4:    data = 4'b0101;
        5:    data = 4'b1010;
        default: data = M'($urandom);
      endcase
      #50;
      req = 1'b1;
      t0 = $realtime;
      @(posedge go);
      check($realtime - t0 == ENC_PS, "GO delay");
      for (int i = 0; i < M; i++) begin
        k++;
        check(s[i] == data[i], "S != B");
        check((s[i] ^ p[i]) == k[0], $sformatf("word %0d bit %0d: S^P not alternating", w, i));
        check((s[i] != prev_s) != (p[i] != prev_p), "not exactly one rail changed");
        prev_s = s[i];
        prev_p = p[i];
      end
      check(s_n == ~s && p_n == ~p, "complement registers");
      check(!ack, "ACK before DONE");
      @(posedge done);
      #1 check(ack, "ACK does not follow DONE");
      req = 1'b0;
      @(negedge done);
      #1 check(!ack, "ACK does not fall with DONE");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * 2000 + 10000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
