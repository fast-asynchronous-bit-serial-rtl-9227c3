// Test of the decoder: each rising REQ_D from the deserializer must store the
// received S word as the data word, toggle REQ_S once, and be acknowledged on
// ACK_D after the acknowledge delay. The receive synchronizer is modelled by
// ACK_S toggling back after a random time.
module tb_ledr_decoder;
  timeunit 1ps; timeprecision 1ps;
  import link_pkg::*;

  localparam int unsigned M = 4;
  localparam int unsigned N = 200;

  logic rst_n = 1'b1, req_d = 1'b0, ack_d, req_s, ack_s = 1'b0;
  logic [M-1:0] word_s = '0, data;
  int checks = 0, failures = 0;

  ledr_decoder #(.M(M)) dut (.rst_n, .req_d, .word_s, .ack_d, .req_s, .data, .ack_s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #100 check(req_s == 1'b0 && data == '0 && !ack_d, "reset");
    for (int i = 0; i < N; i++) begin
      logic [M-1:0] w;
      logic old_req;
      w = M'($urandom);
      word_s = w;
      old_req = req_s;
      #10 req_d = 1'b1;
      #1;
      check(data == w, "data not the received S word");
      check(req_s == ~old_req, "REQ_S did not toggle");
      word_s = ~w;   // deserializer may move on after ACK
      #(LATCH_PS - 2) check(!ack_d, "ACK_D early");
      #2 check(ack_d, "ACK_D late");
      req_d = 1'b0;
      #(LATCH_PS + 1) check(!ack_d, "ACK_D did not return");
      check(data == w, "data not held");
      #($urandom % 300);
      ack_s = req_s;   // synchronizer takes the word
      #50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * 1000 + 10000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
