// Test of the transmit synchronizer: words from the clocked sender must reach
// the encoder side unchanged and in order, one per four-phase REQ/ACK cycle,
// with exactly one ACK pulse per word, REQ rising at the first clock edge
// after SEND when idle, and REQ never rising while the encoder's ACK is still
// high. The encoder is modelled by an ACK that follows REQ after a random
// delay. Words accepted while the previous handshake returns to zero
// (pipelined acceptance) are counted and must occur.
module tb_tx_synchronizer;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned M   = 4;
  localparam int unsigned PER = 1000;
  localparam int unsigned N   = 100;

  logic clk = 1'b0, rst_n = 1'b1;
  logic send = 1'b0, ack, req_e, ack_e = 1'b0;
  logic [M-1:0] data = '0, data_e;
  int checks = 0, failures = 0;

  always #(PER/2) clk = ~clk;

  tx_synchronizer #(.M(M)) dut (.clk, .rst_n, .send, .data, .ack, .req_e, .data_e, .ack_e);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // Encoder model: ACK follows REQ after 200..2600 ps.
  always @(req_e) begin
    automatic logic v = req_e;
    #(200 + ($urandom % 2400));
    ack_e = v;
  end

  // Data seen at each REQ rise.
  logic [M-1:0] exp_q[$];
  int n_req = 0, n_ack = 0, n_overlap = 0;
  int st_prev = 0;
  always @(negedge clk) st_prev <= int'(dut.state);
  always @(posedge req_e) if (rst_n) begin
    n_req++;
    check(!ack_e, "REQ rose while ACK still high");
    check(exp_q.size() > 0 && data_e == exp_q[0], "word at REQ differs");
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end
  always @(posedge clk) if (rst_n && ack) n_ack++;

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!req_e && !ack, "idle after reset");
    for (int i = 0; i < N; i++) begin
      int waited;
      send = 1'b1;
      data = M'($urandom);
      exp_q.push_back(data);
      waited = 0;
      @(negedge clk);
      while (!ack) begin waited++; @(negedge clk); end
      check(data_e == data, "word not captured with ACK");
      if (st_prev == 2) n_overlap++;
      send = 1'b0;
      @(negedge clk);
      check(!ack, "ACK longer than one cycle");
      if ($urandom % 3 == 0) repeat ($urandom % 8) @(negedge clk);
    end
    // Wait for the last handshake to return.
    repeat (20) @(negedge clk);
    check(n_req == N && n_ack == N, $sformatf("REQ %0d ACK %0d of %0d", n_req, n_ack, N));
    check(!req_e, "REQ left high");
    check(n_overlap > 0, "no word was accepted during a return to zero");
    $display("words=%0d accepted during return to zero=%0d", N, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // First word: from idle, REQ follows SEND after exactly one clock edge.
  initial begin
    @(posedge send);
    @(posedge clk);
    #1 check(req_e, "REQ not raised at the first clock edge after SEND");
  end

  initial begin
    repeat (N * 30 + 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
