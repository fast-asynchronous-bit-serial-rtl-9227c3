// Test of the receive synchronizer: a toggle of REQ_S at a random moment must
// give exactly one REQ strobe carrying the word, on the third rising clock
// edge after the toggle (two synchronizer flops, then the output register),
// and ACK_S must toggle back at that edge.
module tb_rx_synchronizer;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned M   = 4;
  localparam int unsigned PER = 1000;
  localparam int unsigned N   = 150;

  logic clk = 1'b0, rst_n = 1'b1, req_s = 1'b0, ack_s, req;
  logic [M-1:0] data_s = '0, data;
  int checks = 0, failures = 0, n_req = 0;

  always #(PER/2) clk = ~clk;

  rx_synchronizer #(.M(M)) dut (.clk, .rst_n, .req_s, .data_s, .ack_s, .req, .data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n && req) n_req++;

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      logic [M-1:0] w;
      int edges;
      w = M'($urandom);
      #(1 + $urandom % (PER - 2));   // asynchronous to clk
      data_s = w;
      req_s  = ~req_s;
      edges = 0;
      while (!req) begin
        @(posedge clk);
        edges++;
        #1;
        if (edges > 10) break;
      end
      check(edges == 3, $sformatf("REQ after %0d edges", edges));
      check(data == w, "data");
      check(ack_s == req_s, "ACK_S did not answer");
      @(posedge clk);
      #1 check(!req, "REQ longer than one cycle");
    end
    repeat (5) @(posedge clk);
    check(n_req == N, "REQ count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * 10 * PER + 20000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
