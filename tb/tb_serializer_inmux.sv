// Test of the input-multiplexed serializer: with a thermometer-coded phase
// wave stepping every bit time, the pair must show d[i] / d_n[i] while the
// window of bit i is open, keep the last bit afterwards, and keep it through
// the falling wave and while the register changes for the next word.
module tb_serializer_inmux;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned M = 4;
  localparam int unsigned T = 100;
  localparam int unsigned N = 100;

  logic rst_n = 1'b1;
  logic [M:0] phase = '0;
  logic [M-1:0] d = '0;
  logic line, line_n;
  int checks = 0, failures = 0;

  serializer_inmux #(.M(M)) dut (.rst_n, .phase, .d, .d_n(~d), .line, .line_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    logic last;
    #1 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    #50 check(line == 1'b0 && line_n == 1'b1, "reset level");
    last = 1'b0;
    for (int w = 0; w < N; w++) begin
      d = M'($urandom);
      #20 check(line == last && line_n == ~last, "line moved when the register changed");
      for (int i = 0; i <= M; i++) begin
        phase[i] = 1'b1;
        #(T/2);
        if (i < M) begin
          check(line == d[i] && line_n == ~d[i], $sformatf("word %0d bit %0d", w, i));
        end else begin
          check(line == d[M-1] && line_n == ~d[M-1], "last bit not kept");
        end
        #(T/2);
      end
      last = d[M-1];
      for (int i = 0; i <= M; i++) begin
        phase[i] = 1'b0;
        #(T/2);
        check(line == last && line_n == ~last, "line moved in the falling wave");
        #(T/2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * 2 * (M + 1) * T + 100000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
