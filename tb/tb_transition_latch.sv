// Test of the transition latch (XL), alone and as a four-stage chain.
// Alone: Q must take the value D had at each rising or falling transition of
// X, Q_DLY after it, and hold it while D changes between transitions; Y/Y_N
// must follow X/X_N after the two control buffers. Chained: each transition
// shifts the stored bits one stage, the behaviour the deserializer relies on.
module tb_transition_latch;
  timeunit 1ps; timeprecision 1ps;
  import link_pkg::*;

  localparam int unsigned NS = 4;

  logic clr = 1'b0, x = 1'b0, d = 1'b0;
  logic y, y_n, q;
  int checks = 0, failures = 0;

  transition_latch dut (.clr, .x, .x_n(~x), .d, .y, .y_n, .q);

  // Chain: D of stage 0 is cd, set well before each transition.
  logic cd = 1'b0;
  logic [NS:0] cx, cx_n;
  logic [NS-1:0] cq;
  assign cx[0]   = x;
  assign cx_n[0] = ~x;
  for (genvar k = 0; k < NS; k++) begin : g_chain
    transition_latch u (.clr, .x(cx[k]), .x_n(cx_n[k]), .d(k == 0 ? cd : cq[k == 0 ? 0 : k-1]),
                        .y(cx[k+1]), .y_n(cx_n[k+1]), .q(cq[k]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    logic [NS-1:0] model;
    logic held;
    clr = 1'b1;
    #200 clr = 1'b0;
    #100 check(q == 1'b0 && cq == '0, "cleared");
    model = '0;
    held = 1'b0;
    for (int i = 0; i < 300; i++) begin
      logic nd;
      nd = 1'($urandom);
      d  = nd;
      cd = nd;
      #30;
      x = ~x;
      #(XL_W_PS + XL_Q_PS - 2);
      check(q == held, "Q moved before W + Q delay");
      #4;
      held = nd;
      check(q == held, $sformatf("transition %0d: Q %b expected %b", i, q, held));
      check(y == x && y_n == ~x, "Y does not follow X");
      // D changes between transitions: Q must hold.
      d = ~nd;
      #50 check(q == held, "Q followed D without a transition");
      // Chain: after the wave has passed, stage k holds the bit from k transitions ago.
      #100;
      model = {model[NS-2:0], nd};
      check(cq == model, $sformatf("chain %b expected %b", cq, model));
    end
    clr = 1'b1;
    #1 ;
    #(XL_Q_PS + 1) check(q == 1'b0 && cq == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
