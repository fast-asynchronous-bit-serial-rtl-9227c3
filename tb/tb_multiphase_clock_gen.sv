// Test of the multiphase clock generator: after GO rises, phase i must rise
// exactly i bit times later and DONE with phase M; after GO falls the phases
// fall in the same order. Run at the default tap delay and at a different one.
module tb_multiphase_clock_gen;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned M  = 4;
  localparam int unsigned T1 = 100;
  localparam int unsigned T2 = 37;

  logic go1 = 1'b0, go2 = 1'b0, done1, done2;
  logic [M:0] ph1, ph2;
  int checks = 0, failures = 0;

  multiphase_clock_gen #(.M(M))                   dut1 (.go(go1), .phase(ph1), .done(done1));
  multiphase_clock_gen #(.M(M), .TAP_DLY_PS(T2))  dut2 (.go(go2), .phase(ph2), .done(done2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // Expected thermometer code j taps after an edge at t0.
  function automatic logic [M:0] therm(int j, logic lvl);
    logic [M:0] r;
    for (int i = 0; i <= M; i++) r[i] = (i <= j) ? lvl : ~lvl;
    return r;
  endfunction

  initial begin
    #1000;
    check(ph1 == '0 && !done1, "idle");
    for (int rep = 0; rep < 3; rep++) begin
      for (int lvl = 1; lvl >= 0; lvl--) begin
        go1 = lvl[0];
        go2 = lvl[0];
        for (int j = 0; j <= M; j++) begin
          // Between tap j and tap j+1 of the fast line.
          #1;
          check(ph1 == therm(j, lvl[0]), $sformatf("line 1 tap %0d: %b", j, ph1));
          check(done1 == (j == M ? lvl[0] : ~lvl[0]), "DONE 1");
          #(T1 - 2);
          check(ph1 == therm(j, lvl[0]), $sformatf("line 1 tap %0d late: %b", j, ph1));
          #1;
        end
        #500;
        check(ph2 == {(M+1){lvl[0]}} && done2 == lvl[0], "line 2 settled");
      end
    end
    // Line 2 timing: DONE rises M*T2 after GO.
    begin
      realtime t0;
      go2 = 1'b1;
      t0 = $realtime;
      @(posedge done2);
      check($realtime - t0 == M * T2, "line 2 DONE delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
