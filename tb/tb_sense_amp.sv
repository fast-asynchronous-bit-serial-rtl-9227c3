// Test of the sense amplifier model: the output follows the + input after the
// amplifier delay whenever the pair differs, keeps its value when both inputs
// are equal, and OUT_N is always the complement.
module tb_sense_amp;
  timeunit 1ps; timeprecision 1ps;
  import link_pkg::*;

  logic rst_n = 1'b1, in_p = 1'b0, in_n = 1'b1, out, out_n;
  int checks = 0, failures = 0;

  sense_amp dut (.rst_n, .in_p, .in_n, .out, .out_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    logic exp;
    #1 rst_n = 1'b0;
    #100 check(out == 1'b0 && out_n == 1'b1, "reset");
    rst_n = 1'b1;
    exp = 1'b0;
    for (int i = 0; i < 200; i++) begin
      logic np, nn;
      np = 1'($urandom);
      nn = ($urandom % 4 == 0) ? np : ~np;   // sometimes no differential signal
      in_p = np;
      in_n = nn;
      #(SA_PS - 2);
      check(out == exp, "output moved before the amplifier delay");
      if (np != nn) exp = np;
      #4;
      check(out == exp && out_n == ~exp, $sformatf("step %0d: in %b%b out %b exp %b", i, np, nn, out, exp));
      #50;
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
