// Testbench of the scannable Toggle: after a scan-path reset the input
// transitions alternate between out0 and out1, starting with out0; the two
// latches also shift as a 2-cell scan register.
`timescale 1ns/1ps
module tb_toggle_scan;
  import stscan_pkg::*;
  logic in, out0, out1, si, so;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  toggle_scan dut (.in(in), .out0(out0), .out1(out1), .si(si), .so(so), .ctl(ctl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clk();
    ctl.p1 = 1; #1; ctl.p1 = 0; #1; ctl.p2 = 1; #1; ctl.p2 = 0; #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p0, p1v;
    in = 0;
    ctl = '{1, 1, 1, 1}; si = 0; #2;
    ctl = SCAN_OFF; #1;
    check(out0 == 0 && out1 == 0, "reset through scan path");
    for (int i = 0; i < 100; i++) begin
      p0 = out0; p1v = out1;
      in = ~in; #1;
      if (i % 2 == 0)
        check(out0 != p0 && out1 == p1v, $sformatf("transition %0d should go to out0", i));
      else
        check(out1 != p1v && out0 == p0, $sformatf("transition %0d should go to out1", i));
    end
    ctl = '{1, 1, 0, 0};
    for (int i = 0; i < 20; i++) begin
      logic b0, b1;
      b0 = 1'($urandom); b1 = 1'($urandom);
      si = b1; #1; clk();
      si = b0; #1; clk();
      check(out0 == b0 && out1 == b1 && so == b1, "two-cell shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
