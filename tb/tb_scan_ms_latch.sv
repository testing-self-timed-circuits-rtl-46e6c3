// Testbench of the scannable master-slave latch: normal gated-latch
// behaviour, reset through the transparent scan path, shifting under P1/P2
// (master loads on P1 only, slave on P2 only), and capture of d with test1
// deasserted while the output keeps the scanned value.
`timescale 1ns/1ps
module tb_scan_ms_latch;
  import stscan_pkg::*;
  logic d, en, si, q;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  scan_ms_latch dut (.d(d), .en(en), .si(si), .ctl(ctl), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    // Reset through the transparent scan path.
    ctl = '{1, 1, 1, 1}; si = 0; d = 1; en = 1; #1;
    check(q == 0, "transparent scan path reset");
    si = 1; #1;
    check(q == 1, "transparent scan path passes si");
    // Normal mode: gated latch.
    ctl = SCAN_OFF;
    for (int i = 0; i < 200; i++) begin
      held = q;
      en = 1'($urandom); d = 1'($urandom); si = 1'($urandom); #1;
      check(q == (en ? d : held), "normal mode latch");
    end
    // Scan mode shifting.
    ctl = '{1, 1, 0, 0};
    for (int i = 0; i < 50; i++) begin
      logic v;
      v = 1'($urandom); held = q;
      si = v; d = ~v; en = 1; #1;
      check(q == held, "scan mode: holds with clocks low");
      ctl.p1 = 1; #1;
      check(q == held, "scan mode: slave holds during P1");
      ctl.p1 = 0; si = ~v; #1;
      ctl.p2 = 1; #1;
      check(q == v, "scan mode: P1 then P2 moves si to q");
      ctl.p2 = 0; #1;
    end
    // Capture: test1 low, test2 high; master takes d when en, q holds.
    for (int i = 0; i < 50; i++) begin
      logic v, e;
      v = 1'($urandom); e = 1'($urandom); held = q;
      d = v; en = e; #1;
      ctl.test1 = 0; #1;
      check(q == held, "capture: output keeps scanned value");
      ctl.test1 = 1; #1;
      ctl.p2 = 1; #1; ctl.p2 = 0; #1;
      check(q == (e ? v : held), "capture: master took d only if enabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
