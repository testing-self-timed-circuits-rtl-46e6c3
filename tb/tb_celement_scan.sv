// Testbench of the scannable C-element: C-element behaviour in normal mode
// (random walk against the majority model), state set through the scan
// path, and capture of the agreed input value.
`timescale 1ns/1ps
module tb_celement_scan;
  import stscan_pkg::*;
  logic a, b, z, si, so, model;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  celement_scan dut (.a(a), .b(b), .z(z), .si(si), .so(so), .ctl(ctl));

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
    a = 0; b = 1;
    ctl = '{1, 1, 1, 1}; si = 0; #2; ctl = SCAN_OFF; #1;
    model = 0;
    check(z == 0, "reset through scan path");
    for (int i = 0; i < 300; i++) begin
      a = 1'($urandom); b = 1'($urandom); #1;
      model = (a & b) | (model & (a | b));
      check(z == model, "normal mode C-element");
    end
    ctl = '{1, 1, 0, 0};
    for (int i = 0; i < 40; i++) begin
      logic v, w, u;
      v = 1'($urandom); si = v; a = 1'($urandom); b = ~a; #1; clk();
      check(z == v && so == v, "state set by scan");
      w = 1'($urandom); u = 1'($urandom); a = w; b = u; #1;
      ctl.test1 = 0; #1; ctl.test1 = 1; #1; ctl.p2 = 1; #1; ctl.p2 = 0; #1;
      check(z == ((w == u) ? w : v), "capture: agreed value or held state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
