// Testbench of the scannable TLNO: normal TLNO behaviour, W-bit shifting
// under P1/P2 (bit 0 first in), capture of DIN with test1 deasserted whatever
// C and P are, and scan-out of the captured word.
`timescale 1ns/1ps
module tb_tlno_scan;
  import stscan_pkg::*;
  localparam int W = 8;
  logic c, p, si, so;
  logic [W-1:0] d, q, model;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  tlno_scan #(.W(W)) dut (.c(c), .p(p), .d(d), .q(q), .si(si), .so(so), .ctl(ctl));

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
    logic [W-1:0] v, cap, o;
    ctl = SCAN_OFF; si = 0;
    c = 1; p = 0; d = '0; #1; model = '0;
    for (int i = 0; i < 200; i++) begin
      c = 1'($urandom); p = 1'($urandom); d = W'($urandom); #1;
      if (c != p) model = d;
      check(q == model, $sformatf("normal mode q=%h exp=%h", q, model));
    end
    ctl = '{1, 1, 0, 0};
    for (int k = 0; k < 20; k++) begin
      v = W'($urandom);
      for (int i = W - 1; i >= 0; i--) begin si = v[i]; #1; clk(); end
      check(q == v, $sformatf("shift in: q=%h exp=%h", q, v));
      check(so == v[W-1], "scan out is last bit");
      // Capture with C == P (latch would be opaque in normal mode).
      cap = W'($urandom); d = cap; c = 1'($urandom); p = c; #1;
      ctl.test1 = 0; #1;
      check(q == v, "output keeps scanned word during capture");
      ctl.test1 = 1; #1;
      ctl.p2 = 1; #1; ctl.p2 = 0; #1;
      for (int i = W - 1; i >= 0; i--) begin o[i] = so; si = 0; #1; clk(); end
      check(o == cap, $sformatf("captured %h, expected %h", o, cap));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
