// Testbench of the delay element with scan latch: in normal mode o follows
// i after DELAY ns; in scan mode o is whatever is shifted in, independent of
// i; capture records the delayed input.
`timescale 1ns/1ps
module tb_delay_scan;
  import stscan_pkg::*;
  localparam int DELAY = 2;
  logic i, o, si, so;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  delay_scan #(.DELAY(DELAY)) dut (.i(i), .o(o), .si(si), .so(so), .ctl(ctl));

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
    logic v, w;
    ctl = SCAN_OFF; si = 0; i = 0; #10;
    for (int k = 0; k < 50; k++) begin
      i = ~i;
      #(DELAY - 1); check(o != i, "normal: not before DELAY");
      #2;           check(o == i, "normal: after DELAY");
      #2;
    end
    ctl = '{1, 1, 0, 0};
    for (int k = 0; k < 30; k++) begin
      v = 1'($urandom); w = 1'($urandom);
      si = v; i = w; #1; clk(); #(DELAY + 1);
      check(o == v && so == v, "scan: o set by scan path, not by i");
      ctl.test1 = 0; #1; ctl.test1 = 1; #1; ctl.p2 = 1; #1; ctl.p2 = 0; #1;
      check(o == w, "capture records delayed input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
