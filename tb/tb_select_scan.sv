// Testbench of the scannable Select: after a scan-path reset, random input
// transitions with random SEL must produce exactly one transition on the
// selected output and none on the other; then the two latches are checked
// as a 2-cell shift register, and capture is checked (SEL opens one master,
// which takes in ^ other output).
`timescale 1ns/1ps
module tb_select_scan;
  import stscan_pkg::*;
  logic in, sel, out_t, out_f, si, so;
  scan_ctl_t ctl;
  int checks = 0, failures = 0, n_t = 0, n_f = 0;

  select_scan dut (.in(in), .sel(sel), .out_t(out_t), .out_f(out_f), .si(si), .so(so), .ctl(ctl));

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
    logic pt, pf, s;
    in = 0; sel = 0;
    ctl = '{1, 1, 1, 1}; si = 0; #2;
    ctl = SCAN_OFF; #1;
    check(out_t == 0 && out_f == 0, "reset through scan path");
    for (int i = 0; i < 300; i++) begin
      s = 1'($urandom);
      sel = s; #1;                      // SEL set up before the transition
      pt = out_t; pf = out_f;
      in = ~in; #1;
      check(out_t == (s ? ~pt : pt) && out_f == (s ? pf : ~pf),
            $sformatf("select sel=%0d: t %0d->%0d f %0d->%0d", s, pt, out_t, pf, out_f));
      check((in ^ out_t ^ out_f) == 0, "invariant in == out_t ^ out_f");
      if (s) n_t++; else n_f++;
    end
    // Scan: shift two bits in, read them on the outputs.
    ctl = '{1, 1, 0, 0};
    for (int i = 0; i < 20; i++) begin
      logic b0, b1;
      b0 = 1'($urandom); b1 = 1'($urandom);
      si = b1; #1; clk();
      si = b0; #1; clk();
      check(out_t == b0 && out_f == b1 && so == b1, "two-cell shift");
      // Capture with SEL: selected master takes in ^ other output.
      s = 1'($urandom); sel = s; in = 1'($urandom); #1;
      ctl.test1 = 0; #1;
      check(out_t == b0 && out_f == b1, "outputs hold during capture");
      ctl.test1 = 1; #1;
      ctl.p2 = 1; #1; ctl.p2 = 0; #1;
      check(out_t == (s ? in ^ b1 : b0) && out_f == (s ? b1 : in ^ b0), "capture through SEL");
    end
    check(n_t > 0 && n_f > 0, "both outputs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
