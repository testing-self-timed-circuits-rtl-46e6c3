// End-to-end testbench of the two example circuits together, at the
// default parameters. Both circuits compute at the same time (their
// handshakes are independent) and results are checked against integer
// models, with latency DELAY * (1 + 2 * subtractions) for the GCD and
// DELAY * (1 + 2W) for the divider. Then, with the shared test controls,
// both scan paths are shifted together and each returns its own pattern,
// and a data-path capture is checked on each (C-elements cleared, A/B and
// R/Q transparent). Finally both circuits are reset through their scan
// paths and compute again. Every mechanism is counted.
`timescale 1ns/1ps
module tb_st_examples_top;
  import stscan_pkg::*;

  localparam int W = 8, DELAY = 2;
  localparam int NG = 7 + W;           // GCD scan cells
  localparam int ND = 7 + 2 + 2 * W;   // divider scan cells

  logic clr, ctest;
  scan_ctl_t ctl;
  logic gcd_go, gcd_done, gcd_si, gcd_so, div_go, div_done, div_si, div_so;
  logic [W-1:0] gcd_x, gcd_y, gcd_result, div_n, div_d, div_q, div_r;

  st_examples_top dut (
    .clr(clr), .ctest(ctest), .ctl(ctl),
    .gcd_go(gcd_go), .gcd_done(gcd_done), .gcd_x(gcd_x), .gcd_y(gcd_y), .gcd_result(gcd_result),
    .gcd_scan_in(gcd_si), .gcd_scan_out(gcd_so),
    .div_go(div_go), .div_done(div_done), .div_dividend(div_n), .div_divisor(div_d),
    .div_quotient(div_q), .div_remainder(div_r), .div_scan_in(div_si), .div_scan_out(div_so));

  int checks = 0, failures = 0;
  int n_gcd = 0, n_div = 0, n_overlap = 0, n_gcd_iter = 0, n_div_iter = 0, n_chain = 0, n_cap = 0;

  always @(dut.u_gcd.r_req) if (!ctl.test1) n_gcd_iter++;
  always @(dut.u_div.u_ctrl.t_iter) if (!ctl.test1) n_div_iter++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan_clock();
    ctl.p1 = 1'b1; #1; ctl.p1 = 1'b0; #1;
    ctl.p2 = 1'b1; #1; ctl.p2 = 1'b0; #1;
  endtask

  // Shift both chains together with the shared clocks: the divider chain is
  // the longer one, so the GCD chain sees ND - NG extra clocks.
  task automatic scan_both(input logic [NG-1:0] gin, input logic [ND-1:0] din,
                           output logic [NG-1:0] gout, output logic [ND-1:0] dout);
    ctl.test1 = 1'b1; ctl.test2 = 1'b1;
    for (int i = ND - 1; i >= 0; i--) begin
      dout[i] = div_so;
      div_si  = din[i];
      // The GCD chain is read in the first NG clocks and loaded in the last NG.
      if (i >= ND - NG) gout[i - (ND - NG)] = gcd_so;
      if (i < NG) gcd_si = gin[i];
      #1;
      scan_clock();
    end
  endtask

  task automatic reset_all();
    clr = 1; ctest = 0; gcd_go = 0; div_go = 0;
    ctl = '{1, 1, 1, 1}; gcd_si = 0; div_si = 0;
    #(ND + 5);
    ctl = SCAN_OFF;
    #(4 * DELAY);
    clr = 0;
    #(4 * DELAY);
  endtask

  task automatic gcd_op(input int a, input int b);
    int ea, eb, it, t0;
    logic d0;
    gcd_x = W'(a); gcd_y = W'(b); ea = a; eb = b; it = 0;
    while (ea != eb) begin if (ea > eb) ea -= eb; else eb -= ea; it++; end
    #1 d0 = gcd_done; t0 = int'($time);
    gcd_go = ~gcd_go;
    wait (gcd_done != d0);
    check(int'($time) - t0 == DELAY * (1 + 2 * it), "GCD latency");
    #1 check(int'(gcd_result) == ea, $sformatf("gcd(%0d,%0d)=%0d", a, b, gcd_result));
    n_gcd++;
  endtask

  task automatic div_op(input int n, input int d);
    int t0;
    logic d0;
    div_n = W'(n); div_d = W'(d);
    #1 d0 = div_done; t0 = int'($time);
    div_go = ~div_go;
    wait (div_done != d0);
    check(int'($time) - t0 == DELAY * (1 + 2 * W), "divider latency");
    #1 check(int'(div_q) == n / d && int'(div_r) == n % d, $sformatf("%0d/%0d -> %0d r %0d", n, d, div_q, div_r));
    n_div++;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NG-1:0] gp, go_;
    logic [ND-1:0] dp, do_;
    reset_all();
    for (int i = 0; i < 50; i++) begin
      fork
        gcd_op(int'($urandom_range(1, 255)), int'($urandom_range(1, 255)));
        div_op(int'($urandom_range(0, 255)), int'($urandom_range(1, 255)));
      join
      n_overlap++;
    end
    // Scan paths.
    for (int i = 0; i < 10; i++) begin
      gp = NG'({$urandom, $urandom}); dp = ND'({$urandom, $urandom});
      scan_both(gp, dp, go_, do_);
      scan_both(NG'(0), ND'(0), go_, do_);
      check(go_ == gp && do_ == dp, "both scan paths return their patterns");
      n_chain++;
    end
    // Data-path capture, C-elements held cleared, go = 0, all cells 0 except
    // what keeps A/B (GCD) and R/Q (divider) transparent: C == P holds with
    // all-zero cells.
    for (int i = 0; i < 10; i++) begin
      logic [W-1:0] a, b, n, d, diff;
      logic [W:0] t;
      logic ge;
      a = W'($urandom); b = W'($urandom); n = W'($urandom); d = W'($urandom);
      gcd_x = a; gcd_y = b; div_n = n; div_d = d; clr = 1;
      scan_both(NG'(0), ND'(0), go_, do_);
      ctl.test1 = 0; #(4 * DELAY + 4); ctl.test1 = 1; #1;
      ctl.p2 = 1; #1; ctl.p2 = 0; #1;
      scan_both(NG'(0), ND'(0), go_, do_);
      diff = (a > b) ? a - b : b - a;
      t = {{W{1'b0}}, n[W-1]};
      ge = t >= {1'b0, d};
      check(go_[NG-1:7] == diff, "GCD: R captured |x - y|");
      check(do_[ND-1 -: W] == {n[W-2:0], ge}, "divider: NQ captured the shifted dividend");
      check(do_[ND-1-W -: W] == (ge ? W'(t - {1'b0, d}) : t[W-1:0]), "divider: NR captured the first remainder");
      n_cap++;
    end
    reset_all();
    for (int i = 0; i < 20; i++) begin
      fork
        gcd_op(int'($urandom_range(1, 255)), int'($urandom_range(1, 255)));
        div_op(int'($urandom_range(0, 255)), int'($urandom_range(1, 255)));
      join
      n_overlap++;
    end
    $display("mechanisms: gcd=%0d div=%0d concurrent=%0d gcd-subtractions=%0d div-iterations=%0d chain=%0d capture=%0d",
             n_gcd, n_div, n_overlap, n_gcd_iter, n_div_iter, n_chain, n_cap);
    check(n_gcd > 0 && n_div > 0 && n_overlap > 0 && n_gcd_iter > 0 && n_div_iter > 0 && n_chain > 0 && n_cap > 0,
          "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
