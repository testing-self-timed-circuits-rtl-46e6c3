// Testbench of the GCD control path. The data path is modelled here
// behaviourally (registers A, B, R with acknowledges after DELAY ns,
// comparisons and subtraction as integer operations); the control network
// must sequence it to the right gcd for random operands, with the expected
// number of R writes, and must leave the data path selects at "load" when
// idle. The 4-cell scan path of the two Selects is shifted as well.
`timescale 1ns/1ps
module tb_gcd_control;
  import stscan_pkg::*;
  localparam int DELAY = 2;
  logic go, done, ne, gt, a_req, a_ack, b_req, b_ack, r_req, r_ack, a_sel, b_sel;
  logic clr, ctest, si, so;
  scan_ctl_t ctl;
  int xa, yb, av, bv, rv;
  int checks = 0, failures = 0, n_r = 0;

  gcd_control dut (.go(go), .done(done), .ne(ne), .gt(gt), .a_req(a_req), .a_ack(a_ack),
                   .b_req(b_req), .b_ack(b_ack), .r_req(r_req), .r_ack(r_ack),
                   .a_sel(a_sel), .b_sel(b_sel), .clr(clr), .ctest(ctest),
                   .si(si), .so(so), .ctl(ctl));

  // Behavioural data path.
  assign ne = av != bv;
  assign gt = av > bv;
  always @(a_req) begin
    automatic logic v = a_req;
    automatic int   d = a_sel ? rv : xa;
    #(DELAY); av = d; a_ack = v;
  end
  always @(b_req) begin
    automatic logic v = b_req;
    automatic int   d = b_sel ? rv : yb;
    #(DELAY); bv = d; b_ack = v;
  end
  always @(r_req) begin
    automatic logic v = r_req;
    #(DELAY); rv = (av > bv) ? av - bv : bv - av; r_ack = v; n_r++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clk();
    ctl.p1 = 1; #1; ctl.p1 = 0; #1; ctl.p2 = 1; #1; ctl.p2 = 0; #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, iters, r0;
    logic d0;
    go = 0; clr = 1; ctest = 0; si = 0; a_ack = 0; b_ack = 0; r_ack = 0;
    av = 1; bv = 2; rv = 0; xa = 1; yb = 1;
    ctl = '{1, 1, 1, 1}; #5; ctl = SCAN_OFF; #5; clr = 0; #5;
    for (int k = 0; k < 100; k++) begin
      xa = int'($urandom_range(1, 255)); yb = (k % 7 == 0) ? xa : int'($urandom_range(1, 255));
      ea = xa; eb = yb; iters = 0;
      while (ea != eb) begin if (ea > eb) ea -= eb; else eb -= ea; iters++; end
      d0 = done; r0 = n_r;
      #1 go = ~go;
      wait (done != d0);
      #1;
      check(av == ea, $sformatf("gcd(%0d,%0d): got %0d expected %0d", xa, yb, av, ea));
      check(n_r - r0 == iters, "number of R writes");
      check(a_sel == 0 && b_sel == 0, "selects back at load when idle");
    end
    ctl = '{1, 1, 0, 0};
    for (int k = 0; k < 10; k++) begin
      logic [3:0] p, o;
      p = 4'($urandom);
      for (int i = 3; i >= 0; i--) begin si = p[i]; #1; clk(); end
      check(r_req == p[0] && done == p[1], "select 1 cells set by scan");
      for (int i = 3; i >= 0; i--) begin o[i] = so; si = 0; #1; clk(); end
      check(o == p, "control scan path returns pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
