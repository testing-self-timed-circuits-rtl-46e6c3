// Testbench of the divider control path with a behavioural data path
// (registers with DELAY ns acknowledges, restoring-division step as integer
// arithmetic). Each division must take exactly W iterations (NR/NQ writes
// and R/Q write-backs), give the right quotient and remainder, and leave
// the selects at "load"; runs follow each other without reset. The control
// scan path (Toggle latches, scannable join) is shifted as well.
`timescale 1ns/1ps
module tb_div_control;
  import stscan_pkg::*;
  localparam int W = 8, DELAY = 2, NC = 2 * 3 + 1;
  logic go, done, d_req, d_ack, r_req, r_ack, q_req, q_ack, nr_req, nr_ack, nq_req, nq_ack;
  logic r_sel, q_sel, clr, ctest, si, so;
  scan_ctl_t ctl;
  int nn, dd, dv, rv, qv, nrv, nqv;
  int checks = 0, failures = 0, n_nx = 0, n_wb = 0;

  div_control #(.W(W)) dut (
    .go(go), .done(done), .d_req(d_req), .d_ack(d_ack), .r_req(r_req), .r_ack(r_ack),
    .q_req(q_req), .q_ack(q_ack), .nr_req(nr_req), .nr_ack(nr_ack), .nq_req(nq_req), .nq_ack(nq_ack),
    .r_sel(r_sel), .q_sel(q_sel), .clr(clr), .ctest(ctest), .si(si), .so(so), .ctl(ctl));

  // Behavioural data path.
  always @(d_req) begin automatic logic v = d_req; #(DELAY); dv = dd; d_ack = v; end
  always @(r_req) begin
    automatic logic v = r_req; automatic int x = r_sel ? nrv : 0;
    #(DELAY); rv = x; r_ack = v; if (r_sel) n_wb++;
  end
  always @(q_req) begin
    automatic logic v = q_req; automatic int x = q_sel ? nqv : nn;
    #(DELAY); qv = x; q_ack = v;
  end
  always @(nr_req) begin
    automatic logic v = nr_req; automatic int t = rv * 2 + ((qv >> (W - 1)) & 1);
    #(DELAY); nrv = (t >= dv) ? t - dv : t; nr_ack = v; n_nx++;
  end
  always @(nq_req) begin
    automatic logic v = nq_req; automatic int t = rv * 2 + ((qv >> (W - 1)) & 1);
    #(DELAY); nqv = ((qv << 1) & 255) | ((t >= dv) ? 1 : 0); nq_ack = v;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clk();
    ctl.p1 = 1; #1; ctl.p1 = 0; #1; ctl.p2 = 1; #1; ctl.p2 = 0; #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic d0;
    int nx0, wb0;
    logic [NC-1:0] p, o;
    go = 0; clr = 1; ctest = 0; si = 0;
    {d_ack, r_ack, q_ack, nr_ack, nq_ack} = '0;
    nn = 0; dd = 1; dv = 1; rv = 0; qv = 0; nrv = 0; nqv = 0;
    ctl = '{1, 1, 1, 1}; #10; ctl = SCAN_OFF; #5; clr = 0; #5;
    for (int k = 0; k < 100; k++) begin
      nn = int'($urandom_range(0, 255)); dd = int'($urandom_range(1, 255));
      d0 = done; nx0 = n_nx; wb0 = n_wb;
      #1 go = ~go;
      wait (done != d0); #1;
      check(qv == nn / dd && rv == nn % dd, $sformatf("%0d / %0d: q=%0d r=%0d", nn, dd, qv, rv));
      check(n_nx - nx0 == W && n_wb - wb0 == W, "W iterations");
      check(r_sel == 0 && q_sel == 0, "selects back at load");
    end
    ctl = '{1, 1, 0, 0};
    for (int k = 0; k < 10; k++) begin
      p = NC'($urandom);
      for (int i = NC - 1; i >= 0; i--) begin si = p[i]; #1; clk(); end
      for (int i = NC - 1; i >= 0; i--) begin o[i] = so; si = 0; #1; clk(); end
      check(o == p, "control scan path returns pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
