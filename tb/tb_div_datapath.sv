// Testbench of the divider data path, with the control sequence driven
// directly: load D, R = 0, Q = dividend, then W iterations of
// (write NR, NQ; write R, Q back), and compare quotient and remainder with
// integer division; one iteration is also checked step by step against the
// restoring-division equations. The 2 + 2W cell scan path is shifted.
`timescale 1ns/1ps
module tb_div_datapath;
  import stscan_pkg::*;
  localparam int W = 8, DELAY = 2, NC = 2 + 2 * W;
  logic [W-1:0] n, d, quo, rem;
  logic r_sel, q_sel, d_req, d_ack, r_req, r_ack, q_req, q_ack, nr_req, nr_ack, nq_req, nq_ack, si, so;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  div_datapath #(.W(W), .DELAY(DELAY)) dut (
    .dividend(n), .divisor(d), .r_sel(r_sel), .q_sel(q_sel), .d_req(d_req), .d_ack(d_ack),
    .r_req(r_req), .r_ack(r_ack), .q_req(q_req), .q_ack(q_ack), .nr_req(nr_req), .nr_ack(nr_ack),
    .nq_req(nq_req), .nq_ack(nq_ack), .quotient(quo), .remainder(rem), .si(si), .so(so), .ctl(ctl));

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
    int nn, dd, rr, qq;
    logic [NC-1:0] p, o;
    ctl = '{1, 1, 1, 1}; si = 0;
    {d_req, r_req, q_req, nr_req, nq_req, r_sel, q_sel} = '0; n = '0; d = 1; #5;
    ctl = SCAN_OFF; #5;
    for (int k = 0; k < 100; k++) begin
      nn = int'($urandom_range(0, 255)); dd = int'($urandom_range(1, 255));
      n = W'(nn); d = W'(dd); r_sel = 0; q_sel = 0; #1;
      d_req = ~d_req; r_req = ~r_req; q_req = ~q_req;
      wait (d_ack == d_req && r_ack == r_req && q_ack == q_req); #1;
      check(rem == 0 && quo == W'(nn), "load");
      rr = 0; qq = nn;
      for (int it = 0; it < W; it++) begin
        int t;
        nr_req = ~nr_req; nq_req = ~nq_req;
        wait (nr_ack == nr_req && nq_ack == nq_req); #1;
        r_sel = 1; q_sel = 1; #1;
        r_req = ~r_req; q_req = ~q_req;
        wait (r_ack == r_req && q_ack == q_req); #1;
        r_sel = 0; q_sel = 0; #1;
        t = rr * 2 + ((qq >> (W - 1)) & 1);
        qq = (qq << 1) & 255;
        if (t >= dd) begin rr = t - dd; qq |= 1; end else rr = t;
        check(int'(rem) == rr && int'(quo) == qq, $sformatf("iteration %0d of %0d/%0d", it, nn, dd));
      end
      check(int'(quo) == nn / dd && int'(rem) == nn % dd, $sformatf("%0d / %0d", nn, dd));
    end
    ctl = '{1, 1, 0, 0};
    for (int k = 0; k < 10; k++) begin
      p = NC'({$urandom, $urandom});
      for (int i = NC - 1; i >= 0; i--) begin si = p[i]; #1; clk(); end
      check(r_ack == p[0] && q_ack == p[1], "R and Q delay latches lead the chain");
      for (int i = NC - 1; i >= 0; i--) begin o[i] = so; si = 0; #1; clk(); end
      check(o == p, "scan path returns pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
