// Testbench of the GCD data path. The control sequence is driven directly:
// load A and B from x and y, write R (= |A - B|), write A or B back from R,
// checking the acknowledge delay, the comparison outputs and the result
// against values computed here. Then the 3 + W cell scan path is shifted,
// and a capture shows R's masters taking |A - B| with A and B transparent.
`timescale 1ns/1ps
module tb_gcd_datapath;
  import stscan_pkg::*;
  localparam int W = 8, DELAY = 2, NC = 3 + W;
  logic [W-1:0] x, y, result;
  logic a_sel, b_sel, a_req, a_ack, b_req, b_ack, r_req, r_ack, ne, gt, si, so;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  gcd_datapath #(.W(W), .DELAY(DELAY)) dut (
    .x(x), .y(y), .a_sel(a_sel), .b_sel(b_sel), .a_req(a_req), .a_ack(a_ack),
    .b_req(b_req), .b_ack(b_ack), .r_req(r_req), .r_ack(r_ack), .ne(ne), .gt(gt),
    .result(result), .si(si), .so(so), .ctl(ctl));

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
    logic [W-1:0] av, bv, rv;
    logic [NC-1:0] p, o;
    int t0;
    ctl = '{1, 1, 1, 1}; si = 0; a_req = 0; b_req = 0; r_req = 0; a_sel = 0; b_sel = 0;
    x = '0; y = '0; #5;
    ctl = SCAN_OFF; #5;
    for (int k = 0; k < 100; k++) begin
      av = W'($urandom); bv = W'($urandom);
      x = av; y = bv; a_sel = 0; b_sel = 0; #1;
      t0 = int'($time);
      a_req = ~a_req; b_req = ~b_req;
      wait (a_ack == a_req && b_ack == b_req);
      check(int'($time) - t0 == DELAY, "load acknowledged after DELAY");
      x = ~x; y = ~y; #1;
      check(result == av && ne == (av != bv) && gt == (av > bv), "load, comparisons");
      rv = (av > bv) ? av - bv : bv - av;
      r_req = ~r_req; wait (r_ack == r_req); #1;
      if (k % 2) begin
        a_sel = 1; #1; a_req = ~a_req; wait (a_ack == a_req); #1; a_sel = 0; #1;
        check(result == rv, $sformatf("A <- R: %h expected %h", result, rv));
        check(ne == (rv != bv) && gt == (rv > bv), "comparisons after update");
      end else begin
        b_sel = 1; #1; b_req = ~b_req; wait (b_ack == b_req); #1; b_sel = 0; #1;
        check(ne == (av != rv) && gt == (av > rv), "comparisons after B <- R");
      end
    end
    // Scan path integrity.
    ctl = '{1, 1, 0, 0};
    p = NC'({$urandom, $urandom});
    for (int i = NC - 1; i >= 0; i--) begin si = p[i]; #1; clk(); end
    check(a_ack == p[0] && b_ack == p[1] && r_ack == p[2], "delay latches in scan order");
    for (int i = NC - 1; i >= 0; i--) begin o[i] = so; si = 0; #1; clk(); end
    check(o == p, "scan path returns pattern");
    // Capture: A, B transparent (C == P), selects from x, y.
    for (int k = 0; k < 20; k++) begin
      av = W'($urandom); bv = W'($urandom); x = av; y = bv;
      p = '0; p[0] = a_req; p[1] = b_req; p[2] = r_req;
      for (int i = NC - 1; i >= 0; i--) begin si = p[i]; #1; clk(); end
      #(DELAY + 1);
      check(result == av, "A transparent in test mode");
      ctl.test1 = 0; #(DELAY + 1); ctl.test1 = 1; #1; ctl.p2 = 1; #1; ctl.p2 = 0; #1;
      for (int i = NC - 1; i >= 0; i--) begin o[i] = so; si = 0; #1; clk(); end
      check(o[NC-1:3] == ((av > bv) ? av - bv : bv - av), "R captured |A - B|");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
