// Testbench of the self-timed register (both data latch variants): a write
// request with stable data is acknowledged DELAY ns later, q holds the
// written word afterwards even when d changes; in test mode the plain
// variant is transparent (with C == P) and the scanned variant's data bits
// follow the delay latch in the scan path (or stand alone without it).
`timescale 1ns/1ps
module tb_st_register;
  import stscan_pkg::*;
  localparam int W = 8, DELAY = 2;
  logic req, ack0, ack1, si, so0, so1;
  logic [W-1:0] d, q0, q1;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b0)) dut0 (
    .req(req), .ack(ack0), .d(d), .q(q0), .si(si), .so(so0), .ctl(ctl));
  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b1)) dut1 (
    .req(req), .ack(ack1), .d(d), .q(q1), .si(si), .so(so1), .ctl(ctl));
  // Bare delay, scanned data (no scan latch on the acknowledge).
  logic ack2, so2;
  logic [W-1:0] q2;
  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b1), .SCAN_ACK(1'b0)) dut2 (
    .req(req), .ack(ack2), .d(d), .q(q2), .si(si), .so(so2), .ctl(ctl));

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
    logic [W-1:0] v;
    logic [W:0] sv, o;
    int t0;
    ctl = '{1, 1, 1, 1}; si = 0; req = 0; d = '0; #5;
    ctl = SCAN_OFF; #5;
    for (int k = 0; k < 100; k++) begin
      v = W'($urandom); d = v; #1;
      t0 = int'($time);
      req = ~req;
      wait (ack0 == req && ack1 == req && ack2 == req);
      check(int'($time) - t0 == DELAY, "acknowledge after DELAY");
      #1;
      d = ~v; #1;
      check(q0 == v && q1 == v && q2 == v, $sformatf("written %h, got %h/%h", v, q0, q1));
    end
    // Test mode.
    ctl = '{1, 1, 0, 0};
    sv = (W+1)'({$urandom, $urandom});
    for (int i = W; i >= 0; i--) begin si = sv[i]; #1; clk(); end
    #(DELAY + 1);
    check(ack0 == sv[0] && so0 == sv[0], "plain variant: delay latch is the only scan cell");
    check(ack1 == sv[0] && q1 == sv[W:1], "scanned variant: delay latch then data bits");
    check(q2 == sv[W-1:0] && ack2 == req, "bare-delay variant: data bits only, ack follows req");
    // Plain variant transparent when C == P.
    req = ack0; #(DELAY + 1);
    for (int k = 0; k < 10; k++) begin
      d = W'($urandom); #1;
      check(q0 == d, "plain variant transparent in test mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
