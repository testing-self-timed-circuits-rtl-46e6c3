// Testbench of the two-way Call. A behavioural resource acknowledges every
// rs transition after a random delay; random mutually exclusive calls from
// client 1 and client 2 must each get exactly one acknowledge, on their own
// line only. Then the C-element test modes are checked: OR mode
// (a1 = r1 | (as ^ r2), a2 = r2 | (as ^ r1)) and AND mode after clear.
`timescale 1ns/1ps
module tb_call2;
  logic r1, r2, a1, a2, rs, as, clr, ctest;
  logic drive_as, test_as;
  int checks = 0, failures = 0, n1 = 0, n2 = 0;

  call2 dut (.r1(r1), .r2(r2), .a1(a1), .a2(a2), .rs(rs), .as(as), .clr(clr), .ctest(ctest));

  // Resource: answers each request after 1..5 ns (or driven directly in test).
  logic as_beh;
  always @(rs) begin
    automatic logic v = rs;
    #($urandom_range(1, 5));
    as_beh = v;
  end
  assign as = drive_as ? test_as : as_beh;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pa1, pa2;
    int t0;
    r1 = 0; r2 = 0; as_beh = 0; drive_as = 0; test_as = 0; ctest = 0; clr = 1; #2; clr = 0; #1;
    for (int i = 0; i < 300; i++) begin
      pa1 = a1; pa2 = a2;
      if ($urandom % 2) begin
        r1 = ~r1;
        #1 check(a1 == pa1, "client 1 acknowledged before the resource answered");
        t0 = int'($time);
        fork
          wait (a1 != pa1);
          #100;
        join_any
        disable fork;
        check(a1 != pa1 && a2 == pa2 && rs == as, "client 1 call routed");
        n1++;
      end else begin
        r2 = ~r2;
        #1 check(a2 == pa2, "client 2 acknowledged before the resource answered");
        fork
          wait (a2 != pa2);
          #100;
        join_any
        disable fork;
        check(a2 != pa2 && a1 == pa1 && rs == as, "client 2 call routed");
        n2++;
      end
      #1;
    end
    check(n1 > 0 && n2 > 0, "both clients used");
    // OR mode.
    drive_as = 1; ctest = 1;
    for (int i = 0; i < 8; i++) begin
      {r1, r2, test_as} = 3'(i); #1;
      check(a1 == (r1 | (test_as ^ r2)) && a2 == (r2 | (test_as ^ r1)) && rs == (r1 ^ r2), "OR mode");
    end
    // AND mode.
    ctest = 0;
    for (int i = 0; i < 8; i++) begin
      clr = 1; #1;
      {r1, r2, test_as} = 3'(i); #1;
      clr = 0; #1;
      check(a1 == (r1 & (test_as ^ r2)) && a2 == (r2 & (test_as ^ r1)), "AND mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
