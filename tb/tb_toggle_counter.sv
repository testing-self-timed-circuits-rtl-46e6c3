// Testbench of the Toggle counter (NT = 3): of every 8 input transitions,
// 7 come out on cont and the 8th on fin, over many rounds without reset;
// the 6 latches also shift as a scan register.
`timescale 1ns/1ps
module tb_toggle_counter;
  import stscan_pkg::*;
  localparam int NT = 3, N = 1 << NT, NC = 2 * NT;
  logic in, cont, fin, si, so;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  toggle_counter #(.NT(NT)) dut (.in(in), .cont(cont), .fin(fin), .si(si), .so(so), .ctl(ctl));

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
    logic pc, pf;
    logic [NC-1:0] p, o;
    in = 0;
    ctl = '{1, 1, 1, 1}; si = 0; #4;
    ctl = SCAN_OFF; #1;
    for (int r = 0; r < 20; r++) begin
      for (int k = 1; k <= N; k++) begin
        pc = cont; pf = fin;
        in = ~in; #1;
        if (k < N) check(cont != pc && fin == pf, $sformatf("round %0d transition %0d on cont", r, k));
        else       check(cont == pc && fin != pf, $sformatf("round %0d transition %0d on fin", r, k));
      end
    end
    ctl = '{1, 1, 0, 0};
    for (int k = 0; k < 10; k++) begin
      p = NC'($urandom);
      for (int i = NC - 1; i >= 0; i--) begin si = p[i]; #1; clk(); end
      for (int i = NC - 1; i >= 0; i--) begin o[i] = so; si = 0; #1; clk(); end
      check(o == p, "scan path returns pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
