// Testbench of the testable C-element: exhaustive normal-mode transitions
// against a next-state table, OR mode (ctest), AND mode after clear, clear
// dominance, and the feedback test (OR mode with 01/10, then ctest dropped:
// output must stay 1).
`timescale 1ns/1ps
module tb_celement_t;
  logic a, b, clr, ctest, z;
  logic model;
  int checks = 0, failures = 0;

  celement_t dut (.a(a), .b(b), .clr(clr), .ctest(ctest), .z(z));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; ctest = 0; clr = 1; #1; clr = 0; #1;
    model = 0;
    check(z == 0, "cleared");
    // Normal mode: random walk, model = majority(a, b, model).
    for (int i = 0; i < 500; i++) begin
      a = 1'($urandom); b = 1'($urandom); #1;
      model = (a & b) | (model & (a | b));
      check(z == model, $sformatf("normal a=%0d b=%0d z=%0d exp=%0d", a, b, z, model));
    end
    // OR mode: z = a | b, whatever the state was.
    ctest = 1;
    for (int i = 0; i < 100; i++) begin
      a = 1'($urandom); b = 1'($urandom); #1;
      check(z == (a | b), $sformatf("OR mode a=%0d b=%0d z=%0d", a, b, z));
    end
    ctest = 0;
    // AND mode: clear with inputs applied, release, z = a & b.
    for (int i = 0; i < 4; i++) begin
      clr = 1; a = i[0]; b = i[1]; #1;
      check(z == 0, "clear dominates");
      clr = 0; #1;
      check(z == (a & b), $sformatf("AND mode a=%0d b=%0d z=%0d", a, b, z));
    end
    // Feedback test: OR mode with 01 or 10, drop ctest, z must hold 1.
    for (int i = 1; i < 3; i++) begin
      clr = 1; #1; clr = 0; ctest = 1; a = i[0]; b = i[1]; #1;
      check(z == 1, "feedback test: OR mode output 1");
      ctest = 0; #1;
      check(z == 1, "feedback test: state held after ctest dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
