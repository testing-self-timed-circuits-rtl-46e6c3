// Testbench of the TLNO: transparent exactly when c != p (test low), held
// otherwise; with test high it is transparent when c == p.
`timescale 1ns/1ps
module tb_tlno;
  localparam int W = 8;
  logic c, p, test;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0, n_open = 0, n_hold = 0;

  tlno #(.W(W)) dut (.c(c), .p(p), .test(test), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = 1; p = 0; test = 0; d = 8'h5a; #1;
    model = 8'h5a;
    for (int i = 0; i < 500; i++) begin
      c = 1'($urandom); p = 1'($urandom); test = (i > 250) ? 1'($urandom) : 1'b0;
      d = W'($urandom); #1;
      if ((c ^ test) != p) begin model = d; n_open++; end else n_hold++;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL: c=%0d p=%0d test=%0d d=%h q=%h exp=%h", c, p, test, d, q, model);
      end
    end
    checks++;
    if (n_open == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
