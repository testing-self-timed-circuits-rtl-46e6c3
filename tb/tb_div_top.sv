// End-to-end testbench of the self-timed serial divider with partial scan,
// at the default parameters (W = 8, DELAY = 2 ns).
//
// Normal mode: random dividend/divisor pairs (divisor non-zero, plus
// directed extremes) are divided; quotient and remainder are compared with
// integer division, the number of iterations with W, and the go-to-done time
// with DELAY * (1 + 2W). Runs back to back check that the Toggle counter
// returns to its start state by itself.
// Test mode, scan path of 7 + 2W cells (6 Toggle latches, the scannable
// join, the R and Q delay latches, NR, NQ):
//   shift integrity; capture with the C-elements cleared, in OR mode, in
//   AND mode, and the feedback test (OR mode then ctest dropped). For each
//   capture the expected contents of all cells are computed here from the
//   scanned-in values by the network's equations.
`timescale 1ns/1ps
module tb_div_top;
  import stscan_pkg::*;

  localparam int W     = 8;
  localparam int DELAY = 2;
  localparam int NT    = $clog2(W);
  localparam int NCC   = 2 * NT + 1;      // control cells
  localparam int NC    = NCC + 2 + 2 * W; // all cells
  localparam int IR    = NCC;             // R delay latch
  localparam int IQ    = NCC + 1;         // Q delay latch
  localparam int INR   = NCC + 2;         // NR bit 0
  localparam int INQ   = NCC + 2 + W;     // NQ bit 0

  logic         go, done, clr, ctest, scan_in, scan_out;
  logic [W-1:0] dividend, divisor, quotient, remainder;
  scan_ctl_t    ctl;

  div_top dut (.go(go), .done(done), .dividend(dividend), .divisor(divisor),
               .quotient(quotient), .remainder(remainder), .clr(clr), .ctest(ctest),
               .ctl(ctl), .scan_in(scan_in), .scan_out(scan_out));

  int checks = 0, failures = 0;
  int n_div = 0, n_iter = 0, n_restore = 0, n_subtract = 0, n_fin = 0;
  int n_chain = 0, n_cap[4] = '{0, 0, 0, 0};

  always @(dut.u_ctrl.t_iter) if (!ctl.test1 && !ctl.test2) n_iter++;
  always @(dut.u_ctrl.done) if (!ctl.test1 && !ctl.test2) n_fin++;
  always @(dut.nr_req) if (!ctl.test1 && !ctl.test2) begin
    if (dut.u_dp.ge) n_subtract++; else n_restore++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan_clock();
    ctl.p1 = 1'b1; #1; ctl.p1 = 1'b0; #1;
    ctl.p2 = 1'b1; #1; ctl.p2 = 1'b0; #1;
  endtask

  task automatic scan_vec(input logic [NC-1:0] vin, output logic [NC-1:0] vout);
    ctl.test1 = 1'b1; ctl.test2 = 1'b1;
    for (int i = NC - 1; i >= 0; i--) begin
      vout[i] = scan_out;
      scan_in = vin[i];
      #1;
      scan_clock();
    end
  endtask

  task automatic scan_reset();
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b1, p2: 1'b1};
    scan_in = 1'b0;
    #(NC + 5);
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b0, p2: 1'b0};
    #2;
  endtask

  task automatic capture();
    ctl.test1 = 1'b0;
    #(4 * DELAY + 4);
    ctl.test1 = 1'b1;
    #1;
    ctl.p2 = 1'b1; #1; ctl.p2 = 1'b0; #1;
  endtask

  task automatic normal_reset();
    clr = 1'b1; ctest = 1'b0; go = 1'b0;
    scan_reset();
    ctl = SCAN_OFF;
    #(4 * DELAY);
    clr = 1'b0;
    #(4 * DELAY);
  endtask

  task automatic run_div(input int n, input int d);
    int t0, t1, it0;
    logic d0;
    dividend = W'(n); divisor = W'(d);
    #1;
    d0 = done; it0 = n_iter; t0 = int'($time);
    go = ~go;
    wait (done != d0);
    t1 = int'($time);
    #1;
    check(int'(quotient) == n / d && int'(remainder) == n % d,
          $sformatf("%0d / %0d: got q=%0d r=%0d", n, d, quotient, remainder));
    check(n_iter - it0 == W, $sformatf("%0d / %0d: %0d iterations", n, d, n_iter - it0));
    check(t1 - t0 == DELAY * (1 + 2 * W), $sformatf("%0d / %0d: latency %0d ns", n, d, t1 - t0));
    n_div++;
  endtask

  function automatic logic op(input int mode, input logic a, input logic b);
    case (mode)
      1: return a | b;
      2: return a & b;
      default: return 1'b0;
    endcase
  endfunction

  // mode: 0 = C-elements cleared, 1 = OR mode, 2 = AND mode.
  // Cells IR and IQ must equal g ^ c[NCC-1] so that R and Q are transparent.
  function automatic logic [NC-1:0] expect_cap(input logic [NC-1:0] c, input int mode,
                                               input logic g, input logic [W-1:0] nv,
                                               input logic [W-1:0] dv);
    logic t_upd, a1r, a2r, a1q, a2q, ld, loaded, cont, step, iter, r_sel, q_sel, ge, in_k;
    logic [W-1:0] rv, qv, nrv, nqv, nr_d, nq_d;
    logic [W:0] t;
    logic [NC-1:0] e;
    t_upd  = c[NCC-1];
    a1r    = op(mode, g, c[IR] ^ t_upd);
    a2r    = op(mode, t_upd, c[IR] ^ g);
    a1q    = op(mode, g, c[IQ] ^ t_upd);
    a2q    = op(mode, t_upd, c[IQ] ^ g);
    ld     = op(mode, a1r, a1q);
    loaded = op(mode, ld, g);
    iter   = op(mode, a2r, a2q);
    cont   = 1'b0;
    for (int k = 0; k < NT; k++) cont ^= c[2 * k];
    step   = loaded ^ cont;
    r_sel  = t_upd ^ a2r;
    q_sel  = t_upd ^ a2q;
    nrv    = c[INR +: W];
    nqv    = c[INQ +: W];
    rv     = r_sel ? nrv : '0;
    qv     = q_sel ? nqv : nv;
    t      = {rv, qv[W-1]};
    ge     = t >= {1'b0, dv};
    nr_d   = ge ? W'(t - {1'b0, dv}) : t[W-1:0];
    nq_d   = {qv[W-2:0], ge};
    for (int k = 0; k < NT; k++) begin
      in_k = (k == 0) ? iter : c[2 * k - 1];
      e[2 * k]     = in_k  ? ~c[2 * k + 1] : c[2 * k];
      e[2 * k + 1] = !in_k ? c[2 * k]      : c[2 * k + 1];
    end
    e[NCC-1]     = step;          // scannable join: both inputs equal step
    e[IR]        = g ^ t_upd;
    e[IQ]        = g ^ t_upd;
    e[INR +: W]  = nr_d;
    e[INQ +: W]  = nq_d;
    return e;
  endfunction

  task automatic chain_test();
    logic [NC-1:0] p, q, o;
    p = NC'({$urandom, $urandom});
    q = NC'({$urandom, $urandom});
    scan_vec(p, o);
    scan_vec(q, o);
    check(o == p, $sformatf("scan chain returned %h, shifted in %h", o, p));
    n_chain++;
  endtask

  task automatic cap_test(input int mode);
    logic [NC-1:0] c, o, e;
    logic g;
    g = 1'($urandom);
    c = NC'({$urandom, $urandom});
    c[IR] = g ^ c[NCC-1];
    c[IQ] = g ^ c[NCC-1];
    dividend = W'($urandom); divisor = W'($urandom);
    ctest = 1'b0; clr = 1'b1; go = 1'b0;
    scan_vec(c, o);
    go = g;
    #2;
    case (mode)
      0: ;
      1: begin clr = 1'b0; ctest = 1'b1; end
      2: clr = 1'b0;
      default: begin clr = 1'b0; ctest = 1'b1; #(2 * DELAY); ctest = 1'b0; end
    endcase
    #(2 * DELAY);
    capture();
    e = expect_cap(c, (mode == 3) ? 1 : mode, g, dividend, divisor);
    scan_vec(NC'(0), o);
    check(o == e, $sformatf("capture mode %0d: got %h expected %h (scanned %h, go %0d, n %0d, d %0d)",
                            mode, o, e, c, g, dividend, divisor));
    n_cap[mode]++;
    ctest = 1'b0; clr = 1'b1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl = SCAN_OFF; scan_in = 1'b0; dividend = '0; divisor = 1;
    normal_reset();
    run_div(255, 1);
    run_div(255, 255);
    run_div(0, 7);
    run_div(100, 7);
    run_div(7, 100);
    run_div(128, 3);
    for (int i = 0; i < 200; i++)
      run_div(int'($urandom_range(0, (1 << W) - 1)), int'($urandom_range(1, (1 << W) - 1)));
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b0, p2: 1'b0};
    for (int i = 0; i < 10; i++) chain_test();
    for (int i = 0; i < 40; i++) for (int m = 0; m < 4; m++) cap_test(m);
    go = 1'b0;
    normal_reset();
    for (int i = 0; i < 30; i++)
      run_div(int'($urandom_range(0, (1 << W) - 1)), int'($urandom_range(1, (1 << W) - 1)));
    $display("mechanisms: divisions=%0d iterations=%0d subtract=%0d restore=%0d counter-finish=%0d chain=%0d dp-capture=%0d or-mode=%0d and-mode=%0d feedback=%0d",
             n_div, n_iter, n_subtract, n_restore, n_fin, n_chain, n_cap[0], n_cap[1], n_cap[2], n_cap[3]);
    check(n_iter > 0 && n_subtract > 0 && n_restore > 0 && n_fin > 0, "loop mechanisms exercised");
    check(n_chain > 0 && n_cap[0] > 0 && n_cap[1] > 0 && n_cap[2] > 0 && n_cap[3] > 0, "test mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
