// End-to-end testbench of the self-timed GCD with partial scan, at the
// default parameters (W = 8, DELAY = 2 ns).
//
// Normal mode: random non-zero operand pairs (plus equal pairs and
// extreme pairs) are handed over with a go transition; each result is
// compared with Euclid's algorithm computed here, and the go-to-done time
// is checked against DELAY * (1 + 2 * number of subtractions): one register
// write for the load, and an R write plus an A or B write per subtraction.
// Test mode, with the scan path of 7 + W cells:
//   - shift integrity: a random pattern shifted in comes back out unchanged;
//   - data path capture (C-elements cleared, AND mode);
//   - control path test with the C-elements in OR mode (ctest);
//   - control path test in AND mode (clr held during scan-in, then released);
//   - C-element feedback test (OR mode, then ctest dropped: states hold).
// For each capture the expected contents of all scan cells are computed here
// from the scanned-in values and the operands, by the XOR/AND/OR equations
// of the network, and compared with what is shifted out.
// Finally the circuit is reset through the scan path and runs GCDs again.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
`timescale 1ns/1ps
module tb_gcd_top;
  import stscan_pkg::*;

  localparam int W     = 8;
  localparam int DELAY = 2;
  localparam int NC    = 7 + W;   // scan cells

  logic         go, done, clr, ctest, scan_in, scan_out;
  logic [W-1:0] x, y, result;
  scan_ctl_t    ctl;

  gcd_top dut (.go(go), .done(done), .x(x), .y(y), .result(result), .clr(clr),
               .ctest(ctest), .ctl(ctl), .scan_in(scan_in), .scan_out(scan_out));

  int checks = 0, failures = 0;
  int n_iter = 0, n_upd_a = 0, n_upd_b = 0, n_zero_iter = 0, n_gcd = 0;
  int n_shift = 0, n_chain = 0, n_cap_dp = 0, n_cap_or = 0, n_cap_and = 0, n_cap_fb = 0;

  always @(dut.r_req) if (!ctl.test1 && !ctl.test2) n_iter++;
  always @(dut.u_ctrl.t_upd_a) if (!ctl.test1 && !ctl.test2) n_upd_a++;
  always @(dut.u_ctrl.t_upd_b) if (!ctl.test1 && !ctl.test2) n_upd_b++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- scan helpers ----------------
  task automatic scan_clock();
    ctl.p1 = 1'b1; #1; ctl.p1 = 1'b0; #1;
    ctl.p2 = 1'b1; #1; ctl.p2 = 1'b0; #1;
    n_shift++;
  endtask

  // Shift vin in while reading the previous contents out (cell i -> bit i).
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
    // Move the captured master values into the slaves before shifting.
    ctl.p2 = 1'b1; #1; ctl.p2 = 1'b0; #1;
  endtask

  // ---------------- reference models ----------------
  function automatic int gcd_ref(input int a, input int b, output int iters);
    iters = 0;
    while (a != b) begin
      if (a > b) a = a - b; else b = b - a;
      iters++;
    end
    return a;
  endfunction

  // mode: 0 = C-elements cleared (clr held), 1 = OR mode, 2 = AND mode
  // (cleared during scan-in, then released). A and B are assumed transparent
  // (the caller sets cells 4 and 5 accordingly).
  function automatic logic [NC-1:0] expect_cap(input logic [NC-1:0] c, input int mode,
                                               input logic g, input logic [W-1:0] xv,
                                               input logic [W-1:0] yv);
    logic a_req, b_req, a1, a2, b1, b2, loaded, iter, test, a_sel, b_sel, ne, gt;
    logic [W-1:0] av, bv, rv, diff;
    logic [NC-1:0] e;
    a_req = g ^ c[2];
    b_req = g ^ c[3];
    case (mode)
      1: begin
        a1 = g    | (c[4] ^ c[2]);  a2 = c[2] | (c[4] ^ g);
        b1 = g    | (c[5] ^ c[3]);  b2 = c[3] | (c[5] ^ g);
        loaded = a1 | b1;
      end
      2: begin
        a1 = g    & (c[4] ^ c[2]);  a2 = c[2] & (c[4] ^ g);
        b1 = g    & (c[5] ^ c[3]);  b2 = c[3] & (c[5] ^ g);
        loaded = a1 & b1;
      end
      default: begin
        a1 = 0; a2 = 0; b1 = 0; b2 = 0; loaded = 0;
      end
    endcase
    iter  = a2 ^ b2;
    test  = loaded ^ iter;
    a_sel = c[2] ^ a2;
    b_sel = c[3] ^ b2;
    rv    = c[NC-1:7];
    av    = a_sel ? rv : xv;
    bv    = b_sel ? rv : yv;
    ne    = av != bv;
    gt    = av > bv;
    diff  = gt ? av - bv : bv - av;
    e[0]  = ne  ? (test ^ c[1]) : c[0];
    e[1]  = !ne ? (test ^ c[0]) : c[1];
    e[2]  = gt  ? (c[6] ^ c[3]) : c[2];
    e[3]  = !gt ? (c[6] ^ c[2]) : c[3];
    e[4]  = a_req;
    e[5]  = b_req;
    e[6]  = c[0];
    e[NC-1:7] = diff;
    return e;
  endfunction

  // Random scan vector with cells 4/5 set so that A and B are transparent
  // (TLNO open with test asserted when C == P).
  function automatic logic [NC-1:0] rand_vec(input logic g);
    logic [NC-1:0] v;
    v = NC'({$urandom, $urandom});
    v[4] = g ^ v[2];
    v[5] = g ^ v[3];
    return v;
  endfunction

  // ---------------- normal operation ----------------
  task automatic normal_reset();
    clr = 1'b1; ctest = 1'b0; go = 1'b0;
    scan_reset();
    ctl = SCAN_OFF;
    #(4 * DELAY);
    clr = 1'b0;
    #(4 * DELAY);
  endtask

  task automatic run_gcd(input int a, input int b);
    int exp_g, iters, it0, t0, t1;
    logic d0;
    x = W'(a); y = W'(b);
    #1;
    d0  = done;
    it0 = n_iter;
    t0  = int'($time);
    go  = ~go;
    wait (done != d0);
    t1 = int'($time);
    #1;
    exp_g = gcd_ref(a, b, iters);
    check(int'(result) == exp_g, $sformatf("gcd(%0d,%0d) = %0d, expected %0d", a, b, result, exp_g));
    check(n_iter - it0 == iters, $sformatf("gcd(%0d,%0d): %0d subtractions, expected %0d", a, b, n_iter - it0, iters));
    check(t1 - t0 == DELAY * (1 + 2 * iters),
          $sformatf("gcd(%0d,%0d): latency %0d ns, expected %0d", a, b, t1 - t0, DELAY * (1 + 2 * iters)));
    if (iters == 0) n_zero_iter++;
    n_gcd++;
  endtask

  // ---------------- test-mode procedures ----------------
  task automatic chain_test();
    logic [NC-1:0] p, q, o;
    p = NC'({$urandom, $urandom});
    q = NC'({$urandom, $urandom});
    scan_vec(p, o);
    scan_vec(q, o);
    check(o == p, $sformatf("scan chain returned %h, shifted in %h", o, p));
    scan_vec(p, o);
    check(o == q, $sformatf("scan chain returned %h, shifted in %h", o, q));
    n_chain++;
  endtask

  task automatic cap_test(input int mode);
    logic [NC-1:0] c, o, e;
    logic g;
    g = 1'($urandom);
    c = rand_vec(g);
    x = W'($urandom); y = W'($urandom);
    ctest = 1'b0;
    clr   = 1'b1;                 // C-elements to 0 while scanning in
    go    = 1'b0;
    scan_vec(c, o);
    go = g;
    #2;
    case (mode)
      0: ;                        // keep clr: C-elements held at 0
      1: begin clr = 1'b0; ctest = 1'b1; end
      2: clr = 1'b0;
      3: begin clr = 1'b0; ctest = 1'b1; #(2 * DELAY); ctest = 1'b0; end
      default: ;
    endcase
    #(2 * DELAY);
    capture();
    e = expect_cap(c, (mode == 3) ? 1 : mode, g, x, y);
    scan_vec(NC'(0), o);
    check(o == e, $sformatf("capture mode %0d: got %h expected %h (scanned %h, go %0d, x %0d, y %0d)",
                            mode, o, e, c, g, x, y));
    case (mode)
      0: n_cap_dp++;
      1: n_cap_or++;
      2: n_cap_and++;
      default: n_cap_fb++;
    endcase
    ctest = 1'b0;
    clr   = 1'b1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    ctl = SCAN_OFF; scan_in = 1'b0; x = '0; y = '0;
    normal_reset();
    // Directed cases: equal operands, extremes, one of 1.
    run_gcd(12, 12);
    run_gcd(255, 1);
    run_gcd(1, 255);
    run_gcd(48, 18);
    run_gcd(17, 13);
    for (int i = 0; i < 200; i++) begin
      a = int'($urandom_range(1, (1 << W) - 1));
      b = (i % 10 == 0) ? a : int'($urandom_range(1, (1 << W) - 1));
      run_gcd(a, b);
    end

    // Test mode.
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b0, p2: 1'b0};
    for (int i = 0; i < 10; i++) chain_test();
    for (int i = 0; i < 40; i++) begin
      cap_test(0);
      cap_test(1);
      cap_test(2);
      cap_test(3);
    end

    // Back to normal operation.
    go = 1'b0;
    normal_reset();
    for (int i = 0; i < 30; i++)
      run_gcd(int'($urandom_range(1, (1 << W) - 1)), int'($urandom_range(1, (1 << W) - 1)));

    $display("mechanisms: gcd=%0d subtractions=%0d A-updates=%0d B-updates=%0d no-loop=%0d shifts=%0d chain=%0d dp-capture=%0d or-mode=%0d and-mode=%0d feedback=%0d",
             n_gcd, n_iter, n_upd_a, n_upd_b, n_zero_iter, n_shift, n_chain, n_cap_dp, n_cap_or, n_cap_and, n_cap_fb);
    check(n_iter > 0 && n_upd_a > 0 && n_upd_b > 0 && n_zero_iter > 0, "loop mechanisms exercised");
    check(n_chain > 0 && n_cap_dp > 0 && n_cap_or > 0 && n_cap_and > 0 && n_cap_fb > 0, "test mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
