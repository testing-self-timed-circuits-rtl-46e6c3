// Control path of the self-timed GCD circuit, built from macromodules.
//
// Behaviour (Euclid by repeated subtraction):
//   go:  load A <- x and B <- y in parallel;
//   loop: while (A != B) { R <- |A - B|; if (A > B) A <- R else B <- R; }
//   done <- transition (result is A).
// Network, all signals two-phase transitions:
//   call A  (call2): client 1 = go (load), client 2 = t_upd_a (update);
//   call B  (call2): client 1 = go (load), client 2 = t_upd_b (update);
//   join    (C-element): both loads acknowledged -> t_loaded;
//   merge   (XOR): A or B update acknowledged -> t_iter;
//   merge   (XOR): t_loaded or t_iter -> t_test;
//   select 1 (sel = ne): true -> R request, false -> done;
//   select 2 (sel = gt, on R's acknowledge): true -> update A, false -> B.
// The data path multiplexer selects are "client 2 of the Call has a call
// outstanding": a_sel = t_upd_a ^ a_upd_ack, likewise for B.
//
// Partial scan: the four latches of the two Selects are in the scan path
// (si -> select 1 -> select 2 -> so); the Calls and the join form an
// XOR/C-element network tested through ctest (OR mode) and clr (AND mode).
// Every loop of the network passes through select 1, so no C-element needs
// to be made scannable. The registers' scannable delay latches, which make
// the Calls' AS lines controllable, sit in the data path module.
//
// Ports: go/done environment handshake; ne, gt SEL inputs; a/b/r req and
// ack; a_sel, b_sel mux selects; clr, ctest C-element controls; si, so,
// ctl scan. The macromodule set and the scan treatment of each module
// follow the partial scan method; the particular GCD network is this
// design's own.
// Tool notes: a self-timed control network has latches and loops by
// nature; the circular-logic warnings on it are the intended handshake
// feedback, and every loop passes through an opaque latch at rest.
`timescale 1ns/1ps
module gcd_control
  import stscan_pkg::*;
(
  input  logic      go,
  output logic      done,
  input  logic      ne,
  input  logic      gt,
  output logic      a_req,
  input  logic      a_ack,
  output logic      b_req,
  input  logic      b_ack,
  output logic      r_req,
  input  logic      r_ack,
  output logic      a_sel,
  output logic      b_sel,
  input  logic      clr,
  input  logic      ctest,
  input  logic      si,
  output logic      so,
  input  scan_ctl_t ctl
);

  logic a_ld_ack, b_ld_ack, a_upd_ack, b_upd_ack;
  logic t_upd_a, t_upd_b, t_loaded, t_iter, t_test;
  logic so_sel1;

  call2 u_call_a (.r1(go), .r2(t_upd_a), .a1(a_ld_ack), .a2(a_upd_ack),
                  .rs(a_req), .as(a_ack), .clr(clr), .ctest(ctest));
  call2 u_call_b (.r1(go), .r2(t_upd_b), .a1(b_ld_ack), .a2(b_upd_ack),
                  .rs(b_req), .as(b_ack), .clr(clr), .ctest(ctest));

  celement_t u_join   (.a(a_ld_ack), .b(b_ld_ack), .clr(clr), .ctest(ctest), .z(t_loaded));
  xor_merge  u_m_iter (.a(a_upd_ack), .b(b_upd_ack), .z(t_iter));
  xor_merge  u_m_test (.a(t_loaded), .b(t_iter), .z(t_test));

  select_scan u_sel_ne (.in(t_test), .sel(ne), .out_t(r_req),   .out_f(done),
                        .si(si), .so(so_sel1), .ctl(ctl));
  select_scan u_sel_gt (.in(r_ack),  .sel(gt), .out_t(t_upd_a), .out_f(t_upd_b),
                        .si(so_sel1), .so(so), .ctl(ctl));

  assign a_sel = t_upd_a ^ a_upd_ack;
  assign b_sel = t_upd_b ^ b_upd_ack;

endmodule
