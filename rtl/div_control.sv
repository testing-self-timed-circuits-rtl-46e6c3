// Control path of the self-timed serial divider, built from macromodules.
//
// Behaviour:
//   go:   load D <- divisor, R <- 0, Q <- dividend (in parallel);
//   loop W times: { NR, NQ <- next values (in parallel);
//                   R, Q <- NR, NQ (in parallel) }
//   done <- transition (quotient in Q, remainder in R).
// Network, two-phase transitions throughout:
//   call R, call Q (call2): client 1 = go (load), client 2 = t_upd (update);
//   D is requested by go directly (single writer);
//   C-elements join the three load acknowledges -> t_loaded;
//   XOR merges t_loaded and the counter's cont -> t_step, which requests
//   NR and NQ; a C-element joins their acknowledges -> t_upd;
//   a C-element joins the two update acknowledges -> t_iter;
//   a Toggle counter (toggle_counter, NT = log2 W Toggles) turns every
//   t_iter but the W-th into cont, and the W-th into done.
// Multiplexer selects: client 2 of each Call outstanding
// (r_sel = t_upd ^ r_upd_ack, q_sel = t_upd ^ q_upd_ack).
//
// Partial scan: the Toggles' latches are control-side scan latches. The
// loop t_upd -> Call (r2 -> a1) -> load join -> t_step -> NR/NQ delay ->
// t_upd contains no other scan latch, so the C-element joining the NR and
// NQ acknowledges is made scannable (celement_scan). Scan order:
// si -> Toggle 0 .. Toggle NT-1 -> scannable join -> so. The rest is an
// XOR/C-element network tested with ctest and clr; its other loops pass
// through a Toggle latch or the scannable delay latches of R and Q.
// Ports: go/done; d/r/q/nr/nq req and ack; r_sel, q_sel; clr, ctest; si,
// so, ctl. Parameter W: iterations (a power of two). The network is this
// design's own; its modules and their test treatment follow the partial
// scan method.
// Tool notes: latches and circular logic reported here are the intended
// asynchronous state and handshake loops.
`timescale 1ns/1ps
module div_control
  import stscan_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic      go,
  output logic      done,
  output logic      d_req,
  input  logic      d_ack,
  output logic      r_req,
  input  logic      r_ack,
  output logic      q_req,
  input  logic      q_ack,
  output logic      nr_req,
  input  logic      nr_ack,
  output logic      nq_req,
  input  logic      nq_ack,
  output logic      r_sel,
  output logic      q_sel,
  input  logic      clr,
  input  logic      ctest,
  input  logic      si,
  output logic      so,
  input  scan_ctl_t ctl
);

  localparam int unsigned NT = $clog2(W);

  logic r_ld_ack, q_ld_ack, r_upd_ack, q_upd_ack;
  logic t_ld_rq, t_loaded, t_step, t_upd, t_iter, t_cont;
  logic so_cnt;

  call2 u_call_r (.r1(go), .r2(t_upd), .a1(r_ld_ack), .a2(r_upd_ack),
                  .rs(r_req), .as(r_ack), .clr(clr), .ctest(ctest));
  call2 u_call_q (.r1(go), .r2(t_upd), .a1(q_ld_ack), .a2(q_upd_ack),
                  .rs(q_req), .as(q_ack), .clr(clr), .ctest(ctest));
  assign d_req = go;

  celement_t u_join_ld1 (.a(r_ld_ack), .b(q_ld_ack), .clr(clr), .ctest(ctest), .z(t_ld_rq));
  celement_t u_join_ld2 (.a(t_ld_rq),  .b(d_ack),    .clr(clr), .ctest(ctest), .z(t_loaded));
  xor_merge  u_m_step   (.a(t_loaded), .b(t_cont),   .z(t_step));
  assign nr_req = t_step;
  assign nq_req = t_step;
  // Scannable: breaks the loop t_upd -> Call -> t_loaded -> t_step -> t_upd.
  celement_scan u_join_nx (.a(nr_ack), .b(nq_ack), .z(t_upd), .si(so_cnt), .so(so), .ctl(ctl));
  celement_t u_join_up  (.a(r_upd_ack), .b(q_upd_ack), .clr(clr), .ctest(ctest), .z(t_iter));

  toggle_counter #(.NT(NT)) u_count (.in(t_iter), .cont(t_cont), .fin(done),
                                     .si(si), .so(so_cnt), .ctl(ctl));

  assign r_sel = t_upd ^ r_upd_ack;
  assign q_sel = t_upd ^ q_upd_ack;

endmodule
