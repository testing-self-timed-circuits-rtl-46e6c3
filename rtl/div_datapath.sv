// Data path of the self-timed serial divider (restoring division).
//
// Five W-bit self-timed registers: D (divisor), R (partial remainder),
// Q (dividend shifting out, quotient shifting in), and the two next-value
// registers NR and NQ. One iteration writes NR and NQ from R, Q and D, then
// writes R and Q back from NR and NQ:
//   t  = {R, Q[W-1]}               (W+1 bits: remainder shifted left)
//   ge = t >= D
//   NR = ge ? t - D : t            (fits in W bits because R < D)
//   NQ = {Q[W-2:0], ge}
// After W iterations Q holds the quotient and R the remainder. R and Q are
// loaded (0 and the dividend) through multiplexers selected by the control
// path (r_sel, q_sel: 1 = from NR/NQ).
//
// Partial scan: every data-path cycle (R -> NR -> R, Q -> NQ -> Q,
// Q -> NR -> R) passes through NR or NQ, so those two are the scanned data
// latches; D, R and Q are TLNOs that go transparent in test mode. R and Q
// are shared by two writers through Calls in the control path, so their
// delay elements carry scan latches; D, NR and NQ use bare delays.
// Scan order: si -> R delay latch -> Q delay latch -> NR[0..W-1]
// -> NQ[0..W-1] -> so  (2 + 2W cells).
// Ports: dividend, divisor operands; r_sel, q_sel selects; d/r/q/nr/nq
// req and ack; quotient (= Q), remainder (= R); si, so, ctl scan.
// Timing: every ack follows its req after DELAY ns.
// Tool notes: latches and the register cycles are reported as latches and
// circular logic; they are intended and broken at run time by the
// handshake (NR/NQ closed while R/Q are open and vice versa).
`timescale 1ns/1ps
module div_datapath
  import stscan_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned DELAY = 2
) (
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  input  logic         r_sel,
  input  logic         q_sel,
  input  logic         d_req,
  output logic         d_ack,
  input  logic         r_req,
  output logic         r_ack,
  input  logic         q_req,
  output logic         q_ack,
  input  logic         nr_req,
  output logic         nr_ack,
  input  logic         nq_req,
  output logic         nq_ack,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder,
  input  logic         si,
  output logic         so,
  input  scan_ctl_t    ctl
);

  logic [W-1:0] d_q, r_q, q_q, nr_q, nq_q, r_d, q_d, nr_d, nq_d;
  logic [W:0]   t;
  logic [W-1:0] t_sub;
  logic         ge;
  logic         so_d, so_r, so_q, so_nr;

  assign t     = {r_q, q_q[W-1]};
  assign ge    = t >= {1'b0, d_q};
  assign t_sub = W'(t - {1'b0, d_q});
  assign nr_d  = ge ? t_sub : t[W-1:0];
  assign nq_d  = {q_q[W-2:0], ge};
  assign r_d   = r_sel ? nr_q : '0;
  assign q_d   = q_sel ? nq_q : dividend;

  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b0), .SCAN_ACK(1'b0)) u_reg_d (
    .req(d_req), .ack(d_ack), .d(divisor), .q(d_q), .si(si), .so(so_d), .ctl(ctl));
  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b0), .SCAN_ACK(1'b1)) u_reg_r (
    .req(r_req), .ack(r_ack), .d(r_d), .q(r_q), .si(so_d), .so(so_r), .ctl(ctl));
  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b0), .SCAN_ACK(1'b1)) u_reg_q (
    .req(q_req), .ack(q_ack), .d(q_d), .q(q_q), .si(so_r), .so(so_q), .ctl(ctl));
  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b1), .SCAN_ACK(1'b0)) u_reg_nr (
    .req(nr_req), .ack(nr_ack), .d(nr_d), .q(nr_q), .si(so_q), .so(so_nr), .ctl(ctl));
  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b1), .SCAN_ACK(1'b0)) u_reg_nq (
    .req(nq_req), .ack(nq_ack), .d(nq_d), .q(nq_q), .si(so_nr), .so(so), .ctl(ctl));

  assign quotient  = q_q;
  assign remainder = r_q;

endmodule
