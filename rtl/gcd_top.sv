// Self-timed GCD circuit with a single partial scan path (top level).
//
// A macromodule-based, two-phase, bundled-data implementation of Euclid's
// algorithm: a transition on go with operands x, y (stable from before go
// until done) starts the computation; a transition on done reports that
// result holds gcd(x, y). Operands must be non-zero (with a zero operand the
// subtraction loop never ends).
//
// The circuit is split as in the usual control/data organisation: the
// control path (gcd_control) drives the registers' requests and the data
// path multiplexer selects; the data path (gcd_datapath) returns the
// acknowledges and the comparison results that steer the control path's
// Select modules. One scan path runs through both:
//   scan_in -> Select(ne) out_t, out_f -> Select(gt) out_t, out_f
//           -> A delay latch -> B delay latch -> R delay latch
//           -> R[0] .. R[W-1] -> scan_out          (7 + W cells)
// Seven control-side scan latches and one of the three W-bit data latches
// are scanned; A and B go transparent in test mode.
//
// Test controls: ctl = {test1, test2, p1, p2} (scan mode, capture, scan
// clocks), ctest (C-elements in OR mode), clr (global clear; C-elements in
// AND mode). All must be low for normal operation, which is fully
// self-timed; the scan latches are reset by holding test1, test2, p1, p2
// high with scan_in low.
// Parameters: W data width (8), DELAY register matched delay in ns (2).
// Tool notes: latches and circular logic reported in this hierarchy are the
// intended asynchronous storage and handshake loops (see the submodules).
`timescale 1ns/1ps
module gcd_top
  import stscan_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned DELAY = 2
) (
  input  logic         go,
  output logic         done,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] result,
  input  logic         clr,
  input  logic         ctest,
  input  scan_ctl_t    ctl,
  input  logic         scan_in,
  output logic         scan_out
);

  logic ne, gt, a_req, a_ack, b_req, b_ack, r_req, r_ack, a_sel, b_sel;
  logic scan_mid;

  gcd_control u_ctrl (
    .go(go), .done(done), .ne(ne), .gt(gt),
    .a_req(a_req), .a_ack(a_ack), .b_req(b_req), .b_ack(b_ack),
    .r_req(r_req), .r_ack(r_ack), .a_sel(a_sel), .b_sel(b_sel),
    .clr(clr), .ctest(ctest), .si(scan_in), .so(scan_mid), .ctl(ctl));

  gcd_datapath #(.W(W), .DELAY(DELAY)) u_dp (
    .x(x), .y(y), .a_sel(a_sel), .b_sel(b_sel),
    .a_req(a_req), .a_ack(a_ack), .b_req(b_req), .b_ack(b_ack),
    .r_req(r_req), .r_ack(r_ack), .ne(ne), .gt(gt), .result(result),
    .si(scan_mid), .so(scan_out), .ctl(ctl));

endmodule
