// Self-timed serial divider with a single partial scan path (top level).
//
// Restoring division of a W-bit dividend by a W-bit divisor, one quotient
// bit per iteration, in a macromodule-based two-phase bundled-data style.
// A transition on go with dividend and divisor stable (from before go until
// done) starts it; a transition on done reports quotient and remainder.
// A zero divisor gives quotient all ones and remainder equal to the low W
// bits of the last shifted value (no error flag).
//
// The control path (div_control) sequences load, W iterations of
// next-value / write-back, and counts them with a chain of Toggles; the data
// path (div_datapath) holds D, R, Q, NR, NQ. One scan path runs through
// both: scan_in -> Toggle latches (2 log2 W) -> R, Q delay latches
// -> NR bits -> NQ bits -> scan_out.
// Test controls as for the GCD: ctl = {test1, test2, p1, p2}, ctest, clr.
// Latency: DELAY * (1 + 2W) ns from go to done.
// Parameters: W width and iteration count (8, a power of two), DELAY
// matched register delay in ns (2).
// Tool notes: latches and circular logic reported in this hierarchy are the
// intended asynchronous storage and handshake loops.
`timescale 1ns/1ps
module div_top
  import stscan_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned DELAY = 2
) (
  input  logic         go,
  output logic         done,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder,
  input  logic         clr,
  input  logic         ctest,
  input  scan_ctl_t    ctl,
  input  logic         scan_in,
  output logic         scan_out
);

  logic d_req, d_ack, r_req, r_ack, q_req, q_ack, nr_req, nr_ack, nq_req, nq_ack;
  logic r_sel, q_sel, scan_mid;

  div_control #(.W(W)) u_ctrl (
    .go(go), .done(done), .d_req(d_req), .d_ack(d_ack), .r_req(r_req), .r_ack(r_ack),
    .q_req(q_req), .q_ack(q_ack), .nr_req(nr_req), .nr_ack(nr_ack),
    .nq_req(nq_req), .nq_ack(nq_ack), .r_sel(r_sel), .q_sel(q_sel),
    .clr(clr), .ctest(ctest), .si(scan_in), .so(scan_mid), .ctl(ctl));

  div_datapath #(.W(W), .DELAY(DELAY)) u_dp (
    .dividend(dividend), .divisor(divisor), .r_sel(r_sel), .q_sel(q_sel),
    .d_req(d_req), .d_ack(d_ack), .r_req(r_req), .r_ack(r_ack),
    .q_req(q_req), .q_ack(q_ack), .nr_req(nr_req), .nr_ack(nr_ack),
    .nq_req(nq_req), .nq_ack(nq_ack), .quotient(quotient), .remainder(remainder),
    .si(scan_mid), .so(scan_out), .ctl(ctl));

endmodule
