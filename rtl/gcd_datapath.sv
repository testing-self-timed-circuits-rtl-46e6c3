// Data path of the self-timed GCD circuit.
//
// Three W-bit self-timed registers: A and B hold the operands, R holds the
// difference |A - B| computed by the subtract function block. A and B are
// written either from the inputs x, y (load) or from R (update), chosen by
// the multiplexer selects a_sel, b_sel that the control path drives. Two
// comparators produce the SEL signals for the control path's Select
// modules: ne = (A != B) and gt = (A > B).
//
// Every cycle of the data path (A -> subtract -> R -> A, and the same for B)
// passes through R, so R is the one data latch made scannable (a scannable
// TLNO); A and B are TLNOs that become transparent in test mode, which turns
// the logic between R's output and R's input into one combinational block
// that is tested by scanning R, capturing, and scanning R out. Each
// register's Req->Ack delay element carries a scan latch (delay_scan), so
// the acknowledges are controllable in test.
//
// Scan order: si -> A delay latch -> B delay latch -> R delay latch ->
// R bits 0..W-1 -> so.
// Ports: x, y operands; a_sel, b_sel mux selects (1 = from R); a/b/r req and
// ack handshakes; ne, gt comparison results; result = A; si, so, ctl scan.
// Timing: each ack follows its req after DELAY ns (plus zero-delay logic).
// Tool notes: data latches and the A/B -> subtract -> R -> A/B cycle are
// reported as latches and circular logic; the cycle is broken by R being
// opaque whenever A or B is open (bundled handshake), as in the design.
`timescale 1ns/1ps
module gcd_datapath
  import stscan_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned DELAY = 2
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         a_sel,
  input  logic         b_sel,
  input  logic         a_req,
  output logic         a_ack,
  input  logic         b_req,
  output logic         b_ack,
  input  logic         r_req,
  output logic         r_ack,
  output logic         ne,
  output logic         gt,
  output logic [W-1:0] result,
  input  logic         si,
  output logic         so,
  input  scan_ctl_t    ctl
);

  logic [W-1:0] a_q, b_q, r_q, a_d, b_d, diff;
  logic         so_a, so_b;

  assign a_d  = a_sel ? r_q : x;
  assign b_d  = b_sel ? r_q : y;
  assign gt   = a_q > b_q;
  assign ne   = a_q != b_q;
  assign diff = gt ? (a_q - b_q) : (b_q - a_q);

  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b0)) u_reg_a (
    .req(a_req), .ack(a_ack), .d(a_d), .q(a_q), .si(si), .so(so_a), .ctl(ctl));
  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b0)) u_reg_b (
    .req(b_req), .ack(b_ack), .d(b_d), .q(b_q), .si(so_a), .so(so_b), .ctl(ctl));
  st_register #(.W(W), .DELAY(DELAY), .SCAN_DATA(1'b1)) u_reg_r (
    .req(r_req), .ack(r_ack), .d(diff), .q(r_q), .si(so_b), .so(so), .ctl(ctl));

  assign result = a_q;

endmodule
