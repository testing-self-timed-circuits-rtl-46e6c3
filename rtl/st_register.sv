// Self-timed register with a Req/Ack interface.
//
// A W-bit TLNO whose C input is the request and whose P input is the
// acknowledge, the request returned through a scannable delay element
// (delay_scan). A request transition opens the latch (C != P); after the
// delay, P catches up, the latch closes on the data then present, and the
// same transition is the acknowledge. The data must be stable from before
// the request until the acknowledge (bundled data).
//
// SCAN_DATA selects the data latch: 0 gives a TLNO that is transparent in
// test mode (test2), 1 gives a scannable TLNO whose bits join the scan path.
// SCAN_ACK selects the delay: 1 puts a scan latch behind the delay element
// (needed where a Call shares the register, so that AS is controllable),
// 0 uses the bare delay element.
// Scan order: si -> delay latch (if SCAN_ACK) -> data bits 0..W-1
// (if SCAN_DATA) -> so; with neither, so = si.
//
// Ports: req, ack handshake; d, q data; si, so scan; ctl scan controls.
// Timing: ack follows req after DELAY ns; q settles with zero delay while
// open.
// Tool notes: latches come from the TLNO and the scan cell, by design.
`timescale 1ns/1ps
module st_register
  import stscan_pkg::*;
#(
  parameter int unsigned W         = 8,
  parameter int unsigned DELAY     = 2,
  parameter bit          SCAN_DATA = 1'b0,
  parameter bit          SCAN_ACK  = 1'b1
) (
  input  logic         req,
  output logic         ack,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  input  logic         si,
  output logic         so,
  input  scan_ctl_t    ctl
);

  logic dly_so;

  if (SCAN_ACK) begin : g_dly_scan
    delay_scan #(.DELAY(DELAY)) u_dly (.i(req), .o(ack), .si(si), .so(dly_so), .ctl(ctl));
  end else begin : g_dly_plain
    delay_element #(.DELAY(DELAY)) u_dly (.i(req), .o(ack));
    assign dly_so = si;
  end

  if (SCAN_DATA) begin : g_scan
    tlno_scan #(.W(W)) u_lat (.c(req), .p(ack), .d(d), .q(q), .si(dly_so), .so(so), .ctl(ctl));
  end else begin : g_plain
    tlno #(.W(W)) u_lat (.c(req), .p(ack), .test(ctl.test2), .d(d), .q(q));
    assign so = dly_so;
  end

endmodule
