// Delay element with a scannable latch behind it.
//
// Where a Call module shares a register or function block, the block's
// acknowledge (AS) is just its request (RS) through a delay element, so AS
// cannot be set independently of the requests and some faults in the Call
// cannot be tested. Here the delay element is followed by a scan cell
// (scan_ms_latch) whose normal enable is tied high: in normal operation the
// latch is transparent and its delay simply adds to the matched delay (it is
// hidden), while in scan mode it is an ordinary scan-path stage, so AS can be
// set to any value, and during capture it records the delayed request.
//
// Ports: i request, o acknowledge, si/so scan, ctl scan controls.
// Timing: o follows i after DELAY ns in normal mode.
// Tool notes: the scan cell is made of latches by design.
`timescale 1ns/1ps
module delay_scan
  import stscan_pkg::*;
#(
  parameter int unsigned DELAY = 2
) (
  input  logic      i,
  output logic      o,
  input  logic      si,
  output logic      so,
  input  scan_ctl_t ctl
);

  logic delayed;

  delay_element #(.DELAY(DELAY)) u_dly (.i(i), .o(delayed));
  scan_ms_latch u_cell (.d(delayed), .en(1'b1), .si(si), .ctl(ctl), .q(o));

  assign so = o;

endmodule
