// Toggle module, modified for partial scan.
//
// Input transitions are sent alternately to out0 and out1, the first one
// after initialisation to out0. It is built as two latches in master-slave
// fashion: the out0 latch is open while in = 1 and loads ~out1, the out1
// latch is open while in = 0 and loads out0. From the reset state
// (in = out0 = out1 = 0) a rising `in` flips out0, the following falling
// `in` copies it to out1, and so on, which is exactly the alternation.
//
// Both latches are scan cells (scan_ms_latch), chained si -> out0 cell ->
// out1 cell -> so, so the Toggle's internal state is fully controllable and
// observable and it needs no clear input (it is reset through the scan path).
//
// Ports: in, out0, out1 transition signals; si/so scan; ctl scan controls.
// Timing: self-timed, zero internal delay in this model. The latch structure
// is this design's choice; only the function and the fact that the Toggle's
// latches join the scan path come from the partial scan method.
// Tool notes: the two latches feed each other (reported as circular
// logic); they are never open at the same time, so the loop is stable.
`timescale 1ns/1ps
module toggle_scan
  import stscan_pkg::*;
(
  input  logic      in,
  output logic      out0,
  output logic      out1,
  input  logic      si,
  output logic      so,
  input  scan_ctl_t ctl
);

  scan_ms_latch u_lat0 (.d(~out1), .en(in),  .si(si),   .ctl(ctl), .q(out0));
  scan_ms_latch u_lat1 (.d(out0),  .en(~in), .si(out0), .ctl(ctl), .q(out1));

  assign so = out1;

endmodule
