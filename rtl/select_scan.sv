// Two-way transition Select module, modified for partial scan.
//
// A transition on `in` is steered to out_t when sel = 1 and to out_f when
// sel = 0; sel is bundled with `in` (stable before the input transition and
// until the output transition). The module keeps the invariant
// in == out_t ^ out_f at rest. Each output is a latch: the out_t latch is
// open while sel = 1 and loads in ^ out_f, the out_f latch is open while
// sel = 0 and loads in ^ out_t, so a transition on `in` flips exactly the
// selected output.
//
// Partial-scan changes: both latches are master-slave scan cells
// (scan_ms_latch) chained si -> out_t cell -> out_f cell -> so. The enables
// derived from SEL are disabled while test1 is asserted, so during shifting
// both latches take the scan path; when test1 is deasserted for capture, SEL
// opens one master, which records what the network under test drives on
// `in`. There is no clear input: the latches are reset through the scan
// path.
//
// Ports: in, sel, out_t, out_f (transition signals), si/so scan, ctl scan
// controls. Timing: self-timed, zero internal delay in this model.
// Tool notes: each output latch reads the other output, which tools report
// as circular logic; only one latch is ever open, so the loop is stable.
`timescale 1ns/1ps
module select_scan
  import stscan_pkg::*;
(
  input  logic      in,
  input  logic      sel,
  output logic      out_t,
  output logic      out_f,
  input  logic      si,
  output logic      so,
  input  scan_ctl_t ctl
);

  logic en_t, en_f;

  // SEL is gated off during scan; scan_ms_latch also ignores en while test1 is high.
  assign en_t = sel  & ~ctl.test1;
  assign en_f = ~sel & ~ctl.test1;

  scan_ms_latch u_lat_t (.d(in ^ out_f), .en(en_t), .si(si),    .ctl(ctl), .q(out_t));
  scan_ms_latch u_lat_f (.d(in ^ out_t), .en(en_f), .si(out_t), .ctl(ctl), .q(out_f));

  assign so = out_f;

endmodule
