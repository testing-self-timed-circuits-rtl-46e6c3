// Scannable C-element.
//
// Used where a loop of the XOR/C-element network would otherwise contain no
// scan latch: the C-element's state is held in a scan cell (scan_ms_latch)
// instead of a plain latch. In normal mode the cell's latch is open while
// the inputs agree and loads their common value, which is the C-element
// function; while the inputs differ it holds. In scan mode its state is
// shifted like any other scan cell, which both breaks the loop and sets the
// state directly; during capture it records a when the inputs agree.
// It has no clear or ctest input: it is initialised through the scan path.
//
// Ports: a, b inputs; z output; si, so, ctl scan. Making a C-element in
// such a loop scannable follows the partial scan method; realising it with
// the same master-slave cell as the other scan latches is this design's
// choice.
// Tool notes: the storage is a latch by design.
`timescale 1ns/1ps
module celement_scan
  import stscan_pkg::*;
(
  input  logic      a,
  input  logic      b,
  output logic      z,
  input  logic      si,
  output logic      so,
  input  scan_ctl_t ctl
);

  scan_ms_latch u_cell (.d(a), .en(a == b), .si(si), .ctl(ctl), .q(z));

  assign so = z;

endmodule
