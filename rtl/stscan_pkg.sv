// Shared types for the partial-scan self-timed macromodule library.
//
// All control-path signals are two-phase transition signals: only a change of
// level carries meaning. The scan path is run by four global test signals,
// grouped here in one struct so that every scannable cell receives the same
// bundle:
//   test1 - scan mode for the master latches (deasserting it captures the
//           normal inputs of the scan cells),
//   test2 - scan mode for the slave latches and test transparency of the
//           non-scanned data latches,
//   p1/p2 - two-phase non-overlapping scan clocks, used only while scanning.
// In normal operation all four are low and the circuit is fully self-timed.
`timescale 1ns/1ps
package stscan_pkg;

  typedef struct packed {
    logic test1;
    logic test2;
    logic p1;
    logic p2;
  } scan_ctl_t;

  // All scan controls inactive: normal self-timed operation.
  localparam scan_ctl_t SCAN_OFF = '{test1: 1'b0, test2: 1'b0, p1: 1'b0, p2: 1'b0};

endpackage
