// Scannable master-slave latch cell.
//
// This is the storage element placed in the scan path. In normal mode
// (test1 = test2 = 0) the slave is held transparent, so the cell behaves as a
// single gated latch: q follows d while en is high and holds otherwise. In
// scan mode (test1 = test2 = 1) the master loads the scan input while p1 is
// high and the slave copies the master while p2 is high, so a chain of these
// cells is a race-free shift register under two non-overlapping clocks.
// Deasserting test1 while test2 stays high hands the master back to its
// normal data input and enable: this is the capture step, in which the value
// the logic under test drives on d is caught in the master while the slave
// keeps presenting the scanned-in value. With test1 = test2 = p1 = p2 = 1 the
// whole chain is transparent from scan input to scan output, which is how the
// cells are reset (no separate clear input).
//
// Ports: d/en normal data and enable, si scan input, ctl scan controls,
// q output (also the scan output to the next cell).
// Timing: level-sensitive, no clock; both latches are written as latches on
// purpose.
//
// The master-slave structure, the capture by deasserting Test1 and the reset
// through a transparent scan path follow the partial scan method; the gate
// level details (pass gates, tristate drivers) are abstracted to two
// behaviourally equivalent latches.
// Tool notes: both storage elements are latches by design, and tools may
// report the master/slave pair as circular logic when cells are chained
// through surrounding feedback; both are intended.
`timescale 1ns/1ps
module scan_ms_latch
  import stscan_pkg::*;
(
  input  logic      d,
  input  logic      en,
  input  logic      si,
  input  scan_ctl_t ctl,
  output logic      q
);

  logic m_en, m_d, s_en;
  logic master, slave;

  // Master: scan input clocked by P1 in scan mode, normal input otherwise.
  assign m_en = ctl.test1 ? ctl.p1 : en;
  assign m_d  = ctl.test1 ? si     : d;
  // Slave: clocked by P2 in scan mode, transparent otherwise.
  assign s_en = ctl.test2 ? ctl.p2 : 1'b1;

  always_latch begin
    if (m_en) master = m_d;
  end

  always_latch begin
    if (s_en) slave = master;
  end

  assign q = slave;

endmodule
