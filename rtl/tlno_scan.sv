// Scannable TLNO: a W-bit TLNO that is also a stage of the scan path.
//
// Normal mode (test1 = test2 = 0): a plain TLNO, transparent while C and P
// differ. Scan mode (test1 = test2 = 1): each bit is a master-slave cell and
// the W cells form a shift register clocked by the non-overlapping P1/P2,
// scan data entering at bit 0 and leaving at bit W-1. Capture
// (test1 deasserted, test2 still high): an OR gate on the enable forces the
// masters open to DIN whatever C and P are, so the value of the logic feeding
// the latch is caught in the masters, while the slaves keep driving the
// scanned-in value onto q. Returning to scan mode then shifts the captured
// word out.
//
// Ports: c, p control transitions; d (DIN), q data; si, so scan; ctl scan
// controls. Timing: level-sensitive; the scan operation is clocked only by
// P1/P2 and only in test mode.
// Tool notes: the cells are latches by design.
`timescale 1ns/1ps
module tlno_scan
  import stscan_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         c,
  input  logic         p,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  input  logic         si,
  output logic         so,
  input  scan_ctl_t    ctl
);

  logic en;
  logic [W:0] chain;

  // Open while C != P in normal mode; forced open during capture.
  assign en = (c ^ p) | ctl.test2;
  assign chain[0] = si;

  for (genvar i = 0; i < W; i++) begin : g_bit
    scan_ms_latch u_cell (.d(d[i]), .en(en), .si(chain[i]), .ctl(ctl), .q(q[i]));
    assign chain[i+1] = q[i];
  end

  assign so = chain[W];

endmodule
