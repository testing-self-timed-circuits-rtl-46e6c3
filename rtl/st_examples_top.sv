// Two self-timed example circuits with partial scan, side by side.
//
// The GCD (gcd_top) and the serial divider (div_top) are independent
// designs built from the same macromodule library and the same scan
// method; they share nothing but the test-control inputs (ctl, ctest, clr),
// which are global signals in the method. Each keeps its own handshake,
// operands, results and scan path.
// Ports: gcd_* and div_* per circuit; clr, ctest, ctl shared.
// Parameters: W (8) for both data paths, DELAY (2 ns) register delay.
// Tool notes: latches and circular logic reported in this hierarchy are the
// intended asynchronous storage and handshake loops.
`timescale 1ns/1ps
module st_examples_top
  import stscan_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned DELAY = 2
) (
  input  logic         clr,
  input  logic         ctest,
  input  scan_ctl_t    ctl,
  // GCD
  input  logic         gcd_go,
  output logic         gcd_done,
  input  logic [W-1:0] gcd_x,
  input  logic [W-1:0] gcd_y,
  output logic [W-1:0] gcd_result,
  input  logic         gcd_scan_in,
  output logic         gcd_scan_out,
  // Divider
  input  logic         div_go,
  output logic         div_done,
  input  logic [W-1:0] div_dividend,
  input  logic [W-1:0] div_divisor,
  output logic [W-1:0] div_quotient,
  output logic [W-1:0] div_remainder,
  input  logic         div_scan_in,
  output logic         div_scan_out
);

  gcd_top #(.W(W), .DELAY(DELAY)) u_gcd (
    .go(gcd_go), .done(gcd_done), .x(gcd_x), .y(gcd_y), .result(gcd_result),
    .clr(clr), .ctest(ctest), .ctl(ctl), .scan_in(gcd_scan_in), .scan_out(gcd_scan_out));

  div_top #(.W(W), .DELAY(DELAY)) u_div (
    .go(div_go), .done(div_done), .dividend(div_dividend), .divisor(div_divisor),
    .quotient(div_quotient), .remainder(div_remainder),
    .clr(clr), .ctest(ctest), .ctl(ctl), .scan_in(div_scan_in), .scan_out(div_scan_out));

endmodule
