// Transition counter built from a chain of Toggle modules.
//
// A chain of NT Toggles divides the input transitions by 2**NT: each
// Toggle's out1 drives the next Toggle's input, and the out0 outputs of all
// Toggles are merged (XOR) into `cont`. Of every 2**NT input transitions,
// the first 2**NT - 1 come out on `cont` and the last one on `fin`, after
// which all Toggles are back in their initial state, so the counter is
// ready for the next round without any reset. This is how a loop of fixed
// length is closed in a macromodule control network.
//
// Scan: the Toggles' latches are chained in order (Toggle 0 first).
// Ports: in, cont, fin transition signals; si, so, ctl scan.
// Parameter: NT number of Toggles (>= 1). The use of a Toggle chain as the
// loop counter is this design's choice.
// Tool notes: the Toggles' latches are reported as latches and circular
// logic; both are intended (see toggle_scan).
`timescale 1ns/1ps
module toggle_counter
  import stscan_pkg::*;
#(
  parameter int unsigned NT = 3
) (
  input  logic      in,
  output logic      cont,
  output logic      fin,
  input  logic      si,
  output logic      so,
  input  scan_ctl_t ctl
);

  logic [NT:0] stage_in;   // stage_in[k] drives Toggle k; stage_in[NT] is fin
  logic [NT:0] scan;
  logic [NT:0] merged;     // running XOR of the out0 outputs
  logic [NT-1:0] out0;

  assign stage_in[0] = in;
  assign scan[0]     = si;
  assign merged[0]   = 1'b0;

  for (genvar k = 0; k < NT; k++) begin : g_stage
    toggle_scan u_tog (.in(stage_in[k]), .out0(out0[k]), .out1(stage_in[k+1]),
                       .si(scan[k]), .so(scan[k+1]), .ctl(ctl));
    xor_merge u_merge (.a(merged[k]), .b(out0[k]), .z(merged[k+1]));
  end

  assign cont = merged[NT];
  assign fin  = stage_in[NT];
  assign so   = scan[NT];

endmodule
