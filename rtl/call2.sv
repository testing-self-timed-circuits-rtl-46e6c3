// Two-way Call module (hardware subroutine call) from XORs and C-elements.
//
// Two clients share one resource. A request transition on r1 or r2 is
// merged (XOR) onto rs; when the resource answers with a transition on as,
// that acknowledge is routed to the client that asked. Requests must be
// mutually exclusive: a client may only request when the other has no call
// outstanding.
//
// Structure: rs = r1 ^ r2; a1 = C(r1, as ^ r2); a2 = C(r2, as ^ r1). At rest
// as == rs, a1 == r1 and a2 == r2, so both C-elements see equal inputs.
// While client 1 is served, r2 is constant, so as ^ r2 tracks as and C1
// fires when the acknowledge arrives; C2 sees r2 against as ^ r1, which
// leaves and regains equality without ever making the inputs equal at a new
// value, so a2 holds. The network is feed-forward from r1, r2, as: it has no
// internal loop that would need a scan latch. Being a network of XORs and C-elements only, the Call is tested
// like the rest of that network (OR mode through ctest, AND mode through
// clr); its AS input is made controllable by the scannable delay latch of
// the shared register (delay_scan).
//
// Ports: r1, a1, r2, a2 client handshakes; rs, as resource handshake; clr
// global clear; ctest C-element OR mode. The gate network is this design's
// choice; the document gives the Call's function and that it is a network
// of XORs and C-elements.
// Tool notes: the C-elements are latches; no loop exists inside this
// module.
`timescale 1ns/1ps
module call2 (
  input  logic r1,
  input  logic r2,
  output logic a1,
  output logic a2,
  output logic rs,
  input  logic as,
  input  logic clr,
  input  logic ctest
);

  logic x1, x2;

  xor_merge  u_req (.a(r1), .b(r2), .z(rs));
  xor_merge  u_x1  (.a(as), .b(r2), .z(x1));
  xor_merge  u_x2  (.a(as), .b(r1), .z(x2));
  celement_t u_c1  (.a(r1), .b(x1), .clr(clr), .ctest(ctest), .z(a1));
  celement_t u_c2  (.a(r2), .b(x2), .clr(clr), .ctest(ctest), .z(a2));

endmodule
