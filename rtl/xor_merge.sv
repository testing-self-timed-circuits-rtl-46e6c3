// XOR merge module.
//
// The OR function for transition signals: a transition on either input
// produces a transition on the output. The two input transitions must not
// arrive together (they come from mutually exclusive paths), otherwise they
// cancel. Purely combinational: z = a ^ b.
// Ports: a, b transition inputs; z transition output.
`timescale 1ns/1ps
module xor_merge (
  input  logic a,
  input  logic b,
  output logic z
);

  assign z = a ^ b;

endmodule
