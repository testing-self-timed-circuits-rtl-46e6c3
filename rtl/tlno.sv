// Transition Latch, Normally Opaque (TLNO), with test transparency.
//
// A W-bit data latch controlled by two transition wires: it is transparent
// while C and P differ and opaque while they are equal. Used with a
// Req/Ack interface (see st_register), C is the request and P the request
// fed back through a delay: a request transition opens the latch, and once
// the delayed copy arrives on P the latch closes again and P serves as the
// acknowledge.
//
// For partial scan one XOR gate is added on C: when `test` is asserted the
// latch is transparent from d to q (with the handshake at rest, C == P), so
// the combinational logic on either side of a non-scanned latch can be
// tested as one block.
//
// Ports: c, p control transitions; test transparency control; d, q data.
// Timing: level-sensitive; q follows d with zero delay while open.
// Tool notes: the data storage is a latch by design.
`timescale 1ns/1ps
module tlno #(
  parameter int unsigned W = 8
) (
  input  logic         c,
  input  logic         p,
  input  logic         test,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic open;
  logic [W-1:0] store;

  assign open = (c ^ test) ^ p;

  always_latch begin
    if (open) store = d;
  end

  assign q = store;

endmodule
