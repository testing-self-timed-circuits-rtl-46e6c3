// Matched delay element (behavioural model).
//
// In a bundled-data self-timed circuit the acknowledge of a register or a
// function block is its request passed through a delay that is longer than
// the worst-case settling time of the data it is bundled with. This is an
// analog, process-specific element (a chain of buffers sized on silicon), so
// it is modelled behaviourally: o follows i after DELAY ns. Synthesis
// ignores the delay and sees a wire.
//
// Ports: i request, o delayed request. Timing: transport-like delay of
// DELAY ns (default 2 ns, this design's choice).
`timescale 1ns/1ps
module delay_element #(
  parameter int unsigned DELAY = 2
) (
  input  logic i,
  output logic o
);

  assign #(DELAY) o = i;

endmodule
