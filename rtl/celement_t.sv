// Testable Muller C-element.
//
// A C-element is the AND function for transitions: its output changes to the
// common value of its inputs once both inputs agree, and holds while they
// differ. Its state is the value on its feedback wire; with state 0 it acts
// as an AND gate and with state 1 as an OR gate. For testing, an OR gate is
// placed in the feedback line with ctest as its other input: ctest = 1 forces
// the feedback to 1, making the element a plain OR gate (OR mode). The
// global clear clr forces the state to 0 (AND mode, and the required
// equal-inputs start state at reset). Because the ORed feedback only forces
// a 1, a stuck-at-0 on the feedback itself stays observable: set OR mode,
// apply 01 or 10 (output 1), drop ctest, and a good element keeps 1.
//
// Next state:  z+ = ~clr & ( a&b | (a|b) & (z | ctest) )
// Ports: a, b inputs; clr clear (dominant); ctest OR-mode control; z output.
// Timing: level-sensitive state holding element, written as a latch.
//
// The gate-level model (majority with ORed feedback, clear to 0) follows the
// partial scan method; clr overriding all other inputs is this design's
// choice.
// Tool notes: the state element is a latch by design; in a network its
// output feeding back to its inputs is reported as circular logic, which is
// the intended asynchronous feedback.
`timescale 1ns/1ps
module celement_t (
  input  logic a,
  input  logic b,
  input  logic clr,
  input  logic ctest,
  output logic z
);

  logic state;

  always_latch begin
    if (clr)
      state = 1'b0;
    else if (a == b)
      state = a;
    else if (ctest)
      state = 1'b1;
  end

  assign z = state;

endmodule
