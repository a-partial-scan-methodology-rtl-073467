// c_element: Muller C-element made testable in a combinational way.
//
// A C-element is the AND of transitions: its output changes only after both
// inputs have changed. It is built here as the majority of the two inputs and
// a feedback line:  c = ~clr & maj(a, b, f),  f = c | ctest.
// The OR gate in the feedback line is the testability change: with CTEST high
// the feedback is forced to 1 and the cell is an OR gate (OR mode); with CLR
// asserted the output, and so the feedback, is forced to 0, and after CLR is
// released the cell behaves as an AND gate until its inputs agree (AND
// mode). The normal feedback path stays in the circuit and can be tested
// (hold a 01 input in OR mode, then drop CTEST: a good cell keeps c = 1).
//
// The majority/clear form and the OR in the feedback follow the described
// cell. Optional input bubbles (INV_A, INV_B) give the library variants with
// an inverted input; which variant a circuit uses is this design's choice.
//
// Timing: combinational with the state held on the feedback net; the
// combinational loop reported by the tools is that feedback, i.e. the
// storage of the C-element itself.
module c_element #(
  parameter bit INV_A = 1'b0,  // invert input a
  parameter bit INV_B = 1'b0   // invert input b
) (
  input  logic a,
  input  logic b,
  input  logic clr,    // global clear, active high, forces c = 0
  input  logic ctest,  // test: forces the feedback to 1 (OR mode)
  output logic c
);

  logic ai, bi, fb, f;

  assign ai = a ^ INV_A;
  assign bi = b ^ INV_B;
  assign fb = c;           // feedback line from the output to the OR gate
  assign f  = fb | ctest;  // feedback seen by the majority gate
  assign c  = ~clr & ((ai & bi) | (ai & f) | (bi & f));

endmodule
