// merge: XOR merge of two-phase transition signals.
//
// In transition signalling an XOR acts as an OR of events: a transition on
// any input gives a transition on the output. N inputs are reduced with one
// XOR; the inputs must not change at the same time (as for any merge).
// The function follows the described XOR module; the width N (2 by default,
// the drawn two-input gate) is a parameter of this design.
module merge #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] in,
  output logic         out
);

  assign out = ^in;

endmodule
