// delay_element: behavioural model of a bundling (matched) delay.
//
// This is a behavioural model, not synthesizable logic: in the circuit the
// delay is a chain of gates sized to cover the settling time of the data
// path it is bundled with, which is a physical property, not a logic
// function. Here the input transition simply reappears on the output DELAY
// time units later (transport of a clean two-phase event). The value of the
// delay is this design's choice.
module delay_element #(
  parameter int unsigned DELAY = 10  // time units
) (
  input  logic in,
  output logic out
);

  assign #(DELAY) out = in;

endmodule
