// scan_latch: scannable master-slave latch of the partial-scan library.
//
// Each latch inside a Select or Toggle module, and each latch that replaces a
// bundling delay, is built like this. It has two storage stages:
//   master: loaded from SIN while P1 is high, otherwise from DIN while the
//           normal gate G is high, otherwise it holds;
//   slave:  loaded from the master while P2 is high, otherwise it holds.
// OUT is the master while TEST2 is low, so in normal operation the cell is a
// plain gated (transparent) latch D->Q with gate G and one stage of delay.
// While TEST2 is high OUT is the slave, which makes a chain of these cells a
// two-phase (P1/P2) shift register, and lets a value be captured into the
// master (through DIN) without disturbing OUT.
//
// The stages, their inputs and the output multiplexer on TEST2 follow the
// described latch. That P1 takes precedence when P1 and G are both high is
// this design's choice (the tester never does both). The cell has no clear:
// it is reset by making the scan chain transparent (P1 = P2 = TEST2 = 1).
//
// Both stages are level-sensitive storage, so the latch warnings the tools
// give for this file are the intended behaviour; loops reported through the
// master stage are the loops of the module that owns the latch (a Select or
// Toggle feeds its outputs back to its latch inputs).
module scan_latch (
  input  logic sin,    // scan input (previous cell of the chain)
  input  logic din,    // normal data input
  input  logic g,      // normal gate, already combined with TEST1 by the owner
  input  logic p1,     // scan clock phase 1
  input  logic p2,     // scan clock phase 2
  input  logic test2,  // output select: 0 master, 1 slave
  output logic out     // latch output (also the scan output of this cell)
);

  logic q_m;  // master stage
  logic q_s;  // slave stage

  always_latch begin
    if (p1)     q_m = sin;
    else if (g) q_m = din;
  end

  always_latch begin
    if (p2) q_s = q_m;
  end

  assign out = test2 ? q_s : q_m;

endmodule
