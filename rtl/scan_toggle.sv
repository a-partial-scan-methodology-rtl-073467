// scan_toggle: transition Toggle made part of the scan path.
//
// After initialisation the first transition on IN gives a transition on OUT0,
// the next one on OUT1, and so on alternately. It is built from two latches
// in a ring with one inversion:
//   OUT0 latch: data ~OUT1, open while IN = 1
//   OUT1 latch: data  OUT0, open while IN = 0
// Starting from IN = OUT0 = OUT1 = 0, IN rising opens the OUT0 latch
// (OUT0 <- 1) and IN falling opens the OUT1 latch (OUT1 <- OUT0), and so on.
//
// For partial scan both latches are scan_latch cells with their gates ANDed
// with ~TEST1, exactly as in the scan Select: in scan mode they are loaded
// only from the scan path, and dropping TEST1 captures into the latch that
// IN opens. Only the function of the Toggle and the fact that it holds two
// latches in a loop with an odd number of inversions are given; the ring
// above, the gating and the chain order (scan_in -> OUT0 -> OUT1 ->
// scan_out) are this design's choices. No clear: reset through the scan
// path. The loop reported by the tools runs through the two latches, which
// are never open together.
module scan_toggle
  import pscan_pkg::*;
(
  input  logic      in,        // input transition
  input  scan_ctl_t ctl,       // scan controls
  input  logic      scan_in,
  output logic      scan_out,
  output logic      out0,      // odd-numbered input transitions
  output logic      out1       // even-numbered input transitions
);

  logic g0, g1;

  assign g0 =  in & ~ctl.test1;
  assign g1 = ~in & ~ctl.test1;

  scan_latch u_l0 (
    .sin(scan_in), .din(~out1), .g(g0), .p1(ctl.p1), .p2(ctl.p2),
    .test2(ctl.test2), .out(out0)
  );

  scan_latch u_l1 (
    .sin(out0), .din(out0), .g(g1), .p1(ctl.p1), .p2(ctl.p2),
    .test2(ctl.test2), .out(out1)
  );

  assign scan_out = out1;

endmodule
