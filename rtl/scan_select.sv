// scan_select: two-way transition Select made part of the scan path.
//
// A transition on IN produces a transition on OUTT when SEL is 1 and on OUTF
// when SEL is 0 (SEL is bundled with IN: stable before IN changes and until
// the output has changed). Each output is a latch whose data input is
//   OUTT latch: IN ^ OUTF        OUTF latch: IN ^ OUTT
// and whose gate is SEL (OUTT) or ~SEL (OUTF). At rest IN = OUTT ^ OUTF, so
// the opened latch sees its own output inverted and changes once.
//
// For partial scan the two latches are scan_latch cells and the gates become
//   g_t = SEL & ~TEST1,   g_f = ~SEL & ~TEST1,
// so in scan mode SEL is disabled and both latches are loaded only from the
// scan path; dropping TEST1 captures the value at the data input of the
// latch picked by SEL. The latches have no clear; they are reset through the
// scan path. The XOR/latch structure, the SEL/TEST1 gating and the
// master-slave latches follow the described module. The order of the two
// latches in the chain (scan_in -> OUTF latch -> OUTT latch -> scan_out) is
// this design's choice.
//
// The combinational loops the tools report run through the two latches and
// are the state of the module; both latches are never open together.
module scan_select
  import pscan_pkg::*;
(
  input  logic      in,        // request transition
  input  logic      sel,       // bundled select value
  input  scan_ctl_t ctl,       // scan controls
  input  logic      scan_in,
  output logic      scan_out,
  output logic      outt,      // transition when sel = 1
  output logic      outf       // transition when sel = 0
);

  // Nets named after the lines of the basic Select: a, b are the branches of
  // IN, e and f the fed-back outputs, c and d the latch data inputs, g and h
  // the latch gates (here also gated by TEST1).
  logic a, b, c, d, e, f, g, h;

  assign a = in;
  assign b = in;
  assign e = outt;
  assign f = outf;
  assign c = a ^ f;                 // data of the OUTT latch
  assign d = b ^ e;                 // data of the OUTF latch
  assign g =  sel & ~ctl.test1;     // gate of the OUTT latch
  assign h = ~sel & ~ctl.test1;     // gate of the OUTF latch

  scan_latch u_lf (
    .sin(scan_in), .din(d), .g(h), .p1(ctl.p1), .p2(ctl.p2),
    .test2(ctl.test2), .out(outf)
  );

  scan_latch u_lt (
    .sin(outf), .din(c), .g(g), .p1(ctl.p1), .p2(ctl.p2),
    .test2(ctl.test2), .out(outt)
  );

  assign scan_out = outt;

endmodule
