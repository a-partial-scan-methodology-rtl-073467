// scan_c_element: C-element placed on the scan path to break a loop.
//
// A loop made only of XORs and C-elements has no scan cell to cut it, so
// one C-element in it is made scannable. Here the testable c_element is
// followed by a scan_latch whose gate is ~TEST1:
//   normal mode  the latch is transparent, so OUT follows the C-element and
//                the cell behaves as a C-element with a latch delay added;
//   scan mode    OUT is the slave of the scan cell: the loop is cut, OUT is
//                set from the scan chain, and dropping TEST1 captures the
//                C-element's output (in OR or AND mode) for scan-out.
// The C-element keeps its own feedback inside, so its state does not pass
// through the latch; that feedback is the combinational loop the tools
// report for this file, and it is the C-element's storage.
//
// That a C-element in such a loop is made scannable follows the described
// method; its circuit is not described, and this construction (testable
// C-element plus a scan latch, as used for the bundling delay) is this
// design's choice.
module scan_c_element
  import pscan_pkg::*;
(
  input  logic      a,
  input  logic      b,
  input  logic      clr,
  input  logic      ctest,
  input  scan_ctl_t ctl,
  input  logic      scan_in,
  output logic      scan_out,
  output logic      c
);

  logic c_int;

  c_element u_c (.a(a), .b(b), .clr(clr), .ctest(ctest), .c(c_int));

  scan_latch u_lat (
    .sin(scan_in), .din(c_int), .g(~ctl.test1), .p1(ctl.p1), .p2(ctl.p2),
    .test2(ctl.test2), .out(c)
  );

  assign scan_out = c;

endmodule
