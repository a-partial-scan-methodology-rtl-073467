// scan_delay: a bundling delay made controllable for partial scan.
//
// When a Call shares a register or a function block, its RS line reaches AS
// only through the matched delay of that block, so AS cannot be set apart
// from the client requests and some faults of the Call cannot be tested.
// Here the delay is followed by a scan_latch whose gate is ~TEST1: in normal
// operation the latch is transparent and only adds its own small delay, which
// is meant to be taken out of the delay budget; in scan mode it is a stage of
// the scan chain and AS is whatever was shifted in. Dropping TEST1 captures
// the delayed RS into the latch.
//
// Turning the delay into a transparent scannable latch follows the
// described method; placing the latch after the delay line and the delay
// value are this design's choices.
module scan_delay
  import pscan_pkg::*;
#(
  parameter int unsigned DELAY = 10  // delay of the matched delay line
) (
  input  logic      rs,        // request into the delay
  output logic      as_o,      // delayed acknowledge
  input  scan_ctl_t ctl,
  input  logic      scan_in,
  output logic      scan_out
);

  logic rs_d;

  delay_element #(.DELAY(DELAY)) u_dly (.in(rs), .out(rs_d));

  scan_latch u_lat (
    .sin(scan_in), .din(rs_d), .g(~ctl.test1), .p1(ctl.p1), .p2(ctl.p2),
    .test2(ctl.test2), .out(as_o)
  );

  assign scan_out = as_o;

endmodule
