// while_loop: self-timed WHILE construct, (WHILE cond A).
//
// A transition on REQ, or the completion of one pass of the loop body,
// reaches the Select through an XOR merge. With COND = 1 the Select passes
// the event to the body (BODY_REQ); when the body finishes (BODY_ACK) the
// event comes back through the XOR and COND is looked at again. With
// COND = 0 the event leaves on ACK. COND is bundled with the event: it must
// be stable before the event reaches the Select. The Select is the scan
// version, so the loop is cut by scan latches.
//
// The structure (XOR, Select, body from OUTT, ACK from OUTF) follows the
// drawn translation of the WHILE construct.
module while_loop
  import pscan_pkg::*;
(
  input  logic      req,
  input  logic      cond,
  output logic      ack,
  output logic      body_req,
  input  logic      body_ack,
  input  scan_ctl_t ctl,
  input  logic      scan_in,
  output logic      scan_out
);

  logic y;

  merge #(.N(2)) u_xor (.in({body_ack, req}), .out(y));

  scan_select u_sel (
    .in(y), .sel(cond), .ctl(ctl), .scan_in(scan_in), .scan_out(scan_out),
    .outt(body_req), .outf(ack)
  );

endmodule
