// pscan_top: a macromodule control network with a partial scan path.
//
// The network is a WHILE loop (while_loop) whose body does two things in
// parallel and joins them with a C-element:
//   * it calls a shared register through a two-way Call (call_n, client 0);
//     the Call's RS passes through the register's bundling delay, which has
//     been turned into a scannable latch (scan_delay), to AS; the register
//     (shared_register) is written from DIN between RS and AS;
//   * it steps a Toggle (scan_toggle), whose two outputs give the parity of
//     the loop count and are merged back into one completion event.
// Client 1 of the Call is brought out (REQ2/ACK2) for a second, mutually
// exclusive user of the register.
//
// Beside it sits a loop built only of an XOR and a C-element (a token gate):
// after an event on RPT_START every event on RPT_TOK is passed to RPT_OUT,
// the C-element waiting for each token and the XOR feeding the output back.
// A loop like this holds no Select or Toggle, so its C-element is the
// scannable one (scan_c_element) to cut it in test mode.
//
// Partial scan: only the latches inside the Select and the Toggle and the
// latch that replaced the delay are scannable, chained as
//   SCAN_IN -> Select(OUTF, OUTT) -> Toggle(OUT0, OUT1) -> delay latch
//           -> token-gate C-element -> SCAN_OUT
// (6 cells). Every loop of the network passes through one of them. The
// remaining logic is XORs and testable C-elements, tested in OR mode
// (CTEST = 1) and in AND mode (CLR held during scan-in, then released).
//
// Normal operation: CTL = 0, CTEST = 0. Reset: CLR = 1 and the scan chain
// made transparent (TEST1 = TEST2 = P1 = P2 = 1) with SCAN_IN = 0, then all
// released. All handshakes are two-phase: every transition is an event.
//
// The tools report combinational loops through body_req, body_ack and the
// Toggle outputs: these are the loops of the asynchronous control itself
// (the WHILE loop and the Toggle ring), each closed through a latch of a
// scan cell, plus the C-elements' own feedback. They stand by design.
//
// The library cells and the method follow the described partial-scan
// scheme; this particular network is an example composition chosen for this
// design (it is built on the drawn WHILE translation).
module pscan_top
  import pscan_pkg::*;
#(
  parameter int unsigned W     = 8,   // shared register width
  parameter int unsigned DELAY = 10   // bundling delay of the register
) (
  // loop handshake
  input  logic         req,
  input  logic         cond,
  output logic         ack,
  // second client of the shared register
  input  logic         req2,
  output logic         ack2,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  // loop-count parity (Toggle outputs)
  output logic         tog0,
  output logic         tog1,
  // token gate
  input  logic         rpt_start,
  input  logic         rpt_tok,
  output logic         rpt_out,
  // test access
  input  logic         clr,
  input  logic         ctest,
  input  scan_ctl_t    ctl,
  input  logic         scan_in,
  output logic         scan_out
);

  logic body_req, body_ack;
  logic [1:0] call_a;
  logic rs, as_w, t_done;
  logic sc_sel, sc_tog, sc_dly;
  logic rpt_x;

  while_loop u_loop (
    .req(req), .cond(cond), .ack(ack), .body_req(body_req), .body_ack(body_ack),
    .ctl(ctl), .scan_in(scan_in), .scan_out(sc_sel)
  );

  call_n #(.N(2)) u_call (
    .r({req2, body_req}), .a(call_a), .rs(rs), .as_i(as_w), .clr(clr), .ctest(ctest)
  );

  assign ack2 = call_a[1];

  scan_delay #(.DELAY(DELAY)) u_dly (
    .rs(rs), .as_o(as_w), .ctl(ctl), .scan_in(sc_tog), .scan_out(sc_dly)
  );

  shared_register #(.W(W)) u_reg (.din(din), .p(rs), .c(as_w), .dout(dout));

  scan_toggle u_tog (
    .in(body_req), .ctl(ctl), .scan_in(sc_sel), .scan_out(sc_tog),
    .out0(tog0), .out1(tog1)
  );

  merge #(.N(2)) u_tmerge (.in({tog1, tog0}), .out(t_done));

  c_element u_join (.a(call_a[0]), .b(t_done), .clr(clr), .ctest(ctest), .c(body_ack));

  merge #(.N(2)) u_rmerge (.in({rpt_out, rpt_start}), .out(rpt_x));

  scan_c_element u_rpt (
    .a(rpt_x), .b(rpt_tok), .clr(clr), .ctest(ctest), .ctl(ctl),
    .scan_in(sc_dly), .scan_out(scan_out), .c(rpt_out)
  );

endmodule
