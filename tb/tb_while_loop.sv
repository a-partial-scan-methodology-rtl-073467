// tb_while_loop: self-checking test of the WHILE construct.
//
// The bench plays the loop body: it answers every BODY_REQ transition with
// a BODY_ACK transition after a few time units, and sets COND for the next
// test just before answering. For random iteration counts n (0..6) one REQ
// event must give exactly n body events and then one ACK event. The scan
// path of the Select is also checked: after shifting in (OUTF, OUTT) the
// outputs show the shifted values.
module tb_while_loop
  import pscan_pkg::*;
;

  logic req, cond, ack, body_req, body_ack, scan_in, scan_out;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;
  int body_events, ack_events, remaining;

  while_loop dut (.req(req), .cond(cond), .ack(ack), .body_req(body_req), .body_ack(body_ack),
                  .ctl(ctl), .scan_in(scan_in), .scan_out(scan_out));

  task automatic expect_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // loop body model
  always @(body_req) begin
    if (ctl.test1 == 1'b0) begin
      body_events++;
      #3;
      remaining--;
      cond = (remaining > 0);
      #1 body_ack = ~body_ack;
    end
  end

  always @(ack) if (ctl.test1 == 1'b0) ack_events++;

  task automatic shift(input logic v);
    scan_in = v;
    #1 ctl.p1 = 1; #1 ctl.p1 = 0; #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic a, b;
    req = 0; cond = 0; body_ack = 0; scan_in = 0;
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b1, p2: 1'b1};
    #2 ctl = '{default: 1'b0};
    #1;
    body_events = 0; ack_events = 0;
    for (int k = 0; k < 40; k++) begin
      n = $urandom_range(0, 6);
      body_events = 0; ack_events = 0;
      remaining = n;
      cond = (n > 0);
      #1 req = ~req;
      #(5 * n + 10);
      expect_int(body_events, n, "body iterations");
      expect_int(ack_events, 1, "one ACK per request");
    end
    ctl.test1 = 1; ctl.test2 = 1;
    for (int k = 0; k < 20; k++) begin
      a = 1'($urandom); b = 1'($urandom);
      shift(b); shift(a);
      expect_int(int'(ack), int'(a), "scanned OUTF (ACK)");
      expect_int(int'(body_req), int'(b), "scanned OUTT (BODY_REQ)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
