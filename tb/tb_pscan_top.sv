// tb_pscan_top: end-to-end test of the partial-scan control network.
//
// The bench plays both the environment of the network and the tester, with
// the top at its default parameters.
//  1. Reset: CLR high and the scan chain made transparent with SCAN_IN = 0.
//  2. Normal operation: WHILE runs with random iteration counts. The bench
//     keeps COND bundled with each loop event, checks the number of body
//     passes, the single ACK, the Toggle parity outputs, the value written
//     to the shared register and that the run takes n times the bundling
//     delay. Between runs the second Call client uses the register. The
//     token gate holds a token that comes before its start, then passes
//     every token.
//  3. Scan tests of the XOR/C network, each with random vectors applied
//     through the 6-cell scan chain and the primary inputs, a capture
//     (TEST1 dropped), and the captured state shifted out:
//       OR mode   (CTEST = 1): C-elements act as OR gates;
//       AND mode  (CLR held during scan-in, then released): AND gates;
//       feedback  (OR mode, then CTEST dropped): a C-element with a 01/10
//                 input must keep its output at 1.
//     Expected captures come from this bench's own equations of the network.
// Every mechanism above is counted; one that never happened is a failure.
module tb_pscan_top
  import pscan_pkg::*;
;

  localparam int unsigned W = 8;      // matches the top's default
  localparam int unsigned DELAY = 10; // matches the top's default

  logic req, cond, ack, req2, ack2, tog0, tog1, clr, ctest, scan_in, scan_out;
  logic rpt_start, rpt_tok, rpt_out;
  logic [W-1:0] din, dout;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_reset = 0, n_iter = 0, n_exit = 0, n_zero_iter = 0, n_client2 = 0;
  int n_tog0 = 0, n_tog1 = 0, n_shift = 0, n_capture = 0;
  int n_or = 0, n_and = 0, n_fb = 0, n_rpt = 0;

  pscan_top dut (
    .req(req), .cond(cond), .ack(ack), .req2(req2), .ack2(ack2), .din(din), .dout(dout),
    .tog0(tog0), .tog1(tog1), .rpt_start(rpt_start), .rpt_tok(rpt_tok), .rpt_out(rpt_out), .clr(clr), .ctest(ctest), .ctl(ctl),
    .scan_in(scan_in), .scan_out(scan_out)
  );

  task automatic expect_eq(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------------- normal mode
  int remaining, body_events, ack_events;
  bit normal_mode = 0;

  always @(dut.body_req) if (normal_mode) begin
    body_events++;
    remaining--;
    cond = (remaining > 0);  // set long before the body completes
  end
  always @(ack) if (normal_mode) ack_events++;
  always @(tog0) if (normal_mode) n_tog0++;
  always @(tog1) if (normal_mode) n_tog1++;

  // -------------------------------------------------------------- scan helpers
  task automatic shift(input logic v);
    scan_in = v;
    #1 ctl.p1 = 1; #1 ctl.p1 = 0; #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
    n_shift++;
  endtask

  // cell order from SCAN_IN: [0] OUTF, [1] OUTT, [2] OUT0, [3] OUT1, [4] delay,
  // [5] token-gate C-element
  task automatic scan_load(input logic [5:0] v);
    for (int i = 5; i >= 0; i--) shift(v[i]);
  endtask

  task automatic capture_and_unload(output logic [5:0] got);
    #(DELAY + 2) ctl.test1 = 0;
    #2 ctl.test1 = 1;
    #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
    n_capture++;
    for (int i = 5; i >= 0; i--) begin
      got[i] = scan_out;
      if (i > 0) shift(1'b0);
    end
  endtask

  // reference of the network between the scan cells; mode 0 = OR, 1 = AND
  function automatic logic cel(input logic a, input logic b, input bit and_mode);
    return and_mode ? (a & b) : (a | b);
  endfunction

  function automatic logic [6:0] expect_capture(input logic [5:0] v, input logic r, input logic c,
                                                input logic r2, input logic st, input logic tk,
                                                input bit and_mode);
    logic f, t, o0, o1, as_v, gv, a0, a1, bdone, back, y;
    logic [5:0] cap;
    {gv, as_v, o1, o0, t, f} = v;
    a0    = cel(t,  as_v ^ r2, and_mode);  // client 0 of the Call
    a1    = cel(r2, as_v ^ t,  and_mode);  // client 1 of the Call
    bdone = o0 ^ o1;
    back  = cel(a0, bdone, and_mode);      // join of the loop body
    y     = r ^ back;
    cap[0] = c ? f : (y ^ t);
    cap[1] = c ? (y ^ f) : t;
    cap[2] = t ? ~o1 : o0;
    cap[3] = t ? o1 : o0;
    cap[4] = t ^ r2;                        // delayed RS
    cap[5] = cel(st ^ gv, tk, and_mode);   // token-gate C-element
    return {a1, cap};
  endfunction

  task automatic scan_test(input int mode);  // 0 OR, 1 AND, 2 feedback
    logic [5:0] v, got;
    logic [6:0] e;
    v = 6'($urandom); req = 1'($urandom); cond = 1'($urandom); req2 = 1'($urandom);
    rpt_start = 1'($urandom); rpt_tok = 1'($urandom);
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b0, p2: 1'b0};
    ctest = (mode != 1);
    clr = (mode == 1);
    if (mode == 2) begin
      // the join C-element gets a 01/10 input: a0 = 1 and o0 ^ o1 = 0
      v[1] = 1'b1; v[3] = v[2];
    end
    scan_load(v);
    if (mode == 1) begin
      #1 clr = 0;
    end
    if (mode == 2) begin
      #(DELAY + 2);
      checks++;
      if (dut.body_ack !== 1'b1) begin
        failures++;
        $display("FAIL feedback test: join output not 1 in OR mode");
      end
      ctest = 0;
    end
    e = expect_capture(v, req, cond, req2, rpt_start, rpt_tok, mode == 1);
    #(DELAY + 2) expect_eq(W'(ack2), W'(e[6]), "ACK2 observed during test");
    capture_and_unload(got);
    expect_eq(W'(got), W'(e[5:0]), mode == 0 ? "OR-mode capture" :
                                   mode == 1 ? "AND-mode capture" : "feedback-test capture");
    case (mode)
      0: n_or++;
      1: n_and++;
      default: n_fb++;
    endcase
  endtask

  task automatic reset_all();
    clr = 1; ctest = 0; scan_in = 0;
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b1, p2: 1'b1};
    req = 0; cond = 0; req2 = 0; rpt_start = 0; rpt_tok = 0;
    #(DELAY + 2);
    ctl = '{default: 1'b0};
    #1 clr = 0;
    #(DELAY + 2);
    n_reset++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    time t0;
    logic [W-1:0] v;
    logic pack2;
    din = '0;
    reset_all();
    expect_eq(W'({ack, ack2, tog0, tog1, rpt_out, scan_out}), '0, "state after reset");

    // 2. normal operation
    normal_mode = 1;
    for (int k = 0; k < 30; k++) begin
      n = (k < 2) ? k : $urandom_range(0, 7);
      v = W'($urandom);
      din = v;
      remaining = n; body_events = 0; ack_events = 0;
      n_tog0 = 0; n_tog1 = 0;
      cond = (n > 0);
      #1 req = ~req; t0 = $time;
      wait (ack_events == 1);
      expect_eq(W'($time - t0), W'(n * DELAY), "loop latency n * DELAY");
      #(DELAY);
      expect_eq(W'(body_events), W'(n), "body passes");
      expect_eq(W'(ack_events), W'(1), "one ACK per request");
      // OUT0 takes the odd-numbered body events since reset
      expect_eq(W'(n_tog0), W'((n_iter + n + 1) / 2 - (n_iter + 1) / 2), "toggle OUT0 events");
      expect_eq(W'(n_tog0 + n_tog1), W'(n), "toggle events");
      if (n > 0) expect_eq(dout, v, "register written by the loop body");
      n_iter += n;
      n_exit++;
      if (n == 0) n_zero_iter++;
      // second client of the Call
      v = W'($urandom);
      din = v; pack2 = ack2;
      #1 req2 = ~req2;
      #(DELAY - 1) expect_eq(W'(ack2), W'(pack2), "no ACK2 before the delay");
      #2 expect_eq(W'(ack2 ^ pack2), W'(1), "ACK2 after the delay");
      expect_eq(dout, v, "register written by client 2");
      n_client2++;
    end
    // token gate: a token before the start is held, then every token passes
    pack2 = rpt_out;
    #1 rpt_tok = ~rpt_tok;
    #1 expect_eq(W'(rpt_out), W'(pack2), "token held before start");
    rpt_start = ~rpt_start;
    #1 expect_eq(W'(rpt_out ^ pack2), W'(1), "held token passed at start");
    n_rpt++;
    for (int k = 0; k < 20; k++) begin
      pack2 = rpt_out;
      #1 rpt_tok = ~rpt_tok;
      #1 expect_eq(W'(rpt_out ^ pack2), W'(1), "token passed");
      n_rpt++;
    end
    normal_mode = 0;

    // 3. scan tests
    for (int k = 0; k < 40; k++) scan_test(0);
    for (int k = 0; k < 40; k++) scan_test(1);
    for (int k = 0; k < 20; k++) scan_test(2);

    // back to normal operation after the tests
    reset_all();
    normal_mode = 1;
    remaining = 3; body_events = 0; ack_events = 0; cond = 1;
    #1 req = ~req;
    wait (ack_events == 1);
    #(DELAY);
    expect_eq(W'(body_events), W'(3), "loop runs after a test session");
    normal_mode = 0;

    $display("mechanisms: reset=%0d body_pass=%0d loop_exit=%0d zero_pass=%0d client2=%0d tokens=%0d shift=%0d capture=%0d or=%0d and=%0d feedback=%0d",
             n_reset, n_iter, n_exit, n_zero_iter, n_client2, n_rpt, n_shift, n_capture, n_or, n_and, n_fb);
    if (n_reset == 0 || n_iter == 0 || n_exit == 0 || n_zero_iter == 0 || n_client2 == 0 ||
        n_rpt == 0 || n_shift == 0 || n_capture == 0 || n_or == 0 || n_and == 0 || n_fb == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
