// tb_pscan_faults: stuck-at fault injection on the partial-scan network.
//
// The bench builds one fixed test set for pscan_top and applies it, through
// the scan chain, first to the fault-free network and then once for every
// single stuck-at fault in its list (injected with force on a net inside
// the design). A fault is detected when a captured scan bit or ACK2 differs
// from the value the bench's own equations predict for the good network.
// The test set has the three parts of the method:
//   OR mode    (CTEST = 1), random patterns;
//   AND mode   (CLR held during scan-in), random patterns;
//   feedback   (OR mode with a 01/10 input on one C-element, then CTEST
//              dropped), patterns aimed at each of the three C-elements.
// Checks: the good network matches on every pattern; a stuck-at-0 on the
// feedback line of each C-element escapes the OR- and AND-mode patterns and
// is caught only by the feedback patterns; the Select's fed-back lines (e, f)
// and gate lines (g, h), the Call's AS line and the C-element outputs are
// detected (the gates for stuck-at-0). Fault coverage of the whole list is printed.
// Stuck-at-1 on a latch gate of the Select or the Toggle is left out: it
// holds a latch open, and when the other latch opens as well the two form a
// ring that oscillates (Toggle) or races (Select). A zero-delay simulation
// cannot represent that; in silicon such faults show up as oscillation.
module tb_pscan_faults
  import pscan_pkg::*;
;

  localparam int unsigned W = 8;
  localparam int unsigned DELAY = 10;
  localparam int NPAT = 48;          // patterns per mode
  localparam int NSITE = 28;

  logic req, cond, ack, req2, ack2, tog0, tog1, clr, ctest, scan_in, scan_out;
  logic rpt_start, rpt_tok, rpt_out;
  logic [W-1:0] din, dout;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  pscan_top dut (
    .req(req), .cond(cond), .ack(ack), .req2(req2), .ack2(ack2), .din(din), .dout(dout),
    .tog0(tog0), .tog1(tog1), .rpt_start(rpt_start), .rpt_tok(rpt_tok), .rpt_out(rpt_out), .clr(clr), .ctest(ctest), .ctl(ctl),
    .scan_in(scan_in), .scan_out(scan_out)
  );

  // fixed test set: {v[5:0], req, cond, req2, rpt_start, rpt_tok}, v[i] for
  // scan cell i (0 OUTF, 1 OUTT, 2 OUT0, 3 OUT1, 4 delay, 5 token gate)
  logic [10:0] pat [3][NPAT];

  string site_name [NSITE] = '{
    "loop XOR out", "Select a", "Select b", "Select c", "Select d", "Select e", "Select f",
    "Select g", "Select h", "Toggle gate 0", "Toggle gate 1", "Call RS", "Call AS",
    "Call w0", "Call w1", "Call A0", "Call A1", "toggle merge", "join out",
    "join feedback", "Call C0 feedback", "Call C1 feedback", "Toggle out0", "Toggle out1",
    "body request", "token-gate XOR out", "token-gate C out", "token-gate feedback"};

  task automatic inject(input int s, input logic v);
    case (s)
      0:  force dut.u_loop.y = v;
      1:  force dut.u_loop.u_sel.a = v;
      2:  force dut.u_loop.u_sel.b = v;
      3:  force dut.u_loop.u_sel.c = v;
      4:  force dut.u_loop.u_sel.d = v;
      5:  force dut.u_loop.u_sel.e = v;
      6:  force dut.u_loop.u_sel.f = v;
      7:  force dut.u_loop.u_sel.g = v;
      8:  force dut.u_loop.u_sel.h = v;
      9:  force dut.u_tog.g0 = v;
      10: force dut.u_tog.g1 = v;
      11: force dut.rs = v;
      12: force dut.as_w = v;
      13: force dut.u_call.w[0] = v;
      14: force dut.u_call.w[1] = v;
      15: force dut.call_a[0] = v;
      16: force dut.call_a[1] = v;
      17: force dut.t_done = v;
      18: force dut.body_ack = v;
      19: force dut.u_join.fb = v;
      20: force dut.u_call.g_client[0].u_c.fb = v;
      21: force dut.u_call.g_client[1].u_c.fb = v;
      22: force dut.tog0 = v;
      23: force dut.tog1 = v;
      24: force dut.body_req = v;
      25: force dut.rpt_x = v;
      26: force dut.u_rpt.c_int = v;
      default: force dut.u_rpt.u_c.fb = v;
    endcase
  endtask

  task automatic remove(input int s);
    case (s)
      0:  release dut.u_loop.y;
      1:  release dut.u_loop.u_sel.a;
      2:  release dut.u_loop.u_sel.b;
      3:  release dut.u_loop.u_sel.c;
      4:  release dut.u_loop.u_sel.d;
      5:  release dut.u_loop.u_sel.e;
      6:  release dut.u_loop.u_sel.f;
      7:  release dut.u_loop.u_sel.g;
      8:  release dut.u_loop.u_sel.h;
      9:  release dut.u_tog.g0;
      10: release dut.u_tog.g1;
      11: release dut.rs;
      12: release dut.as_w;
      13: release dut.u_call.w[0];
      14: release dut.u_call.w[1];
      15: release dut.call_a[0];
      16: release dut.call_a[1];
      17: release dut.t_done;
      18: release dut.body_ack;
      19: release dut.u_join.fb;
      20: release dut.u_call.g_client[0].u_c.fb;
      21: release dut.u_call.g_client[1].u_c.fb;
      22: release dut.tog0;
      23: release dut.tog1;
      24: release dut.body_req;
      25: release dut.rpt_x;
      26: release dut.u_rpt.c_int;
      default: release dut.u_rpt.u_c.fb;
    endcase
  endtask

  function automatic bit is_fb(input int s);
    return (s >= 19 && s <= 21) || s == 27;
  endfunction

  // ------------------------------------------------------------ good network
  function automatic logic cel(input logic a, input logic b, input bit and_mode);
    return and_mode ? (a & b) : (a | b);
  endfunction

  function automatic logic [6:0] good(input logic [10:0] p, input bit and_mode);
    logic f, t, o0, o1, as_v, gv, r, c, r2, st, tk, a0, a1, back, y;
    logic [5:0] cap;
    {gv, as_v, o1, o0, t, f, r, c, r2, st, tk} = p;
    a0   = cel(t,  as_v ^ r2, and_mode);
    a1   = cel(r2, as_v ^ t,  and_mode);
    back = cel(a0, o0 ^ o1, and_mode);
    y    = r ^ back;
    cap[0] = c ? f : (y ^ t);
    cap[1] = c ? (y ^ f) : t;
    cap[2] = t ? ~o1 : o0;
    cap[3] = t ? o1 : o0;
    cap[4] = t ^ r2;
    cap[5] = cel(st ^ gv, tk, and_mode);
    return {a1, cap};
  endfunction

  // ------------------------------------------------------------ tester
  task automatic shift(input logic v);
    scan_in = v;
    #1 ctl.p1 = 1; #1 ctl.p1 = 0; #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
  endtask

  task automatic reset_all();
    clr = 1; ctest = 0; scan_in = 0;
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b1, p2: 1'b1};
    req = 0; cond = 0; req2 = 0; rpt_start = 0; rpt_tok = 0;
    #(DELAY + 2);
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b0, p2: 1'b0};
    #1;
  endtask

  // apply one pattern of a mode (0 OR, 1 AND, 2 feedback); 1 = mismatch
  task automatic apply(input int mode, input logic [10:0] p, output bit bad);
    logic [5:0] got;
    logic [6:0] e;
    logic a2;
    {req, cond, req2, rpt_start, rpt_tok} = p[4:0];
    ctest = (mode != 1);
    clr = (mode == 1);
    for (int i = 5; i >= 0; i--) shift(p[5 + i]);
    if (mode == 1) begin
      #1 clr = 0;
    end
    if (mode == 2) begin
      #(DELAY + 2) ctest = 0;
    end
    e = good(p, mode == 1);
    #(DELAY + 2) a2 = ack2;
    ctl.test1 = 0;
    #2 ctl.test1 = 1;
    #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
    for (int i = 5; i >= 0; i--) begin
      got[i] = scan_out;
      if (i > 0) shift(1'b0);
    end
    bad = ({a2, got} !== e);
  endtask

  // run a set of modes; returns the number of mismatching patterns
  task automatic run_modes(input bit do_or, input bit do_and, input bit do_fb, output int nbad);
    bit bad;
    nbad = 0;
    reset_all();
    for (int m = 0; m < 3; m++) begin
      if ((m == 0 && !do_or) || (m == 1 && !do_and) || (m == 2 && !do_fb)) continue;
      for (int k = 0; k < NPAT; k++) begin
        apply(m, pat[m][k], bad);
        nbad += int'(bad);
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nbad, nbad_12, detected, total;
    logic [10:0] p;
    din = '0;
    // test set
    for (int k = 0; k < NPAT; k++) begin
      pat[0][k] = 11'($urandom);
      pat[1][k] = 11'($urandom);
      // feedback pattern aimed at one C-element (join, Call C0, Call C1,
      // token gate); p = {v5, as, o1, o0, t, f, req, cond, req2, start, tok}
      p = 11'($urandom);
      case (k % 4)
        0: begin p[6] = 1'b1; p[8] = p[7]; p[3] = 1'b1; end            // join gets 10
        1: begin p[6] = ~(p[9] ^ p[2]); p[8] = p[7]; p[3] = 1'b1; end  // t != as ^ req2
        2: p[2] = ~(p[9] ^ p[6]);                                      // req2 != as ^ t
        default: p[0] = ~(p[1] ^ p[10]);                               // tok != start ^ v5
      endcase
      pat[2][k] = p;
    end

    // fault-free network
    run_modes(1, 1, 1, nbad);
    checks++;
    if (nbad != 0) begin
      failures++;
      $display("FAIL fault-free network mismatches on %0d patterns", nbad);
    end

    detected = 0; total = 0;
    for (int s = 0; s < NSITE; s++) begin
      for (int v = 0; v < 2; v++) begin
        if (s >= 7 && s <= 10 && v == 1) continue;  // latch held open, see header
        total++;
        inject(s, 1'(v));
        run_modes(1, 1, 1, nbad);
        if (is_fb(s) && v == 0) run_modes(1, 1, 0, nbad_12);
        remove(s);
        if (nbad > 0) detected++;
        else $display("undetected: %s stuck-at-%0d", site_name[s], v);
        // checks on the faults the method is meant to catch
        if ((s >= 5 && s <= 8) || s == 12 || s == 15 || s == 16 || s == 18 || s == 26 || is_fb(s)) begin
          checks++;
          if (nbad == 0) begin
            failures++;
            $display("FAIL %s stuck-at-%0d not detected", site_name[s], v);
          end
        end
        if (is_fb(s) && v == 0) begin
          checks++;
          if (nbad_12 != 0) begin
            failures++;
            $display("FAIL %s stuck-at-0 caught without the feedback step", site_name[s]);
          end
        end
      end
    end
    $display("fault coverage: %0d of %0d single stuck-at faults detected", detected, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
