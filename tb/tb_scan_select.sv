// tb_scan_select: self-checking test of the scan version of the Select.
//
// 1. Reset through the transparent scan path, then random events on IN
//    with a random bundled SEL: exactly the chosen output must change.
// 2. Scan: random bits shifted in must appear on the outputs (OUTF cell
//    first in the chain, OUTT last) and come out of SCAN_OUT in order.
// 3. Capture: with random scanned-in state, IN and SEL, dropping TEST1 must
//    load IN ^ (other output) into the latch chosen by SEL only; the result
//    is then scanned out and compared.
module tb_scan_select
  import pscan_pkg::*;
;

  logic in, sel, scan_in, scan_out, outt, outf;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  scan_select dut (.in(in), .sel(sel), .ctl(ctl), .scan_in(scan_in), .scan_out(scan_out),
                   .outt(outt), .outf(outf));

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

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
    logic t0, f0, t1, f1, cap_t, cap_f;
    in = 0; sel = 0; scan_in = 0;
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b1, p2: 1'b1};
    #2 ctl = '{default: 1'b0};
    #1 expect_eq(outt, 1'b0, "reset outt"); expect_eq(outf, 1'b0, "reset outf");
    // normal operation
    for (int k = 0; k < 200; k++) begin
      t0 = outt; f0 = outf;
      sel = 1'($urandom);
      #1 in = ~in;
      #1;
      expect_eq(outt, sel ? ~t0 : t0, "outt after event");
      expect_eq(outf, sel ? f0 : ~f0, "outf after event");
      expect_eq(outt ^ outf, in, "rest invariant in = outt ^ outf");
    end
    // scan shift
    ctl.test1 = 1; ctl.test2 = 1;
    for (int k = 0; k < 50; k++) begin
      f1 = 1'($urandom); t1 = 1'($urandom);
      shift(t1); shift(f1);
      expect_eq(outt, t1, "shifted outt"); expect_eq(outf, f1, "shifted outf");
      expect_eq(scan_out, t1, "scan_out is outt");
    end
    // capture
    for (int k = 0; k < 100; k++) begin
      f1 = 1'($urandom); t1 = 1'($urandom);
      in = 1'($urandom); sel = 1'($urandom);
      shift(t1); shift(f1);
      cap_t = sel ? (in ^ f1) : t1;
      cap_f = sel ? f1 : (in ^ t1);
      #1 ctl.test1 = 0; #1;
      expect_eq(outt, t1, "outputs hold during capture");
      ctl.test1 = 1; #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
      expect_eq(scan_out, cap_t, "captured OUTT bit");
      shift(1'b0);
      expect_eq(scan_out, cap_f, "captured OUTF bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
