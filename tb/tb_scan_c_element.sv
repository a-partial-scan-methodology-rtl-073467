// tb_scan_c_element: self-checking test of the scannable C-element.
//
// Normal mode: random single input changes against a reference C-element.
// Scan mode: the output takes the shifted-in value whatever the inputs are;
// capture in OR mode (CTEST = 1) and in AND mode (after CLR) must load
// a | b and a & b, which are then shifted out.
module tb_scan_c_element
  import pscan_pkg::*;
;

  logic a, b, clr, ctest, scan_in, scan_out, c, ref_c;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  scan_c_element dut (.a(a), .b(b), .clr(clr), .ctest(ctest), .ctl(ctl),
                      .scan_in(scan_in), .scan_out(scan_out), .c(c));

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
    logic v;
    a = 0; b = 0; clr = 1; ctest = 0; scan_in = 0;
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b1, p2: 1'b1};
    #2 ctl = '{default: 1'b0};
    #1 clr = 0; ref_c = 0;
    #1 expect_eq(c, 1'b0, "reset");
    for (int k = 0; k < 200; k++) begin
      if ($urandom_range(0, 1) == 1) a = ~a; else b = ~b;
      #1;
      if (a == b) ref_c = a;
      expect_eq(c, ref_c, "normal C-element");
    end
    ctl.test1 = 1; ctl.test2 = 1;
    for (int k = 0; k < 100; k++) begin
      automatic bit and_mode = k[0];
      v = 1'($urandom); a = 1'($urandom); b = 1'($urandom);
      ctest = !and_mode; clr = and_mode;
      shift(v);
      expect_eq(c, v, "output set from the scan path");
      if (and_mode) clr = 0;
      #1 ctl.test1 = 0; #1 ctl.test1 = 1;
      expect_eq(c, v, "output holds during capture");
      #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
      expect_eq(scan_out, and_mode ? (a & b) : (a | b), and_mode ? "AND-mode capture" : "OR-mode capture");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
