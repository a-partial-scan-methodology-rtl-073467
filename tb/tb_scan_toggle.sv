// tb_scan_toggle: self-checking test of the scan version of the Toggle.
//
// After reset through the scan path, input events must alternate between
// OUT0 (odd events) and OUT1 (even events). Then scan-in/scan-out of random
// states, and capture: dropping TEST1 with IN = 1 must load ~OUT1 into the
// OUT0 cell, with IN = 0 it must load OUT0 into the OUT1 cell.
module tb_scan_toggle
  import pscan_pkg::*;
;

  logic in, scan_in, scan_out, out0, out1;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  scan_toggle dut (.in(in), .ctl(ctl), .scan_in(scan_in), .scan_out(scan_out),
                   .out0(out0), .out1(out1));

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
    logic o0, o1, v0, v1, c0, c1;
    in = 0; scan_in = 0;
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b1, p2: 1'b1};
    #2 ctl = '{default: 1'b0};
    #1 expect_eq(out0, 1'b0, "reset out0"); expect_eq(out1, 1'b0, "reset out1");
    for (int k = 1; k <= 100; k++) begin
      o0 = out0; o1 = out1;
      #1 in = ~in;
      #1;
      expect_eq(out0 ^ o0, k[0], "out0 changes on odd events");
      expect_eq(out1 ^ o1, ~k[0], "out1 changes on even events");
    end
    ctl.test1 = 1; ctl.test2 = 1;
    for (int k = 0; k < 100; k++) begin
      v0 = 1'($urandom); v1 = 1'($urandom); in = 1'($urandom);
      shift(v1); shift(v0);
      expect_eq(out0, v0, "shifted out0"); expect_eq(out1, v1, "shifted out1");
      c0 = in ? ~v1 : v0;
      c1 = in ? v1 : v0;
      #1 ctl.test1 = 0; #1 ctl.test1 = 1;
      #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
      expect_eq(scan_out, c1, "captured out1 bit");
      shift(1'b0);
      expect_eq(scan_out, c0, "captured out0 bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
