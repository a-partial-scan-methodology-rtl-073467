// tb_scan_delay: self-checking test of the delay converted to a scan latch.
//
// Normal mode: an RS transition must reach AS after the delay (the latch is
// transparent). Scan mode: AS must take the value shifted in, independent of
// RS, and pass it to SCAN_OUT. Capture: dropping TEST1 must load the delayed
// RS into the cell, which is then shifted out.
module tb_scan_delay
  import pscan_pkg::*;
;

  localparam int unsigned D = 10;
  logic rs, as_o, scan_in, scan_out;
  scan_ctl_t ctl;
  int checks = 0, failures = 0;

  scan_delay #(.DELAY(D)) dut (.rs(rs), .as_o(as_o), .ctl(ctl), .scan_in(scan_in), .scan_out(scan_out));

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
    rs = 0; scan_in = 0;
    ctl = '{test1: 1'b1, test2: 1'b1, p1: 1'b1, p2: 1'b1};
    #2 ctl = '{default: 1'b0};
    #(D + 1) expect_eq(as_o, 1'b0, "reset");
    for (int k = 0; k < 50; k++) begin
      rs = ~rs;
      #(D - 1) expect_eq(as_o, ~rs, "AS not before the delay");
      #2 expect_eq(as_o, rs, "AS after the delay");
    end
    ctl.test1 = 1; ctl.test2 = 1;
    for (int k = 0; k < 50; k++) begin
      v = 1'($urandom); rs = 1'($urandom);
      shift(v);
      expect_eq(as_o, v, "AS set from the scan path");
      expect_eq(scan_out, v, "scan_out");
      #(D + 1) ctl.test1 = 0; #1 ctl.test1 = 1;
      expect_eq(as_o, v, "AS holds during capture");
      #1 ctl.p2 = 1; #1 ctl.p2 = 0; #1;
      expect_eq(scan_out, rs, "captured delayed RS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
