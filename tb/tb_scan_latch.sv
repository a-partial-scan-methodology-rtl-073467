// tb_scan_latch: self-checking test of the scannable master-slave latch.
//
// Random stimulus over many rounds exercises the four uses of the cell:
// normal transparent latch (TEST2 = 0, gate G), two-phase shift (P1 then P2
// with TEST2 = 1, output from the slave), capture through DIN while the
// output holds, and the transparent path (P1 = P2 = TEST2 = 1) used for
// reset. Expected values are kept in a small reference model of the two
// stages written independently in this bench.
module tb_scan_latch;

  logic sin, din, g, p1, p2, test2, out;
  logic ref_m, ref_s;
  int checks = 0, failures = 0;

  scan_latch dut (.sin(sin), .din(din), .g(g), .p1(p1), .p2(p2), .test2(test2), .out(out));

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: out=%0b expected %0b", what, out, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reset through the transparent path
    sin = 0; din = 0; g = 0; p1 = 1; p2 = 1; test2 = 1;
    #1 check(1'b0, "transparent reset");
    sin = 1; #1 check(1'b1, "transparent path follows sin");
    sin = 0; #1 check(1'b0, "transparent path follows sin back");
    p1 = 0; p2 = 0; test2 = 0; ref_m = 0; ref_s = 0;
    #1;
    for (int k = 0; k < 200; k++) begin
      automatic int op = $urandom_range(0, 3);
      automatic logic v = 1'($urandom);
      case (op)
        0: begin  // normal latch: open, change data, close, change data
          test2 = 0; din = v; g = 1; #1 ref_m = v; check(v, "normal open");
          g = 0; #1 din = ~v; #1 check(v, "normal closed holds");
        end
        1: begin  // shift one bit: P1 then P2
          test2 = 1; sin = v; #1 check(ref_s, "slave holds before P1");
          p1 = 1; #1 ref_m = v; check(ref_s, "slave holds during P1");
          p1 = 0; #1 sin = ~v; p2 = 1; #1 ref_s = ref_m; check(v, "slave after P2");
          p2 = 0; #1 check(v, "slave holds after P2");
        end
        2: begin  // capture through DIN while output holds
          test2 = 1; din = v; g = 1; #1 ref_m = v; check(ref_s, "output holds during capture");
          g = 0; #1 din = ~v; p2 = 1; #1 ref_s = ref_m; check(v, "captured value after P2");
          p2 = 0; #1;
        end
        default: begin  // P1 has priority over G
          test2 = 1; sin = v; din = ~v; g = 1; p1 = 1; #1 ref_m = v;
          p1 = 0; g = 0; #1 p2 = 1; #1 ref_s = ref_m; check(v, "P1 wins over G");
          p2 = 0; test2 = 0; #1 check(ref_m, "master visible in normal mode");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
