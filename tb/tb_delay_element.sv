// tb_delay_element: self-checking test of the bundling-delay model.
//
// Every input transition must reach the output exactly DELAY time units
// later: unchanged one unit before, changed at DELAY. Run with the default
// DELAY and with a second value.
module tb_delay_element;

  localparam int unsigned D1 = 10, D2 = 3;
  logic in, o1, o2;
  int checks = 0, failures = 0;

  delay_element #(.DELAY(D1)) u1 (.in(in), .out(o1));
  delay_element #(.DELAY(D2)) u2 (.in(in), .out(o2));

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0;
    #20;
    expect_eq(o1, 1'b0, "settled o1"); expect_eq(o2, 1'b0, "settled o2");
    for (int k = 0; k < 50; k++) begin
      in = ~in;
      #(D2 - 1) expect_eq(o2, ~in, "o2 one unit early");
      #1 expect_eq(o2, in, "o2 on time");
      #(D1 - D2 - 1) expect_eq(o1, ~in, "o1 one unit early");
      #1 expect_eq(o1, in, "o1 on time");
      #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
