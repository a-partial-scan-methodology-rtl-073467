// tb_shared_register: self-checking test of the RS/AS-bundled register.
//
// For random data: DIN is set, RS (P) changes, then AS (C) changes after a
// delay. After AS, DOUT must hold the data given with the request and must
// not follow later DIN changes until the next request.
module tb_shared_register;

  localparam int unsigned W = 8;
  logic [W-1:0] din, dout, v;
  logic p, c;
  int checks = 0, failures = 0;

  shared_register #(.W(W)) dut (.din(din), .p(p), .c(c), .dout(dout));

  task automatic expect_eq(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    p = 0; c = 0; din = '0;
    #1;
    for (int k = 0; k < 200; k++) begin
      v = W'($urandom);
      din = v;
      #1 p = ~p;
      #($urandom_range(1, 4)) c = p;
      #1 din = ~v;
      #1 expect_eq(dout, v, "value written between RS and AS");
      din = W'($urandom);
      #1 expect_eq(dout, v, "held after AS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
