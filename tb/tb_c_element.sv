// tb_c_element: self-checking test of the testable C-element.
//
// Normal mode: random input sequences against a reference C-element (output
// takes the common value when both inputs agree, otherwise holds), for all
// four input-bubble variants. Test modes: with CTEST = 1 the cell must be an
// OR gate; just after CLR the cell must be an AND gate for inputs that go
// up together; and the feedback test (01 held in OR mode, CTEST dropped)
// must keep the output at 1. CLR must force 0 in every mode.
module tb_c_element;

  logic [3:0] a, b, c;
  logic clr, ctest;
  int checks = 0, failures = 0;

  c_element #(.INV_A(1'b0), .INV_B(1'b0)) u0 (.a(a[0]), .b(b[0]), .clr(clr), .ctest(ctest), .c(c[0]));
  c_element #(.INV_A(1'b1), .INV_B(1'b0)) u1 (.a(a[1]), .b(b[1]), .clr(clr), .ctest(ctest), .c(c[1]));
  c_element #(.INV_A(1'b0), .INV_B(1'b1)) u2 (.a(a[2]), .b(b[2]), .clr(clr), .ctest(ctest), .c(c[2]));
  c_element #(.INV_A(1'b1), .INV_B(1'b1)) u3 (.a(a[3]), .b(b[3]), .clr(clr), .ctest(ctest), .c(c[3]));

  localparam logic [3:0] IA = 4'b1010, IB = 4'b1100;
  logic [3:0] ref_c;

  task automatic chk(input int i, input logic exp, input string what);
    checks++;
    if (c[i] !== exp) begin
      failures++;
      $display("FAIL %s cell %0d: c=%0b expected %0b", what, i, c[i], exp);
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
    ctest = 0; clr = 1; a = IA; b = IB;  // effective inputs all 0
    #1 for (int i = 0; i < 4; i++) chk(i, 1'b0, "clear");
    clr = 0; ref_c = 0;
    #1;
    // normal operation: one input changes at a time
    for (int k = 0; k < 400; k++) begin
      automatic int i = $urandom_range(0, 3);
      if ($urandom_range(0, 1) == 1) a[i] = ~a[i]; else b[i] = ~b[i];
      #1;
      if ((a[i] ^ IA[i]) == (b[i] ^ IB[i])) ref_c[i] = a[i] ^ IA[i];
      for (int j = 0; j < 4; j++) chk(j, ref_c[j], "normal");
    end
    // OR mode
    ctest = 1;
    for (int k = 0; k < 4; k++) begin
      a = IA ^ {4{k[0]}}; b = IB ^ {4{k[1]}};
      #1 for (int i = 0; i < 4; i++) chk(i, k[0] | k[1], "OR mode");
    end
    // CLR dominates the OR mode
    clr = 1; #1 for (int i = 0; i < 4; i++) chk(i, 1'b0, "clear in OR mode");
    // AND mode: clear with inputs at the applied vector, release
    ctest = 0;
    for (int k = 0; k < 4; k++) begin
      clr = 1; a = IA ^ {4{k[0]}}; b = IB ^ {4{k[1]}};
      #1 clr = 0;
      #1 for (int i = 0; i < 4; i++) chk(i, k[0] & k[1], "AND mode");
    end
    // feedback test: 01 / 10 held in OR mode, then CTEST released
    for (int k = 1; k < 3; k++) begin
      clr = 1; #1 clr = 0; ctest = 1;
      a = IA ^ {4{k[0]}}; b = IB ^ {4{k[1]}};
      #1 for (int i = 0; i < 4; i++) chk(i, 1'b1, "feedback test, OR mode");
      ctest = 0;
      #1 for (int i = 0; i < 4; i++) chk(i, 1'b1, "feedback test, CTEST released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
