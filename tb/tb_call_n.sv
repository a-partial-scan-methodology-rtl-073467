// tb_call_n: self-checking test of the N-way Call (N = 2 and N = 4).
//
// Normal operation: a random client sends a request; the bench plays the
// shared resource and answers RS with AS after a random delay. RS must
// change once per request, no acknowledge may appear before AS, and after
// AS exactly the requesting client must be acknowledged. Test modes: with
// CTEST = 1 (OR mode) and after CLR (AND mode) each acknowledge must equal
// OR / AND of R[i] and AS ^ (XOR of the other requests) for random vectors.
module tb_call_n;

  localparam int N2 = 2, N4 = 4;
  logic [N2-1:0] r2, a2;
  logic [N4-1:0] r4, a4;
  logic rs2, rs4, as2, as4, clr, ctest;
  int checks = 0, failures = 0;

  call_n #(.N(N2)) u2 (.r(r2), .a(a2), .rs(rs2), .as_i(as2), .clr(clr), .ctest(ctest));
  call_n #(.N(N4)) u4 (.r(r4), .a(a4), .rs(rs4), .as_i(as4), .clr(clr), .ctest(ctest));

  task automatic expect_eq(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N2-1:0] pa2;
    logic [N4-1:0] pa4;
    logic prs2, prs4;
    logic [3:0] w, e;
    clr = 1; ctest = 0; r2 = 0; r4 = 0; as2 = 0; as4 = 0;
    #1 clr = 0;
    #1 expect_eq({2'b0, a2}, 4'b0, "reset a2"); expect_eq(a4, 4'b0, "reset a4");
    for (int k = 0; k < 200; k++) begin
      automatic int i2 = $urandom_range(0, N2 - 1);
      automatic int i4 = $urandom_range(0, N4 - 1);
      pa2 = a2; pa4 = a4; prs2 = rs2; prs4 = rs4;
      r2[i2] = ~r2[i2]; r4[i4] = ~r4[i4];
      #1;
      expect_eq({3'b0, rs2 ^ prs2}, 4'd1, "rs2 toggles once");
      expect_eq({3'b0, rs4 ^ prs4}, 4'd1, "rs4 toggles once");
      #($urandom_range(1, 5));
      expect_eq({2'b0, a2}, {2'b0, pa2}, "no a2 before AS");
      expect_eq(a4, pa4, "no a4 before AS");
      as2 = rs2; as4 = rs4;
      #1;
      expect_eq({2'b0, a2 ^ pa2}, 4'(1 << i2), "only requester acknowledged (N=2)");
      expect_eq(a4 ^ pa4, 4'(1 << i4), "only requester acknowledged (N=4)");
      expect_eq(a4, r4, "at rest a = r (N=4)");
    end
    // OR mode
    ctest = 1;
    for (int k = 0; k < 100; k++) begin
      r4 = 4'($urandom); as4 = 1'($urandom);
      #1;
      for (int i = 0; i < N4; i++) w[i] = as4 ^ ^(r4 & ~(4'(1) << i));
      e = r4 | w;
      expect_eq(a4, e, "OR mode");
    end
    // AND mode
    ctest = 0;
    for (int k = 0; k < 100; k++) begin
      clr = 1; r4 = 4'($urandom); as4 = 1'($urandom);
      #1 clr = 0;
      #1;
      for (int i = 0; i < N4; i++) w[i] = as4 ^ ^(r4 & ~(4'(1) << i));
      e = r4 & w;
      expect_eq(a4, e, "AND mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
