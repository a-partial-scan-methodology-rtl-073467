// tb_merge: self-checking test of the XOR merge.
//
// Single transitions on random inputs of a 2-input and a 4-input merge must
// each give exactly one output transition.
module tb_merge;

  logic [1:0] in2;
  logic [3:0] in4;
  logic o2, o4, p2, p4;
  int checks = 0, failures = 0;

  merge #(.N(2)) u2 (.in(in2), .out(o2));
  merge #(.N(4)) u4 (.in(in4), .out(o4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in2 = 0; in4 = 0;
    #1;
    checks += 2;
    if (o2 !== 1'b0) failures++;
    if (o4 !== 1'b0) failures++;
    for (int k = 0; k < 200; k++) begin
      p2 = o2; p4 = o4;
      in2[$urandom_range(0, 1)] ^= 1'b1;
      in4[$urandom_range(0, 3)] ^= 1'b1;
      #1;
      checks += 2;
      if (o2 === p2) begin failures++; $display("FAIL 2-input merge missed an event"); end
      if (o4 === p4) begin failures++; $display("FAIL 4-input merge missed an event"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
