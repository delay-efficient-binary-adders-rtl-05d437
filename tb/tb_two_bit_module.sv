// tb_two_bit_module - exhaustive self-checking test of the 2-bit carry
// module. All 32 combinations of a_i, b_i, a_i+1, b_i+1 and c_i are
// applied; p_i, g_i and the carries into bits i+1 and i+2 are compared
// with OR, AND and the integer sum {a_i+1,a_i} + {b_i+1,b_i} + c_i.
module tb_two_bit_module;
  logic ai, bi, ai1, bi1, ci, pi, gi, ci1, ci2;
  int checks = 0, failures = 0;

  two_bit_module dut (
    .ai(ai), .bi(bi), .ai1(ai1), .bi1(bi1), .ci(ci),
    .pi(pi), .gi(gi), .ci1(ci1), .ci2(ci2)
  );

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b%b b=%b%b c=%b got=%b exp=%b",
               what, ai1, ai, bi1, bi, ci, got, exp);
    end
  endtask

  initial begin
    int unsigned s1, s2;
    for (int v = 0; v < 32; v++) begin
      {ai1, ai, bi1, bi, ci} = 5'(v);
      #1;
      s1 = int'(ai) + int'(bi) + int'(ci);
      s2 = int'({ai1, ai}) + int'({bi1, bi}) + int'(ci);
      check("p",   pi,  ai | bi);
      check("g",   gi,  ai & bi);
      check("ci1", ci1, s1[1]);
      check("ci2", ci2, s2[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
