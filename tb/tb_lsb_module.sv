// tb_lsb_module - exhaustive self-checking test of the least significant
// 2-bit carry module. For all 16 values of {a1,a0} and {b1,b0} the carries
// into bits 1 and 2 are taken from the integer sum of the two 2-bit numbers
// (carry-in 0) and compared with c1 and c2.
module tb_lsb_module;
  logic a0, b0, a1, b1, c1, c2;
  int checks = 0, failures = 0;

  lsb_module dut (.a0(a0), .b0(b0), .a1(a1), .b1(b1), .c1(c1), .c2(c2));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum0, sum;
    for (int v = 0; v < 16; v++) begin
      {a1, a0, b1, b0} = 4'(v);
      #1;
      sum0 = int'(a0) + int'(b0);
      sum  = int'({a1, a0}) + int'({b1, b0});
      checks += 2;
      if (c1 !== sum0[1]) begin
        failures++;
        $display("FAIL c1 a=%b%b b=%b%b c1=%b", a1, a0, b1, b0, c1);
      end
      if (c2 !== sum[2]) begin
        failures++;
        $display("FAIL c2 a=%b%b b=%b%b c2=%b", a1, a0, b1, b0, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
