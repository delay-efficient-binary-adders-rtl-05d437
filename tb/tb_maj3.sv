// tb_maj3 - exhaustive self-checking test of the majority gate.
// Applies all eight input combinations and compares y with "at least two
// inputs are 1", computed here by counting ones.
module tb_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ((int'(a) + int'(b) + int'(c)) >= 2)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b y=%b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
