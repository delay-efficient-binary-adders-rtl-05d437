// tb_qca_adder_widths - checks the adder at several operand word lengths
// (4, 8, 16, 32 and 128 bits) besides the default 64, each against the
// integer sum a + b, and reports the total.
module tb_qca_adder_widths;
  logic d4, d8, d16, d32, d128;
  int c4, c8, c16, c32, c128;
  int f4, f8, f16, f32, f128;
  int checks, failures;

  adder_width_check #(.N(4))   u4   (.done(d4),   .checks(c4),   .failures(f4));
  adder_width_check #(.N(8))   u8   (.done(d8),   .checks(c8),   .failures(f8));
  adder_width_check #(.N(16))  u16  (.done(d16),  .checks(c16),  .failures(f16));
  adder_width_check #(.N(32))  u32  (.done(d32),  .checks(c32),  .failures(f32));
  adder_width_check #(.N(128)) u128 (.done(d128), .checks(c128), .failures(f128));

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d",
             c4 + c8 + c16 + c32 + c128, f4 + f8 + f16 + f32 + f128 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d4 && d8 && d16 && d32 && d128);
    checks   = c4 + c8 + c16 + c32 + c128;
    failures = f4 + f8 + f16 + f32 + f128;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
