// tb_qca_adder - end-to-end self-checking test of the adder at its default
// width (N = 64, no parameter override).
// Each vector's {cout, s} is compared with the integer sum a + b. The test
// counts how often each behaviour of the carry network occurs and fails if
// one of them never did:
//   full_ripple - a carry generated in bit 0 propagates through every
//                 higher bit to the carry out (the worst-case path);
//   carry_out   - the sum overflows N bits (c_N = 1);
//   no_carry    - no bit position generates a carry at all.
module tb_qca_adder;
  localparam int unsigned N = 64;
  localparam int unsigned NRAND = 5000;

  logic [N-1:0] a, b, s;
  logic         cout;
  int checks = 0, failures = 0;
  int n_full_ripple = 0, n_carry_out = 0, n_no_carry = 0;

  qca_adder dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb);
    logic [N:0] full;
    a = va;
    b = vb;
    #1;
    full = {1'b0, va} + {1'b0, vb};
    checks++;
    if ({cout, s} !== full) begin
      failures++;
      $display("FAIL a=%h b=%h got=%b_%h exp=%b_%h",
               va, vb, cout, s, full[N], full[N-1:0]);
    end
    if ((va[0] & vb[0]) && ((va[N-1:1] ^ vb[N-1:1]) == '1)) n_full_ripple++;
    if (full[N])           n_carry_out++;
    if ((va & vb) == '0)   n_no_carry++;
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r = '0;
    for (int w = 0; w < (N + 31) / 32; w++) r = (r << 32) | N'($urandom);
    return r;
  endfunction

  initial begin
    logic [N-1:0] r;
    apply('0, '0);
    apply('1, N'(1));                          // worst case: g0 = 1, all propagate
    apply(N'(1), '1);
    apply({N/2{2'b10}} | N'(1), {N/2{2'b01}});  // worst case with mixed operands
    apply('1, '1);
    apply({N/2{2'b01}}, {N/2{2'b10}});          // no carry anywhere
    for (int i = 0; i < N; i++) apply(N'(1) << i, N'(1) << i);
    for (int n = 0; n < NRAND; n++) begin
      r = rnd();
      case (n % 4)
        0: apply(r, rnd());
        1: apply(r, ~r);                        // all propagate, no carry
        2: apply(r | N'(1), (~r) | N'(1));      // bit-0 carry ripples to the top
        default: apply(r, r);
      endcase
    end
    checks += 3;
    if (n_full_ripple == 0) begin failures++; $display("FAIL full_ripple never seen"); end
    if (n_carry_out == 0)   begin failures++; $display("FAIL carry_out never seen");   end
    if (n_no_carry == 0)    begin failures++; $display("FAIL no_carry never seen");    end
    $display("full_ripple=%0d carry_out=%0d no_carry=%0d",
             n_full_ripple, n_carry_out, n_no_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
