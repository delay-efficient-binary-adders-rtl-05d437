// tb_carry_block - self-checking test of the carry network at N = 64.
// Every carry c_i is checked against the integer sum a + b: the carry into
// bit i < N is a_i ^ b_i ^ (a+b)_i, the carry out is bit N of the sum.
// The even-bit propagate and generate outputs are checked against OR and
// AND of the operand bits. Vectors: directed corner cases (a carry born in
// bit 0 rippling to the top, all ones, alternating patterns) then random.
module tb_carry_block;
  localparam int unsigned N = 64;
  localparam int unsigned NRAND = 2000;

  logic [N-1:0]   a, b;
  logic [N:1]     c;
  logic [N/2-1:1] pe, ge;
  int checks = 0, failures = 0;

  carry_block #(.N(N)) dut (.a(a), .b(b), .c(c), .pe(pe), .ge(ge));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb);
    logic [N:0] full;
    logic [N:1] exp_c;
    a = va;
    b = vb;
    #1;
    full = {1'b0, va} + {1'b0, vb};
    for (int i = 1; i < N; i++) exp_c[i] = full[i] ^ va[i] ^ vb[i];
    exp_c[N] = full[N];
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL carries a=%h b=%h c=%h exp=%h", va, vb, c, exp_c);
    end
    for (int k = 1; k < N/2; k++) begin
      checks++;
      if (pe[k] !== (va[2*k] | vb[2*k]) || ge[k] !== (va[2*k] & vb[2*k])) begin
        failures++;
        $display("FAIL p/g bit %0d a=%h b=%h", 2*k, va, vb);
      end
    end
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r = '0;
    for (int w = 0; w < (N + 31) / 32; w++) r = (r << 32) | N'($urandom);
    return r;
  endfunction

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply(N'(1), '1);                 // carry born in bit 0, ripples to c_N
    apply('1, N'(1));
    apply({N/2{2'b01}}, {N/2{2'b10}}); // all propagate, no generate
    apply({N/2{2'b01}}, {N/2{2'b01}});
    apply({N/2{2'b10}}, {N/2{2'b11}});
    for (int i = 0; i < N; i++) apply(N'(1) << i, '1);
    for (int n = 0; n < NRAND; n++) apply(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
