// tb_sum_block - self-checking test of the sum network at N = 64.
// The testbench itself supplies correct carries and even-bit p/g signals,
// worked out from the integer sum a + b, and checks that s equals the low
// N bits of a + b. Directed corner cases come first, then random operands.
module tb_sum_block;
  localparam int unsigned N = 64;
  localparam int unsigned NRAND = 2000;

  logic [N-1:0]   a, b, s;
  logic [N:1]     c;
  logic [N/2-1:1] pe, ge;
  int checks = 0, failures = 0;

  sum_block #(.N(N)) dut (.a(a), .b(b), .c(c), .pe(pe), .ge(ge), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb);
    logic [N:0] full;
    full = {1'b0, va} + {1'b0, vb};
    a = va;
    b = vb;
    for (int i = 1; i < N; i++) c[i] = full[i] ^ va[i] ^ vb[i];
    c[N] = full[N];
    for (int k = 1; k < N/2; k++) begin
      pe[k] = va[2*k] | vb[2*k];
      ge[k] = va[2*k] & vb[2*k];
    end
    #1;
    checks++;
    if (s !== full[N-1:0]) begin
      failures++;
      $display("FAIL a=%h b=%h s=%h exp=%h", va, vb, s, full[N-1:0]);
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
    apply(N'(1), '1);
    apply({N/2{2'b01}}, {N/2{2'b10}});
    apply({N/2{2'b11}}, {N/2{2'b01}});
    for (int i = 0; i < N; i++) begin
      apply(N'(1) << i, '0);
      apply('0, N'(1) << i);
      apply(N'(1) << i, N'(1) << i);
    end
    for (int n = 0; n < NRAND; n++) apply(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
