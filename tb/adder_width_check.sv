// adder_width_check - test harness for one width of qca_adder, used by
// tb_qca_adder_widths. It instantiates the adder at width N, applies every
// operand pair when N <= 4 and otherwise directed corner cases (a carry
// born in bit 0 rippling to the top, all ones, single bits) plus NRAND
// random pairs, and compares {cout, s} with the integer sum a + b.
// It raises done once finished and reports its check and failure counts.
module adder_width_check #(
  parameter int unsigned N     = 8,
  parameter int unsigned NRAND = 1000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  logic [N-1:0] a, b, s;
  logic         cout;

  qca_adder #(.N(N)) dut (.a(a), .b(b), .s(s), .cout(cout));

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb);
    logic [N:0] full;
    a = va;
    b = vb;
    #1;
    full = {1'b0, va} + {1'b0, vb};
    checks++;
    if ({cout, s} !== full) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h got=%b_%h exp=%b_%h",
               N, va, vb, cout, s, full[N], full[N-1:0]);
    end
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r = '0;
    for (int w = 0; w < (N + 31) / 32; w++) r = (r << 32) | N'($urandom);
    return r;
  endfunction

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    if (N <= 4) begin
      for (int x = 0; x < (1 << N); x++)
        for (int y = 0; y < (1 << N); y++) apply(N'(x), N'(y));
    end else begin
      apply('1, N'(1));
      apply('1, '1);
      apply('0, '0);
      for (int i = 0; i < N; i++) apply(N'(1) << i, '1);
      for (int n = 0; n < NRAND; n++) apply(rnd(), rnd());
    end
    done = 1'b1;
  end
endmodule
