// sum_block - sum network of the N-bit adder.
//
// Each sum bit costs one inverter and two majority gates, and reads the
// carry out of its own position, c_(i+1), inverted:
//   odd bit i:       s_i = M(~c_i+1, c_i, M(~c_i+1, a_i, b_i))
//   even bit i >= 2: s_i = M(~c_i+1, p_i, M(~c_i+1, g_i, c_i))
//   bit 0:           s_0 = M(~c_1, 0, M(~c_1, a_0, b_0))   (carry-in 0)
// Even bits reuse p_i and g_i already formed in the carry block, so they
// need no operand gates of their own. Bit 0 follows the odd-bit form with
// carry-in tied to 0, since p_0 is not formed.
// Why it works (odd form): if a_i = b_i the inner gate returns a_i and the
// outer one c_i; if a_i != b_i then c_i+1 = c_i, the inner gate returns
// ~c_i and so does the outer one. The even form is the same argument with
// (p_i, g_i) in place of (a_i, b_i).
//
// Interface: c[i] is the carry into bit i (c[N], the carry out, feeds the
// top sum cell); pe[k] / ge[k] are p and g of bit 2k. Combinational, two gate
// levels and one inverter after the last carry settles. The operand bits of
// even positions (2, 4, ...) are not read, as those cells use p and g; the
// full operand buses are kept as ports for a plain interface, so a lint
// tool reports those bits as unused.
//
// The inverter-plus-two-gates cell and its input signals follow the original
// adder design; the position of each signal within the two gates, and the
// odd-bit form used for bit 0, are this design's own choices (both checked
// to give a correct sum).
module sum_block #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N:1]     c,
  input  logic [N/2-1:1] pe,
  input  logic [N/2-1:1] ge,
  output logic [N-1:0]   s
);
  initial begin
    assert (N % 2 == 0 && N >= 4)
      else $fatal(1, "sum_block: N must be even and at least 4");
  end

  logic [N-1:0] cn;   // inverted carry out of each bit position
  logic [N-1:0] m;    // inner majority gate of each sum cell

  always_comb cn = ~c[N:1];

  // bit 0
  maj3 u_m0 (.a(cn[0]), .b(a[0]), .c(b[0]), .y(m[0]));
  maj3 u_s0 (.a(cn[0]), .b(1'b0), .c(m[0]), .y(s[0]));

  for (genvar i = 1; i < N; i++) begin : g_bit
    if (i % 2 == 1) begin : g_odd
      maj3 u_m (.a(cn[i]), .b(a[i]),  .c(b[i]),  .y(m[i]));
      maj3 u_s (.a(cn[i]), .b(c[i]),  .c(m[i]),  .y(s[i]));
    end else begin : g_even
      maj3 u_m (.a(cn[i]), .b(ge[i/2]), .c(c[i]), .y(m[i]));
      maj3 u_s (.a(cn[i]), .b(pe[i/2]), .c(m[i]), .y(s[i]));
    end
  end
endmodule
