// carry_block - carry network of the N-bit adder.
//
// N/2 two-bit modules are cascaded. Bits 0 and 1 use the simplified
// lsb_module (carry-in is 0, so p_0 is never formed); every further pair
// (i, i+1), i = 2, 4, ..., N-2, uses a two_bit_module fed with c_i from the
// pair below. The result is every carry c_1 .. c_N (c_N is the carry out of
// the adder) plus the propagate/generate pair of each even bit i >= 2,
// which the sum block reuses.
//
// Worst case: a carry generated in bit 0 and propagated to the top. It
// passes two gates in the lsb_module and one gate in each of the (N-2)/2
// further modules, N/2 + 1 gate levels to c_N.
//
// Interface: pe[k] / ge[k] are p and g of bit 2k (k = 1 .. N/2-1);
// c[i] is the carry into bit i (i = 1 .. N), c[N] the carry out.
// Combinational. N must be even and at least 4.
//
// The cascade follows the original adder design; the pe/ge port packing and
// the minimum width of 4 are this design's own choices.
module carry_block #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N:1]     c,
  output logic [N/2-1:1] pe,
  output logic [N/2-1:1] ge
);
  initial begin
    assert (N % 2 == 0 && N >= 4)
      else $fatal(1, "carry_block: N must be even and at least 4");
  end

  lsb_module u_lsb (
    .a0(a[0]), .b0(b[0]), .a1(a[1]), .b1(b[1]),
    .c1(c[1]), .c2(c[2])
  );

  for (genvar k = 1; k < N/2; k++) begin : g_pair
    two_bit_module u_mod (
      .ai (a[2*k]),   .bi (b[2*k]),
      .ai1(a[2*k+1]), .bi1(b[2*k+1]),
      .ci (c[2*k]),
      .pi (pe[k]),    .gi (ge[k]),
      .ci1(c[2*k+1]), .ci2(c[2*k+2])
    );
  end
endmodule
