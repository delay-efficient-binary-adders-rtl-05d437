// qca_adder - N-bit binary adder built from majority gates and inverters.
//
// Computes {cout, s} = a + b (no carry input). The carry_block forms every
// carry with a chain of 2-bit modules that adds only one majority gate per
// two bit positions; the sum_block then derives each sum bit from its two
// carries with one inverter and two majority gates.
//
// Worst-case path, counted in majority gates (MG): a carry generated in bit
// 0 and propagated to the top passes N/2 + 1 MGs to c_N and N/2 + 3 MGs
// plus one inverter to the last sum bit. For N = 64 that is
// 35 MGs and one inverter.
//
// Ports: a, b operands; s the N-bit sum; cout the carry out c_N.
// Purely combinational: the four-phase clock zones of a cell layout, which
// would pipeline the gates, are a property of the physical layout and are
// not modelled. N defaults to 64; it must be even and at least 4.
//
// The structure and the 64-bit default follow the original adder design;
// the cout port and the omission of clock zones are this design's choices.
module qca_adder #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:1]     c;
  logic [N/2-1:1] pe, ge;

  carry_block #(.N(N)) u_carry (.a(a), .b(b), .c(c), .pe(pe), .ge(ge));
  sum_block   #(.N(N)) u_sum   (.a(a), .b(b), .c(c), .pe(pe), .ge(ge), .s(s));

  assign cout = c[N];
endmodule
