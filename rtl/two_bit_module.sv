// two_bit_module - the 2-bit carry module that is cascaded to form the
// carry chain.
//
// For bit positions i and i+1 it forms, with six majority gates:
//   p_i    = M(a_i, b_i, 1)                     propagate (OR)
//   g_i    = M(a_i, b_i, 0)                     generate  (AND)
//   x      = M(a_i+1, b_i+1, p_i)
//   y      = M(a_i+1, b_i+1, g_i)
//   c_i+2  = M(x, y, c_i)
//   c_i+1  = M(p_i, g_i, c_i)
// x and y are the carry out of bit i+1 for the two cases "carry into bit i
// is 1" and "is 0", so c_i+2 needs only one gate after c_i. That single
// gate per two bits is what makes the carry chain fast: everything except
// the last gate depends on the operands only and settles in parallel.
// c_i+1 hangs off the chain and is not on the path to c_i+2.
// p_i and g_i are outputs because the sum cell of bit i reuses them.
// Combinational.
//
// The six-gate netlist follows the original adder design; port names are
// this design's own.
module two_bit_module (
  input  logic ai,
  input  logic bi,
  input  logic ai1,     // a_(i+1)
  input  logic bi1,     // b_(i+1)
  input  logic ci,      // carry into bit i
  output logic pi,
  output logic gi,
  output logic ci1,     // carry into bit i+1
  output logic ci2      // carry into bit i+2
);
  logic x, y;

  maj3 u_p  (.a(ai),  .b(bi),  .c(1'b1), .y(pi));
  maj3 u_g  (.a(ai),  .b(bi),  .c(1'b0), .y(gi));
  maj3 u_x  (.a(ai1), .b(bi1), .c(pi),   .y(x));
  maj3 u_y  (.a(ai1), .b(bi1), .c(gi),   .y(y));
  maj3 u_c2 (.a(x),   .b(y),   .c(ci),   .y(ci2));
  maj3 u_c1 (.a(pi),  .b(gi),  .c(ci),   .y(ci1));
endmodule
