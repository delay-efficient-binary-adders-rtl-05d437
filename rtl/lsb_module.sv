// lsb_module - the simplified 2-bit carry module for bit positions 0 and 1.
//
// The adder has no carry input (carry-in is 0), so the propagate signal of
// bit 0 is not needed and the general 2-bit module collapses to two majority
// gates:
//   g0 = M(a0, b0, 0)         (generate of bit 0, an AND)
//   c1 = g0                   (carry into bit 1, since carry-in is 0)
//   c2 = M(a1, b1, g0)        (carry into bit 2)
// Combinational; c2 lies two gate levels after the
// operands, the first two levels of the adder's critical path.
//
// The two-gate structure follows the original adder design; only the port
// names are this design's own.
module lsb_module (
  input  logic a0,
  input  logic b0,
  input  logic a1,
  input  logic b1,
  output logic c1,
  output logic c2
);
  logic g0;

  maj3 u_g0 (.a(a0), .b(b0), .c(1'b0), .y(g0));
  maj3 u_c2 (.a(a1), .b(b1), .c(g0),   .y(c2));
  assign c1 = g0;
endmodule
