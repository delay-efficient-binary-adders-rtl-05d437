// maj3 - three-input majority gate, the basic logic primitive of the adder.
//
// The output takes the value held by at least two of the three inputs:
//   y = a&b | b&c | a&c.
// Fixing one input to 0 turns the gate into a two-input AND, fixing it to 1
// into a two-input OR; the carry and sum networks use both tricks.
// Purely combinational, no clock. In a cell layout each gate costs one clock
// zone of delay; here it is a single logic level.
//
// The function is the standard QCA majority gate; nothing here is a design choice.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  always_comb y = (a & b) | (b & c) | (a & c);
endmodule
