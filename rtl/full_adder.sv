// full_adder: one-bit full adder, the cell the ripple-carry adders are made of.
//
// Sum is the three-input XOR of a, b and ci; carry out is their majority.
// Purely combinational, no clock. The design builds every adder from this
// cell; its gate equations are the textbook ones, not taken from elsewhere.
module full_adder (
  input  logic a,   // addend bit
  input  logic b,   // addend bit
  input  logic ci,  // carry in
  output logic s,   // sum bit
  output logic co   // carry out
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
