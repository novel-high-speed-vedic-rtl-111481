// half_adder: one-bit half adder used inside the 2x2 Vedic multiplier.
//
// Sum is a XOR b, carry is a AND b. Purely combinational.
module half_adder (
  input  logic a,   // addend bit
  input  logic b,   // addend bit
  output logic s,   // sum bit
  output logic co   // carry out
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
