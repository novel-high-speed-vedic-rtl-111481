// rca: WIDTH-bit ripple-carry adder.
//
// A chain of WIDTH full adders; the carry of bit i feeds bit i+1, so the
// delay grows linearly with WIDTH. s + 2**WIDTH * co = a + b + ci.
// Purely combinational. The Vedic multipliers use it at WIDTH = 4 (inside
// the 4x4 multiplier) and WIDTH = 8 (inside the 8x8 multiplier), the two
// adder sizes of the architecture; the ripple structure is the one the
// architecture names.
module rca #(
  parameter int unsigned WIDTH = 4  // operand width in bits
) (
  input  logic [WIDTH-1:0] a,   // first addend
  input  logic [WIDTH-1:0] b,   // second addend
  input  logic             ci,  // carry in
  output logic [WIDTH-1:0] s,   // sum
  output logic             co   // carry out of the top bit
);
  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[WIDTH];
endmodule
