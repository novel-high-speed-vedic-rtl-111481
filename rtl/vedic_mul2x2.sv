// vedic_mul2x2: 2x2-bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf of the Vedic multiplier tree.
//
// The three steps of the sutra for two-bit operands:
//   q[0]        = a0 b0                  (vertical)
//   c1 q[1]     = a1 b0 + a0 b1          (crosswise)
//   q[3] q[2]   = c1 + a1 b1             (vertical)
// Four AND gates form the partial products, and two half adders add them.
// Purely combinational: q = a * b, four bits. The step equations follow the
// sutra; the half-adder realisation is this design's choice.
module vedic_mul2x2 (
  input  logic [1:0] a,  // multiplicand
  input  logic [1:0] b,  // multiplier
  output logic [3:0] q   // product a * b
);
  logic c1;  // carry from the crosswise step

  assign q[0] = a[0] & b[0];

  half_adder u_ha_cross (
    .a (a[1] & b[0]),
    .b (a[0] & b[1]),
    .s (q[1]),
    .co(c1)
  );

  half_adder u_ha_top (
    .a (a[1] & b[1]),
    .b (c1),
    .s (q[2]),
    .co(q[3])
  );
endmodule
