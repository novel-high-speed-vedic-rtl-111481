// multi8x8: 8x8-bit Vedic multiplier, the top of the design.
//
// The same vertically-and-crosswise decomposition one level up. With
// a = {AH, AL} and b = {BH, BL} split into 4-bit halves,
//   a * b = AH*BH * 256 + (AH*BL + AL*BH) * 16 + AL*BL.
// Four 4x4 Vedic multipliers form the four products in parallel, and three
// 8-bit ripple-carry adders combine them:
//   adder 1: AH*BL + AL*BH                          -> x1[7:0], carry ca1
//   adder 2: x1 + {0000, (AL*BL)[7:4]}              -> x2[7:0], carry ca2
//   adder 3: AH*BH + {000, ca1|ca2, x2[7:4]}        -> p[15:8], carry ca3
// with p[3:0] = (AL*BL)[3:0] and p[7:4] = x2[3:0].
// ca1 and ca2 both weigh 2**12 and are never 1 together (if ca1 is set,
// x1 <= 2*225 - 256 = 194, and adding at most 15 cannot carry), so their OR
// is their sum; the block diagram shows ca1 entering adder 3 and this design merges
// ca2 into the same bit. ca3 is always 0 since 255*255 < 2**16; an assertion
// checks both facts.
// Ports a(7:0), b(7:0), p(15:0) as on the design's top-level symbol. Purely
// combinational, no clock or reset: p = a * b after the ripple delay.
module multi8x8 (
  input  logic [7:0]  a,  // multiplicand
  input  logic [7:0]  b,  // multiplier
  output logic [15:0] p   // product a * b
);
  logic [7:0] q_ll, q_hl, q_lh, q_hh;  // 4x4 products: AL*BL, AH*BL, AL*BH, AH*BH
  logic [7:0] x1, x2;
  logic       ca1, ca2, ca3;

  vedic_mul4x4 u_m_ll (.a(a[3:0]), .b(b[3:0]), .s(q_ll));
  vedic_mul4x4 u_m_hl (.a(a[7:4]), .b(b[3:0]), .s(q_hl));
  vedic_mul4x4 u_m_lh (.a(a[3:0]), .b(b[7:4]), .s(q_lh));
  vedic_mul4x4 u_m_hh (.a(a[7:4]), .b(b[7:4]), .s(q_hh));

  // Crosswise products.
  rca #(.WIDTH(8)) u_add1 (
    .a (q_hl),
    .b (q_lh),
    .ci(1'b0),
    .s (x1),
    .co(ca1)
  );

  // Add the upper half of the low vertical product.
  rca #(.WIDTH(8)) u_add2 (
    .a (x1),
    .b ({4'b0000, q_ll[7:4]}),
    .ci(1'b0),
    .s (x2),
    .co(ca2)
  );

  // High vertical product plus everything carried up from the middle.
  rca #(.WIDTH(8)) u_add3 (
    .a (q_hh),
    .b ({3'b000, ca1 | ca2, x2[7:4]}),
    .ci(1'b0),
    .s (p[15:8]),
    .co(ca3)
  );

  assign p[3:0] = q_ll[3:0];
  assign p[7:4] = x2[3:0];

  always_comb begin
    a_mid_carries_exclusive : assert (!(ca1 && ca2))
      else $error("multi8x8: ca1 and ca2 both set");
    a_no_final_carry : assert (!ca3)
      else $error("multi8x8: carry out of the last adder");
  end
endmodule
