// vedic_mul4x4: 4x4-bit Vedic multiplier built from four 2x2 Vedic
// multipliers and three 4-bit ripple-carry adders.
//
// Split a = {aH, aL} and b = {bH, bL} into 2-bit halves. Then
//   a * b = aH*bH * 16 + (aH*bL + aL*bH) * 4 + aL*bL
// the vertical (aL*bL, aH*bH) and crosswise (aH*bL, aL*bH) products of the
// Urdhva Tiryakbhyam sutra. The four 2x2 products are formed in parallel and
// combined by three adders:
//   adder 1: aH*bL + aL*bH                      -> x1[3:0], carry ca1
//   adder 2: x1 + {00, (aL*bL)[3:2]}            -> x2[3:0], carry ca2
//   adder 3: aH*bH + {0, ca1|ca2, x2[3:2]}      -> s[7:4],  carry ca3
// with s[1:0] = (aL*bL)[1:0] and s[3:2] = x2[1:0].
// ca1 and ca2 both weigh 2**6. They are never 1 together (if ca1 is set,
// x1 <= 2 and adding at most 2 cannot carry), so their OR is their sum; this
// merge is this design's own choice, the block diagram showing where ca1
// enters adder 3 but not where ca2 does. ca3 is always 0 because the product
// fits in 8 bits; an assertion checks that.
// Purely combinational: s = a * b.
module vedic_mul4x4 (
  input  logic [3:0] a,  // multiplicand
  input  logic [3:0] b,  // multiplier
  output logic [7:0] s   // product a * b
);
  logic [3:0] q_ll, q_hl, q_lh, q_hh;  // 2x2 products: aL*bL, aH*bL, aL*bH, aH*bH
  logic [3:0] x1, x2;
  logic       ca1, ca2, ca3;

  vedic_mul2x2 u_m_ll (.a(a[1:0]), .b(b[1:0]), .q(q_ll));
  vedic_mul2x2 u_m_hl (.a(a[3:2]), .b(b[1:0]), .q(q_hl));
  vedic_mul2x2 u_m_lh (.a(a[1:0]), .b(b[3:2]), .q(q_lh));
  vedic_mul2x2 u_m_hh (.a(a[3:2]), .b(b[3:2]), .q(q_hh));

  // Crosswise products.
  rca #(.WIDTH(4)) u_add1 (
    .a (q_hl),
    .b (q_lh),
    .ci(1'b0),
    .s (x1),
    .co(ca1)
  );

  // Add the upper half of the low vertical product.
  rca #(.WIDTH(4)) u_add2 (
    .a (x1),
    .b ({2'b00, q_ll[3:2]}),
    .ci(1'b0),
    .s (x2),
    .co(ca2)
  );

  // High vertical product plus everything carried up from the middle.
  rca #(.WIDTH(4)) u_add3 (
    .a (q_hh),
    .b ({1'b0, ca1 | ca2, x2[3:2]}),
    .ci(1'b0),
    .s (s[7:4]),
    .co(ca3)
  );

  assign s[1:0] = q_ll[1:0];
  assign s[3:2] = x2[1:0];

  always_comb begin
    a_mid_carries_exclusive : assert (!(ca1 && ca2))
      else $error("vedic_mul4x4: ca1 and ca2 both set");
    a_no_final_carry : assert (!ca3)
      else $error("vedic_mul4x4: carry out of the last adder");
  end
endmodule
