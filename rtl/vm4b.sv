// vm4b: 4-bit by 4-bit unsigned Vedic multiplier (Urdhva Tiryakbhyam).
//
// The operands are split into 2-bit halves, a = {aH, aL} and b = {bH, bL}, and
// the product is assembled from four 2x2 Vedic multipliers:
//   q3 = aH*bH  (weight 16)   q2 = aL*bH  (weight 4)
//   q1 = aH*bL  (weight 4)    q0 = aL*bL  (weight 1)
// Bits 1:0 of the product are q0[1:0]. The upper six bits come from three
// adders, all aligned to weight 4:
//   first adder  (6 bit): {q3, 2'b00} + {2'b00, q2}
//   second adder (4 bit): q1 + {2'b00, q0[3:2]}
//   third adder  (6 bit): first sum + second sum, which is y[7:2]
// None of the adders can overflow (largest sums 45, 11 and 56), so no carry
// leaves them. This block structure is the one the architecture prescribes;
// the adder widths follow from the operand alignment.
//
// Interface: y = a * b. Purely combinational, no clock, no reset and no
// latency: the product is valid one propagation delay (AND gate, two half
// adders, three adder levels) after the operands change. The published
// schematic of this block also has an input OFF and an output Y8 whose function
// is not defined; they are not modelled.
module vm4b (
  input  logic [3:0] a,  // multiplicand, a[0] = pin a0
  input  logic [3:0] b,  // multiplier,   b[0] = pin b0
  output logic [7:0] y   // product a*b,  y[0] = pin Y0
);
  logic [3:0] q0, q1, q2, q3;  // 2x2 partial products
  logic [5:0] sum_hi;          // q3*4 + q2
  logic [3:0] sum_lo;          // q1 + q0[3:2]
  logic [5:0] sum_top;         // product bits 7:2

  vedic_2x2 u_mul_hh (.a(a[3:2]), .b(b[3:2]), .q(q3));
  vedic_2x2 u_mul_lh (.a(a[1:0]), .b(b[3:2]), .q(q2));
  vedic_2x2 u_mul_hl (.a(a[3:2]), .b(b[1:0]), .q(q1));
  vedic_2x2 u_mul_ll (.a(a[1:0]), .b(b[1:0]), .q(q0));

  adder #(.W(6)) u_add_hi (
    .x({q3, 2'b00}),
    .y({2'b00, q2}),
    .s(sum_hi)
  );

  adder #(.W(4)) u_add_lo (
    .x(q1),
    .y({2'b00, q0[3:2]}),
    .s(sum_lo)
  );

  adder #(.W(6)) u_add_top (
    .x(sum_hi),
    .y({2'b00, sum_lo}),
    .s(sum_top)
  );

  assign y = {sum_top, q0[1:0]};
endmodule
