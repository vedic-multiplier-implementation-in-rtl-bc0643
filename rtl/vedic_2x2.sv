// vedic_2x2: 2-bit by 2-bit unsigned multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule.
//
// Four AND gates form the bit products. The vertical product a0*b0 is result
// bit q0 directly. The two crosswise products a1*b0 and a0*b1 go to the first
// half adder, whose sum is q1. Its carry joins the upper vertical product a1*b1
// in the second half adder, giving q2 (sum) and q3 (carry). The critical path is
// one AND gate followed by two half adders.
//
// Interface: a and b are the operands, q = a * b (4 bits, never overflows).
// Combinational, no clock and no reset. The gate-level structure is the one the
// architecture prescribes; only the port names and vector packing are chosen here.
module vedic_2x2 (
  input  logic [1:0] a,  // operand a1 a0
  input  logic [1:0] b,  // operand b1 b0
  output logic [3:0] q   // product q3..q0
);
  logic p00, p10, p01, p11;  // bit products a_i * b_j as p<i><j>
  logic c1;                  // carry of the crosswise half adder

  assign p00 = a[0] & b[0];
  assign p10 = a[1] & b[0];
  assign p01 = a[0] & b[1];
  assign p11 = a[1] & b[1];

  assign q[0] = p00;

  half_adder u_ha_cross (
    .x(p10),
    .y(p01),
    .s(q[1]),
    .c(c1)
  );

  half_adder u_ha_high (
    .x(p11),
    .y(c1),
    .s(q[2]),
    .c(q[3])
  );
endmodule
