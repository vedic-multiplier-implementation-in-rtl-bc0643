// half_adder: one-bit half adder, the basic cell of the 2x2 Vedic multiplier.
//
// The sum is the XOR of the two inputs and the carry their AND. It is the
// "HA" cell that the 2x2 block instantiates twice to add its bit products.
// Purely combinational: outputs follow the inputs after one gate delay, no
// clock and no reset.
module half_adder (
  input  logic x,  // addend
  input  logic y,  // addend
  output logic s,  // sum bit, x XOR y
  output logic c   // carry bit, x AND y
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
