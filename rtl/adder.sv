// adder: W-bit unsigned binary adder used to merge the partial products of the
// 2x2 Vedic blocks inside the 4x4 multiplier.
//
// The architecture only calls for "an adder"; this one is written as a plain
// binary sum and left to synthesis to map onto a carry chain. The sum is taken
// modulo 2^W: every instance in the 4x4 multiplier is sized so that its sum
// cannot overflow, so no carry output is provided.
//
// Interface: s = (x + y) mod 2^W. Combinational, no clock and no reset.
module adder #(
  parameter int unsigned W = 6  // operand and sum width
) (
  input  logic [W-1:0] x,  // addend
  input  logic [W-1:0] y,  // addend
  output logic [W-1:0] s   // sum modulo 2^W
);
  assign s = x + y;
endmodule
