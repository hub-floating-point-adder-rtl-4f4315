// hub_cond_inverter -- conditional bit inverter.
//
// Inverts every bit of a when inv is 1 and passes it otherwise.  In HUB
// arithmetic a bitwise inversion of a number that carries its ILSB is its
// exact two's complement, so this block is the whole negation.  The adder uses
// it twice: on the right-hand operand after the swap (controlled by the
// effective operation, fed with a 0 sign bit on top) and at the end of the
// close path (controlled by the sign of the close-path sum).
// Purely combinational, width W.
// Follows the published adder, which uses inversion as the HUB two's
// complement.
module hub_cond_inverter #(
  parameter int unsigned W = 25
) (
  input  logic [W-1:0] a,
  input  logic         inv,
  output logic [W-1:0] y
);
  always_comb y = a ^ {W{inv}};
endmodule
