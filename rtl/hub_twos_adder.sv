// hub_twos_adder -- two's complement significand adder (both paths).
//
// Adds the left significand, extended with a 0 sign bit on top and its ILSB
// (1) at the bottom, to the aligned right operand b, all M+2 bits wide, with
// no carry input: the inverted HUB operand is already its two's complement.
// For an effective addition the top bit of c is the overflow (sum >= 2); for
// a subtraction it is the sign of the difference.  Purely combinational.
// Follows the published adders (0 sign bit and ILSB on the left input, no
// carry in).
module hub_twos_adder #(
  parameter int unsigned M = hub_fp_pkg::DEF_FW + 1
) (
  input  logic [M-1:0] ma,
  input  logic [M+1:0] b,
  output logic [M+1:0] c
);
  always_comb c = {1'b0, ma, 1'b1} + b;
endmodule
