// hub_r_shifter -- variable alignment shifter of the far path.
//
// Input b is the right-hand operand with a sign bit on top, inverted for a
// subtraction (M+1 bits).  The ILSB (1) is appended and the M+2-bit word is
// shifted right arithmetically by |d|; shifts of M+2 or more leave only sign
// bits.  Bits shifted out are simply dropped: because the operand ends in its
// ILSB, what is lost is never zero, and the truncated two's complement word is
// exactly the floor of the aligned value, so no sticky bit is needed.
// Purely combinational.
// Follows the published far path, including the absence of sticky logic.
module hub_r_shifter #(
  parameter int unsigned M  = hub_fp_pkg::DEF_FW + 1,
  parameter int unsigned EW = hub_fp_pkg::DEF_EW
) (
  input  logic [M:0]    b,
  input  logic [EW-1:0] dabs,
  output logic [M+1:0]  y
);
  always_comb y = $signed({b, 1'b1}) >>> dabs;
endmodule
