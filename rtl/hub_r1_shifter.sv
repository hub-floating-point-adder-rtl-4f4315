// hub_r1_shifter -- fixed one-place right shifter of the close path.
//
// Input b is the right-hand operand with a sign bit on top, already inverted
// for a subtraction (M+1 bits).  The block appends the ILSB (always 1) and
// returns the M+2-bit aligned operand: unshifted when d = 0, shifted right by
// one place with the sign repeated when d = 1.  In the shifted case the ILSB
// drops out; it is returned on lost, because the exact difference still has a
// 1 in that position and the left shift of the close path must put it back.
// Purely combinational.
// The one-place shift follows the published close path; bringing the dropped
// bit out on lost is this design's addition.
module hub_r1_shifter #(
  parameter int unsigned M = hub_fp_pkg::DEF_FW + 1
) (
  input  logic [M:0]   b,
  input  logic         d1,
  output logic [M+1:0] y,
  output logic         lost
);
  logic [M+1:0] full;
  always_comb begin
    full = {b, 1'b1};
    if (d1) begin
      y    = {full[M+1], full[M+1:1]};
      lost = full[0];
    end else begin
      y    = full;
      lost = 1'b0;
    end
  end
endmodule
