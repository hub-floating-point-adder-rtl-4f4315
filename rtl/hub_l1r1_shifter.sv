// hub_l1r1_shifter -- fixed one-place normalisation shifter of the far path.
//
// Takes the far-path sum c (M+2 bits) and keeps M bits: c[M+1:2] when r1
// (overflow), c[M-1:0] when l1 (0.1xxx), c[M:1] otherwise.  Everything below
// the window is truncated, which is round-to-nearest in HUB format.
// lsb_star is 1 when the truncated part is not all zeros: the OR of the
// dropped sum bits, and 1 for a left shift (that case only occurs after a
// subtraction with |d| > 1, whose exact result has non-zero bits below the
// adder).  Purely combinational.
// The shifter follows the published far path; the definition of lsb_star is
// this design's.
module hub_l1r1_shifter #(
  parameter int unsigned M = hub_fp_pkg::DEF_FW + 1
) (
  input  logic [M+1:0] c,
  input  logic         r1,
  input  logic         l1,
  output logic [M-1:0] y,
  output logic         lsb_star
);
  always_comb begin
    if (r1) begin
      y        = c[M+1:2];
      lsb_star = c[1] | c[0];
    end else if (l1) begin
      y        = c[M-1:0];
      lsb_star = 1'b1;
    end else begin
      y        = c[M:1];
      lsb_star = c[0];
    end
  end
endmodule
