// hub_lod -- leading one detector of the far path.
//
// In the far path the sum c (M+2 bits, c[M] has weight 1) lies in [0.5, 4),
// so the leading one is at one of three places: c[M+1] (overflow of an
// addition, shift right by one: r1), c[M] (already normalised) or c[M-1]
// (pattern 0.1xxx after a subtraction, shift left by one: l1).  Only the two
// top bits are needed.  Purely combinational.
// Follows the published far path; using only the two top bits is this
// design's realisation.
module hub_lod #(
  parameter int unsigned M = hub_fp_pkg::DEF_FW + 1
) (
  input  logic [M+1:0] c,
  output logic         r1,
  output logic         l1
);
  always_comb begin
    r1 = c[M+1];
    l1 = !c[M+1] && !c[M];
  end
endmodule
