// hub_far_path -- far path of the double-path HUB adder.
//
// Handles all effective additions and the subtractions with |d| > 1, where
// alignment may need a long shift but normalisation at most one place.
// Dataflow: R-SHIFTER (append ILSB, arithmetic shift right by |d|) -> two's
// complement adder with the left significand (0 . ma . 1) -> LOD on the two
// top bits -> L1/R1 SHIFTER -> LSB tie correction.  No sticky bit is formed:
// the right operand's ILSB guarantees that a non-aligned operand always loses
// non-zero bits, and the truncated two's complement word already accounts for
// them.  Outputs the M-bit significand and r1/l1, the exponent adjustment
// (+1 / -1).  Purely combinational.
// The structure follows the published far path.
module hub_far_path #(
  parameter int unsigned M        = hub_fp_pkg::DEF_FW + 1,
  parameter int unsigned EW       = hub_fp_pkg::DEF_EW,
  parameter bit          UNBIASED = 1'b1
) (
  input  logic [M-1:0]  ma,
  input  logic [M:0]    b,
  input  logic [EW-1:0] dabs,
  input  logic          eop,
  input  logic          d0,
  output logic [M-1:0]  mz,
  output logic          r1,
  output logic          l1
);
  logic [M+1:0] b_al, c;
  logic [M-1:0] win;
  logic         lsb_star, lsb;

  hub_r_shifter #(.M(M), .EW(EW)) u_rsh (.b(b), .dabs(dabs), .y(b_al));
  hub_twos_adder #(.M(M)) u_add (.ma(ma), .b(b_al), .c(c));
  hub_lod #(.M(M)) u_lod (.c(c), .r1(r1), .l1(l1));
  hub_l1r1_shifter #(.M(M)) u_sh (.c(c), .r1(r1), .l1(l1), .y(win), .lsb_star(lsb_star));
  hub_unbiased_far #(.UNBIASED(UNBIASED)) u_unb (
    .lsb_in(win[0]), .lsb_star(lsb_star), .eop(eop), .d0(d0), .lsb_out(lsb));
  assign mz = {win[M-1:1], lsb};
endmodule
