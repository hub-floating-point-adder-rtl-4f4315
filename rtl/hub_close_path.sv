// hub_close_path -- close path of the double-path HUB adder.
//
// Handles effective subtractions whose exponents differ by 0 or 1, where the
// operands need at most a one-place alignment but the difference may need a
// long normalisation.  Dataflow:
//   R1-SHIFTER (append ILSB, shift right by one if d = 1)
//   -> two's complement adder with the left significand (0 . ma . 1)
//   -> LZOD counts leading sign digits of the sum c -> L-SHIFTER moves the
//      leading digit to the top, filling with the pattern chosen by the
//      unbiased fill control -> conditional inverter by the sign of c.
// Because no magnitude comparator precedes the adder, c is negative when
// d = 0 and the right operand was the larger one; inverting the truncated,
// normalised window then yields the HUB result of |c|.
// Outputs: the M-bit significand (leading 1 on top), the shift s by which the
// exponent of the left operand falls, neg (c < 0, the result sign flips) and
// zero (exact zero difference).  Purely combinational.
// The structure follows the published close path; the fill-pattern input of
// the left shifter is this design's (see hub_l_shifter).
module hub_close_path #(
  parameter int unsigned M        = hub_fp_pkg::DEF_FW + 1,
  parameter int unsigned SW       = $clog2(M + 1),
  parameter bit          UNBIASED = 1'b1
) (
  input  logic [M-1:0]  ma,
  input  logic [M:0]    b,
  input  logic          d1,
  input  logic          eop,
  output logic [M-1:0]  mz,
  output logic [SW-1:0] s,
  output logic          neg,
  output logic          zero
);
  logic [M+1:0] a_al, c;
  logic         lost, fill_first, fill_rest;
  logic [M-1:0] win;

  hub_r1_shifter #(.M(M)) u_r1 (.b(b), .d1(d1), .y(a_al), .lost(lost));
  hub_twos_adder #(.M(M)) u_add (.ma(ma), .b(a_al), .c(c));
  hub_lzod #(.M(M), .SW(SW)) u_lzod (.c(c), .s(s), .zero(zero));
  hub_unbiased_close #(.M(M), .SW(SW), .UNBIASED(UNBIASED)) u_unb (
    .lost(lost), .d1(d1), .eop(eop), .s(s),
    .fill_first(fill_first), .fill_rest(fill_rest));
  hub_l_shifter #(.M(M), .SW(SW)) u_lsh (
    .c(c[M:0]), .s(s), .fill_first(fill_first), .fill_rest(fill_rest), .y(win));
  assign neg = c[M+1];
  hub_cond_inverter #(.W(M)) u_inv (.a(win), .inv(neg), .y(mz));
endmodule
