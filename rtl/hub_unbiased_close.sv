// hub_unbiased_close -- left-shift fill control of the close path.
//
// For an effective subtraction with d = 1, the exact difference has a 1 just
// below the adder's LSB (the ILSB of the right operand, lost in the one-place
// right shift; input lost).  When the result is shifted left by 2 or more,
// every bit of the exact value fits into the window, so the exact value lies
// half-way between two HUB numbers: a tie.  Inserting 1000... selects the
// upper neighbour, 0111... the lower one.
// With UNBIASED = 0 the exact pattern 1000... is always inserted (ties go up).
// With UNBIASED = 1 the pattern is chosen so the result LSB is 0, which
// rounds ties up or down with equal likelihood: only a shift of exactly 2
// leaves the inserted 1 as LSB, and then 0111... is used.
// For d = 0 nothing is lost and the fill is 0.  Purely combinational.
// Using the shift amount s as an input is this design's choice.
module hub_unbiased_close #(
  parameter int unsigned M        = hub_fp_pkg::DEF_FW + 1,
  parameter int unsigned SW       = $clog2(M + 1),
  parameter bit          UNBIASED = 1'b1
) (
  input  logic          lost,
  input  logic          d1,
  input  logic          eop,
  input  logic [SW-1:0] s,
  output logic          fill_first,
  output logic          fill_rest
);
  logic use_low;
  always_comb begin
    use_low    = UNBIASED && eop && d1 && lost && (s == SW'(2));
    fill_first = lost && !use_low;
    fill_rest  = use_low;
  end
endmodule
