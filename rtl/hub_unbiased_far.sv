// hub_unbiased_far -- tie correction at the output of the far path.
//
// The only far-path case whose exact result can sit half-way between two HUB
// numbers is an aligned addition (d = 0): both operands end in their ILSB, so
// the sum is even and only the truncated bits tell whether it is a tie.
// With UNBIASED = 1 the result LSB is forced to 0 for an effective addition
// with d = 0 whose truncated bits are all zero (lsb_star = 0), which rounds
// such ties up or down with equal likelihood.  With UNBIASED = 0 the LSB
// passes unchanged.  Purely combinational.
// The tie rule (clear the LSB when all dropped bits are zero) follows the
// published unbiased adder; the logic form is this design's.
module hub_unbiased_far #(
  parameter bit UNBIASED = 1'b1
) (
  input  logic lsb_in,
  input  logic lsb_star,
  input  logic eop,
  input  logic d0,
  output logic lsb_out
);
  always_comb lsb_out = lsb_in && !(UNBIASED && !eop && d0 && !lsb_star);
endmodule
