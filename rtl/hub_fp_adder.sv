// hub_fp_adder -- double-path HUB floating-point adder/subtractor (top).
//
// Computes z = x + y (op = 0) or z = x - y (op = 1) on HUB floating-point
// numbers: sign, EW-bit biased exponent and FW stored fraction bits, with an
// implicit leading 1 and an implicit least significant bit (ILSB) of 1.  In
// this format round-to-nearest is plain truncation and negation is bitwise
// inversion, so the adder has no rounding hardware at all.
//
// Structure: the swap block puts the larger-exponent operand on the left and
// works out |d| and the effective operation; the right significand gets a 0
// sign bit and is inverted for an effective subtraction.  Two datapaths then
// run in parallel on the same operands:
//   close path -- subtraction with |d| <= 1: one-place alignment, adder,
//                 leading zero/one count, long left shift, final inversion
//                 when the difference came out negative;
//   far path   -- addition, or subtraction with |d| > 1: long alignment
//                 shift, adder, one-place normalisation.
// A multiplexer driven by (eop, d) picks one and the exponent is updated.
// With UNBIASED = 1 the tie cases (exact result half-way between two HUB
// numbers) of aligned additions and of subtractions with |d| = 1 are
// rounded so the result LSB is 0; aligned subtractions are left to the sign
// of the close-path difference, which already splits ties both ways.
// The datapath structure follows the published double-path HUB adder; the
// exponent/sign logic, the zero encoding (exponent 0) and the overflow and
// underflow handling are this design's own.  Purely combinational, no clock:
// register the ports around it to pipeline.
module hub_fp_adder
  import hub_fp_pkg::*;
#(
  parameter int unsigned EW       = DEF_EW,
  parameter int unsigned FW       = DEF_FW,
  parameter bit          UNBIASED = 1'b1
) (
  input  logic [EW+FW:0] x,
  input  logic [EW+FW:0] y,
  input  logic           op,
  output logic [EW+FW:0] z,
  output logic           overflow,
  output logic           underflow,
  output path_e          path
);
  localparam int unsigned M  = FW + 1;
  localparam int unsigned SW = $clog2(M + 1);

  logic [M-1:0]  ma, mb, close_m, far_m;
  logic [M:0]    binv;
  logic [EW-1:0] ea, dabs;
  logic          sa, sb, eop, d0, d1, swapped, xzero, yzero;
  logic [SW-1:0] close_s;
  logic          close_neg, close_zero, far_r1, far_l1;

  hub_swap #(.EW(EW), .FW(FW)) u_swap (
    .x(x), .y(y), .op(op), .ma(ma), .mb(mb), .ea(ea), .dabs(dabs),
    .sa(sa), .sb(sb), .eop(eop), .d0(d0), .d1(d1), .swapped(swapped),
    .xzero(xzero), .yzero(yzero));

  hub_cond_inverter #(.W(M + 1)) u_binv (.a({1'b0, mb}), .inv(eop), .y(binv));

  hub_close_path #(.M(M), .SW(SW), .UNBIASED(UNBIASED)) u_close (
    .ma(ma), .b(binv), .d1(d1), .eop(eop),
    .mz(close_m), .s(close_s), .neg(close_neg), .zero(close_zero));

  hub_far_path #(.M(M), .EW(EW), .UNBIASED(UNBIASED)) u_far (
    .ma(ma), .b(binv), .dabs(dabs), .eop(eop), .d0(d0),
    .mz(far_m), .r1(far_r1), .l1(far_l1));

  hub_result_mux #(.EW(EW), .FW(FW), .SW(SW)) u_mux (
    .x(x), .y(y), .op(op), .ea(ea), .sa(sa), .eop(eop), .d0(d0), .d1(d1),
    .xzero(xzero), .yzero(yzero),
    .close_m(close_m), .close_s(close_s), .close_neg(close_neg), .close_zero(close_zero),
    .far_m(far_m), .far_r1(far_r1), .far_l1(far_l1),
    .z(z), .overflow(overflow), .underflow(underflow), .path(path));
endmodule
