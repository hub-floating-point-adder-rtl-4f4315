// hub_result_mux -- final path multiplexer, exponent update and packing.
//
// Selects the close path when the effective operation is a subtraction and
// |d| <= 1, the far path otherwise.  The result exponent is the larger input
// exponent ea, lowered by the close path's shift count or moved by one by the
// far path's r1/l1.  The sign is that of the left (larger-exponent) operand,
// flipped when the close-path sum was negative.  The stored fraction is the
// path significand without its leading 1.
// Special cases, all of them this design's own choice (the format leaves
// them open): an exponent field of 0 is zero, a zero operand returns the other
// operand (negated for x - y), an exact zero difference gives +0, an exponent
// above the field saturates to the largest magnitude (overflow = 1), one below
// 1 flushes to +0 (underflow = 1).  There is no infinity or NaN.
// Purely combinational.
module hub_result_mux
  import hub_fp_pkg::*;
#(
  parameter int unsigned EW = hub_fp_pkg::DEF_EW,
  parameter int unsigned FW = hub_fp_pkg::DEF_FW,
  parameter int unsigned SW = $clog2(FW + 2)
) (
  input  logic [EW+FW:0] x,
  input  logic [EW+FW:0] y,
  input  logic           op,
  input  logic [EW-1:0]  ea,
  input  logic           sa,
  input  logic           eop,
  input  logic           d0,
  input  logic           d1,
  input  logic           xzero,
  input  logic           yzero,
  input  logic [FW:0]    close_m,
  input  logic [SW-1:0]  close_s,
  input  logic           close_neg,
  input  logic           close_zero,
  input  logic [FW:0]    far_m,
  input  logic           far_r1,
  input  logic           far_l1,
  output logic [EW+FW:0] z,
  output logic           overflow,
  output logic           underflow,
  output path_e          path
);
  localparam int unsigned XW = EW + 2;            // signed exponent working width
  localparam logic [XW-1:0] EMAX = XW'((1 << EW) - 1);

  logic [XW-1:0] er;
  logic          sr;
  logic [FW:0]   mr;

  always_comb begin
    path = (eop && (d0 || d1)) ? CLOSE_PATH : FAR_PATH;
    if (path == CLOSE_PATH) begin
      er = {2'b00, ea} - XW'(close_s);
      sr = sa ^ close_neg;
      mr = close_m;
    end else begin
      er = {2'b00, ea} + XW'(far_r1) - XW'(far_l1);
      sr = sa;
      mr = far_m;
    end
    overflow  = 1'b0;
    underflow = 1'b0;
    if (xzero && yzero) begin
      z = '0;
    end else if (yzero) begin
      z = x;
    end else if (xzero) begin
      z = {y[EW+FW] ^ op, y[EW+FW-1:0]};
    end else if (path == CLOSE_PATH && close_zero) begin
      z = '0;
    end else if (er[XW-1] || er == '0) begin
      z         = '0;
      underflow = 1'b1;
    end else if (er > EMAX) begin
      z        = {sr, {(EW+FW){1'b1}}};
      overflow = 1'b1;
    end else begin
      z = {sr, er[EW-1:0], mr[FW-1:0]};
    end
  end
endmodule
