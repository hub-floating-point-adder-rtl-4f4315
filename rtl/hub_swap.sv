// hub_swap -- exponent comparison and operand swap.
//
// Computes d = Ex - Ey and routes the operand with the larger exponent to the
// left output (ma, ea, sa) and the other one to the right output (mb, sb).
// When d = 0 the larger magnitude is not known and no swap is done; the close
// path copes with a negative difference.  The right-hand sign already includes
// the requested operation (op = 1 for x - y), so eop = sa ^ sb is the effective
// operation: 1 means the magnitudes are subtracted.  Significands are returned
// with their leading 1 (M = FW+1 bits); the ILSB is added further down.
// d0/d1 flag |d| = 0 and |d| = 1, which select the close path for effective
// subtractions.  An exponent field of 0 marks a zero operand (xzero/yzero).
// Purely combinational.  The exponent comparator is not drawn in the adder's
// block diagram; it is placed here because it produces the swap control.
module hub_swap #(
  parameter int unsigned EW = hub_fp_pkg::DEF_EW,
  parameter int unsigned FW = hub_fp_pkg::DEF_FW
) (
  input  logic [EW+FW:0] x,
  input  logic [EW+FW:0] y,
  input  logic           op,
  output logic [FW:0]    ma,
  output logic [FW:0]    mb,
  output logic [EW-1:0]  ea,
  output logic [EW-1:0]  dabs,
  output logic           sa,
  output logic           sb,
  output logic           eop,
  output logic           d0,
  output logic           d1,
  output logic           swapped,
  output logic           xzero,
  output logic           yzero
);
  logic [EW-1:0] ex, ey;
  logic [EW:0]   diff;
  logic          sy_eff;

  always_comb begin
    ex      = x[EW+FW-1:FW];
    ey      = y[EW+FW-1:FW];
    sy_eff  = y[EW+FW] ^ op;
    diff    = {1'b0, ex} - {1'b0, ey};
    swapped = diff[EW];
    if (swapped) begin
      ma   = {1'b1, y[FW-1:0]};
      mb   = {1'b1, x[FW-1:0]};
      ea   = ey;
      sa   = sy_eff;
      sb   = x[EW+FW];
      dabs = ey - ex;
    end else begin
      ma   = {1'b1, x[FW-1:0]};
      mb   = {1'b1, y[FW-1:0]};
      ea   = ex;
      sa   = x[EW+FW];
      sb   = sy_eff;
      dabs = diff[EW-1:0];
    end
    eop   = sa ^ sb;
    d0    = (dabs == '0);
    d1    = (dabs == EW'(1));
    xzero = (ex == '0);
    yzero = (ey == '0);
  end
endmodule
