// hub_lzod -- leading zero/one detector of the close path.
//
// c is the M+2-bit close-path sum.  The block counts how many of the bits
// c[M], c[M-1], ... equal the sign bit c[M+1] before the first one that
// differs: leading zeros for a positive sum, leading ones for a negative one.
// The count s (0..M) is the left shift that brings the leading digit to the
// top of the M-bit result window, and also the amount the exponent falls.
// zero flags c = 0.  Exact count, purely combinational.
// The published close path names the LZOD; the exact priority count is this
// design's realisation.
module hub_lzod #(
  parameter int unsigned M  = hub_fp_pkg::DEF_FW + 1,
  parameter int unsigned SW = $clog2(M + 1)
) (
  input  logic [M+1:0]  c,
  output logic [SW-1:0] s,
  output logic          zero
);
  logic [M:0] t;
  logic       found;
  always_comb begin
    t     = c[M:0] ^ {(M+1){c[M+1]}};
    s     = SW'(M);
    found = 1'b0;
    for (int i = M; i >= 0; i--) begin
      if (!found && t[i]) begin
        s     = SW'(M - i);
        found = 1'b1;
      end
    end
    zero = (c == '0);
  end
endmodule
