// hub_l_shifter -- variable normalisation shifter of the close path.
//
// Shifts the magnitude bits c[M:0] of the close-path sum left by s and keeps
// the top M bits.  The vacated positions are filled with a pattern: one bit
// fill_first, then fill_rest repeated.  Zero fill is (0,0); the exact fill for
// a d = 1 difference is (1,0) = 1000...; the alternative tie neighbour is
// (0,1) = 0111...  With s = 0 the window is c[M:1], i.e. the bit at the ILSB
// position is truncated away.  Purely combinational.
// The published close path fills with zeros; the two-bit fill pattern is this
// design's, needed for exact d = 1 results.
module hub_l_shifter #(
  parameter int unsigned M  = hub_fp_pkg::DEF_FW + 1,
  parameter int unsigned SW = $clog2(M + 1)
) (
  input  logic [M:0]    c,
  input  logic [SW-1:0] s,
  input  logic          fill_first,
  input  logic          fill_rest,
  output logic [M-1:0]  y
);
  logic [2*M:0] v;
  always_comb begin
    v = {c, fill_first, {(M-1){fill_rest}}} << s;
    y = v[2*M:M+1];
  end
endmodule
