// hub_fp_pkg -- types and constants shared by the HUB floating-point adder.
//
// A HUB (half-unit-biased) floating-point number stores a sign, a biased
// exponent and FW fraction bits like an IEEE-754 number, but its significand
// carries two implicit bits: the leading 1 and an implicit least significant
// bit (ILSB) that is also 1.  The value of (s, e, f) is
//   (-1)^s * 2^(e - bias) * (1.f + 2^-(FW+1)).
// This package holds the default format (the HUB version of IEEE-754 single
// precision), the path-select type of the double-path adder and the bias
// helper.  The exponent field 0 is reserved for zero; this encoding of zero is
// a choice of this design, the format itself does not fix one.
package hub_fp_pkg;

  // Default format: 8-bit exponent, 23 stored fraction bits (25-bit HUB significand).
  localparam int unsigned DEF_EW = 8;
  localparam int unsigned DEF_FW = 23;

  // Which of the two parallel datapaths produced the result.
  typedef enum logic {
    FAR_PATH   = 1'b0,  // additions, and subtractions with |d| > 1
    CLOSE_PATH = 1'b1   // subtractions with |d| = 0 or 1
  } path_e;

  // Exponent bias for an EW-bit exponent field, as in IEEE-754.
  function automatic int unsigned exp_bias(input int unsigned ew);
    return (1 << (ew - 1)) - 1;
  endfunction

endpackage
