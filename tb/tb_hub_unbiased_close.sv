// tb_hub_unbiased_close -- exhaustive test of the close-path fill control
// (M = 24, both UNBIASED settings).  The inserted pattern must be 1000...
// (exact) for a d = 1 subtraction, except that with UNBIASED = 1 and a shift of
// exactly 2 it must be 0111..., so that the result LSB is 0; for d = 0 the
// fill is 0.
module tb_hub_unbiased_close;
  localparam int M = 24, SW = $clog2(M + 1);
  logic lost, d1, eop;
  logic [SW-1:0] s;
  logic ff_u, fr_u, ff_b, fr_b;
  int checks = 0, failures = 0;
  hub_unbiased_close #(.M(M), .SW(SW), .UNBIASED(1'b1)) dut_u (
    .lost(lost), .d1(d1), .eop(eop), .s(s), .fill_first(ff_u), .fill_rest(fr_u));
  hub_unbiased_close #(.M(M), .SW(SW), .UNBIASED(1'b0)) dut_b (
    .lost(lost), .d1(d1), .eop(eop), .s(s), .fill_first(ff_b), .fill_rest(fr_b));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    bit ef, er, lsb;
    for (int i = 0; i < 8; i++)
      for (int sh = 0; sh <= M; sh++) begin
        eop = i[0]; d1 = i[1]; lost = i[2] & i[1]; s = SW'(sh);
        #1;
        // biased: exact pattern
        checks++;
        if (ff_b != lost || fr_b != 1'b0) failures++;
        // unbiased: the result LSB after a shift of sh is the fill bit at
        // position sh-2 of the pattern (first bit for sh = 2)
        ef = lost; er = 0;
        if (eop && d1 && lost && sh == 2) begin ef = 0; er = 1; end
        checks++;
        if (ff_u != ef || fr_u != er) begin
          failures++;
          $display("MISMATCH eop=%0d d1=%0d lost=%0d s=%0d got %0d%0d", eop, d1, lost, sh, ff_u, fr_u);
        end
        // property: on a d=1 subtraction tie (s >= 2) the LSB is 0
        if (eop && d1 && lost && sh >= 2) begin
          lsb = (sh == 2) ? ff_u : fr_u;
          checks++;
          if (lsb) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
