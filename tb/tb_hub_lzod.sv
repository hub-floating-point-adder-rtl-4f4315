// tb_hub_lzod -- exhaustive test at M = 7.  For every c the shift s must move
// the leading digit (first bit differing from the sign) to position M:
// (c << s) keeps the sign in bit M+1 and has the opposite bit in position M,
// unless c is 0 or -1.  zero must flag c = 0.
module tb_hub_lzod;
  localparam int M = 7, SW = $clog2(M + 1);
  logic [M+1:0] c;
  logic [SW-1:0] s;
  logic zero;
  int checks = 0, failures = 0;
  hub_lzod #(.M(M), .SW(SW)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int v, mag, expected;
    for (int i = 0; i < (1 << (M + 2)); i++) begin
      c = (M+2)'(i);
      #1;
      v = int'($signed(c));
      mag = (v < 0) ? -v - 1 : v;   // leading one of |c| or of ~c
      expected = M;
      for (int k = 0; k <= M; k++) if (mag >= (1 << k)) expected = M - k;
      checks++;
      if ((mag != 0 && int'(s) != expected) || zero != (v == 0)) begin
        failures++;
        $display("MISMATCH c=%b s=%0d exp=%0d zero=%0d", c, s, expected, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
