// tb_hub_l1r1_shifter -- exhaustive test at M = 6: the window must be
// floor(c / 2^(1+r1-l1)) modulo 2^M and lsb_star the OR of what was dropped
// (1 for a left shift).
module tb_hub_l1r1_shifter;
  localparam int M = 6;
  logic [M+1:0] c;
  logic r1, l1, lsb_star;
  logic [M-1:0] y;
  int checks = 0, failures = 0;
  hub_l1r1_shifter #(.M(M)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int sh, ev, dropped;
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < (1 << (M + 2)); i++) begin
        c = (M+2)'(i); r1 = (m == 1); l1 = (m == 2);
        #1;
        sh = (m == 1) ? 2 : (m == 2) ? 0 : 1;
        ev = (i >> sh) % (1 << M);
        dropped = i % (1 << sh);
        checks++;
        if (int'(y) != ev || lsb_star != ((dropped != 0) || m == 2)) begin
          failures++;
          $display("MISMATCH c=%b mode=%0d y=%b lsb*=%0d", c, m, y, lsb_star);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
