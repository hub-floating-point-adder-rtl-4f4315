// tb_hub_l_shifter -- exhaustive test at M = 5 over c, s and the four fill
// patterns.  The expected window is built bit by bit: each
// output bit j comes from bit j+1-s of c, or from the fill pattern below c.
module tb_hub_l_shifter;
  localparam int M = 5, SW = $clog2(M + 1);
  logic [M:0] c;
  logic [SW-1:0] s;
  logic fill_first, fill_rest;
  logic [M-1:0] y, e;
  int checks = 0, failures = 0;
  hub_l_shifter #(.M(M), .SW(SW)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int src;
    for (int f = 0; f < 4; f++)
      for (int sh = 0; sh <= M; sh++)
        for (int i = 0; i < (1 << (M + 1)); i++) begin
          c = (M+1)'(i); s = SW'(sh); fill_first = f[1]; fill_rest = f[0];
          #1;
          // output bit j (j = M-1 is the MSB) comes from c bit j+1-s; below c
          // bit 0 the fill pattern continues: first bit, then the rest.
          for (int j = 0; j < M; j++) begin
            src = j + 1 - sh;
            if (src >= 0) e[j] = c[src];
            else if (src == -1) e[j] = fill_first;
            else e[j] = fill_rest;
          end
          checks++;
          if (y != e) begin
            failures++;
            $display("MISMATCH c=%b s=%0d f=%0d y=%b exp=%b", c, sh, f, y, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
