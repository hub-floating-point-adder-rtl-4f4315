// tb_hub_twos_adder -- exhaustive test at M = 5: c must equal
// (2*ma + 1) + b modulo 2^(M+2).
module tb_hub_twos_adder;
  localparam int M = 5;
  logic [M-1:0] ma;
  logic [M+1:0] b, c;
  int checks = 0, failures = 0;
  hub_twos_adder #(.M(M)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < (1 << M); i++)
      for (int j = 0; j < (1 << (M + 2)); j++) begin
        ma = M'(i); b = (M+2)'(j);
        #1;
        checks++;
        if (int'(c) != ((2 * i + 1 + j) % (1 << (M + 2)))) begin
          failures++;
          $display("MISMATCH ma=%0d b=%0d c=%0d", i, j, c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
