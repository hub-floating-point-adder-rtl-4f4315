// tb_hub_r1_shifter -- exhaustive test at M = 6.  The M+1-bit input read as a
// signed number with its ILSB appended (2b+1) must come out unchanged for
// d = 0, and as floor((2b+1)/2) with lost = 1 for d = 1.
module tb_hub_r1_shifter;
  localparam int M = 6;
  logic [M:0] b;
  logic d1, lost;
  logic [M+1:0] y;
  int checks = 0, failures = 0;
  hub_r1_shifter #(.M(M)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int v, expv;
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < (1 << (M + 1)); i++) begin
        b = (M+1)'(i); d1 = d[0];
        #1;
        v = 2 * int'($signed(b)) + 1;
        expv = d1 ? ((v - 1) / 2) : v;  // v odd: floor(v/2) = (v-1)/2
        if (v < 0 && d1) expv = -((-v + 1) / 2);
        checks++;
        if (int'($signed(y)) != expv || lost != d1) begin
          failures++;
          $display("MISMATCH b=%h d1=%0d y=%h lost=%0d exp=%0d", b, d1, y, lost, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
