// tb_hub_r_shifter -- exhaustive test at M = 6, EW = 4: the output must be
// floor((2b+1) / 2^|d|) for the signed input b, for every |d| up to 15.
module tb_hub_r_shifter;
  localparam int M = 6, EW = 4;
  logic [M:0] b;
  logic [EW-1:0] dabs;
  logic [M+1:0] y;
  int checks = 0, failures = 0;
  hub_r_shifter #(.M(M), .EW(EW)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int v, q;
    for (int d = 0; d < (1 << EW); d++)
      for (int i = 0; i < (1 << (M + 1)); i++) begin
        b = (M+1)'(i); dabs = EW'(d);
        #1;
        v = 2 * int'($signed(b)) + 1;
        q = v;
        for (int k = 0; k < d; k++) q = (q >= 0) ? q / 2 : -((-q + 1) / 2);
        checks++;
        if (int'($signed(y)) != q) begin
          failures++;
          $display("MISMATCH b=%h d=%0d y=%h exp=%0d", b, d, y, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
