// tb_hub_swap -- random test of the exponent comparison and swap at EW = 8,
// FW = 23.  The expected left/right assignment, |d|, flags and effective
// operation are worked out from integer exponents.
module tb_hub_swap;
  localparam int EW = 8, FW = 23;
  logic [EW+FW:0] x, y;
  logic op;
  logic [FW:0] ma, mb;
  logic [EW-1:0] ea, dabs;
  logic sa, sb, eop, d0, d1, swapped, xzero, yzero;
  int checks = 0, failures = 0;
  hub_swap #(.EW(EW), .FW(FW)) dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int ex, ey, d;
    bit sy;
    for (int i = 0; i < 20000; i++) begin
      x = (EW+FW+1)'({$urandom, $urandom}); y = (EW+FW+1)'({$urandom, $urandom}); op = 1'($urandom);
      if (i % 4 == 0) y[EW+FW-1:FW] = x[EW+FW-1:FW] + EW'($urandom_range(0, 2)) - EW'(1);
      if (i % 50 == 0) x[EW+FW-1:FW] = '0;
      #1;
      ex = int'(x[EW+FW-1:FW]); ey = int'(y[EW+FW-1:FW]);
      d = ex - ey; sy = y[EW+FW] ^ op;
      checks++;
      if (d >= 0) begin
        if (ma != {1'b1, x[FW-1:0]} || mb != {1'b1, y[FW-1:0]} || ea != EW'(ex) ||
            sa != x[EW+FW] || sb != sy || swapped) failures++;
      end else begin
        if (ma != {1'b1, y[FW-1:0]} || mb != {1'b1, x[FW-1:0]} || ea != EW'(ey) ||
            sa != sy || sb != x[EW+FW] || !swapped) failures++;
      end
      checks++;
      if (int'(dabs) != (d < 0 ? -d : d) || d0 != (d == 0) || (d1 != (d == 1 || d == -1)) ||
          eop != (x[EW+FW] ^ sy) || xzero != (ex == 0) || yzero != (ey == 0)) begin
        failures++;
        $display("MISMATCH ex=%0d ey=%0d dabs=%0d d0=%0d d1=%0d", ex, ey, dabs, d0, d1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
