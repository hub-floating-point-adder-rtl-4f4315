// tb_hub_far_path -- random test of the far path at M = 24 with unbiased
// ties: additions for any |d| and subtractions for |d| > 1, posed as x op y
// with positive operands at exponents 250 and 250 - |d|, compared with the
// exact model of hub_ref_pkg after packing {0, 250 + r1 - l1, mz}.
module tb_hub_far_path;
  import hub_ref_pkg::*;
  localparam int EW = 8, FW = 23, M = FW + 1, E0 = 250;
  logic [M-1:0] ma, mb, mz;
  logic [M:0] b;
  logic [EW-1:0] dabs;
  logic eop, d0, r1, l1;
  int checks = 0, failures = 0, n_r1 = 0, n_l1 = 0;
  hub_far_path #(.M(M), .EW(EW), .UNBIASED(1'b1)) dut (.*);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ref_t r;
    int d;
    logic [EW+FW:0] x, y, z;
    for (int i = 0; i < 50000; i++) begin
      ma = {1'b1, FW'($urandom)};
      mb = {1'b1, FW'($urandom)};
      eop = 1'($urandom);
      d = (i % 3 == 0) ? $urandom_range(0, E0 - 1) : $urandom_range(0, 6);
      if (eop && d < 2) d = 2 + d;
      dabs = EW'(d); d0 = (d == 0);
      b = {1'b0, mb} ^ {(M+1){eop}};
      #1;
      x = {1'b0, EW'(E0), ma[FW-1:0]};
      y = {1'b0, EW'(E0 - d), mb[FW-1:0]};
      r = ref_add(EW, FW, 64'(x), 64'(y), eop, 1'b1);
      z = {1'b0, EW'(E0 + int'(r1) - int'(l1)), mz[FW-1:0]};
      checks++;
      if (!(z == (EW+FW+1)'(r.up) || z == (EW+FW+1)'(r.down)) || !mz[M-1]) begin
        failures++;
        if (failures < 10) $display("MISMATCH ma=%h mb=%h d=%0d eop=%0d z=%h exp %h/%h", ma, mb, d, eop, z, r.up, r.down);
      end
      n_r1 += int'(r1); n_l1 += int'(l1);
    end
    $display("  overflows %0d, left shifts %0d", n_r1, n_l1);
    if (n_r1 == 0 || n_l1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
