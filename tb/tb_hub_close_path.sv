// tb_hub_close_path -- random test of the close path at M = 24 with unbiased
// ties.  Each (ma, mb, d) is turned into a subtraction x - y of two positive
// HUB numbers with exponents 200 and 200 - d, whose exact result comes from
// hub_ref_pkg.  The path's significand, shift and sign, packed the way the
// result stage packs them, must match it; the significand must be normalised.
module tb_hub_close_path;
  import hub_ref_pkg::*;
  localparam int EW = 8, FW = 23, M = FW + 1, SW = $clog2(M + 1), E0 = 200;
  logic [M-1:0] ma, mb, mz;
  logic [M:0] b;
  logic d1, eop, neg, zero;
  logic [SW-1:0] s;
  int checks = 0, failures = 0, n_neg = 0, n_long = 0;
  hub_close_path #(.M(M), .SW(SW), .UNBIASED(1'b1)) dut (.*);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ref_t r;
    logic [EW+FW:0] x, y, z;
    for (int i = 0; i < 50000; i++) begin
      ma = {1'b1, FW'($urandom)};
      d1 = 1'($urandom);
      mb = {1'b1, FW'($urandom)};
      if (i % 2 == 0) mb = d1 ? {1'b1, ma[FW-1:0] ^ FW'($urandom_range(0, 255))} >> 0
                              : {1'b1, ma[FW-1:0] ^ FW'($urandom_range(0, 255))};
      if (i % 4 == 1 && d1) mb = {1'b1, ma[FW-2:0], 1'($urandom)} ^ M'($urandom_range(0, 15));
      eop = 1'b1;
      b = ~{1'b0, mb};
      #1;
      x = {1'b0, EW'(E0), ma[FW-1:0]};
      y = {1'b0, EW'(E0 - int'(d1)), mb[FW-1:0]};
      r = ref_add(EW, FW, 64'(x), 64'(y), 1'b1, 1'b1);
      z = zero ? '0 : {neg, EW'(E0 - int'(s)), mz[FW-1:0]};
      checks++;
      if (!(z == (EW+FW+1)'(r.up) || z == (EW+FW+1)'(r.down)) || (!zero && !mz[M-1])) begin
        failures++;
        if (failures < 10) $display("MISMATCH ma=%h mb=%h d1=%0d z=%h exp %h/%h", ma, mb, d1, z, r.up, r.down);
      end
      if (neg && !zero) n_neg++;
      if (s >= 2 && !zero) n_long++;
    end
    $display("  negative differences %0d, shifts >= 2 %0d", n_neg, n_long);
    if (n_neg == 0 || n_long == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
