// tb_hub_result_mux -- random test of path selection, exponent update, sign
// and special cases at EW = 8, FW = 23.  Expected words are assembled from the
// rules: close path for eop with |d| <= 1, exponent ea - s or ea + r1 - l1,
// zero operands pass the other operand, over/underflow saturate/flush.
module tb_hub_result_mux;
  import hub_fp_pkg::*;
  localparam int EW = 8, FW = 23, SW = $clog2(FW + 2);
  logic [EW+FW:0] x, y, z, ez;
  logic op, sa, eop, d0, d1, xzero, yzero, close_neg, close_zero, far_r1, far_l1;
  logic overflow, underflow, eovf, eunf;
  logic [EW-1:0] ea;
  logic [FW:0] close_m, far_m;
  logic [SW-1:0] close_s;
  path_e path;
  int checks = 0, failures = 0;
  hub_result_mux #(.EW(EW), .FW(FW), .SW(SW)) dut (.*);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    bit cl, sgn;
    int e;
    logic [FW-1:0] f;
    for (int i = 0; i < 50000; i++) begin
      x = (EW+FW+1)'({$urandom, $urandom}); y = (EW+FW+1)'({$urandom, $urandom}); op = 1'($urandom);
      ea = (i % 5 == 0) ? EW'($urandom_range(0, 3)) : (i % 5 == 1) ? 8'hFF : EW'($urandom);
      sa = 1'($urandom); eop = 1'($urandom);
      d0 = ($urandom_range(0, 2) == 0); d1 = !d0 && ($urandom_range(0, 1) == 0);
      xzero = ($urandom_range(0, 20) == 0); yzero = ($urandom_range(0, 20) == 0);
      close_m = {1'b1, FW'($urandom)}; close_s = SW'($urandom_range(0, FW + 1));
      close_neg = 1'($urandom); close_zero = ($urandom_range(0, 20) == 0);
      far_m = {1'b1, FW'($urandom)}; far_r1 = 1'($urandom); far_l1 = !far_r1 && 1'($urandom);
      #1;
      cl = eop && (d0 || d1);
      e = cl ? int'(ea) - int'(close_s) : int'(ea) + int'(far_r1) - int'(far_l1);
      sgn = cl ? sa ^ close_neg : sa;
      f = cl ? close_m[FW-1:0] : far_m[FW-1:0];
      eovf = 0; eunf = 0;
      if (xzero && yzero) ez = '0;
      else if (yzero) ez = x;
      else if (xzero) ez = {y[EW+FW] ^ op, y[EW+FW-1:0]};
      else if (cl && close_zero) ez = '0;
      else if (e < 1) begin ez = '0; eunf = 1; end
      else if (e > 255) begin ez = {sgn, {(EW+FW){1'b1}}}; eovf = 1; end
      else ez = {sgn, EW'(e), f};
      checks++;
      if (z != ez || overflow != eovf || underflow != eunf || (path == CLOSE_PATH) != cl) begin
        failures++;
        if (failures < 10) $display("MISMATCH z=%h exp=%h", z, ez);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
