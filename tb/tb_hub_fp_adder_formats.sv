// tb_hub_fp_adder_formats -- the adder at HUB half precision (5-bit exponent,
// 10 stored fraction bits) and HUB double precision (11-bit exponent, 52
// stored fraction bits), both with unbiased ties, against the exact model.
// Operands are random with exponent differences concentrated around 0..3 so
// that both paths and the tie cases are exercised in each format.
module tb_hub_fp_adder_formats;
  import hub_fp_pkg::*;
  import hub_ref_pkg::*;

  localparam int HE = 5,  HF = 10, HW = HE + HF + 1;
  localparam int DE = 11, DF = 52, DW = DE + DF + 1;
  localparam int N  = 20000;

  logic [HW-1:0] hx, hy, hz;
  logic [DW-1:0] dx, dy, dz;
  logic          op, hov, hun, dov, dun;
  path_e         hpath, dpath;

  hub_fp_adder #(.EW(HE), .FW(HF)) dut_half (
    .x(hx), .y(hy), .op(op), .z(hz), .overflow(hov), .underflow(hun), .path(hpath));
  hub_fp_adder #(.EW(DE), .FW(DF)) dut_double (
    .x(dx), .y(dy), .op(op), .z(dz), .overflow(dov), .underflow(dun), .path(dpath));

  int checks = 0, failures = 0, n_close_h = 0, n_close_d = 0, n_tie_h = 0, n_tie_d = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (2 * N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick_exp(input int ew, input int ea);
    int e;
    case ($urandom_range(0, 3))
      0, 1: e = ea + $urandom_range(0, 6) - 3;
      2:    e = ea + $urandom_range(0, 80) - 40;
      default: e = $urandom_range(1, (1 << ew) - 1);
    endcase
    if (e < 1) e = 1;
    if (e > (1 << ew) - 1) e = (1 << ew) - 1;
    return e;
  endfunction

  initial begin
    ref_t r;
    int ea, eb;
    for (int i = 0; i < N; i++) begin
      op = 1'($urandom);
      // half precision
      ea = $urandom_range(1, (1 << HE) - 1);
      eb = pick_exp(HE, ea);
      hx = {1'($urandom), HE'(ea), HF'($urandom)};
      hy = {1'($urandom), HE'(eb), HF'($urandom)};
      if (i % 4 == 0) hy[HF-1:0] = hx[HF-1:0] ^ HF'($urandom_range(0, 7));
      // double precision
      ea = $urandom_range(1, (1 << DE) - 1);
      eb = pick_exp(DE, ea);
      dx = {1'($urandom), DE'(ea), DF'({$urandom, $urandom})};
      dy = {1'($urandom), DE'(eb), DF'({$urandom, $urandom})};
      if (i % 4 == 0) dy[DF-1:0] = dx[DF-1:0] ^ DF'($urandom_range(0, 7));
      @(posedge clk);
      r = ref_add(HE, HF, 64'(hx), 64'(hy), op, 1'b1);
      checks++;
      if (!((hz == HW'(r.up) && hov == r.ovf_up && hun == r.unf_up) ||
            (hz == HW'(r.down) && hov == r.ovf_down && hun == r.unf_down))) begin
        failures++;
        if (failures < 10) $display("HALF MISMATCH x=%h y=%h op=%0d z=%h exp %h/%h", hx, hy, op, hz, r.up, r.down);
      end
      if (hpath == CLOSE_PATH) n_close_h++;
      if (r.tie) n_tie_h++;
      r = ref_add(DE, DF, 64'(dx), 64'(dy), op, 1'b1);
      checks++;
      if (!((dz == DW'(r.up) && dov == r.ovf_up && dun == r.unf_up) ||
            (dz == DW'(r.down) && dov == r.ovf_down && dun == r.unf_down))) begin
        failures++;
        if (failures < 10) $display("DOUBLE MISMATCH x=%h y=%h op=%0d z=%h exp %h/%h", dx, dy, op, dz, r.up, r.down);
      end
      if (dpath == CLOSE_PATH) n_close_d++;
      if (r.tie) n_tie_d++;
    end
    $display("  half: close path %0d, ties %0d; double: close path %0d, ties %0d",
             n_close_h, n_tie_h, n_close_d, n_tie_d);
    if (n_close_h == 0 || n_close_d == 0 || n_tie_h == 0 || n_tie_d == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
