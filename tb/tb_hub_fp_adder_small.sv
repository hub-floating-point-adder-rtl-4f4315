// tb_hub_fp_adder_small -- exhaustive test of the HUB adder on a small format.
//
// With a 5-bit exponent and 4 stored fraction bits every pair of operands and
// both operations are applied (2 x 2^20 cases) to two adders side by side:
// one with the unbiased tie logic and one without.  Both are compared with
// the exact reference model; the unbiased one must pick the even neighbour on
// ties of aligned additions and |d| = 1 subtractions.  For the biased adder
// the test also counts the ties where its choice differs from the unbiased
// adder's, to show the option has an effect.
module tb_hub_fp_adder_small;
  import hub_fp_pkg::*;
  import hub_ref_pkg::*;

  localparam int EW = 5;
  localparam int FW = 4;
  localparam int W  = EW + FW + 1;

  logic [W-1:0] x, y, z_u, z_b;
  logic         op, ovf_u, unf_u, ovf_b, unf_b;
  path_e        path_u, path_b;

  hub_fp_adder #(.EW(EW), .FW(FW), .UNBIASED(1'b1)) dut_u (
    .x(x), .y(y), .op(op), .z(z_u), .overflow(ovf_u), .underflow(unf_u), .path(path_u));
  hub_fp_adder #(.EW(EW), .FW(FW), .UNBIASED(1'b0)) dut_b (
    .x(x), .y(y), .op(op), .z(z_b), .overflow(ovf_b), .underflow(unf_b), .path(path_b));

  int checks = 0, failures = 0, ties = 0, differ = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat ((1 << (2 * W + 1)) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(input ref_t r, input logic [W-1:0] z, input logic ov, input logic un);
    return (z == W'(r.up) && ov == r.ovf_up && un == r.unf_up) ||
           (z == W'(r.down) && ov == r.ovf_down && un == r.unf_down);
  endfunction

  initial begin
    ref_t ru, rb;
    for (int o = 0; o < 2; o++)
      for (int a = 0; a < (1 << W); a++)
        for (int b = 0; b < (1 << W); b++) begin
          x = W'(a); y = W'(b); op = o[0];
          @(posedge clk);
          ru = ref_add(EW, FW, 64'(a), 64'(b), o[0], 1'b1);
          rb = ref_add(EW, FW, 64'(a), 64'(b), o[0], 1'b0);
          checks += 2;
          if (!ok(ru, z_u, ovf_u, unf_u)) begin
            failures++;
            if (failures < 10) $display("UNBIASED MISMATCH x=%h y=%h op=%0d z=%h exp %h/%h", x, y, o, z_u, ru.up, ru.down);
          end
          if (!ok(rb, z_b, ovf_b, unf_b)) begin
            failures++;
            if (failures < 10) $display("BIASED MISMATCH x=%h y=%h op=%0d z=%h exp %h/%h", x, y, o, z_b, rb.up, rb.down);
          end
          if (ru.tie) ties++;
          if (z_u != z_b) differ++;
        end
    $display("  ties %0d, unbiased and biased results differ in %0d cases", ties, differ);
    if (differ == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
