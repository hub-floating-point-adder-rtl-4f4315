// tb_hub_unbiased_far -- exhaustive test of the far-path LSB correction for
// both UNBIASED settings: the LSB is cleared only for an addition with d = 0
// whose dropped bits are zero, and only when UNBIASED = 1.
module tb_hub_unbiased_far;
  logic lsb_in, lsb_star, eop, d0, out_u, out_b;
  int checks = 0, failures = 0;
  hub_unbiased_far #(.UNBIASED(1'b1)) dut_u (.lsb_in(lsb_in), .lsb_star(lsb_star), .eop(eop), .d0(d0), .lsb_out(out_u));
  hub_unbiased_far #(.UNBIASED(1'b0)) dut_b (.lsb_in(lsb_in), .lsb_star(lsb_star), .eop(eop), .d0(d0), .lsb_out(out_b));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    bit tie;
    for (int i = 0; i < 16; i++) begin
      {lsb_in, lsb_star, eop, d0} = 4'(i);
      #1;
      tie = !eop && d0 && !lsb_star;
      checks += 2;
      if (out_u != (tie ? 1'b0 : lsb_in)) failures++;
      if (out_b != lsb_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
