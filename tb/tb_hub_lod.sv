// tb_hub_lod -- exhaustive test at M = 6 over the far-path sums that occur
// (leading one at bit M+1, M or M-1): r1 and l1 must name its position.
module tb_hub_lod;
  localparam int M = 6;
  logic [M+1:0] c;
  logic r1, l1;
  int checks = 0, failures = 0;
  hub_lod #(.M(M)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int lead;
    for (int i = (1 << (M - 1)); i < (1 << (M + 2)); i++) begin
      c = (M+2)'(i);
      #1;
      lead = 0;
      for (int k = 0; k < M + 2; k++) if (c[k]) lead = k;
      checks++;
      if (r1 != (lead == M + 1) || l1 != (lead == M - 1)) begin
        failures++;
        $display("MISMATCH c=%b r1=%0d l1=%0d", c, r1, l1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
