// tb_hub_cond_inverter -- checks the conditional inverter exhaustively at
// W = 8: y must be a when inv = 0 and the two's complement of the HUB value
// (2a+1) when inv = 1, i.e. 2y+1 == -(2a+1) modulo 2^(W+1).
module tb_hub_cond_inverter;
  localparam int W = 8;
  logic [W-1:0] a, y;
  logic inv;
  int checks = 0, failures = 0;
  hub_cond_inverter #(.W(W)) dut (.a(a), .inv(inv), .y(y));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W:0] hub_a, hub_y;
    for (int i = 0; i < 2; i++)
      for (int v = 0; v < (1 << W); v++) begin
        a = W'(v); inv = i[0];
        #1;
        hub_a = {a, 1'b1};
        hub_y = {y, 1'b1};
        checks++;
        if (inv ? (hub_y != (W+1)'(-hub_a)) : (y != a)) begin
          failures++;
          $display("MISMATCH a=%h inv=%0d y=%h", a, inv, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
