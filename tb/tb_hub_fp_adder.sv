// tb_hub_fp_adder -- end-to-end test of the double-path HUB adder at its
// default parameters (HUB single precision, unbiased ties).
//
// Random operand pairs are drawn so that every mechanism of the adder is hit:
// exponent differences of 0, 1, 2, small and beyond the significand width,
// near-equal significands for deep cancellation, both operation codes, zero
// operands, and exponents at the edges of the range.  Each result is compared
// with hub_ref_pkg::ref_add (exact wide-integer arithmetic); on a tie either
// neighbour is accepted unless the unbiased rule fixes the choice.  The test
// counts how often each mechanism occurred and fails if one never did.
module tb_hub_fp_adder;
  import hub_fp_pkg::*;
  import hub_ref_pkg::*;

  localparam int EW = DEF_EW;
  localparam int FW = DEF_FW;
  localparam int M  = FW + 1;
  localparam int N  = 200000;

  logic [EW+FW:0] x, y, z;
  logic           op, overflow, underflow;
  path_e          path;

  hub_fp_adder dut (.x(x), .y(y), .op(op), .z(z), .overflow(overflow),
                    .underflow(underflow), .path(path));

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (4 * N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {
    EV_CLOSE, EV_FAR, EV_FAR_OVF, EV_FAR_L1, EV_CLOSE_NEG, EV_CLOSE_LONG,
    EV_SWAP, EV_BIG_D, EV_TIE_FAR_EVEN, EV_TIE_CLOSE_0111, EV_TIE_D0_SUB,
    EV_ZERO_OP, EV_ZERO_RES, EV_OVERFLOW, EV_UNDERFLOW, EV_NUM
  } ev_e;
  int ev[EV_NUM];
  string ev_name[EV_NUM] = '{"close path", "far path", "far overflow (R1)",
    "far 0.1xxx (L1)", "close negative sum", "close left shift >= 2",
    "operand swap", "|d| beyond significand", "far tie LSB forced to 0",
    "close tie with 0111 fill", "aligned subtraction tie", "zero operand",
    "exact zero result", "exponent overflow", "exponent underflow"};

  function automatic logic [EW+FW:0] rnd_op(input int e);
    logic [EW+FW:0] w;
    w = (EW+FW+1)'({$urandom, $urandom});
    w[EW+FW-1:FW] = EW'(e);
    return w;
  endfunction

  task automatic one(input logic [EW+FW:0] a, input logic [EW+FW:0] b, input bit o);
    ref_t r;
    x = a; y = b; op = o;
    @(posedge clk);
    r = ref_add(EW, FW, 64'(a), 64'(b), o, 1'b1);
    checks++;
    if (!((z == (EW+FW+1)'(r.up) && overflow == r.ovf_up && underflow == r.unf_up) ||
          (z == (EW+FW+1)'(r.down) && overflow == r.ovf_down && underflow == r.unf_down))) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH x=%h y=%h op=%0d z=%h ovf=%0d unf=%0d expected %h or %h (tie=%0d even=%0d)",
                 a, b, o, z, overflow, underflow, r.up, r.down, r.tie, r.must_even);
    end
    // mechanism counters, read from the datapath
    if (!dut.xzero && !dut.yzero) begin
      if (path == CLOSE_PATH) ev[EV_CLOSE]++; else ev[EV_FAR]++;
      if (path == FAR_PATH && dut.far_r1) ev[EV_FAR_OVF]++;
      if (path == FAR_PATH && dut.far_l1) ev[EV_FAR_L1]++;
      if (path == CLOSE_PATH && dut.close_neg && !dut.close_zero) ev[EV_CLOSE_NEG]++;
      if (path == CLOSE_PATH && dut.close_s >= 2 && !dut.close_zero) ev[EV_CLOSE_LONG]++;
      if (dut.swapped) ev[EV_SWAP]++;
      if (int'(dut.dabs) >= M + 2) ev[EV_BIG_D]++;
      if (path == FAR_PATH && dut.d0 && !dut.u_far.lsb && dut.u_far.win[0]) ev[EV_TIE_FAR_EVEN]++;
      if (path == CLOSE_PATH && dut.u_close.u_unb.use_low) ev[EV_TIE_CLOSE_0111]++;
      if (path == CLOSE_PATH && dut.d0 && r.tie && !dut.close_zero) ev[EV_TIE_D0_SUB]++;
      if (path == CLOSE_PATH && dut.close_zero) ev[EV_ZERO_RES]++;
    end else ev[EV_ZERO_OP]++;
    if (overflow) ev[EV_OVERFLOW]++;
    if (underflow) ev[EV_UNDERFLOW]++;
  endtask

  initial begin
    logic [EW+FW:0] a, b;
    int ea, eb, kind;
    // directed: 1.0 + 1.0, 1.5 - 1.5, 3 - 1.5
    one({1'b0, EW'(127), FW'(0)}, {1'b0, EW'(127), FW'(0)}, 0);
    one({1'b0, EW'(127), FW'(1) << (FW-1)}, {1'b0, EW'(127), FW'(1) << (FW-1)}, 1);
    for (int i = 0; i < N; i++) begin
      kind = $urandom_range(0, 9);
      ea = $urandom_range(1, (1 << EW) - 1);
      case (kind)
        0, 1, 2: eb = ea + $urandom_range(0, 2) * (($urandom_range(0, 1) == 1) ? 1 : -1);
        3, 4:    eb = ea + $urandom_range(0, 30) - 15;
        5:       eb = $urandom_range(1, (1 << EW) - 1);
        6:       eb = ea;                                   // near-equal operands
        7:       eb = ea + (($urandom_range(0, 1) == 1) ? 1 : -1);       // near-equal, |d| = 1
        8:       eb = ($urandom_range(0, 3) == 0) ? 0 : ea; // zero operand
        default: begin ea = ($urandom_range(0, 1) == 1) ? $urandom_range(1, 30)
                                           : $urandom_range((1 << EW) - 30, (1 << EW) - 1);
                       eb = ea + $urandom_range(0, 4) - 2; end
      endcase
      if (eb < 0) eb = 0;
      if (eb > (1 << EW) - 1) eb = (1 << EW) - 1;
      a = rnd_op(ea);
      b = rnd_op(eb);
      if (kind == 6 || kind == 7) begin
        b[FW-1:0] = a[FW-1:0] ^ FW'($urandom_range(0, 15));
        if (kind == 7) b[FW-1:0] = (eb > ea) ? ~a[FW-1:0] >> 1 ^ FW'($urandom_range(0, 7))
                                             : {1'b1, a[FW-1:1]} ^ FW'($urandom_range(0, 7));
      end
      if (kind == 8 && ($urandom_range(0, 1) == 1)) begin a = b; b = rnd_op(ea); end
      one(a, b, 1'($urandom_range(0, 1)));
    end
    for (int e = 0; e < EV_NUM; e++) begin
      $display("  %-28s %0d", ev_name[e], ev[e]);
      if (ev[e] == 0) begin
        failures++;
        $display("  mechanism never exercised: %s", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
