// tb_ling_adder_full -- end-to-end check of the 32-bit adder at its default
// size.
//
// Directed vectors (zero, all ones, full propagate chains with and without
// carry-in, single generates at every bit) are followed by random operand
// pairs. Half of the random pairs are drawn so that a + b is all ones except
// at a few bits, which makes long propagate runs and block-crossing carries
// common. Every result is compared with sum/cout of the built-in addition
// {cout, sum} = a + b + cin. The adder is combinational, so each result is
// checked in the same cycle its operands are applied (zero cycles latency).
//
// Each mechanism of the design is counted through hierarchical probes and
// must occur at least once: a Ling block carry C*_k of 1 for every block
// boundary; a C*_k of 1 whose real carry p_top C*_k is 0 (the p factor that
// the blocks apply locally); a group whose two candidate carries gb and pb
// differ while C* selects pb; Cout* = 1 masked by p32 = 0; carry-out; and a
// carry that travels from cin through all 32 bits.
module tb_ling_adder_full;
  localparam int unsigned W = 32;
  localparam int unsigned NRAND = 400000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  int n_cstar[3];
  int n_cstar_p0 = 0, n_sel_pb = 0, n_cout_masked = 0, n_cout = 0, n_ripple = 0;

  always #5 clk = ~clk;

  ling_adder dut (.a, .b, .cin, .sum, .cout);

  initial begin
    repeat (NRAND + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // p of the top bit of block k (operand positions 9k+8), indices shifted by
  // one because position 0 is the carry-in.
  function automatic logic p_top(input int k);
    return a[9*k+7] | b[9*k+7];
  endfunction

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb, input logic vc);
    logic [W:0] exp_full;
    a = va;
    b = vb;
    cin = vc;
    @(negedge clk);
    exp_full = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    checks++;
    if ({cout, sum} !== exp_full) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b got %b_%h exp %b_%h", a, b, cin, cout, sum,
                 exp_full[W], exp_full[W-1:0]);
    end
    for (int k = 0; k < 3; k++) begin
      if (dut.c_star[k]) begin
        n_cstar[k]++;
        if (!p_top(k)) n_cstar_p0++;
      end
    end
    if (dut.c_star[0] && (dut.g_blk[1].u_blk.gb != dut.g_blk[1].u_blk.pb)) n_sel_pb++;
    if (dut.c_star[1] && (dut.g_blk[2].u_blk.gb != dut.g_blk[2].u_blk.pb)) n_sel_pb++;
    if (dut.c_star[2] && (dut.g_blk[3].u_blk.gb != dut.g_blk[3].u_blk.pb)) n_sel_pb++;
    if (dut.u_cla.u_cout.cout_star && !(a[W-1] | b[W-1])) n_cout_masked++;
    if (cout) n_cout++;
    if (cin && ((a ^ b) == '1)) n_ripple++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [W-1:0] ra, mask;
    foreach (n_cstar[k]) n_cstar[k] = 0;
    a = '0;
    b = '0;
    cin = 1'b0;
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b0);
    for (int i = 0; i < W; i++) begin
      apply(32'd1 << i, 32'd1 << i, 1'b0);
      apply(32'd1 << i, ~(32'd1 << i), 1'b1);
      apply(~(32'd0) >> i, 32'd1, 1'b0);
    end
    for (int n = 0; n < NRAND; n++) begin
      ra = $urandom;
      if (n % 2 == 0) begin
        mask = $urandom & $urandom & $urandom & $urandom;
        apply(ra, ~ra ^ mask, 1'($urandom));
      end else begin
        apply(ra, $urandom, 1'($urandom));
      end
    end
    need("C0* = 1 (carry into block 1)", n_cstar[0]);
    need("C1* = 1 (carry into block 2)", n_cstar[1]);
    need("C2* = 1 (carry into block 3)", n_cstar[2]);
    need("C* = 1 with p of block top = 0", n_cstar_p0);
    need("gb != pb resolved by C* = 1", n_sel_pb);
    need("Cout* = 1 masked by p32 = 0", n_cout_masked);
    need("carry-out", n_cout);
    need("cin rippled through all 32 bits", n_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
