// tb_group_gen -- exhaustive self-check of group_gen.
//
// All 256 combinations of the three group bits and the bit below are
// applied. G* is compared with Ling's bit recursion h_{i} = g_i,
// h_{i+1} = g_{i+1} | p_i h_i, h_{i+2} = g_{i+2} | p_{i+1} h_{i+1}, and, as an
// arithmetic cross-check, p_{i+2} G* must equal the carry out of the 3-bit
// sum a + b. P* is compared with p_{i-1} p_i p_{i+1}. The gate is
// combinational: outputs are checked 1 time unit after the inputs change.
module tb_group_gen;
  logic [2:0] a, b;
  logic       a_lo, b_lo;
  logic       g_star, p_star;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  group_gen dut (.a, .b, .a_lo, .b_lo, .g_star, .p_star);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] g, p;
    logic       h, exp_p;
    logic [3:0] s;
    for (int v = 0; v < 256; v++) begin
      {a, b, a_lo, b_lo} = v[7:0];
      #1;
      g = a & b;
      p = a | b;
      h = g[0];
      h = g[1] | (p[0] & h);
      h = g[2] | (p[1] & h);
      exp_p = (a_lo | b_lo) & p[0] & p[1];
      s = {1'b0, a} + {1'b0, b};
      checks += 3;
      if (g_star !== h) begin
        failures++;
        $display("FAIL G*: a=%b b=%b got %b exp %b", a, b, g_star, h);
      end
      if ((p[2] & g_star) !== s[3]) begin
        failures++;
        $display("FAIL carry: a=%b b=%b p2&G*=%b carry=%b", a, b, p[2] & g_star, s[3]);
      end
      if (p_star !== exp_p) begin
        failures++;
        $display("FAIL P*: v=%h got %b exp %b", v, p_star, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
