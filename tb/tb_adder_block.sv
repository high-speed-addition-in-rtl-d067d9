// tb_adder_block -- self-check of adder_block, three-group and two-group.
//
// The three-group block is driven exhaustively (all 2^21 combinations of
// the 9-bit operands, the bit below and Ck*); the two-group block with the
// same loop restricted to its 6 bits. The real carry entering a block is
// p_lo Ck* (p_lo = a_lo | b_lo), so the expected sum is the low bits of
// a + b + p_lo Ck*. Gb* and Pb* are checked against Ling's bit recursion
// h_i = g_i | p_{i-1} h_{i-1} over the block (h starting at 0, p_{-1} = p_lo)
// and the product p_lo p_0 ... p_{top-1}; as a cross-check the carry out of
// the block must equal p_top (Gb* | Pb* Ck*). Combinational: checked 1 time
// unit after the inputs change.
module tb_adder_block;
  logic [8:0] a, b, sum3;
  logic [5:0] sum2;
  logic       a_lo, b_lo, ck;
  logic       gb3, pb3, gb2, pb2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  adder_block #(.NG(3)) dut3 (.a(a), .b(b), .a_lo, .b_lo, .ck_star(ck),
                              .sum(sum3), .gb_star(gb3), .pb_star(pb3));
  adder_block #(.NG(2)) dut2 (.a(a[5:0]), .b(b[5:0]), .a_lo, .b_lo, .ck_star(ck),
                              .sum(sum2), .gb_star(gb2), .pb_star(pb2));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input logic [8:0] got_sum, input logic got_gb,
                       input logic got_pb);
    logic [9:0] full;
    logic       cin_real, h, pp, p_prev;
    cin_real = (a_lo | b_lo) & ck;
    full = {1'b0, a & ((9'd1 << n) - 1)} + {1'b0, b & ((9'd1 << n) - 1)} + {9'd0, cin_real};
    h = 1'b0;
    pp = 1'b1;
    p_prev = a_lo | b_lo;
    for (int i = 0; i < n; i++) begin
      h = (a[i] & b[i]) | (p_prev & h);
      pp = pp & p_prev;
      p_prev = a[i] | b[i];
    end
    checks += 4;
    if (got_sum !== (full[8:0] & ((9'd1 << n) - 1))) begin
      failures++;
      $display("FAIL sum n=%0d a=%h b=%h lo=%b%b ck=%b got %h", n, a, b, a_lo, b_lo, ck, got_sum);
    end
    if (got_gb !== h) begin
      failures++;
      $display("FAIL Gb* n=%0d a=%h b=%h got %b exp %b", n, a, b, got_gb, h);
    end
    if (got_pb !== pp) begin
      failures++;
      $display("FAIL Pb* n=%0d a=%h b=%h got %b exp %b", n, a, b, got_pb, pp);
    end
    // p_prev now holds p of the top bit of the block
    if ((p_prev & (got_gb | (got_pb & ck))) !== full[n]) begin
      failures++;
      $display("FAIL block carry n=%0d a=%h b=%h ck=%b", n, a, b, ck);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 21); v++) begin
      {a, b, a_lo, b_lo, ck} = v[20:0];
      #1;
      check(9, sum3, gb3, pb3);
      if (a[8:6] == 3'b0 && b[8:6] == 3'b0) check(6, {3'b0, sum2}, gb2, pb2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
