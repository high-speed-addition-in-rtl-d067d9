// tb_block_gen -- exhaustive self-check of block_gen for a three-group and a
// two-group block.
//
// Every combination of the group terms is applied. The reference folds the
// groups from the bottom with h = G*_m | P*_m h (h starting at 0), which is the
// recursive form of the flat look-ahead expression the block implements;
// Pb* is the AND of all P*. Combinational: checked 1 time unit after the
// inputs change.
module tb_block_gen;
  logic [2:0] g3, p3;
  logic [1:0] g2, p2;
  logic       gb3, pb3, gb2, pb2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  block_gen #(.NG(3)) dut3 (.g_star(g3), .p_star(p3), .gb_star(gb3), .pb_star(pb3));
  block_gen #(.NG(2)) dut2 (.g_star(g2), .p_star(p2), .gb_star(gb2), .pb_star(pb2));

  function automatic logic fold(input logic [2:0] g, input logic [2:0] p, input int n);
    logic h = 1'b0;
    for (int m = 0; m < n; m++) h = g[m] | (p[m] & h);
    return h;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {g3, p3} = v[5:0];
      {g2, p2} = v[3:0];
      #1;
      checks += 4;
      if (gb3 !== fold(g3, p3, 3)) begin
        failures++;
        $display("FAIL Gb* NG=3: G*=%b P*=%b got %b", g3, p3, gb3);
      end
      if (pb3 !== &p3) begin
        failures++;
        $display("FAIL Pb* NG=3: P*=%b got %b", p3, pb3);
      end
      if (gb2 !== fold({1'b0, g2}, {1'b0, p2}, 2)) begin
        failures++;
        $display("FAIL Gb* NG=2: G*=%b P*=%b got %b", g2, p2, gb2);
      end
      if (pb2 !== &p2) begin
        failures++;
        $display("FAIL Pb* NG=2: P*=%b got %b", p2, pb2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
