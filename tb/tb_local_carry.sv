// tb_local_carry -- exhaustive self-check of local_carry for a three-group
// block.
//
// For every combination of G*, P* and the p terms below each group, the
// reference folds the groups below group m from the bottom,
// h = G*_l | P*_l h, once starting from h = 0 (block carry C* = 0, giving gb)
// and once from h = 1 (C* = 1, giving pb), and multiplies by p_in[m].
// Combinational: checked 1 time unit after the inputs change.
module tb_local_carry;
  logic [2:0] g_star, p_star, p_in, gb, pb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  local_carry #(.NG(3)) dut (.g_star, .p_star, .p_in, .gb, .pb);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic hz, ho;
    for (int v = 0; v < 512; v++) begin
      {g_star, p_star, p_in} = v[8:0];
      #1;
      for (int m = 0; m < 3; m++) begin
        hz = 1'b0;
        ho = 1'b1;
        for (int l = 0; l < m; l++) begin
          hz = g_star[l] | (p_star[l] & hz);
          ho = g_star[l] | (p_star[l] & ho);
        end
        checks += 2;
        if (gb[m] !== (p_in[m] & hz)) begin
          failures++;
          $display("FAIL gb[%0d]: G*=%b P*=%b p=%b got %b", m, g_star, p_star, p_in, gb[m]);
        end
        if (pb[m] !== (p_in[m] & ho)) begin
          failures++;
          $display("FAIL pb[%0d]: G*=%b P*=%b p=%b got %b", m, g_star, p_star, p_in, pb[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
