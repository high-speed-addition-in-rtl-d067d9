// tb_global_cla -- exhaustive self-check of global_cla with four blocks.
//
// All 512 combinations of Gb*, Pb* and p_msb_b are applied. The reference
// ripples c = Gb*_k | Pb*_k c from the bottom: C*_k is the value after block
// k, and cout is the value after the last block times ~p_msb_b.
// Combinational: checked 1 time unit after the inputs change.
module tb_global_cla;
  logic [3:0] gb_star, pb_star;
  logic       p_msb_b, cout;
  logic [2:0] c_star;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  global_cla #(.NB(4)) dut (.gb_star, .pb_star, .p_msb_b, .c_star, .cout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c;
    for (int v = 0; v < 512; v++) begin
      {gb_star, pb_star, p_msb_b} = v[8:0];
      #1;
      c = 1'b0;
      for (int k = 0; k < 4; k++) begin
        c = gb_star[k] | (pb_star[k] & c);
        if (k < 3) begin
          checks++;
          if (c_star[k] !== c) begin
            failures++;
            $display("FAIL C*%0d: Gb*=%b Pb*=%b got %b exp %b", k, gb_star, pb_star, c_star[k], c);
          end
        end
      end
      checks++;
      if (cout !== (c & ~p_msb_b)) begin
        failures++;
        $display("FAIL cout: Gb*=%b Pb*=%b p_b=%b got %b", gb_star, pb_star, p_msb_b, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
