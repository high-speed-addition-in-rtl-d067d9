// tb_carry_out -- exhaustive self-check of carry_out with four blocks.
//
// The reference ripples the Ling block carry through the blocks,
// c = Gb*_k | Pb*_k c from c = 0, and multiplies by p_msb = ~p_msb_b.
// All 256 input combinations are applied. Combinational: checked 1 time unit
// after the inputs change.
module tb_carry_out;
  logic [3:0] gb_star;
  logic [3:1] pb_star;
  logic       p_msb_b, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  carry_out #(.NB(4)) dut (.gb_star, .pb_star, .p_msb_b, .cout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c;
    for (int v = 0; v < 256; v++) begin
      {gb_star, pb_star, p_msb_b} = v[7:0];
      #1;
      c = gb_star[0];
      for (int k = 1; k < 4; k++) c = gb_star[k] | (pb_star[k] & c);
      checks++;
      if (cout !== (c & ~p_msb_b)) begin
        failures++;
        $display("FAIL Gb*=%b Pb*=%b p_b=%b got %b", gb_star, pb_star, p_msb_b, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
