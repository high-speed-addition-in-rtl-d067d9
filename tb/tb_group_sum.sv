// tb_group_sum -- exhaustive self-check of group_sum.
//
// All 512 combinations of the operands, gb, pb and Ck* are applied. The
// group's carry-in is the one the selection tree stands for, pb if Ck* = 1
// and gb otherwise, and the expected sum is the low three bits of
// a + b + carry. Combinational: checked 1 time unit after the inputs change.
module tb_group_sum;
  logic [2:0] a, b, sum;
  logic       gb, pb, ck_star;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  group_sum dut (.a, .b, .gb, .pb, .ck_star, .sum);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_sum;
    logic       c;
    for (int v = 0; v < 512; v++) begin
      {a, b, gb, pb, ck_star} = v[8:0];
      #1;
      c = ck_star ? pb : gb;
      exp_sum = a + b + {2'b0, c};
      checks++;
      if (sum !== exp_sum) begin
        failures++;
        $display("FAIL a=%b b=%b gb=%b pb=%b ck=%b got %b exp %b",
                 a, b, gb, pb, ck_star, sum, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
