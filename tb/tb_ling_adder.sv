// tb_ling_adder -- end-to-end check of ling_adder at reduced widths.
//
// An 11-bit adder (two blocks: 9 positions and one 3-bit group, since the
// carry-in takes position 0) is checked exhaustively over all 2^23 operand
// and carry-in combinations. A 20-bit adder (three blocks, the last with one
// group) is checked with random operands, half of them biased towards long
// propagate runs. Each result is compared with a + b + cin and checked in
// the cycle it is applied (the adder is combinational).
//
// Mechanisms counted, each of which must occur: a Ling block carry C* of 1
// entering every upper block, a C* of 1 whose real carry is 0 because the
// top bit of the block below does not propagate, and carry-out from a full
// propagate chain.
module tb_ling_adder;
  localparam int unsigned NRAND = 200000;

  logic [10:0] a1, b1, s1;
  logic        c1, co1;
  logic [19:0] a2, b2, s2;
  logic        c2, co2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int n_c11 = 0, n_c11_p0 = 0, n_c20[2], n_ripple = 0;

  always #5 clk = ~clk;

  ling_adder #(.WIDTH(11)) dut11 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1));
  ling_adder #(.WIDTH(20)) dut20 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));

  initial begin
    repeat (1000000 + NRAND) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [11:0] e1;
    logic [20:0] e2;
    logic [19:0] ra, mask;
    n_c20[0] = 0;
    n_c20[1] = 0;
    a2 = '0; b2 = '0; c2 = 1'b0;
    // exhaustive 11-bit: 8 candidates per time step would be faster, but one
    // step per vector keeps the check simple (about 8.4 million steps)
    for (int v = 0; v < (1 << 23); v++) begin
      {a1, b1, c1} = v[22:0];
      #1;
      e1 = {1'b0, a1} + {1'b0, b1} + {11'd0, c1};
      checks++;
      if ({co1, s1} !== e1) begin
        failures++;
        if (failures < 10) $display("FAIL w11 a=%h b=%h cin=%b got %b_%h", a1, b1, c1, co1, s1);
      end
      if (dut11.c_star[0]) begin
        n_c11++;
        if (!(a1[7] | b1[7])) n_c11_p0++;
      end
      if (c1 && ((a1 ^ b1) == '1)) n_ripple++;
    end
    for (int n = 0; n < NRAND; n++) begin
      ra = 20'($urandom);
      if (n % 2 == 0) begin
        mask = 20'($urandom & $urandom & $urandom);
        {a2, b2, c2} = {ra, ~ra ^ mask, 1'($urandom)};
      end else begin
        {a2, b2, c2} = {ra, 20'($urandom), 1'($urandom)};
      end
      @(negedge clk);
      e2 = {1'b0, a2} + {1'b0, b2} + {20'd0, c2};
      checks++;
      if ({co2, s2} !== e2) begin
        failures++;
        if (failures < 10) $display("FAIL w20 a=%h b=%h cin=%b got %b_%h", a2, b2, c2, co2, s2);
      end
      for (int k = 0; k < 2; k++) if (dut20.c_star[k]) n_c20[k]++;
    end
    need("w11: C0* = 1 into block 1", n_c11);
    need("w11: C0* = 1 with p8 = 0", n_c11_p0);
    need("w11: cin rippled to carry-out", n_ripple);
    need("w20: C0* = 1 into block 1", n_c20[0]);
    need("w20: C1* = 1 into block 2", n_c20[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
