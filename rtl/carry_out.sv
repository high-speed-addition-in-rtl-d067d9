// carry_out -- carry-out of the adder from the Ling block terms.
//
//     Cout* = Gb*_3 | Gb*_2 Pb*_3 | Gb*_1 Pb*_2 Pb*_3 | Gb*_0 Pb*_1 Pb*_2 Pb*_3
//     Cout  = p_msb Cout*
// written for NB blocks (NB = 4 in the original design). The top-bit
// propagate p_msb enters inverted, as p_msb_b, the way the carry-out gate of
// the original circuit receives p32. In CMOS the Cout* gate is the only one
// of the adder with four devices in series; it sits off the critical path.
// Pb*_0 is not an input: no carry equation uses it.
//
// Interface: gb_star[NB-1:0], pb_star[NB-1:1], p_msb_b; cout.
// Timing: combinational.
module carry_out #(
  parameter int unsigned NB = 4
) (
  input  logic [NB-1:0] gb_star,
  input  logic [NB-1:1] pb_star,
  input  logic          p_msb_b,
  output logic          cout
);

  logic cout_star;

  always_comb begin
    logic term;
    cout_star = 1'b0;
    for (int unsigned m = 0; m < NB; m++) begin
      term = gb_star[m];
      for (int unsigned l = m + 1; l < NB; l++) term = term & pb_star[l];
      cout_star = cout_star | term;
    end
  end

  assign cout = cout_star & ~p_msb_b;

endmodule
