// block_gen -- Ling block generate Gb*_k and block propagate Pb*_k.
//
// The block generate is the ordinary look-ahead combination of the group
// terms of the block, with the conventional G_j, P_j replaced by the Ling
// terms G*_j, P*_j:
//     Gb*_k = G*_top | G*_mid P*_top | G*_low P*_mid P*_top
//     Pb*_k = P*_low P*_mid P*_top
// (three groups; the last, two-group block uses the first two terms).
// Because each P*_j is shifted down one bit, the p_{i+2} factor of every
// group drops out and only the factor of the top bit of the block remains,
// which the design carries locally instead of through the look-ahead. This
// follows the original design; the sum-of-products form is written as a loop
// over the groups.
//
// Interface: g_star/p_star hold the NG group terms, index 0 = lowest group.
// Timing: combinational, the second complex-gate level of the carry tree.
module block_gen #(
  parameter int unsigned NG = ling_pkg::BLOCK_GROUPS
) (
  input  logic [NG-1:0] g_star,
  input  logic [NG-1:0] p_star,
  output logic          gb_star,
  output logic          pb_star
);

  always_comb begin
    logic term;
    gb_star = 1'b0;
    for (int unsigned m = 0; m < NG; m++) begin
      term = g_star[m];
      for (int unsigned l = m + 1; l < NG; l++) term = term & p_star[l];
      gb_star = gb_star | term;
    end
  end

  assign pb_star = &p_star;

endmodule
