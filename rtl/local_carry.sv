// local_carry -- the two candidate carries into every group of a block.
//
// The real carry into group j (bits i..i+2, i = 3j) is
//     c_{i-1} = p_{i-1} h_{i-1},
//     h_{i-1} = G*_{j-1} | P*_{j-1} G*_{j-2} | ... | P*_{j-1} ... P*_{first} Ck*
// where Ck* is the Ling carry entering the block from the global look-ahead.
// Shannon expansion on Ck* gives two candidates that do not wait for it:
//     gb = p_{i-1} h_{i-1}|Ck*=0     pb = p_{i-1} h_{i-1}|Ck*=1
// e.g. for the third group of a block
//     gb = p_{i-1} (G*_{j-1} | P*_{j-1} G*_{j-2})
//     pb = p_{i-1} (G*_{j-1} | P*_{j-1} (G*_{j-2} | P*_{j-2})).
// Folding p_{i-1} in here is what lets the global look-ahead pass only the
// Ling carries C*. For the lowest group of a block gb = 0 (a constant
// output) and pb = p_{i-1}.
// This follows the original design; the sum of products is written as loops.
//
// Interface: g_star/p_star are the group terms of the block (index 0 =
// lowest group); p_in[m] is p = a | b of the bit just below group m.
// Timing: combinational, two complex-gate levels after the operands.
module local_carry #(
  parameter int unsigned NG = ling_pkg::BLOCK_GROUPS
) (
  input  logic [NG-1:0] g_star,
  input  logic [NG-1:0] p_star,
  input  logic [NG-1:0] p_in,
  output logic [NG-1:0] gb,
  output logic [NG-1:0] pb
);

  always_comb begin
    logic hz, ho, run;
    for (int unsigned m = 0; m < NG; m++) begin
      // hz: pseudo-carry into group m when Ck* = 0; ho: when Ck* = 1.
      hz  = 1'b0;
      run = 1'b1;              // product of P* of the groups passed so far
      for (int unsigned l = m; l > 0; l--) begin
        hz  = hz | (run & g_star[l-1]);
        run = run & p_star[l-1];
      end
      ho    = hz | run;
      gb[m] = p_in[m] & hz;
      pb[m] = p_in[m] & ho;
    end
  end

endmodule
