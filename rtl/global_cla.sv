// global_cla -- global carry look-ahead over the blocks.
//
// From the Ling block terms it forms the Ling block carries
//     C*_k = Gb*_k | Gb*_{k-1} Pb*_k | ... | Gb*_0 Pb*_1 ... Pb*_k,  k = 0 .. NB-2
// (C0* = Gb0*, C1* = Gb1* | Pb1* Gb0*, C2* = Gb2* | Gb1* Pb2* | Gb0* Pb1* Pb2*
// for four blocks) and passes C*_k to block k+1. The real carry out of block
// k is p_{top of block k} C*_k, but that p factor is never applied here: the
// receiving block folds it into its local group carries. Only the carry-out
// of the whole adder is multiplied by its p term, in carry_out. Each C*_k is
// flat, so every carry is one complex-gate level after Gb*/Pb*. This follows
// the original design. C0* is Gb*_0 itself, so that output is a plain wire
// from its input.
//
// Interface: gb_star/pb_star from the blocks (index = block number; Pb*_0 is
// accepted for a uniform bus but no equation reads it), p_msb_b = ~(a|b) of
// the most significant bit; c_star[k] = C*_k, cout = carry-out.
// Timing: combinational, the third complex-gate level.
module global_cla #(
  parameter int unsigned NB = 4
) (
  input  logic [NB-1:0] gb_star,
  input  logic [NB-1:0] pb_star,
  input  logic          p_msb_b,
  output logic [NB-2:0] c_star,
  output logic          cout
);

  always_comb begin
    logic term;
    for (int unsigned k = 0; k + 1 < NB; k++) begin
      c_star[k] = 1'b0;
      for (int unsigned m = 0; m <= k; m++) begin
        term = gb_star[m];
        for (int unsigned l = m + 1; l <= k; l++) term = term & pb_star[l];
        c_star[k] = c_star[k] | term;
      end
    end
  end

  carry_out #(.NB(NB)) u_cout (
    .gb_star (gb_star),
    .pb_star (pb_star[NB-1:1]),
    .p_msb_b (p_msb_b),
    .cout    (cout)
  );

endmodule
