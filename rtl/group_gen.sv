// group_gen -- Ling group generate and shifted group propagate of one
// 3-bit group.
//
// For the group holding bits i, i+1, i+2 (i = 3j) the conventional group
// generate G_j = g_{i+2} | g_{i+1} p_{i+2} | g_i p_{i+1} p_{i+2} is replaced by
// the reduced term
//     G*_j = g_{i+2} | g_{i+1} | g_i p_{i+1}          (so that G_j = p_{i+2} G*_j)
// which is built directly from the operand bits in a single complex gate:
// four product terms of at most three literals. The matching group
// propagate is shifted down by one bit position:
//     P*_j = p_{i-1} p_i p_{i+1}
// with g = a & b and p = a | b. Both equations follow the original design.
// In the CMOS gate the pull-up network uses the identity ~(g p) = ~p so that
// only three P-channel devices are in series; at the logic level that
// identity is invisible, and the gate is written here as its function.
//
// Interface: a/b are operand bits i..i+2 (a[0] = bit i); a_lo/b_lo are
// operand bit i-1, the top bit of the group below. For group 0 bit i is the
// carry-in (a[0] = b[0] = cin) and bit i-1 does not exist: tie a_lo/b_lo
// low (P*_0 is then 0; no carry equation reads it).
// Timing: purely combinational, one complex-gate level.
module group_gen (
  input  logic [2:0] a,
  input  logic [2:0] b,
  input  logic       a_lo,
  input  logic       b_lo,
  output logic       g_star,
  output logic       p_star
);

  // Four product terms, ten literals, made directly from the operand bits.
  assign g_star = (a[2] & b[2]) | (a[1] & b[1])
                | (a[0] & b[0] & a[1]) | (a[0] & b[0] & b[1]);

  assign p_star = (a_lo | b_lo) & (a[0] | b[0]) & (a[1] | b[1]);

endmodule
