// adder_block -- one block of the modified-Ling adder.
//
// A block holds NG 3-bit groups (three in every block but the last). For
// each group a group_gen gate makes G*_j and P*_j straight from the operand
// bits. block_gen combines them into the block terms Gb*_k and Pb*_k for the
// global look-ahead, and local_carry, from the same G*_j and P*_j, makes the
// two candidate carries gb/pb of every group. Each group's group_sum then
// builds its conditional sums, narrows them with gb and pb, and lets the
// Ling carry ck_star from the global look-ahead make the last choice. The
// p term that the Ling form factors out of the block carry is applied inside
// local_carry, so ck_star can be the bare C* of the block below.
// This is the organisation of the original design.
//
// Interface: a/b are the 3*NG operand bits of the block (index 0 = lowest);
// a_lo/b_lo the operand bit just below the block (tie low for block 0);
// ck_star the Ling carry into the block (tie low for block 0, whose carry-in
// sits in bit 0 as g0); sum the 3*NG final sum bits; gb_star/pb_star the
// block terms for the global look-ahead.
// Timing: combinational. Operands to gb_star/pb_star take two complex-gate
// levels; ck_star to sum is one 2-1 selection.
module adder_block #(
  parameter int unsigned NG = ling_pkg::BLOCK_GROUPS
) (
  input  logic [3*NG-1:0] a,
  input  logic [3*NG-1:0] b,
  input  logic            a_lo,
  input  logic            b_lo,
  input  logic            ck_star,
  output logic [3*NG-1:0] sum,
  output logic            gb_star,
  output logic            pb_star
);

  localparam int unsigned GB = ling_pkg::GROUP_BITS;

  logic [NG-1:0] g_star, p_star;   // per-group Ling terms
  logic [NG-1:0] p_in;             // p of the bit just below each group
  logic [NG-1:0] gb, pb;           // candidate group carries

  // Operand bits extended by the bit below the block, so that group m sees
  // bit position 3m-1 at index 3m of the extended vectors.
  logic [3*NG:0] ax, bx;
  assign ax = {a, a_lo};
  assign bx = {b, b_lo};

  for (genvar m = 0; m < NG; m++) begin : g_grp
    group_gen u_gen (
      .a      (a[GB*m +: GB]),
      .b      (b[GB*m +: GB]),
      .a_lo   (ax[GB*m]),
      .b_lo   (bx[GB*m]),
      .g_star (g_star[m]),
      .p_star (p_star[m])
    );

    assign p_in[m] = ax[GB*m] | bx[GB*m];

    group_sum u_sum (
      .a       (a[GB*m +: GB]),
      .b       (b[GB*m +: GB]),
      .gb      (gb[m]),
      .pb      (pb[m]),
      .ck_star (ck_star),
      .sum     (sum[GB*m +: GB])
    );
  end

  block_gen #(.NG(NG)) u_bgen (
    .g_star  (g_star),
    .p_star  (p_star),
    .gb_star (gb_star),
    .pb_star (pb_star)
  );

  local_carry #(.NG(NG)) u_lc (
    .g_star (g_star),
    .p_star (p_star),
    .p_in   (p_in),
    .gb     (gb),
    .pb     (pb)
  );

endmodule
