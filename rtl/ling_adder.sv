// ling_adder -- fully static CMOS-style modified-Ling adder, WIDTH bits.
//
// The carry-in is treated as bit 0 (g0 = cin), so the operands occupy bit
// positions 1..WIDTH and the carry-in position 0. These WIDTH+1 positions are
// cut into 3-bit groups and the groups into blocks of three; for WIDTH = 32
// that is four blocks of 9, 9, 9 and 6 positions (block 0 holds eight operand
// bits plus the carry-in; block 3 has only two groups).
//
// Carries travel in Ling's form. Each group makes G*_j = g_{i+2}|g_{i+1}|g_i p_{i+1}
// and P*_j = p_{i-1} p_i p_{i+1} in one complex gate; each block combines them
// into Gb*_k, Pb*_k; the global look-ahead forms the block carries C*_k, which
// differ from the real carries by a missing p factor of the block's top bit.
// That factor is never put back on the global path: every block folds it
// into the two candidate group carries gb/pb, which are ready before C*
// arrives. In every group the conditional sums are narrowed by gb and pb,
// and C* of the block below only drives the final 2-1 selection. The path
// from cin to the top sum bit is thus G*, Gb*, C* and one selection: four
// complex-gate levels. The structure follows the original design; WIDTH is
// a parameter of this implementation (it must satisfy WIDTH mod 3 = 2 and
// give at least two blocks, e.g. 11, 14, 17, 20, 23, 26, 29, 32, 35 ...).
//
// Interface: a, b operands (a[0] is operand bit 1 of the original numbering,
// a[WIDTH-1] bit WIDTH), cin, sum = a + b + cin (low WIDTH bits), cout.
// Timing: purely combinational, no clock and no state.
module ling_adder #(
  parameter int unsigned WIDTH = ling_pkg::DEFAULT_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = ling_pkg::num_blocks(WIDTH);
  localparam int unsigned BB   = ling_pkg::GROUP_BITS * ling_pkg::BLOCK_GROUPS;

  if (WIDTH % ling_pkg::GROUP_BITS != 2 || NBLK < 2) begin : g_bad_width
    $error("ling_adder: WIDTH must be 2 mod 3 and at least 11");
  end

  // Bit positions 0..WIDTH: position 0 carries cin in both operands, so that
  // g0 = p0 = cin and s0 = 0.
  logic [WIDTH:0] ax, bx, sx;
  assign ax = {a, cin};
  assign bx = {b, cin};

  logic [NBLK-1:0] gb_star, pb_star;
  logic [NBLK-2:0] c_star;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned NG = ling_pkg::block_groups(WIDTH, k);
    localparam int unsigned LO = BB * k;

    logic a_lo, b_lo, ck;
    if (k == 0) begin : g_first
      assign a_lo = 1'b0;
      assign b_lo = 1'b0;
      assign ck   = 1'b0;
    end else begin : g_rest
      assign a_lo = ax[LO-1];
      assign b_lo = bx[LO-1];
      assign ck   = c_star[k-1];
    end

    adder_block #(.NG(NG)) u_blk (
      .a       (ax[LO +: 3*NG]),
      .b       (bx[LO +: 3*NG]),
      .a_lo    (a_lo),
      .b_lo    (b_lo),
      .ck_star (ck),
      .sum     (sx[LO +: 3*NG]),
      .gb_star (gb_star[k]),
      .pb_star (pb_star[k])
    );
  end

  global_cla #(.NB(NBLK)) u_cla (
    .gb_star (gb_star),
    .pb_star (pb_star),
    .p_msb_b (~(a[WIDTH-1] | b[WIDTH-1])),
    .c_star  (c_star),
    .cout    (cout)
  );

  // Position 0 always sums to 0 (s0 = 0 with no carry below it), so sx[0]
  // is left unused.
  assign sum = sx[WIDTH:1];

endmodule
