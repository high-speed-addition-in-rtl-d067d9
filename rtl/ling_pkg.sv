// ling_pkg -- shared constants of the modified-Ling adder.
//
// The adder treats the carry-in as bit 0 (g0 = cin), so a WIDTH-bit adder
// handles WIDTH+1 bit positions. These are cut into groups of GROUP_BITS
// bits, and consecutive groups are gathered into blocks of BLOCK_GROUPS
// groups; the last block may hold fewer groups. With WIDTH = 32 this gives
// eleven 3-bit groups in four blocks of 9, 9, 9 and 6 bit positions.
// The 3-bit group (chosen because of the limited fan-in of static CMOS
// gates) and the 3-group block are the organisation of the original design.
package ling_pkg;

  // Bits per group. The group equations of group_gen and group_sum are
  // written out for exactly this size.
  localparam int unsigned GROUP_BITS = 3;

  // Groups per block (the last block may have fewer).
  localparam int unsigned BLOCK_GROUPS = 3;

  // Operand width of the adder as originally designed.
  localparam int unsigned DEFAULT_WIDTH = 32;

  // Number of groups of an adder of the given width (carry-in included).
  function automatic int unsigned num_groups(int unsigned width);
    return (width + 1) / GROUP_BITS;
  endfunction

  // Number of blocks of an adder of the given width.
  function automatic int unsigned num_blocks(int unsigned width);
    return (num_groups(width) + BLOCK_GROUPS - 1) / BLOCK_GROUPS;
  endfunction

  // Number of groups in block k.
  function automatic int unsigned block_groups(int unsigned width, int unsigned k);
    int unsigned rest;
    rest = num_groups(width) - k * BLOCK_GROUPS;
    return (rest < BLOCK_GROUPS) ? rest : BLOCK_GROUPS;
  endfunction

endpackage
