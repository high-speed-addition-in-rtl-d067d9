// group_sum -- conditional-sum logic of one 3-bit group.
//
// Each of the three bits gets two local sums: Se for a carry of 0 into the
// group and Sn for a carry of 1. With s = a ^ b, g = a & b, p = a | b:
//     bit i  : Se = s_i                                Sn = ~s_i
//     bit i+1: Se = s_{i+1} ^ g_i                      Sn = s_{i+1} ^ p_i
//     bit i+2: Se = s_{i+2} ^ (g_{i+1} | s_{i+1} g_i)   Sn = s_{i+2} ^ (g_{i+1} | s_{i+1} p_i)
// Inside the group s_{i+1} serves as the propagate term, which is exact here
// because g | s x = g | p x. Two 2-1 selections follow: one driven by gb (the
// group carry if the Ling block carry Ck* is 0) and one by pb (the group
// carry if Ck* is 1); a last 2-1 selection by Ck* picks between them. Ck*,
// the latest signal, therefore passes only the last selection. All of this
// follows the original design. The sum is delivered in true polarity; the
// inverting output buffers of the transistor-level circuit are left out.
//
// Interface: a/b operand bits i..i+2 (index 0 = bit i); gb, pb, ck_star as
// above; sum[2:0] final sum bits i..i+2.
// Timing: combinational; ck_star to sum is a single selection level.
module group_sum (
  input  logic [2:0] a,
  input  logic [2:0] b,
  input  logic       gb,
  input  logic       pb,
  input  logic       ck_star,
  output logic [2:0] sum
);

  logic [2:0] s;
  logic [1:0] g;               // generate of bits i, i+1
  logic       p0;              // propagate of bit i
  logic [2:0] se, sn;          // local sums for group carry 0 / 1
  logic [2:0] sel_g, sel_p;    // selected by gb / by pb

  assign s = a ^ b;
  assign g  = a[1:0] & b[1:0];
  assign p0 = a[0] | b[0];

  assign se[0] = s[0];
  assign sn[0] = ~s[0];
  assign se[1] = s[1] ^ g[0];
  assign sn[1] = s[1] ^ p0;
  assign se[2] = s[2] ^ (g[1] | (s[1] & g[0]));
  assign sn[2] = s[2] ^ (g[1] | (s[1] & p0));

  assign sel_g = gb ? sn : se;
  assign sel_p = pb ? sn : se;
  assign sum   = ck_star ? sel_p : sel_g;

endmodule
