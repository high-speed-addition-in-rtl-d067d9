# A modified-Ling 32-bit adder for fully static CMOS

This is a 32-bit binary adder organised so that the carry path from the
carry-in to the top sum bit passes only four complex-gate levels: one gate
that makes a group term straight from the operand bits, one that combines
groups into a block term, one that forms the block carries, and a final 2-1
selection of precomputed sums. The design uses H. Ling's reformulation of
carry look-ahead. In Ling's form every carry is missing a propagate factor
p = a | b, and that makes the first-level gates small. Ling's scheme was made
for ECL. In static CMOS the missing factor has to be put back somewhere. In
this design it is put back off the critical path, in the logic that prepares
each group's carry, so neither the global carry path nor the sum logic gets
slower.

The RTL is purely combinational: no clock, no state, no reset. It keeps the
gate-level organisation as separate modules, so the four levels can be seen
in the hierarchy. The circuit-level parts are not modelled: transistor
networks, delays and layout.

## Notation and numbering

For a bit position i, with operands a and b:

    g_i = a_i b_i        (generate)
    p_i = a_i | b_i      (propagate, used by the carry logic)
    s_i = a_i ^ b_i      (half sum)
    S_i = s_i ^ c_{i-1}  (final sum)

The carry-in takes bit position 0, so there are 33 positions: 0 for the
carry-in and 1..32 for the operand bits. Position 0 is fed with `cin` on both
operand inputs, which gives g_0 = p_0 = cin and s_0 = 0. In the ports,
`a[0]` is operand bit 1 and `sum[0]` is S_1.

The 33 positions are cut into eleven 3-bit groups (j = 0..10, group j holds
bits 3j..3j+2). The groups are gathered into four blocks (k = 0..3):

| block | groups | bit positions | note |
|------:|--------|---------------|------|
| 0 | 0, 1, 2 | 0..8   | position 0 is the carry-in, so 8 operand bits |
| 1 | 3, 4, 5 | 9..17  | |
| 2 | 6, 7, 8 | 18..26 | |
| 3 | 9, 10   | 27..32 | two groups only |

Groups have 3 bits, not 4, because a static CMOS gate with a larger fan-in
would need more devices in series.

## Ling carries

Ling's pseudo-carry h_i satisfies c_i = p_i h_i and h_i = g_i | p_{i-1} h_{i-1}.
The identity g_i = p_i g_i is what makes this work. For a group (bits i..i+2)
this gives a reduced group generate and a group propagate shifted down by one
bit:

    G*_j = g_{i+2} | g_{i+1} | g_i p_{i+1}          (conventional G_j = p_{i+2} G*_j)
    P*_j = p_{i-1} p_i p_{i+1}                      (conventional P_j = p_i p_{i+1} p_{i+2})

Expanded into operand bits, G*_j has four product terms with at most three
literals each. A single complex gate can therefore build it from a and b,
without first making g and p. The conventional G_j would need seven terms of
up to four literals. This is `group_gen`. In CMOS the pull-up of that gate
uses ~(g p) = ~p to keep three P-devices in series. That identity does not
show at logic level, so the RTL states only the gate's function.

Because each P* starts one bit lower, the same look-ahead algebra as in a
conventional adder works on the starred terms:

    Gb*_k = G*_top | G*_mid P*_top | G*_low P*_mid P*_top      (block_gen)
    Pb*_k = P*_low P*_mid P*_top
    C0*  = Gb*_0
    C1*  = Gb*_1 | Pb*_1 Gb*_0
    C2*  = Gb*_2 | Gb*_1 Pb*_2 | Gb*_0 Pb*_1 Pb*_2             (global_cla)
    Cout = p_32 (Gb*_3 | Gb*_2 Pb*_3 | Gb*_1 Pb*_2 Pb*_3 | Gb*_0 Pb*_1 Pb*_2 Pb*_3)   (carry_out)

The real carry out of block k is p_top C*_k, where p_top is the propagate of
the block's top bit (p_8, p_17, p_26). Only `cout` gets its p factor in the
global logic. The block carries C0*, C1* and C2* are passed on without it.

## Where the missing p factor goes (local group carries)

This is the core of the design. Take group 8 (bits 24..26) in block 2. Its
true carry-in is

    c_23 = p_23 (G*_7 | P*_7 G*_6 | P*_7 P*_6 C1*)

P*_6 = p_17 p_18 p_19 already contains p_17, which is the factor missing from
C1*. So the bare Ling carry C1* is exactly what the group needs. The term is
then split on C1* (a Shannon expansion) into two candidates that do not wait
for it:

    gb = p_23 (G*_7 | P*_7 G*_6)               carry into group 8 if C1* = 0
    pb = p_23 (G*_7 | P*_7 (G*_6 | P*_6))      carry into group 8 if C1* = 1

`local_carry` makes these for every group of a block. The lowest group of a
block has gb = 0 and pb = p of the bit below the block. Block 0 has no
incoming C*: its carry-in already sits in G*_0 as g_0, so its C* input is tied
to 0. gb and pb are two complex-gate levels deep. The C* they wait for is
three levels deep, so they are ready first.

## Group sums and the final selection

`group_sum` is a conditional-sum group. For each of its three bits it builds
the sum for a group carry of 0 (Se) and for a group carry of 1 (Sn):

| bit | Se (carry 0) | Sn (carry 1) |
|-----|--------------|--------------|
| i   | s_i | ~s_i |
| i+1 | s_{i+1} ^ g_i | s_{i+1} ^ p_i |
| i+2 | s_{i+2} ^ (g_{i+1} \| s_{i+1} g_i) | s_{i+2} ^ (g_{i+1} \| s_{i+1} p_i) |

Inside the group the half sum s is the propagate term. This is exact because
g | s x = g | p x, and it lets the XOR already needed for the sum serve twice.
Two 2-1 selections follow, one driven by gb and one by pb. A last 2-1
selection driven by the block's C* picks between them. The late C* therefore
passes only one multiplexer. The sums come out in true polarity.

## Critical path

cin enters G*_0 (level 1), then Gb*_0 (level 2), then C2* (level 3), then the
final selection in group 10 (level 4). The original analysis counts 14 series
transistors on this path. It puts the carry-out path at the same transistor
count but with a lighter load. The Cout gate is the only gate with four
devices in series, and it is not on the sum path. These are circuit
properties. The RTL does not model them, and synthesis will restructure the
logic freely.

## Module map

| module | role |
|--------|------|
| `ling_pkg` | group and block sizes; functions giving the number of groups and blocks for a width |
| `group_gen` | G*_j and P*_j of one group, from bits i-1..i+2 |
| `block_gen` | Gb*_k, Pb*_k from the G*/P* of a block (NG = 3 or 2 groups) |
| `local_carry` | gb/pb of every group of a block |
| `group_sum` | conditional sums of one group and the gb/pb/C* selection |
| `adder_block` | one block: `group_gen` and `group_sum` per group, `block_gen`, `local_carry` |
| `carry_out` | Cout from the block terms, with p of the top bit supplied inverted (`p_msb_b`) |
| `global_cla` | C0*..C(NB-2)* for the upper blocks, plus `carry_out` |
| `ling_adder` | top: places the blocks and the global look-ahead; ports `a`, `b`, `cin`, `sum`, `cout` |

`ling_adder` has one parameter, `WIDTH`, with default 32. Other widths work
if WIDTH mod 3 = 2 and there are at least two blocks (11, 14, 17, 20, ...,
32, 35, ...); other widths stop elaboration with an error. The widths other
than 32 are an addition of this implementation, used for exhaustive testing.
Group size (3) and groups per block (3) are fixed, because the group
equations are written out for 3 bits.

## Choices made where the original description is open or damaged

- The bit below block 0 does not exist. It is tied low, so Pb*_0 is 0. No
  carry equation reads Pb*_0, and `global_cla` accepts it only so that the
  block-term bus is uniform.
- The transistor-level output buffers are left out. The group outputs are
  true-polarity sums, not inverted ones.
- The sum equation for the top group (bit 32) is used in the same form as
  every other group. Read correctly, it is the Shannon form of that
  expression.
- The reuse of G*_6 | P*_6 from the neighbouring group is not forced. Each
  pb is a flat sum of products, and any sharing is left to synthesis.
- The gb/pb signals are indexed by the group that receives them. Under the
  original convention they are indexed by the group below (gb_7 feeds
  group 8).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The references are
computed independently of the RTL: from Ling's bit recursion, from rippling
the block carries, or from the built-in `+`.

| testbench | what it covers |
|-----------|----------------|
| `tb_group_gen` | all 256 inputs; G* against the recursion, and p_{i+2} G* against the carry of a 3-bit add |
| `tb_block_gen` | all inputs, 3- and 2-group blocks |
| `tb_local_carry` | all 512 inputs |
| `tb_group_sum` | all 512 inputs, against a + b + (C* ? pb : gb) |
| `tb_carry_out`, `tb_global_cla` | all inputs, four blocks |
| `tb_adder_block` | all 2^21 inputs of a 9-bit block (the 6-bit block on its subset); sum, Gb*, Pb* and the block's carry-out identity p_top (Gb* \| Pb* C*) |
| `tb_ling_adder` | 11-bit adder exhaustively (2^23 vectors); 20-bit adder with 200k random vectors |
| `tb_ling_adder_full` | the default 32-bit adder: directed vectors and 400k random ones, half of them biased toward long propagate runs |

The end-to-end testbenches also count the design's mechanisms and fail if
any never occurs: a C* = 1 into each upper block, a C* = 1 whose real carry
is 0 because the top bit of the block below does not propagate, a group where
gb and pb differ and C* picks pb, Cout* = 1 suppressed by p_32 = 0, a
carry-out, and a carry-in rippling through all 32 bits. The adder is
combinational, so every result is checked in the cycle its operands are
applied.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/ling_pkg.sv tb/tb_ling_adder_full.sv \
        --top-module tb_ling_adder_full -Mdir obj_full -o sim
    ./obj_full/sim

Substitute any other `tb_*` name. Each testbench finds its modules through
`-Irtl`. All of them finish in a few seconds.
