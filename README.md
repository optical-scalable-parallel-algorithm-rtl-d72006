# Two-step trinary signed-digit array adder on digit-decomposition planes

This design adds two whole arrays of numbers, element by element, in a fixed
time that does not depend on the array size or on the number width. It does
this with a redundant radix-3 number system, so no carry ever ripples. It also
never handles a number as a binary word. Each digit value gets its own binary
"plane" that covers the whole array, and every step of the addition is a
handful of pixel-wise AND, OR and NOT operations on these planes. The scheme
was proposed for an optical processor, where a plane is a spatial light
modulator, an AND is two modulators stacked in one beam, an OR is a beam
combiner and a NOT is a detector followed by a complement. Here the same plane
logic is written as synthesizable SystemVerilog, with a register wherever the
optical system has a detector array.

The default size is the worked example of the scheme: two 10 x 2 arrays of
4-digit numbers, giving a 10 x 2 array of 5-digit sums.

## Trinary signed digits (TSD)

A TSD number has radix 3 and digits in {-2, -1, 0, 1, 2}, written here with a
minus sign (the usual notation puts a bar over the digit). For an ND-digit
number, `value = sum d_i * 3^i`. There are five digit values for only three
residues, so most values have several representations. For example, 4 can be
`0 1 1` or `0 2 -2`. This redundancy is what removes the carry chain.

## Digit-decomposition planes (DDP)

An M x N array of ND-digit numbers holds M*N*ND digits. Its DDP form is five
binary planes of M*N*ND pixels each, named after a digit value: DDP-2, DDP-1,
DDP-0, DDP-(-1) and DDP-(-2). A pixel of plane DDP-v is 1 where the digit at
that position equals v. At each pixel exactly one plane is 1, so any plane is
the complement of the other four ORed together. The adder uses this property
to form its zero-digit planes.

Pixel order, used by every plane in `rtl/` and `tb/`: digit `i` (0 = least
significant) of the number in row `j` and column `k` is pixel
`(j*N + k)*ND + i`. Result planes use the same order with ND+1 digits per
number.

Example, the 4 x 1 array [15; -52; -22; 4], most significant digit first:

```
 15 =  0  1  2  0      DDP-2 rows: 0010 0000 0001 0000
-52 = -1 -2 -2 -1      DDP-1 rows: 0100 0000 0100 0011
-22 = -1  1 -2  2      DDP-0 rows: 1001 0000 0000 1100
  4 =  0  0  1  1      DDP-(-1):   0000 1001 1000 0000
                       DDP-(-2):   0000 0110 0010 0000
```

## The two steps

**Step 1 (`tsd_step1`).** Every digit pair is rewritten as `x + y = 3c + s`,
with `s` and `c` in {-1, 0, 1}. The pair sum ranges from -4 to 4, and the sum
alone fixes `(s, c)`:

| x + y | 4 | 3 | 2 | 1 | 0 | -1 | -2 | -3 | -4 |
|-------|---|---|---|---|---|----|----|----|----|
| s     | 1 | 0 | -1| 1 | 0 | -1 | 1  | 0  | -1 |
| c     | 1 | 1 | 1 | 0 | 0 | 0  | -1 | -1 | -1 |

On the planes of operands A and B (`+` = OR, juxtaposition = AND; `A-1` is
plane DDP-(-1) of A):

```
S1  = (A2+A-1)(B2+B-1) + A0(B1+B-2) + (A1+A-2)B0
S-1 = (A1+A-2)(B1+B-2) + A0(B2+B-1) + (A2+A-1)B0
S0  = NOT(S1 + S-1)
C1  = (A2+A1)(B2+B1)     + A2 B0  + A0 B2
C-1 = (A-1+A-2)(B-1+B-2) + A-2 B0 + A0 B-2
C0  = NOT(C1 + C-1)
```

Why the S1 terms work: `(A2+A-1)(B2+B-1)` collects the pairs (2,2), (2,-1),
(-1,2) and (-1,-1), whose sums are 4, 1, 1 and -2. By the table, every one of
them gives s = 1. The other terms are grouped the same way. The zero planes
come from the complement property rather than from their own sum of products.
The testbench also checks them against the direct forms:

```
S0 = (A2+A-1)(B1+B-2) + (A1+A-2)(B2+B-1) + A0 B0
C0 = (A2+A1)(B-1+B-2) + (A-1+A-2)(B2+B1) + A0(B1+B-1) + (A1+A0+A-1)B0
```

**Expand and shift (`ddp_lda_expand`).** A result digit needs the sum digit of
its own position and the carry from the position below. So the carry planes
move up by one digit and every number grows to ND+1 digits. Each number's sum
gets a new most significant pixel, and each number's carry gets a new least
significant pixel. The new pixels hold the digit 0. That keeps the planes
one-hot and gives `z_0 = s_0` and `z_ND = c_(ND-1)`. A carry never crosses
into the neighbouring number.

**Step 2 (`tsd_step2`).** `z_i = s_i + c'_i`, where `c'_i = c_(i-1)`. Both
terms lie in {-1, 0, 1}, so the result always lies in {-2..2} and no new carry
appears:

```
Z2  = S1 C'1
Z1  = S1 C'0  + S0 C'1
Z-1 = S-1 C'0 + S0 C'-1
Z-2 = S-1 C'-1
Z0  = NOT(Z2 + Z1 + Z-1 + Z-2)      (= S1 C'-1 + S0 C'0 + S-1 C'1)
```

Worked element: 80 + 80. Both operands are `2 2 2 2`. Every pair gives
s = 1, c = 1, so the result is `1 2 2 2 1` = 81+54+18+6+1 = 160.

## Pipeline and interface

```
a_digits, b_digits
   -> ddp_encoder x2      (10 planes)
   -> tsd_step1           (S1 S0 S-1 C1 C0 C-1)
   -> ddp_lda_expand      register, then sum padded / carry shifted   [cycle 1]
   -> tsd_step2           (Z2 Z1 Z0 Z-1 Z-2)
   -> ddp_lda             register                                     [cycle 2]
```

Top module `tsd_ddp_array_adder` (parameters `M`, `N`, `ND`; defaults 10, 2, 4):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | a new pair of arrays is on `a_digits`/`b_digits` |
| `a_digits`, `b_digits` | in | M*N*ND x 3 | one 3-bit two's-complement digit per pixel (`tsd_pkg::tsd_digit_t`) |
| `out_valid` | out | 1 | result planes hold a new sum, 2 cycles after `in_valid` |
| `out_code_err` | out | 1 | an operand held a code that is not a digit (3, -3, -4) |
| `z2 z1 z0 zn1 zn2` | out | M*N*(ND+1) | the five DDP planes of the result |

The latency is 2 cycles for any M, N and ND. A new pair of arrays can be
applied every cycle. There is no back-pressure. `out_valid` repeats `in_valid` two
cycles later, and the planes hold their value until the next valid result. A
concurrent assertion checks that every result pixel is lit in exactly one
plane.

The logic depth per stage is constant. In step 1, S1, S-1, C1 and C-1 take
four gate levels (OR, AND, OR, OR), and S0 and C0 two more (OR, NOT). In
step 2, the +-1 and +-2 planes take two levels and Z0 three more. The cost
grows linearly with M*N*ND. At the default size, synthesis gives 984
flip-flops: 480 intermediate pixels, 500 result pixels and 4 control bits.

## Modules

| file | what it is |
|------|-----------|
| `rtl/tsd_pkg.sv` | digit type, digit constants, default sizes |
| `rtl/ddp_encoder.sv` | digit array to five DDP planes, plus error flag |
| `rtl/ddp_and.sv` | pixel-wise AND of two planes (stacked modulators) |
| `rtl/ddp_or.sv` | pixel-wise OR of two planes (beam combiner) |
| `rtl/ddp_cmp.sv` | pixel-wise complement (detector + complement) |
| `rtl/tsd_step1.sv` | step-1 plane equations, built from the three gates above |
| `rtl/ddp_lda.sv` | detector array: register for P planes with valid |
| `rtl/ddp_lda_expand.sv` | detector register for the 6 intermediate planes + expand/shift |
| `rtl/tsd_step2.sv` | step-2 plane equations |
| `rtl/tsd_ddp_array_adder.sv` | top |

The optical parts of the original system have no logic function and are not
modelled: laser sources, the modulators themselves, beam splitters and
mirrors. Beam splitters and mirrors only copy and route planes, which in RTL
is plain wiring.

## What follows the original scheme and what is this design's own

Taken from the scheme:
- the TSD step-1 and step-2 rules;
- the plane equations for S1, S-1, C1, C-1 and Z2, Z1, Z-1, Z-2;
- forming S0, C0 and Z0 as the complement of the other planes ORed together;
- the positions of the padded pixels;
- the (ND+1)-digit result;
- the 10 x 2 x 4 default size.

Readings of points that the scheme states loosely:
- The C-1 equation has the form `(A-1+A-2)(B-1+B-2) + A-2 B0 + A0 B-2`, the
  mirror image of C1. It is checked against the rule table.
- The Z-1 equation has `S0 C'-1` as its second term, as the step-2 table
  requires.
- For the pair (s, c') = (1, 1), the rule table and the Z2 equation give 2. A
  sentence that states 1 for this case was not followed.
- The pair (-2, 1) belongs to the group whose sum is -1.

Choices of this implementation:
- the 3-bit two's-complement digit code at the input, and the
  `out_code_err` flag (a non-digit code lights no plane);
- modelling each detector array as a clocked register with a valid bit and
  synchronous reset, which gives the 2-cycle latency;
- the padded pixels hold the digit 0;
- the flat pixel order.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.
Expected values come from an integer model of the two steps (`tb/tsd_tb_pkg.sv`),
not from the plane equations.

- `tb_tsd_ddp_array_adder` runs the top at its default size, with no
  parameter overrides:
  - The worked example: A = [80 77; -21 42; 37 11; 20 -80; 33 74; 18 -32;
    -30 -11; 2 22; 43 -14; 78 51] and B = [80 35; 53 11; -57 -75; 79 -9;
    -33 -14; 28 -65; -70 53; 7 -77; 14 -43; -55 -23]. The expected sums are
    160, 112, 32, 53, -20, -64, 99, -89, 0, 60, 46, -97, -100, 42, 9, -55,
    57, -57, 23 and 28.
  - 400 random array pairs, issued back to back and with idle gaps.
  - Operands with codes that are not digits.
  - A reset while data is in flight.

  For every result, it checks each digit, each number's value and the 2-cycle
  latency. It also counts, and requires, every step-1 sum group, every result
  digit, carries into the new top digit and inside numbers, back-to-back
  issue, idle gaps, the error flag and reset.
- `tb_tsd_array_sizes` runs the top at three other shapes: 1 x 1 x 1,
  4 x 3 x 8 and 2 x 5 x 12. It issues random operands every cycle and checks
  each sum and the 2-cycle latency. Its helper module is `tb/tsd_size_check.sv`.
- `tb_tsd_step1` runs all 25 digit pairs plus random planes. It checks the
  sum and carry planes against the rule, and S0 and C0 against their direct
  forms.
- `tb_tsd_step2` runs all 9 (s, c') pairs plus random planes. It checks Z0
  against its direct form as well.
- `tb_ddp_lda_expand` checks the shift and padding per number, including that
  no carry spills into the next number. It also checks the one-cycle delay,
  holding on idle cycles and reset.
- `tb_ddp_encoder` checks the encoder with random arrays and the error flag.
  `tb_ddp_coding_example` checks the [15; -52; -22; 4] planes shown above.
- `tb_ddp_lda`, `tb_ddp_and`, `tb_ddp_or` and `tb_ddp_cmp` check their
  modules bit by bit.

Run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tsd_pkg.sv tb/tsd_tb_pkg.sv tb/tb_tsd_ddp_array_adder.sv \
    --top-module tb_tsd_ddp_array_adder
./obj_dir/Vtb_tsd_ddp_array_adder
```

Swap in another testbench name to run it. Each runs in well under a second.

## Changing the size

`M`, `N` and `ND` are parameters of the top, the encoder and
`ddp_lda_expand`. The plane modules take a pixel count `W`. The design has no
other size limit, and the latency stays 2 cycles. To add numbers of a
different width, or arrays of a different shape, override the three top
parameters. The end-to-end testbench reads its sizes from `tsd_pkg`, and its
worked-example part assumes the 10 x 2 x 4 default.
