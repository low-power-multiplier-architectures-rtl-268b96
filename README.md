# Vedic multipliers: Urdhva Tiryakbhyam and Nikhilam

Two families of unsigned, purely combinational binary multipliers. Both are
based on rules of Vedic arithmetic, and each comes at 4, 8, 16, 32 and
64 bits:

* **Urdhva Tiryakbhyam (UT, "vertically and crosswise")**: all partial
  products are formed at once, and ripple carry adders add them up. The
  multiplier is a tree built up from a 2×2 cell made of four AND gates and
  two half adders.
* **Nikhilam ("all from 9 and the last from 10")**: each operand is replaced
  by its distance (deviation) from a base, a power of two. The product of the
  two deviations comes from a small ROM of squares, not from a multiplier
  array. The 4×4 cores are merged into wider multipliers with carry save
  addition.

There is no clock, register or handshake. An output is valid one
combinational settling time after its inputs change.

## Top level: `vedic_mult_top`

The top holds all ten multipliers side by side. Nothing is shared between
them.

| ports | unit | widths |
|---|---|---|
| `ut<N>_a`, `ut<N>_b` → `ut<N>_p` | `ut_mult #(.N(N))` | N = 4, 8, 16, 32, 64; product 2N bits |
| `nk<N>_a`, `nk<N>_b` → `nk<N>_p` | `nikhilam_mult #(.N(N))` | N = 4, 8, 16, 32, 64; product 2N bits |

Every product is the exact unsigned product of its two operands. To use a
single multiplier, instantiate `ut_mult` or `nikhilam_mult` directly with the
`N` you need: a power of two, at least 2 for UT and at least 4 for Nikhilam.
The default is `N = 64`.

## Urdhva Tiryakbhyam multiplier (`ut_mult`, `ut_merge`, `ut_mult2`)

Vertically and crosswise on two-digit numbers `(aH aL) × (bH bL)`:

* the vertical products `aL·bL` and `aH·bH` give the low and high digits;
* the crosswise sum `aL·bH + aH·bL` gives the middle digit.

All three can be formed at the same time.

**2×2 cell (`ut_mult2`).**
- Four AND gates form `a0b0`, `a1b0`, `a0b1` and `a1b1`.
- `p0 = a0b0`.
- A half adder sums `a1b0 + a0b1`. Its sum is `p1`.
- A second half adder adds the first one's carry to `a1b1`. Its sum is `p2`
  and its carry is `p3`.

**N×N (`ut_mult`, merge stage `ut_merge`).** Each operand is cut into
2-bit digits. Every digit pair (i, j) is multiplied by its own `ut_mult2`,
all at once. The products are then merged in a tree, one level per doubling
of the digit width. Take four products of S/2-bit digits:

- the vertical ones, `LL = aL·bL` and `HH = aH·bH`;
- the crosswise ones, `LH = aL·bH` and `HL = aH·bL`.

With `h = S/2`, `ut_merge` turns them into the product of S-bit digits:

```
p[h-1:0]  = LL[h-1:0]                          (passed straight through)
p[2S-1:h] = {HH, LL[S-1:h]} + LH + HL          (two (S+h)-bit ripple carry adders)
```

This is the familiar construction of an N-bit multiplier from four
N/2-bit ones, and of those from N/4-bit ones, down to the 2×2 cell. It is
written as a generate loop over levels, not as a module that instantiates
itself. At level `l` the digits are `S = 2<<l` bits wide, and the product of
digit i of `a` and digit j of `b` sits at index `i·D + j` (`D = N/S`). A
64-bit multiplier holds 1024 2×2 cells and 341 merge stages.

The carry out of both adders in a merge stage is always zero, because the
product fits in 2S bits.

## Nikhilam multiplier (`nikhilam_mult4`, `square_rom`, `nikhilam_merge`, `nikhilam_mult`)

This is the least obvious part of the design.

### The 4×4 core

The base is `B = 16`, the smallest power of two above any 4-bit operand.
With deviations `da = 16 − a` and `db = 16 − b` (both in 1..16):

```
a·b = (a − db)·16 + da·db          LHS = a − db  (equal to b − da),  RHS = da·db
```

Decimal example with base 100: `96 × 93`. The deviations are 4 and 7, so
RHS = 28 and LHS = 96 − 7 = 89. The result is 8928.

**Right-hand side (RHS).** RHS is not computed by a multiplier. It uses the
average/deviation identity, with `avg = ⌊(da+db)/2⌋` (a right shift) and
`dev = avg − min(da, db)`:

* `da − db` even: `RHS = avg² − dev²`;
* `da − db` odd: `RHS = avg·(avg+1) − dev·(dev+1) = (avg² + avg) − (dev² + dev)`.

Both squares come from one two-port ROM of squares (`square_rom`). The parity
of `da − db` is the low bit of `da + db`. Two worked cases:

* 16 × 12 (even): avg = 14, dev = 2, so 196 − 4 = 192.
* 15 × 12 (odd): avg = 13, dev = 1, so 182 − 2 = 180.

**Merge.**
- The low four product bits are `RHS[3:0]`, unchanged.
- The high four bits are `LHS + RHS[7:4]`, from a 4-bit ripple carry adder.

The sum is taken modulo 256. That is exact even when LHS is negative
(whenever `a + b < 16`), because the true product is below 256.

### The ROM

`square_rom` has `2^AW` entries, and entry `i` holds `i²`. The table is
computed at elaboration from `vedic_pkg::square()`, so no data file is read.
Reads are asynchronous.

The core uses `AW = 5`, because the average of two deviations can reach 16.
Only entries 0..16 are ever addressed.

### Wider Nikhilam multipliers

Only the 4×4 core holds a ROM. Widths of 8 bits and above use the same
digit tree as the UT multiplier, with 4-bit digits at the bottom. That is 4,
16, 64 and 256 cores for 8, 16, 32 and 64 bits. Each merge stage
(`nikhilam_merge`) differs from the UT one:

- The low half of `LL` passes through unchanged.
- The three overlapping words `{HH, LL[S-1:h]}`, `LH` and `HL` go into a
  carry save adder (`csa`). It gives a sum word and a carry word.
- One ripple carry adder adds the sum word and the carry word shifted left by
  one bit. The result is the upper product bits.

## Cells (`pp_and`, `half_adder`, `full_adder`, `rca`, `csa`)

These model the logic function of low-power transistor cells:

* `pp_and`: a 5-transistor AND gate built as a multiplexer (`y = a ? b : 0`).
* `half_adder`: 9 transistors. The carry comes from that AND gate, and the
  sum from a 4-transistor XOR.
* `full_adder`: 14 transistors.

The RTL keeps only their Boolean behaviour. Transistor counts, pass-transistor
levels and the 45 nm layout do not appear in it.

`rca` is a W-bit chain of full adders. `csa` is a row of W independent full
adders.

## Where the design makes its own choices

* **Operands are unsigned.** Signed multiplication is not provided.
* **Combining sub-products.** How the four half-size products are added
  (which bits are passed through, and the adder widths) is this design's
  choice. So is the carry-save-then-ripple merge in the Nikhilam tree.
* **Nikhilam core.** Fixing the base at 16 is this design's choice. So is
  computing RHS with the square-ROM method and merging modulo 256. Other
  binary Nikhilam multipliers pick the base per operand or multiply the
  deviations directly.
* **ROM.** The size (`AW = 5`), the two read ports and the asynchronous read
  are chosen here.
* **4×4 from 2×2.** The 4×4 UT multiplier is four 2×2 cells plus adders. It
  is not a column-by-column "crosswise step" adder structure. Both form the
  same partial products.
* **Not implemented.** Squaring and cubing units built on these multipliers
  are sometimes mentioned with them, but their structure is not defined here.
  Timing, area and power figures of the transistor-level cells cannot be
  reproduced in RTL.

## Verification

Each multiplier, the top and each cell has a self-checking testbench
`tb/tb_<module>.sv`. The merge stages are tested through the multipliers.
Each testbench prints `TB_RESULT checks=<n> failures=<m>` and calls `$finish`. A
watchdog ends any run that stalls.

* `tb_pp_and`, `tb_half_adder`, `tb_full_adder`, `tb_ut_mult2`: exhaustive.
* `tb_rca`: exhaustive at 8 bits, random and full carry propagation at 64.
* `tb_csa`: exhaustive at 4 bits, random at 48.
* `tb_square_rom`: every entry, on both ports.
* `tb_nikhilam_mult4`: all 256 operand pairs. It requires both the even and
  the odd case, and both signs of LHS, to occur.
* `tb_ut_mult`, `tb_nikhilam_mult`:
  - exhaustive at 4 and 8 bits;
  - reference operand pairs such as 15 × 15 = 225, 97 × 2 = 194,
    65553 × 1114129 = 73034498337 and 4113 × 268435473 = 1104075100449;
  - all-ones, zero and top-bit corners;
  - 3000 random pairs at 16, 32 and 64 bits (64 is the default N).
* `tb_vedic_mult_top`: all ten multipliers at once, at default parameters. It
  uses the reference pairs of both families, corners and 2000 random pairs.
  It counts the even and odd core cases, negative LHS, and carries out of the
  crosswise sum, and fails if any of these never occurs.

Expected values always come from the simulator's own wide multiplication,
never from the design.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
    rtl/vedic_pkg.sv tb/tb_vedic_mult_top.sv --top-module tb_vedic_mult_top -o sim
./obj_dir/sim
```

Building the full top takes about a minute. The simulation itself takes
seconds.

## Files

| file | content |
|---|---|
| `rtl/vedic_pkg.sv` | core width of the Nikhilam core, `square()` formula of the ROM |
| `rtl/pp_and.sv`, `half_adder.sv`, `full_adder.sv` | bit cells |
| `rtl/rca.sv`, `rtl/csa.sv` | ripple carry adder, carry save adder |
| `rtl/ut_mult2.sv`, `rtl/ut_merge.sv`, `rtl/ut_mult.sv` | UT 2×2 cell, merge stage, N×N tree |
| `rtl/square_rom.sv`, `rtl/nikhilam_mult4.sv`, `rtl/nikhilam_merge.sv`, `rtl/nikhilam_mult.sv` | Nikhilam ROM, 4×4 core, merge stage, N×N tree |
| `rtl/vedic_mult_top.sv` | all ten multipliers |
| `tb/tb_*.sv` | self-checking testbenches: one per cell, per multiplier and for the top |
