# 7-bit binary to BCD converter for decimal digit products

A decimal multiplier that multiplies BCD digits with ordinary binary
multipliers gets each digit product, 0 to 81, as a 7-bit binary number and
has to turn it back into two BCD digits before the partial products can be
accumulated in decimal. This converter does that conversion in one shallow,
purely combinational network: no iteration, no shift-and-add-3 loop, no
clock. It splits the input into a low nibble that already has BCD weights and
three high bits whose decimal contribution is known in advance, and works on
both halves in parallel.

```
a6 a5 a4 | a3 a2 a1 a0          ->   z7 z6 z5 z4 | z3 z2 z1 z0
  h      |  low nibble                tens digit  |  ones digit
```

## The idea

The input value is `16*h + L`, with `h = a6..a4` and `L = a3..a0`.

* `L` already is a BCD digit unless it is above 9. If it is, carry **C1** is
  raised, 6 is added to the nibble (the usual BCD correction) and C1 goes to
  the tens digit.
* `16*h` splits into a fixed tens share and a fixed ones share:

  | h   | 16*h | tens share t3..t0 | ones share | ones share / 2 |
  |-----|------|-------------------|------------|----------------|
  | 000 | 0    | 0000              | 0          | +0             |
  | 001 | 16   | 0001              | 6          | +3             |
  | 010 | 32   | 0011              | 2          | +1             |
  | 011 | 48   | 0100              | 8          | +4             |
  | 100 | 64   | 0110              | 4          | +2             |
  | 101 | 80   | 1000              | 0          | +0             |

  Products of two BCD digits never exceed 81, so `h` never exceeds 101.
* The ones share is added to the corrected low digit. If that sum is above 9,
  carry **C2** is raised, 6 is added again and C2 goes to the tens digit.
* The tens digit is the tens share plus C1 plus C2.

Example, 31 = `001 1111`: the nibble 15 is above 9, so it becomes 5 with
C1 = 1. `h = 001` gives tens share 1 and ones share 6. Ones: 5 + 6 = 11, above
9, so it becomes 1 with C2 = 1. Tens: 1 + 1 + 1 = 3. Result `0011 0001`.

## Why most of the datapath is three bits wide

Bit 0 of the input never takes part in any arithmetic: the correction adds
6, and every ones share is even. So `z0 = a0`, and everything on the ones
side works on bits 3..1 only, i.e. on half the digit's value. In that
representation:

* "add 6" is "add 3 modulo 8", which is what both BCD correction blocks do;
* the ones shares 0, 6, 2, 8, 4 become +0, +3, +1, +4, +2, which is why there
  are exactly four constant adders, `plus1` to `plus4`.

Working modulo 8 is safe. The largest half-sum is 4 + 4 = 8 (corrected nibble
8 or 9, plus the 48's share 8), which wraps to 0; the correction then adds 3
modulo 8 and gives 3, i.e. digit 6 or 7, the right answer for 16 + a0 - 10.
The correction only ever needs the sum modulo 8 because C2 is not taken
from the adder's carry-out. A separate block computes C2 directly from the
input.

## The network

```
 a3..a1 ──> carry_c1 ──C1──┬──────────────────────────────┐
    │                      v                              v
    └────────────> bcd_correct #1 ──p3..p1──┬──> plus1 ──┐ carry_add #1 <── t3..t0 <── contrib_gen <── a6..a4
                                            ├──> plus2 ──┤      │
                                            ├──> plus3 ──┤      v
                                            ├──> plus4 ──┤ carry_add #2 <── C2 ──> z7..z4
                                            └────────────┴─> mux_array (sel a6..a4)
                                                                │
 a6..a1 ──> carry_c2 ──C2──────────────────────────> bcd_correct #2 ──> z3..z1
 a0 ─────────────────────────────────────────────────────────────────> z0
```

| Module        | Does                                                                 |
|---------------|----------------------------------------------------------------------|
| `carry_c1`    | `C1 = (a2 + a1) . a3`: the nibble is 10..15                          |
| `bcd_correct` | adds 3 mod 8 to bits 3..1 when `overflow` is high (used twice)       |
| `contrib_gen` | tens share t3..t0 of `h` (four small sum-of-products)                |
| `carry_add`   | adds one carry bit to a 4-bit tens digit (used twice, C1 then C2)    |
| `carry_c2`    | C2 from a6..a1, in parallel with the ones-side datapath              |
| `plus1`..`plus4` | constant adders +1..+4 mod 8 on p3..p1, all in parallel           |
| `mux_array`   | picks p or one adder output according to `h`                         |
| `bin2bcd_top` | wires the above together                                             |
| `bin2bcd_pkg` | shared types: `half_digit_t`, `bcd_digit_t`, `hsb_t`                 |

The constant adders, the correction block and the carry adder are written
the way their gate schematics are drawn: each output bit is a 2:1
multiplexer between an input bit and its inverse, steered by an AND or OR
of the lower bits. The multiplexor array is a three-level tree of 3-bit 2:1
multiplexers: `a4` chooses between +1/+4 and between +2/+3, `a5` chooses
between those pairs, and a last stage selected by `~a5 . ~(a4 xor a6)`
(true for `h` = 000 and 101) passes `p` unmodified.

Tens share equations (h = 110 and 111 used as don't-cares):

```
t0 = ~a6 ~a5 a4 + a5 ~a4
t1 = (a6 + a5) ~a4
t2 = a5 a4 + a6 ~a4
t3 = a6 a4
```

## Where this design makes its own choices

* **Carry C2.** Only the block's inputs (a6..a1) and purpose are defined by
  the original design. Here it is plain behavioural logic: with `u = a3..a1`,
  `p = u >= 5 ? u - 5 : u` (the corrected low digit / 2), `k` the half ones
  share of `h` from the table above, and `C2 = (p + k >= 5)`. It is
  synthesizable and exact, but it is not a hand-optimised gate network.
* **t2.** The original formulation of the tens share bit t2 also draws on a3.
  The tens share depends on `h` alone, so `t2 = a5 a4 + a6 ~a4` is used,
  derived from the table. `contrib_gen` has no a3 input.
* **Select polarities.** Which multiplexer input goes with which select
  value is fixed here by the arithmetic each block has to perform.
* **Input range.** The design is exact for inputs 0..95 (`h` <= 101), which
  covers every product of two BCD digits. Inputs 96..127 give no meaningful
  result; nothing flags them.

## What is not here

* **Timing.** The converter was characterised by transistor-level simulation
  of a full-custom gate implementation. The reported block delays range from
  25 ns (+4 block) to 250 ns (C2 block), with a summed estimate of 1357 ns.
  Those numbers belong to that implementation and its process. The RTL is
  untimed and leaves gate choice to synthesis.
* **Layout.** The hand-drawn NOT, NAND and NOR cells the converter was to be
  built from have no RTL counterpart.
* **The multiplier around it.** The digit multipliers and the decimal
  partial-product accumulation that the converter serves are not included.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against
values computed in the testbench with integer arithmetic, never by reusing
the block's logic:

* `tb_plus1`..`tb_plus4`, `tb_carry_c1`, `tb_bcd_correct`, `tb_carry_add`:
  exhaustive over all inputs.
* `tb_contrib_gen`: h = 0..5 against `(16*h) / 10`.
* `tb_carry_c2`: inputs 0..95 against `(a mod 16) mod 10 + 16*h mod 10 > 9`.
* `tb_mux_array`: random distinct values on the five data inputs; for every
  `h` the output must be the input carrying that `h`'s ones share.
* `tb_bin2bcd_top`: every input 0..95 against `a / 10`, `a % 10`, all 100
  products of two BCD digits, and the example 31 -> `0011 0001`. It counts
  the inputs that need the first correction, the second, both at once, and
  each of the six multiplexer selections. A mechanism that never occurred
  counts as a failure.

Every testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog. For a single block, simulate with

```
verilator --binary --timing --top-module tb_bin2bcd_top -y rtl -y tb \
    rtl/bin2bcd_pkg.sv tb/tb_bin2bcd_top.sv
./obj_dir/Vtb_bin2bcd_top
```

and the same with another `tb_<block>` for a single block. The design has no
parameters: the top-level test runs it in its only configuration.
