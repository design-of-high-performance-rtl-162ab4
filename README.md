# Error-tolerant adder (ETA), 32 bits

An ordinary adder is slow and power-hungry mostly because of its carry chain:
in the worst case a carry ripples from the LSB to the MSB, and the glitches it
causes on the way burn dynamic power. Many signal-processing workloads (image,
audio, speech) do not need an exact sum; a sum that is close enough is
acceptable. The error-tolerant adder exploits that. It cuts the operands at a
joining point, adds the upper bits exactly, and adds the lower bits with **no
carries at all**, using a simple rule that keeps the error small. Both halves
work at the same time, starting from the joining point, so the long carry
chain is gone.

This RTL implements the 32-bit configuration of the published ETA: 12 exact
upper bits and 20 approximate lower bits, with the lower part's control logic
laid out in five groups of four cells. Everything is combinational.

## The addition rule

Let the operands be `A` and `B`, `WIDTH` bits wide, with the lowest `INACC_W`
bits forming the *inaccurate part* and the rest the *accurate part*.

* **Accurate part** (bits `WIDTH-1 .. INACC_W`): normal binary addition with a
  carry-in of 0. No carry comes in from the lower part. Its carry-out is the
  extra result bit `cout`.
* **Inaccurate part** (bits `INACC_W-1 .. 0`): walk from its MSB towards the
  LSB.
  * While the two operand bits are `00`, `01` or `10`, the sum bit is
    `A_i ^ B_i` (a one-bit add that neither produces nor takes a carry).
  * At the first position where both bits are `1`, stop: that sum bit and all
    sum bits to its right are set to `1`.

Worked example, 16 bits split 8/8:

```
A = 10110011 | 10011010      (45978)
B = 01101001 | 00010011      (26899)
    ---------+----------
exact upper:  1 00011100     (0xB3 + 0x69 = 0x11C)
lower:        1001 1111      bits 7..5 XOR to 100, bit 4 is the first 1+1,
                             so bits 4..0 become 11111
result      = 1_00011100_10011111 = 72863   (exact sum 72877, error 14)
```

### How large the error can be

If the first `1+1` pair in the lower part is at bit `p`, the exact sum has a
carry `2^(p+1)` out of that bit plus whatever the bits below `p` add up to
(`L`), while the ETA produces `2^(p+1) - 1` for bits `p..0`. The error is
therefore exactly `1 + L`, which means:

* the ETA result is never larger than the exact sum;
* it is exact when the lower part holds no `1+1` pair;
* otherwise it is short by at least 1 and by less than `2^INACC_W`
  (here `2^20`), however large the operands.

Setting the tail to all ones is what keeps the error this small: it is the
best guess for the low bits once the carry out of bit `p` has been dropped.

Accuracy is measured per operand pair as `ACC = 1 - |Rc - Re| / Rc` (`Rc` exact,
`Re` ETA result). A result is *acceptable* when `ACC` exceeds a minimum
acceptable accuracy (MAA), and the *acceptance probability* (AP) is the
fraction of inputs whose result is acceptable. The 12/20 split was chosen
against the requirement "AP of at least 98 % at an MAA of 95 %"; for 32-bit
operands drawn uniformly, the end-to-end testbench measures an AP of 100 % over
200,000 pairs, since an error below `2^20` is tiny next to a typical 32-bit sum.
For small operands that lie entirely in the inaccurate part the relative error
is much larger; the adder suits data whose magnitude lives mostly in the upper
bits.

## Hardware structure

```
             A[31:20] B[31:20]                 A[19:0] B[19:0]
                  |                                  |
      +-----------v-----------+           +----------v-----------+
      | ripple_carry_adder    |           | eta_control_block    |
      | 12 bits, cin = 0      |           | 20 CSGCs, 5 groups   |
      +-----------+-----------+           +----------+-----------+
                  |                                  | CTL[19:0]
                  |                       +----------v-----------+
                  |                       | carry_free_addition_ |
                  |                       | block: 20 mod. XORs  |
                  |                       +----------+-----------+
          cout, S[31:20]                          S[19:0]
```

There is no wire between the two halves.

### Accurate part: `ripple_carry_adder`

A chain of `full_adder` cells. With the lower part taking 20 of the 32 bits,
the 20-bit control path is the slower one, so the 12-bit upper adder does not
need to be fast; the ripple-carry adder is chosen as the lowest-power option.
Any conventional adder could take its place.

### Inaccurate part, sum bits: `carry_free_addition_block` / `modified_xor`

One *modified XOR* per bit, with nothing connecting neighbouring bits:
`S_i = CTL_i ? 1 : A_i ^ B_i`. In silicon this is an XOR gate with three
extra transistors: two disconnect the XOR when `CTL` is high and a third pulls
the output to VDD. Here it is written as its logic function.

### Inaccurate part, control: `eta_control_block`, `csgc_type1`, `csgc_type2`

This is the part that decides where the all-ones tail begins, and the only
part with a long path. Its output `CTL_i` must be high when any bit `j >= i`
of the lower part has `A_j & B_j`; logically it is a prefix OR from the MSB
downwards.

It is built from one *control signal generating cell* (CSGC) per bit:

* **Type I**: `CTL_i = (A_i & B_i) | CTL_(i+1)`, the plain ripple cell.
* **Type II**: `CTL_i = (A_i & B_i) | CTL_(i+1) | CTL_(i+4)`. The extra input
  comes from the leftmost cell of the group to the left.

The 20 cells form five groups of four (bits 19-16, 15-12, 11-8, 7-4, 3-0).
Inside a group the signal ripples through type I cells. The leftmost cell of
each group after the first (bits 15, 11, 7, 3) is type II, so a high signal
raised in one group's leftmost cell jumps straight to the next group's
leftmost cell instead of passing through the three cells in between. The
longest path is then ten cells (for example bit 18 -> 17 -> 16 -> 15 -> 11 -> 7
-> 3 -> 2 -> 1 -> 0) instead of twenty. Bit 19, the leftmost cell of the
first group, is type I with its left input tied to 0.

The jump links shorten the path but do not change the function: the type II
cell's `CTL_(i+4)` input is always implied by its `CTL_(i+1)` input. A
zero-delay simulation therefore cannot tell the grouped layout from a plain
chain; the grouping matters for the timing of the synthesized or hand-laid-out
circuit. The generic module places the type II cells every `GROUP` bits from
the top and requires `INACC_W` to be a multiple of `GROUP`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `eta_adder` | `WIDTH` | 32 | operand width |
| `eta_adder` | `INACC_W` | 20 | bits in the inaccurate part (accurate part is `WIDTH - INACC_W` = 12) |
| `eta_adder` | `GROUP` | 4 | control cells per group |
| `ripple_carry_adder` | `W` | 12 | adder width |
| `eta_control_block` | `W`, `GROUP` | 20, 4 | width and group size |
| `carry_free_addition_block` | `W` | 20 | width |

The defaults live in `eta_pkg`. The original design method picks the split
by trial: start from a split that balances the delay of both halves, check the
AP against the target, and move one bit at a time from the inaccurate to the
accurate part until the target is met. More bits in the inaccurate part save
more power and time.

## Interface and timing

`eta_adder` ports: `a[WIDTH-1:0]`, `b[WIDTH-1:0]` in; `sum[WIDTH-1:0]` and
`cout` out. `{cout, sum}` is the (WIDTH+1)-bit result. There is no clock,
reset or handshake; the result is valid one combinational delay after the
operands change. Register the inputs or outputs in the surrounding design as
needed.

## Choices made in this RTL

* The carry-out of the accurate part is brought out as `cout`, so the result
  has the full `WIDTH+1` bits of a sum.
* The full adder of the ripple-carry part is written as `a^b^cin` and a
  majority function; its gate-level form is not prescribed.
* The transistor-level cells (modified XOR, CSGCs) are written as their logic
  functions. Transistor sizing and the ten-cell delay are not modelled.
* The leftmost control cell's missing left input is tied to 0.
* No pipelining or registers were added.

## Not included: the FFT application

The ETA was demonstrated by replacing every addition of an FFT and inverse
FFT with ETA additions and passing an image through both; the image came out
visually almost unchanged (slightly darker, with faint horizontal bands), with
an AP of 98.3 % at an MAA of 95 % against the exact version. That experiment
was a software model of the arithmetic; no FFT hardware (size, number
format, multipliers, scaling) is defined for it, so none is provided here.
`eta_adder` is the building block such a datapath would use.

## Files

`rtl/`:

* `eta_pkg.sv` - default sizes
* `eta_adder.sv` - top: the 32-bit ETA
* `ripple_carry_adder.sv`, `full_adder.sv` - accurate part
* `eta_control_block.sv`, `csgc_type1.sv`, `csgc_type2.sv` - control block
* `carry_free_addition_block.sv`, `modified_xor.sv` - carry-free sum bits

`tb/` (each self-checking, ending with a `TB_RESULT checks=N failures=M` line):

* `tb_eta_adder.sv` - end to end at the default 32-bit size: directed vectors
  (for example `0x55554444 + 0x44441111 = 0x9997FFFF`,
  `0x78878998 + 0x34560789 = 0xACD7FFFF`,
  `0x6789ABCD + 0xABC90087 = 1_0x134FFFFF`), 220,000 random pairs against a
  bit-serial model of the rule, the error bound above, the AP measurement,
  and counts showing that XOR mode, all-ones mode, a group crossing, a
  carry-out and an inexact result each occurred
* `tb_eta_adder_16.sv` - 16-bit 8/8 instance: the worked example above and
  random pairs
* `tb_ripple_carry_adder.sv` - exhaustive over all 12-bit operand pairs
* `tb_eta_control_block.sv` - first `1+1` pair placed at every bit, no pair,
  random
* `tb_carry_free_addition_block.sv`, `tb_modified_xor.sv`,
  `tb_csgc_type1.sv`, `tb_csgc_type2.sv` - cell and block tests

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/eta_pkg.sv \
    tb/tb_eta_adder.sv --top-module tb_eta_adder -Mdir obj_eta
./obj_eta/Vtb_eta_adder
```

Swap in any other testbench name. Each runs in a few seconds; the
exhaustive ripple-carry test (16.8 million sums) takes about two.
To try a different split, set `INACC_W` (and `GROUP`, which must divide it)
on `eta_adder`; the testbenches' reference models take `W`/`M`/`G`
localparams that must be changed to match.
