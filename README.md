# 32-bit Vedic multiplier with one carry-save adder per level

This is a combinational 32 x 32 -> 64-bit unsigned multiplier built by the
"vertically and crosswise" rule of Vedic arithmetic (Urdhva Tiryagbhyam).
Each operand is cut in half. The four half-width products are formed in
parallel: two "vertical" ones (low x low, high x high) and two "crosswise"
ones (high x low, low x high). A single carry-save adder (CSA) and two
ripple-carry adders then add them. The half-width products are made by the
same rule, one size down. So the tree runs 2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32.
The leaves are 2x2 multipliers of four AND gates and two half adders.

The point of this variant is that each level uses **one** CSA to merge its
partial products. The more common arrangement uses two CSAs per level and
patches the top bits with an OR gate. That two-CSA form is the baseline this
design improves on. It is not included here.

## Decimal picture

Take 28 x 64, with "digits" 2|8 and 6|4:

* vertical, units: 8 x 4 = 32 -> write 2, carry 3
* crosswise: 2 x 4 + 8 x 6 = 56, plus 3 = 59 -> write 9, carry 5
* vertical, tens: 2 x 6 = 12, plus 5 = 17 -> 1792

In hardware the "digits" are half-words. The crosswise sum and its carries
are what the combining stage computes.

## The combining stage (`vedic_combine`)

This is the only non-obvious part. Let the width of one level be `N`, with
half width `H = N/2`. Write `a = aH:aL` and `b = bH:bL`. The four
sub-multipliers deliver `N`-bit words:

| word | product | weight |
|------|---------|--------|
| q0 | aL*bL | 2^0 |
| q1 | aH*bL | 2^H |
| q2 | aL*bH | 2^H |
| q3 | aH*bH | 2^N |

```
 bit:   2N-1 ........ N+H | N+H-1 ......... N | N-1 ....... H | H-1 .... 0
                 q3[N-1:H]          q3[H-1:0]      q0[N-1:H]     q0[H-1:0]
                                  q1[N-1:0]------------------
                                  q2[N-1:0]------------------
```

The stage works in three steps:

1. **Low quarter.** `p[H-1:0] = q0[H-1:0]`. Nothing else reaches these bits.
2. **Middle, N bits at offset H.** Three words overlap here: `q1`, `q2`
   and `{q3[H-1:0], q0[N-1:H]}`. One N-bit CSA (`csa_nbit`) reduces them to
   a sum word and a carry word. An N-bit ripple-carry adder (`rca_nbit`)
   then adds the sum word to the carry word shifted up one place. Its result
   is `p[N+H-1:H]`.
3. **High quarter, H bits.** Two carries are left over: the CSA carry
   word's top bit, which was shifted out, and the middle adder's carry out.
   An H-bit ripple-carry adder adds both to `q3[N-1:H]`, one as an operand
   bit and one as the carry input. Its result is `p[2N-1:N+H]`.

The full product always fits in 2N bits, so the high adder never carries
out. An immediate assertion in `vedic_combine` checks this in simulation.

At the top level (N = 32) this gives a 32-bit CSA, a 32-bit resolving
adder and a 16-bit upper adder. At the 4x4 level it gives a 4-bit CSA and
a 2-bit upper adder.

## Module hierarchy

```
vedic_mul_32x32            top: a[31:0], b[31:0] -> p[63:0]
 |- 4 x vedic_mul_16x16
 |    |- 4 x vedic_mul_8x8
 |    |    |- 4 x vedic_mul_4x4
 |    |    |    |- 4 x vedic_mul_2x2    (AND gates + 2 x half_adder)
 |    |    |    `- vedic_combine #(4)
 |    |    `- vedic_combine #(8)
 |    `- vedic_combine #(16)
 `- vedic_combine #(32)
vedic_combine #(N): csa_nbit #(N), rca_nbit #(N), rca_nbit #(N/2)
csa_nbit, rca_nbit: N x full_adder (full_adder = 2 x half_adder + OR)
```

Instance names are the same at every level:

* `u_ll` is aL*bL.
* `u_hl` is aH*bL.
* `u_lh` is aL*bH.
* `u_hh` is aH*bH.
* `u_comb` is the combining stage.

Inside `u_comb`, the signals are:

* `csa_sum`, `csa_carry`: the CSA output words.
* `mid_sum`, `mid_cout`: the middle adder's result and carry out.
* `hi_sum`: the upper adder's result.

Each multiplier size has its own fixed-width module: `vedic_mul_4x4`,
`vedic_mul_8x8`, `vedic_mul_16x16` and `vedic_mul_32x32`. Any of them can
be used alone. `csa_nbit` and `rca_nbit` take a width parameter `N`, which
defaults to 4. `vedic_combine` takes `N`, which defaults to 32.

## Timing and interface

Everything is combinational. There is no clock, no reset, no handshake and
no register. The product follows the operands after the propagation delay.
Operands and product are unsigned.

The critical path runs through the combining stages. Each stage costs one
full adder for the CSA, then the ripple through the N-bit middle adder and
the H-bit upper adder. To make the design faster, replace the two
`rca_nbit` instances in `vedic_combine` with a faster adder of the same
ports. To pipeline it, register the `q` words or the CSA outputs.

## Where the design makes its own choices

The 2x2 multiplier, the half adder, the full adder, the CSA, the RCA, the
recursive four-multiplier structure and the CSA's three input words all
follow the published description of this multiplier. These points are
this design's own choices:

* **Final addition.** The CSA's sum and carry words are resolved by a
  ripple-carry adder. The description lists an "RCA n-bit" among the
  components but does not spell out this step for the improved model.
* **Upper-quarter carries.** Both leftover carries go into one H-bit
  adder, so the result is exact. The baseline instead ORs the CSA's two top
  bits.
* **No clock.** The design is purely combinational and unsigned. Its
  source mentions no registers, reset or signed operands.
* **No FPGA figures.** The published results are delays (about 16 ns at
  32 bits) and LUT counts from a Xilinx FPGA flow. They are not reproduced
  here and cannot be checked in simulation.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it applies |
|-----------|-----------------|
| `tb_half_adder`, `tb_full_adder`, `tb_vedic_mul_2x2` | every input combination |
| `tb_rca_nbit` | 4-bit, exhaustive with carry in; 16-bit, random plus a full-length carry ripple |
| `tb_csa_nbit` | 4-bit, exhaustive; 32-bit, random; checks the bitwise rule and a+b+c = sum + 2*carry |
| `tb_vedic_combine` | N = 32 with the true partial products of random operands; N = 4 exhaustive |
| `tb_vedic_mul_4x4`, `tb_vedic_mul_8x8` | every operand pair |
| `tb_vedic_mul_16x16` | corner cases, 28 x 64, and 100 000 random pairs |
| `tb_vedic_mul_32x32` | the top at full size: corner patterns, shifted ones against masks, 28 x 64, and 200 000 random pairs |

The multiplier and combiner testbenches also count how often each carry
path into the upper adder is taken: the CSA's top carry bit and the middle
adder's carry out. The top's testbench does this at all four levels, along
the high-high path. A path that is never taken counts as a failure.

Each testbench was also run against a deliberately broken copy of its
module, and it caught the fault every time. Examples of the faults: a
crosswise multiplier wired to the wrong operand half, or a dropped carry.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_vedic_mul_32x32 tb/tb_vedic_mul_32x32.sv
./obj_dir/Vtb_vedic_mul_32x32
```

The testbenches read internal signals through hierarchical names, for
example `dut.u_comb.mid_cout`. If you rename instances or signals, update
the testbenches too.
