# 16x16 Vedic multiplier with a multiplexer-based carry save adder

This is a combinational 16x16 unsigned multiplier built on the Urdhva
Tiryagbhyam rule of Vedic arithmetic, which means "vertically and crosswise".
Each operand is split into a high half and a low half. Four half-size
products are formed in parallel: two "vertical" ones (low x low, high x high)
and two "crosswise" ones (high x low, low x high). Three adders then merge
them. The rule is applied recursively, 16 -> 8 -> 4 -> 2 bits. The 2x2 leaf
needs only AND gates and two half adders.

At the 16-bit level, the three adders are *modified carry save adders*
(MCSA). In an MCSA, every full adder is made of two 4:1 multiplexers
instead of XOR/AND/OR gates. The lower levels (8x8, 4x4) use ordinary ripple
carry adders.

Top module: `vedic16_mcsa` (`a[15:0]`, `b[15:0]` -> `p[31:0]`). It has no
clock: the product is valid one propagation delay after the operands change.

## Module hierarchy

```
vedic16_mcsa            16x16, three 16-bit mcsa + OR gate
 ├─ vedic8x8  (x4)      8x8, three 8-bit rca + OR gate
 │   └─ vedic4x4 (x4)   4x4, three 4-bit rca + OR gate
 │       └─ vedic2x2 (x4)  2x2, AND gates + 2 half_adder
 │       └─ rca ─ full_adder
 └─ mcsa (x3)           16-bit, two rows of mux_full_adder
     └─ mux_full_adder ─ mux41 (x2)
```

| file | what it is |
|---|---|
| `rtl/vedic16_mcsa.sv` | top: 16x16 multiplier, MCSA adders |
| `rtl/vedic8x8.sv`, `rtl/vedic4x4.sv` | 8x8 and 4x4 multipliers, ripple carry adders |
| `rtl/vedic2x2.sv` | 2x2 leaf multiplier |
| `rtl/mcsa.sv` | WIDTH-bit modified carry save adder (default 16) |
| `rtl/mux_full_adder.sv` | full adder made of two 4:1 muxes |
| `rtl/mux41.sv` | 4:1 multiplexer |
| `rtl/rca.sv` | WIDTH-bit ripple carry adder (default 8) |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | gate-level adder cells |

## The combining stage (all levels above 2x2)

Take a level of width W with half width H = W/2. Let aH/aL and bH/bL be the
operand halves. The four sub-multipliers give these W-bit products:

```
p_ll = aL*bL    p_hl = aH*bL    p_lh = aL*bH    p_hh = aH*bH
```

The exact product is `p_hh<<W + (p_hl + p_lh)<<H + p_ll`. Three W-bit
additions compute it:

```
adder 1:  {c1, s1} = p_hl + p_lh
adder 2:  {c2, s2} = s1 + {H zeros, p_ll[W-1:H]}
adder 3:  {c3, hi} = p_hh + {H-1 zeros, c1|c2, s2[W-1:H]}
product   p = {hi, s2[H-1:0], p_ll[H-1:0]}
```

Three points about this stage:

* **Why an OR gate can merge c1 and c2.** Both carries have weight
  2^(W+H). The middle sum `p_hl + p_lh + p_ll[W-1:H]` is at most
  2^(W+1) - 3·2^H. That is below 2^(W+1), so at most one of the two carries
  can be 1, and `c1 | c2` equals `c1 + c2`. Each level checks this with an
  immediate deferred assertion, `a_carry_excl`.
* **c3 is always 0.** The product of two W-bit numbers fits in 2W bits, so the
  top adder never carries out. `c3` is not a port. Assertion `a_no_c3` checks
  that it stays 0.
* **The adder type is fixed per level.** `vedic4x4` and `vedic8x8` use `rca`.
  `vedic16_mcsa` uses `mcsa` with its third operand tied to 0.

## The modified carry save adder

`mcsa` adds three WIDTH-bit words, a + b + c, using two rows of cells:

1. **Carry-save row.** Cell i adds `a[i] + b[i] + c[i]` on its own, with no
   carry passed between cells. This gives a sum bit `ps[i]` and a carry bit
   `pc[i]` of weight 2^(i+1).
2. **Ripple row.** `sum[0] = ps[0]`. For i = 1..WIDTH-1, cell i adds `ps[i]`,
   `pc[i-1]` and the ripple carry from the cell below. The first ripple carry
   is 0. One extra cell adds `0 + pc[WIDTH-1] + ripple` and gives `sum[WIDTH]`
   and `cout`.

The full result is `{cout, sum}`, WIDTH+2 bits. In the multiplier, c = 0, so
`sum[WIDTH]` is the carry and `cout` stays 0; the top-level assertion
`a_no_cout` checks this.

What makes the adder "modified" is its cell. `mux_full_adder` uses the two
addend bits as the select lines (b on S1, a on S0) of two 4:1 multiplexers.
The data inputs are then functions of the third bit c only:

| select {b,a} | 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| sum mux M1 | c | ~c | ~c | c |
| carry mux M2 | 0 | c | c | 1 |

In the ripple row, the ripple carry goes to the cell's data input c, not to a
select line. That wiring is a choice made in this implementation.

## How far this follows the source design

These parts follow the published block diagrams:

* the 2x2 half-adder arrangement;
* the order of the three additions, the zero-padded operands and the OR gate
  at the 4x4, 8x8 and 16x16 levels;
* the two-row structure of the carry save adder, generalized here from its
  4-bit drawing to WIDTH bits;
* the multiplexer full adder.

These are choices made in this implementation:

* **Unsigned operands.** The design does no sign handling.
* **No registers.** The source describes the multiplier as finishing in a
  single clock cycle. Register the ports yourself if you need a pipeline.
* **Gate-level cells.** `half_adder`, `full_adder` and `mux41` are written in
  their textbook form.
* **Adder ports.** `rca` has a carry-in port, tied to 0 everywhere it is used.
* **Adder types per level.** The 8x8 and 4x4 levels keep ripple carry adders,
  even inside the MCSA multiplier.
* **Ripple-row pin assignment** in the MCSA cells (see the previous section).

Two related designs are not included. The source design is compared with a
version that uses ripple carry adders at the 16-bit level. It is also
compared with a version that uses the plain gate-level carry save adder
there. To get either one, replace `mcsa` in `vedic16_mcsa`: use `rca` with
WIDTH 16, or give `mcsa` `full_adder` cells.

Reported FPGA results for this design are 520 LUTs and 13.7 ns delay (Xilinx
ISE 14.7). This RTL has not been put through that flow.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one compares the module's outputs with arithmetic done in wider
integers. Each ends by printing `TB_RESULT checks=N failures=M`, and each has a
time-based watchdog.

| testbench | stimulus |
|---|---|
| `tb_half_adder`, `tb_full_adder`, `tb_mux_full_adder`, `tb_mux41`, `tb_vedic2x2`, `tb_vedic4x4`, `tb_vedic8x8` | exhaustive |
| `tb_rca` | 8-bit exhaustive with carry-in; 16-bit corner cases and 20k random |
| `tb_mcsa` | 4-bit exhaustive over all three operands; 16-bit corner cases, 20k random three-operand and 20k two-operand; counts `cout` events |
| `tb_vedic16_mcsa` | full size: corner cases, all 256 single-bit pairs, 200k random pairs |

The 4x4, 8x8 and 16x16 testbenches count how often c1 and c2 are set. They
fail if either carry path is never exercised. At 16 bits, c2 is rare for
random operands (about 1 pair in 1500), so the test adds a directed pair that
forces it (0x10ff x 0xf0ff).

Run a testbench with plain Verilator, for example the top-level one:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic16_mcsa.sv \
          --top-module tb_vedic16_mcsa -o sim
./obj_dir/sim
```

The full-size test takes about a second. The assertions inside the
multipliers are active with `--assert`.
