# Booth8: a registered 8x8 Booth multiplier with carry-select partial product addition

A signed 8-bit by 8-bit multiplier meant for DSP datapaths that need a fast
product. It cuts the multiplier operand into overlapping 3-bit groups (modified
Booth recoding). That turns eight partial products into four, each of which is
0, ±A or ±2A. The four partial products are added by a short chain of
carry-select adders, and each adder starts where its partial product starts, so
no adder works on known-zero bits. Operands sit in registers loaded under a
LOAD pin. The product sits in a result register, and a one-bit flag, `end_flag`,
tells a reader when that product belongs to operands that are no longer
changing.

The RTL holds two more things from the same published work:

- a two-stage pipelined variant of the Booth multiplier;
- two small unsigned array multipliers, a 4x4 and an 8x8, built recursively
  from smaller multipliers. They were reported next to the Booth multiplier
  and are included side by side with it.

The design was rebuilt from a written description and block diagrams. Where that
description was silent or contradicted itself, a choice was made here. The
section "Where this RTL departs from or interprets the source" lists each one.

## Top level and pins

`booth_multipliers` (in `rtl/booth_multipliers.sv`) holds the four multipliers
side by side. They share only the clock:

| prefix | module              | what it is                                  |
|--------|---------------------|---------------------------------------------|
| `b8_`  | `booth_8`           | registered signed Booth multiplier          |
| `b8p_` | `booth_8_pipelined` | the same with one more pipeline stage       |
| `b4_`  | `fourbit_multi`     | combinational unsigned 4x4 array multiplier |
| `ebm_` | `ebm`               | combinational unsigned 8x8 array multiplier |

`booth_8` on its own has these pins:

| pin             | dir | width | meaning                                                 |
|-----------------|-----|-------|---------------------------------------------------------|
| `clk`           | in  | 1     | all registers clock on the rising edge                  |
| `clr`           | in  | 1     | active high: clears every register and the flag         |
| `load`          | in  | 1     | operand registers capture while high                    |
| `operand_a`     | in  | 8     | multiplicand, two's complement                          |
| `operand_b`     | in  | 8     | multiplier, two's complement                            |
| `z`             | out | 16    | product, two's complement                               |
| `end_flag`      | out | 1     | `z` is valid                                            |

Parameters: `WIDTH` (operand width, default 8, must be even) and `BLOCK`
(carry-select block size, default 4). With `WIDTH = 16` the same RTL becomes a
16x16 multiplier with eight Booth units.

## Booth units: one digit per two multiplier bits

Unit *i* (`booth_unit`, `INDEX` = *i*) reads bits b[2i+1], b[2i] and b[2i-1] of
the multiplier, with b[-1] taken as 0. It turns them into the digit
d = -2·b[2i+1] + b[2i] + b[2i-1], which is one of -2, -1, 0, +1 or +2:

| group | digit | | group | digit |
|-------|-------|-|-------|-------|
| 000   | 0     | | 100   | -2    |
| 001   | +1    | | 101   | -1    |
| 010   | +1    | | 110   | -1    |
| 011   | +2    | | 111   | 0     |

Then B = Σ d_i·4^i, so A·B = Σ (d_i·A)·4^i. The unit picks A or 2A. For a
negative digit it inverts that value and adds one. The table lives in
`booth8_pkg::booth_recode`.

Each partial product is sign-extended, but only as far as it needs to go.
Partial product *i* is worth 4^i times its value. Bits above 2·WIDTH of the
product are dropped, so partial product *i* needs only 2·WIDTH − 2i bits. For
the 8-bit multiplier the four units give 16, 14, 12 and 10 bits.

## Adding the partial products without adding zeros

This is the part that is least obvious from the block diagram. One could shift
each partial product left by 2i, fill in zeros and add four 16-bit words. The
adder in `pp_adder` does not. It works as a chain:

```
acc0 = pp0                                   (16 bits)
acc1 = acc0[15:2] + pp1                      (14-bit carry-select adder)
acc2 = acc1[13:2] + pp2                      (12-bit carry-select adder)
acc3 = acc2[11:2] + pp3                      (10-bit carry-select adder)
z    = { acc3, acc2[1:0], acc1[1:0], acc0[1:0] }
```

At each step the two lowest bits of the running sum are final. No later
partial product reaches down to them, so they go straight to the product. The
rest is added to the next partial product by an adder exactly as wide as that
partial product. Every sum is taken modulo its width, and each adder's carry out
is dropped. This is exact: a two's-complement value sign-extended to k bits is
correct modulo 2^k, and after the shift by 2i that becomes modulo 2^16.

Each adder is a `carry_select_adder`. The operands are cut into `BLOCK`-bit
blocks. The lowest block is a ripple-carry adder. Every higher block has two
ripple-carry adders, one assuming a carry-in of 0 and one a carry-in of 1. The
carry from below then only drives a multiplexer. All adders are built from the
gate-level `full_adder` through `ripple_carry_adder`.

## Load, clear and the valid flag

The operand registers (`operand_register`) capture `operand_a` and `operand_b`
on a rising edge while `load` is high, and hold them otherwise. The Booth units
and the adder are combinational. The result register (`result_register`) has no
enable: it takes the sum on every edge. The valid flag (`valid_flag`) is a D
flip-flop that stores the inverse of `load`.

A product is therefore marked valid on the first edge at which `load` is
already low again:

```
edge         k          k+1          k+2
load        1 (capture)  0            0
z           old          A*B          A*B
end_flag    0            1            1
```

If `load` stays high, new operands are captured on every edge and `z` follows
one cycle behind. `end_flag` stays low the whole time, because the operands are
still being loaded. `clr` is synchronous and overrides everything: the operands,
`z` and `end_flag` all become 0. A reader therefore also sees a result that was
just cleared as not valid.

## The pipelined variant

`booth_8_pipelined` has the same pins and arithmetic with one more register
stage:

1. the input registers capture the operands while `load` is high (edge k);
2. the partial products of the four Booth units are stored in
   `pp_pipeline_register`, together with the flag ~`load` (edge k+1);
3. the adder sums the stored partial products, and the result register stores
   the product and the flag (edge k+2).

So the product appears two edges after the load edge. Its flag is high if
`load` was low at edge k+1. One operand pair can enter per cycle. The Booth
recoding and the addition are each one cycle's worth of logic.

## The array multipliers

`fourbit_multi` multiplies two unsigned 4-bit numbers. It splits each operand
into 2-bit halves and uses four 2x2 multipliers (`twobit_multi`):
q0 = aL·bL, q1 = aH·bL, q2 = aL·bH and q3 = aH·bH. Three adders combine them:

```
q4 = q1 + q0[3:2]          fourbit_adder (5-bit sum)
q5 = q2 + (q3 << 2)        sixbit_adder
q6 = q4 + q5               sixbit_adder
c  = { q6, q0[1:0] }
```

`ebm` applies the same scheme one level up. Four `fourbit_multi` cells form
the 8-bit q0..q3, and three adders combine them: an 8-bit `+` for q1 + q0[7:4]
and two 12-bit `ddba` adders for q2 + (q3 << 4) and the final sum. The product
is `{q6, q0[3:0]}`. Neither array multiplier has a clock, and both treat their
operands as unsigned.

## Where this RTL departs from or interprets the source

- **Radix.** The source is titled and keyworded as a radix-8 Booth multiplier.
  Its block diagram shows four Booth units for 8-bit operands, with 16, 14, 12
  and 10-bit outputs. That is two bits per unit, i.e. radix-4 recoding, and the
  RTL follows the diagram. A radix-8 version would need only three units, plus
  a 3A "hard multiple", which the source does not describe.
- **Fixed width.** The source discusses fixed-width multipliers that keep n of
  the 2n product bits and add a compensation bias. The multiplier it draws,
  though, has a 16-bit output for 8-bit operands, and it gives no bias for this
  design. The RTL produces the full, exact 16-bit product and has no truncation
  or bias logic.
- **LOAD edge.** The source calls LOAD "negative edge triggered" while the
  clock is positive-edge triggered. Here `load` is sampled on the rising clock
  edge. Its falling, seen as ~`load` in the valid flip-flop, is what marks the
  product valid.
- **Clear.** The source only says the clear is active high and clears all
  registers. It is synchronous here, and it takes priority over `load`.
- **Number format.** Booth recoding implies two's-complement operands, and both
  Booth multipliers are signed. The array multipliers are unsigned; their
  reported simulation shows unsigned products such as 15·12 = 180.
- **Where the pipelined flag is formed.** The flag is stored with the partial
  products, so that it leaves together with the product it belongs to.
- **Sizes not given.** The carry-select block size (4) and the ripple-carry
  structure of every adder are choices made here.
- **Coding style.** The source built its datapath structurally, without
  processes. The datapath here is structural too, from full adders up. The
  registers are written as `always_ff` blocks.
- **Array-multiplier wiring.** The instance names and adder types of
  `fourbit_multi` and `ebm` follow the reported netlists. Which sum goes into
  which adder was reconstructed: for `fourbit_multi` it matches every readable
  internal value of the reported simulation, and `ebm` repeats the same
  arrangement.

Not modelled: the FPGA-specific results (LUT counts, power, the 144 MHz clock
of the pipelined version). These are properties of one synthesis run, not of
the logic.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. All of them
passed, with no failures:

- `tb_booth_8` and `tb_booth_8_pipelined` try every pair of signed 8-bit
  operands. They check the latency (one and two edges), the flag, the product
  being held, streaming with `load` held high, and clear.
- `tb_booth_unit` tries every operand pair on all four units. `tb_ebm`,
  `tb_fourbit_multi` and the small adders are exhaustive too. The carry-select
  and partial-product adders get random operands and carry-chain corner cases.
- `tb_booth_multipliers` runs the whole top at its default size. It uses the
  extreme operands (−128, 127, 0, ±1 in every combination), random pairs, load
  bursts and a clear in mid-run. It also counts that every Booth digit value,
  the carry-select carry-in-1 path, load pulses, held loads, clears and flag
  rises all occurred.
- `tb_booth16` builds both Booth multipliers with `WIDTH = 16` and checks
  extreme and random 16-bit products.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/booth8_pkg.sv tb/tb_booth_8.sv \
          --top-module tb_booth_8 -Mdir obj_tb_booth_8
./obj_tb_booth_8/Vtb_booth_8
```

To lint a module: `verilator --lint-only -Wall -y rtl rtl/booth8_pkg.sv rtl/booth_8.sv`.
The warnings that remain are expected. They are the unused carry outs of adders
whose sums are taken modulo their width, the unused bits of the extended
multiplier in each Booth unit, and the `digit` outputs of the Booth units, which
exist for observation.

## Files

- `rtl/booth8_pkg.sv`: operand width and the Booth digit type with its
  recoding function
- `rtl/booth_8.sv`, `rtl/booth_8_pipelined.sv`: the two Booth multipliers
- `rtl/booth_unit.sv`, `rtl/pp_adder.sv`, `rtl/carry_select_adder.sv`,
  `rtl/ripple_carry_adder.sv`, `rtl/full_adder.sv`: the datapath
- `rtl/operand_register.sv`, `rtl/result_register.sv`, `rtl/valid_flag.sv`,
  `rtl/pp_pipeline_register.sv`: the registers
- `rtl/fourbit_multi.sv`, `rtl/twobit_multi.sv`, `rtl/fourbit_adder.sv`,
  `rtl/sixbit_adder.sv`, `rtl/ebm.sv`, `rtl/ddba.sv`: the array multipliers
- `rtl/booth_multipliers.sv`: the top level
- `tb/tb_<module>.sv`: one testbench per module, plus `tb/tb_booth16.sv`
