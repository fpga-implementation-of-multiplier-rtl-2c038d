# Combinational IEEE 754 single-precision multiplier

This is a small floating-point multiplier for the IEEE 754 binary32 format. It
is written so that each arithmetic step is a separate, visible block. The
significands are multiplied by an unrolled shift-and-add multiplier. A
two-case normalisation unit follows. Two 8-bit exponent adders, each built
from a pair of 4-bit carry look-ahead adders, handle the exponent. The whole
datapath is combinational: there is no clock and no register. A product
appears on the outputs one propagation delay after the operands change.

A seven-segment display driver sits alongside the core for a development
board demonstration. It shows the leading bits of both operands and of the
result, so that a product such as 28 x 20 = 1.000110000b x 2^9 can be read off
the board.

## Number format

A binary32 number has three fields:

| bits  | field | meaning                                                   |
|-------|-------|-----------------------------------------------------------|
| 31    | s     | sign, 1 = negative                                        |
| 30:23 | e     | exponent, stored with a bias of 127 (e = E + 127)         |
| 22:0  | f     | fraction; the significand is 1.f (the leading 1 is hidden) |

The value is (-1)^s x 1.f x 2^(e-127). The core takes the three fields of each
operand on separate pins (`s1 e1 f1`, `s2 e2 f2`) and returns the product the
same way (`sout eout fout`). That gives 2 x 32 + 32 = 96 pins.

## Datapath

```
 f1 ──► {1,f1} ─┐                      ┌── np[22:0] ──────────────► fout
                ├► multiplier ─ p[47:0] ─► normalize
 f2 ──► {1,f2} ─┘   (24x24)             └── shift (127 | 128) ─┐
                                                               ▼
 e1 ─┐                                                      hadder a3 ──► eout
     ├► hadder a2 ── e_inter = e1 + e2 - 127 ──────────────────►
 e2 ─┘
 s1, s2 ──► XOR ──────────────────────────────────────────────────────► sout
```

1. **Sign.** `sout = s1 ^ s2`.
2. **Significand product.** The hidden 1 is prepended to each fraction, and the
   two 24-bit significands are multiplied into a 48-bit product `p`.
3. **Normalisation.** Both significands lie in [1, 2), so `p` lies in [1, 4).
   Its leading 1 is therefore either bit 47 or bit 46 (see below).
4. **Exponent.** Two adders in series give
   `eout = e1 + e2 - 127 + p[47]` (see below).

### Why the exponent passes through two adders

Each stored exponent carries the bias once, so `e1 + e2` carries it twice.
Every `hadder` therefore subtracts 127 after adding its two inputs, and its
output is a correctly biased exponent again:

    hadder(x, y) = (x + y - 127) mod 256

The first adder gives the intermediate exponent `e1 + e2 - 127`. The
normalisation unit does not give its correction as a plain 0 or 1. It gives
the correction *in biased form*: 127 + 0 or 127 + 1. This lets the second
adder be an identical `hadder`, which removes that bias again. Worked example:

| operands                              | e_inter          | p[47] | shift | eout                |
|---------------------------------------|------------------|-------|-------|---------------------|
| (132, 1.01b) x (60, 1.11b) = 10.0011b | 132+60-127 = 65  | 1     | 128   | 65+128-127 = **66** |
| (132, 1.001b) x (60, 1.01b) = 1.01101b | 65              | 0     | 127   | 65+127-127 = **65** |

These are the two reference vectors used in the testbenches. Both have signs
0 and 1, so `sout = 1`. The resulting fractions are `00011000…` and `01101000…`.

### Normalisation (`normalize`)

| condition  | product form | np (24 bits)   | shift |
|------------|--------------|----------------|-------|
| p[47] = 1  | 1x.xxxx…     | p[47:24]       | 128   |
| p[47] = 0  | 01.xxxx…     | p[46:23]       | 127   |

`fout` is `np[22:0]`. The hidden bit `np[23]` is always 1 and is dropped. The
low product bits that do not fit are discarded. In other words, the result is
**truncated** (rounded toward zero), not rounded to nearest.

### Shift-add multiplier (`multiplier`)

This is the pencil-and-paper algorithm:

```
P = 0
for i = 0 .. N-1:  if b[i]: P = P + (a << i)
```

It is unrolled into a chain of N adders of 2N bits each, so it is fully
combinational. For N = 24 the chain has 24 adders, and its delay is the
critical path of the whole design. The width is a parameter (`N`, default 24).
The board demonstration variant described below was also checked at N = 5.

### Hierarchical exponent adder (`hadder`, `cla`)

`cla` is a 4-bit carry look-ahead adder. Every carry is computed directly from
the generate (`x & y`) and propagate (`x ^ y`) terms and the carry input. A
carry does not wait for the one below it. `hadder` chains two of them: the low
CLA adds bits 3:0, and its carry out feeds the carry input of the high CLA,
which adds bits 7:4. A constant adder then subtracts the bias. `cout` is the
high CLA's carry, taken before the bias is removed. The core does not use it.

## Board top and display (`fpmul_de2`, `s7d`)

`fpmul_de2` is the top level. It exposes all 96 pins of the core and eight
seven-segment outputs `hex[7:0]`, each 7 bits wide:

| digits     | shows                                                                  |
|------------|------------------------------------------------------------------------|
| HEX7 HEX6  | operand A's hidden bit and `f1[22:19]` as a decimal number (16..31)      |
| HEX5 HEX4  | operand B's hidden bit and `f2[22:19]`, the same way                     |
| HEX3..HEX0 | `fout[22:19]`, one binary digit per display, most significant on HEX3  |

For 28 = 1.1100b x 2^4 and 20 = 1.0100b x 2^4 (`e1 = e2 = 131`), the display
reads `28 20 0001`, and `eout = 136` (2^9).

Segments are active low: a 0 lights a segment. Bit 0 is segment a and bit 6 is
segment g, which is the usual convention for the displays of Altera's DE2
board. The pin assignment to a particular board is not part of this RTL.

The original board demonstration used a cut-down datapath: 5-bit significands
straight from slide switches, fixed exponents, and a 4-bit fraction output.
This top keeps the full binary32 core instead and takes the display digits
from the leading bits. It shows the same digits for the same numbers. For a
5-bit variant, instantiate `multiplier #(.N(5))` and `normalize #(.N(5))`
with two `hadder`s, as `fpmul` does at N = 24.

## What this design does not do

The multiplier is correct for **normal** operands whose product exponent
stays within 1..254. Outside that range it does not follow IEEE 754:

- The hidden bit is always taken as 1. A zero or subnormal operand gives a
  wrong (non-zero) result.
- Infinity and NaN are not recognised.
- No overflow or underflow is detected: the exponent wraps modulo 256.
- Results are truncated, not rounded to nearest even. No inexact flag is
  produced.

The resources of the original FPGA build were 96 I/O pins and no registers.
This RTL matches both: `fpmul` has 96 ports and no flip-flops.

## Files

| file                  | contents                                                        |
|-----------------------|-----------------------------------------------------------------|
| `rtl/fpmul_pkg.sv`    | field widths and exponent bias                                     |
| `rtl/cla.sv`          | 4-bit carry look-ahead adder                                     |
| `rtl/hadder.sv`       | 8-bit adder from two CLAs, minus the bias                        |
| `rtl/multiplier.sv`   | N x N shift-add multiplier                                       |
| `rtl/normalize.sv`    | two-case normaliser with biased shift output                     |
| `rtl/fpmul.sv`        | binary32 multiplier core                                         |
| `rtl/s7d.sv`          | seven-segment display driver                                     |
| `rtl/fpmul_de2.sv`    | top: core plus display                                           |
| `tb/tb_<module>.sv`   | one self-checking testbench per module                           |

Hierarchy: `fpmul_de2` → `fpmul` (`multiplier`, `normalize`, 2 × `hadder` → 2 ×
`cla`) and `s7d`.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fpmul_pkg.sv tb/tb_fpmul_de2.sv --top-module tb_fpmul_de2 -o sim
./obj_dir/sim
```

For lint only: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv
rtl/fpmul_pkg.sv rtl/fpmul_de2.sv`. The package must be read first.

What the testbenches check:

- `tb_cla`: all 512 input combinations.
- `tb_hadder`: all 2^17 input combinations.
- `tb_multiplier`: corner cases and 20,000 random 24-bit operand pairs
  against `*`, and all 1,024 pairs at N = 5.
- `tb_normalize`: both cases, the worked examples, and random products of two
  significands.
- `tb_fpmul`: the two reference vectors, and 20,000 random normal operands.
  Each result is checked bit for bit against an integer reference. It is also
  checked as a number against the exact real product: right sign, and
  |result| ≤ |a·b| < |result| + 1 ulp.
- `tb_s7d`: every displayed digit against standard segment codes.
- `tb_fpmul_de2`: end to end at the only (full) size. It checks the reference
  vectors, the board sequences and 5,000 random products with the display.
  It counts how often the product needed the normalising shift and how often
  it did not, and how often the sign was negative and positive. It fails if
  any of the four never occurred.

All the testbenches apply inputs and sample the outputs 1 time unit later,
because the design is purely combinational. Gate delays and glitches are not
modelled.
