# Fixed-width radix-4 Booth multiplier with data scaling (DST-FWBM)

A fixed-width multiplier takes two L-bit two's complement operands and returns
only the upper L bits of their 2L-bit product, `Pq ≈ X·Y / 2^L`. DSP datapaths
such as FIR filters and DCTs use this form because the word width stays the same
from stage to stage. The cheap way to get it is to skip the low half of the
partial-product array altogether. The price is a truncation error, which a
compensation term then estimates.

This design adds **data scaling** (DST) to a low-error fixed-width Booth
multiplier. A small multiplicand carries redundant sign bits: its top bits are
all copies of the sign. Such a multiplicand is shifted left before it is
multiplied, so the multiplier works on more significant bits of it. The result
is shifted back by the same amount afterwards. Any error made inside the
multiplier is divided by `2^sh` on the way out, where `sh` is the scaling shift.
The hardware cost is two rows of multiplexers and a few gates.

Everything is combinational: no clock, no reset, no handshake. The output is
valid one propagation delay after the inputs change.

```
            +--------------+  xd   +--------------------------------------+  pd   +---------------+
  x ------->| ds_in_scaler |------>| fwbm_core                            |------>| ds_out_scaler |---> pq
            | count        |       |  booth_encoder x Q, booth_pp_row x Q |       | arithmetic    |
            | redundant    |       |  csa_tree (Q+1 rows -> 2)            |       | shift right   |
            | sign bits    |       |  ksa_adder (Kogge-Stone)             |       | by sh         |
            +------+-------+       +------------------^-------------------+       +-------^-------+
                   | sh                               | sh (rounding position)            |
                   +----------------------------------+-----------------------------------+---> sh
  y -------------------------------------------------^ (multiplier)
```

The default size is L = 8 with one scaling bit (DSB = 1).

## How the core estimates the product

`fwbm_core` is where the approximation happens, and the only part that needs
close reading.

**Booth rows.** The multiplier Y is recoded in radix 4. Each overlapping group
`{y(2i+1), y(2i), y(2i-1)}`, with `y(-1) = 0`, becomes a digit
`E_i ∈ {-2, -1, 0, +1, +2}`. An L-bit multiplier therefore gives Q = L/2 rows.
`booth_encoder` turns each group into `{neg, one, two, nz}`, where `nz` (the
nonzero code) is 1 when `E_i ≠ 0`. `booth_pp_row` forms the L+1 bits of `E_i·X`.
It selects X or 2X and inverts the bits for a negative digit. The +1 that
completes the two's complement belongs at column 2i. The row's MSB is inverted
as well. A single constant, `-2^L · Σ 4^i`, then stands in for the sign
extension of every row.

**What is kept.** Row i, bit j sits at column 2i+j of the 2L-column array. The
columns are split into three parts:

```
 column:  2L-1 ............ L | L-1  | L-2 | L-3 ... 0
          main part (MP)      | TPma |      TPmi
          kept, exact         | kept | each row's bit replaced by nz_i; rest dropped
```

* Columns L to 2L-1 (MP) are kept exactly.
* Column L-1 (TP_ma, the most significant truncated column) is kept exactly. Its
  carries into MP are then right.
* Column L-2 is where the rest of the truncation part (TP_mi) begins. There each
  row contributes its nonzero code `nz_i` instead of its own partial-product bit.
  A nonzero row has bits that are 1 about half the time. Those bits and the ones
  below them add up to roughly one unit of column L-2. A zero row contributes
  nothing.
* Everything below column L-2 is dropped. That includes the +1 of each negative
  row, which always falls at column 2i ≤ L-2.
* A rounding bit is added at column `L-1+sh`.

The kept window is L+2 bits wide (columns L-2 to 2L-1) and holds Q+1 rows: the Q
Booth rows and one constant row. The constant row carries the sign-extension
constant and the rounding bit. `csa_tree` reduces these rows to two, using levels
of word-level 3:2 carry-save adders (Wallace style). `ksa_adder`, a Kogge-Stone
adder, adds the last two rows. Its gray and black prefix cells are in
`gray_cell` and `black_cell`. The output `pd` is bits L to 2L-1 of the sum.

At L = 8 and DSB = 1 the core is 4 Booth rows, a 5-row CSA tree three levels
deep, and a 10-bit Kogge-Stone adder with 4 prefix levels.

## Data scaling and where the rounding goes

`ds_in_scaler` computes `sh`: how many of the bits below the sign bit copy it,
up to DSB. It then outputs `xd = X · 2^sh`. With DSB = 1 this is a single select,
`sh = (x[L-1] == x[L-2])`, driving a row of L two-input muxes that choose
between x_i and x_(i-1). The core then computes `pd ≈ X·Y·2^sh / 2^L`.
`ds_out_scaler` shifts `pd` right arithmetically by `sh`, using L-1 muxes (the
top bit passes straight through).

The right shift drops `sh` bits, so rounding once in the core and then
truncating again would waste part of the gain. Instead, `sh` is also fed into the
core. There it moves the rounding bit from `2^(L-1)` to `2^(L-1+sh)`, so the
final, shifted result is rounded to nearest once. This is the one place where
the scaling logic touches the core's arithmetic, and it matters. Without it, a
model of the same circuit with DSB = 1 does worse than no scaling at all
(33.9 dB against 34.3 dB).

## Accuracy

All 65,536 operand pairs at L = 8 were simulated. The error is measured against
the exact product X·Y, and SNR = `Σ(XY)² / Σ(XY − Pq·2^L)²`:

| multiplier                                          | SNR (dB) |
|-----------------------------------------------------|---------:|
| direct truncation (`floor(XY / 2^L)`)               | 31.47 |
| this core without scaling (DSB = 0)                 | 34.30 |
| **DST-FWBM, DSB = 1 (default)**                     | **35.16** |
| DST-FWBM, DSB = 2                                   | 35.31 |
| DST-FWBM, DSB = 3                                   | 35.33 |
| post-truncated: exact product, rounded to L bits    | 37.37 |

The largest absolute error is 1.5 LSB of the output. Going from no scaling to
one scaling bit gains 0.86 dB, and each further bit gains much less. That is why
DSB = 1 is the default: after the first bit, extra mux inputs buy little.
Example: 63 × 62 = 3906, which is 15.26 output LSBs. The multiplier returns 16
(the scaled path is taken).

## Interface and parameters

`dst_fwbm` (top):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`  | in  | L | multiplicand, two's complement |
| `y`  | in  | L | multiplier, two's complement |
| `pq` | out | L | fixed-width product ≈ X·Y / 2^L, two's complement |
| `sh` | out | max(1, ⌈log2(DSB+1)⌉) | scaling shift that was used (with DSB = 1: 1 when `x[L-1] == x[L-2]`) |

| parameter | default | constraint |
|-----------|---------|------------|
| `L`   | 8 | even, ≥ 4 |
| `DSB` | 1 | 0 ≤ DSB ≤ L-2; 0 removes scaling (`sh` is then always 0) |

The submodules are parameterised the same way. `ksa_adder` has its own `WIDTH`,
with a default of 16; the core instantiates it at L+2. `csa_tree` takes `N` rows
of `W` bits and needs W ≥ 2.

Shared type: `fwbm_pkg::booth_code_t` = `{neg, one, two, nz}`.

## Where this follows the original proposal and where it does not

These parts follow the DST-FWBM architecture as published:

* the split into a DS stage on the multiplicand, a Booth encoder, a CSA tree
  over MP, TP_ma and TP_mi, a parallel-prefix adder and a DS stage on the
  product;
* the two-input mux rows for one scaling bit;
* DSb = 1 as the chosen configuration;
* the Kogge-Stone adder with black and gray operators.

The following are choices of this implementation, made where the published
description gives no detail:

* **The compensation for TP_mi** is the nonzero-code term in column L-2 plus a
  rounding bit. The original design uses a low-error compensation whose
  circuit is not given. Expect the SNR figures above to differ from the
  original ones.
* **The rounding position is moved by `sh`**, as described above. The published
  block diagram shows the scaling select wired into the CSA tree but does not
  say what it does there.
* **The select rule.** `sh` counts redundant sign bits. For DSB > 1 the muxes
  have DSB+1 inputs. Only the one-bit form is drawn in the original; the general
  form follows its area description (D = DSb + 1 mux inputs).
* **The output width.** The output is the L-bit fixed-width product. A
  simulation of the original shows an exact 15-bit product for 8-bit operands
  instead, which does not match its own fixed-width architecture.
* **The `sh` output** is extra. It shows which path was taken.
* **Sign extension** uses the inverted-MSB-plus-constant method rather than
  repeated sign bits.
* **Carry-in.** The adder folds the carry-in into bit 0's generate signal.
* **Tree shape.** The CSA tree is Wallace-style.

Not included: the FPGA timing, area and power figures of the original (24.25 ns
combinational delay on a Spartan-3E). They are implementation results, not
behaviour.

## Files

`rtl/`: `dst_fwbm` (top), `ds_in_scaler`, `ds_out_scaler`, `fwbm_core`,
`booth_encoder`, `booth_pp_row`, `csa_tree`, `csa_3to2`, `ksa_adder`,
`black_cell`, `gray_cell` and `fwbm_pkg`. There is one module or package per
file, and each file starts with a description of what it does.

`tb/`: one self-checking testbench per module, named `tb_<module>`. Each ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_dst_fwbm` runs the top at its default parameters over all operand pairs.
  It checks every output against an integer model, checks the 1.5 LSB error
  bound, and requires SNR to be ordered as direct truncation < no scaling <
  DST < post-truncated.
* `tb_dsb_sweep` compares DSB = 0 to 3.
* `tb_fwbm_core`, `tb_ksa_adder` (exhaustive at 10 bits), `tb_booth_pp_row`,
  `tb_ds_in_scaler` and `tb_ds_out_scaler` are exhaustive.
* `tb_csa_tree` is random.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing -Irtl -y rtl rtl/fwbm_pkg.sv tb/tb_dst_fwbm.sv \
          --top tb_dst_fwbm --Mdir obj_dst
./obj_dst/Vtb_dst_fwbm
```

Substitute any other testbench name. Each one finishes in well under a second.
To try another size, change `L` or `DSB` on `dst_fwbm`. The testbenches'
reference models take `L` from their own localparam, and the 1.5 LSB bound was
only established for L = 8.
