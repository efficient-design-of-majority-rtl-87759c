# Majority-logic approximate adders and an approximate 8x8 multiplier

Quantum-dot cellular automata (QCA) and several other nanotechnologies do not
compute with AND/OR/XOR gates. Their native cell is the three-input **majority
gate** `M(a,b,c) = ab + ac + bc`, plus an inverter. An AND is `M(a,b,0)` and an
OR is `M(a,b,1)`. An XOR, however, costs three majority gates. Exact adders,
which are XOR-heavy, are therefore expensive in these technologies.

This library trades accuracy for fewer majority gates and a shorter critical
path. It has two independent parts:

* **Approximate adders.** Small 2-bit and 4-bit adders are built directly from
  a few majority gates. Most are designed so that the carry out does **not**
  depend on the carry in. A wide adder made by chaining them then has no carry
  chain at all: every output is two gate levels from the inputs, whatever the
  width.
* **An approximate unsigned 8x8 multiplier.** The partial products are reduced
  by an approximate *parallel 6:3 compressor*, which is a single majority gate
  used as an OR. A 7-bit Kogge-Stone adder finishes the upper half of the
  product. The lower half needs no adder.

The whole design is combinational SystemVerilog. It has no clock or reset, and
all its arithmetic is unsigned.

## Building blocks

| module | function | majority gates |
|---|---|---|
| `maj3` | `F = M(A,B,C)` | 1 |
| `ml_half_adder` | `Carry = M(A,B,0)`, `Sum = M(M(A,~B,0), M(~A,B,0), 1)` | 4 |
| `ml_full_adder` | two half adders; `Cout = M(c1, 1, c2)` | 9 |
| `mlapc` | 6:3 compressor, see below | 1 |
| `ksa_adder` | W-bit Kogge-Stone adder with carry in (default W = 16) | – |

`qca_pkg` holds the shared `maj()` function and the `adder_kind_e` enum.

## The approximate adders

All four adders take `a`, `b` and `cin` and produce `{cout, s}`. Each one
approximates `a + b + cin`.

**MLAFA-a** (2 bits; 3 gates, 1 inverter)

    Cout = M(Cin, a1, b1)
    S1   = M(~Cout, a0, b0)
    S0   = M(~Cout, a1, b1)

Exactly half of the 32 input cases are wrong, each by exactly 1. Cout depends
on Cin, so a cascade keeps a one-gate-per-block carry chain.

**MLAFA-b** (2 bits; 4 gates, 2 inverters)

    Cout = M(a1, b0, b1)
    S1   = M( M(0,a0,b0), ~Cout, M(a1,~b0,b1) )
    S0   = Cin

It too is wrong by at most 1, with a summed error of 16. Cin drives only S0,
as a wire, so a cascade has no carry chain. When both operands are equal, the
carry out of each block is the exact carry of `a + a`. That carry lands in the
next block's S0, so **an MLAFA-b cascade adds a number to itself exactly**.

**MLAFA-I** (4 bits; 4 gates, 2 inverters; ignores a0, b0, b1 and Cin)

    Cout  = M(b2, b3, a3)
    S3    = M(~Cout, b2, M(~b2, b3, a3))
    S2=S1 = M(~b2, a1, a2)
    S0    = M(~b2, b3, a3)

**MLAFA-II** (4 bits; 5 gates, 3 inverters; ignores b0, a1 and Cin)

    Cout  = M(b2, b3, a3)
    S3    = M(~Cout, b3, M(b2, ~b3, a3))
    S2=S0 = M(~b2, b1, a2)
    S1    = M(~b2, a2, a0)

`approx_adder_casc #(KIND, WIDTH)` chains WIDTH/2 or WIDTH/4 identical blocks.
Each block's Cout feeds the next block's Cin. The default is two MLAFA-I blocks,
an 8-bit adder. WIDTH = 16 is also supported. Error over all 2^17 inputs of
the 8-bit cascades:

| building block | max error (MAE) | NMED |
|---|---|---|
| MLAFA-a x 4 | 85 | 0.0716 |
| MLAFA-b x 4 | 85 | 0.0745 |
| MLAFA-I x 2 | 85 | 0.0560 |
| MLAFA-II x 2 | 68 | 0.0475 |

NMED is the summed error distance divided by (number of cases x largest exact
result, 511).

## The approximate multiplier (`mlam8`)

`md x mr -> product[15:0]` is built in three steps:
`ml_pp_gen` (partial products) -> `mlam_ppr` (reduction tree) ->
`ksa_adder #(.W(7))` (final adder).

### Partial products

Each partial product `md[i] & mr[j]` is a majority gate with a constant 0. The
reduction tree views them as a diamond. Column k (weight 2^k, k = 0..14) holds
min(k+1, 15-k) products, stacked in rows 1..8. Row r of column k is

    md[k-r+1] & mr[r-1]    for k <= 7
    md[8-r]   & mr[k-8+r]  for k >= 7

The tree reads only 40 of the 64 products. `ml_pp_gen` builds only those 40,
selected by the `PP_USED` mask in `mlam8`.

### The 6:3 compressor (`mlapc`)

One compressor covers two adjacent columns, three rows deep. x1..x3 are the
three bits of the lower column j (weight 1). x4..x6 are the three bits of
column j+1 (weight 2).

    S0   = x2          -> column j
    S1   = x5          -> column j+1
    Cout = M(x6,1,x4)  -> column j+2   (x4 OR x6)

x1 and x3 are thrown away, so the products that would feed them are never
built. Replacing `2*x4 + 2*x6` by `4*(x4|x6)` is exact when x4 = x6. When
exactly one of them is 1, the result is 2 too high. The compressor has no carry
input and sends no carry sideways. Its Cout goes to the next reduction stage,
so no wrong carry ripples along a row.

A partial product of uniformly random operands is 1 with probability 1/4. A
compressor Cout is then 1 with probability 7/16. In stage 2 the 1/4-probability
bits go to the OR inputs (x4, x6) and the 7/16 Cout bits go to x5, which passes
straight through. This is the assignment reported to give the best accuracy.

### Reduction tree (`mlam_ppr`)

Stage 1 treats rows 1-3 and rows 4-6 as two separate groups:

* Rows 1-3: compressors on column pairs (12,11) (10,9) (8,7) (6,5) (4,3).
* Rows 4-6: compressors on column pairs (10,9) (8,7) (6,5).
* Rows 7-8 and the bits outside the boxes pass through. Some are dropped
  because they would land on a discarded x1/x3 input in stage 2.

Stage 2:

* Exact full adders (`ml_full_adder`) on columns 13 and 11.
* Compressors on (9,8) (7,6) (5,4) (3,2).
* A second compressor on column 7 that takes rows 7 and 8.

That is 13 compressors and 2 full adders in all.

Final stage:

* **Columns 8..14** hold two rows, plus a third bit in column 8. The 7-bit
  Kogge-Stone adder adds the two rows, using the third bit as its carry in.
  Its carry out is product bit 15.
* **Columns 0..7** keep one bit each, and that bit is the product bit. The
  second bit in columns 1, 4, 6 and 7 is dropped. No carry crosses from
  column 7 into column 8.
* Product bit 3 is always 0, because the stage-2 compressor on (3,2) has no x5
  input.

### Kogge-Stone final adder (`ksa_adder`)

The adder works in three phases:

1. **Pre-processing:** `p_i = a_i ^ b_i` and `g_i = a_i & b_i`. The carry in is
   folded into bit 0 as `g_0 | (p_0 & cin)`.
2. **Prefix tree:** ceil(log2 W) levels. At span d, bit i merges its group
   with that of bit i-d. The cell used depends on where the merged group ends:
   * a black cell (G and P) while the merged group does not reach bit 0;
   * a gray cell (G only) once it does;
   * a buffer for bits below d.
3. **Post-processing:** `s_i = p_i ^ G_{i-1:0}`.

The default 16-bit instance has four levels.

### Accuracy

Over all 65536 operand pairs:

* The mean error distance is 2.79% of the largest exact product (NMED 0.0279).
* The largest error is 7690, at 255 x 255 (the result is 57335 instead of
  65025).
* 581 products are exact.

About 63% of products come out high, because of the OR carries. About 36% come
out low, because of the dropped products and bits.

## Top level (`qca_approx_top`)

The multiplier and the four adder cascades sit side by side and share no
logic:

* `md`, `mr` -> `product`
* `a`, `b`, `cin` -> `sum_a`, `sum_b`, `sum_i`, `sum_ii` (ADD_W+1 bits each)

`ADD_W` defaults to 8.

## How this RTL relates to the published design

Followed directly from the published design:

* Every gate equation above.
* The compressor's gate.
* The number and placement of compressors and full adders in the reduction
  dot diagram.
* The 7-bit Kogge-Stone final adder and its cell types.

Filled in or decided here:

* **Compressor input weights.** The input numbering and the output weights of
  the 6:3 compressor come from its dot diagram. The Cout outputs of stage 1
  then fall exactly on the positions marked as 7/16-probability bits.
* **Which product goes in which row.** The mapping of individual products to
  diamond rows follows the published 4x4 diamond, extended to 8 bits. The
  published design states that the stage-1 assignment does not matter.
* **Pairings inside column 7 and the dropped bits.** Two choices are not shown
  in the published diagram:
  * which bits of column 7 pair up in stage 2;
  * which bit of columns 1, 4, 6 and 7 is dropped.

  They were chosen so that this design reproduces, bit for bit, two of the
  four products in the published simulation waveforms:
  `36 x 129 -> 0x2000` and `13 x 141 -> 0x09A1`. The other two published
  products (`9 x 99 -> 0x0811` and `101 x 18 -> 0x0880`) differ from this
  design's (`0x0511` and `0x0500`). No reading of the diagram that was tried
  matches all four, so treat the exact bit-level behaviour of the multiplier
  as a reconstruction.
* **MLAFA-b S1 equation.** The published equation for MLAFA-b's S1 is
  `M(M(0,a0,b0), ~Cout, M(a0,~b0,b1))`. The schematic wires the side gate to
  a1, ~b0 and b1 instead. The schematic's version gives the stated summed
  error of 16; the printed one gives 24. This RTL uses the schematic's.
* **Kogge-Stone carry in.** The Kogge-Stone adder gains a carry input, which
  the 16-bit reference drawing lacks. Its prefix cells are written as plain
  AND/OR logic, not as majority gates.
* **Exact full adder.** The two exact full adders in the tree are the
  half-adder-based `ml_full_adder`. The published material does not say which
  exact full adder the multiplier uses.
* **Unused ports.** MLAFA-I and MLAFA-II keep a `cin` port that they ignore.
  `mlapc` keeps x1 and x3 as unused ports. This keeps the interfaces uniform.

Not included: the baseline designs the published work only compares against.
These are:

* the exact 4:2 compressor;
* the 4:2-compressor Dadda multiplier;
* the ripple-carry final adder of the earlier multiplier;
* mixed cascades such as MLAFA-I feeding MLAFA-b.

The neural-network accelerator that uses the multiplier is not described in
enough detail to build.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb_ref_pkg` restates every published
equation in plain Boolean form, and the expected totals (error sums, maximum
errors, FNV-1a checksums of all results) come from an independent software
model.

| testbench | what it covers |
|---|---|
| `tb_maj3`, `tb_ml_half_adder`, `tb_ml_full_adder`, `tb_mlapc` | exhaustive |
| `tb_mlafa_a` | all 32 cases against the 16-row table of changed outputs |
| `tb_mlafa_b`, `tb_mlafa_i`, `tb_mlafa_ii` | exhaustive, plus error totals |
| `tb_approx_adder_casc` | all four 8-bit cascades over 2^17 inputs; 16-bit MLAFA-I on random operands |
| `tb_ksa_adder` | 16-bit on corner cases and random operands; 7-bit exhaustive |
| `tb_ml_pp_gen` | all operands, full and masked arrays |
| `tb_mlam_ppr`, `tb_mlam8` | all 65536 operand pairs; the two waveform products |
| `tb_qca_approx_top` | whole design at default parameters, every input; counts each mechanism (see below) |
| `tb_image_workload` | 64x64 synthetic image: add to itself with each adder, multiply by its transpose; PSNR |

`tb_qca_approx_top` counts how often each of these happens:

* exact, high and low products;
* a carry into product bit 15;
* carries between MLAFA-a blocks;
* Cin passing through MLAFA-b;
* Cin being ignored by MLAFA-I and MLAFA-II.

On the synthetic image, adding the image to itself gives these PSNRs:

| adder | PSNR |
|---|---|
| MLAFA-a | 22.0 dB |
| MLAFA-b | infinite |
| MLAFA-I | 26.1 dB |
| MLAFA-II | 33.1 dB |

The multiplier reaches 29.3 dB on the image-times-transpose product.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/qca_pkg.sv tb/tb_ref_pkg.sv tb/tb_qca_approx_top.sv \
        --top-module tb_qca_approx_top -o sim
    ./obj_dir/sim

To run another block's test, substitute its testbench for
`tb/tb_qca_approx_top.sv` and `--top-module`. Each test takes well under a
second.

To lint a module:

    verilator --lint-only -Wall -Irtl rtl/qca_pkg.sv rtl/mlam8.sv

That prints one expected warning: the group-propagate bits of the last
Kogge-Stone level are unused.

### Changing the design

* **Adder building block or width:** set `KIND` and `WIDTH` on
  `approx_adder_casc`. WIDTH must be a multiple of the block width.
* **Reduction wiring:** edit `mlam_ppr`. Each compressor instance is
  commented with the columns it reads. If you change which products the tree
  reads, update `PP_USED` in `mlam8` to match.
