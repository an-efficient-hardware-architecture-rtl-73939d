# H.264 transform and quantisation engine with one reconfigurable datapath

This is the residual-coding core of an H.264 / MPEG-4 AVC encoder. It takes the
prediction residual of one macroblock and produces two results. The first is the
quantised transform coefficients (levels) for the entropy coder. The second is the
reconstructed residual, which is what a decoder would rebuild from those levels and
what the encoder needs for its own reconstruction loop.

The point of the architecture is economy. All six operations run on two small
shared datapaths:

- forward 4x4 integer transform
- 4x4 and 2x2 Hadamard transforms (forward and inverse)
- quantisation
- inverse quantisation
- inverse 4x4 integer transform

One datapath is the transform datapath: three adder/subtractors, four operand
registers and one-bit shifters. The other is the quantiser, which has a single
15x14-bit multiplier. A control unit reconfigures both block by block. The
transform datapath produces one coefficient per clock. Quantisation overlaps with
it, so each coefficient is quantised in the cycle after it is produced.

A macroblock takes **2291 cycles** when it is Intra 16x16 and **2201 cycles**
otherwise. At 120 MHz a VGA frame (1200 macroblocks) then takes about 2.7 ms. That
is about 45 frames per second. The real-time target of 39 VGA frames per second at
120 MHz allows 2564 cycles per macroblock.

The input register file is needed only during the forward phase. After that
phase the next macroblock can be written into it while the current one is still
being reconstructed. Run back to back this way, macroblocks start every 2292
cycles (Intra 16x16) or 2202 cycles (others), counting the cycle for `start`.
Loading then costs no extra time.

## Macroblock flow

A macroblock has 16 luma 4x4 blocks, 8 chroma 4x4 blocks and up to three DC
blocks. These are the DC blocks:

- the 4x4 block of the 16 luma DC coefficients, used only in Intra 16x16
  macroblocks. It is called block −1 here.
- two 2x2 blocks with the DC coefficients of Cb and of Cr, always used.

A DC block can only be transformed after every 4x4 block that feeds it has been
forward-transformed. Likewise, a 4x4 block's reconstruction needs its DC value back
from the inverse DC path. So the control unit runs the macroblock in four phases:

| phase | blocks | work |
|---|---|---|
| 1 | luma 0..15, then chroma 18..25 | forward integer transform, quantisation. The DC coefficient is also written to the DC register file when the block belongs to a DC block; its level in the block is then 0. |
| 2 | luma DC (slot 26), Intra 16x16 only | 4x4 Hadamard, result halved. DC quantisation. DC inverse quantisation. Inverse 4x4 Hadamard with (x+32)>>6. The results go back to the DC register file. |
| 3 | Cb DC (16), then Cr DC (17) | 2x2 Hadamard. DC quantisation. DC inverse quantisation. Inverse 2x2 Hadamard with >>5. The results go back to the DC register file. |
| 4 | luma 0..15, then chroma 18..25 | Inverse quantisation of 16 levels into the IQIT register file. Coefficient 0 comes from the DC register file where a DC path was used. Then the inverse integer transform, whose output is the reconstructed residual. |

Within each block the order is fixed: quantisation, then inverse quantisation,
then inverse transform. Inverse quantisation uses the multiplier, so it runs as
its own 16-cycle step and does not overlap with the forward quantisation.

In the DC paths, inverse quantisation comes before the inverse Hadamard, which is
the reverse of the order in the H.264 decoder. The results are still bit-exact
with the standard. The two steps are linear and use one rescaling factor V(0,0)
for the whole DC block. Also, (x·2^k + 32) >> 6 equals the standard's
(x + 2^(5−k)) >> (6−k).

Cycle budget:

| step | cycles |
|---|---|
| forward work, per 4x4 block | 37 |
| inverse work, per 4x4 block (16 inverse quantisation + 37 inverse transform) | 53 |
| luma DC path | 90 |
| both chroma DC paths | 41 |

An Intra 16x16 macroblock therefore takes 24·37 + 24·53 + 90 + 41 = 2291 cycles.
Other macroblocks skip the luma DC path and take 2201 cycles.

## Transform datapath (`transform_datapath`)

The 2-D transform Y = A·X·Aᵀ is computed as two passes of 1-D four-point
transforms:

- **Pass 1** (first matrix multiplication): each row of X is read from the source
  register file, one row per 4 cycles. The first row of multiplexers chooses the
  source: the input RF for the forward transform, otherwise the IQIT or DC RF.
  The four outputs of a row are written to a 16-entry transpose register file.
- **Pass 2** (second matrix multiplication): one column of the pass-1 results is
  loaded into **registers 0–3**. Four cycles later the next column is loaded. The
  second row of multiplexers feeds the adders from the pass-1 source or from
  registers 0–3.

Each 1-D output is built in two pipeline stages:

1. Adder/subtractors 0 and 1 form the butterfly terms. The **P registers** hold
   them.
2. One-bit shifters and adder/subtractor 2 combine them into the output. Pass-1
   outputs go to the transpose RF. Pass-2 outputs go through an output-scaling
   step into **register 4**, which feeds the quantiser or the destination.

Phase p = 0..3 of each 1-D transform:

| mode | adder 0 (p0,p1 / p2,p3) | adder 1 | adder 2, phases 0,1,2,3 | outputs in order |
|---|---|---|---|---|
| forward integer | a0+a3 / a0−a3 | a1+a2 / a1−a2 | s+s, s−s, 2d+d, d−2d | 0, 2, 1, 3 |
| Hadamard 4x4 | a0+a3 / a0−a3 | a1+a2 / a1−a2 | +, −, +, − | 0, 2, 1, 3 |
| inverse integer | a0+a2 / a0−a2 | a1+a3/2 / a1/2−a3 | +, −, +, − | 0, 3, 1, 2 |
| Hadamard 2x2 | a+b / a−b | c+d / c−d | +, −, +, − | 0, 2, 1, 3 |

The order was chosen so that adders 0 and 1 see the same inputs and operation for
two cycles in a row, which cuts switching activity. For the forward transform the
shifter doubles an adder-0/1 result before adder 2. For the inverse transform it
halves an adder-1 input.

The 2x2 Hadamard has no pass 1. Its four values are loaded into registers 0–3
directly, in the order a, c, d, b.

Output scaling, chosen per block by the control unit:

| scaling | used for |
|---|---|
| none | forward transform, chroma DC forward |
| >>1 | forward luma DC Hadamard |
| (x+32)>>6 | inverse transform, inverse luma DC Hadamard |
| >>5 | inverse chroma DC Hadamard |

The inverse transform follows the standard exactly: rows first, then columns, with
the arithmetic >>1 inside each 1-D transform.

Timing: a 4x4 block takes 36 cycles from start to start. The outputs are valid 21
to 36 cycles after the start edge. A 2x2 block takes 7 cycles.

All values are 16-bit two's complement and wrap on overflow. The `addsub`
adder/subtractors can be built in a carry-save form (the default) or as a ripple
chain, set by the `CARRY_SAVE` parameter. Both give identical results.

## Quantiser (`quant_datapath`, `quant_luts`)

With k = ⌊QP/6⌋ and qbits = 15 + k:

| mode | result |
|---|---|
| quant, AC | Z = sign(W) · ((\|W\|·MF + f) >> qbits) |
| quant, DC | Z = sign(W) · ((\|W\|·MF(0,0) + 2f) >> (qbits+1)) |
| inverse quant | W′ = sign(Z) · ((\|Z\|·V) << k) |
| inverse quant, DC | W′ = sign(Z) · ((\|Z\|·V(0,0)) << k) |

MF and V are the H.264 tables, indexed by QP mod 6 and by the position class:
both indices even, both odd, or mixed. They sit in `quant_luts`. The rounding
offset f is ⌊2^qbits/3⌋ for intra macroblocks and ⌊2^qbits/6⌋ for inter
macroblocks. These are the values of the H.264 reference encoder. f is made by
shifting the constant 0x555555 right, because ⌊2^n/3⌋ is the top n bits of
that bit pattern.

The datapath is one multiplier with a multiplexer on each input:

- data input: the transform result (forward) or the stored level (inverse)
- table input: MF (forward) or V (inverse)

After the multiplier come the rounding adder, the variable shifter (right by
qbits, or left by k) and the conversion back to two's complement. The data
operand's magnitude is limited to 15 bits. The result saturates at ±32767.
Latency is one cycle, and one operation is accepted per cycle.

## Register files (`reg_file`)

Every register file is one generic module. It has one synchronous write port, one
asynchronous scalar read port and one asynchronous read port that returns four
entries at addresses `base + i·VSTRIDE`.

| instance | size | contents | 4-wide read |
|---|---|---|---|
| input RF | 384 × 9 | residual of one 4:2:0 macroblock | row of a block |
| transpose RF (in the transform datapath) | 16 × 16 | pass-1 results | column |
| IQIT RF | 16 × 16 | inverse-quantised block being reconstructed | row |
| DC RF | 24 × 16 | luma DC 0..15 (raster), Cb DC 16..19, Cr DC 20..23 | row |
| TQ RF | 432 × 16 | levels of all 27 block slots, 16 entries per slot | row (external port) |

## Interface (`tq_top`)

| signal | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `in_we`, `in_addr[8:0]`, `in_data[8:0]` | in | write one residual sample while `in_ready` is high (see the address map below). Writes while it is low are ignored. |
| `start`, `qp_y`, `qp_c`, `intra`, `i16` | in | start a macroblock (one-cycle pulse). `qp_y` and `qp_c` are the luma and chroma QPs (0..51). `intra` selects the intra rounding offset. `i16` enables the Intra 16x16 luma DC path. |
| `busy`, `done` | out | `busy` stays high until `done` pulses. A new `start` is accepted once `busy` is low. |
| `in_ready` | out | the input RF accepts writes. It is high when idle and after the forward phase (phase 1), so the next macroblock can be loaded during reconstruction. |
| `coef_valid`, `coef_blk`, `coef_pos`, `coef_data` | out | each level as it is written to the TQ RF: block slot, raster position i·4+j, value |
| `rec_valid`, `rec_blk`, `rec_pos`, `rec_data` | out | each reconstructed residual sample |
| `tq_rrow`, `tq_rrow_data` | in/out | asynchronous read of four levels: row `tq_rrow` = 4·slot + row |

Address map of the input RF:

- luma block b (0..15, raster order in the 16x16 macroblock): address
  16·b + 4·i + j
- chroma block b (18..21 Cb, 22..25 Cr, each in 2x2 raster order): address
  256 + 16·(b−18) + 4·i + j

Slot numbers:

| slot | contents |
|---|---|
| 0..15 | luma |
| 16 | Cb DC (positions 0..3 used) |
| 17 | Cr DC (positions 0..3 used) |
| 18..25 | chroma |
| 26 | luma DC (block −1) |

The quantised levels stay in the TQ RF until the next `start`.

## Number ranges and limits

The transform registers are 16 bits wide, so some legal but extreme inputs
overflow:

- The worst case is a full-scale residual whose DC is pushed through the 4x4 luma
  DC Hadamard and its inverse.
- The inverse-quantised level is saturated at 16 bits.
- The forward data operand is limited to 15 bits.

Typical residuals stay well inside these limits. If full-range conformance is
needed, widen `tq_pkg::DW` (together with the quantiser's `MA_W`).

## What follows the source architecture and what is this design's own

These parts follow the source architecture:

- the set of units: the input register file of 384 × 9 bits, the IQIT and TQ
  register files, and the reconfigurable datapath with its control unit
- the first and second rows of multiplexers, registers 0–3, the three
  adder/subtractors, the P registers, register 4 and the one-bit shifters
- the two-cycle-stable output order of the Hadamard transform
- the single 15x14 unsigned multiplier with its two input multiplexers
- the rounding adder with a shifter on one input, the qbits shifter and the
  two's complement conversion
- the block numbering −1, 0..15, 16, 17, 18..25
- quantisation pipelined behind the transform, with inverse quantisation
  following separately
- the carry-save adder as the preferred adder

These are this design's own choices:

- the transpose and DC register files and all RF sizes other than the input RF
- the exact pass schedule and the 36-cycle block time
- the output-scaling step
- the values of f, the DC quantisation variants, and the saturation and
  operand limits
- raster numbering of the luma blocks
- doing all forward work of a macroblock before the inverse work
- the chroma QP given as a separate input
- the streaming outputs and the address maps
- loading the next macroblock while the current one is reconstructed (`in_ready`)
- the inner structure of the carry-save adder/subtractor

The FPGA-specific parts of the original implementation are not modelled: the
embedded multiplier primitive and the clock buffers. The multiplier is a plain
`*` and is left to synthesis.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | checks |
|---|---|
| `tb_addsub` | both adder structures against `+`/`−` |
| `tb_reg_file` | row and column reads of a 384 × 9 and a 16 × 16 instance against a mirror array |
| `tb_quant_luts` | all QPs and positions against the H.264 tables |
| `tb_quant_datapath` | 20 000 random operations in all four modes against integer formulas, plus the one-cycle latency |
| `tb_transform_datapath` | every mode and output scaling against matrix arithmetic, plus the cycle of the first and last output |
| `tb_tq_top` | see below |
| `tb_tq_stream` | six macroblocks back to back. Each next macroblock is loaded while `in_ready` is high and the current one is still busy. Writes during the forward phase must be ignored. Every level and reconstructed sample is checked, and the start-to-start interval is held against 2564 cycles. |

`tq_ref_pkg` (in `tb/`) is the shared reference model of the two top-level
testbenches. It uses plain integer arithmetic. It also flags stimuli whose
intermediate values would not fit the 16-bit datapath (see Number ranges).

`tb_tq_top` runs the whole design at its default parameters. It uses eight
random macroblocks: Intra 16x16, other intra and inter, with QP from 0 to 51.
Every level, every TQ RF row and every reconstructed sample is compared with an
independent integer model of the H.264 forward and inverse chain. The test also
checks the macroblock cycle count against the schedule and against the
2564-cycle real-time budget. It fails if a mechanism never occurs. Those
mechanisms are: the luma DC path, the chroma DC path, DC diversion, intra and
inter rounding, and both zero and non-zero levels.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tq_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/tq_pkg.sv tb/tq_ref_pkg.sv tb/tb_tq_top.sv
./obj_dir/Vtb_tq_top
```

Replace `tb_tq_top` with any other testbench name to run that unit test.
`tq_pkg.sv` must be given first because the other files import it. The two
top-level testbenches also need `tb/tq_ref_pkg.sv` listed before them.

## Files

| file | contents |
|---|---|
| `rtl/tq_pkg.sv` | shared widths, mode enums, control word struct, QP/6 and QP%6, MF and V tables |
| `rtl/tq_top.sv` | top level: register files, datapaths, control, output streams |
| `rtl/control_unit.sv` | macroblock sequencer |
| `rtl/transform_datapath.sv` | reconfigurable transform unit |
| `rtl/addsub.sv` | carry-save / ripple-carry adder/subtractor |
| `rtl/quant_datapath.sv` | quantiser and inverse quantiser |
| `rtl/quant_luts.sv` | MF and V lookup tables |
| `rtl/reg_file.sv` | generic register file |
| `tb/tq_ref_pkg.sv` | integer reference model of the whole forward and inverse chain |
| `tb/tb_*.sv` | self-checking testbenches |
