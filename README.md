# 8x8 forward transform and quantization core for H.264/AVC High profile

An H.264/AVC encoder running the FRExt (High profile) tools spends much of its
arithmetic on the 8x8 integer transform of each luma residual block and on the
quantization of the 64 coefficients that follow. This core does both in
hardware, fully in parallel: a whole 8x8 residual block and its quantizer
parameter QP enter on one clock edge, and the 64 quantized coefficients leave
eight clocks later. A new block may enter on every clock, so at steady state
the core finishes one complete 8x8 block per clock. There is no block memory,
no transposition buffer and no stall condition: the data flow through
registers only.

```
            +---------------------- stage 1 ----------------------+   +------- stage 2 --------+
 x[8][8] -->| horizontal_transform --S--> vertical_transform --W--|-->| quant_arithmetic --R--> |
 9b signed  |  (8 x butterfly8, 3 clk)    (8 x butterfly8, 3 clk) |   |  quant_shifter  --> z  |--> z[8][8] 19b signed
 input_valid|------------- valid delay (6 clk) ------ quant_en ---|-->|  (1 clk)       (1 clk) |--> output_valid
 qp ------->| qp_processing: qbits, f, P0..P5 (6 clk) ------------|-->|                        |
            +-----------------------------------------------------+   +------------------------+
```

## The arithmetic

### Transform

The 2D transform is W = Cf X Cf^T with

```
      | 8   8   8   8   8   8   8   8 |
      |12  10   6   3  -3  -6 -10 -12 |
      | 8   4  -4  -8  -8  -4   4   8 |
 Cf = |10  -3 -12  -6   6  12   3 -10 |  / 8
      | 8  -8  -8   8   8  -8  -8   8 |
      | 6 -12   3  10 -10  -3  12  -6 |
      | 4  -8   8  -4  -4   8  -8   4 |
      | 3  -6  10 -12  12 -10   6  -3 |
```

computed separably: first every row is transformed (S), then every column of
S (W). Each 1D transform is the standard fast butterfly in three stages, which
uses only additions, subtractions and arithmetic right shifts (`>>` below
rounds toward minus infinity):

| stage I          | stage II                                   | stage III                 |
|------------------|--------------------------------------------|---------------------------|
| a0 = x0 + x7     | b0 = a0 + a3                               | w0 = b0 + b1              |
| a1 = x1 + x6     | b1 = a1 + a2                               | w1 = b2 + (b3 >> 1)       |
| a2 = x2 + x5     | b2 = a0 - a3                               | w2 = b0 - b1              |
| a3 = x3 + x4     | b3 = a1 - a2                               | w3 = (b2 >> 1) - b3       |
| a4 = x0 - x7     | b4 = a5 + a6 + (a4 + (a4 >> 1))            | w4 = b4 + (b7 >> 2)       |
| a5 = x1 - x6     | b5 = a4 - a7 - (a6 + (a6 >> 1))            | w5 = b5 + (b6 >> 2)       |
| a6 = x2 - x5     | b6 = a4 + a7 - (a5 + (a5 >> 1))            | w6 = b6 - (b5 >> 2)       |
| a7 = x3 - x4     | b7 = a5 - a6 + (a7 + (a7 >> 1))            | w7 = (b4 >> 2) - b7       |

Because of the shifts the result is bit-exact only with the row-then-column
order; the column-then-row order gives slightly different numbers. This is
why the rows are done first, as in the original architecture.

Each stage of each butterfly ends in a register (`butterfly8`), so one pass
takes 3 clocks and the full transform 6. Sixteen butterflies are instanced:
eight for the rows (`horizontal_transform`) and eight for the columns
(`vertical_transform`). No transposition memory is needed because the whole
block is present at once; the column pass simply reads S in the other index
order.

### Quantization

For QP in 0..51:

```
qbits   = 15 + QP / 6
m       = QP mod 6
f       = 2^qbits / 3     (intra blocks)   or   2^qbits / 6   (inter blocks)
|Z(i,j)| = (|W(i,j)| * MF(m, group(i,j)) + f) >> (qbits + 1)
sign Z  = sign W          (Z = 0 when the magnitude is 0)
```

MF depends on m and on which of six position groups (i, j) belongs to, where
each index is classed as "0 or 4", "2 or 6" or "odd":

| m | G0 (0/4, 0/4) | G1 (odd, odd) | G2 (2/6, 2/6) | G3 (0/4 with odd) | G4 (0/4 with 2/6) | G5 (2/6 with odd) |
|---|------|------|------|------|------|------|
| 0 | 13107 | 11428 | 20972 | 12222 | 16777 | 15481 |
| 1 | 11916 | 10826 | 19174 | 11058 | 14980 | 14290 |
| 2 | 10082 |  8943 | 15978 |  9675 | 12710 | 11985 |
| 3 |  9362 |  8228 | 14913 |  8931 | 11984 | 11295 |
| 4 |  8192 |  7346 | 13159 |  7740 | 10486 |  9777 |
| 5 |  7282 |  6428 | 11570 |  6830 |  9118 |  8640 |

Since the group of every position is fixed, each of the 64 multipliers is
wired to one of six factor buses P0..P5; only the factor values change with
QP. `qp_processing` turns QP into qbits, f and P0..P5. `quant_arithmetic`
forms R = |W| * MF + f for all 64 coefficients (64 multipliers) and
`quant_shifter` shifts R right by qbits + 1 and puts the sign back.

Note the offset convention: f is 2^qbits / 3 while the shift is qbits + 1,
so the intra offset is one sixth of the quantization step and the inter
offset one twelfth. An encoder that wants offsets of one third and one
sixth of the step would use 2^(qbits+1) / 3 and / 6; that is a one-line
change in `qp_processing`.

## Timing

| event                                   | clock edge after the input edge |
|-----------------------------------------|---------------------------------|
| row pass done (S registered)            | +2 (3 registers: edges 0, 1, 2) |
| column pass done (W registered), quant_en | +5                            |
| P0..P5, f, qbits of the block ready      | +5                             |
| R registered                             | +6                             |
| Z registered, output_valid               | +7                             |

In other words, a block presented before clock edge n is visible at the
outputs between edges n+7 and n+8, and is sampled by downstream logic on edge
n+8: a latency of 8 clocks. Every stage is a plain register with no enable,
so blocks may be presented on consecutive clocks or with any gaps;
`input_valid` travels alongside as a shift register and becomes
`output_valid`.

**Keeping QP with its block.** QP may change on every block. `qp_processing`
delays QP by five registers and computes qbits, f and P0..P5 into a sixth, so
these parameters reach the arithmetic stage on the same clock as the block's
W. qbits passes one more register inside `quantization` so it meets R at the
shifter. Getting any of these delays wrong quantizes a block with its
neighbour's QP; the top-level testbench changes QP between blocks to catch
that.

A frame of N blocks takes N + 8 clocks. With the FPGA clock of about
68.5 MHz reported for an earlier implementation of this architecture (a
14.6 ns critical path, in a Xilinx Virtex-II), that is about 77 us for a
704x480 SD luma frame (5280 blocks) and 210 us for a 1280x720 frame (14400
blocks), against a frame period of 16.7 ms at 60 frames/s. The clock rate
this RTL reaches depends on the target; the critical path is the 17x15-bit
multiply plus the add in `quant_arithmetic`.

## Interface of `dctq_top`

| port          | dir | width            | meaning |
|---------------|-----|------------------|---------|
| clk           | in  | 1                | clock, rising edge |
| rst_n         | in  | 1                | synchronous, active low; clears the valid pipeline only |
| input_valid   | in  | 1                | x and qp hold a block on this edge |
| x[8][8]       | in  | 9 signed each    | residual block, x[row][column], -255..255 |
| qp            | in  | 6                | quantizer parameter 0..51 (an assertion flags larger values) |
| z[8][8]       | out | 19 signed each   | quantized coefficients, z[vertical freq][horizontal freq] |
| output_valid  | out | 1                | z holds a block |

Parameter `INTRA` (default 1) selects the intra rounding offset; set it to 0
for inter blocks. Assertions in `dctq_top` check that every input block
leaves exactly 8 clocks later, that no output appears without an input, and
that QP stays within 0..51. z is undefined (but harmless) while output_valid is low.

The 9-bit input and 19-bit output widths give 64*9 + 6 + 1 = 583 input and
64*19 + 1 = 1217 output pins besides clock and reset. The internal widths are
chosen so nothing can overflow: S is 13 bits and W 17 bits (the largest 1D
gain is 8, so |W| <= 64 * 255 = 16320), R is 32 bits unsigned, and |Z| stays
below 2^16.

## Files

`rtl/`:

| file | content |
|------|---------|
| `dctq_pkg.sv` | widths, the MF table, the position-group function |
| `butterfly8.sv` | one 8-point 1D transform, 3 registered stages |
| `horizontal_transform.sv` | 8 butterflies over the rows |
| `vertical_transform.sv` | 8 butterflies over the columns |
| `fwd_transform_8x8.sv` | row pass + column pass + valid delay (quant_en) |
| `qp_processing.sv` | QP -> qbits, f, P0..P5, aligned with the transform |
| `quant_arithmetic.sv` | R = \|W\| * MF + f, sign kept |
| `quant_shifter.sv` | Z = sign * (R >> (qbits + 1)) |
| `quantization.sv` | arithmetic + shifter, qbits alignment register |
| `dctq_top.sv` | the core |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_dctq_top_inter.sv` (the core with the inter offset),
`tb_dctq_workloads.sv` (an SD and a 720p frame streamed at one block per
clock, with the clock count checked) and `tb_ref_pkg.sv`, an integer reference
model that all testbenches compare against. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops itself after a fixed number of
clocks if something hangs. `tb_dctq_top.sv` streams one QCIF-size (176x144,
396-block) frame of synthetic residuals and a set of corner cases (full-scale
blocks, every QP 0..51, QP changes between consecutive blocks, gaps in
input_valid) through the core at its default parameters and checks every
coefficient and the 8-clock latency.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dctq_pkg.sv tb/tb_ref_pkg.sv tb/tb_dctq_top.sv --top-module tb_dctq_top
./obj_dir/Vtb_dctq_top
```

Replace `tb_dctq_top` by any other testbench name. The package files must come
first on the command line; the other modules are found through `-I`.

## How far to trust it, and where it departs from the original architecture

- The transform equations, the quantization formulas, the MF table and the
  position groups are as published for this architecture, and the testbenches
  check every output against an independent integer model of those formulas.
  The results have not been compared with the H.264 reference encoder itself.
- The original description names the blocks, their connections and the
  one-block-per-clock throughput but gives no clock-by-clock schedule. The
  register placement here (one register per butterfly stage, one after the
  multiply-add, one after the shift; 8 clocks latency) is this design's own.
  The published FPGA implementation used about twice as many register bits
  (16893 besides I/O, against roughly 8700 flip-flops here), so it was
  pipelined more deeply.
- The original block diagram has no reset and no intra/inter input. This
  design adds `rst_n` for the valid pipeline and makes the intra/inter
  offset a build-time parameter, which keeps the published pin count.
- QP is delayed inside `qp_processing` so that the quantization parameters of
  each block arrive with it; the original diagram draws QP processing feeding
  the quantizer directly and does not say how the two are aligned.
- Only the core is provided. The prototyping system it was tested in (a PCI
  card with a bus multiplexer, virtual SRAM/DRAM/block-RAM/register
  controllers, a hardware interface controller and an interrupt controller)
  is a third-party platform and is not described in enough detail to
  reproduce; a system using this core needs its own way to deliver 8x8
  blocks and collect the results.
