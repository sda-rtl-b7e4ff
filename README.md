# SDA core: a low-bit stable diffusion engine for edge FPGAs

This is synthesizable SystemVerilog for the compute core of a stable diffusion
(SD-v1.5 UNet) accelerator. Weights are quantized to 4 bits and activations to
8 bits (W4A8). One engine runs every UNet operator:

- **The main operators** are convolution and the matrix multiplications of
  attention. They run on a *hybrid systolic array* (hybridSA). The array
  switches per instruction between two dataflows:
  - an output-stationary dataflow for matrix multiply (**MM-OS**);
  - a weight-stationary dataflow for convolution (**CONV-WS**).

  Each PE packs several 4-bit multiplies into one 27×18 DSP-style multiplier.
- **The nonlinear operators** run on a *special function unit* (SFU) of
  five-lane units: SoftMax, LayerNorm/GroupNorm, SiLU and GeGLU. The SFU also
  does the linear shortcut add and transpose.
- **A shared ping-pong tile buffer** connects the two. The array fills one half
  while the SFU drains the other, so the nonlinear work hides behind the matrix
  work (the coarse-grained level). Each SFU unit is also pipelined internally
  (the fine-grained level).

The host CPU, the AXI bus and DDR memory are outside the RTL. Their traffic
appears as plain ports: instructions, an operand stream, a residual stream, a
norm-parameter write port and a result stream.

Defaults: a 20 × 10 array, SFU parallelism 5, SoftMax rows of up to 4096
elements and tile-buffer rows of up to 10240 elements.

## Dataflow of one instruction

An instruction (`sda_pkg::sda_instr_t`) describes one array job and the SFU
job that consumes its result.

1. **Array job.** The `datapath_scheduler` accepts the instruction once a
   tile-buffer half is free, then runs the array on the operand stream
   (`in_valid/in_ready`, `a_in`, `w_in`):
   - *MM-OS:* `n_ctile` column tiles of `k_len` beats each. Each finished tile
     is drained into the tile buffer while the next one accumulates.
   - *CONV-WS:* X weight-load beats, then `k_len` pixel beats. Each pixel beat
     yields 2Y output channels.
2. **Stage 1, on the way into the buffer.** Every array output passes through
   `dequant_unit`: scale, rounded shift, saturate to Q8.8. In pair mode it also
   first joins the low- and high-nibble results: `hi·16 + lo`. For MM rows, the
   running row maximum that SoftMax needs is recorded at the same time.
3. **Hand-off.** When the half is complete it is marked full. The scheduler
   hands it, in fill order, to the SFU side as soon as the SFU is free.
4. **SFU job.**
   - The `buffer_controller` walks the half as *units × passes × segments ×
     beats*. It issues one 5-element read per cycle into a small FIFO.
   - The operator chosen by `sfu_op` consumes the FIFO.
   - The result leaves on `out_fx` (Q8.8) together with `out_q`, the same value
     re-quantized to int8 with the instruction's scale.
   - The SFU reports completion only after every unit has gone idle. The half
     is then free again.

So while the SFU works on instruction *n*, the array is already computing
instruction *n+1* into the other half.

## The hybrid systolic array

### Nibble split and DSP packing (`packed_dsp`, `hybrid_pe`)

Each PE has two 27×18 signed multipliers, modelled on the DSP48E2 used on
Zynq UltraScale+.

**Nibble split.** Every 8-bit activation `a` is split into two 4-bit halves:

- `a[3:0]` is unsigned; it goes to the first multiplier.
- `a[7:4]` is signed; it goes to the second multiplier.

Each multiplier therefore sees only 4-bit × 4-bit products. The 8-bit result
is rebuilt as `hi·16 + lo`.

**Field packing.** Inside one multiplier, up to three activation nibbles and
two weight nibbles are packed at a field spacing of 11 bits:

```
A port = a0 + a1·2^11 + a2·2^22          (27 bits)
B port = w0 + w1·2^11                    (18 bits)
P      = A·B   -> fields of 11 bits: f_k = P[11k +: 11] + P[11k-1]
```

**BitCR (bit-width correction).** A negative lower field borrows one from the
field above it. The `+ P[11k-1]` term adds that borrow back. Without this
correction every field above a negative one would be off by one.

**MM-OS.** Slots a0 and a2 carry rows `2i` and `2i+1` of A. Slot a1 is zero.
The four fields are then `a0w0, a0w1, a1w0, a1w1`: a 2 × 2 block of products
per multiplier per cycle. That is two W4A8 multiplies per multiplier.

**CONV-WS.** Slots a0, a1 and a2 carry three neighbouring pixels. The two
stationary taps are fed in reverse order (`w1, w0`). The two middle fields are
then complete two-tap outputs:

- `x0·w0 + x1·w1`
- `x1·w0 + x2·w1`

The multiplier forms six products. The two middle fields use four of them and
two additions; the two outer fields hold single products, which this design
does not use.

### MM-OS dataflow

Activations move right and weights move down, one hop per cycle. The array
skews its own inputs: row *i* is delayed *i* cycles and column *j* is delayed
*j* cycles, so the caller presents every beat unskewed.

Each PE accumulates its 2 × 2 output block in place. On the beat marked
`in_last`, each PE copies its finished block into a separate drain register.
This lets the next tile start accumulating immediately. The complete
2X × 2Y tile sits in the drain registers X+Y−1 cycles after the last beat.

The scheduler then writes two output rows per cycle-pair into the tile buffer
and shifts the drain chain down one PE row. A tile therefore takes 2X cycles to
drain.

If the next tile reaches its own last beat before the previous drain has
finished, that last beat is held back. This is the **drain stall** (output
`drain_stall`). It happens only for very short reductions
(`k_len < 3X + Y − 1`).

### CONV-WS dataflow

**Weight loading.** Weights enter through the same column chain, but it only
advances on `wload_shift`. After X load beats, the beat marked `wload_latch`
copies the chain into every PE's two stationary taps. Beat *b* ends up in PE
row X−1−b. Gaps between load beats are allowed.

**Pixel beats.** Each pixel beat gives every PE row three pixels. Partial sums
flow down the columns. The bottom of the array de-skews them, so all 2Y
channel outputs of a beat appear together on `cv_out`, X+Y−1 cycles after the
beat. How a 3 × 3 kernel and its input channels are spread over the PE rows is
left to the instruction stream.

### 8 × 8 pair mode (attention QKᵀ and (QKᵀ)V)

Attention multiplies two 8-bit tensors. Pair mode treats each 8-bit weight
column as two 4-bit columns side by side: PE column *j* gets the low nibble in
its first weight slot and the high nibble in its second. The array therefore
computes `A·W_lo` and `A·W_hi` next to each other.

In this mode the weight sign flags are per column: the low column is unsigned
and the high column signed. The dequantization stage joins each pair as
`hi·16 + lo`. A column tile then yields Y outputs instead of 2Y.

## Tile buffer and the scheduler

**Tile buffer (`tile_buffer`).**
- Two halves of 32 banks.
- Element *e* of a half lives in bank `e % 32`, row `e / 32`. A 20-element
  array write and a 5-element SFU read can therefore start at any address and
  each finish in one cycle.
- Read data is valid one cycle after the request.
- Each half holds 2X rows of up to 10240 elements at the defaults (12800 words
  per bank and half).

**Scheduler (`datapath_scheduler`).**
- It keeps a full flag and the owning instruction for each half.
- It fills halves alternately and hands them to the SFU in the same order.
- The output `sa_busy && sfu_busy` shows the two levels overlapping.

## Special function unit

All SFU data is 16-bit fixed point with 8 fraction bits (Q8.8). All units take
five lanes per cycle with a lane mask.

### SoftMax (`softmax_unit`)

The row maximum arrives from stage 1, so a row is read only once.

**Stage 2-1** does the following for each beat:
- subtracts the maximum;
- computes `exp(d) = 2^(d·log2 e)`. The integer part of the exponent becomes a
  shift. The fraction uses `1 + f(0.6565 + 0.3435f)`, which is within 0.3 %.
- accumulates the row sum;
- stores the Q1.15 exponentials in one of two row buffers.

**Stage 2-2** computes `2^40 / sum` once per row with a sequential divider. It
then streams the buffer out multiplied by that reciprocal.

With two row buffers, row *r* is normalised while row *r+1* is exponentiated.
`in_ready` drops only when both buffers hold unfinished rows.

### LayerNorm / GroupNorm (`norm_unit`)

Each unit is streamed twice. A unit is a row for LayerNorm, or a group of
channels over all pixels for GroupNorm.

**Statistics pass.** This pass accumulates the sum and the sum of squares. In
GroupNorm mode, the totals of several segments (one pixel's group channels
each) are added into one extra accumulator.

**Statistics sequencer.** At the end of the unit a sequencer with one divider
and one integer square root computes the following (about 170 cycles):
- μ in Q8.16;
- E[x²];
- σ = √(var·2⁸), which has 12 fraction bits;
- 1/σ in Q16.

The extra fraction bits keep units with a very small spread accurate.

**Output pass.** This pass computes `γ·(x−μ)/σ + β` with two cycles of
latency. γ and β are read per lane from a replicated parameter table of 1280
entries, loaded through `gb_*`. The buffer controller supplies each lane's
parameter index.

### SiLU and GeGLU (`silu_unit`, `geglu_unit`)

Both use hard approximations:

- SiLU(x) = `x·ReLU6(x+3)/6`
- GeLU(x) = `x·ReLU6(1.702x+3)/6`

The constants are implemented as follows:
- 1/6 is `43691/2^18`;
- 1.702 is `436/256`.

SiLU can run on its own, or chained after GroupNorm (the `GNORM_SILU`
operator).

GeGLU works on a row of 2L values:
- The first L values are stored in a row buffer.
- Each of the second L values goes through GeLU and is multiplied by the
  stored value at the same position.

### Shortcut add and transpose (`shortcut_add`, `transpose_unit`)

**Shortcut add.** This adds the residual stream `res_data` (valid/ready)
lane by lane, with saturation.

**Transpose.** This reads 5 × 5 blocks. The buffer controller reads the block's
five rows; the unit then emits its five columns.

### Quantization (`quant_unit`)

Every SFU result is also re-quantized to int8 with the instruction's
scale and shift, using rounding and saturation.

## Instruction format (`sda_pkg.sv`)

| field | meaning |
|---|---|
| `mode` | `SA_MM_OS` or `SA_CONV_WS` |
| `w_signed`, `pair` | 4-bit weights signed/unsigned; 8 × 8 pair mode |
| `k_len`, `n_ctile` | MM: reduction length and number of column tiles. CONV: number of pixel beats |
| `row_len` | tile-buffer row stride in elements |
| `dq_scale`, `dq_shift` | dequantization of array results |
| `q_scale`, `q_shift` | int8 re-quantization of SFU results (one scale per step) |
| `sfu_op` | NONE (copy), SOFTMAX, LNORM, GNORM, GNORM_SILU, SILU, GEGLU, ADD, TRANSPOSE |
| `n_units`, `seg_per_unit`, `seg_len`, `seg_stride`, `unit_stride` | SFU read pattern |
| `gb_unit`, `gb_shift` | norm parameter index = `unit·gb_unit + (offset >> gb_shift)` |

**Address layout.**
- *MM tile:* output row *r*, column *c* of column tile *t* is written at
  `r·row_len + t·(2Y, or Y in pair mode) + c`.
- *CONV:* output beat *n* is written at `n·row_len`, with 2Y channels.

**Typical read patterns.**
- *Row operators* (SoftMax, LayerNorm, GeGLU, add, copy): `n_units = 2X`
  rows, one segment of `seg_len` elements each.
- *GroupNorm after CONV:* one unit per group. Each unit has one segment per
  pixel, with `seg_stride = row_len`.

## What follows the source design and what does not

These parts follow the source design:
- the two dataflows sharing one array and one activation supply;
- the nibble split into two DSPs per PE;
- 4-bit packing with bit-width correction;
- the 8 × 8 = two 4 × 8 decomposition, joined by shift-and-add in stage 1;
- the shared ping-pong tile buffer and the two-level pipeline;
- SoftMax:
  - the row maximum found in stage 1;
  - SUB-EXP-ACC and DIV stages with double row buffers.
- the shared L/GNorm unit:
  - an extra accumulator for GroupNorm;
- the hard approximations of SiLU and GeLU;
- the 20 × 10 array;
- a parallelism of 5.

Everything else is this design's own choice:
- instruction format and address patterns;
- 11-bit packing fields;
- the 2 × 2 output block per PE and the separate drain chain;
- tap placement in CONV-WS;
- number formats and the exp approximation;
- buffer sizes and banking;
- the scheduler protocol.

Deliberate departures:
- **GeGLU row buffer.** GeGLU has its own row buffer instead of reusing
  SoftMax's. This keeps the units independent.
- **Norm statistics.** The mean and mean square come from plain running
  sums and one division each at the end of the unit. The source design cites
  an integer-only normalisation method, which is not reproduced here. The
  statistics pass and the output pass read the data twice, not three times.
- **GroupNorm group size.** A group must come from one CONV-WS pass, that is at
  most 2Y = 20 channels. At 1280 channels SD-v1.5 has 40-channel groups. These
  would need statistics carried across two instructions, which is not
  implemented.
- **CONV-WS packing density.** The source design counts four W4A8
  operations per DSP in CONV-WS. This design uses only the two complete
  middle fields of each multiplier: four multiplies and two additions, that
  is three operations per DSP.
- **No prefetch.** There is no weight/activation prefetch or DDR interface.
  Operands are streamed in by the environment, and results go out with no
  back-pressure.

## Workloads at the default size

- **Attention rows fit.** A self-attention row of the 64 × 64 latent is 4096
  elements, which fits the row buffers. Cross-attention rows are 77 elements.
- **LayerNorm rows fit.** They are up to 1280 channels.
- **GeGLU rows fit.** They are up to 2L = 10240 elements, the exact size of the
  tile-buffer rows.
- **Peak rate.** In MM-OS the array does 200 PEs × 4 W4A8 multiply-adds per
  cycle, which is 400 GOPS at 250 MHz, counting a multiply-add as two
  operations. A W4A8 SD-v1.5 UNet step is 854.8 GOPs,
  so this puts a lower bound of about 2.1 s on each denoising step.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
values computed independently in the testbench (exact integer models, or
real-valued maths with stated tolerances). Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

Latencies are checked where the design defines them:
- the array's X+Y−1 cycles;
- the drain order and timing;
- the norm and GeGLU two-cycle output latency;
- one read per cycle from the buffer controller;
- one output beat per cycle for a copy job.

**`tb_sda_top`** runs the whole core at 4 × 3 with four rounds of nine
instructions:
- array jobs: MM signed and unsigned, pair mode, CONV;
- SFU operators: SoftMax, LayerNorm, GroupNorm+SiLU, SiLU, GeGLU, add,
  transpose and copy.

It has random gaps on the operand and residual streams. It counts drain stalls,
array/SFU overlap, mode switches and pair-mode instructions, and fails if any
of them never happens.

**`tb_sda_top_full`** runs the same test on the default 20 × 10 core. It takes
about 3 minutes to build and seconds to run.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
          --top-module tb_sda_top rtl/sda_pkg.sv tb/tb_sda_top.sv
obj_dir/Vtb_sda_top +verilator+rand+reset+2
```

The testbenches reset everything they read and use `$urandom`. Pass a
different seed with `+verilator+seed+N`.

## Files

| file | role |
|---|---|
| `rtl/sda_pkg.sv` | widths, operator codes, instruction and SFU tag types |
| `rtl/sda_top.sv` | the core |
| `rtl/datapath_scheduler.sv` | instruction sequencing, drain, half ownership |
| `rtl/hybrid_sa.sv`, `rtl/hybrid_pe.sv`, `rtl/packed_dsp.sv` | the array |
| `rtl/dequant_unit.sv`, `rtl/quant_unit.sv` | fixed-point conversion, 8 × 8 join |
| `rtl/tile_buffer.sv`, `rtl/buffer_controller.sv` | shared ping-pong buffer and its SFU-side addressing |
| `rtl/softmax_unit.sv`, `rtl/norm_unit.sv`, `rtl/silu_unit.sv`, `rtl/geglu_unit.sv`, `rtl/shortcut_add.sv`, `rtl/transpose_unit.sv` | SFU |
| `rtl/seq_div.sv`, `rtl/seq_isqrt.sv` | sequential divider and square root used by the SFU |
| `tb/tb_<module>.sv` | testbench of each module; `tb_sda_top_full.sv` for the default size |
