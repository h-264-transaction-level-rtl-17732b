# One systolic array for every H.264 predictor

H.264 decoding spends much of its arithmetic on two kinds of prediction:

- **Inter prediction:** luma quarter-pel interpolation with the 6-tap filter (1,-5,20,20,-5,1), and chroma eighth-pel bilinear interpolation.
- **Intra prediction:** directional predictors built from (1,1) and (1,2,1) filters over the boundary pixels, plus DC and plane modes.

A decoder uses only one of the two for any given block, and both are FIR filtering. So one reprogrammable FIR array can do all of it.

This design is that idea in RTL:

- A **six-PE systolic FIR array** whose taps can change every clock, built with shift-and-add multipliers.
- Two broadcast input lines, so consecutive filter rows overlap without bubbles.
- A **split mode** that cuts the array into two 3-PE halves: Cb and Cr, or two different intra filters.
- Two **feedback loops** that turn PE1 and PE2 into accumulators, for the DC and plane modes.

Three copies of the array form the predictor. Controllers for luma interpolation, chroma interpolation and intra prediction take turns driving it.

Around the predictor sits the block-level skeleton of a High-profile, Level-4 (1920x1080) decoder video pipe:

- **Stages:** IQ/IDCT with data fetch, intra/inter prediction (IIP), de-blocking and de-interlacing.
- **Unit of work:** all stages work on logical 8x8 blocks, meaning one 8x8 luma block plus the two 4x4 chroma blocks that belong to it.
- **Lockstep:** the stages advance together under a synchronisation channel.
- **Block buffers:** three rotating buffers pass each block from IQ/IDCT to IIP to de-blocking.
- **Data bus:** one data bus connects three bus masters to external DRAM. The masters are data fetch, de-blocking and de-interlacer.
  - A deterministic arbiter keeps each master on the bus until it has moved all of its words for the block cycle.
  - A fixed DRAM placement keeps block fetches free of row misses.

Only the IIP and this glue are logic here. CABAC, IQ/IDCT, motion-vector and reference fetch, the de-blocking and de-interlacing filters, the CPU, the AHB buses, the DRAM controller and the I/O interfaces connect through the top-level ports.

## The systolic array (`systolic_array`, `sm_unit`)

### The PE chain

The array uses the *input-broadcast* (transposed) FIR form:

- Every PE sees the current input sample and multiplies it by its own tap.
- It adds the product to the partial sum handed over by its left neighbour.
- Registers between the PEs carry the partial sums, and a sixth register holds the result.

```
in --+--------+--------+--------+--------+--------+
     |        |        |        |        |        |
   [x t0]   [x t1]   [x t2]   [x t3]   [x t4]   [x t5]     S&M units (sm_unit)
     |        |        |        |        |        |
     +-> r0 ->+-> r1 ->+-> r2 ->+-> r3 ->+-> r4 ->+-> out
```

- **Tap order:** PE1 applies the tap for the oldest sample of a window and PE6 the tap for the newest. A filter output leaves one clock after the window's last sample.
- **Multipliers:** each "multiplier" is `sm_unit`. It forms the sum of shifted copies of the input over the set bits of |tap|, then negates it for a negative tap.
- **Tap range:** taps are 6-bit signed, which covers 1, -5, 20, the chroma weights 8-d and d, and the intra and plane weights.

### Control word

Everything the array does is set by one `sa_ctrl_t` word per clock (defined in `pred_pkg`):

| field | meaning |
|---|---|
| `in0`, `in1` | the two broadcast input lines |
| `sel0` | line used by PE1 this clock |
| `split` | cut the chain between PE3 and PE4 |
| `acc_a`, `acc_b`, `acc_clr` | feedback loops A and B |
| `taps[6]` | tap of each PE |
| `tag_vld`, `tag` | label that comes out with the result one clock later |

### Two-input broadcasting

The line selected for PE1 (`sel0`) moves one PE per clock, so PE *n* uses the line PE1 chose *n*-1 clocks earlier.

A controller can therefore start a new filter line on the other input while the previous line is still draining through the right-hand PEs. For example, three clocks after the switch, PE1-3 read the new line and PE4-6 still read the old one.

Without this, every new row would cost five bubble clocks.

### Split mode

PE1-3 filter `in0` and their sum appears as `out_lo`. PE4-6 start a fresh sum on `in1` and their sum appears as `out`.

- Chroma uses split mode to filter Cb and Cr in the same clocks.
- Intra 4x4 uses it to produce a 3-tap and a 2-tap value from the same boundary sample.

### Feedback loops

- **Loop A** (`acc_a`): PE1 adds its product to its own register instead of starting a new sum.
- **Loop B** (`acc_b`): PE2 does the same on `in1`.

They accumulate the DC sums and the plane-mode gradients H and V. Loop A always reads `in0` and loop B `in1`, so both can run in the same clocks.

### Register width

All registers are 22 bits. That is enough for the second luma pass, whose inputs are the signed, unrounded first-pass sums.

## Luma interpolation (`luma_interp`)

A 4x4 partition at a fractional position needs a 9x9 full-pel window. The 2-D filter is separable, so it runs as two 1-D passes of nine lines each:

1. **Pass 1:** filter the nine window rows horizontally. This gives the unrounded half-pel values `b1`, 9 rows of 4.
2. **Pass 2:** filter columns vertically.
   - The five full-pel columns needed for `h` give `h1`.
   - The four columns of `b1` give the centre half-pel `j1`.

Then each of the 16 samples is picked, or averaged, from G, b, h and j following the standard's quarter-pel rules, and is streamed out one per clock.

**Scheduling:**

- Line *g* of each pass goes to array *g* mod 3.
- Each array starts a new line every `P = 5` clocks.
- Lines alternate between the two broadcast inputs, so a new line overlaps the tail of the previous one.
- A tag carries (pass, line, output index) through the array, so the controller stores each result as it appears.

One partition takes 40 clocks of filtering plus 16 clocks of output, 56 clocks from `start` to `done`.

## Chroma interpolation (`chroma_interp`)

The bilinear chroma filter is separable too. It runs as two 2-tap passes on array 0 in split mode:

- Cb goes on `in0`, through the taps (d, 8-d) of PE1-2.
- Cr goes on `in1`, through the same taps on PE4-5.

The first pass keeps unrounded sums. The second rounds once, `(x + 32) >> 6`, which is bit-exact with the standard's single formula.

Both 4x4 blocks take 47 clocks of filtering, then 16 Cb and 16 Cr samples are emitted: 79 clocks in total.

## Intra prediction (`intra_pred`)

### Intra 4x4, all nine modes

The boundary pixels are reshuffled into one line, from bottom-left to top-right:

```
S = L3 L3 L2 L1 L0 Q A B C D E F G H H        Q = top-left, A..H = top and top-right
```

The end pixels are repeated so that the standard's edge cases become ordinary filter outputs.

S is fed once through the split array, with both halves reading it:

- PE1-3 apply (1,2,1), giving `F3[j] = (S[j-1] + 2 S[j] + S[j+1] + 2) >> 2`.
- PE4-6 apply (0,1,1), giving `F2[j] = (S[j] + S[j+1] + 1) >> 1`.

Every directional predictor of H.264 is one of `F3`, `F2` or `S` at an index that depends only on the mode and the pixel position. A small index table picks it. When the top-right pixels are missing they are replaced by D, as in the standard.

4x4 latency: 21 clocks of filtering plus 16 clocks of output = 37.

### DC (4x4 and 16x16)

Loops A and B sum the top row and the left column at the same time.

- **Missing side:** a missing side gets tap 0 and the other side tap 2. The one-sided average then uses the same rounding shift as the two-sided one.
- **No neighbours:** the prediction is 128.

### Plane (16x16)

1. Loops A and B accumulate H and V with taps ±(i+1) over 16 clocks.
2. PE1 then forms a = 16·(P[-1,15] + P[15,-1]), 5H and 5V, from which b and c follow.
3. PE1 forms the start value of the quadrant.
4. The samples follow one per clock: add b along a row, and add c from row to row. Each sample is clipped after `>> 5`.

### 16x16 vertical and horizontal

These copy the boundary.

### Per-quadrant 16x16

The pipe works on 8x8 blocks, so a 16x16 prediction is produced one 8x8 quadrant per operation. H, V, a, b and c are recomputed for each quadrant.

Latency per quadrant:

| mode | clocks |
|---|---|
| vertical / horizontal | 64 |
| DC | 81 |
| plane | 90 |

## Prediction and reconstruction (`unified_pred`, `iip`)

`unified_pred` holds the three arrays and the three controllers.

- An operation (`OP_LUMA`, `OP_CHROMA`, `OP_INTRA4`, `OP_INTRA16`) is latched at `start`.
- The mux gives that controller the arrays: luma uses all three, while chroma and intra use array 0.
- The operation's sample stream `px` comes out with a `done` pulse on the last sample.
- Only one operation runs at a time. An assertion checks that at most one controller is busy.

`iip` turns that into the pipe's IIP stage:

- Jobs arrive with a valid/ready handshake. `job_sub` places a 4x4 result inside the 8x8 block, and `job_last` marks the last job of the block cycle.
- For every predicted sample, the IIP reads the residual that IQ/IDCT left at the same buffer address. It adds the prediction, clips the sum to 0..255 and writes it back in place.
- When the last job's final sample is written, `blk_done` tells the synchronisation channel that the IIP has finished this block.

A logical 8x8 block takes one of three job sequences:

- inter: four luma jobs and one chroma job;
- intra 4x4: four jobs;
- intra 16x16: one quadrant job.

## The block cycle (`block_sync`, `blk_buf3`)

### Synchronisation channel

Each enabled stage reports `done` once per block cycle. `block_sync` starts the next cycle with a one-clock `go` as soon as all enabled stages have reported. A disabled stage is not waited for; the de-interlacer works only on field material.

`block_sync` also counts:

- the blocks processed;
- the clocks that finished stages spent waiting for the slowest one;
- the length of the last cycle.

### Block buffers

`blk_buf3` holds three buffers of 96 words: luma 0-63 in raster order, Cb 64-79, Cr 80-95. On every `go` the roles rotate:

```
cycle k     :  IQ/IDCT writes X   IIP reconstructs Y   de-blocking reads Z
cycle k+1   :  IQ/IDCT writes Z   IIP reconstructs X   de-blocking reads Y
```

IQ/IDCT therefore runs one block ahead of the IIP, and de-blocking one block behind it. Residuals written in cycle k are reconstructed in cycle k+1 and read by de-blocking in cycle k+2. An assertion checks that the three ports never select the same buffer.

## The data bus (`bus_arbiter`, `sync_fifo`, `dram_addr_map`)

### Arbitration

Changing bus master makes DRAM row misses more likely. The arbiter therefore lets a master keep the bus until it signals `last` on its final word for the block cycle. Only then does the bus pass to the next requesting master in round-robin order.

A master that has just released the bus is skipped in that choice, so a master that re-requests at once cannot take the bus back ahead of waiting masters.

The arbiter also counts how often the owner changes.

### Master buffers

Each master has a FIFO (`sync_fifo`, 32 words in the top), so it keeps working while another master owns the bus:

- Data fetch and the de-interlacer fill theirs from the bus.
- De-blocking fills its buffer locally and empties it onto the bus.

The FIFO is first-word fall-through and reports its level and high-water mark, which is the figure a designer sizes the buffer with. Assertions in the top check that no read master is served while its buffer is full, and that de-blocking never writes from an empty buffer.

### DRAM placement

`dram_addr_map` gives the DRAM location of a sample:

| field | value |
|---|---|
| memory | luma in memories 0/1, chroma in 2/3, so luma and chroma fetch in parallel; within a pair the memory changes every two pixels (`x[1]`), which halves the fetch time of a block |
| word | one 32-bit word holds a 2x2 quad; `lane = {y[0], x[0]}` |
| tile | the plane is cut into 64x64 tiles, one DRAM row each |
| bank | `{tile_y[0], tile_x[0]}`: neighbouring tiles never share a bank, so a reference block that straddles tiles causes bank changes but never a row miss |
| row | frame base + (tile_y/2)·ceil(tiles_x/2) + tile_x/2 |

Every stored frame has its own rows, and the Cr rows follow the Cb rows.

## Top level (`h264_video_pipe`)

Parameters and their defaults:

| parameter | default |
|---|---|
| `NSA` | 3 |
| `CN` | 4 |
| `FIFO_DEPTH` | 32 |
| `FRAME_W` | 1920 |
| `FRAME_H` | 1088 |

The ports are plain signals, packed structs and arrays:

- **Synchronisation:** `kick`, `stage_enable[3:0]`, and the done inputs of the external stages; `go`, `block_cnt`, `wait_cycles` and `block_len` come out.
- **IQ/IDCT write port:** `res_*`, into the buffer currently in the write role.
- **IIP job port:** the reference windows, fractions, intra mode, quadrant and neighbours, plus `iip_busy`.
- **De-blocking read port:** `dbk_addr` / `dbk_rdata`.
- **Data bus:** `bus_req`, `bus_last`, `bus_xfer`, `bus_gnt`, read and write data, and the sample coordinates of each master (`m_x`, `m_y`, `m_frame`, `m_comp`). The mapped DRAM location of the granted master comes out as `dram_*`.
- **Local sides of the three master buffers.**

Timing is synchronous to `clk`, with an active-low asynchronous reset. Inputs of an IIP job must stay stable until `iip_busy` falls.

## Where this departs from the original architecture

- **Cycle counts are higher.**
  - The original schedule finishes a P_4x4 luma/chroma pair in 33 cycles, 608 cycles per macroblock in the worst inter case, and 290 cycles for a plane macroblock.
  - Here a 4x4 luma partition takes 56 clocks and a chroma pair 79, because results come out serially and every partition is scheduled on its own. That is 1212 clocks per macroblock if all sixteen 4x4 partitions are interpolated.
  - At 150 MHz and the Level-4 rate of 245,760 macroblocks/s, the budget is 610 clocks per macroblock. Intra fits (4x4: 592; 16x16 plane: 360). Worst-case inter would need about 300 MHz.
- **Register widths:** the 18/18/18/16/13-bit registers of the luma-only array are all 22 bits here.
- **16x16 intra** is computed per 8x8 quadrant.
- **Not implemented:** intra 8x8 (High profile), chroma intra, bi-prediction averaging and weighted prediction.
- **Intra neighbours:** the line buffer that would hold them is not included; the neighbours enter through ports.
- **One bus instead of four:** the original uses four 32-bit data buses to four DRAMs. Here a single bus is arbitrated, and the memory number is an output of the address map.
- **Arbiter order:** the release-after-last-word policy is the original one. The round-robin order of the next owner is this design's choice.
- **Design choices, not from the original:** tile size, word packing, row numbering, FIFO depth, buffer layout, all handshakes and the data-fetch/IIP job interface.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench:

- prints `TB_RESULT checks=N failures=M`;
- stops itself through a watchdog if the design hangs.

The prediction testbenches compare every sample with `pred_ref_pkg`. That package computes the predictors straight from the H.264 formulas, with no systolic scheduling. They also check the latencies listed above.

`tb_h264_video_pipe` runs the top at its default parameters through 26 block cycles. It plays the outside stages and the DRAM, and it checks:

- every reconstructed sample read back by de-blocking;
- the buffer rotation;
- FIFO order;
- the address-map fields of the granted master;
- the block counter and cycle length.

It also counts each mechanism and fails if one never occurs:

- a stall;
- all four prediction operations;
- clipping;
- bus grants to each master;
- owner switches and bus contention;
- a disabled stage;
- a master draining its buffer while another owns the bus;
- buffer occupancy.

To simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pred_pkg.sv tb/pred_ref_pkg.sv tb/tb_h264_video_pipe.sv \
    --top-module tb_h264_video_pipe
obj_dir/Vtb_h264_video_pipe
```

Replace the testbench name for the others. `tb_sm_unit`, `tb_dram_addr_map`, `tb_bus_arbiter`, `tb_block_sync`, `tb_blk_buf3` and `tb_sync_fifo` do not need `pred_ref_pkg.sv`.

## Files

- `rtl/pred_pkg.sv`: shared types and constants (control and result words of the array, sample stream, operation codes, `clip1`).
- `rtl/`: one module per file, named as above.
- `tb/tb_<module>.sv`: the testbench of each module; `tb/pred_ref_pkg.sv` holds the reference predictors.
