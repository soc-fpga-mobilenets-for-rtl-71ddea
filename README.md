# MobileNets depthwise-separable accelerator for a small SoC-FPGA

MobileNets is a CNN whose bulk is 13 *depthwise-separable* stages. Each stage
has two parts:

- a **depthwise** part: a 3x3 convolution applied to each channel on its own;
- a **pointwise** part: a 1x1 convolution that mixes all channels.

Each part is followed by Batch Norm and ReLU6. This RTL runs those 13 stages in
the programmable logic of a low-cost SoC-FPGA, a Zynq-7010 class device clocked
around 115 MHz. The host processor keeps the rest of the network: the first full
3x3x3 convolution, pooling, the fully connected layer and softmax. It moves all
data with a DMA engine over one 64-bit AXI4-Stream in each direction.

The design is built around four ideas:

- **Stage work is cut into tiles small enough for block RAM.**
  - A depthwise tile is at most 16x16 pixels x 32 channels (7x7x128 in the last stage).
  - A pointwise sub-stage always produces 3,136 accumulator entries: 196 positions x 16 filter pairs, or 49 positions x 64 pairs.
- **Everything between transfer and compute is ping-ponged.** This covers the tile buffers, the pointwise weight memory, and the output buffers. The DMA fills one half while the datapath reads the other.
- **Depthwise results never leave the chip.** They are written straight into the pointwise stage's input memory, reordered by depth, so that one 512-bit read returns the same pixel of 32 channels.
- **Narrow numbers.**
  - Depthwise: 8-bit pixels, 16-bit weights, 16-bit Q3.13 output.
  - Pointwise: 12-bit custom floating-point weights, each an 8-bit significand plus a 4-bit right-shift exponent, and 8-bit Q3.5 output.
  - Batch Norm is folded into three 16-bit values per channel (mu, P = gamma·variance term, beta) plus three per-stage alignment shifts.

## Data path at a glance

```
 s_axis (64b) ──> Stream Connector ──┬─> 64→72 conv ─> DW-MEM      ─┐
                  (demux + FSM)      ├─> 64→96 conv ─> DW-BN-MEM   ─┤
                                     ├─> IFM-MEM1/2 (ping-pong) ────┴─> DW image loader ─> SRL ─> Conv(9 MAC)
                                     │                                   ─> Batch Norm ─> ReLU6 ─> PW image loader
                                     │                                                                  │ pixel+address
                                     ├─> 64→96 conv ─> PW-BN-MEM                                        v
                                     ├─> PW-MEM (significands) ──┐                               IFM-MEM3/4 (ping-pong)
                                     └─> PS-MEM (exponents)   ───┴──> 2 x pw_mac (32 lanes each) + ACC-MEM1/2
                                                                        ─> 2 x (Batch Norm ─> ReLU6)
                                                                        ─> Send Results (OFM-MEM1..4) ─> m_axis (64b)
```

## Module map

| file | role |
|---|---|
| `rtl/mbn_pkg.sv` | widths, sizes, `pad_e`, `bn_shift_t`, `bn_param_t`, the per-stage `mbn_cfg_t` |
| `rtl/mbn_accel.sv` | top: connector, three width converters, depthwise and pointwise stages |
| `rtl/stream_connector.sv` | routes each input packet to its port; decides IFM vs. weight reload vs. end of stage |
| `rtl/axis_width_conv.sv` | byte repacker 64→72 / 64→96 bits |
| `rtl/dw_stage.sv` | depthwise unit: memories, tile ping-pong control, datapath chain |
| `rtl/dw_image_loader.sv` | walks a tile, inserts padding, marks valid 3x3 windows (stride 1/2) |
| `rtl/dw_srl.sv` | 35-register window shift line (2 rows of ≤16 + 3) |
| `rtl/dw_conv.sv` | 9-multiplier MAC, latency 6 |
| `rtl/batch_norm.sv` | folded Batch Norm with three shifts, latency 4 (shared by both stages) |
| `rtl/relu6.sv` | clamp to [0, 6] and narrow, latency 1 |
| `rtl/pw_image_loader.sv` | depthwise output → pointwise memory address |
| `rtl/pw_stage.sv` | pointwise unit: memories, sub-stage sequencer, two MAC lanes, BN/ReLU6, Send Results |
| `rtl/pw_mac.sv` | 32-lane custom-float MAC with accumulator read-modify-write, latency 8 |
| `rtl/send_results.sv` | OFM-MEM1..4 as two ping-pong sets; 8 pixels per output beat |
| `rtl/sdp_ram.sv` | simple dual-port RAM with different write/read widths (all memories) |

## How a stage runs

### Configuration and start

The host fills `cfg` (type `mbn_cfg_t`) and pulses `start` for one clock.
`start` clears the control state of every unit: pointers, full flags and
counters. `cfg` must then stay stable until the stage's last output beat has
been sent.

`cfg` describes the stage through these fields:

| field | meaning |
|---|---|
| `in_h`, `in_w`, `dw_ch` | size of a stored tile |
| `pad` | `PAD_NONE`: the host has already padded the tile |
| | `PAD_FULL`: one zero ring added in hardware |
| | `PAD_HALF`: one zero row at the bottom and one zero column at the right |
| `stride2` | depthwise stride |
| `n_spatial`, `n_gblk`, `nc`, `nf` | the loop counts of the stage (see below) |
| `npos`, `npairs`, `cgroups` | shape of one pointwise sub-stage |
| `pw_blk_words`, `pw_pingpong` | layout of the pointwise weight blocks |
| `pw_first`, `pw_period`, `pw_reloads` | when further weight blocks arrive in the stream |
| `n_ifm` | IFM tiles in the stage |
| `dw_sh`, `pw_sh` | Batch Norm shifts of each stage |

### Stream order

The input stream carries, in this order, one packet each of the following. Each
packet ends with tlast.

1. **Depthwise weights.** 9 x 16-bit per kernel, little-endian, kernels in order.
2. **Depthwise Batch Norm.** (mu, P, beta) x 16 bit per kernel.
3. **Pointwise Batch Norm.** For each filter group, then each pair *j*, it sends the triple of filter *j*, then the triple of filter *j + npairs*.
4. **Pointwise significands (PW).** The first block; see the layout below.
5. **Pointwise exponents (PS).** One byte per weight, exponent in bits 3:0.
6. **IFM tiles.** Each tile is one packet. Pixels are ordered channel, row, column, 8 per beat, first pixel in the low byte.

After every IFM tile the connector checks a counter. A new PW + PS block pair
comes first when the tile count reaches `pw_first`, `pw_first + pw_period`, and
so on (`pw_reloads` times). The stage ends after `n_ifm` tiles.

### Flow control

Flow control is by `tready`: a port whose buffer is full simply holds ready low.
The host can therefore queue a whole stage's transfers. It can also wait for
`ifm_sync`, which pulses whenever an IFM buffer has been consumed.

### Loop nest

The stage's work is the loop nest below. The IFM tiles must arrive in the same order.

```
for t in 0..n_spatial-1            spatial tile
  for gb in 0..n_gblk-1            block of filter groups
    for c in 0..nc-1               input-channel tile (uses kernels c*dw_ch ..)
      depthwise sub-stage on tile (t, c)
      for f in 0..nf-1             filter group gb*nf + f (2*npairs filters)
        pointwise sub-stage: accumulate channels of tile c into ACC-MEM;
        on the last c: Batch Norm + ReLU6 -> OFM set; send the set
```

Two special cases:

- `nf > 1` needs `nc = 1`: one depthwise result is reused by several filter groups without accumulation, because ACC-MEM holds the partial sums of one filter group only. An assertion in `pw_stage` flags other settings.
- With `nc > 1` the same spatial tile is sent once per filter-group block. This is the re-sending that the source's transfer table counts.

### Depthwise sub-stage

A tile starts when three conditions hold:

- its buffer has been filled (tlast seen);
- the pointwise side reports a free input buffer (`m_start_dw`);
- the previous tile has left the pipeline.

The loader issues one padded pixel per clock. It inserts padding pixels as zeros
without reading memory. The 35-register shift line presents the 3x3 window. With
stride 2 only windows at even rows and columns are kept.

The rest of the chain runs at one pixel per clock:

- Conv (6 clocks), Batch Norm (4 clocks) and ReLU6 (1 clock).
- The PW image loader computes `addr = ((ch/32)*npos + idx)*32 + ch%32` (1 clock).
- Kernel and Batch Norm words are read once per channel, in step with the pixels.

A tile of C channels and PH x PW padded pixels takes **C·PH·PW + 15 clocks**.
For a 16x16x32 tile that is 8,207 clocks.

### Pointwise sub-stage

The sequencer issues one read per clock in the order *channel group → filter
pair → position*. Each read fetches:

- 32 pixels, 512 bits, from IFM-MEM3/4;
- 64 significands and 64 exponents, one 512-bit word each from PW-MEM and PS-MEM;
- one 96-bit Batch Norm word.

MAC unit 1 handles filter *j* of the pair and MAC unit 2 filter *j + npairs*.
Each MAC unit:

- multiplies 32 lanes;
- shifts each product right by its own exponent;
- adds the lanes in a tree;
- in its eighth stage, adds the partial sum read from its ACC-MEM at `pair*npos + pos`.

On the last input-channel tile the totals go through Batch Norm and ReLU6
instead of back to ACC-MEM. They land in the current OFM set at the same
address.

A sub-stage issues `cgroups·3136` reads and ends about 14 clocks after the last
read. With one channel group that is ≤ 3,152 clocks.

### Weight layout and ping-pong

Significands and exponents are consumed strictly in order. For each `c`, `f`,
channel group, pair: one 512-bit word holds the 32 channel weights of filter *j*
(low half) and of filter *j + npairs* (high half).

After `pw_blk_words` words the read pointer returns to the start of the block.

With `pw_pingpong` set, PW-MEM and PS-MEM act as two halves of 256 read words
(16,384 values) each:

- the stream fills one half while the other is read;
- a half is released when its block has been used up.

### Send Results

The two ReLU6 lanes write OFM-MEM1/2 (set 0) or OFM-MEM3/4 (set 1). A finished
set is sent as `npos·npairs` bytes of lane 1, then the same of lane 2, 8 pixels
per beat, with tlast on its last beat.

A set is freed when sent. The pointwise sequencer does not start the last
channel tile of a filter group while the set it would write is still occupied.

## Number formats and arithmetic

- **Depthwise convolution.** Unsigned 8-bit pixel x signed 16-bit weight, summed exactly in 32 bits.
- **Pointwise convolution.** `sum_i (pix_i * sig_i) >>> exp_i`, where `pix` is a 16-bit unsigned Q3.13 pixel, `sig` is signed 8-bit and `exp` runs 0..15. The per-layer exponent bias is folded into the Batch Norm shifts.
- **Batch Norm.** `y = (((x >>> sh_in) - mu) * P >>> sh_mul) + beta) >>> sh_out`, all arithmetic shifts. There is no saturation before ReLU6.
- **ReLU6.** Clamps to `[0, 6 << FRAC]`. It gives Q3.13 (16 bit) after the depthwise part and Q3.5 (8 bit) after the pointwise part.

## Configurations of the 13 stages

The table shows how the network's stages map onto `cfg`:

- Tile shapes follow the source's tiling.
- Counts follow its transfer table.
- npos x npairs is always 3,136.

| stage | tile stored (pad) | stride | npos x npairs | nc | weight blocks |
|---|---|---|---|---|---|
| 1 | 16x16x32 (host-padded) | 1 | 196 x 16 | 1, nf=2 | 1 of 2,048 values |
| 2 | 15x15x32 (host-padded) | 2 | 49 x 64 | 2 | 1 |
| 3 | 16x16x32 | 1 | 196 x 16 | 4 | 1 of 16,384 |
| 4–6 | 16x16 / 15x15 x32 | 1 / 2 | as above | 4–8 | 2–8 blocks, ping-pong |
| 7–11 | 14x14x32, `PAD_FULL` | 1 | 196 x 16 | 16 | 16 ping-pong blocks of 16,384 |
| 12 | 14x14x32, `PAD_HALF` | 2 | 49 x 64 | 16 | 32 ping-pong blocks |
| 13 | 7x7x128, `PAD_FULL`, cgroups=4 | 1 | 49 x 64 | 8 | 64 ping-pong blocks |

All of them fit the memories:

| memory | capacity | largest need |
|---|---|---|
| DW-MEM and DW-BN-MEM | 1,024 kernels | 1,024 in stage 13 |
| PW-BN-MEM | 1,024 filters | 1,024 in stages 12–13 |
| IFM-MEM1/2 | 8,192 pixels | 8,192 |
| PW-MEM and PS-MEM | 32,768 values, or 2 x 16,384 | blocks of at most 16,384 |

Compute time alone is dominated by the depthwise part. For example, stage 7
needs 256 tiles x 8,207 clocks = 2.1 M clocks, about 18 ms at 115 MHz.

## Where this RTL departs from the reference design

- **Depthwise sub-stage time.** The reference quotes 8,244 clocks for every depthwise sub-stage. Here the time is C·PH·PW + 15:
  - 8,207 clocks for a 16x16x32 tile;
  - less for 15x15 stride-2 tiles;
  - 10,383 clocks for the 9x9x128 tiles of stage 13.
- **Pointwise sub-stage time.** The pointwise sub-stage matches the quoted 3,152 clocks for one channel group. Stage 13 (four groups) runs as one longer sub-stage.
- **PW-MEM and PS-MEM read width.** Both are read 512 bits wide, 64 values. The reference's memory description gives both 256 and 512 bits. 512 is what two 32-lane MAC units need per clock.
- **Padding.** It can be done in hardware (`PAD_FULL`, `PAD_HALF`) as well as by the host (`PAD_NONE`). The reference describes both approaches in different places. Half padding is placed bottom/right.
- **Synchronisation.**
  - The reference lets software wait for a sync signal before each transfer. Here the stream ports also apply back-pressure, so an early transfer stalls instead of corrupting a buffer.
  - `ifm_sync` is provided as the sync signal.
  - The depthwise start permission (`m_start_dw`) is a level ("an IFM buffer is free") rather than a pulse.
- **Stage configuration.** It arrives as a plain input struct. The reference does not say how the logic learns the stage shape; in a system this would be a small register bank.
- **Vendor IP is replaced by plain RTL.**
  - The DMA width converters are replaced by a simple byte repacker that flushes a zero-padded word at tlast.
  - The block RAMs are replaced by an inferred array with one-clock read latency.
- **Send Results** takes two clocks per output beat. The reference does not state a rate. This rate keeps up with the pointwise output: 6,272 bytes per ≥3,152 clocks, against 784 beats in 1,568 clocks.
- **Pipeline splits.** The split of the depthwise adder tree (9→5→3→2→1), the position of the Batch Norm shifts, the host data layouts and the stage loop encoding are this design's own. They are documented in each file's header.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

| testbench | what it establishes |
|---|---|
| `tb_mbn_accel` | end to end at default parameters, see below |
| `tb_dw_stage` | all output pixels/addresses for 16x16, 14x14 half-pad stride 2 and 7x7x128 tiles; tile period ≤ C·PH·PW + 52; stalls |
| `tb_pw_stage` | OFM stream for nf=2, accumulation + reload, 4 channel groups; every sub-stage issues cgroups·3136 reads and ends within 16 clocks |
| `tb_dw_image_loader` | every window against a software padding model, random shapes/padding/stride; tile time C·PH·PW |
| `tb_pw_mac` | multi-pass accumulation against an integer model; latency 8 |
| `tb_send_results` | byte order, tlast, set alternation and back-pressure; 2 clocks/beat |
| `tb_stream_connector` | random schedules, per-port packet order, reloads, stage_done |
| `tb_axis_width_conv` | random packets and gaps, zero-fill and tlast; one beat per clock |
| `tb_dw_conv`, `tb_batch_norm`, `tb_relu6`, `tb_dw_srl`, `tb_pw_image_loader`, `tb_sdp_ram` | arithmetic, latency and addressing of the leaf units |

### The end-to-end test

`tb_mbn_accel` drives the top with its default parameters. It runs eight stages.
The first four are shaped like stages 1, 7–11, 12 and 13 of the network with
reduced channel counts. The last four are complete layers: stage 13
(7x7x1024 in, 1024 filters, 64 weight blocks), one of stages 7–11
(14x14x512 in, 512 filters, 16 weight blocks), stage 12 (14x14x512 in,
stride 2, 1024 filters, 32 weight blocks) and stage 3 (56x56x128 in as 16
host-padded tiles, 128 filters, one resident weight block). Throughout:

- a host model streams kernels, parameters, weight blocks and tiles, while dropping `tready` at random on the output;
- an integer reference model computes every OFM byte.

It also counts each mechanism and fails if any never occurred:

- IFM stalls on full buffers;
- weight reloads and PW-MEM half switches;
- accumulation over channel tiles;
- hardware full and half padding, and stride 2;
- OFM set switching;
- several channel groups, and several filter groups per tile;
- output back-pressure.

### Running a test

Each test runs in seconds with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/mbn_pkg.sv $(ls rtl/*.sv | grep -v mbn_pkg) tb/tb_mbn_accel.sv \
    --top-module tb_mbn_accel -o tb && ./obj_dir/tb +verilator+rand+reset+2
```

Memories are not reset. Run with `+verilator+rand+reset+2` to start them at
random values, as the tests were run.

### Not covered

- Of the full-size layers, only stages 3, 12, 13 and one of stages 7–11 are simulated end to end. The other stages are covered by their tile shapes with fewer channels or tiles.
- A whole network inference, with the host chaining the layers, is not simulated.
- Timing closure and resource use on an FPGA have not been checked.
