# RISP reconfigurable unit — SystemVerilog model

An SSD has far more bandwidth inside, across its flash channels, than it has
over its host link. RISP (reconfigurable in-storage processing) puts a small
FPGA fabric, the **reconfigurable unit (RU)**, between the flash channels and
the SSD's embedded CPU. Every channel has its own **processing cell**, which runs
the one application the RU is configured for. The cells stream the raw data of
their channels and write only the results to the on-device DRAM, from which the
host reads them. This saves both time and energy.

The energy-aware part is the **choice of how many cells to enable**. A
low-complexity kernel such as Sobel can produce results faster than a SATA
link can carry them, so running it on all 64 channels only burns power. The
RU therefore enables only `n` cells. `n` comes from linear power and bandwidth
models, for example `P = 1858 mW + 32 mW·n` and `B = 190 MB/s·n` for Sobel.
Each enabled cell then processes a contiguous group of channels, one channel
after another. With a 3 W budget the models give `n = 36`. Behind a 1.97 GB/s
SATA link they give `n = 10`, with groups 0–5, 6–11, 12–18 and so on.

This repository holds a synthesizable RTL model of that RU. The flash arrays
and the DRAM are modelled as on-chip RAMs. It includes three kernels:
K-Means, Binarization and Sobel.

## Structure

```
risp_top
 ├─ ru_ctrl            register file for the embedded CPU, job sequencer, irq
 │   ├─ chan_planner   n from the power and bandwidth models
 │   └─ chan_mapper    channel -> cell groups (starts mask, owner table)
 ├─ g_ch[c]  (c = 0 .. N_CH-1)
 │   ├─ nvm_emu        NVM array of the channel (512 x 72-bit RAM)
 │   ├─ nvmc           NVM controller: commands, bandwidth throttle
 │   └─ proc_cell      processing cell
 │       ├─ pc_kmeans  nearest-centre + private per-cluster sums
 │       ├─ pc_binarize
 │       └─ pc_sobel
 ├─ pub_cell           public cell: line arbiter, K-Means reduction, centre table
 │   └─ udiv_seq       32-cycle sequential divider
 ├─ global_mem         on-device DRAM: 128-byte lines, host or RU owns it
 └─ regular_path       regular (non-ISP) mode: NVM <-> DRAM word copies
```

`risp_pkg` holds the shared constants and the `app_e` and `mode_e` enums.

## How a job runs

The embedded CPU programs `ru_ctrl` through a 32-bit register port
(`cpu_we`, `cpu_addr[4:0]`, `cpu_wdata`, `cpu_rdata`):

| addr | name    | meaning |
|------|---------|---------|
| 0    | CTRL    | write bit0 = start, bit1 = clear irq; read {n_active[15:8], irq[1], busy[0]} |
| 1    | MODE    | bit0: 1 = ISP, 0 = regular; bits 2:1: app (0 K-Means, 1 Binarization, 2 Sobel) |
| 2    | NSEL    | cells to enable; 0 = use the planner |
| 3    | LEN     | bytes per channel to process |
| 4    | THRESH  | Binarization luminance threshold |
| 5    | WIDTH   | Sobel tile width in pixels (≤ 64) |
| 6    | ITERS   | K-Means iterations |
| 7    | RESBASE | first global-memory line of the result area |
| 8    | CENLINE | line the K-Means centres are written to |
| 9–14 | P0, P1, BUDGET (mW), BW, HOST (MB/s), BETA (1/1000) | planner model |
| 15   | PLANEN  | bit0 power limit, bit1 bandwidth limit |
| 16–20| DIR, NWORDS, NVM addr, DRAM line, channel | regular-mode transfer |
| 21   | CENW    | write centre element: bits 15:8 index (k·9+d), 7:0 value |
| 22   | CYCLES  | cycles taken by the last job |
| 23   | PLAN    | {n_bw[23:16], n_power[15:8], n[7:0]} as the planner sees them now |

Register writes are ignored while a job runs. A write of CTRL.bit0 starts the
sequence below.

1. **Plan.** `n` is NSEL if it is not 0. Otherwise it is the minimum of the
   enabled limits, each rounded to the nearest integer:
   - `n_power = round((BUDGET − P0) / P1)`;
   - `n_bw = round(HOST · BETA / BW)`.

   The planner has no divider. For every `n` it tests `2·model(n) ≤ 2·limit +
   slope` in parallel and counts the `n` that pass. Rounding to nearest
   reproduces the published 36 for Sobel, even though `1858 + 32·36` is
   3010 mW, a little over 3 W.
2. **Map.** `chan_mapper` walks the channels once, `N_CH+1` cycles in all.
   Group `i` is channels `⌊iN/n⌋ … ⌊(i+1)N/n⌋−1`. Its cell is the one on its
   first channel. This gives `starts` (the enabled cells, also
   `cell_power_en`) and `owner[c]`.
3. **Run.** For K-Means the cells' private sums are cleared first. Each
   enabled cell then runs through its group. On every channel it sends one
   read command to that channel's `nvmc`, streams the data through the kernel
   and packs the results into 128-byte lines. Channel `c`'s results always go
   to lines `RESBASE + c·LINES_PER_CH …`, whichever cell computed them.
   `pub_cell` moves one line per cycle into `global_mem`, using round-robin
   arbitration.
4. **Reduce** (K-Means only). `pub_cell` adds the sums and counts of the
   enabled cells, one cell per cycle. It divides each feature sum by its
   cluster count, 32 cycles per element. A cluster that received no points
   keeps its centre. The new centres go to the centre table that all cells
   read, and as one line to CENLINE. Steps 3–4 repeat ITERS times.
5. **Finish.** When every cell is done and no line is pending, `irq` is raised.
   From start to irq the RU owns the global memory: `host_gnt` stays low
   whatever the host requests. Afterwards the host reads the results through
   `host_*`.

In regular mode a job is a single `regular_path` transfer. It copies NWORDS
9-byte words between a channel's NVM and consecutive DRAM lines, in either
direction. Each word occupies bytes 0–8 of its line.

## Channel routing and group switching

This is the part of the design that is hardest to see from the code. Each
`proc_cell` exposes `cur_ch`, the channel it is working on. In ISP mode
channel `c`'s `nvmc` is connected to cell `owner[c]`, but only while that
cell's `cur_ch == c`. The data stream of `nvmc[c]` goes back to the cell whose
`cur_ch` is `c`. When a cell finishes a channel it moves `cur_ch` on. That
hands the next channel's controller to the cell, so a cell never talks to two
controllers at once. `ev_group_switch` pulses on each such hand-over. In
regular mode the channel named in register 20 is driven by `regular_path`
instead.

Because each channel's results land in that channel's own region, the output
layout does not depend on `n`. Running Sobel with 10 cells or with 64 cells
writes the same bytes to the same lines. Only the time differs.

## Timing and rates

| item | value | origin |
|------|-------|--------|
| RU clock `F_RU_MHZ` | 100 | published configuration |
| channel read bandwidth `B_CH_MBPS` | 400 MB/s → 4 bytes/cycle average | published |
| `nvmc` throttle | credit counter: +400 per cycle, −100 per byte sent; a K-Means beat is 9 bytes | own mechanism |
| kernel input α | K-Means 9 bytes/cycle, Binarization and Sobel 1 byte/cycle | published |
| kernel latency n_delay | K-Means 15, Binarization 2, Sobel 4 cycles | published |
| DRAM port | one 128-byte line per cycle (12.8 GB/s; the published DRAM rate is 15 GB/s) | own choice |
| one channel, byte kernels | ≈ LEN cycles plus about 20 cycles of set-up and drain | measured |

Sobel and Binarization consume one byte per cycle, so they are limited by the
kernel (α = 1), not by the 4 bytes/cycle channel. K-Means wants 9
bytes/cycle, so it is limited by the channel to one point per 2.25 cycles.
`ev_nvm_bw_stall` shows each cycle in which a controller holds data back
because it has used its bandwidth. `ev_cell_stall` shows each cycle in which a
cell waits for its result line to be taken.

## Kernels

- **Binarization** (`pc_binarize`). It reads R, G and B bytes and computes the
  luminance `(77R + 150G + 29B) >> 8`. It writes one byte per pixel: 1 if the
  luminance ≥ THRESH, else 0. The ratio of input to output is 3, matching the
  published β = 3. The luminance weights are this design's choice.
- **Sobel** (`pc_sobel`). It works on a tile WIDTH pixels wide, one byte per
  pixel, with two line buffers. The magnitude is `|Gx| + |Gy|`, saturated to
  255. Only interior pixels produce a result; the outer ring of each tile is
  dropped. The magnitude form and the border rule are this design's choice.
- **K-Means** (`pc_kmeans`). A point is nine 8-bit features, one NVM word.
  There are 4 clusters. The kernel computes squared Euclidean distances in a
  pipeline; ties go to the lowest cluster index. It outputs one label byte per
  point. It also accumulates 32-bit per-cluster feature sums and counts, which
  are the cell's private memory. K = 4 and the point format are this design's
  choice.

Every kernel has a clock enable. When the cell's pending line is full and not
yet taken, the whole kernel pipeline freezes instead of dropping results.

## Where this model departs from the published RISP

- **Reconfiguration.** All three kernels are present in every cell, and MODE
  selects one of them. Loading a bitstream (about 10 ms) is not modelled.
- **Storage.** The NVM and the DRAM are on-chip RAMs. The NVM is 512 words ×
  9 bytes per channel, which is 288 KiB over 64 channels. The published data
  sets (0.3–1.4 GB) do not fit. Flash timing other than the bandwidth limit is
  not modelled.
- **Not included.** The embedded CPU, host CPU, host interface/DMA and flash
  chips are not part of the RU. The top brings out the CPU register port and
  a DRAM line port in their place.
- **No data between channels.** No data is exchanged between channels: a
  Sobel tile never spans two channels.
- **K-Means output.** K-Means writes labels plus centres. Its output ratio is
  therefore 9, not the published 3.6466.
- **Planner models.** The planner's models are given by the CPU as two linear
  functions. Only the Sobel coefficients are published. For the other
  applications, write NSEL directly; the published operating points are 31 of
  64 cells for Binarization and 51 for K-Means.
- **Grouping.** With 10 of 64 channels the groups follow the published
  example: 0–5 and 6–11. The remaining 4 channels are spread so that some
  groups have 7 channels.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint \
  rtl/risp_pkg.sv rtl/*.sv tb/tb_risp_top.sv --top-module tb_risp_top -Mdir obj
./obj/Vtb_risp_top
```

Replace `tb_risp_top` with any other testbench name.

| testbench | what it shows |
|-----------|---------------|
| `tb_risp_top` | 8 channels × 64 words. It loads data in regular mode and runs Binarization with the planner choosing 3 cells, Sobel on all cells and 2 K-Means iterations on 4 cells. It checks every result byte against a reference, checks the job times, and counts each mechanism (host refused, group switches, bandwidth stalls, reductions, app switches). |
| `tb_risp_top_full` | default size: 64 channels × 512 words. The planner is given the Sobel models (3 W budget, SATA 1.97 GB/s) and picks 10 cells. All 64 channels of Sobel output are checked. The job takes 32,398 cycles, close to the 7 channels × 4,608 bytes of the largest group. Building it takes several minutes; the run takes about a second. |
| `tb_<block>` | one per block, including rate checks for `nvmc`, latency checks for the kernels, and group tables for the mapper. |

## Changing the design

- `N_CH`, `NVM_WORDS`, `B_CH_MBPS` and `F_RU_MHZ` are parameters of
  `risp_top`. The global memory is sized from them: `N_CH ·
  ⌈9·NVM_WORDS/128⌉ + 1` lines. The extra line holds the K-Means centres.
- `KM_K`, `KM_DIM`, `SOBEL_MAX_W` and the α and n_delay constants are in
  `risp_pkg`.
- To add a kernel, give it the same `en`/`in_valid`/`out_valid` contract as
  the others. Then add an `app_e` value and a branch in `proc_cell`'s packer.
