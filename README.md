# Multiview H.264 encoder pipeline in SystemVerilog

This is a synthesizable model of the macroblock (MB) pipeline of a multiview
video encoder chip. The chip is specified for 4096x2160p at 24 fps in one view,
and for up to 7 views at 720p. The SystemVerilog covers the following:

- the scheduling scheme, which interleaves views in an 8-stage MB pipeline;
- the two-dimensional reference caches;
- integer motion/disparity estimation;
- intra prediction with mode decision;
- reconstruction on a shared multi-transform;
- the two CABAC entropy coders.

Several parts are left out. These are fractional-pel estimation, motion
compensation, the deblocking filter, the system bus, the DRAM controller and
the processor. The top level turns those interfaces into ports.

## Structure

| file | what it is |
|---|---|
| `rtl/mvc_pkg.sv` | Shared types: pixel, 4-pixel word, coefficient, MB tag, vector. Also the CABAC and quantiser tables. |
| `rtl/vpmbi_ctrl.sv` | The view-parallel MB-interleaved (VPMBI) scheduler of the 8 stages, with the ping-pong selection of the two entropy coders. |
| `rtl/view_cache.sv` | The reference cache (see below). |
| `rtl/imde_core.sv` | Integer motion/disparity estimation. It searches ±16 around the best of the predictor vectors. |
| `rtl/multi_transform.sv` | Computes two 4x4 DCT/Hadamard/inverse transforms or one 8x8 DCT/inverse per cycle. |
| `rtl/intra_pred_gen.sv` | Produces 8 intra predictors per cycle: one row of an 8x8 block, or of two 4x4 blocks. |
| `rtl/ip_core.sv` | Hybrid open/closed-loop intra prediction, SATD cost, mode decision and the I4/I8 choice. |
| `rtl/rec_core.sv` | Reconstruction: residual, transform, quantise, dequantise, inverse transform, add. |
| `rtl/ec_core.sv` | The CABAC arithmetic coder, two bins per cycle. |
| `rtl/mvc_encoder_top.sv` | The pipeline: scheduler, two caches, all cores, binarisers and counters. |

### Pipeline and schedule

An MB passes through eight stages:

1. IMDE prefetch
2. IMDE
3. NOP
4. FMDE prefetch
5. FMDE
6. IP/MDC
7. REC
8. EC/DB

MBs enter in the order V0MB0, V1MB0, ..., V(n-1)MB0, V0MB1, and so on. This
means that the next MB of the same view comes n slots later. The reconstructed
left neighbour is therefore usually ready when intra prediction needs it.

A slot ends when every occupied stage has reported done. Each EC core keeps its
MB for two slots, and the two cores alternate. If a slot would hand an MB to an
EC core that is still busy, the slot waits. The controller counts these waits
and any slot longer than the 350-cycle budget.

### Reference cache

Each cache has the following properties:

- **Addressing:** lines are addressed by (line x, row y, frame). A line is 4
  words of one row, and a word is 4 pixels.
- **Organisation:** 4-way set associative, with round-robin replacement.
- **Misses:** up to 6 outstanding misses (refill entries), shared by reads
  and prefetches.
- **Banks:** the data sit in 5 banks selected by word x mod 5. A read of
  5 words and a refill of 4 words therefore never collide.
- **Reads:** one read request gives 20 pixels of a row in the next cycle when
  it hits. Reads stall in order on a miss, and prefetches continue meanwhile.

### Intra prediction and reconstruction

The IP core evaluates vertical, horizontal and DC prediction for an 8x8 block
and for its four 4x4 sub-blocks at the same time, using two Hadamard
transforms.

Neighbours are chosen as follows:

- **On the MB edge:** the reconstructed pixels forwarded from the REC stage.
- **Inside the MB:** original pixels. This is the hybrid open/closed-loop
  scheme, and it lets IP run in an earlier stage than REC.

The REC core uses one multi-transform for both the forward and the inverse
transform of a 4x8 job, and takes 5 cycles per job.

### Entropy coding

The `ec_core` codes two bins per cycle with two cascaded H.264 coding steps. A
pair of bins may share a context; the second bin then sees the update made by
the first.

The output is bytes. A carry flag goes with them, and the bitstream buffer must
add it to the bytes already written. In the top level, a binariser per core
codes each MB as one slice. For every level it codes:

- significance, with a context per position;
- greater-than-one, with a context per position;
- the sign, as a bypass bin;
- a 14-bit remainder, as bypass bins.

## Departures and limits

- **Throughput:** `imde_core` evaluates one candidate per 17 cycles. A ±16
  search therefore takes about 18,600 cycles per MB, against the chip's budget
  of 350. None of the real-time workloads fit (see the table below). The
  schedule, the cache and the EC ping-pong behave as in the chip. The slots
  are just longer.
- **Modes and costs:** only three intra modes are generated, and the cost is
  SATD. No rate-distortion cost is used.
- **Missing stages:** FMDE, MC and DB are not built, and their stages finish
  at once. REC codes every MB with the chosen Intra_8x8 mode. The inter/intra
  decision is counted but does not change the coding.
- **Top neighbours:** no MB-row line buffer is kept, so the top neighbours are
  the value 128.
- **Binarisation:** the entropy binarisation is a simple scheme of this design,
  not the H.264 residual syntax. Context initialisation sets state 0; a write
  port is provided for loading QP-dependent states.

## Workloads against the built design

Cycles per MB are given at the chip's 280 MHz clock. The first three rows are
the chip's own figures; the stereo and quad rows are common 3D/quad-HD
formats.

| workload | MB/s | cycles per MB | fits |
|---|---|---|---|
| 4096x2160p/24, 1 view | 829,440 | 338 | no: IMDE needs ~18,600 |
| 1080p/30, 3 views | 734,400 | 381 | no |
| 720p/30, 7 views | 756,000 | 370 | no |
| 1080p/30 stereo | 489,600 | 572 | no |
| 720p/30, 4 views | 432,000 | 648 | no |

The EC stage has 700 cycles per core per MB (two slots). The binariser here
takes 256 cycles plus 1 per non-zero level plus 7 per level above 1, so it
keeps up only for sparse MBs.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/mvc_pkg.sv \
    rtl/*.sv tb/tb_ec_core.sv --top-module tb_ec_core -o sim
./obj_dir/sim
```

The same command works for `tb_vpmbi_ctrl`, `tb_view_cache`, `tb_imde_core`,
`tb_multi_transform`, `tb_rec_core` and `tb_ip_core`. Two top-level tests are
provided:

- `tb_mvc_encoder_top` runs a 64x64 frame, 3 views, 8 MBs per view and a ±1
  search. It checks the MB order, the vectors found, the reconstruction error
  and the entropy coder output. It requires that cache misses, prefetches, EC
  waits, over-budget slots, I4 and I8 choices, and intra and inter decisions
  all occur.
- `tb_mvc_encoder_top_full` runs the default size: 4096x2160, ±16 search,
  2 views of 3 MBs.
