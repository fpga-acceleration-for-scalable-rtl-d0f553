# OPIR subframe preprocessing kernel

Space-based overhead persistent infrared (OPIR) sensors produce large 16-bit
frames in which threats show up as dim, point-like targets. A compact
segmentation network (MLCLNet, quantized to 8-bit integers) finds them, but it
works on 128x128 tiles and expects each input pixel as a signed 8-bit value
scaled the way the network was quantized. The detection system around this RTL
therefore cuts every frame into overlapping 128x128 subframes, normalizes them,
runs batched inference on a deep-learning processor and turns the resulting
masks back into detections.

This repository holds the hardware for the normalization step: a
programmable-logic kernel that streams a batch of raw subframes from DDR,
converts 32 pixels per clock into INT8 network inputs and writes them back,
started and monitored by the host through a small register block. Everything
else in that system (the inference processor, the on-chip network, DDR and the
host software threads) is outside the RTL and appears here only as interfaces
and as simulation models.

## Where the kernel sits

```
 host CPU threads            DDR                          programmable logic
 ----------------            ---                          ------------------
 frame -> subframes  ---->  raw subframes (16-bit) ---->  opir_preproc_kernel
 start kernel (AXI-Lite)                                  (this RTL)
                            INT8 subframes  <-----------  
 inference (x2)      <----  queue to the inference processor (batches of 6)
 postprocess         <----  logits -> threshold -> centroids -> detections
```

The kernel has exactly two connections: an AXI4-Lite slave (`s_axi_control_*`)
for the host and one AXI4 master (`m_axi_gmem_*`, 64-bit address, 512-bit data)
that reaches DDR through the on-chip network. Reads and writes share that
master. In the published system it is clocked at 333 MHz.

### Cutting a frame into subframes

Subframes of size S = 128 overlap by d = 3 pixels so that a target on a tile
edge is seen whole by a neighbour. An F x F frame needs

    n^2 subframes,  n = ceil((F - S) / (S - d) + 1)

| frame | subframes | pixels through the kernel | kernel clocks (measured) |
|---|---|---|---|
| 500 x 500 | 16 | 262 144 | 8 231 |
| 1000 x 1000 | 64 | 1 048 576 | 32 911 |
| 2000 x 2000 | 256 | 4 194 304 | 131 631 |
| 4000 x 4000 | 1024 | 16 777 216 | 526 511 (1.58 ms at 333 MHz) |

Tiling is the host's job; the kernel sees a contiguous buffer of whole
subframes, row-major, and does not care where each tile came from. The
testbenches place tile i of a row at column i * (S - d) and clamp the last tile
to the frame edge (F - S); `opir_pkg::subframes_per_frame` gives the count.

## The normalization arithmetic

Each pixel x becomes

    y = saturate_to_int8( round( (x - mean) * inv_std * 2^fix_pos ) )

`mean` and `inv_std` are the dataset statistics the network was trained with;
`fix_pos` is the input scale chosen by the quantizer. Because the quantizer
only uses power-of-two scales, the gain is a shift, not a multiplier.

The three operations are done in fixed point in `preproc_norm_lane`:

| quantity | format |
|---|---|
| x, mean | 16-bit unsigned integers |
| x - mean | 17-bit signed |
| inv_std | 24-bit unsigned, 20 fraction bits (0 .. 16 - 2^-20) |
| product | 42-bit signed |
| gain | arithmetic right shift by 20 - fix_pos, fix_pos in 0..15 |
| rounding | half up: add 2^(shift-1) before shifting (ties go toward +infinity) |
| y | clamped to [-128, 127] |

To program a dataset with standard deviation sigma, write
`inv_std = round(2^20 / sigma)`. Example: mean 16000, sigma 2000, fix_pos 4 gives
inv_std = 524, and a pixel of 20000 becomes round(4000 * 524 / 2^16) =
round(31.98) = 32. With 20 fraction bits, sigma up to a few thousand counts keeps
the relative error of inv_std below 0.2 %; if larger sigmas matter, widen
`INV_W`/`INV_FRAC` in `opir_pkg`.

Each lane is a three-stage pipeline (subtract, multiply, shift/round/saturate).
The constants travel down the pipeline with their pixel, and in the kernel they
come from a copy of the registers frozen at start, so the host may reprogram
the next batch while one runs.

## Moving the data

`preproc_norm_vector` places 32 lanes side by side. One 512-bit AXI read beat
holds exactly 32 pixels, so one beat enters per clock; 32 INT8 results (256
bits) leave per clock, and `preproc_pack` joins two of them into one 512-bit
write beat. Element k of the stream is always in bits [k*16 +: 16] of the input
word and bits [k*8 +: 8] of the output word (little endian).

Flow control is plain valid/ready throughout:

* The read engine (`preproc_axi_rd`) drives RREADY from the datapath's ready, so
  a stall on the write side propagates back to the read data channel without
  any FIFO.
* The normalization pipeline advances when its last stage is empty or being
  taken; otherwise all stages hold.
* The write engine (`preproc_axi_wr`) offers a W beat only after the matching
  burst has been issued on AW, and remembers each burst's length in a small
  queue so WLAST lands on the right beat.

Both engines issue INCR bursts of at most 16 beats (1 KiB), keep up to 4 bursts
in flight, and shorten a burst so that it never crosses a 4 KiB boundary.
Buffers must be 64-byte aligned (the engines ignore the low six address bits)
and `n_elem` a multiple of 64; any whole number
of subframes qualifies.

**Throughput and latency.** With a memory that never stalls the kernel consumes
one input beat per clock: a subframe (16 384 pixels, 512 beats) takes 512
clocks, a batch of six about 3 080 clocks from the start write to the done
interrupt. The pipeline latency from a read beat to the write word holding it is 3 to 4
clocks (3 in the lanes, 1 in the packer once the pair is complete); the rest of the per-call overhead is
the first read latency and the wait for the final write response.

## Control registers

AXI4-Lite, 32-bit data, byte offsets:

| offset | name | meaning |
|---|---|---|
| 0x00 | CTRL | [0] start: write 1 to request, reads 1 until accepted; [1] done, sticky, cleared when CTRL is read; [2] idle; [3] error (an AXI SLVERR/DECERR in the last job), sticky, cleared when CTRL is read |
| 0x04 | IER | [0] drive `irq` while done is set |
| 0x10 / 0x14 | SRC | source byte address, low / high word |
| 0x18 / 0x1C | DST | destination byte address, low / high word |
| 0x20 | NELEM | pixels to process |
| 0x24 | MEAN | [15:0] |
| 0x28 | INVSTD | [23:0], 20 fraction bits |
| 0x2C | FIXPOS | [3:0] |

Programming sequence for one batch: write SRC, DST, NELEM, MEAN, INVSTD,
FIXPOS; set IER if interrupts are wanted; write 1 to CTRL. A start written
while a job runs is held and launched when the kernel turns idle, using the
register values present at that moment. Completion is `irq` or CTRL.done;
reading CTRL acknowledges it. `ap_rst_n` is a synchronous, active-low reset.

## Files

| file | contents |
|---|---|
| `rtl/opir_pkg.sv` | widths, register map, `norm_cfg_t`, `job_t`, subframe count function |
| `rtl/opir_preproc_kernel.sv` | top: the kernel |
| `rtl/preproc_ctrl.sv` | AXI4-Lite register block, job snapshot, interrupt |
| `rtl/preproc_axi_rd.sv` | AXI4 read engine |
| `rtl/preproc_norm_vector.sv` | 32 lanes with valid/ready and stall |
| `rtl/preproc_norm_lane.sv` | one pixel's normalization pipeline |
| `rtl/preproc_pack.sv` | two INT8 vectors per 512-bit word |
| `rtl/preproc_axi_wr.sv` | AXI4 write engine |
| `tb/axi_mem_model.sv` | behavioural DDR: sparse memory, random stalls, protocol checks, error injection |
| `tb/opir_ref_pkg.sv` | reference normalization with 64-bit integers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two below |

The RTL contains SystemVerilog assertions for the AXI rules it must keep
(valid held until ready, no 4 KiB crossing).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/opir_pkg.sv tb/opir_ref_pkg.sv rtl/*.sv tb/axi_mem_model.sv \
  tb/tb_opir_preproc_kernel.sv --top-module tb_opir_preproc_kernel
./obj_dir/Vtb_opir_preproc_kernel
```

Replace the last testbench file and top name to run another one.

* `tb_opir_preproc_kernel` - end to end at the default parameters: a
  synthetic 500x500 frame with point targets and dead pixels is tiled into 16
  subframes and normalized in three calls (6, 6, 4 subframes). It checks every
  output byte, the full-rate timing of the first batch (at most 6*512 + 200
  clocks), and that each mechanism happened at least once: datapath
  back-pressure on reads, memory back-pressure on writes, a burst shortened at
  4 KiB, several reads in flight, a start queued behind a running job, the
  interrupt, saturation at both ends and an error response reported in CTRL.
* `tb_frame_workloads` - whole 500, 1000, 2000 and 4000 pixel square frames in
  batches of six subframes, all output checked, clocks per frame reported
  (the table above). Runs in a few seconds.
* `tb_preproc_norm_lane`, `tb_preproc_norm_vector`, `tb_preproc_pack`,
  `tb_preproc_axi_rd`, `tb_preproc_axi_wr`, `tb_preproc_ctrl` - unit tests:
  rounding ties, saturation, stall hold, rate of one beat per clock, burst
  counts against a computed value, WLAST placement, error flags, register
  strobes, start while busy, clear-on-read.

## How this relates to the published pipeline

Taken from the published design: 16-bit raw input, INT8 output, subtract mean /
multiply by inverse standard deviation / apply the power-of-two quantizer gain,
32 elements in parallel, one AXI master to DDR, 128x128 subframes overlapped by
3 pixels, batches of six for the inference processor, 333 MHz clock.

This design's own choices, each a point where the published description stops:

* fixed-point arithmetic (the original kernel was written in high-level
  synthesis and its number format is not given) with round-half-up and
  saturation; the original used 96 DSP blocks (3 per lane), this RTL one
  17x25-bit multiplier per lane, so resource figures will differ;
* a 512-bit AXI data width, burst length 16, 4 bursts in flight, 4 KiB
  splitting, 64-byte alignment;
* the whole control interface: register map, sticky/clear-on-read status,
  queued start, interrupt, error reporting;
* the valid/ready stall scheme and synchronous reset.

Not in this RTL: the inference processor and the network it runs, the on-chip
network, DDR and its controller, and the host software (tiling, inference
threads, thresholding and centroid extraction). The testbenches model DDR and
the tiling only as far as needed to drive the kernel.
