# Integral-histogram joint bilateral filter for HD1080p video

This is a hardware joint bilateral filter (JBF). It smooths an 8-bit source
image `J`, using the edges of an 8-bit guidance image `I`. Every output
pixel is a range-weighted mean of the source pixels in a 31×31 box around it:

```
O(c) = Σ_q g(|I_c − I_q|) · J_q  /  Σ_q g(|I_c − I_q|)        q in the 31×31 window of c
```

`g` is a Gaussian of the intensity difference. Evaluated directly, that is
961 weighted terms per pixel. The design uses histograms instead. Guidance
intensities are quantised to 64 bins of 4 grey levels each. Each window
then keeps two histograms:

- `h(b)`: how many window pixels have guidance intensity in bin `b`;
- `h'(b)`: the sum of the source values `J` of those pixels.

The filter then becomes a 64-term ratio:

```
O(c) = Σ_b G(b)·h'(b) / Σ_b G(b)·h(b),     G(b) = g(|I_c − 4b|)
```

This cost does not depend on the window size. Histograms of sliding windows
come cheaply from **integral histograms** (IH), the histogram analogue of a
summed-area table.

The difficulty is memory. A full-frame integral histogram at 1080p with
64 bins of wide counters takes hundreds of megabytes. Three measures bring
the on-chip storage down to **23,040 bytes**, independent of the frame size:

- a vertical **stripe** decomposition;
- a **sliding origin** for the integral;
- run-time updating, so only one row of integral histograms is kept.

Defaults:

| Parameter | Value |
|---|---|
| Frame | 1920×1080 (M = 1080 rows, N = 1920 columns), smaller frames chosen at run time |
| Window | 31×31 (`WIN`) |
| Stripe width | 60 columns (`WS`) |
| Histogram bins | 64 (`NB`) |
| Range-weight table | 32 entries of 8 bits (`TBL_N`, `G_W`) |
| Off-chip bus | 64 bits (8 pixels per beat) |

The core produces one output pixel per clock. A 1080p frame takes
3,363,881 cycles, which is 59.5 frames/s at 200 MHz.

## The sliding-origin recurrence

Work inside one stripe and call the top row of the current window band the
*origin*. Define `IH(x,y)` as the histogram of every pixel in columns `0..x`
and rows `y−30..y`. That is a band of exactly 31 rows, which slides down
together with the window. The recurrence is:

```
IH(x,y) = IH(x−1,y) + IH(x,y−1) − IH(x−1,y−1) + Bin(S) − Bin(Q)
          S = pixel (x, y)        enters the band
          Q = pixel (x, y−31)     leaves the band
```

`Bin(p)` is zero except in the bin of `I_p`. That bin holds 1 for the
count histogram and `J_p` for the intensity histogram.

The 31×31 window whose bottom-right corner is `(x, y)` then needs only a
two-term difference:

```
h(x,y) = IH(x,y) − IH(x−31,y)          (IH left of column 0 is zero)
```

Because the band is always 31 rows high, no counter ever holds more than
31 × 90 pixels. Count bins are 12 bits wide. Intensity bins are 8 bits
wider, 20 bits.

## Stripes and the integral region

The frame is processed in vertical stripes of 60 columns, 32 stripes at
1080p. A window centred in a stripe reaches 15 columns beyond each side.
Each stripe is therefore swept over its **integral region** (IR): the
stripe plus 15 columns on each side, 90 columns in all.

Within the IR:

- positions are visited in raster order, one per cycle;
- a window is complete at IR column `x ≥ 30`, and its centre is at
  `(x−15, y−15)`;
- the first 30 columns of each IR row only build up the integral.

Row `y` runs from 0 to `frame_m + 14`. The last 15 rows have no entering
pixel. Only pixels leave the band, so the windows centred on the bottom
15 frame rows are completed too.

**Frame borders.** Pixels outside the frame contribute nothing, so windows
are clipped at the frame edge. This is a choice of this design. The
controller does it with per-pixel valid masks: a masked pixel neither
enters nor leaves the histograms.

## Histogram engine (`hist_engine`, `sba`, `ih_bank`)

There are two identical engines:

- one integrates the constant 1 (the count histogram `h`);
- the other integrates `J` (the intensity histogram `h'`).

Each engine evaluates the recurrence for all 64 bins in parallel and
accepts one IR position per cycle.

- **Selected-bin adders (`sba`).** Adding `Bin(S)` to a histogram changes
  one bin only. A selector picks that bin, a single adder updates it, and a
  selector array puts it back. SBA I adds `Bin(S)` to `IH(x,y−1)`. SBA II
  subtracts `Bin(Q)` from `IH(x−1,y)`. An adder array then subtracts
  `IH(x−1,y−1)` and combines the two.
- **Delay buffers.** `IH(x−1,y)` is the engine's own result from the
  previous cycle. `IH(x−1,y−1)` is the word read from memory in the
  previous cycle. Both are held in registers, so memory serves only two
  reads per cycle: `IH(x,y−1)` and `IH(x−31,y)`.
- **Banked row memory.** The on-chip memory holds one IR row of integral
  histograms (90 words). It is split by column parity into two `ih_bank`s
  of 45 words. The two reads are for columns `x` and `x−31`. Their
  distance is odd, so the two reads always fall in different banks, and
  each bank needs one read port and one write port. The new `IH(x−1,y)` is
  written over `IH(x−1,y−1)`, which is never needed again.
- **Extraction.** A subtractor array forms `IH(x,y) − IH(x−31,y)`.

Boundary cases:

- the first row of a stripe treats the row above as zero;
- column 0 treats the left neighbour as zero.

Engine latency is 2 cycles: one for the synchronous memory read, one for
the compute stage. All bin arithmetic is modulo 2^width. This is exact,
because every window count fits.

Memory per stripe:

```
  count engine:     2 banks × 45 words × (64 × 12 bits) =  69,120 bits
  intensity engine: 2 banks × 45 words × (64 × 20 bits) = 115,200 bits
  total                                                 = 184,320 bits = 23,040 bytes
```

`ih_bank` is written as a plain register array with one synchronous read
and one write. In silicon it maps to a two-port SRAM macro. A read and a
write to the same address in one cycle return the old word, but the engine
never does this.

## Convolution engine (`conv_engine`, `weight_table`, `table_selector`, `pipe_div`)

**Weight table.** A Gaussian is symmetric and falls below 2⁻⁸ after a few
σ. One 32-entry table of `g(d)` for `d = |I_c − intensity|` is therefore
enough for σ_r below about 32.

- Entry `d` holds `round(255·exp(−d²/2σ_r²))`.
- Distances of 32 or more give zero.
- The table is a small register file loaded through `tbl_we/tbl_waddr/tbl_wdata`
  before a frame, so σ_r is a run-time setting. It resets to all zeros, so
  load it before the first frame.

**Table selectors.** There are 64 table selectors, one per bin, and all of
them read the single table. Selector `b` picks entry `|I_c − 4b|`. This
replaces 64 private 256-entry tables.

**Pipeline.** The engine takes one pixel per cycle. Pipeline registers sit:

1. after table selection;
2. after the two arrays of 64 multipliers (`G·h` and `G·h'`);
3. after the two adder trees (denominator up to 26 bits, numerator up to
   34 bits);
4. in an 8-stage restoring divider, one stage per quotient bit.

The quotient is truncated. It always fits in 8 bits, because it is a
weighted mean of 8-bit values. A zero denominator gives 0. That cannot
happen while entries 0 to 3 are non-zero, because the centre pixel always
lies in its own window, within 3 levels of its bin. Latency is 11 cycles.

`jbf_core` is the two engines followed by the convolution engine, with a
total latency of 13 cycles. A tag (lane, enable, output address) travels
alongside every slot, so results need no separate bookkeeping.

## Interface and the 8-cycle tile (`access_ctrl`, `in_pingpong`, `out_pingpong`)

Each IR row is cut into 12 **pipeline tiles** of 8 positions, since
90 columns need ceil(90/8) = 12 tiles. Every tile takes exactly 8 cycles.
During a tile, a six-state round-robin FSM owns the 64-bit bus:

| State | Bus access | Pixels |
|---|---|---|
| 0 | read `I_c` | 8 window centres, row `y−15`, columns `x−15` |
| 1 | read `I_S` | 8 entering guidance pixels, row `y` |
| 2 | read `J_S` | 8 entering source pixels |
| 3 | read `I_Q` | 8 leaving guidance pixels, row `y−31` |
| 4 | read `J_Q` | 8 leaving source pixels |
| 5 | write | the 8-pixel result packet waiting in the output buffer |

After state 5 the FSM idles until the tile's 8 cycles are over.

**Input buffers.** Each of the five input streams has a 2×8-pixel
ping-pong buffer (`in_pingpong`). One half is in *Update* mode and takes a
whole 8-pixel bus word in one cycle. The other half is in *Give* mode and
hands one pixel per cycle to the core. All five buffers swap on the last
cycle of each tile. The data read during tile `t` is therefore consumed
during tile `t+1`, and the core sees an unbroken stream of one position per
cycle.

**Valid masks.** When the controller issues a read, it also writes an
8-lane valid mask into the Update half. A lane is valid when its pixel lies
inside the frame and inside the IR. For `I_c`, the window must also be
complete and its centre inside the frame. A read whose mask is all zero is
not put on the bus.

**Output buffer.** `out_pingpong` collects results by lane. The result on
lane 7 closes the packet and swaps the halves. The controller writes the
packet in state 5 of the next tile, with byte enables for the valid lanes.
One packet closes every 8 cycles and there is one write slot every
8 cycles, so the output buffer can never overrun. An assertion checks this.

**Drain.** After the last tile, 5 empty tiles let the 13-cycle core and
the output buffer drain. `done` then pulses for one cycle.

## Frame layout and bus protocol

These are this design's own choices.

- **Frame layout.** `I`, `J` and `O` are `frame_m × frame_n` arrays of
  bytes, stored row-major. Each starts at a pixel (byte) address:
  `base_i`, `base_j` and `base_o`.
- **Unaligned beats.** An 8-pixel beat may start at any pixel address.
  Stripes and windows start at arbitrary columns, so the memory side
  (controller or testbench model) must handle the unaligned access.
- **Request.** `bus_req_t` carries `req`, `we`, `id[2:0]`, `addr[31:0]`,
  `wdata[63:0]` and `be[7:0]`. Byte `k` of `wdata` is pixel `addr+k`.
  There is at most one request per cycle and no back-pressure.
- **Response.** `bus_rsp_t` carries `rvalid`, `rid[2:0]` and
  `rdata[63:0]`. Read data must come back within 3 cycles of the request
  and carry the request's `id`; the id is the FSM state. An assertion
  flags a response that arrives after its tile has ended.

The bus is busy at most 6 cycles out of 8 (75% of its peak); reads that fall entirely outside the frame are skipped.

## Timing and throughput

```
cycles (start → done) = ceil(frame_n/60) · (frame_m + 15) · 12 · 8 + 8·5 + 1
```

| Frame | Stripes | Cycles | Frames/s at 200 MHz |
|---|---|---|---|
| 1920×1080 | 32 | 3,363,881 | 59.5 |
| 1280×720 | 22 | 1,552,361 | 128.8 |
| 640×480 | 11 | 522,761 | 382 |
| 352×288 | 6 | 174,569 | 1146 |

Any frame up to `M × N` and at least `WS` wide can be chosen at run time
through `frame_m`/`frame_n`. Larger frames need the `M`/`N` parameters
raised. The on-chip memory does not change with frame size.

## Where this design departs from the reference architecture

- **Rows swept per stripe.** The reference schedule sweeps `M` rows per
  stripe, which gives 3,317,760 cycles and exactly 60 frames/s at 200 MHz.
  Here each stripe sweeps 15 more rows so that the windows centred on the
  bottom rows are complete. This costs 1.4% of throughput.
- **Weight table.** The range-weight table is loadable instead of a
  constant.
- **Frame borders.** These are handled by clipping the window. The
  reference leaves border behaviour open.
- **Undefined details chosen here.** The bus handshake, the image layout,
  the order of FSM states 1 to 4, the pipeline-register positions in the
  convolution engine, the rounding of the division and the reset values
  are all this design's choices.
- **Configuration.** The implemented configuration is the pipelined
  200 MHz one, with pipeline registers in the convolution engine. A
  slower-clock, less pipelined variant is not provided.

## Files

| File | Contents |
|---|---|
| `rtl/jbf_pkg.sv` | shared constants, bus structs, slot enum, result tag |
| `rtl/jbf_top.sv` | top level: interface plus core |
| `rtl/access_ctrl.sv` | stripe/row/tile walker, round-robin bus FSM, masks and addresses |
| `rtl/in_pingpong.sv`, `rtl/out_pingpong.sv` | ping-pong buffers |
| `rtl/jbf_core.sv` | two histogram engines plus the convolution engine |
| `rtl/hist_engine.sv`, `rtl/sba.sv`, `rtl/ih_bank.sv` | histogram calculation |
| `rtl/conv_engine.sv`, `rtl/weight_table.sv`, `rtl/table_selector.sv`, `rtl/pipe_div.sv` | kernel and convolution |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_jbf_top_full.sv` | the whole filter at default parameters on one 1920×1080 frame |
| `tb/tb_jbf_workloads.sv` | CIF, VGA and HD720p frames at default parameters |

## Simulation

Every testbench is self-checking. It compares against a reference model
written directly in the testbench, has a cycle watchdog, and ends with a
line `TB_RESULT checks=<n> failures=<n>`. Run from the repository root with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_jbf_top \
    -Irtl -y rtl +libext+.sv rtl/jbf_pkg.sv tb/tb_jbf_top.sv -o sim
./obj_dir/sim
```

Replace `tb_jbf_top` with any other testbench name. What the main
testbenches check:

- **`tb_jbf_top`** runs the complete filter on small frames (10×40 and
  7×20, window 5, stripe 16). It uses a behavioural memory with 2-cycle
  read latency. Checks:
  - every output pixel against a brute-force clipped-window JBF;
  - every output pixel written exactly once, with no stray writes;
  - the exact cycle count.

  It also counts and requires every mechanism: skipped reads, full and
  partial packets, buffer swaps, stripe changes, first rows, and masked
  entering and leaving pixels.
- **`tb_jbf_top_full`** instantiates `jbf_top` with no parameter overrides
  and filters one 1920×1080 frame. Checks:
  - every pixel written once;
  - about 3,000 sampled pixels, including all corners and stripe seams,
    against the brute-force reference;
  - the exact 3,363,881-cycle frame time.

  It runs in a few seconds.
- **`tb_jbf_workloads`** keeps the default parameters and runs CIF
  (352×288), VGA (640×480) and HD720p (1280×720) frames back to back,
  chosen at run time. The memory answers at the maximum 3-cycle read
  latency. Checks:
  - the exact frame time of each frame;
  - write-once coverage, with no writes outside the result image;
  - every CIF pixel against the brute-force reference;
  - about 2,400 pixels per larger frame, including the narrow last stripe.
- **Unit testbenches.** `tb_hist_engine` and `tb_jbf_core` compare the
  window histograms and results against direct window sums across stripe
  boundaries. `tb_conv_engine` compares against an integer model of the
  weighted ratio at the default sizes.

The testbenches load the weight table for a chosen σ_r as
`round(255·exp(−d²/2σ_r²))`. Random stimuli come from `$urandom`. Verilator simulates with two states, so the RTL resets or
initialises everything that is read before it is written.
