# Stripe-based elliptical-mask face detector

This design finds a face in a camera frame by shape. A face is modelled as
an ellipse. A bank of elliptical edge masks of different sizes is correlated
with a downsampled copy of the frame. The position and the mask with the
largest correlation tell where the face is and how big it is. Almost all of
the work is the mask correlation, so that part is in hardware. Several
processing elements (PEs) apply different masks at once. A small amount of
synchronisation logic keeps them fed with image rows and masks.

The main configuration:

| quantity | value |
|---|---|
| camera frame | 240 x 320 pixels, 8-bit grey |
| downsampled image | 120 x 160 (factor 2) |
| masks | 93, each 65 x 81 signed 8-bit coefficients, in external memory |
| stripe | 65 rows x 160 columns, one copy per PE |
| PEs | 2, each with 11 multipliers (10 beyond the first) |
| window step | 4 columns and 4 rows |
| clock | 125 MHz |

## How a frame is processed

1. **Downsampling** (`downsampler`). The pixel stream is decimated by 2 in
   both directions: the top-left pixel of every 2x2 block is kept.
2. **Stripes** (`row_transfer_ctrl`). A stripe has as many rows as a mask
   (65) and the full downsampled width. Each downsampled row is held in a
   one-row buffer and then copied into PE 0's stripe RAM, then into PE 1's,
   and so on. The stripe RAM is circular: image row `y` is stored in RAM row
   `y mod 65`. When the last row of a stripe is in, the stripe is started.
3. **Passes** (`pe_synch`, `mask_transfer_ctrl`). With N masks and n PEs a
   stripe needs `m = ceil(N/n)` passes (47 for 93 masks and 2 PEs). In pass
   `i`, PE `j` applies mask `i*n + j`. In the last pass the PEs that have no
   mask left report done at once.
4. **Correlation** (`corr_pe`). Each PE slides its mask over its stripe copy
   at columns 0, STEP, 2*STEP, ... (20 windows at step 4). It keeps the
   largest raw sum of pixel x coefficient and the window column.
5. **Sliding down**. After the m passes the stripe moves down STEP rows. The
   STEP new rows overwrite the oldest rows of the circular RAM. A 120-row
   image gives 14 stripes at step 4. Rows below the last stripe are
   accepted and discarded.
6. **Maximum** (`max_tracker`). After each pass the best PE result is
   compared with the best of the frame so far. At the end of the frame
   `det_valid` pulses with `det` = {value, stripe top row, window column,
   mask number}. Coordinates are in the downsampled image.

```
 pixels -> downsampler -> row_transfer_ctrl --row, PE 0..n-1 in turn--> stripe RAM of each PE
 external memory -> mask_transfer_ctrl --one mask at a time--> mask RAM of each PE
 corr_pe[j] --done--> pe_synch --pass_start--> mask_transfer_ctrl
            --best--> max_tracker -> det_valid, det
 pe_synch <--stripe_start / stripe_done--> row_transfer_ctrl
```

## Synchronisation: self-timed PEs, ordered mask transfers

This is the least obvious part of the design. Read it before you change any
of the controllers.

* **Mask transfers follow a fixed order.** The mask transfer controller
  reads masks from the shared external memory bus one at a time, always in
  the same order: PE 0, PE 1, ... of pass 0, then PE 0, PE 1, ... of pass 1,
  and so on. This order is fixed when the design is built, so the bus needs
  no arbitration and the schedule is predictable.
* **The PEs are self-timed.** A PE starts as soon as its own mask is
  complete (`mask_ready[j]`). The controller then loads the next PE's mask.
  PE 0 therefore computes while PE 1's mask is still arriving.
* **One synchronisation point per pass.** Each PE has only one mask RAM, so
  the masks of pass i+1 may not be written until every PE has finished pass
  i. `pe_synch` collects one `done` from every PE. One cycle later it pulses
  `sync` and starts the next pass. The results in the PEs are stable during
  that cycle, and `max_tracker` reads them then.
* **Pre-loading.** Every stripe starts again with the masks of pass 0.
  `pe_synch` requests them right after the last pass of a stripe, and right
  after reset. They are therefore transferred while the next rows arrive.
  A PE whose mask is ready before its stripe is held in `pe_synch` and
  started when the stripe starts (`pe_start`, `pe_has_mask`).
* **Stripe handshake.** The stripe RAMs have no spare row. The row transfer
  controller therefore writes nothing while a stripe is being processed. It
  may still receive the next row into its row buffer. It waits for
  `stripe_done`, which comes with the m-th sync.

So the frame time is about

```
stripes x ( m x ( n x t_mask + t_pe + 1 ) ) + row loading
t_pe   = NPOS x MASK_H x ceil(MASK_W / (DOP+1)) + 3  = 20 x 65 x 8 + 3 = 10403 cycles
t_mask = MASK_H x MASK_W = 5265 cycles at one byte per cycle, plus memory stalls
```

One PE's mask load overlaps the previous PE's computation. The last PE's
load does not. At the defaults one frame takes 14,507,429 cycles in
simulation (memory model with 10 % stalls and 6-cycle latency). That is
116 ms at 125 MHz, about 8.6 frames/s. Most of the time goes into moving
masks over the 8-bit mask bus. A wider bus, or overlapping mask loads with
the previous pass, would shorten it.

## Inside the PE: multipliers and banked RAMs

A PE has `LANES = DOP + 1` multipliers. In each cycle they multiply
`LANES` consecutive coefficients of one mask row by the pixels under them.
An adder tree sums the products, and the sum is added to the window's
accumulator. A mask row takes `ceil(81/11) = 8` cycles. The 11 lanes of the
last chunk cover columns 77..87, so the lanes past column 80 are masked to
zero.

The pixels under the mask start at column `c + 11q`. For `c` a multiple
of 4, this start is not aligned to a multiple of 11. `banked_ram`
therefore splits each memory into `LANES` banks by column:

```
bank = col mod LANES        word = row * WPR + col div LANES
WPR  = ceil(COLS / LANES) + 1   (one pad word per row)
```

For a read starting at column `x`, bank `b` returns column
`x + ((b - x) mod LANES)`. The bank outputs are then rotated by `x mod LANES`
into lane order. Every bank is read exactly once per access, like an
ordinary block RAM. Read data is registered and arrives one cycle after
`rd_en`. Writes from the controllers are one value per cycle.

The PE pipeline has three stages:

1. address generation and RAM read;
2. products and adder tree into `sum2`;
3. accumulation, and at the last chunk of a window, comparison with the
   best so far.

`done` comes `NPOS x 65 x 8 + 3` cycles after `start`.

## Modules

| file | role |
|---|---|
| `rtl/fd_pkg.sv` | widths, `pix_t`, `coef_t`, `corr_t`, the `detect_t` result struct, `num_passes()` |
| `rtl/face_detect_top.sv` | the whole detector |
| `rtl/downsampler.sv` | 2:1 decimation of the pixel stream |
| `rtl/row_transfer_ctrl.sv` | row buffer, row distribution to the PEs, stripe sequencing |
| `rtl/mask_transfer_ctrl.sv` | ordered mask transfers from external memory |
| `rtl/banked_ram.sv` | per-PE stripe / mask RAM with a multi-lane unaligned read |
| `rtl/corr_pe.sv` | correlation PE with its two RAMs |
| `rtl/pe_synch.sv` | pass synchronisation, m passes per stripe, PE start gating |
| `rtl/max_tracker.sv` | frame maximum |

### Top-level ports

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous reset, active low |
| `pix_valid`, `pix_ready`, `pix_data[7:0]` | in/out/in | frame in raster order |
| `mask_base[31:0]` | in | byte address of mask 0 |
| `mem_req_valid`, `mem_req_ready`, `mem_req_addr[31:0]` | out/in/out | one byte read per request |
| `mem_rsp_valid`, `mem_rsp_data[7:0]` | in | read data, in request order |
| `busy` | out | a mask transfer, a PE or a stripe is active |
| `det_valid`, `det` | out | per-frame result (`detect_t`) |

Mask `k` is stored row by row, one byte per coefficient, starting at
`mask_base + k*65*81`. No more than `MAX_OUT` reads are outstanding at any
time.

### Parameters of `face_detect_top`

`IMG_H` 240, `IMG_W` 320, `DS` 2, `N_PE` 2, `DOP` 10, `STEP` 4,
`N_MASKS` 93, `MASK_H` 65, `MASK_W` 81, `MAX_OUT` 8.

The stripe height equals `MASK_H`. The stripe width is `IMG_W/DS`.
Throughput depends on `N_PE`, `DOP` and `STEP`. A larger `STEP` is the
strongest lever, but it costs accuracy. Adding PEs alone helps little: every
pass must also move `N_PE` masks over the single mask bus (see the
design-point table below). Any (`N_PE`, `DOP`) pair can be built. Examples are 1 PE with 21
multipliers, 4 PEs with 6 each, or 6 PEs with 4 each.

## What was decided here, and where it may differ from the original system

The architecture follows a published design: the stripes, per-PE stripe
copies and mask RAMs, ordered mask transfers, self-timed PEs with a
synchronisation per pass, and the sizes above. The following points are
this implementation's own choices:

* Pixel and coefficient widths (8 bits), the 32-bit accumulator, and the
  raw, unnormalised correlation sum.
* Decimation as the downsampling filter, and a downsampling factor of 2,
  derived from the 160-column stripe.
* The window step applies to both columns and stripe rows.
* The default point, 2 PEs with 10 extra multipliers at step 4. The
  original system reports about 79 ms per frame for this point. This RTL
  takes 116 ms because its mask bus moves one byte per cycle.
* The 8-bit, one-byte-per-request mask bus. A real DDR controller moves
  wider words, which this interface does not model.
* Column banking of the PE RAMs. Each memory's content fits the eight
  18-Kbit block RAMs per PE of the original platform. The 11-way banking,
  however, needs 22 separate memories per PE unless banks are packed
  together or built from distributed RAM.
* No double buffering of masks or stripes. Only the masks of pass 0 are
  loaded ahead, while rows arrive.
* The frame maximum is a single best window per frame; ties go to the
  earliest window.

Not part of this RTL: the processor core, the external DDR memory and its
controller, the mask generation (the masks are precomputed data), and the
drawing of the face outline on the output image.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_banked_ram`: random writes, and unaligned reads at 4 lanes and 1 lane
  checked against a plain array.
* `tb_downsampler`: two frames with random gaps and back-pressure.
* `tb_row_transfer_ctrl`: row copy order and time (`N_PE x STRIPE_W`
  cycles), stripe RAM content at each stripe start, no writes while a
  stripe is active, dropped rows, `frame_done`.
* `tb_mask_transfer_ctrl`: transfer order, every address and coefficient,
  PEs without a mask, the outstanding-request limit, memory stalls.
* `tb_corr_pe`: random and extreme data at a small size, and at the full
  65x81 / 65x160 size. Results and the exact pass time (10403 cycles at the
  defaults) are compared with a reference.
* `tb_pe_synch`: pass numbering, pre-loading of pass 0, PE starts held
  until the stripe is ready, sync one cycle after the last done,
  stripe_done after m passes.
* `tb_max_tracker`: random results with ties and missing PEs.
* `tb_face_detect_top`: three 20x24 frames through a reduced detector,
  compared with a reference model (`tb/fd_checker.sv`). It also counts
  that every mechanism occurred: decimation drops, input back-pressure,
  dropped rows, stripe starts, PE syncs, PEs without a mask, computation
  overlapping a mask transfer, memory stalls, and pass-0 masks that
  arrive before their stripe.
* `tb_design_points`: fourteen detector instances, one per design point.
  The points are 6 PEs without extra multipliers, and 1..6 PEs with
  20/10/6/5/4/3 extra multipliers, each at step 2 and step 4. Every
  instance runs at a reduced size (40x64 frames, 13 masks of 9x21). Each
  is checked against the reference, and its frame time is printed:

  | PEs | extra mult. | cycles/frame, step 2 | step 4 |
  |---|---|---|---|
  | 6 | 0 | 38411 | 14545 |
  | 1 | 20 | 22379 | 10985 |
  | 2 | 10 | 22365 | 10491 |
  | 3 | 6 | 22605 | 10468 |
  | 4 | 5 | 23075 | 10604 |
  | 5 | 4 | 22858 | 10635 |
  | 6 | 3 | 23778 | 10907 |

  As in the original study, the configuration without extra multipliers
  is clearly the slowest. The points that spread about 21-25 multipliers
  over 1..6 PEs lie close together.
* `tb_face_detect_full`: one full 240x320 frame at the default parameters
  against the same reference, about 14.6 M cycles.

`tb/ext_mem_model.sv` is a behavioural model of the mask memory, with a
fixed latency and random stalls. `tb/tb_fd_util_pkg.sv` generates
reproducible pixels and mask bytes from their coordinates or addresses.

## Simulating

With Verilator 5 (packages first):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/fd_pkg.sv tb/tb_fd_util_pkg.sv \
  tb/tb_face_detect_top.sv --top-module tb_face_detect_top -o sim
./obj_dir/sim
```

Replace the top module to run any other testbench. The full-size test
builds in about a minute and runs for about a minute. Its reference model
computes 137 million multiply-adds before the simulation starts.
