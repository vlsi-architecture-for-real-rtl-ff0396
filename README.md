# A column-order view synthesis engine in SystemVerilog

This engine renders a virtual camera view that lies between two real cameras.
Each real camera gives a texture (three 8-bit channels per pixel) and an 8-bit
depth map. The method is two-step depth-image-based rendering:

1. **Forward warping.** Each depth pixel of the left and right depth maps
   (`DL`, `DR`) is moved to its position in the virtual view. This gives two
   warped depth maps, `DV_L` and `DV_R`.
2. **Filtering.** The warped depth maps are median-filtered. Positions that
   received no depth at all are holes; the hole map is filtered and dilated.
3. **Reverse warping.** Each virtual-view pixel uses its filtered depth to
   look up its texture in the reference views `L` and `R`. This gives two
   candidate views, `V_L` and `V_R`.
4. **Blending.** `V_L` and `V_R` are merged pixel by pixel by a truth table
   over the hole maps.
5. **Hole filling.** Remaining holes are filled by a distance-weighted mean
   of their neighbours.

The hardware is organised around one idea: **everything runs in image-column
order, and one image column is one DRAM row.** Two things follow from this:

- The external memory is read and written in long runs within one row.
- Occlusion needs no Z-buffer. When columns are warped in the right order, a
  pixel that lands on an already written position is always the nearer one.
  The later write simply wins.

This is a synthesizable description of the architecture. Section
"Departures and limits" lists where it differs from the published engine, and
what is missing.

## Top level: `view_synthesis_engine`

### Two frame stages

The work of a frame is split in two stages, and the two run at the same time
on consecutive frames:

| Stage | Units | Reads | Writes |
|---|---|---|---|
| 1 | `forward_warping` | `DL`, `DR` | `DV_L`, `DV_R` |
| 2 | per view: `depth_filtering`, `hole_filtering`, `hole_dilation`, `reverse_warping`; then `blending`, `hole_filling`, V writer | `DV_L`, `DV_R`, `L`, `R` | `V` |

Two resources are double-buffered because stage 1 of frame *i* overlaps
stage 2 of frame *i-1*:

- **The warped depth maps**, in external memory. Input `dv_buf` picks the
  buffer stage 1 writes (planes 2/3 or 4/5); stage 2 reads the other one.
- **The reverse homographies** `H_VL` and `H_VR`, in the homography table. A
  pulse on `h_swap` flips the copies. Table writes of `H_VL`/`H_VR` go to the
  copy stage 1 uses; stage 2 reads the other.

A frame slot is started like this:

1. Pulse `h_swap`.
2. Write the homographies of the new frame over `h_wr_*`.
3. Pulse `start`, with `run_s1`, `run_s2` and `dv_buf` valid in that cycle.

`done` pulses once every stage that was started has finished. Typical
sequence: first slot `run_s1` only; then both stages, toggling `dv_buf`;
last slot `run_s2` only.

### External memory and bus

A 64-bit word holds 8 pixels of one column of one plane. Its address is
`{plane[3:0], column[10:0], word[7:0]}`, which allows 2048 columns and
columns of up to 2048 rows.

Plane map (`vs_pkg`):

| Plane | Contents |
|---|---|
| 0, 1 | `DL`, `DR` |
| 2, 3 | `DV_L`, `DV_R`, buffer 0 |
| 4, 5 | `DV_L`, `DV_R`, buffer 1 |
| 6–8 | `L`, three channels |
| 9–11 | `R`, three channels |
| 12–14 | `V`, three channels |

Memory port timing:

- A cycle with `mem_en` high is one transfer.
- Writes use `mem_wmask`, one byte enable per pixel.
- Read data must return in the next cycle on `mem_rvalid` / `mem_rdata`.

Six requesters share this one port through `bus_arbiter`:

| # | Requester | Priority |
|---|---|---|
| 0 | forward-warping read | normal |
| 1 | forward-warping write | high |
| 2 | DV reader | normal |
| 3 | reverse-warping read, left | high |
| 4 | reverse-warping read, right | high |
| 5 | V writer | normal |

The arbiter works round-robin. It serves the high-priority requesters first,
then everyone. The three high-priority accesses are the irregular ones, whose
addresses depend on depth. A request stays up until it is granted.
Assertions in the arbiter check that the grant is one-hot and that nothing
is granted without a request.

## The warp datapath

A table and three small combinational steps turn a depth level and a pixel position into
a warped position. Forward and reverse warping both use them.

- **`homography_table`** stores 8 entries per matrix. Each entry is a pair
  `H_base`, `H_inc` of 154 bits each. There are six matrices: `H_LV`, `H_RV`,
  and two copies each of `H_VL` and `H_VR`. That is 14.8 kB in total.
- **WarpSet** (a few wires inside each warping unit) splits the depth level:
  `entry = depth[7:5]`, `w = depth[4:0]`.
- **`linear_interp`** computes `H = H_base + w * H_inc` for each element. So
  8 table entries stand for 256 depth levels.
- **`matrix_mult`** applies the homography:
  `u' = (h00 u + h10 v + h20) / (h02 u + h12 v + 1)`, and `v'` the same way.
  It rounds to the nearest pixel and flags results outside the frame.

The split of the 154 bits into fields is this design's own choice:

| Elements | Width | Fractional bits | Role |
|---|---|---|---|
| `h00 h10 h01 h11` | 18 | 16 | rotation and scale |
| `h20 h21` | 23 | 10 | translation |
| `h02 h12` | 18 | 28 | perspective |

`h22` is fixed to 1. The table contents are produced elsewhere. For a
rectified camera pair a pure translation `h20 = ±(entry·1024 + w·32)` is
enough: the disparity is then `depth/32` pixels. The testbenches use this.

## Data packing: turning scattered accesses into runs

Warped positions jump around, so a column of warped pixels touches many
memory words, each only partly. Both warping units therefore gather accesses
before they issue them.

Each unit has three tables:

- **Index table** (256 entries): one `(u, v, len)` entry of 3 × 11 bits per
  *segment*. A segment is a run of pixels that land in one column `u`, on
  consecutive rows from `v`. A pixel that continues the open segment (same
  `u`, row `v+1`) only increments `len`. Any other pixel opens a new
  segment.
- **Buffer** (256 × 64 bits): the pixel bytes, aligned as they will sit in
  memory.
- **Valid table** (256 × 8 bits): one byte mask per buffer word, so that a
  write touches only the bytes that were produced.

The two units use the tables differently.

**`forward_warping`** packs writes. Per frame it works in this order:

1. It zeroes both `DV` planes. Zero means "hole" for stage 2.
2. It reads one source column.
3. It warps that column one pixel per cycle into a packing-buffer bank.
4. The writing control drains the filled bank as masked writes, segment by
   segment.

There are two banks, so filling and writing overlap. A bank is handed over
at the end of a column, or when its index table or buffer is full. If the
other bank is still being written at that point, the warp stalls until it is
free. The `stall` output shows this.

The scan direction can be set per view with `dir_l` and `dir_r`. The caller
picks the occlusion-compatible order. For a left view whose pixels move right
as depth grows, that order is left to right.

**`reverse_warping`** packs reads. For each virtual column it goes through
three steps:

1. **Create index.** The filtered depth column streams in, and the unit
   builds segments of *source* positions. A pixel of depth 0, or one whose
   source lies outside the frame, is a hole.
2. **Read.** Each segment is fetched word by word, for each of the three
   channel planes.
3. **Send.** The column goes out top to bottom. Each non-hole pixel takes the
   next valid byte of the input buffer. This works because segments are
   created in pixel order.

If a column would need more than 256 segments or words, the pixels that do
not fit are sent as holes, and the sticky flag `rw_overflow` is set. A
1080-row column needs 135 words when it is one unbroken run, and every new
segment can cost one more word.

## Stage 2 stream: filters, blending, hole filling

After the reverse warping's per-column buffering, every stage-2 unit is a
pixel stream with valid/ready handshakes. Pixels arrive in column order, top
to bottom.

The DV reader fetches one column of `DV_L` and then of `DV_R`. Each byte goes
at the same time into that view's depth filter and hole filter.

The filters are built on **`column_window`**, a circular column FIFO:

- It keeps `NCOL` column memories of `MAX_H` pixels.
- Once the columns a window needs are loaded, it sweeps the centre column
  and presents one `NROW × NCOL` window per pixel.
- At the frame edge it either repeats the edge pixel or pads with a constant.
- A consumer may write a result back into the centre. Later windows then see
  the new value.

The units built on it:

| Unit | Window | What it does |
|---|---|---|
| `depth_filtering` | 3 × 3 | Median of the nine values (`median9`, a 19-element compare-exchange network). |
| `hole_filtering` | 3 × 3 | Hole flag = (depth == 0). Output is 1 when **more than 5** of the nine flags are set. |
| `hole_dilation` | 3 × 3 | OR of the filtered hole flags. Also passes the undilated centre flag through. |
| `hole_filling` | 9 rows × 5 columns | See below. |

**`blending`** decides per pixel from four facts:

- Has each view texture and no filtered hole? This is the "before dilation"
  flag.
- Is each view free of the dilated hole? This is the "after dilation" flag.

| Case | Before dilation, L R | After dilation, L R | `V` |
|---|---|---|---|
| 1 | 1 1 | 1 1 | `((256-α)·V_L + α·V_R + 128) >> 8` |
| 2 | 1 1 | 0 0 | same mix |
| 3 | 1 1 | 1 0 | `V_L` |
| 4 | 1 1 | 0 1 | `V_R` |
| 5 | 1 0 | x x | `V_L` |
| 6 | 0 1 | x x | `V_R` |
| 7 | 0 0 | x x | hole |

Here 1 means "not a hole". `α` is the `alpha` input, in units of 1/256. The
output `bcase` gives the case number.

**`hole_filling`** fills each hole from the 9 × 5 window around it:

- Every non-hole pixel at offset (dy, dx) gets the weight
  `256 >> (|dy| + |dx|)`.
- The result is the rounded weighted mean, per channel.
- The filled value is written back into the window, so holes further down
  and to the right can use it.
- Positions outside the frame count as holes.
- A hole with no texture anywhere in its window stays 0.

Because of the 5-column window, output lags input by two columns. The V
writer then collects 8 pixels per word and writes the three channel planes.

## Preprocessing arithmetic

The homography table is filled by a preprocessing step. It runs only when the
camera set-up changes. It works in floating point with a wide dynamic range.
Two of its arithmetic units are in this RTL. Each has its own ports on the
top level, because the sequencer that would drive them is not built.

**`z_scaling`** (`pre_z_*` ports) rescales the depth range before any other
arithmetic:

- The scale factor is `min(1, 2^-(ceil(log2 max(|Z_min|,|Z_max|)) - 8))`.
- After scaling, the integer parts of `Z_min` and `Z_max` fit in 8 bits.
- The scale does not change the warp, because a homography is only defined
  up to a scale factor.
- With IEEE 754 inputs this is pure exponent arithmetic. `ceil(log2)` is the
  exponent, plus one if the fraction is non-zero.

**`fp_divider`** (`pre_div_*` ports) is an IEEE 754 single-precision divider
that produces one quotient bit per clock:

- Start pulse to result takes 26 cycles: 24 significand bits plus guard and
  round bits.
- It rounds to nearest, ties to even.
- It handles NaN, infinities and zeros.
- Subnormal numbers are flushed to zero.

A sequential divider like this is far smaller than a pipelined wide
fixed-point one. Making it possible is the reason for the Z scaling.

## Departures and limits

- **Most of the preprocessing is not included.** The published engine
  computes the homography table on chip. Not built here:
  - the depth-level-to-Z transform;
  - the projection matrices and the transform of four corner points;
  - the iterative (Gauss-Seidel) solver of the 8 × 8 system.

  The table is loaded through `h_wr_*` instead.
- **Throughput is lower.** The published engine reaches 32.4 frames/s at
  1920 × 1080 and 200 MHz, which is about 6.2 M cycles per frame. This RTL
  does at most one pixel per cycle in each unit, and does not overlap
  loading a column with processing it. Measured at 1920 × 1080 (see below):
  - stage 1 takes 5.86 M cycles, about 2.8 cycles per pixel;
  - stage 2 takes 13.35 M cycles, about 6.4 cycles per pixel;
  - with both stages overlapped, stage 2 sets the rate: about 15 frames/s
    at 200 MHz.
- **Stage-2 units are not time-shared.** The per-view units (filters,
  dilation, reverse warping) exist once per view. The published engine may
  share one unit between the views.
- **Hole filter rule.** The hole filter uses "more than 5 of 9". A true
  binary median would be "more than 4". `THRESH` is a parameter.
- **Colour format.** Textures are three full-resolution channels (4:4:4). A
  4:2:0 source has to be upsampled first.
- **Table overflow** is handled by turning the pixels that do not fit into
  holes (`rw_overflow`). It is not handled by stalling.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
against a reference written independently in the testbench. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_linear_interp` | Random arithmetic against an independent model. |
| `tb_matrix_mult` | Against real arithmetic, and exact rounding for translations. |
| `tb_homography_table` | Ping-pong: writes land in one copy, stage-2 reads come from the other. |
| `tb_bus_arbiter` | One-hot grants, priority, round-robin fairness. |
| `tb_depth_filtering`, `tb_hole_filtering`, `tb_hole_dilation`, `tb_hole_filling` | Whole frames of two sizes, back to back, with random stalls on both handshakes. |
| `tb_blending` | All seven cases. |
| `tb_fp_divider` | Random and near-equal operands against a double-precision reference rounded to single; special values; the 26-cycle latency. |
| `tb_z_scaling` | Random ranges over many magnitudes, against a search for the power of two in real arithmetic. |
| `tb_forward_warping` | Small packing tables and a slow bus, so the stall happens. Checks the warped planes and the zero initialisation. |
| `tb_reverse_warping` | Fetched textures and hole flags, against a memory model. |
| `tb_view_synthesis_engine` | End to end, 20 × 16 frames, small packing tables in both warping units. See below. |
| `tb_vse_full` | One 1920 × 1080 frame with all parameters at their defaults. |

`tb_view_synthesis_engine` runs three frame slots:

1. Stage 1 only.
2. Both stages at once.
3. Stage 2 only.

The homography differs between frames, so reading the wrong ping-pong copy
gives a wrong picture. The test compares every `V` pixel of two frames with a
reference model of the whole algorithm. It also counts how often each
mechanism happens, and fails if one never does:

- DV initialisation;
- packing-buffer stall;
- segment extension;
- bus contention;
- both stages running together;
- the median changing a value;
- a hole being filled;
- reverse-warping table overflow, which the reference model reproduces;
- each blending case group.

It also runs one division and one Z scaling through the top-level ports.

`tb_vse_full` sends one HD1080p frame through stage 1 and then stage 2, and
compares all 6.2 million output bytes. It takes about 19 M clock cycles,
which is under a minute of simulation.

`tb/tb_ext_mem.sv` is the behavioural external memory used by the
testbenches. It is sparse, with one-cycle read latency.

To run a testbench with Verilator (`-Wno-fatal` lets the build go on past
lint warnings, such as unused signals):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/vs_pkg.sv \
    tb/tb_view_synthesis_engine.sv --top-module tb_view_synthesis_engine
./obj_dir/Vtb_view_synthesis_engine
```

## Files

`rtl/`:

- `vs_pkg.sv`: shared types (`hmat_t`, `hsel_e`), field formats, memory map.
- `view_synthesis_engine.sv`: top level, frame control, DV reader, V writer,
  bus multiplexing.
- `forward_warping.sv`, `reverse_warping.sv`: the warping units with data
  packing.
- `homography_table.sv`, `linear_interp.sv`,
  `matrix_mult.sv`: the warp datapath.
- `column_window.sv`, `median9.sv`, `depth_filtering.sv`,
  `hole_filtering.sv`, `hole_dilation.sv`: window filters.
- `blending.sv`, `hole_filling.sv`: view merge and hole interpolation.
- `bus_arbiter.sv`: the external bus arbiter.
- `fp_divider.sv`, `z_scaling.sv`: preprocessing arithmetic.
