# H.264/AVC baseline encoder components in SystemVerilog

This is RTL for the compute-heavy parts of an H.264/AVC baseline video
encoder. Each part is built as a small network of simple blocks that hand
data to each other. The style comes from dataflow actor networks: a block
does one job and talks to its neighbours over narrow streams. The RTL keeps
that structure, so each actor of the original network is its own module.
The blocks are connected with valid/ready handshakes or fixed-latency pipes.

The design has four subsystems. The top module `avc_encoder` places them
side by side. They share only clock and reset:

| Subsystem | Module | What it does |
|---|---|---|
| Inter prediction | `inter_prediction` | Full-search integer-pel motion estimation (ME) on 16x16 macroblocks using SAD. Motion compensation (MC) produces the compensated frame and the compensation error. A reconstruction adder writes the next reference frame. |
| Intra prediction | `intra_prediction` | The nine 4x4 and four 16x16 luma intra modes, from four reconfigurable processing elements (PEs). |
| Exp-Golomb coder | `exp_golomb` | Codes syntax elements with the ue, se, te and me mappings. |
| CAVLC | `cavlc` | Context-adaptive variable-length coding of 4x4 blocks of quantised luma coefficients. |

Some encoder parts sit between these subsystems in a full encoder but are
**not** in this RTL:
- forward and inverse integer transform and quantisation;
- the deblocking filter;
- slice and header generation.

Their connections are brought out as ports of `avc_encoder`:
- `comp_*`: compensation error and compensated pixel, going towards the transform.
- `rec_*`: the reconstructed error coming back.
- `ip_sample*`: neighbouring samples for intra prediction.
- `eg_*`: syntax elements.
- `cv_*`: quantised coefficients.

All sizes are for luma only, 8-bit samples. Defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `FRAME_W` x `FRAME_H` | 176 x 144 (QCIF) | frame size, a multiple of 16 in both directions |
| `SEARCH_RANGE` | 8 | full-search window of ±8 integer pixels, clipped to the frame |

## Inter prediction

This is the largest part of the design. It is also the part where the
timing between blocks matters most.

### Memories

The inter loop uses four frame memories. All are instances of
`frame_memory`: one write port, one read port, registered read with one
clock of latency.

| Memory | Width | Holds |
|---|---|---|
| current frame | 8 bits | the frame being coded |
| reference frame | 8 bits | the previous frame, or its reconstruction |
| compensated frame | 8 bits | the motion-compensated prediction |
| compensation error | 9 bits, signed | current minus compensated |

Loading:
- Raw frames enter one byte per clock through `frame_input_switch`.
- The `flip` input selects the current memory (`0`) or the reference memory (`1`).
- A write address counter steps through the frame. An external address can be given instead.
- The switch raises a "loaded" flag for each memory once it holds a whole frame.

### Motion estimation (`motion_estimator`)

ME starts when both memories are loaded. The MB raster scanner
(`mb_raster_scanner`) then steps through the macroblocks. For each MB:

1. **Load the current MB.** `mb_mem_controller` turns the MB position into
   256 frame addresses, raster order within the MB. The pixels go into
   current-MB register 1 (`mb_register`). This takes 257 clocks.
2. **Search.** `full_search` lists every candidate position inside
   ±`SEARCH_RANGE` whose 16x16 block lies wholly inside the frame. That is
   9 to 17 positions per axis. It also reports how many candidates there are.
   - For each candidate, the reference memory controller reads 256 pixels.
   - They pass through the `address_mux` / `data_switch` pair on "line 1"
     into `sad_unit`.
   - `sad_unit` adds |cur - ref| over the MB, one pixel per clock. Each
     candidate takes 257 clocks.
   - `sad_comparator` keeps the lowest SAD. On a tie it keeps the earlier
     candidate. It signals when the announced number of candidates has
     been scored.
3. **Vector.** `mv_calculator` forms the motion vector as best position
   minus MB position.
4. **Copy.** Register 1 is copied into current-MB register 2 (256 clocks).
   This frees register 1 for the next MB.
5. **Hand over to MC.** The vector, the MB position and the SAD are offered
   on a valid/ready handshake. ME then waits until MC reports the MB done.
   Only then does the scanner advance.

Only one reference-memory read port exists, and MC needs it too. The
`address_mux` gives MC its own address input, "line 2". The `data_switch`
routes the returned pixel to whichever line asked for it, one clock later.
The sequencing guarantees the two lines never request the same clock. An
assertion checks this.

After the last MB, ME pulses `frame_done` and the loaded flags clear.

### Motion compensation (`motion_compensator`)

MC works in two phases.

**Write phase.** For each MB in raster order:
- `incremental_control` and the scanner produce the MB position.
- `mv_adder` adds the motion vector to get the reference MB position.
- Memory controller 1 sends its 256 addresses to ME on line 2.
- `mc_receiver` takes each returned pixel and writes it into the
  compensated memory.
- It also passes the pixel to `mc_subtractor`, which reads the matching
  current pixel from MB register 2 and writes current − compensated into
  the error memory.
- Memory controller 2 supplies the write addresses.
- `mb_done` is raised after exactly 256 pixels.

**Read phase.** After the last MB:
- Both `rw_switch`es turn their memories to reading.
- Memory controller 2 walks the frame again, MB by MB.
- `comp_valid` / `comp_addr` / `comp_pixel` / `comp_err` stream the whole
  frame out, one pixel per clock.

### Reconstruction

The reconstructed error comes back on `rec_valid` / `rec_addr` / `rec_comp`
/ `rec_err`. In the full encoder it would come from inverse quantisation
and inverse transform. `recon_adder` adds it to the compensated pixel, clips
the sum to 0..255, and writes it into the reference memory. The
reconstruction becomes the next frame's reference. The next current frame
can then be loaded with `flip = 0`, and ME restarts by itself.

Ordering rules:
- Reconstruction writes take priority over raw input. `in_ready` drops while they happen.
- The next frame must not finish loading before MC has streamed out the
  previous one. In the closed loop this holds by itself, because the
  reference is built from that stream.

### Timing

Each MB takes about 257·(candidates + 1) + 256 + ~262 clocks. For QCIF at
±8 there are 23,427 candidates per frame. That gives about 6.1 M clocks
per frame, plus 25,344 clocks to stream the frame out.

The full-size testbench measured 12.4 M clocks for two frames, including
loading and write-back. This is a sequential implementation: one SAD unit,
one pixel per clock. The high candidate count is the cost of the plain
full search.

## Intra prediction

`intra_prediction` contains one `intra_pe_controller` and four `intra_pe`s.

**The PE.** Each PE is a small adder tree: (op0 + op1) + (op2 + op3) into a
D register. The controller can read the D register back. The PE output
goes through `intra_round_shift_clip`, which adds a rounding constant,
shifts, and clips to 0..255. A bypass multiplexer can send a raw sample out
instead, which is used by the vertical and horizontal modes.

**Timing.** Every clock the controller issues one iteration. An iteration
either produces four predictors (one row of four) or only accumulates a
partial sum in the D registers.

**Input samples.** Neighbouring samples enter serially:

| Block size | Sample order | Samples |
|---|---|---|
| 4x4 | M, A..H, I..L | 13 |
| 16x16 | top row T0..T15, then corner M, then left column L0..L15 | 33 |

**4x4 blocks.** Modes 0..8 run in order, four iterations per mode, 38
iterations in total.
- DC: PE1 sums the top four samples and PE2 sums the left four. The
  controller reads both sums back and forms (sumT + sumL + 4) >> 3.
- Directional modes: each predictor is a 3-tap (1,2,1)/4 or a 2-tap
  (1,1)/2 filter. The taps are placed on the four adder inputs as
  (a, b, b, c) or (a, b, 0, 0).

**16x16 blocks.** 262 iterations.
- Mode 0 (vertical) starts as soon as the top row is in. It overlaps with
  the first DC accumulation, because PE k adds T[k], T[k+4], T[k+8] and T[k+12].
- Mode 1 (horizontal) follows the left column.
- DC gathers L the same way. PE0 then combines the partial sums, with
  round 16 and shift 5.
- Plane: the controller computes the gradients b and c and four seed
  values, one per 4-column group. Row 0 of PE k starts at seed + k·b. Each
  later row adds c in the D register, and the output stage shifts by 5 and clips.
- Every 16x16 mode issues 64 iterations, in group-major order.

**Outputs.** Each predictor group carries its mode, block size, row and
first column. The block does not choose the best mode. It outputs every
predictor, and mode decision is left to the cost stage outside.

## Exp-Golomb coder

`exp_golomb` contains:
- `eg_mapping_controller`, which picks one of four mappers:
  - ue: code_num = v. This is the identity, so it is a plain connection.
  - `eg_se_mapper`: v > 0 → 2v − 1, else −2v.
  - `eg_te_mapper`: range 1 gives one inverted bit, otherwise ue.
  - me: coded_block_pattern and the prediction mode address the `eg_me_rom` table directly. The table has separate columns for intra-4x4 and inter.
- `eg_code_generator`, which splits code_num + 1 into M leading zeros and an M-bit INFO suffix.
- `eg_assembler`, which shifts the codeword out MSB first.

Timing:
- An L-bit codeword takes L clocks.
- The first bit appears two clocks after the element is accepted.
- The next element is accepted while the current codeword is still going out.

## CAVLC

`cavlc` codes one 4x4 block at a time.

**Input.** Coefficients enter one per clock in raster order. The nonzero
counts of the upper and left blocks (`nu`, `nl`) come with the first
coefficient, together with their availability.

**Analysis.** `cavlc_zigzag_scanner` reorders the block. The following
blocks then extract the block's statistics:

| Block | Computes |
|---|---|
| `cavlc_counter` | TotalCoeffs, TrailingOnes, total_zeros |
| (wiring inside `cavlc`) | the coefficients in reverse scan order, as needed for coding |
| `cavlc_zeros_run_counter` | run_before and zerosLeft for each nonzero coefficient |
| `cavlc_splitter` | separates the trailing ±1s from the remaining levels |
| `cavlc_n_calculator` | nC = (nu + nl + 1) >> 1, or the one available count, or 0 |
| `cavlc_table_selector` | the table number Ti (0–2 for the VLC tables, 3 for the 6-bit fixed-length code) |

**Encoders.**
- `cavlc_coeff_token_encoder`
- `cavlc_sign_encoder`
- `cavlc_level_encoder`: suffixLength adaptation and the level escape codes.
- `cavlc_total_zeros_encoder`
- `cavlc_run_before_encoder`

**The LUT memory model.** The variable-length tables are stored in two
memories:
- `cavlc_code_rom` holds each codeword with its leading zeros removed, so
  the stored value is at most 6 bits wide.
- `cavlc_vbw_rom` holds the codeword's full length, its "valid bit width".

`cavlc_rom_controller` forms the table address and re-aligns the code. The
stored value goes at the low end of a field `len` bits long, so sending
`len` bits MSB first puts back the removed zeros.

The table layout is in `cavlc_pkg`:

| Table | Address |
|---|---|
| coeff_token | Ti·68 + TotalCoeffs·4 + TrailingOnes |
| total_zeros | (TotalCoeffs − 1)·16 + total_zeros |
| run_before | (min(zerosLeft, 7) − 1)·16 + run_before |

The contents are the standard H.264 CAVLC tables for nC ≥ 0. No chroma DC
table is included.

**Output.** `cavlc_assembler` emits the codes in bitstream order, one bit
per clock:
1. coeff_token
2. trailing-one signs
3. levels
4. total_zeros, only if 0 < TotalCoeffs < 16
5. the run_befores, while zeros remain

Each code takes one load clock. `blk_last` marks a block's final bit, and
`total_coeffs` is offered for later nC prediction.

**Throughput.** Input runs at one coefficient per clock. Coding a block
takes (codes + bits) clocks, and the next block waits meanwhile. Typical
residual blocks therefore take about 100–150 clocks each, so the design
does not sustain one sample per clock.

## Where this RTL departs from, or fills in, the original description

The source describes these components as dataflow networks: block
diagrams, per-actor behaviour and a few numbers. It leaves synchronisation
to a code generator. The following are therefore this design's own choices:

- All handshakes, latencies and the ME/MC sequencing. This includes ME
  waiting for MC between MBs. ME never stalls waiting for a vector to be
  taken, because MC is always ready at that point.
- Search window: ±8 integer pixels, clipped to the frame, with no sub-pixel
  refinement. Ties keep the first candidate in raster order.
- Sign conventions: motion vector = best − current position, and error =
  current − compensated.
- The intra PE operand width. It is wider than the 8/9-bit adders described,
  so that accumulated sums fit. The DC value is also broadcast over the
  whole block as ordinary predictor rows.
- The Exp-Golomb mappings and the me table follow the H.264 standard. In
  particular, se maps k > 0 to 2k − 1 and k ≤ 0 to −2k. The source states
  the signs the other way round, but that would not decode.
- CAVLC codes luma 4x4 blocks only, nC ≥ 0 tables. The ROM controller
  outputs a parallel code instead of a serial one.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Reference values
are computed inside the testbench, independently of the RTL:
- a full-search model for motion vectors;
- the H.264 intra-prediction equations;
- textbook Exp-Golomb and CAVLC encoders.

CAVLC is checked against a known textbook block and hundreds of random
blocks. These cover every table, escape codes and zerosLeft > 6.

| Testbench | What it covers |
|---|---|
| `tb_inter_prediction` | 48x32 frame, ±4, two frames, with reconstruction |
| `tb_avc_encoder` | the top at 48x48, ±4 |
| `tb_avc_encoder_full` | the top at its default parameters (QCIF, ±8) |

`tb_avc_encoder` and `tb_avc_encoder_full` drive all four subsystems and
count each mechanism. A mechanism that never occurs counts as a failure.
The mechanisms are:
- frames;
- motion vectors, including non-zero ones;
- MC wait cycles;
- compensated and error pixels;
- reconstruction writes;
- intra blocks of each size;
- Exp-Golomb words of each type, including raw te bits;
- CAVLC blocks for every Ti.

The full-size test runs two QCIF frames in about 12.4 M clocks, about 20 s
of simulation.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/*_pkg.sv tb/tb_cavlc.sv --top-module tb_cavlc -o sim
    ./obj_dir/sim

Packages go first. Other modules are found through `-y rtl`.

## Limits

- Only luma is handled. Chroma prediction and chroma CAVLC are absent.
- There is no sub-pixel motion estimation and no mode decision.
- The transform, quantisation, deblocking and bitstream headers are outside
  this RTL.
- No timing analysis was done, so no clock frequency is claimed.
