# Dual-block-pipelined CAVLC entropy coder for H.264/AVC baseline

This is synthesizable SystemVerilog for the macroblock-level entropy coder of an H.264/AVC
baseline-profile encoder. It follows the architecture published as *"Dual-Block-Pipelined VLSI
Architecture of Entropy Coding for H.264/AVC Baseline Profile"*. The engine takes two inputs:

- each macroblock's header symbols;
- the macroblock's quantized residual coefficients.

It turns them into a NAL-unit byte stream and writes that stream over a system bus. The byte
stream has emulation-prevention bytes already inserted (EBSP format).

The architecture rests on two ideas:

1. **Block pipelining with two statistic buffers.** CAVLC cannot code a 4x4 block until the whole
   block has been scanned, because TotalCoeff, TrailingOnes and total_zeros pick the tables. A
   plain coder therefore alternates between scanning and coding, and half of its hardware sits
   idle at any moment. Here the scan of block *n+1* fills one statistic buffer while block *n* is
   coded from the other buffer.
2. **Zero skipping by CBP look-ahead.** Blocks that the coded block pattern marks as all-zero are
   never scanned. No cycles and no memory reads are spent on them. This matters at high QP, where
   the scan would otherwise dominate.

The back end is a **96-bit packer**. It concatenates codewords and converts RBSP to EBSP on the
fly, using four parallel checkers. Behind it sit a 2 Kbit output buffer and a burst bus interface.

## Data path at a glance

```
 coefficient memory (192x32, 2-port)                 header symbols (ue/se/u(n))
        |                                                     |
   scan_engine --> stat_buffer[0] \                    exp_golomb_unit
   (reverse zig-  > stat_buffer[1]  > code_engine --+        |
    zag, level                         (4 VLC table  |        |
    detector)        block_order_fsm    classes)     |        |
                     nc_select <-> upper_tc_mem      |        |
                         (cavlc_unit)                v        v
                                               codeword multiplexer (+ stop bit)
                                                         |
                                          bitstream_packer (96 bit, 4 EBSP checkers)
                                                         |
                                          bitstream_buffer (64x32 = 2 Kbit)
                                                         |
                                          bus_interface (bursts) --> system bus
```

The top is `entropy_coder`. Every box above is one module in `rtl/`. The shared types and
constants are in `entropy_pkg`.

## Using the engine

A macroblock is coded in four steps:

1. **Load the coefficients.** Write them into the coefficient memory through `coef_we`,
   `coef_waddr` and `coef_wdata`.
   - Word address = `block*8 + pos/2`.
   - `pos` is the raster position `y*4+x` inside the 4x4 block. An even `pos` goes in the low
     16 bits of the word.
   - Blocks 0-15 are luma, in double-zigzag order: block = `{y8, x8, y4, x4}`.
   - Blocks 16-19 are Cb and blocks 20-23 are Cr.
   - A DC coefficient sits at `pos` 0 of its own block. This covers the Intra16x16 luma DC and
     the chroma DC.
2. **Start the macroblock.** Pulse `mb_start` together with:
   - `mb_cbp`: bits [3:0] are the luma 8x8 flags, bits [5:4] are the chroma value 0/1/2;
   - `mb_is_i16`;
   - `mb_x`, the macroblock column;
   - `mb_left_avail` and `mb_up_avail`, which follow the slice and picture edges.
3. **Send the header.** Send the macroblock header as symbols on
   `hdr_valid` / `hdr_ready` / `hdr_type` / `hdr_value` / `hdr_flc_len`.
   - `hdr_type` is 0 for ue(v), 1 for se(v) and 2 for a raw u(n) of up to 32 bits.
   - Mark the last symbol with `hdr_last`.
   - The residual codewords follow the header. Scanning has already started during the header.
4. **Wait for `mb_done`.** After it pulses, the memory may be refilled.

Header symbols sent while no macroblock is active go straight into the stream. This is how the
processor can place slice-header bits in the same NAL unit.

`nal_end` closes the NAL unit:

1. It appends the rbsp stop bit.
2. It pads to a byte boundary.
3. It flushes the packer and drains the buffer.

Then `nal_done` pulses. The final bus beat carries `bus_nal_end`, and `bus_nal_bytes` gives its
number of valid bytes (1-4). The remaining bytes of that word are zero. Bytes are packed
big-endian: the first byte of the stream is in bits 31:24.

The bus side works as follows:

- `bus_req` / `bus_gnt` is followed by a burst of `bus_wvalid` / `bus_wready` beats. The last
  beat of a burst carries `bus_wlast`.
- Beats go to consecutive byte addresses, 4 bytes apart. They start at `base_addr`, which is
  loaded with `addr_load`.
- The engine requests the bus once `BURST_LEN` (16) words are buffered, or when it is draining
  at the end of a NAL unit.
- `bus_urgent` is high while the buffer is full. During that time the coder is stalled.

The `obs_*` outputs are for observation only:

- `obs_overlap`: a scan and a coding phase are active in the same cycle;
- `obs_stall`: the packer is holding off a codeword;
- `obs_ins`: a 0x03 byte is being inserted;
- `obs_skipped`: the number of blocks dropped by CBP in this macroblock.

## The block pipeline in detail

`block_order_fsm` builds a list of up to 27 slots when the macroblock starts:

1. Intra16x16 DC;
2. the 16 luma blocks;
3. Cb DC, then Cr DC;
4. 4 Cb AC blocks, then 4 Cr AC blocks.

Slots removed by the CBP never enter the list:

- a luma 8x8 quadrant whose flag is 0;
- all chroma when the chroma value is 0;
- chroma AC when the chroma value is 1.

The FSM then runs two independent engines over the list:

- The **scan engine** takes the next slot whenever the buffer it would fill is free. It reads one
  coefficient per cycle in reverse zig-zag order, and the memory read latency adds one cycle.
  So a block of N coefficients (16, 15 or 4) takes N+1 cycles. For every non-zero coefficient
  it pushes the level, and the zero run below that coefficient, into the statistic buffer. It
  also counts TotalCoeff, TrailingOnes and total_zeros.
- The **code engine** takes a full buffer once the header has been sent. It emits one codeword
  per cycle, in the order of the CAVLC syntax:
  1. coeff_token;
  2. one sign bit per trailing one;
  3. levels with adaptive suffixLength 0-6, including both escape forms;
  4. total_zeros;
  5. run_before.

  The code engine spends one more cycle per block to finish. Any codeword can be stalled by the
  packer.

The buffers alternate, so a buffer is scanned while the other is coded. When the next block is a
long one, the coding time of a block is hidden behind its scan, and the reverse also holds. A
`blk_desc_t` (block type and index) travels with each buffer, so the coder knows which table to
use and where to record the block's TotalCoeff.

`nc_select` forms nC from the TotalCoeff of the left and upper neighbour blocks:
`(nA+nB+1)>>1`, or the single available count, or 0. Chroma DC uses -1. nC then picks the
coeff_token table class: VLC0, VLC1, VLC2, the 6-bit fixed code, or chroma DC.

- The counts of the current macroblock and of the left macroblock's right column are kept in
  registers.
- The bottom row of each macroblock column is kept in `upper_tc_mem`, in two 20-bit words per
  column. The first word holds four luma counts. The second holds two Cb and two Cr counts.
- The upper row is loaded while the macroblock's header is being sent, in 3 cycles.
- The bottom row is written back after the last block, in 2 cycles.
- An Intra16x16 macroblock records its AC-block counts, as the standard requires.

## The 96-bit packer and emulation prevention

The packer holds up to 96 bits, MSB first. In one cycle it can do two things:

- append one codeword of 1-32 bits behind the held bits;
- send out the top 32 bits.

A codeword is accepted only if at most 48 bits remain after this cycle's output, so a 32-bit
codeword always fits.

Once 48 or more bits are held, four checkers look at the byte windows 0-2, 1-3, 2-4 and 3-5. A
window fires on `00 00 0x` with `x <= 3`. The checks work like this:

- Six bytes are checked, but only four leave. So a pattern that straddles two output words is
  seen before its first word goes.
- When no checker fires, the word leaves (`ebsp_code_ready`).
- Otherwise the packer inserts a single 0x03 in front of the third byte of the first window that
  fires. The input is held off in that cycle, which is the backward stall to the coder.
- The checks then run again, one insertion per cycle.
- An inserted byte is marked, so it never counts as the third byte of another window.

On a flush, the buffer is zero-padded to whole bytes. The last word carries its valid byte count.

## Memories

| memory | size | ports | content |
|---|---|---|---|
| `coef_mem` | 192 x 32 | 1 write + 1 read (registered) | one macroblock of coefficients, 16-bit each |
| `upper_tc_mem` | 160 x 20 | single, registered read | bottom-row TotalCoeff per macroblock column |
| `bitstream_buffer` | 64 x 32 | 1 write + 1 read, first-word fall-through | EBSP words, plus a 4-bit last/bytes tag per word |

All three are plain arrays, so a memory compiler or an inference tool can map them. The
statistic buffers are register files of 16 levels and 16 runs each.

## Performance

One symbol or one coefficient is handled per cycle. The end-to-end test at default sizes
measured these cycle counts, from `mb_start` to `mb_done`, with a free bus:

| macroblock | cycles |
|---|---|
| Dense, about two thirds of coefficients non-zero, levels up to ±4 | about 580-650 |
| Sparse | about 150-350 |
| Skipped entirely by CBP | 8 |

A purely sequential scan-then-code would take about 900 cycles on the dense macroblocks.

`tb_qp_sweep` compares three engines on synthetic residuals whose density falls like that of
real video as QP rises. For each QP setting the table gives the average cycles per macroblock:

- **basic** is a sequential scan-then-code over all 24 blocks, computed from the data;
- **dual buffer** is this RTL with every block marked coded, so nothing is skipped;
- **dual buffer + skip** is this RTL with the true CBP.

| QP-like setting | 10 | 20 | 30 | 35 | 40 | 45 |
|---|---|---|---|---|---|---|
| basic | 655 | 500 | 472 | 465 | 463 | 463 |
| dual buffer | 458 | 447 | 446 | 446 | 446 | 446 |
| dual buffer + skip | 458 | 447 | 280-315 | 130-145 | 20-95 | 30-85 |

Block pipelining removes most of the coding time while the residual is dense. Below a certain
density, the scan of all 24 blocks (about 410 cycles) becomes the floor, and only zero skipping
goes under it.

The real-time budget for 1920x1088 at 30 fps and 100 MHz is 408 cycles per macroblock. With all
blocks coded, the floor is about 446 cycles, so the budget is met only when zero skipping removes
blocks. In the sweep, that happens from the QP-like setting of 25 upward. Dense macroblocks take
450-650 cycles, which agrees with the published figure of about 500 cycles at QP 10-20. The
published design faces the same limit.

## Where this RTL departs from, or adds to, the published design

- **VLC table contents** come from the H.264 standard. The architecture only names its table
  classes.
- **Upper TC memory depth.** The published memory is 160x20. With two words per macroblock
  column, that covers 80 columns (1280 luma pixels), but the design is also claimed to handle
  1920x1088. Set `UPPER_DEPTH` to 240 for 1920-wide pictures. `tb_wide_picture` codes a picture
  120 macroblocks wide that way. `mb_x` is `$clog2(UPPER_DEPTH)-1` bits wide.
- **Bitstream buffer porting.** The published buffer is listed as single-port. Here it is a FIFO
  that is written and read in the same cycle.
- **Interfaces of my own choosing.** The published design does not specify the following:
  - the bus protocol and `BURST_LEN` = 16;
  - the header symbol port and its raw-bits mode;
  - NAL termination;
  - the macroblock start protocol;
  - the coefficient memory layout.
- **Level range.** Levels must satisfy |level| <= 2063. That is the range of the 12-bit escape
  code, which is sufficient for the baseline profile's level_prefix limit of 15.
- **Not included:**
  - SPS, PPS and slice-header generation, which is processor software in this architecture;
  - the prediction and reconstruction engine that supplies the coefficients and headers;
  - CABAC and any non-baseline syntax.
- **Gate count and clock rate.** The published gate count (23.6K gates) and clock rate (100 MHz
  in 0.18 µm) were not reproduced. This RTL was only simulated and run through generic synthesis
  without a cell library.

## Verification

Every module has a self-checking testbench in `tb/`. The reference parts are in `tb_vlc_ref_pkg`:

- the VLC tables kept as bit strings;
- a CAVLC block coder, Exp-Golomb coder and RBSP-to-EBSP converter, written from the standard's
  rules.

| testbench | what it checks |
|---|---|
| table testbenches | every entry of every table |
| `tb_level_table` | levels -2000..2000 at every suffix length |
| `tb_scan_engine`, `tb_stat_buffer`, `tb_code_engine` | random blocks of every type, bit-exact; the scan and code engines also have their cycle counts checked |
| `tb_block_order_fsm` | block order, skipping and ping-pong use, for random CBPs |
| `tb_nc_select` | nC over a small picture |
| `tb_cavlc_unit` | a 3x2 picture, bit-exact, with the pipeline speed-up and the skip count |
| `tb_qp_sweep` | the engine comparison above, bit-exact at every setting |
| `tb_wide_picture` | the end-to-end test on a 120x2-macroblock picture with `UPPER_DEPTH` = 240 |
| `tb_bitstream_packer` | random and zero-heavy codewords against the EBSP reference, with random output stalls |
| `tb_bitstream_buffer`, `tb_bus_interface` | against queue models |

`tb_entropy_coder` runs the whole engine at its default parameters:

- a slice with a 4x3-macroblock picture of dense, sparse, empty and Intra16x16 macroblocks;
- a bus that withholds its grant long enough to fill the buffer.

It compares every byte written to the bus with the reference stream. It also checks that each of
these mechanisms occurred:

- scan/code overlap;
- zero skipping;
- backward stall;
- 0x03 insertion;
- buffer full;
- all five nC classes.

Simulation with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/entropy_pkg.sv tb/tb_vlc_ref_pkg.sv \
    tb/tb_entropy_coder.sv --top-module tb_entropy_coder
./obj_dir/Vtb_entropy_coder +verilator+rand+reset+2
```

The handshake rules of the pipeline and of the packer are written as concurrent assertions in
`cavlc_unit` and `entropy_coder`. `--assert` turns them on.

The testbenches mix integer and sized arithmetic freely, and Verilator reports width warnings for
that. `-Wno-fatal` keeps those warnings from stopping the build. The RTL itself builds without them.
Replace the testbench name to run another bench. Modules are found in `rtl/` by file name. Each
bench prints `TB_RESULT checks=N failures=M`. `tb_entropy_coder` accepts `+dbg` to print the
codeword trace.
