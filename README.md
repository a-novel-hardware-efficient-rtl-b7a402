# Block-tree wavelet image compressor

This is a small, sequential image compressor. It is built for FPGAs and codes an
image one square tile at a time. Each tile goes through a 3-level integer
CDF 5/3 wavelet transform. The coefficients are then coded bit plane by bit
plane, giving an embedded (progressive) bit stream in the style of SPIHT.

Classic SPIHT tracks single coefficients in three lists that grow with the
image. This coder works on **2x2 blocks of coefficients**. It replaces the
lists with two fixed **state tables**:

* **SIG_B** has one bit per block and marks blocks that are already
  significant.
* **SIG_D** has one bit per block that has children. It marks a block whose
  whole subtree is already significant.

Two tiny stacks are also used. **LCB** (list of child blocks) holds blocks
still to be visited. **LPB** (list of parent blocks) holds parents whose SIG_D
must be re-evaluated. The sorting pass walks one spatial-orientation tree
(SOT) at a time, depth first. So the stacks only ever hold part of one tree:
7 and 5 entries for a 3-level transform, whatever the tile size.

The RTL follows the algorithm and block diagrams of M. R. Lone and
N. Hakim, *"A novel hardware-efficient spatial orientation tree-based image
compression algorithm and its field programmable gate array
implementation"* (2019). It is an independent implementation. The section
"Where this RTL makes its own choices" lists what the publication leaves open
and how it was settled here.

## Coefficient layout: Morton order and the block tree

The transform leaves its coefficients in MEM_B in **Morton (Z) order**. The
address interleaves the row and column bits, with the row bit above the column
bit. As a result:

* the four coefficients of a 2x2 block are consecutive, so block `b` holds
  coefficients `4b .. 4b+3`;
* the four offspring of block `x` in the next finer level are blocks
  `4x .. 4x+3`;
* all descendants of `x` at depth `m` form one contiguous coefficient range,
  `[4^(m+1)·x, 4^(m+1)·(x+1))`.

For the default 16x16 tile with 3 levels there are 64 blocks:

| blocks | content | in the tree |
|---|---|---|
| 0 | LL3 (2x2 coefficients) | no children of its own |
| 1, 2, 3 | LH3, HL3, HH3 | **tree roots** |
| 4 .. 15 | level-2 detail | children of 1..3 |
| 16 .. 63 | level-1 detail | leaves |

In general the roots are `k = i + j·B0` with `j = 1..3`, where the `B0` LL
blocks are `i = 0 .. B0-1`.

* SIG_B has `N²/4` bits.
* SIG_D has `N²/16` bits, one per block that has children.

A block counts as *finished* when no sorting-pass work is left under it:

* a leaf is finished once SIG_B = 1;
* any other block is finished once SIG_D = 1.

## The coding algorithm

The state is initialised once per tile:

* SIG_B = 1 for the blocks of the coarsest level: LL3 and the three roots.
* SIG_B = 0 for every other block.
* SIG_D = 0 for every block.

The starting bit plane is `n0 = floor(log2(max |c|))`. For every bit plane `n`
from `n0` down to 0 the encoder runs a refinement pass and then, maybe, a
sorting pass.

**Refinement pass (RP).** Every block with SIG_B = 1 is visited in Morton
order. Each of its four coefficients, with magnitude `m`, is coded as:

| condition | bits | meaning |
|---|---|---|
| bit `n` of `m` is 0 | `0` | insignificant, or refinement bit 0 |
| bit `n` is 1, `m ≥ 2^(n+1)` | `1` | refinement bit 1 |
| bit `n` is 1, `m < 2^(n+1)` | `1 s` | becomes significant, `s` = 1 if negative |

So the RP also codes the significance of the not-yet-significant coefficients
that sit in significant blocks. A coefficient costs one or two bits.

**Sorting-pass skip.** The DWT stage also gives `Max_Coeff`, the largest
magnitude in the high-frequency bands. If `Max_Coeff < 2^n`, no tree can hold a
significant coefficient, so the sorting pass is skipped. This skips the empty
early passes of smooth tiles.

**Sorting pass (SP).** The three roots of each LL block are handled in turn,
and a root with SIG_D = 1 is skipped. Otherwise the root is pushed onto LCB,
and blocks are popped from LCB until it is empty. A popped block `x` falls
into one of three cases.

1. **SIG_B(x) = 0 (new block).**
   * Code its four coefficients into a buffer called Temp: `1 s` if
     `|c| ≥ 2^n`, otherwise `0`.
   * If `x` is not a leaf, test its descendant set `D(x)` for any
     `|c| ≥ 2^n`.
   * Output:
     * `0` if nothing is significant;
     * otherwise `1`, then Temp, then, for a non-leaf, the `D(x)` bit.
   * In the second case SIG_B(x) is set.
   * If `D(x)` is significant, `x` goes onto LPB and its four offspring onto
     LCB.
2. **SIG_B(x) = 1 and all offspring have SIG_B = 0 (type A).**
   * Output the `D(x)` bit.
   * If it is 1, `x` goes onto LPB and its four offspring onto LCB.
3. **SIG_B(x) = 1 and some offspring are significant (type B).**
   * No output.
   * `x` goes onto LPB.
   * Every offspring that is not yet finished goes onto LCB.

Offspring are pushed so that `4x` is popped first, which makes the walk a
pre-order depth-first traversal. Once LCB is empty, LPB is popped in reverse
order, deepest parent first. Each parent whose four offspring are all
finished gets SIG_D = 1. A finished tree is never looked at again: its
coefficients are only refined.

Every decision above depends only on the state tables and on bits already
sent. A decoder can therefore mirror the state exactly. To start, it needs
two pieces of side information, which the top level provides as ports:

* `init_threshold`, the starting bit plane `n0`;
* the bit plane of `max_coeff`, which decides the skipped sorting passes.

No decoder is included in this RTL.

## DWT stage (`dwt_stage`)

The DWT stage is built from these modules:

| module | role |
|---|---|
| `lift53_1d` | the row processor and the column processor (one module, two instances) |
| `dp_mem` | the two dual-port memories, MEM_A and MEM_B |
| `dwt_control` | the sequencer |
| `max_mag_calc` | the maximum magnitude calculator |

* **Lifting.** `lift53_1d` takes one pair `(x[2j], x[2j+1])` per cycle and
  computes the reversible 5/3 filter:
  * `d[j] = x[2j+1] − ⌊(x[2j]+x[2j+2])/2⌋`
  * `s[j] = x[2j] + ⌊(d[j−1]+d[j]+2)/4⌋`

  Borders use whole-sample symmetric extension (`x[2M]=x[2M−2]`,
  `d[−1]=d[0]`). These are driven by a border-control struct: `first` on the
  first pair, and an extra `flush` cycle after the last pair. The output for
  pair `j` appears, combinationally, with pair `j+1`.
* **Schedule.** For each level, with side `S = N>>l`:
  * the **row pass** feeds `S` lines of `S/2` pairs plus one flush cycle.
    At level 0 the pairs come from `data_in1/2`, with `in_ready` high. At
    later levels they come from the LL band in MEM_B. The results go to MEM_A
    in raster order, low half left and high half right.
  * the **column pass** reads MEM_A down each column and writes the results
    into MEM_B at their Morton addresses.

  High bands written to MEM_B are never touched again, so after the last
  level MEM_B holds the whole tile in Morton order. A 16x16 tile takes
  exactly `Σ 2·S·(S/2+1) = 288+80+24 = 392` cycles.
* **Memories.** Writes are synchronous and reads asynchronous (distributed
  RAM). Both memories are 16 bits wide. After `dwt_end` the encoder reads
  MEM_B through `addr_in1/2`.
* **Maxima.** `max_mag_calc` watches the two column-processor outputs. It
  counts only coefficients that stay in MEM_B: the final LL band, but not the
  intermediate LL bands. From these it forms `max_all`, which gives
  `Init_Threshold`, and `Max_Coeff`, over the high bands only.

## Encoder (`spiht_encoder`)

| unit | module | what it does |
|---|---|---|
| control unit | `enc_control_unit` | bit-plane loop, RP then (optional) SP, flush, `Encoding_Complete` |
| refinement pass | `refinement_pass` | scans block addresses 0..NBLK−1, starts a block scan for each SIG_B = 1 |
| sorting pass | `sorting_pass` | the depth-first state machine described above |
| list control | `list_control` | LCB and LPB as register stacks; LCB can take up to four offspring in one cycle |
| state-table memory | `state_table_mem` | SIG_B / SIG_D; one read returns a block's bits and its four offspring's bits |
| coefficient address generator | `coef_addr_gen` | two Morton addresses per cycle, for a block (2 cycles) or for a whole descendant set |
| compare and bit generator | `compare_bit_gen` | codes two coefficients per cycle (table above), gives `Bit_string`, `N_str`, and a significance flag |
| bitstream generator | `bitstream_gen` | packs bit strings MSB first into bytes, pads the last byte with zeros |

The two passes share the coefficient address generator, the compare unit and
the state tables. A multiplexer selects the active pass's block address and
table address. Refinement bits flow from the compare unit straight into the
bitstream generator.

The sorting pass gathers a block's Temp bits and its descendant bit first. It
then sends the whole group, at most 10 bits, in one cycle. The bitstream
generator takes up to 16 bits per cycle, keeps up to 32, and gives out one
byte per cycle. An assertion guards it against overflow.

**Timing.**

| step | cycles |
|---|---|
| RP, per block | 1 |
| RP, extra per significant block | 2 |
| SP, each popped block | about 3 + 2 (block scan) + half the descendant coefficients (descendant scan) |

The descendant test reads every coefficient of `D(x)`, two per cycle:

* 8 cycles for a level-2 block;
* 40 cycles for a root of a 16x16 tile.

A whole 16x16 tile takes the DWT plus all bit planes down to 0. Measured
over the 1024 tiles of a 512x512 test image:

* 2312 cycles per tile on average;
* 3446 cycles for the worst tile, which is pure noise;
* smooth tiles take about 2100 cycles.

## Top level (`compressor_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset |
| `new_tile` | in | one-cycle pulse starts a tile |
| `data_in1`, `data_in2` | in | even/odd pixel of a horizontal pair, raster order |
| `in_ready` | out | the current pair is taken at this clock edge (128 pairs for 16x16) |
| `byte_out`, `valid_byte` | out | coded stream, one byte per valid cycle |
| `spiht_end` | out | high after the last byte, until the next tile starts |
| `init_threshold`, `max_coeff` | out | side information for a decoder |

To code a tile:

1. Pulse `new_tile`.
2. Present the next pixel pair whenever `in_ready` is high. The source cannot
   stall: a pair must be ready on every cycle in which `in_ready` is high.
3. The encoder starts by itself when the transform ends.
4. Wait for `spiht_end` before the next `new_tile`.

Parameters (defaults are the publication's main configuration):

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | tile side (power of two, `N >> LEVELS ≥ 2`) |
| `LEVELS` | 3 | DWT levels; LCB/LPB depths follow `4+3(L−2)` and `1+Σ4^n` |
| `PIX_W` | 8 | pixel width |
| `DWT_W` | 16 | word length inside the DWT memories |
| `COEF_W` | 13 | coefficient width seen by the encoder (low bits of the 16-bit word) |

The encoder sees each coefficient as a 13-bit signed value. Magnitudes must
therefore stay below 4096; the bit-plane index `init_threshold` is 4 bits
wide. With 8-bit pixels the 3-level 5/3 transform stays far inside that range.
Wider pixels or deeper transforms need a larger `COEF_W`.

## Where this RTL makes its own choices

* **Coarsest-level blocks start significant.** The published initialisation
  sets SIG_B only for the LL band. However, its sorting-pass listing never
  codes the coefficients of the root blocks themselves. Here LH3, HL3 and HH3
  start with SIG_B = 1, so their coefficients are coded by the refinement
  pass from the first bit plane on.
* **Root of a tree.** The published listing prints four zeros (`0000`) for an
  insignificant root tree. Its prose says a type-A node outputs a single `0`
  or `1`. This RTL follows the prose and treats a root exactly like a
  significant LCB entry: type A outputs one bit, and type B outputs nothing.
* **Refinement-pass test.** The refinement-pass test "S_n(I(p))" is read as
  "bit n of |c| is 1", and "S_{n+1}" as "|c| ≥ 2^(n+1)". The published prose
  describes this reading: `1 sgn`, `1` or `0` per coefficient.
* **Set significance.** The publication does not say how the hardware
  evaluates the significance of a descendant set. Here it is done by reading
  every descendant coefficient.
* **List order.** LCB and LPB are LIFO stacks, and the offspring order is
  `4x` first.
* **Path to the state tables.** The published block diagram places the list
  control between the passes' block-address multiplexer and the state-table
  memory. Here `list_control` holds only the two stacks:
  * the encoder's multiplexer drives the table address directly;
  * each pass reads SIG_B and SIG_D itself;
  * each pass decides on its own whether to start the coefficient address
    generator.
* **State-table storage.** The state tables are flip-flops at every tile
  size. The publication moves them into block RAM from 64x64 on. This RTL
  reads a block and its four offspring in one cycle and clears everything in
  one cycle, so the tables do not map onto a block RAM as written.
* **Word lengths.** Two are published, 16 bits for the DWT and 13 bits for
  the encoder, and both are used.
* **Stop rule.** Coding always runs to bit plane 0: there is no bit budget.
  Truncating the byte stream gives lower rates, as with any embedded coder.
* **Bit conventions.** The sign bit is 1 for negative. Bytes are packed MSB
  first, and the final byte is zero-padded.
* **Transform and coding do not overlap.** The publication reaches 42 HD
  frames/s at 253 MHz. This RTL needs a mean of 2312 cycles per 16x16 tile on
  the test image, which is about 30 frames/s of 1280x720 at that clock. Noise
  tiles drop this to about 20 frames/s.
* **Not included.** The decoder (resource figures only are published), the
  external tiling of a full image into tiles, and any rate control.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=… failures=…`
and has a cycle watchdog. The reference models in `tb/sot_ref_pkg.sv` are
written independently of the RTL structure:

* a whole-array 5/3 transform;
* the coder written as a recursive depth-first function.

| testbench | what it checks |
|---|---|
| `tb_compressor_top` | 3 tiles (smooth, noise, edges) end to end, byte-exact against the reference; counts every coding case (SP skipped, type A, type B, root skipped through SIG_D, SIG_D set, newly significant in RP, leaf/non-leaf coded, zero tree) and requires each to occur |
| `tb_tile_sizes` | N = 32, 64, 128, 256 (3 levels), byte-exact |
| `tb_image_512` | a generated 512x512 image (ramp, rings, edges, noise) as 1024 tiles at the default size, byte-exact; reports bits per pixel, cycles per tile and the resulting HD frame rate |
| `tb_spiht_encoder` | the encoder alone on 12 synthetic coefficient tiles, byte-exact, all coding cases |
| `tb_dwt_stage` | MEM_B contents, Max_Coeff, Init_Threshold, 128 pairs, 392 cycles |
| `tb_lift53_1d`, `tb_dp_mem`, `tb_max_mag_calc`, `tb_compare_bit_gen`, `tb_bitstream_gen`, `tb_coef_addr_gen`, `tb_state_table_mem`, `tb_list_control` | unit tests against small models |

To run one testbench with Verilator, name the two packages and the
testbench. Verilator finds the modules in `rtl/` and `tb/` by their names:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/sot_pkg.sv tb/sot_ref_pkg.sv \
    tb/tb_compressor_top.sv --top-module tb_compressor_top -o sim
./obj_dir/sim
```

Timing on a single core:

* each testbench takes at most a few seconds;
* `tb_tile_sizes` takes about 10 s.

Adding `+verilator+rand+reset+2` randomises the power-up state. All
testbenches pass with it.

The remaining lint warnings of the RTL are unused bits:

* the top 3 bits of the 16-bit coefficients, which the 13-bit encoder does
  not need;
* `max_all` inside `dwt_stage`; only its bit-plane index leaves the stage, as
  `init_threshold`.
