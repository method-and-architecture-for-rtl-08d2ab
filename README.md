# Multiresolution quad-tree fractal image coder

Fractal image coding describes each small block of an image (a *range
block*) as a transformed copy of a larger block from the same image (a
*domain block*). Each copy is shrunk, rotated or mirrored, scaled in contrast
and shifted in brightness. The encoder's cost is the search: every range
block must be tried against many domain blocks under all eight rotations and
reflections.

This design keeps that search small and regular:

* **One block size for all quad-tree levels.** Large quad-tree blocks are not
  coded at full resolution. They are coded in reduced copies of the image (a
  resolution pyramid). A 16×16 region of the original image is a 2×2 block in
  the 1/8-resolution image, an 8×8 region is 2×2 at 1/4 resolution, and so on.
  Every level is therefore coded by the same engine, which only ever compares
  2×2 range blocks with 4×4 domain blocks.
* **Classification by contrast, decided up front.** Each level has a
  contrast threshold (40, 80, 160, then "everything left" at full
  resolution). A flat block is coded at the coarsest level where its contrast
  stays under the threshold, and its zone is then excluded from all finer
  levels. The thresholds fix the number of codes, and so the compression
  rate, before any coding is done.
* **No multipliers.** The contrast scale is fixed at s = 0.5. The bright
  offset and the luminance transform are then only shifts and adds.
* **Chessboard down-sampling.** A 4×4 domain block keeps only its eight
  pixels whose row + column is odd. Each range pixel is compared with the two
  kept pixels of the matching 2×2 quadrant of the domain block. The match
  metric is the mean absolute difference (MAD).

The RTL is SystemVerilog-2017, synthesizable, and simulates with plain
Verilator.

## Geometry of one level

```
image (32M x 32M pixels)  ->  M x M sectors of 32 x 32, one processing unit each
sector (32 x 32)          ->  2 x 2 sub-sectors of 16 x 16, one coding module each
sub-sector (16 x 16)      ->  8 x 8 range blocks of 2 x 2 pixels
sector (32 x 32)          ->  15 x 15 domain blocks of 4 x 4 pixels on a 2-pixel grid
```

All four coding modules of a unit work in lock step. At any moment each one
holds a range block from its own sub-sector, all at the same relative
position. All four receive the same domain block, which may straddle
sub-sectors. So every range block of the sector is compared with all
15 × 15 = 225 domain blocks of the sector. This is a search window of
(2L+1)² domains with L = 7.

A unit codes its sector at one level in

    8 x 8 ranges x 225 domains x 90 cycles = 1,296,000 cycles

and three levels take 3,888,000 cycles. At 160 MHz that is 24.3 ms. The
clock rate is a target: no timing analysis comes with this RTL.

## The 90-cycle comparison

This is the core of the design (`fractal_coding_module`). The controller
broadcasts a command word (`fic_pkg::fcm_cmd_t`: phase, step,
first/last-domain flags). The module compares its range block with one
domain block on this fixed schedule:

| phase       | cycles | what happens |
|-------------|-------:|--------------|
| `PH_RANGE`  | 4  | the 4 range pixels arrive (raster order) and are stored; sum, max and min are tracked |
| `PH_DOMAIN` | 8  | the 8 chessboard pixels of the domain block arrive and are stored and summed |
| `PH_BRIGHT` | 1  | o = ⌊ΣR/4⌋ − ⌊ΣD/16⌋, i.e. mean(R) − 0.5·mean(D); the contrast class is registered |
| `PH_LUM`    | 8  | each domain register is replaced in place by D' = ⌊D/2⌋ + o |
| `PH_MAD`    | 64 | 8 isometries × 8 steps: step k forms \|R_j(q(k)) − D'(k)\| |
| `PH_CMP`    | 1  | the MAD of the last isometry is compared |
| `PH_XFER`   | 4  | codes leave the unit (one coding module per cycle) |

The range block is captured again for every domain block. That keeps the
timing of every pair identical, and it is why a pair costs 90 cycles rather
than 86.

**Pairing range and domain pixels.** The kept domain pixels are numbered
k = 0..7 in raster order: (0,1) (0,3) (1,0) (1,2) (2,1) (2,3) (3,0) (3,2).
Pixel k lies in 2×2 quadrant q(k) = {k[2], k[0]} of the 4×4 block. In step k
the module compares domain pixel k with range pixel q(k) of the transformed
range block. Over 8 steps every range pixel meets both domain pixels of its
quadrant.

**Isometries act on the range block.** A 90° turn of a 4×4 chessboard block
would move its kept pixels onto the discarded colour. So the module applies
the eight transformations to the 2×2 range block instead; the same eight
matchings are searched either way. Numbering
(`range_block_reg`): 0 identity, 1 rotate 90° clockwise, 2 rotate 180°,
3 rotate 270°, 4 mirror left–right, 5 mirror top–bottom, 6 transpose,
7 anti-transpose.

**Two adders in a pipeline.**
* `arith_unit` ("AU") holds the first adder. It does the sums, the bright,
  the luminance transform, and forms and registers each absolute difference.
* `mad_unit` holds the second adder. It adds each registered difference to
  the running sum one cycle later.
* The sum of an isometry is complete in the same cycle as its eighth term,
  and `maxmin_comparator` acts on it at once.

So the comparisons of isometries 0–6 overlap the MAD phase, and only the last
one needs the extra `PH_CMP` cycle. The MAD is kept as the sum of the eight
differences (8 × MAD), which orders candidates the same way.

**Selecting the best.** The first candidate of a range (isometry 0 of its
first domain) is always taken. After that, only a strictly lower MAD replaces
the held MAD, bright, domain position and isometry, so ties keep the earlier
candidate.

**Widths.**

| quantity | width | range |
|----------|-------|-------|
| pixel | 8 bits | |
| bright o | 10-bit signed | −127..255 |
| D' | 11-bit signed | −127..382 |
| \|R − D'\| | 9 bits | |
| MAD sum | 12 bits | |

## Quad-tree classification

The comparator tracks the largest and smallest range pixel. In `PH_BRIGHT` it
sets the class bit:

    belong = (max − min <= level_threshold) && !covered

* `belong = 1` means the range block is coded at this level.
* `covered` marks a zone that a coarser level has already coded.

Every processing unit holds a 16×16 covered map, one bit per range block of
its sector. It is loaded together with the pixels.

Going from level i to level i+1 (twice the resolution), the child blocks of a
zone are covered if their parent was covered or coded:

    cov[i+1][y][x] = cov[i][y/2][x/2] | belong[i][y/2][x/2]

Whoever sequences the levels keeps this map between levels. The testbench
`tb_fractal_image_coder` shows how.

At the finest level the threshold is 255, so every zone not yet covered is
coded. Each pixel of the image then ends up in exactly one coded block.

Codes are produced for every range block, whatever its class. The class bit
tells which ones belong to the level's code.

## Code format

`fic_pkg::pu_code_t`, 44 bits:

| field | bits | meaning |
|-------|-----:|---------|
| `fcm` | 2 | coding module = sub-sector {row half, column half} |
| `range_idx` | 6 | range block {row, col} inside the sub-sector |
| `code.mad` | 12 | sum of the eight absolute differences of the best match |
| `code.bright` | 10 | bright offset o (signed) |
| `code.dom_row`, `code.dom_col` | 4 + 4 | domain block position in the sector (0..14; pixel origin = 2 × index) |
| `code.iso` | 3 | isometry applied to the range block |
| `code.belong` | 1 | class bit (coded at this level) |

To decode: D' = ⌊D/2⌋ + o over the chessboard pixels of the domain block,
with the range block seen through isometry `iso`.

## Interfaces and timing

### `fractal_image_coder` (top)

Parameters: `M = 8` (the array is M × M units, 256 × 256 pixels) and
`SECTOR_PIX = 32`.

1. **Load pixels.** Drive `enable_input_data`, `in_addr = {row[7:0], col[7:0]}`
   and `input_data`, one pixel per cycle. The upper address bits pick the
   sector.
2. **Load the covered map.** Drive `cover_we`, `cover_addr = {row[6:0], col[6:0]}`
   (range-block grid) and `cover_bit`.
3. **Start.** Set `level_threshold` and `sector_en` (the units to start; a
   coarse level uses only the top-left sectors), then pulse `start` for one
   cycle.
4. **Run.** `busy` rises on the next cycle. All started units finish together
   1,296,000 cycles later, when `done` pulses.
5. **Collect codes.** Unit s = row × M + col delivers its codes on
   `output_data[s]` while `enable_output_data[s]` is high.

Do not change the inputs while `busy` is high.

### `processing_unit` (one sector)

It has the same interface with sector-local addresses (`in_addr` 10 bits,
`cover_addr` 8 bits) and a single output stream.

**Output order.** For each range position in raster order (8 × 8), the four
codes of sub-sectors 0, 1, 2, 3 leave in the four `PH_XFER` cycles of that
range's last domain. That makes 256 codes per sector, four codes every
20,250 cycles.

**Inside.**
* Four `image_sector_bank` register banks, each with one write port and two
  combinational read ports:
  * a range port to its own coding module;
  * a domain port to a shared domain bus.
* `sector_addr_decoder` splits a sector address into sub-sector and relative
  position.
* `pu_controller` produces the command word and all pixel addresses.
* Each coding module has a single pixel input. The unit feeds it from the
  module's own bank in `PH_RANGE` and from the domain bus in `PH_DOMAIN`.

## Module map

```
fractal_image_coder            M x M array, shared load bus, start mask
└── processing_unit            one 32 x 32 sector
    ├── pu_controller          range/domain loops, 90-cycle schedule, addresses
    ├── sector_addr_decoder    x2 (load path, domain path)
    ├── image_sector_bank      x4 (16 x 16 pixels each)
    └── fractal_coding_module  x4
        ├── range_block_reg    2 x 2 pixels, isometry read port
        ├── domain_block_reg   8 chessboard pixels, rewritten with D'
        ├── arith_unit         first adder: sums, bright, D', |R - D'|
        ├── mad_unit           second adder: MAD sums
        └── maxmin_comparator  contrast class, best-match registers
fic_pkg                        widths, phase enum, command and code structs
```

## What is this design's own choice

The block sizes, the 2×2 sub-sector split with four coding modules, s = 0.5,
chessboard down-sampling, the 90-cycle schedule with its phase lengths, the
two-adder MAD pipeline and the contrast thresholds all follow the
architecture this RTL implements. The following were not specified and were
chosen here:

* **Search window.** All four coding modules share one domain stream, so the
  window is the whole sector (15 × 15 domains, L = 7). It is not centred on
  each range block. Smaller windows (L < 7) are not supported.
* **Isometries.** They are applied to the range block, as described above.
  Their numbering, the order of the chessboard pixels and the quadrant
  pairing are also choices made here.
* **Arithmetic.**
  * Contrast is measured as max − min of the 2×2 range pixels.
  * Means are rounded by truncation.
  * MAD is kept ×8.
  * On equal MADs the earlier candidate wins.
* **Unit interface.**
  * The four `PH_XFER` cycles are used to move the four modules' codes out.
  * The load ports, the start/busy/done protocol and the covered-map port are
    this design's own.
  * Reset is synchronous and active low. It clears control and arithmetic
    state; pixel registers are simply written before use.
* **Array.** M = 8 was chosen to fit a 256 × 256 image. The array has a shared
  load bus and a per-unit start mask.
* **Not included.**
  * Building the resolution pyramid (the testbench does 2×2 averaging).
  * Carrying the covered map from level to level: it is loaded from outside.
  * Any decoder.
  * The source architecture's coding-module diagram also shows parameter
    registers for passing fractal parameters between levels. Their use is not
    described, so they are not built: codes leave directly from the
    best-match registers.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
ends by printing `TB_RESULT checks=N failures=F` and has a watchdog. The
reference models in the testbenches are written from the arithmetic
definitions above, not from the RTL's tables. For example, the isometries
are written as coordinate maps.

* `tb_fractal_image_coder` is the full-size, end-to-end test, with default
  parameters. It codes a synthetic 256 × 256 image (ramp, stripes,
  checkerboards, a sharp diagonal edge) on a four-level pyramid with
  thresholds 40/80/160/255. It carries the covered map between levels and
  compares all 21,760 codes with the reference. It checks 1,296,000 cycles
  per level and that every image pixel is covered by exactly one coded block.
  Codes land at every level. About 35 s in Verilator.
* `tb_processing_unit`: one sector at two thresholds, all 512 codes, their
  order, the cycle count, and rejections both by contrast and by the covered
  map.
* `tb_pu_controller`: the full command schedule and every address, cycle by
  cycle, over a whole sector.
* Unit tests for the coding module (against the reference over random
  domain sequences) and for each of its parts.

To run one, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fic_pkg.sv tb/tb_fractal_image_coder.sv --top-module tb_fractal_image_coder
./obj_dir/Vtb_fractal_image_coder
```

To lint a module: `verilator --lint-only -Wall -y rtl rtl/fic_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are intentional:
* unused package constants;
* `cmd.last_dom`, which the coding module does not need;
* the unconnected `max_pix`/`min_pix` debug outputs and unused decoder
  outputs.

## Numbers to expect

* One processing unit: 10 RTL modules. Yosys coarse synthesis gives about
  430 flip-flop bits plus 9,184 bits of register-array storage (the 1,024
  sector pixels, the 256-bit covered map and each coding module's block
  registers).
* One level of one sector: 1,296,000 cycles. This matches the 4-modules, L = 7
  entry of the cycle-count analysis that goes with the architecture. One
  module alone would need 5,184,000.
* The gate counts reported for an FPGA implementation of this architecture
  (about 40k gates per unit, about 4k per coding module) were not reproduced.
