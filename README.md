# SAR target-template correlation on a reconfigurable board

Automatic target recognition (ATR) on synthetic-aperture-radar images spends
almost all of its time on one operation. Each region of interest (a *chip*,
here 128 x 128 pixels of 8 bits) is correlated with a large library of
binary target templates at every offset. Templates come in pairs:

* a **bright** template marks the pixels where a strong radar return is expected;
* a **surround** template marks the pixels where the target should cast a shadow.

Templates are binary and sparse. The correlation at one offset is therefore
just a count: how many chip pixels under the template's "on" pixels are set.
That count is a small adder tree over a register window that the image is
shifted through. An FPGA can hold a few such trees at a time and be
reconfigured for the next few templates.

This repository is SystemVerilog RTL for such a board, modelled on the
published "Configurable Computing Solutions for Automatic Target Recognition"
demonstration system. It has:

* one **compute FPGA** that is reloaded for every step;
* one **control FPGA** that sequences the work and finds the peak;
* a configuration memory, an image SRAM, a FIFO for the window's row
  wraparound, and a wide SRAM for partial results.

With its default parameters, the board correlates one 128 x 128 chip against
sixteen 8 x 8 template pairs, four pairs per configuration. It reports every
correlation and the best-matching template and offset.

Beside the board, the top module also carries a small hard-wired example of
templates that share adder-tree terms (see "Shared adder terms" below).

## Data flow

```
 host ──► image_sram (chip, 16K x 8) ──pixel/clock──► dynamic_fpga ◄──► wrap_fifo (row wraparound)
 host ──► config_memory (bitstreams) ──► config_loader ──bytes──►   │  ◄──► psum_sram (shapesums, 16K x 56)
                                                                    │
                          atr_controller ── passes, planes ────────►│
                                                                    ▼
                                                     res_* stream ──► peak_detector ──► best_*
```

The controller runs two steps for each group of four template pairs:

1. **Shapesum configuration, eight passes.** The compute FPGA is loaded with
   the group's bright templates in shapesum mode. The chip is streamed once
   per bit plane b = 0..7. Each pass correlates bit plane b with each bright
   template, weights the count by 2^b and adds it to the word that
   `psum_sram` holds for that window position. Pass 0 overwrites instead of
   adding. After eight passes, each word holds the four **shapesums** of the
   position: the sum of the 8-bit pixels under each bright template.
   With `SH_CFGS = 2` this step is split in two. Two shapesum
   configurations each compute two of the four shapesums and hold the other
   two lanes (header bits, below), so the four shapesums that one
   correlation needs are assembled from two smaller configurations.
2. **Correlate configuration, one pass.** The FPGA is reloaded in correlate
   mode with the bright and surround templates. Every pixel is cut by eight
   fixed thresholds T0..T7 into eight binary images, which share one window.
   All 8 x 4 x 2 correlations are formed in parallel. The stored shapesum of
   the position then selects which of the eight (bright, surround) pairs is
   output. That is one result per clock.

## The shapesum passes

The shapesum is the expensive part of the algorithm. Computing it in one
pass needs eight bit-plane correlators per template plus a weighted adder.
This design trades time for area, as the original system did. It has one
correlator per template and a wide external memory for the running sums, and
it takes D = 8 passes (one per pixel bit). That is D clocks per window
position.

Each pass has a short pipeline (`dynamic_fpga`):

| clock | what happens |
|---|---|
| t   | pixel accepted (`pix_valid`) |
| t+1 | window updated, correlators evaluate, partial-sum read issued for this position |
| t+2 | read word arrives; shapesum mode writes `old + (count << b)` back to the same address |
| t+3 | correlate mode: selected pair on `res_*` |

Inside a pass, successive window positions have distinct addresses
(address = y*W + x of the window's bottom-right pixel). A read never meets a
pending write to the same word. Between passes the controller idles for
`DRAIN` = 5 clocks, which empties the pipeline before the plane or the
configuration changes.

## The window and its wraparound FIFO

`pixel_window` holds K x K pixels in flip-flops. Every template pixel must
be reachable by an adder tree, so these cannot live in RAM. Pixels enter in
raster order and move one register right per clock. When a pixel leaves the
last column of template row r, it must wait until the scan reaches the same
columns one chip row later, and then it enters row r+1.

Those W-K pixels per row would be expensive in flip-flops: (K-1)(W-K) of
them. They go through `wrap_fifo` instead: one RAM, one address counter for
all rows, and a register on the RAM output. The RAM is W-K-1 words deep.
With the output register, the total delay from the last column of row r to
the first column of row r+1 is exactly one chip row.

After pixel (y, x) enters, `win[r][c]` holds pixel (y-r, x-c). Template
pixel (ty, tx) at offset (y-K+1, x-K+1) is therefore `win[K-1-ty][K-1-tx]`.
The board outputs only the offsets where the template lies wholly inside the
chip: (W-K+1) x (H-K+1) = 121 x 121 per template at the defaults.

## Thresholds and the threshold choice

The eight thresholds are fixed and shared by all templates:
T_i = 16*i + 8 (8, 24, ..., 120), in `atr_pkg::threshold_level`. The
shapesum acts as local gain control. For each template and position,
`threshold_select` picks the highest i with

    2 * n_on * T_i <= shapesum        (n_on = on pixels of the bright template)

In other words, the binary image is cut at about half the mean brightness
under the bright template. Pixels of a real bright return pass the cut, and
shadowed surround pixels do not, whatever the overall level of the chip. The
threshold levels and this rule are this design's own choices. The original
system only says that the shapesum selects the output pair. To change them,
edit `threshold_level` and the comparison in `threshold_select` together.

## Peak detection

`peak_detector` scores every result as bright count minus surround count. It
keeps the highest score since the start of the chip, with the template
number (group*4 + lane) and offset. Ties keep the earlier result. The scores
are not normalised by template size. A template with more "on" pixels can
reach a higher score, and a full match of the largest template is the
highest score possible.

## Configuration bitstreams

A "reconfiguration" here loads a 65-byte description into the compute FPGA
through a byte-wide port, one byte per clock. Bitstream i sits at
configuration-memory address i*65. With S = `SH_CFGS`, bitstreams
g*(S+1) .. g*(S+1)+S-1 are the shapesum configurations of group g, and
g*(S+1)+S is its correlate configuration. At the default S = 1, those are
2g and 2g+1. The
layout (`atr_pkg::cfg_len`):

| byte | content |
|---|---|
| 0 | bit 0: mode (0 = shapesum, 1 = correlate); bit 1+t (shapesum mode): lane t holds its partial sums |
| 1 + 8t .. 8 + 8t | bright mask of lane t (t = 0..3), least significant byte first |
| 33 + 8t .. 40 + 8t | surround mask of lane t |

Mask bit ty*8+tx is template row ty (top row 0), column tx. In the original
system, each template is hard-wired as its own pruned adder tree, and a
real bitstream is some 20 kB. In this RTL the masks are run-time registers
feeding full 64-input adder trees (`template_correlator`). Synthesised with
constant masks, the same code reduces to the sparse per-template trees.

## Timing

A pass takes 1 + W*H + DRAIN clocks, and a configuration load takes
65 + 2 clocks. One chip takes

    NG * ((S+1)*(LEN+2) + (S*PW+1)*(1 + W*H + DRAIN)) + 1  clocks   (S = SH_CFGS)

which is 590,577 clocks at the defaults, or 47 ms at the 12.5 MHz clock of
the original board. The original board's 210 ms per chip was dominated by
130 ms of FPGA configuration. Configuration here costs only 536 clocks,
because a bitstream is the mask set rather than an FPGA image.

## Shared adder terms (`shared_term_tree`)

When templates are hard-wired, templates that overlap can share parts of
their adder trees. An offline grouping step splits the pixels of a group of
templates into *terms*: sets of pixels used by exactly the same templates.
Each term is one popcount, and each template's count is a sum of terms. Then
the pair of terms that is added most often is added once and reused, and the
step repeats.

`shared_term_tree` is that network for a five-template example with ten
terms:

| template | terms |
|---|---|
| A | 1 + 2 + 5 + 6 + 7 + 9 |
| B | 4 + 5 + 6 + 7 + 10 |
| C | 1 + 2 + 3 + 5 + 6 |
| D | 1 + 5 |
| E | 4 + 5 + 6 + 7 + 8 |

The shared sums are 11 = 5 + 6 (four templates), 12 = 11 + 7 (three),
13 = 1 + 2 and 14 = 4 + 12 (two each). The pair 5 + 6 is the example's own
first choice; the later pairs are this design's continuation of the same
rule. That cuts the term additions from 18 to 11. The block takes the ten
term counts as inputs, because which pixels form each term depends on the
template set. It sits beside the board in `atr_board` with its own ports
(`st_term`, `st_tpl`) and is not part of the board's datapath, which loads
templates as run-time masks instead.

## Parameters (`atr_board`)

| parameter | default | meaning |
|---|---|---|
| W, H | 128 | chip size |
| K | 8 | template size (K x K; K*K must be a multiple of 8 for the bitstream layout) |
| PW | 8 | pixel bits = number of shapesum passes |
| NP | 4 | template pairs per configuration |
| NTH | 8 | thresholds / binary images |
| NG | 4 | configurations (groups) per chip |
| CFG_DEPTH | 1024 | configuration memory bytes |
| SH_CFGS | 1 | shapesum configurations per group (2: split-shapesum flow) |

The shared constants and types live in `rtl/atr_pkg.sv`.

## Departures from the original system

* Templates are loaded as masks, not synthesised into the FPGA fabric. The
  offline tool that groups templates so they can share adder-tree terms is
  software and is not part of this RTL. Only its output for one example is
  given, as `shared_term_tree`.
* The threshold levels, the threshold-choice rule, the bright-minus-surround
  score and the bitstream layout are this design's own choices. So are the
  widths: 7-bit correlation counts, which an 8 x 8 template needs, and
  14-bit shapesums.
* Partial sums live in their own SRAM, separate from the image SRAM. The
  original board's photograph shows a single SRAM.
* The control flow is a fixed sequence: per group, one shapesum
  configuration (or two, with `SH_CFGS = 2`), then one correlate
  configuration. The original system also mentions loops and branches run
  by a small microcontroller next to the FPGA. Those are not built, and the
  configuration loader is a counter, not a processor.
* The chip arrives through a host write port. The focus-of-attention stage
  that cuts chips out of the full SAR image, and the host bus interface,
  are not part of this design.
* The general 16 x 16-template setting discussed alongside the board is
  reachable with `K = 16`, but the default is the board's 8 x 8.

## Simulation

Each module in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`,
and each prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert rtl/atr_pkg.sv tb/atr_board_tb.sv \
    -y rtl -y tb --top-module atr_board_tb -o sim && ./obj_dir/sim
```

* `atr_board_tb` runs the board on a 16 x 12 chip with 4 x 4 templates and two
  groups. It checks every correlation result against a software model, plus
  the peak, the run time against the formula above, the detection of a
  planted target, and that every mechanism occurs: reconfiguration, mode
  switches, overwrite and accumulate passes, FIFO wraparound, several
  thresholds, and peak updates.
* `atr_board_full_tb` does the same at the default size: a 128 x 128 chip
  and sixteen 8 x 8 pairs, 590,577 clocks. It takes under a minute in
  Verilator.
* `atr_board_fig9_tb` runs the split-shapesum flow (`SH_CFGS = 2`) on a
  24 x 16 chip with 8 x 8 templates.
* `atr_board_k16_tb` uses 16 x 16 templates on a 32 x 24 chip. Its four
  bright templates have exactly 91 "on" pixels each.
* `dynamic_fpga_tb` checks every partial-sum word after the shapesum passes,
  and the three-clock result latency.
