# Three FPGA accelerators: line Hough transform, Euclidean GCD array, LZW codecs

This RTL implements three independent hardware algorithms that are meant to
share one large FPGA, each built so that it uses few resources per unit and
can be replicated or parallelised:

* **Line Hough transform** (`hough_line`): a binary edge image streams in, one
  pixel per clock in raster order; every angle has its own voting unit and
  its own accumulator memory, so all 180 angles vote for a pixel in the same
  clock. After the frame a 3x3 maximum filter picks the true local maxima
  out of the vote array instead of plain thresholding.
* **GCD array** (`gcd_array`, `gcd_core`): 1280 small cores, each running the
  Euclidean algorithm on a pair of 1024-bit integers, all at the same time.
* **LZW** (`lzw_compressor`, `lzw_decompressor`): 24 compressors and 34
  decompressors, each an independent stream engine with its own dictionary.

`fpga_algorithms_top` places them side by side; they share only clock and
reset (synchronous, active low).

## Line Hough transform

A line is written x·cos θ + y·sin θ = ρ. Each edge pixel votes, for every
angle θ, for the ρ bin its line would have; bins that collect many votes are
lines.

**Partitioning.** The vote array (θ × ρ) is split by angle: `hough_theta_unit`
number k owns θ = k·π/180 and one memory of `RHO_BINS` counters. All units see
the same pixel, so one pixel is voted per clock whatever the number of angles.

**No multipliers.** Because every pixel arrives in raster order, a unit never
computes x·cos θ + y·sin θ directly: it adds cos θ for each step along a row
and restarts each row from a base that grows by sin θ per row. With the
fixed-point constants C = round(cos θ·2¹⁴) and S = round(sin θ·2¹⁴) the running
sum equals x·C + y·S exactly. ρ is rounded to the nearest integer and offset by
`RHO_BINS/2` (so negative ρ has a bin): `RHO_BINS = 2^(max(XW,YW)+2)` = 2048
for 512 × 512 images. The constants are computed at elaboration in
`hough_pkg` (no table file).

**Votes.** The bin is registered and incremented the next clock by a
single-cycle read-modify-write, so back-to-back votes into the same bin are
never lost. Counters are 16 bits and saturate.

**Read-back, clear and maximum filter.** After the last pixel `hough_line`
waits two clocks for the last votes, then reads bin 0, 1, … of all units in
parallel, one bin per clock. Each read also writes the bin to zero, so the
memories are empty for the next frame (after reset the same sweep is run once
with no output). The columns stream into `hough_max_filter`, which holds the
two previous columns and judges the middle one: a cell is a peak if its count
is non-zero, at least `threshold`, greater than the four neighbours that come
before it in (ρ, θ) order and not smaller than the four after it. This tie
rule reports exactly one cell of a plateau. Angles 0 and 179 are not treated
as neighbours. An extra all-zero column ends the scan.

**Output and timing.** For every ρ bin holding at least one peak,
`peak_valid` carries `peak_rho` (bin index; ρ = bin − RHO_BINS/2) and
`peak_mask` (bit k = angle k). `frame_done` pulses after the last bin. With no
input gaps a frame takes 2^(XW+YW) + RHO_BINS + 5 clocks from first pixel to
`frame_done` (264 197 at 512 × 512); `pix_ready` is low during the clear
sweep and the read-back.

The input is a binary edge flag per pixel: edge detection is not part of
this block. There is no gradient-based variant (voting only near each pixel's
gradient direction) and no circle detector.

## GCD cores

`gcd_core` repeats (X, Y) ← (Y, X mod Y) until Y = 0. The remainder is found
by aligned restoring division: Y is shifted left so its top bit lines up with
X's, then one quotient bit is resolved per clock. A step costs
msb(X) − msb(Y) + 2 clocks, so a GCD of random 1024-bit operands takes about
W plus two clocks per Euclidean step, roughly 2 200 clocks (the test bounds it
by 3W + 64). Pulse `start` while `busy` is low. `done` and `result` then hold
until the next start. gcd(a, 0) = a.

`gcd_array` gives each core a start strobe decoded from `ld_core`. A load
(`ld_valid`, `ld_core`, `ld_x`, `ld_y`) starts that core if it is idle
(`ld_accept`); a load to a busy core is ignored. Loads can be issued on
consecutive clocks, so all cores run together. `done_mask`/`busy_mask` give
per-core status; `rd_core` selects the core seen on `rd_result`, `rd_done`
and `rd_cycles`.

This core keeps full-width registers and a full-width subtractor. It is not a
word-serial datapath around one DSP slice and one block RAM.

## LZW codecs

Characters are 8 bits, codes a fixed 12 bits, the dictionary holds 4096
codes (`lzw_pkg`). Codes 0–255 are the single bytes; entry k ≥ 256 is stored as
(prefix code, last byte). Once all 4096 codes are used no entries are added
and the dictionary stays static. Both sides empty their dictionaries after
a stream's last element. All ports are valid/ready streams with a `last` flag.

**Compressor.** For each byte c the compressor searches for (w, c), where
w is the current match, reading one dictionary entry per clock over the codes
in use. On a hit w becomes that code. On a miss it emits w, stores (w, c)
under the next code and restarts from c. This keeps the module to one memory
and a comparator, but a byte costs up to as many clocks as there are codes in
use.

**Decompressor.** For code k it walks the prefix chain from k down to a
single byte, pushing one byte per clock onto a stack memory, then pops the
stack to output the string in order: about two clocks per output byte. The byte
at the end of the walk is the string's first byte; the entry (previous code,
that byte) is added. A code equal to the next free code (the string was
created by the step that produced it, the "cScSc" case) is decoded by
walking the previous code and repeating its first byte at the end.

Input codes must be legal (first code < 256, never above the next free code).
Assertions check this and the output hold rule.

## Sizes (parameters)

| Parameter | Default | Where |
|---|---|---|
| `N_GCD` | 1280 cores | top |
| `GCD_W` / `W` | 1024 bits | top, gcd_array, gcd_core |
| `N_LZWC`, `N_LZWD` | 24, 34 | top |
| `CHAR_W`, `CODE_W`, `DICT_SIZE` | 8, 12, 4096 | lzw_pkg |
| `N_THETA` | 180 angles (1°) | top, hough_* |
| `XW`, `YW` | 9, 9 (512 × 512 image) | top, hough_* |
| `CNT_W` | 16-bit vote counters | top, hough_* |
| `TRIG_FRAC` | 14 fraction bits | hough_pkg |

The module counts (1280, 24, 34) and the 180 angles follow the design
being reproduced (180 angles, one accumulator memory each). The operand
width, code width, image size and counter widths are choices of this
implementation.

## How far to trust it

Each block has a self-checking testbench in `tb/` that compares against an
independent software model:

* binary (Stein) GCD for the GCD cores;
* a software LZW coder for the compressor, and a byte-exact round trip for
  the decompressor;
* a direct-multiplication Hough transform with a 2-D maximum filter for the
  voting units, the filter and the whole `hough_line`.

Every testbench was also run against a deliberately broken copy of its
block and failed. `fpga_algorithms_top_tb` runs all three parts at once at
reduced sizes. It feeds each compressor's codes into a decompressor. It
counts that every mechanism occurs: refused GCD load, dictionary hit, emitted
code, cScSc decode, output stall, Hough peak and frame end.
The top has not been simulated at its full default sizes. The largest runs
are the reduced end-to-end test above and the block tests. The GCD core is
tested at its full 1024 bits. The LZW tests fill the whole 4096-code
dictionary. `hough_line` is tested with all 180 angles on 64 × 64 images.
With all 1280 cores of 1024 bits, verilator flattens the GCD array into C++
that takes the compiler longer than 15 minutes to build.

What is not verified: timing closure or resource use on an FPGA. The memories
are written as arrays with asynchronous reads (distributed-RAM style) in the
LZW engines and in the Hough vote port. Mapping them onto block RAM would
need a registered read and a forwarding path.

## Simulating

From the directory holding `rtl/` and `tb/`, for example:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/lzw_pkg.sv rtl/hough_pkg.sv tb/lzw_ref_pkg.sv tb/hough_ref_pkg.sv \
      tb/hough_line_tb.sv --top-module hough_line_tb
    ./obj_dir/Vhough_line_tb

Every testbench prints `TB_RESULT checks=N failures=M` and stops; a
watchdog ends a stuck run with a failure. `tb/top_tb_body.svh` holds the body of
the end-to-end test `fpga_algorithms_top_tb`. Change the sizes in
its `localparam` lines.
