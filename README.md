# Multi-level 2-D 5/3 wavelet transform with CSD shift-add filters

This is synthesizable SystemVerilog for a multi-level two-dimensional discrete
wavelet transform (DWT) of a gray-scale image. It uses the 5/3 (LeGall)
biorthogonal wavelet, the filter pair of lossless JPEG 2000 coding. The design
has no hardware multipliers and no coefficient ROM. Each filter coefficient is
written in canonic signed digit (CSD) form, so multiplying by it takes only a
few shifted copies of the input and an adder. A single 1-D filter unit does
the whole transform. It scans the image line by line: all rows first, then all
columns, level after level.

Defaults: a 512 x 512 image of 8-bit pixels, 3 decomposition levels and 16-bit
signed coefficients. A full transform takes 695,315 clock cycles.

## The filters and their CSD form

The 5/3 analysis filters are applied in convolution form. For sample
position `n` of a line `x`:

```
low pass  (even n):  L = (-x[n-2] + 2x[n-1] + 6x[n] + 2x[n+1] - x[n+2]) / 8
high pass (odd n):   H = (-x[n-1] + 2x[n]   - x[n+1]) / 2
```

Computing `L` only at even positions and `H` only at odd ones is the usual
downsampling by two. A line of `m` samples therefore gives `m/2` low-pass and
`m/2` high-pass coefficients.

Both filters are symmetric, so the unit first adds the outer tap pairs. What
remains is three constant products for `L` and two for `H`. Once the 1/8 and
1/2 scale factors are taken out, the constants are small integers with these
CSD digits (`dwt_pkg.sv`):

| scaled coefficient | CSD digits (2^3 2^2 2^1 2^0) | shift-add form |
|---|---|---|
| -1 | 0 0 0 -1 | `-x` |
| +2 | 0 0 +1 0 | `x << 1` |
| +6 | +1 0 -1 0 | `(x << 3) - (x << 1)` |

`csd_mult` turns such a digit pattern into logic. The pattern is given as two
masks: `POS` marks +1 digits and `NEG` marks -1 digits. Partial product `i` is
the input with `i` zero bits appended. A parameter check rejects patterns that
are not canonic (two neighbouring non-zero digits, or a digit that is both +1
and -1). Because the masks are parameters, only the adders for non-zero
digits are built.

The arithmetic is exact until the scale factors are removed. The result is
then rounded half up (`(sum + 4) >>> 3` for `L`, `(sum + 1) >>> 1` for `H`)
and saturated to `DW` bits. With 8-bit pixels, no coefficient comes near the
16-bit limit within 5 levels.

A note on subtraction: the 5/3 filters have negative taps, and CSD digits can
be -1. This design uses subtractors for those digits. A variant that avoids
subtraction would need a different number representation. That change is
local to `csd_mult`.

## The 1-D unit (`dwt53_1d`)

The unit is a five-register delay line. Its newest entry is `x[n+2]` and its
oldest `x[n-2]`. Behind the delay line sit the folded tap pairs, the five CSD
multipliers, the two adders, and rounding and saturation. One output register
follows.

- Input: one sample per cycle when `in_valid` is high. `in_first` marks the
  first sample of a line and restarts the unit's position counter. Idle
  cycles may fall anywhere, even inside a line, and lines may follow each
  other directly.
- Lines arrive already extended: two extra samples at each end, so `m + 4`
  samples per line (see "Edges" below). The unit does not know the line
  length.
- Output: from the fifth sample of a line on, each input sample produces one
  coefficient. `out_pos` gives its position `n` in the line. `out_hi`
  separates high-pass values (odd `n`) from low-pass values (even `n`).
- Latency: two cycles. A coefficient appears two cycles after the sample that
  completes its window.

Throughput is one coefficient per clock. The critical path runs from the
delay line through the pair adder, one CSD adder stage, the sum of three
terms, the rounding adder and the saturation compare.

## Edges

Each line is extended by whole-sample symmetric reflection: `x[-1] = x[1]`,
`x[-2] = x[2]`, `x[m] = x[m-2]`, `x[m+1] = x[m-3]`. The reflection happens in
the controller's read-address generator (`dwt_pkg::mirror_index`). The memory
is simply read at the reflected address, so the filter unit needs no edge
logic. This is the extension JPEG 2000 uses for odd-length symmetric filters,
and it keeps the transform invertible.

## Multi-level 2-D schedule (`dwt2d_top`)

The top holds two `N x N` buffers of `DW`-bit words (`frame_mem`): the frame
buffer and the row buffer. It also holds one `dwt53_1d` unit and a small
controller. Level `l` works on the top-left `m x m` region, where
`m = N >> l`:

1. **Row pass.** Each row of the frame buffer is read with its extension
   samples (`m + 4` reads) and sent through the 1-D unit. Low-pass results go
   to columns `0 .. m/2-1` of the same row of the row buffer. High-pass
   results go to columns `m/2 .. m-1`.
2. **Drain.** The controller waits 3 cycles (`PIPE_DRAIN`), so the last
   results are written before they are read again.
3. **Column pass.** Each column of the row buffer is read the same way.
   Low-pass results go to rows `0 .. m/2-1` of the frame buffer, high-pass
   results to rows `m/2 .. m-1`.
4. **Drain**, then the next level on the `m/2 x m/2` low-low quadrant.

Rows and columns are processed back to back, with no gap between lines. The
unit reports each coefficient's position, so the write side needs only a
line counter: it finds the destination column (or row) as `n/2` for low-pass
values and `m/2 + n/2` for high-pass values.

The two buffers do not conflict. A row pass reads only the frame buffer and
writes only the row buffer. A column pass does the reverse. The result is
therefore in place: when `done` pulses, the frame buffer holds the usual
quadrant layout, shown here for level `l` with `m = N >> l`:

```
 rows 0..m/2-1,  cols 0..m/2-1   LL  (transformed again by level l+1)
 rows 0..m/2-1,  cols m/2..m-1   HL  (high pass along rows, low pass along columns)
 rows m/2..m-1,  cols 0..m/2-1   LH
 rows m/2..m-1,  cols m/2..m-1   HH
```

After the last level, the top-left `(N >> LEVELS)` square is the final LL
band.

**Cycle count.** A level of size `m` takes `2 * (m * (m + 4) + 3)` cycles.
Leaving idle adds one cycle. At the defaults this gives
1 + 2·(512·516+3) + 2·(256·260+3) + 2·(128·132+3) = 695,315 cycles. The
`m + 4` instead of `m` reads per line (the edge extension) adds 1.5 % at
512 x 512.

**Memory.** There are two `N x N x DW` buffers: 2 x 4 Mbit at the defaults.
The row buffer could be smaller than a full frame in a design that also
scans columns out of on-chip line storage. This design keeps the simpler
full-frame form.

## Interface of the top

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `load_en`, `load_row`, `load_col`, `load_pix` | in | 1, log2 N, log2 N, `PIX_W` | write an unsigned pixel while idle |
| `start` | in | 1 | pulse while idle to run all levels |
| `busy` | out | 1 | transform running |
| `done` | out | 1 | one-cycle pulse when the last level is written |
| `level` | out | log2(LEVELS+1) | level being computed |
| `rd_row`, `rd_col` | in | log2 N | coefficient address, read while idle |
| `rd_data` | out | `DW` | signed coefficient, one cycle after the address |

While `busy` is high, pixel writes are ignored and `rd_data` is undefined.
The sequence is: write all `N*N` pixels, pulse `start`, wait for `done`, then
read the coefficients.

Parameters: `N` (power of two, default 512), `LEVELS` (default 3; the last
level must still be at least 4 x 4), `PIX_W` (default 8) and `DW` (default
16). A parameter check stops elaboration if `N` or `LEVELS` breaks these
rules.

## What is taken from the published architecture, and what is not

Taken from it:

- The 5/3 filter pair in convolution form, with 5 low-pass and 3 high-pass
  taps.
- Multiplier-less constant multiplication by CSD shift-add. The n-th partial
  product is the input with n-1 zero bits appended.
- A delay-flip-flop filter structure.
- A multi-level 2-D transform built on a line-scanning architecture.

Choices of this design, not given by the source:

- The numeric coefficients (the standard 5/3 values).
- The folding of symmetric taps.
- Word widths, rounding and saturation.
- Symmetric edge extension.
- The handshake and the host interface.
- Image size (512) and number of levels (3).
- The two-buffer row/column schedule and the in-place quadrant layout.

Not built: the second 2-D organisation the source mentions, based on parallel
data access. Only its name and the fact that it trades on-chip memory against
frame-buffer size are known, not its structure.

The published FPGA results are not claimed for this RTL: 190.54 MHz and 236
slices on Virtex-5, and a synthesis report that lists latches. This design
has no latches. Its buffers hold whole frames, so its resource use is
dominated by 8 Mbit of memory.

## Verification

Every testbench checks itself. It ends by printing
`TB_RESULT checks=<n> failures=<n>`, and a watchdog stops it if it hangs.

| testbench | what it checks |
|---|---|
| `tb_csd_mult` | the -1, +2 and +6 multipliers and two wider constants (+21, -43) against plain multiplication, for random and extreme inputs |
| `tb_dwt53_1d` | 62 lines of random even length (4..64), back to back, with random idle cycles; every coefficient's value, low/high flag, position and its arrival exactly two cycles after the window completes; the full 16-bit input range so saturation is hit |
| `tb_frame_mem` | random reads and writes against a shadow copy, including read-during-write (old data) |
| `tb_dwt2d_top` | the top at its default parameters: two 512 x 512 images (random pixels and an edge pattern), every coefficient of the frame buffer against an independent integer reference (`dwt53_ref_pkg`), and the exact cycle count; it also counts row-pass lines, column-pass lines, left and right extension reads, low- and high-pass outputs, drains and level changes, and fails if any of them never happened |

The reference model in `tb/dwt53_ref_pkg.sv` uses ordinary integer
multiplication and computes each coefficient straight from the formulas
above. It shares no code with the CSD datapath.

Running with Verilator 5 (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing -Wno-fatal --top-module tb_dwt2d_top \
    -y rtl -y tb +libext+.sv rtl/dwt_pkg.sv tb/dwt53_ref_pkg.sv tb/tb_dwt2d_top.sv
./obj_dir/Vtb_dwt2d_top
```

The other testbenches run the same way. Replace the top module and the file
name; `tb/dwt53_ref_pkg.sv` is needed only by `tb_dwt53_1d` and
`tb_dwt2d_top`. The full-size top test takes a few seconds. To try another
size, change `N` and `LEVELS` in both the testbench's localparams and the
instance (`dwt2d_top #(.N(N), .LEVELS(LEVELS)) dut (.*);`).

Linting: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/dwt_pkg.sv rtl/dwt2d_top.sv`.
The remaining warnings are about package constants a given module does not
use.

## Files

- `rtl/dwt_pkg.sv`: CSD digit masks, scaling shifts, controller states,
  edge-reflection function.
- `rtl/csd_mult.sv`: CSD constant multiplier.
- `rtl/dwt53_1d.sv`: 1-D 5/3 DWT unit.
- `rtl/frame_mem.sv`: frame and row buffers.
- `rtl/dwt2d_top.sv`: controller, address generation, write-back, top level.
- `tb/`: the testbenches above and the reference model package.
