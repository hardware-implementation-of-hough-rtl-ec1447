# Hough-transform line detector

A small, fully sequential hardware engine for the straight-line Hough
transform, aimed at lane detection. It takes a list of edge pixels
(x, y) and, for each pixel and each angle θ from 0° to 180°, computes

    ρ = x·cos θ + y·sin θ

then counts how many (pixel, angle) pairs produced each ρ value. Pixels
that lie on one straight line all produce the same ρ at the angle normal
to that line. The accumulator entry with the most votes therefore marks the
line, and a second RAM records which θ produced it.

The engine has one multiply-add datapath, a seven-state controller and
two counters. It does not parallelise the sweep. Each (pixel, angle) pair
costs three clock cycles, and each pixel costs one more.

## Data path

```
 theta counter ──► Cos ROM ──► C ─┐
   (0..180)    └─► Sin ROM ──► S ─┤        ┌──────────── Acc Rho (64K x 16) ──► A ──► +1 ──┐
                                  ├─ X·C + Y·S ─► R ──►│ address                                │
 pixel counter ──► X RAM ────► X ─┤   (16 bit)         │◄───────────────── write data ◄─────────┘
   (0..max_pixel)└─► Y RAM ──► Y ─┘                    └──────────── Acc Theta (64K x 8) ◄── T (theta of R)
```

* **Sine/cosine tables** (`trig_rom`): 256 × 8 bits, entry d is
  round(127·sin d°) or round(127·cos d°), stored as two's complement, with
  halves rounded away from zero. Entries above 180 are zero. The θ counter
  addresses them directly in degrees. The table is computed at elaboration
  time (`hough_pkg::trig127`, an integer Taylor series), so no data file is
  involved.
* **Pixel RAMs** (`pixel_ram`): 256 × 8 bits each, one for x and one for y.
  Pixel i is at address i. A host loads them through a write port.
* **ρ unit** (`rho_unit`): two 8 × 8 multipliers and a 16-bit adder. The
  result keeps its low 16 bits, so a negative ρ wraps to the top of the
  address range. With 100 × 100 images, ρ spans −12573 … 25146, and no two
  values share an address.
* **Accumulators** (`acc_ram`): 65536 entries addressed by ρ. Acc Rho holds
  16-bit vote counts. Acc Theta holds the 8-bit angle of the last vote. The
  total memory, including tables and pixel RAMs, is 1,581,056 bits.
* **Pipeline registers**: C, S and T (θ), X, Y, R (ρ) and A (the count read
  from Acc Rho). They are loaded by the controller's ldC/ldS, ldX/ldY, ldR
  and ldA strobes.

## Sequencing

The controller (`hough_controller`) is a seven-state machine:

| state | name | what happens |
|---|---|---|
| S0 | Wait | idle; host owns the accumulators; leaves on `start` |
| S1 | Enable | both counters cleared |
| S2 | Read (X, Y) | X, Y ← pixel RAMs[pixel] |
| S3 | Read θ | C, S, T ← tables[θ] |
| S4 | Load ρ | R ← X·C + Y·S |
| S5 | Update | A ← AccRho[R]; θ steps; after the last θ, pixel steps. Next: S3 if angles remain, else S2 if pixels remain, else S6 |
| S6 | Done | `done` = 1 for one cycle, then S0 |

The subtle point is the accumulator read-modify-write. The count is read
into A during S5. The incremented value A + 1 (and T into Acc Theta) is
written to address R in the **following** cycle, which is the next S3, S2
or S6. This is safe for three reasons:

* R changes only in S4.
* A changes only in S5.
* A write always lands before the next read.

S6 exists to give the very last write its cycle. `wren` is therefore a
registered output of the controller.

Both counters wrap to zero after their last value. The sequence is
0, STEP, … up to the last multiple of STEP not above 180 for θ, and
0 … `max_pixel` for pixels. They are therefore back at zero whenever a
transform ends.

**Timing.** If `start` is seen in S0 in cycle 0, `done` is high in cycle
2 + P·(1 + 3·A), for P = `max_pixel` + 1 pixels and A = ⌊180/STEP⌋ + 1
angles. At the default 1° step (A = 181) that is 2 + 544·P cycles. For
example, 100 pixels take 54,402 cycles, about 1.09 ms at 50 MHz. In the
45° example (A = 5, P = 8) it is 130 cycles.

## Signed or unsigned sine and cosine

The tables hold signed samples: cos 135° = 0xA6 = −90. The parameter
`SIGNED_TRIG` decides how the multipliers read them:

* `SIGNED_TRIG = 1` (default): as signed numbers, so ρ follows the line
  equation.
* `SIGNED_TRIG = 0`: as unsigned numbers (0xA6 = 166, 0x81 = 129). This
  mode exists because the original implementation's published verification
  output was produced this way. For example, it gives ρ = 526 for pixel
  (1, 4) at 135° (1·166 + 4·90) rather than 270, and 129 at 180°. In this
  mode the engine reproduces that output table exactly.

Either way, the line through (0,5), (1,4), (2,3), (3,2) and (4,1) collects
its votes at ρ = 450.

## Host interface of `hough_top`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `start` | in | 1 | start a transform; sampled only in S0 |
| `max_pixel` | in | 8 | index of the last stored pixel (pixel count − 1) |
| `pix_we`, `pix_waddr`, `pix_wx`, `pix_wy` | in | 1, 8, 8, 8 | load one pixel into both pixel RAMs |
| `host_addr` | in | 16 | accumulator entry to read or clear while in S0 |
| `host_clr` | in | 1 | write zero to that entry (only in S0) |
| `host_count`, `host_theta` | out | 16, 8 | the entry's vote count and angle |
| `done` | out | 1 | one-cycle pulse at the end of a transform |
| `state` | out | 3 | controller state S0–S6 |
| `acc`, `cos_out`, `sin_out`, `param_t_out`, `rho`, `x_out`, `y_out` | out | 16, 8, 8, 8, 16, 8, 8 | pipeline registers A, C, S, T, R, X, Y, for observation |

The accumulators start at zero, as FPGA memories initialised at
configuration do. Before running a new image, clear the entries the
previous run used. The simplest way is to clear every address, which takes
65,536 cycles.

Parameters of `hough_top`: `THETA_STEP` (default 1°; 45 gives the
five-angle worked example) and `SIGNED_TRIG` (default 1). The widths are
fixed in `hough_pkg`: 8-bit coordinates, angles and samples, and 16-bit ρ
and counts.

## Where this RTL departs from, or fills in, the original design

* **Signedness**: the original design describes signed 8-bit samples, but
  its published results come from unsigned multiplication. The default
  here is signed; `SIGNED_TRIG = 0` gives the published numbers.
* **Which state drives which strobe** is this design's choice. The state
  names and the loop decisions are the original's. The same goes for the
  deferred write and the one-cycle `done`.
* **Host ports**: the original preloads the pixel RAMs and initialises its
  memories from files. It has no pixel-write port, no accumulator
  read/clear port and no clearing between images; these ports are added
  here.
* **Loop ends**: the counters give `theta_last`/`pixel_last` flags to the
  controller. In the original top level, the controller has only
  clk/rst/start inputs and the counter block has a single `done` output.
  The "θ < 180?" test is read as "θ + step ≤ 180", so 180° itself is
  processed.
* **Memory reads** are combinational, and the following register (C, S, X,
  Y, A) plays the role of a synchronous RAM output register. On an FPGA,
  the two 64K accumulators would need this restructured into block-RAM
  form, with address registers inside the RAM.
* **Table contents**: computed from the formula. They agree with the
  original's listed ROM contents except at sin 81°, where the original
  lists 0x7E and the formula gives 0x7D (127·sin 81° = 125.44). They also
  differ at cos 181°, which is never addressed.
* **Not included**:
  * The search for the accumulator maximum. The original hardware stops
    after filling the accumulator, and the line is read out by the host.
  * The Sobel edge detector that would produce the pixel list.
* **Bin width**: the accumulator is indexed by the raw 16-bit ρ, whose
  unit is 1/127 of a pixel. Only exactly collinear pixels (after table
  quantisation) share a bin. Lines at 0°, 45°, 90° and 135° collect all
  their votes. Rasterised lines at other angles spread them: in the test
  below, two hand-drawn lanes of 100 pixels each peak at only 17 votes.
* **Acc Theta holds the last vote, not the line's angle.** Different
  angles can produce the same ρ for some other pixel, and each vote
  overwrites Acc Theta. So the angle stored at the peak is not reliable:
  in the tests, the 45° line at ρ = 6300 shows θ = 4°. To recover the angle
  of a peak, search the θ sweep for a pixel of the line, or use the known
  angle grid.

## Files

| file | content |
|---|---|
| `rtl/hough_pkg.sv` | widths, types, state encoding, control word, table function |
| `rtl/hough_top.sv` | top level: controller + counter + datapath |
| `rtl/hough_controller.sv` | state machine |
| `rtl/hough_counter.sv` | θ and pixel counters |
| `rtl/hough_datapath.sv` | tables, pixel RAMs, registers, ρ unit, accumulators, host mux |
| `rtl/rho_unit.sv` | X·C + Y·S |
| `rtl/trig_rom.sv`, `rtl/pixel_ram.sv`, `rtl/acc_ram.sv` | memories |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_hough_full` |

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_trig_rom`: all 256 entries of both tables against real-valued
  sin/cos.
* `tb_pixel_ram`, `tb_acc_ram`: random traffic against reference arrays.
* `tb_hough_counter`: whole sweeps at 1° and 45° steps, with wraps, hold,
  clear and reset.
* `tb_rho_unit`: every published ρ of the worked example (unsigned mode),
  plus random signed/unsigned checks.
* `tb_hough_controller`: state and control word every cycle, plus the exact
  `done` cycle for several loop sizes.
* `tb_hough_datapath`: drives the control word by hand and checks every
  register and the final accumulators.
* `tb_hough_top`: the eight-pixel, 45° worked example on two engines side by
  side (unsigned and signed). It checks every ρ, the 130-cycle run, the
  peak at ρ = 450 with six votes, and a second run after clearing. It also
  counts the θ wrap, the pixel wrap, the deferred write in S3/S2/S6,
  repeated votes, host clears, an ignored `start`, and where the two modes
  differ.
* `tb_hough_full`: default parameters on five constructed 100 × 100
  images of 92 to 200 pixels:
  * a diagonal with noise,
  * a horizontal and a vertical line,
  * two rasterised lanes,
  * a V of two diagonal segments with noise,
  * a diagonal with noise and two small circles.

  For each image it checks all 65,536 accumulator entries against a
  reference model, the cycle count (2 + 544·P), that each exact line holds
  all its votes, and that the global peak lies on a drawn line.

Running one testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`. `-Wno-fatal` keeps the testbenches' width warnings from
stopping the build.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/hough_pkg.sv tb/tb_hough_full.sv --top-module tb_hough_full -o sim
./obj_dir/sim
```
