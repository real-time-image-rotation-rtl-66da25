# Image rotation by three B-spline shears on one time-shared filter region

This RTL rotates a grey-level image by an arbitrary angle at video rate. It
is built from only two kinds of filter, and a single processing region holds
one of them at a time.

A rotation matrix factors into three shears:

    R(theta) = A * B * A,   A = | 1  -tan(theta/2) |   B = |    1        0 |
                                | 0       1        |       | sin(theta)  1 |

A shear moves every line of the image along itself, each by its own
distance. Rotating is therefore three passes of 1-D translations by
non-integer distances: along rows, then along columns, then along rows again.
Each translation is done by cubic B-spline interpolation:

1. **Causal prefilter** `y(k) = 1.6*x(k) - 0.26*y(k-1)`
2. **Anticausal prefilter** `c(k) = y(k) - 0.26*c(k+1)`. This is the same
   recursion run over the line from its end. Together, steps 1 and 2 give the
   spline coefficients `C = 1.6 / ((1 + 0.26 z^-1)(1 + 0.26 z)) * I`, the
   inverse of the sampled cubic B-spline `(z^-1 + 4 + z)/6`.
3. **Resampling FIR** `I(k - delta) = sum_j C(j) * B3(k - delta - j)`. This
   has four non-zero taps, and they change from line to line.

Each of the three filter kinds becomes one *configuration* of the processing
region. The nine stages of a rotation (3 passes x 3 configurations) run one
after another. Before each stage the host is asked to load the next
configuration, which on a dynamically reconfigurable FPGA is a bitstream
swap. Two external 256k x 32 SRAMs act as a ping-pong frame store: every stage
reads one and writes the other.

## Blocks

| module | role |
|---|---|
| `image_rotator` | top level: sequencer, address generator, both filter banks, both SRAMs, host port |
| `reconfig_seq` | runs the nine stages, requests each configuration, flips the ping-pong direction |
| `stage_agu` | runs one stage over the canvas: read/write addresses, lane selects, line starts, zero fill, coefficient loads |
| `iir_bank` / `iir_lane` | four first-order recursive lanes (causal or anticausal configuration) |
| `fir_bank` / `fir_lane` | two 4-tap transposed-form resampling lanes with reloadable taps |
| `row_coef_gen` | shift of one line, split into integer part and fraction, and the four spline weights |
| `sram_256kx32` | one frame SRAM: synchronous read, a write enable per 16-bit half |
| `rot_pkg` | number formats, filter constants, configuration enum, the tag struct |

## The canvas, the memory layout and why the FIR writes transposed

A rotated 256 x 256 image needs a 362 x 362 frame (256*sqrt(2)). The host
places the image in the centre of a zeroed 362 x 362 **canvas**. Every
translation then works on full 362-sample lines, and nothing that rotates out
of the 256 x 256 square is lost.

Each SRAM word holds two samples, one per 16-bit half: the samples of two
neighbouring lines at the same position.

    word address = (L >> 1) * W + p      half = L & 1      (L line, p position)

One layout serves both the four-lane IIR and the two-lane FIR:

* **IIR stages** take four lines `4g .. 4g+3`. In the first memory clock of a
  processing cycle the word of lines `4g, 4g+1` is read and feeds lanes 0 and 1.
  In the second clock the word of lines `4g+2, 4g+3` feeds lanes 2 and 3. Each
  lane therefore runs at half the memory clock, and the second pair of samples
  is half a processing cycle behind the first. Results go to the same address
  in the other SRAM, so the data is not moved.
  W = 362 is not a multiple of 4, so the last group holds only two real lines.
  Its second word row is neither read (zeros are fed) nor written.
* **The anticausal stage** reads every line from position W-1 down to 0 and
  writes each result back at its own position. Reading the stored causal result
  backwards takes the place of the line-reversing stack that a fixed filter
  chain would need between its two recursive sections.
* **FIR stages** take two lines `2g, 2g+1`, one word row. Each line has its own
  shift `delta = d + f`, where `d = floor(delta)` and `0 <= f < 1`:
  * the integer part `d` becomes a read offset: step `t` (0 .. W+2) of lane `l`
    reads sample `t - d_l - 2`, with zero outside the line;
  * the fraction `f` sets the taps `B3(-1-f), B3(-f), B3(1-f), B3(2-f)`;
  * the result of step `t` is sample `p = t - 3` of the shifted line.

  The two lanes need different addresses, so a FIR processing cycle makes two
  reads, one half-word each.
* **The transposed write.** The column pass needs lines that run down the
  image, which are spread over W words. So the FIR of the first two passes
  writes its result transposed: sample `p` of line `L` goes to half `p & 1` of
  word `(p >> 1) * W + L`. The next pass then finds its lines as stored lines
  again, and all three passes use the same addressing. The last FIR writes
  untransposed, so the result in SRAM B is upright and in the same layout as
  the input.

Data flow for one rotation (A = SRAM A, B = SRAM B):

    pass 1 (rows,    shear_a): A -causal-> B -anticausal-> A -FIR, transposed-> B
    pass 2 (columns, shear_b): B -causal-> A -anticausal-> B -FIR, transposed-> A
    pass 3 (rows,    shear_a): A -causal-> B -anticausal-> A -FIR-> B

## Shifts and spline weights

For line `L` of a pass with shear factor `s`:

    delta = s * (L - (W-1)/2)

Passes 1 and 3 use `s = shear_a = -tan(theta/2)`. Pass 2 uses
`s = shear_b = sin(theta)`. Both are signed Q2.14 inputs. The output sample is
`out(p) = in(p - delta)`, so the content moves by `+delta`, and lines on
opposite sides of the centre move in opposite directions.

`row_coef_gen` computes `delta` exactly, with 15 fraction bits. It keeps 12
fraction bits of `f` and evaluates the cubic B-spline pieces:

    B3(-1-f) = (1-f)^3/6            B3(-f)  = 2/3 - f^2 + f^3/2
    B3(1-f)  = 2/3 - (1-f)^2 + (1-f)^3/2    B3(2-f) = f^3/6

The weights are rounded to Q1.11 and always sum to 1 within 2 LSB. There are
two instances, one per FIR lane. Before each line pair, `stage_agu` spends four
processing cycles loading the eight taps, one tap of each lane per cycle, and
latches the two integer shifts.

## Reconfiguration

`reconfig_seq` walks this loop three times:
`Config -> causal IIR -> Config -> anticausal IIR -> Config -> FIR`.

At each `Config` step, `cfg_req` is raised with `cfg_id` (0 causal, 1
anticausal, 2 FIR). It stays high until the host answers with `cfg_done`.
During the load the filter registers are cleared, as a global reconfiguration
of the FPGA clears them. All three configurations exist side by side in this
RTL and `cfg_id` selects the one that is active. On a dynamically
reconfigurable device, each would be its own partial bitstream for the same
region. The nine requests are the only contact with the host during a
rotation.

## Number formats

* Samples: signed 13 bit with 3 fraction bits (-512 .. +511.875 grey levels),
  stored sign-extended in a 16-bit half. An 8-bit pixel `v` is written as
  `v*8`. The result is read back the same way; round and clip it to 0..255 for
  display.
* Coefficients: signed Q1.11. The prefilter constants are 1.6 = 3277/2048 and
  -0.26 = -532/2048.
* Each filter output is rounded to nearest and saturated. The FIR keeps its
  partial sums at full product precision and rounds once.

## Timing

The memory clock is intended to be 40 MHz. Filters process at half that rate
(20 MHz). Every stage is streaming: one SRAM access per clock, and each result
is written two clocks after its read.

| stage | clocks at W = 362 | at 40 MHz |
|---|---|---|
| causal or anticausal IIR | 2*ceil(W/4)*W + 4 = 65,888 | 1.65 ms |
| FIR | (W/2)*(8 + 2*(W+3)) + 4 = 133,582 | 3.34 ms |
| one rotation, 9 stages + 9 loads of 0.5 ms | 976,101 (measured) | 24.4 ms |

That is 19.9 ms of filtering per image plus 4.5 ms of configuration loading,
well inside the 40 ms of a 25 frame/s stream. Larger images scale with W^2. A
512 x 512 image (W = 724) would fit in the SRAMs (262,088 of 262,144 words)
but would take about 98 ms per rotation, too slow for 25 frames/s.

## Using the top level

1. Hold `rst_n` low for a few clocks.
2. While `busy` is low, write the canvas into SRAM A: `host_sel = 0`,
   `host_we = 1`, `host_addr`, `host_wdata` with two samples per word as above.
   The host port is ignored while `busy` is high.
3. Set `shear_a`, `shear_b` and pulse `start`.
4. Answer every `cfg_req` with a one-clock `cfg_done` once the configuration
   is in place. On a board this happens when the bitstream has been loaded.
5. After the `done` pulse, read the result from SRAM B: `host_sel = 1`.
   `host_rdata` follows `host_addr` by one clock.

Parameter: `W` (canvas side, default 362; must be even, at most 1023 and
small enough that `(W/2)*W` fits in 2^18 words). `rot_pkg::AW = 18` sets the
SRAM depth.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
        rtl/rot_pkg.sv tb/tb_image_rotator.sv --top-module tb_image_rotator
    ./obj_dir/Vtb_image_rotator

Testbenches:

* `tb_image_rotator`: W = 22 canvas, 14 x 14 image.
* `tb_image_rotator_full`: default size, 256 x 256 image, 0.5 ms loads; runs
  in a few seconds.

Both rotate a synthetic image by +30, -50 and 0 degrees. They compare the result
with a floating-point model of the three translations, written directly from
the equations above (tolerance 1 grey level, mean below 0.15; observed max
0.6, mean 0.05). At 0 degrees they also compare the result with the input
image itself (see the accuracy note below). They also check the order of the nine configuration requests
and the exact length of every stage. At full size they check the stage lengths
and the image time against the 50 ns x 362^2/4 per IIR stage and 24.5 ms per
image that the design was specified for. They count each mechanism: reversed
reads, transposed writes, coefficient loads, zero fill, the skipped half
group, and ping-pong swaps.

Block testbenches:

* `tb_iir_bank`, `tb_fir_bank`: bit-exact integer models, including
  saturation.
* `tb_row_coef_gen`: against the spline in floating point.
* `tb_stage_agu`: against address sequences built by plain loops.
* `tb_reconfig_seq`: with random host and stage delays.
* `tb_sram_256kx32`: with half-word writes.

## What follows the specified design and what is this design's own choice

Follows the specified design:

* three translations along rows, columns and rows;
* cubic B-spline translation with a causal IIR, an anticausal IIR and a 4-tap
  FIR with per-line taps, using the constants 1.6 and -0.26;
* 13-bit internal data;
* four IIR lanes and two FIR lanes;
* a memory clock at twice the processing clock, two 16-bit samples per 32-bit
  access;
* two 256k x 32 SRAMs in ping-pong;
* nine global reconfigurations per image;
* eight taps loaded in four cycles between lines;
* a 362 x 362 result for a 256 x 256 image.

Choices of this design:

* the split of the 13 bits into integer and fraction;
* the rounding and saturation;
* zero initial state of both recursions at the line ends;
* the canvas memory layout and the transposed FIR write used for the column
  pass;
* reading backwards in place of a line-reversing stack;
* the shear sign convention and the centre of rotation;
* computing the spline weights on chip (they could equally be supplied by the
  host);
* the `cfg_req`/`cfg_done` handshake;
* the host port.

Consequences to be aware of:

* The constants 1.6 and 0.26 are rounded from the exact values
  `6*(2-sqrt(3)) = 1.6077` and `2-sqrt(3) = 0.26795`. With the rounded values
  the chain does not interpolate exactly: its gain is 1.008 at DC and 0.974 at
  the Nyquist frequency. A 0-degree rotation therefore returns the image within
  about 7 grey levels at sharp edges, and within 1.7 grey levels on average
  over the test image. To make the chain interpolate, set `IIR_GAIN_CAUSAL` to
  3293 and `IIR_POLE` to -549 in `rot_pkg`. With those values a 0-degree
  rotation returns the test image within 0.1 grey level. The testbenches'
  model reads the same two constants.
* High-contrast detail can push the spline coefficients past +-512, where they
  saturate. Natural images stay far inside this range.
* Configuration loading is not modelled in logic. The design only waits for
  `cfg_done` and clears the filter registers in the meantime.
* The board's DSP, its boot EPROM, the bitstream memory and the FPGA's
  configuration port are outside this RTL.
* A fully static implementation with three filter chains in parallel is not
  provided.
