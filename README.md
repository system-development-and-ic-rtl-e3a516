# Phase-correction image downscaler

This is a video downscaler that shrinks an image by any ratio from 1.0 to about 64. It places each
output line at 1/32-line precision and each output pixel at 1/64-pixel precision. It runs at one
input sample per clock: the target is the 13.5 MHz ITU-R BT.601 pixel clock, used everywhere in
the design. There is no faster clock and no up-sampling.

The idea: an output pixel that falls between two input pixels is not taken from the nearer one,
as pixel dropping would do. It is computed by a short low-pass FIR filter. All of that filter's
coefficient sets have the same gain but different group delays. Picking the set whose delay
equals the fractional position of the output sample moves the filter's output onto exactly that
position. A discrete time oscillator (DTO) steps through the input at the scaling ratio. For each
input sample it decides whether an output sample lands near it, and which coefficient set (phase)
to use. The vertical direction uses a 3-tap, 32-phase filter on three lines from two line
memories. The horizontal direction uses a 5-tap, 64-phase filter, with a 5-tap high-boost
compensation filter in front of it. Only the samples that both DTOs mark valid are written into
the output FIFO.

```
pix_in ─► line_memory ─► vdelay ─► vfilter ─► comp_filter ─► hfilter ─► fifo ─► dout
          (Sram1,Sram2,   (align    3 taps     5 taps         5 taps     ▲
           sram_ctrl)     3 lines)  32 phases  high boost     64 phases  │ wr_en
                                       ▲ sel_v                   ▲ Sel_h │
v_ratio ─────────────────────────► vdto ─ line_en ───────────────┼──► fifo_ctrl
h_ratio ─────────────────────────────────► hdto ─► time_align ───┘──────┘
```

## From ratio to filter phase: the DTOs

The DTOs are the least obvious part, and both work the same way. The ratio `R` is the number of
input samples per output sample, as an unsigned 6.6 fixed-point number in 1/64 sample units. For
example, 2.546875 is written as 163. Output sample `k` belongs at input position `k·R`. The first
output sits exactly on the first input sample.

The filters are centred on one input sample and shift their delay by `s` in [−½, +½) around it.
So output `k` is computed when its nearest input sample, `round(k·R)`, is at the filter centre.
Each DTO keeps `acc`, the distance in 1/64 units from the current centre sample to the next output
position, plus a bias of ½ (32). For each centre sample:

```
a      = (first sample of line/frame) ? 32 : acc
valid  = a < 64                 // next output position is within ±½ of this sample
phase  = a[5:0]  (horizontal)   // s = phase/64 − ½
         a[5:1]  (vertical)     // s = phase/32 − ½, 1/64 truncated to 1/32
acc    = a − 64 + (valid ? R : 0)
```

Because `R ≥ 1`, a sample produces at most one output. For 300 inputs at R = 163/64 this gives
outputs at k = 0…117: 118 samples, so a 300×300 image becomes 118×118. The ratio 163 is odd, so
every one of the 64 horizontal phases (and the 32 vertical ones) appears within a line.

* `hdto` steps once per active sample of the vertically filtered stream. It restarts at the first
  active sample of each line, which is also when it takes `h_ratio`.
* `vdto` steps once per line. The vertical filter's centre tap is the 1H-delayed line, so the
  first centre line of a frame begins one line period after `frame_start`. `v_ratio` is taken
  there. `line_en` and `sel_v` hold for the whole line.
* A ratio below 1.0 acts as 1.0: the design only downscales.

## The filters

### Coefficients

Every phase's coefficients are integers that sum to exactly 512. The normalisation is therefore a
shift by 9 bits. Each set is the Lagrange interpolator through the 2r+1 taps, evaluated at the
phase's shift `s`:

```
c_k(s) = 512 · Π_{j≠k} (s − j)/(k − j),    k, j ∈ {−r … r},  r = 1 (vertical), 2 (horizontal)
```

Each value is rounded half away from zero, and the centre tap takes `512 − Σ others`. Offset
`k = +r` is the newest sample. These sets are low-pass, have unity gain at DC and shift the
delay by exactly `s` for smooth signals. The middle phase (32 horizontal, 16 vertical) is the
identity. `scaler_pkg` computes both tables with constant functions while the design is
elaborated, so no coefficient file exists. Examples (newest tap first):

| phase | s | horizontal c₊₂ … c₋₂ |
|---|---|---|
| 0 | −½ | 12, −80, 360, 240, −20 |
| 32 | 0 | 0, 0, 512, 0, 0 |
| 63 | +31/64 | −20, 231, 369, −80, 12 |

The source design does not print its coefficients. It only describes them as low-pass sets with
shifted group delays, built from shifts and adds, with gain 1/512. The Lagrange choice is this
design's own. To use other coefficients, replace `phase_coef` in `scaler_pkg`. Keep each set's
sum at 512, and keep every coefficient within 11 bits signed.

### Multiplexer-adder form

Neither filter computes all 32 or 64 outputs and then selects one. Each selects the coefficient
set first. The bits of each coefficient's magnitude then pick which left-shifted copies of its
tap go into one multi-operand adder, and the coefficient's sign picks add or subtract. This is
the cheaper of the two forms the source design compares. The other form, with 64 adders and a
64-to-1 output multiplexer, is not included.

### Number formats and the compensation filter

* The vertical filter works on unsigned 8-bit pixels. Its 19-bit sum is limited to 0…255·512+511
  and then divided by 512 (truncating).
* `comp_filter` first makes the pixel signed around mid-grey (`pix − 128`). It then applies
  `[−1, −2, 22, −2, −1]/16`: unity gain at DC, gain 1.5 at half the sample rate, truncating
  division. Its output magnitude is at most 224, so the 9-bit signed output (Outcompen) never
  saturates. The kernel is this design's own. It restores the high frequencies that the
  horizontal interpolator attenuates, especially at the ±½ phases.
* `hfilter` shifts Outcompen through four registers to form five taps. It limits the 19-bit sum
  to the signed 8-bit range after /512, divides by 512 (arithmetic shift, truncating), adds 128
  back and registers the result as Data_outh.
* Frequency response of the compensation and horizontal filters together, at 13.5 MHz sampling:
  the worst phase (s = −½) has its 3 dB point at 6.0 MHz. The middle phases reach +3.9 dB near
  6 MHz, because the compensation boost is then not offset by any interpolation loss. The
  original filter set is only described as staying at or below 0 dB, so that design's
  coefficients presumably trade some of this boost differently.
* The filters' group delays add to 4 samples: 2 from the compensation filter and 2 from the
  horizontal filter. The phase shifts vary this by ±½ sample.

### Picture edges

Every word in the line memory carries the pixel's active-picture flag. Vertically, an outer line
that lies outside the picture is replaced by the centre line (edge replication). A centre sample
outside the picture becomes `BLANK_LEVEL` (16). Horizontally, the filters therefore see the
blanking level beyond the ends of each line. These edge rules are this design's own.

## Line memory and alignment

`line_memory` is two 858-word × 9-bit RAMs in cascade. 858 clocks is one 63.5 µs NTSC line at
13.5 MHz. `sram_ctrl` restarts their address at every `line_start` and advances it every clock,
so each RAM delays by exactly one line period, blanking included.

Each RAM reads the old word and writes the new one in the same clock. Sram2 stores Sram1's
registered output, so its address lags Sram1's by one clock. As a result, the 1H sample arrives
one clock after the current one and the 2H sample two clocks after. `vdelay` delays the current
line by 2 clocks and the 1H line by 1, so the three taps of a column meet. It also delays
`line_start` and `frame_start` by 2 clocks.

Until a RAM has held one complete line since reset (`ok1`/`ok2`), its words are marked inactive.
The RAM contents are never reset.

`time_align` delays the horizontal DTO's decision (pixel enable and Sel_h) by 4 clocks, so that it
reaches the horizontal filter when the sample sits on the centre tap. It delays the line enable
by 6 clocks, so that it reaches the FIFO enable control with Data_outh. `fifo_ctrl` writes only
when both enables are set. A write into a full FIFO is dropped and sets the sticky `overflow`
flag.

## Interface of `downscaler`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | pixel clock; asynchronous active-low reset |
| `pix_in`, `de_in` | in | 8, 1 | one sample per clock and its active-picture flag |
| `line_start` | in | 1 | first clock of every line period, blanking lines included |
| `frame_start` | in | 1 | together with the `line_start` of the frame's first active line |
| `v_ratio`, `h_ratio` | in | 12 | reduction ratios, unsigned 6.6 fixed point |
| `rd_en` | in | 1 | read one word from the FIFO |
| `clr_ovf` | in | 1 | clear `overflow` |
| `dout`, `dout_valid` | out | 8, 1 | FIFO word, one clock after `rd_en` while not empty |
| `empty`, `full`, `count` | out | 1, 1, 11 | FIFO state |
| `overflow` | out | 1 | a valid output pixel was lost on a full FIFO |

Timing rules:

* A line period must not exceed `LINE_DEPTH` (858) clocks.
* Leave at least 4 blanking clocks before and after the active part of each line. This keeps
  neighbouring lines out of the filters.
* Send at least one line period after the last active line of a frame. The last output line is
  centred on the last input line and needs the line after it.
* Latency: an output pixel is written into the FIFO on the 5th clock edge after the last input
  sample it depends on. That sample is 4 columns right of the output's centre, in the line below
  its centre line. Throughout, the design takes one input sample per clock.
* Assertions check that `frame_start` comes with `line_start`, that `de_in` is low on the clock
  of `line_start`, and that the FIFO is never written while full.
* The output pixels come out of the FIFO in raster order, with no line markers. Each output line
  has `⌈(W·64 − 32)/h_ratio⌉` pixels for a width W.

Parameters: `LINE_DEPTH` = 858, `FIFO_DEPTH` = 1024 (a power of two, at least one scaled line).
Widths, phase counts and coefficients are in `scaler_pkg`.

## How far to trust it

What follows the source design:

* the block split into line memory, vertical scaler, horizontal scaler and FIFO
* 3 taps/32 phases vertically and 5 taps/64 phases horizontally
* gain 1/512
* the compensation filter in front of the horizontal filter
* the widths 9 (Outcompen), 6 (Sel_h) and 19 (adder)
* the sequence limit → /512 → register
* writing only valid pixels to the FIFO

This design's own choices:

* all coefficient values
* the 8-bit pixel and the mid-grey offset
* the DTO arithmetic and its ½-sample bias
* the edge rules
* the RAM addressing and the ok flags
* the alignment delays
* the FIFO depth, its read side and overflow handling
* the input timing signals

Verification covers each block against its own reference model and the whole chain bit-exactly,
at the default sizes. Nothing here has been checked at gate level or for timing. One known
difference in behaviour is the passband peak of up to +3.9 dB described under the filters.

Not included: the pad ring and physical layout of the original chip, and the 64-adder
filter form that is only used for comparison.

## Simulation

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
The references in `tb_ref_pkg` compute the coefficients in floating point straight from the
Lagrange formula, independently of the RTL's integer functions. `tb_downscaler` runs the whole
design at its default parameters:

* a 300×300 circular zone plate (0 up to half the sample rate) reduced by 2.546875 to 118×118,
  every pixel compared bit-exactly with a pixel-by-pixel reference model
* a random 40×24 frame at ratios 1.0 × 3.5
* a random frame of 720-sample lines in an 858-clock line period, which fills the line
  memories to their full depth
* a frame nobody reads, so the FIFO fills and overflows

It also checks that each mechanism occurred: dropped lines and pixels, all 32 + 64 phases, edge
replication, the limiter, FIFO full and overflow.

```
verilator --binary --timing -Irtl -Itb rtl/scaler_pkg.sv tb/tb_ref_pkg.sv \
          -y rtl -y tb tb/tb_downscaler.sv --top tb_downscaler
./obj_dir/Vtb_downscaler
```

Replace `downscaler` with any block name to run its testbench. All testbenches finish in well
under a second.
