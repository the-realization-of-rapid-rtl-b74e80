# Rapid 3x3 median filter for a Y/U/V video stream

A 3x3 median filter removes impulse ("salt and pepper") noise from an image
while keeping edges sharp: each pixel is replaced by the median of itself and
its eight neighbours. Sorting nine values completely costs about 30
comparisons. This design finds the median with 19 comparisons, done as three
rounds of three-input sorts. In hardware the rounds run in parallel, and the
filter takes one pixel per clock.

The RTL filters a 352 x 288 frame of decoded video. Each of the three 8-bit
components (Y, U and V) has its own filter. A frame takes about W x H clocks:
the full-size simulation needs 101 737 clocks from the first pixel in to the
last median out. That is 2.03 ms at 50 MHz.

## The rapid median

Name the window pixels row by row:

    P1 P2 P3
    P4 P5 P6
    P7 P8 P9

1. **Sort each row.** Three sorts run in parallel and give a set of row maxima,
   a set of row medians and a set of row minima (9 comparisons).
2. **Reduce each set.** Take the minimum of the maxima (`Max_min`), the median
   of the medians (`Med_med`) and the maximum of the minima (`Min_max`)
   (7 comparisons are enough).
3. **Final median.** The median of `Max_min`, `Med_med` and `Min_max` is the
   median of all nine (3 comparisons).

Why this works, in short:
- The two larger row maxima are each at least as large as five pixels, so
  neither can be the median.
- In the same way, the two smaller row minima cannot be the median.
- The largest row median is above four other pixels, and the smallest row
  median is below four. So neither can be the median either.

That leaves three candidates, and the median of those three is the answer.
Equal values do no harm: the argument uses only "at least" and "at most".

All three steps use one building block, `sort3`. It orders `a` and `b`, then
places `c` below, above or between them. That is two compare levels, and the
two comparisons of the second level run in parallel.

## Data flow

    in_y ─► median_channel ─► out_y
    in_u ─► median_channel ─► out_u      (median_filter_yuv, top)
    in_v ─► median_channel ─► out_v

    median_channel:  pixels ─► line_cache ─► 3x3 window ─► median engine ─► median
                                 4 x line_ram             median9_pipe (default)
                                                          or median9_fsm

The three channels have identical control and share one handshake, so they
run in lock step. An assertion in the top checks that they stay in step.

## Line cache: four rows in four RAMs

Each channel holds image rows in four 1024 x 8 RAMs, which is enough for rows
of up to 1024 pixels. At any time:

- one RAM receives the incoming row `i+2`;
- the other three hold rows `i-1`, `i` and `i+1`, and are read out to filter
  centre row `i`.

When a row ends, each RAM takes the next role down the chain:
`incoming -> i+1 -> i -> i-1 -> incoming`. The design does not copy any data
to make this happen. A 2-bit slot counter picks which RAM takes the next row,
and each filter pass records which three RAMs hold its rows. Copying three
rows would cost W clocks per row, and the input would have to wait.

**Passes.** A pass for centre row `i` is queued when row `i+1` has been fully
written. At most one pass runs and one waits. The running pass reads one
column from all RAMs on each clock that the window can move. It shifts the
column (rows `i-1`, `i`, `i+1`) into a three-column window. From the third
column on, every new column completes a window. `win[0..8]` is `P1..P9`,
with `P5` the centre pixel. Each window carries two tag bits: end of row and
end of frame.

**Back-pressure.** `in_ready` drops only when the RAM that the next pixel
would go to still holds a row that a running or waiting pass needs. With the
pipelined engine this never happens: a pass takes W clocks, and a row also
arrives in no fewer than W clocks. With the state-machine engine, passes are
8 times slower, so the input is held back.

**Borders.** The first and last row of the frame, and the first and last
column of each row, are never centre pixels, and nothing is output for them.
The output is the (W-2) x (H-2) interior, in raster order.

**Latency.** Row `i` is filtered while row `i+2` arrives. So a median comes
out about two input rows after its centre pixel went in. Frames may follow
each other without a gap. There is no frame-start input: pixels are counted
from reset.

## The two median engines

`median_channel` has the parameter `ENGINE`, which selects between two
engines. Both compute the same three steps.

### `median9_pipe` (default): eight register levels

The pipeline registers the window on input. It then puts a register level
after each of the two compare levels of every `sort3`: two levels per step,
three steps. An output register follows. That makes eight levels, so a
window presented in cycle n gives its median in cycle n+8. A new window can
enter every clock.

### `median9_fsm`: one window per Start handshake

This engine has five states and an asynchronous reset:

| state | what happens | leaves when |
|---|---|---|
| READY | clears the intermediate registers and the flags `done1..3` (`median_o` keeps the last result) | `start` = 1 |
| STEP1 | sorts the three rows into registers, sets `done1` | `done1` is seen one clock later |
| STEP2 | computes `Max_min`, `Med_med` and `Min_max`, sets `done2` | `done2` is seen |
| STEP3 | computes the median into `median_o`, sets `done3` | `done3` is seen |
| WAIT | keeps one start from filtering a window twice | `start` = 0 |

Each step takes two clocks: one to compute and set its flag, and one to see
the flag. `out_valid` pulses on the first WAIT cycle, 7 clocks after the
READY cycle that saw `start`. In the channel, `start` is the window's valid
signal, held low during WAIT. The window moves on during WAIT, so one window
takes 8 clocks. The window must stay stable until the engine leaves STEP1;
the line cache guarantees this.

This engine uses fewer registers, but it cannot keep up with video at one
pixel per clock. It is kept for designs where the pixel rate is much lower
than the clock rate.

## Interface of `median_filter_yuv`

| parameter | default | meaning |
|---|---|---|
| `W` | 352 | pixels per row (3 ≤ W ≤ DEPTH) |
| `H` | 288 | rows per frame (≥ 3) |
| `DEPTH` | 1024 | words per line RAM |
| `ENGINE` | `ENG_PIPE` | `ENG_PIPE` or `ENG_FSM` (type `median_pkg::engine_e`) |

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | a triple is taken when both are high on a rising edge |
| `in_y`, `in_u`, `in_v` | in | 8 | pixel, raster order |
| `out_valid` | out | 1 | filtered triple valid (no back-pressure on the output) |
| `out_y`, `out_u`, `out_v` | out | 8 | medians |
| `out_eol`, `out_eof` | out | 1 | last output of a row / of the frame |

## Departures and choices

These points are this design's own reading or choice:

- **Engine.** The state-machine controller and the eight-level pipeline are
  two descriptions of the same filter. The pipeline is the default, because
  only it reaches a frame time of about 2 ms. The controller can be selected
  with `ENGINE`.
- **Pipeline latency.** The filter is specified as eight register levels. Where
  they sit is this design's choice: one after each compare level, plus an
  input and an output register, for a latency of 8 clocks. A figure of nine
  clocks per median is also quoted for this filter; the state-machine engine
  here needs 8 clocks per window.
- **Row moves.** The RAMs change roles by renaming, not by copying.
- **Window addressing.** The neighbours of pixel `P` are the usual ones:
  `P±1` in the same row, and `P-W±1`, `P-W`, `P+W±1`, `P+W` in the rows above
  and below. Here W is the row length.
- **Chroma size.** U and V are filtered at the full frame size, just like Y.
  Subsampled chroma would need a channel with a smaller `W`.
- **Handshakes.** All handshakes (`in_ready`, `out_valid`, the tags) are this
  design's own. So are the border handling and the RAM port arrangement
  (one write port, one registered read port, read before write).
- **Not included.** The video decoder that produces Y/U/V is outside the
  design. Its output stream enters through the `in_*` ports.

## Files

| file | content |
|---|---|
| `rtl/median_pkg.sv` | pixel and window types, engine and state enums, a counting reference median for the testbenches |
| `rtl/sort3.sv` | three-input sorter, optional register between its compare levels |
| `rtl/median9_pipe.sv` | eight-level pipelined median |
| `rtl/median9_fsm.sv` | state-machine median |
| `rtl/line_ram.sv` | 1024 x 8 line RAM |
| `rtl/line_cache.sv` | four-RAM cache, pass scheduling, 3x3 window |
| `rtl/median_channel.sv` | cache plus engine for one component |
| `rtl/median_filter_yuv.sv` | top: three channels |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two full-frame tests |

## Simulating

Every testbench checks against its own reference and prints
`TB_RESULT checks=N failures=M`. Each one stops itself with a watchdog.
For example:

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/median_pkg.sv \
        tb/tb_median_filter_yuv_full.sv --top-module tb_median_filter_yuv_full
    ./obj_dir/Vtb_median_filter_yuv_full

What the testbenches cover:

- `tb_sort3`: every order of three values, with ties, plus random triples,
  in both forms.
- `tb_median9_pipe`: random, near-flat and impulse-noise windows with gaps
  between them. The latency of exactly 8 clocks is checked.
- `tb_median9_fsm`: the state sequence clock by clock, the 7-clock result
  time, WAIT held while `start` stays high, and READY held while it is low.
- `tb_line_ram`: full fill and read-back, the hold of the read data, read
  during write, and random traffic.
- `tb_line_cache`: 8 x 6 frames with random input gaps and heavy window
  back-pressure. Every window is compared pixel by pixel, and the test makes
  sure that input stalls and waiting passes occur.
- `tb_median_channel`: both engines on noisy frames. The pipelined one must
  run at one pixel per clock; the state-machine one must hold the input back.
- `tb_median_filter_yuv`: both engines end to end on three 16 x 8 frames. It
  counts input gaps, input stalls, waiting passes, held windows, row and
  frame ends, frames that follow directly, and noise pixels removed. It fails
  if any of these never occurs.
- `tb_median_filter_yuv_full`: one noisy 352 x 288 frame at the default
  parameters. All 100 100 output triples are checked, and so is the frame
  time. It runs in under a second.
- `tb_median_filter_yuv_fsm_full`: the same full frame with
  `ENGINE = ENG_FSM`. It checks every output, the input back-pressure and
  8 clocks per window (802 429 clocks for the frame).
