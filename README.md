# Programmable rank-order filter with a bit-level pipeline

A rank-order filter outputs, for every new input sample, the r-th smallest of
the last m samples. With r = (m+1)/2 it is a median filter, the usual tool for
removing impulse noise from signals and images. With r = 1 it is a running
minimum, with r = m a running maximum, and with m = 1 it passes samples through
unchanged.

This RTL finds the r-th smallest word without sorting and without comparing
words against each other. It works one bit plane at a time, from the most
significant bit down. At each plane a single threshold decision, "are at least
T of these m bits equal to 1?", gives one bit of the result. There is one such
decision per bit, so an 8-bit filter is eight identical stages. Each stage is a
threshold gate plus one mux/XNOR/AND cell per word. Pipelining the stages gives
one filtered sample per clock.

The configuration built by default has 8-bit samples and windows of 1 to 31
words. The window size and the rank can be reprogrammed at run time.

The architecture was designed so that the threshold gate could be built as a
capacitive threshold logic (CTL) cell, an analog charge-sharing circuit that
evaluates a 31-input programmable majority function in one step. This RTL
replaces that cell with a digital equivalent: a population count and a
compare. See "The threshold gate" below.

## The bit-serial selection rule

Let the window hold m words, and let T = m − r + 1. Processing goes from the
MSB down:

1. Count the ones in the current bit plane. The result bit y is 1 if the count
   is at least T, and 0 otherwise.
2. Compare every word's bit with y. Once a word's bit differs from y, that word
   is known to be larger than the result (its bit is 1 where the result has 0)
   or smaller (0 where the result has 1). Its order against the result is fixed
   and no lower bit can change it.
3. From then on, that word takes part in every lower plane as if all its lower
   bits equalled the bit where it deviated. A larger word counts as ones and a
   smaller word counts as zeros. This keeps it on the correct side of every
   later threshold decision.

The result is the r-th smallest word, y being bit by bit the bit of that word.
This works because the number of ones at a plane is at least T exactly when
fewer than r of the still-tied words, plus the words already known to be
smaller, have a 0 there.

Example: the samples 184, 105, 194, 117 and 75, with m = 5 and r = 3 (the
median), so T = 3. An asterisk marks a bit that was carried down rather than
read from the word:

| plane | 184 | 105 | 194 | 117 | 75 | ones | y |
|------:|:---:|:---:|:---:|:---:|:--:|:----:|:-:|
| 7 | 1 | 0 | 1 | 0 | 0 | 2 | 0 |
| 6 | 1* | 1 | 1* | 1 | 1 | 5 | 1 |
| 5 | 1* | 1 | 1* | 1 | 0 | 4 | 1 |
| 4 | 1* | 0 | 1* | 1 | 0* | 3 | 1 |
| 3 | 1* | 0* | 1* | 0 | 0* | 2 | 0 |
| 2 | 1* | 0* | 1* | 1 | 0* | 3 | 1 |
| 1 | 1* | 0* | 1* | 0 | 0* | 2 | 0 |
| 0 | 1* | 0* | 1* | 1 | 0* | 3 | 1 |

The result is 0111 0101 = 117. At plane 7, 184 and 194 deviate upwards. At
plane 5, 75 deviates downwards, and at plane 4, 105 does. 117 never deviates,
because it is the result.

## The modifier/selector cell

Each word j carries two bits of state from one plane to the next:

* `a*` is the word's *modified bit*: the bit it presents to the threshold gate
  at this plane.
* `S` is the word's *select*. S = 1 means the word has agreed with the result
  on every plane so far.

One cell per word and per plane (`rof_modifier_selector`) updates them:

```
S_next  = S AND (a* XNOR y)
a*_next = S_next ? raw bit of the next lower plane : a*
```

While a word matches, it loads its own next bit. On the first mismatch S drops
to 0 for good, and the mux keeps recirculating the deviating bit, so that bit
propagates down through all later planes. The first plane starts with S = 1
for every word and `a*` equal to the raw MSBs. A row of these cells sharing one
`y` is a 1-bit slice (`rof_bit_slice`).

## Pipeline and timing

```
in_word ─► window shift register ─► stage 7 ─► stage 6 ─► … ─► stage 0 ─► out_word
 (31 x 8 bits, newest first)      gate+slice  gate+slice       gate only
                  program control ─► enable mask, threshold (to every gate)
```

* `rof_window_shift_reg` keeps the 31 newest samples, newest in `words[0]`.
  Each sample shifts in on a clock with `in_valid`. A window of m words uses
  `words[0..m-1]`. Its output register is the first pipeline register.
* `rof_pipeline_stage` with parameter `BIT` handles one plane. Its threshold
  gate produces result bit `BIT`. Its slice forms the `a*`/`S` vectors for
  plane `BIT-1`, reading raw bits from the window words that travel with the
  stage. Everything is registered at the stage output. The plane-0 stage has no
  slice.
* **Latency:** `out_valid`/`out_word` appear **9 clocks** after the sample is
  presented with `in_valid`. That is 1 clock in the shift register and 1 in
  each of the 8 stages (in general 1 + WORD_W).
* **Throughput:** one result per clock, for back-to-back samples. Gaps in
  `in_valid` move through the pipeline as gaps in `out_valid`. There is no
  back-pressure.
* The words travel through every stage at full width for simplicity, and
  synthesis removes the bits no later stage reads. The default build
  synthesises to about 1,360 flip-flops.

## Programming window size and rank

`rof_program_control` receives a pair of 5-bit control words, `prog_win_size`
(m) and `prog_rank` (r), together on a clock with `prog_valid`.

* The window word 00000 is invalid. This check is a 5-input NOR, and any other
  5-bit value fits the 31-word window.
* A rank of 0 is invalid, and so is a rank above the window size presented
  with it.
* m = 1, r = 1 is valid, and the filter then passes samples through.
* A valid pair is stored on that clock and `err_flag` clears. The gates then
  get the enable mask `(1 << m) − 1` and the threshold `m − r + 1`.
* An invalid pair sets `err_flag` and leaves the stored settings, and
  therefore the filter, unchanged.
* After reset the filter is a 31-word median (m = 31, r = 16) and `err_flag`
  is clear.

The settings go to all eight stages at once. Up to 8 windows may be in flight
when a new pair is accepted, and they are filtered with a mix of old and new
settings. Wait 1 + WORD_W idle clocks before reprogramming if that matters.
Sending an invalid pair while samples stream is harmless.

## The threshold gate

`rof_majority_gate` computes `y = (popcount(bits & enable) >= threshold)` over
`NIN` = 31 inputs. The architecture intends a capacitive threshold logic cell
here. That is a programmable analog majority circuit with CMOS-compatible
inputs and outputs, about three times faster and a third of the area of a
standard-cell 31-input majority gate.

Its circuit is outside this RTL. The module has the cell's logic function and
no more, so synthesising it gives an adder tree and a comparator instead. The
enable mask is this design's way of programming the window size into the gate.

## Top-level interface (`rof_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_word` | in | 1, WORD_W | sample strobe and sample |
| `prog_valid`, `prog_win_size`, `prog_rank` | in | 1, CTRL_W, CTRL_W | control word pair |
| `out_valid`, `out_word` | out | 1, WORD_W | r-th smallest of the newest m samples |
| `err_flag` | out | 1 | last control pair was rejected |
| `win_size`, `rank` | out | CTRL_W | current settings |

Parameters, all with the defaults of the main configuration: `WORD_W` = 8,
`MAX_WIN` = 31 and `CTRL_W` = 5. Their shared defaults are in `rof_pkg`.
`MAX_WIN` must be at most 2^CTRL_W − 1. When it is smaller, window words above
it are also rejected. When `RESET_WIN` exceeds `MAX_WIN`, reset selects the
median of `MAX_WIN` words.

## Files

| file | contents |
|------|----------|
| `rtl/rof_pkg.sv` | default sizes and reset settings |
| `rtl/rof_modifier_selector.sv` | one-word, one-plane cell (mux, XNOR, AND) |
| `rtl/rof_bit_slice.sv` | row of cells for all window words |
| `rtl/rof_majority_gate.sv` | programmable threshold (majority) gate |
| `rtl/rof_program_control.sv` | control word checking, settings, error flag |
| `rtl/rof_window_shift_reg.sv` | sliding window of the newest samples |
| `rtl/rof_pipeline_stage.sv` | gate + slice + stage registers for one bit plane |
| `rtl/rof_top.sv` | the filter |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rof_top_cascade` |

## Verification

Each testbench checks its module against a reference model written separately
from the RTL. Each one prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* The cell is tested exhaustively. The slice, gate and stage get random
  vectors, with thresholds placed on and next to the count of ones.
* `tb_rof_top` runs the full-size filter with its default parameters. It
  checks every output against a sort of the newest m samples and checks the
  9-clock latency of every output. It covers:
  * the worked example above;
  * medians, minima and maxima over 31 words, and the all-pass window;
  * small value ranges with many equal words;
  * random m and r, with back-to-back samples and with gaps;
  * the three kinds of rejected control words, sent while samples stream.

  It counts each of these events and fails if one never occurred.
* `tb_rof_top_cascade` builds a 12-bit, 5-word filter with 3-bit control words.
  It checks that the stages cascade to other word lengths, that the latency is
  1 + WORD_W, and that too-large windows are rejected.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/rof_pkg.sv tb/tb_rof_top.sv --top-module tb_rof_top
./obj_dir/Vtb_rof_top
```

Each testbench runs in well under a second.

## What this design chose

These points are not fixed by the architecture. Change them as needed:

* **Digital threshold gate.** The analog CTL gate is replaced by a popcount
  and compare.
* **Sliding window.** Samples are kept newest first, and a window of m uses
  the m newest samples.
* **Register placement.** There is one register bank after each stage, plus
  the shift register, which gives the latency of 1 + WORD_W.
* **Control interface.** Both control words arrive together on one strobe.
  The rank is checked against the window word that arrives with it.
  `err_flag` stays set until the next accepted pair.
* **Reset.** Reset gives a 31-word median filter, and the window starts out
  full of zero-valued samples.
* **Reprogramming.** New settings apply at once to the words already in the
  pipeline.
* **Rank check.** A rank r is valid for 1 ≤ r ≤ m, where r counts from the
  smallest word. Any rule that rejects ranks *below* the window size would
  leave only r = m usable. That contradicts the selection rule, so it is not
  followed.
