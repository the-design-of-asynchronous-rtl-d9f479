# A clockless 8-point FFT in 4-phase dual-rail logic

This is an 8-point radix-2 decimation-in-frequency FFT processor with no clock.
Every bit travels on two wires. Every transfer between blocks is a
request/acknowledge handshake, so the circuit runs as fast as its gates allow
and needs no clock tree, clock-skew budget or worst-case timing margin. The
datapath follows a single-path delay feedback (R2SDF) pipeline with three
stages. A FIFO of 4, 2 and 1 words holds each stage's delayed samples. The
twiddle factors are applied by shifts and adds, and there are no multipliers.

Everything is built from one state-holding gate, the Muller C-element. The RTL
describes the gate network itself: C-elements, ORs and wiring. It is
synthesizable. It contains latches and combinational loops on purpose.

## Dual-rail channels

A bit `b` is the wire pair `(b_t, b_f)`:

| `t f` | meaning |
|---|---|
| `0 0` | EMPTY (spacer) |
| `1 0` | valid 1 |
| `0 1` | valid 0 |
| `1 1` | never used |

A channel carries a vector of such pairs plus one `ack` wire going back. The
4-phase protocol is:

1. The sender drives a valid codeword on every bit.
2. The receiver captures it and raises `ack`.
3. The sender returns all rails to EMPTY.
4. The receiver lowers `ack`.

The request is not a separate wire. A receiver knows a word is complete
when every bit pair has one rail high (completion detection). It knows the
spacer has arrived when all rails are low. As a result, wire and gate delays do
not have to be matched anywhere in the datapath.

In the RTL, a W-bit channel is a pair of ports `x_t[W-1:0]` and `x_f[W-1:0]`
plus `x_ack`.

## The component library

| module | what it is |
|---|---|
| `c_element` | Muller C-element with N inputs. The output goes to 1 when all inputs are 1 and to 0 when all are 0; otherwise it holds. `rst` forces 0. |
| `dr_completion` | Completion detector: an OR of each bit's two rails, then one C-element over all bits. Rises when all bits are valid and falls when all are EMPTY. |
| `dr_pipe_stage` | Dual-rail latch stage. Each rail is a C-element of the incoming rail and the inverted `ack` of the next stage. Its own `ack` is the completion of what it holds. |
| `dr_fifo` | A chain of `dr_pipe_stage`s. |
| `dr_and`, `dr_or` | Dual-rail gates built by delay-insensitive minterm synthesis (DIMS): four C-elements detect the four input combinations, and ORs form the two output rails. |
| `dr_full_adder` | DIMS full adder: eight 3-input minterm C-elements. |
| `dr_adder` | Ripple-carry adder, or subtractor with `SUB=1`, built from `dr_full_adder`. |
| `dr_fork` | Copies a channel to two receivers. A C-element joins their acknowledges. |
| `dr_demux` | Steers a channel by a dual-rail select. Each output rail is a C-element of a data rail and a select rail. |
| `dr_merge` | Combines two channels that are never active at the same time. The output is the OR of the rails, and the acknowledge goes back only to the active input. |
| `dr_mux` | Select channel plus two data channels, built as C-element gating followed by `dr_merge`. It is part of the library but the FFT does not use it (see below). |
| `dr_sel2`, `dr_sqrt2_scale` | Helpers for the twiddle unit: a function-level 2:1 selection built from `dr_and`/`dr_or`, and the √2/2 shift-and-add. |

Function blocks such as the adders, gates and twiddle unit have no
acknowledge of their own. Their outputs become valid only after all their
inputs are valid. They return to EMPTY only after all inputs are EMPTY. A
latch or FIFO further down the channel does the acknowledging.

## One SDF stage: fill, butterfly, drain

`dr_sdf_stage` has a delay `D = 2^LOGD`, which is 4, 2 or 1 in the three
stages. It processes groups of `2D` samples in three phases. In the
module's terms, the phases are:

1. **Fill.** The first `D` samples of a group go through the input DEMUX and the
   FIFO-write MERGE into the FIFO.
2. **Butterfly.** Each of the next `D` samples `x[n+D]` meets `x[n]` from the
   FIFO head in `dr_butterfly`:
   - The sum `x[n] + x[n+D]` goes straight to the stage output.
   - The difference `x[n] - x[n+D]` is written back into the FIFO.
3. **Drain.** The `D` differences leave the FIFO head through the twiddle unit to
   the stage output. They do not wait for further input, so a last frame
   flushes by itself. If more input arrives, the next group's fill phase runs at
   the same time.

```
 in ─► DEMUX ──fill──► MERGE ─► FIFO (D+1 words) ─► DEMUX ──drain──► twiddle ─┐
        │                ▲                            │                       │
        └── x[n+D] ──► butterfly ◄──── x[n] ──────────┘                       ▼
                        │   └── x[n]-x[n+D] ──► (FIFO MERGE)   sum ──► MERGE ─► latch ─► out
                        └─────────────────────────────────────────────────┘
```

### Steering by an index tag

Both DEMUXes need to know the phase. A control counter, `dr_index_counter`,
counts input samples at the FFT input. Its value becomes a 3-bit dual-rail
tag carried with the sample through every stage. A stage steers by tag bit
`LOGD`, as follows:

- Input DEMUX: bit 0 sends the sample to fill, and bit 1 sends it to the
  butterfly.
- The butterfly gives the sum the tag of `x[n]` (bit 0) and the difference the
  tag of `x[n+D]` (bit 1).
- FIFO-head DEMUX: bit 0 sends the word to the butterfly, and bit 1 drains it.
- Twiddle exponent: `k = (tag mod D) · 4/D`.

The stage output order is: sums with tags `n`, then differences with tags
`n+D`. This is again in tag order, so the next stage can use the next lower
bit.

The select is part of the token itself, so steering never depends on the
relative timing of a counter and the data. The only timing assumption in the
whole design is the counter at the input. It advances on the falling input
acknowledge and must settle before the sender offers the next sample. The
sender waits for that falling edge before it starts a new sample.

### Why two MERGEs without a select are safe

A MERGE requires that its inputs are never active together. Two pairs could
in principle collide:

- the butterfly difference and a fill sample of the next group (FIFO write);
- the butterfly sum and a drained difference (stage output).

The butterfly's outputs are deliberately **not** latched. `ab_ack`, the
acknowledge of its two operands, is the C-element of the sum's and the
difference's acknowledges. Because of this:

- An operand's handshake finishes only after both results have been taken and
  both result channels have returned to EMPTY.
- The next input sample, and the next word popped from the FIFO, can only
  appear after that handshake finishes.

`dr_merge` asserts this mutual exclusion in simulation.

### FIFO size

A 4-phase dual-rail pipeline holds at most one word in every second stage,
because a spacer separates consecutive words. The butterfly also writes its
difference into the FIFO before it releases the word it read from the FIFO
head. With only `D` word places the FIFO would be full at that moment, and the
stage would deadlock. `dr_fifo` therefore has `2·(DEPTH+1)` stages, which gives
`D+1` word places. Its testbench checks that exactly `D+1` words are accepted.

## Twiddle factors without multipliers

`dr_twiddle` multiplies by `W8^k`. `K = √2/2` is approximated as
`2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8 + 2^-14`, which is 0.70709. Each shifted
term is truncated, and the terms are summed by five dual-rail adders. Shifts
are only wiring.

| k | result |
|---|---|
| 0 | `(re, im)` |
| 1 | `(K(re+im), K(im-re))` |
| 2 | `(im, -re)` |
| 3 | `(K(im-re), -K(re+im))` |

Bit 0 of `k` chooses between `(re, im)` and the scaled pair, giving `(p, q)`.
Bit 1 then chooses between `(p, q)` and `(q, -p)`. Both choices are complete
DIMS logic (`dr_sel2`), so the output's validity still follows all inputs.
Stage 1 uses k = 0..3. Stage 2 uses k = 0 and 2. Stage 3 has no twiddle unit.

## Using `async_fft8`

- **Reset.** Hold `rst` high, with all input rails EMPTY and `out_ack` low.
  Reset clears every C-element to EMPTY and the counter to 0.
- **Input.** Send samples `x[0], x[1], …` as 16-bit two's-complement complex
  values on `in_re_*` and `in_im_*`, using the 4-phase protocol with
  `in_ack`. Frames of 8 may follow each other without a gap.
- **Output.** Results arrive on `out_re_*` and `out_im_*` with a 3-bit tag on
  `out_idx_*`. The result with tag `p` is `X[bitrev3(p)]`, so the order is
  X0, X4, X2, X6, X1, X5, X3, X7. Raise `out_ack` after a word is complete
  (every bit pair valid), and lower it after all rails are EMPTY.
- **No scaling.** Sums and differences wrap at 16 bits, so the sum of eight
  inputs must fit in 16 bits.
- **Accuracy.** The truncated √2/2 terms make results differ from an exact DFT
  by a few LSB. The testbench allows 16.
- **`in_count`.** This output exposes the counter for observation.

## Simulating

Each module is in `rtl/<module>.sv`. The package `rtl/dr_pkg.sv` holds the
shared constants and must be read first. Each testbench is `tb/tb_<module>.sv`.
For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/dr_pkg.sv \
    tb/tb_async_fft8.sv --top-module tb_async_fft8 -o sim
./obj_dir/sim
```

Simulation is at zero delay. Verilator settles the C-element loops within
each time step. The testbenches drive the environment with small `#` delays.
Every testbench ends with `TB_RESULT checks=N failures=M`.

`tb_async_fft8` runs the design at its default parameters. It sends six frames
with random data, starting with an impulse, and uses a receiver that stalls.
It checks each result two ways: bit for bit against a behavioural R2SDF model
with the same truncation, and within 16 LSB of a floating-point DFT. It also
checks the output tags. It counts fill pushes, butterflies and drains per
stage, each twiddle exponent, input and output back-pressure, and
back-to-back frames, and fails if any of these never happened. The other
testbenches test one block each.

## How this relates to the source design

Parts that match the published design:

- Transform size, radix and SDF structure, FIFO lengths, and the 16-bit
  complex data width.
- 4-phase dual-rail encoding with C-element reset to EMPTY.
- The C-element, the dual-rail pipeline, the DIMS gates and full adder, the
  subtractor built from the adder, FORK, MERGE, DEMUX and completion detection.
- The √2/2 shift-and-add constant.

Choices made in this implementation:

- One input counter plus a carried index tag, in place of a counter in
  every stage.
- Unlatched butterfly outputs, and MERGEs used without selects.
- FIFOs with one spare word place.
- The order of operations in the twiddle unit, truncation, and no scaling
  between stages.
- The MUX is built from gating plus a MERGE, and the FFT does not use it.
- A latch at each stage output.

One point where the source text and its figures disagree: one sentence sends
the butterfly sum to the twiddle unit. The data-flow figures and the R2SDF
algorithm apply the twiddle to the fed-back differences. This design does the
latter, and the bit-exact DFT check confirms it.

Not modelled:

- The transistor-level dynamic and static CMOS C-elements. Their logic
  function is `c_element`.
- Area and power.
