# Pipelined Viterbi decoder with hybrid register exchange

This is a hard-decision Viterbi decoder for the rate-1/2, constraint-length-3
convolutional code with generators g1 = 111 and g2 = 101 (the "(7,5)" code,
four trellis states). It is aimed at low power. The survivor paths are kept by
**hybrid register exchange** (HREM). Each state's newest K-1 = 2 survivor bits
are always that state's own number, so they are never stored or copied. Only
the older bits move between registers, and survivor registers are clocked only
while they hold a valid block. The decoder is fully pipelined. A 16-bit word
of eight received 2-bit symbols enters every clock, goes through eight
add-compare-select (ACS) steps in a row, and leaves as 8 decoded bits.

A second decoder sits beside it and decodes the same symbol stream. It has one
ACS loop and a **traceback** survivor memory: a dual-port block RAM read back
on a clock of twice the frequency. Both decoders split the stream into the same
blocks of 8 symbols and give identical bits, so each checks the other.

The top also carries two small blocks that are unrelated to the decoder: a 2-to-4
line decoder and the digital back end of a flash ADC.

## The code and the trellis

| item | value |
|---|---|
| state number | `{u(t-1), u(t-2)}`: the newest input bit is the MSB |
| transition | input `u` takes state `s` to `{u, s[1]}` |
| predecessors of state `j` | `{j[0], 0}` and `{j[0], 1}` |
| code symbol | `{u ^ u(t-1) ^ u(t-2), u ^ u(t-2)}` = `{g1 bit, g2 bit}` |
| branch metric | Hamming distance of the received symbol to the code symbol, 0..2 |
| ACS tie | goes to the predecessor whose oldest bit is 1 |
| final choice | state of smallest path metric; on a tie, the lowest state number |
| word layout | first symbol in `data_recv[15:14]`; first decoded bit in `data_dec[7]` |

These conventions are shared in `rtl/vit_pkg.sv`. The generators, state count
and metric widths come from the source design. The numbering, bit order and
tie rules are not stated there. They were fixed so that one received word,
`0101010101011011`, reproduces every value of the design's published
simulation:

* the four survivors are 10110100, 01101110, 11011001 and 01101111;
* the path metrics of states 3 and 4 (counting from 1) are 3;
* the inter-stage metrics are 1,0,1,0 after step 1 and 1,0,1,1 after step 2.

Only one of the two possible ACS tie rules, and only these numbering and
bit-order conventions, fit all of those values. The testbenches check this
word (it decodes to 10110100), so any change to a convention shows up
immediately.

## Hybrid register exchange (`smu_hrem`)

In plain register exchange, state `j` holds an L-bit survivor
`surv(j)`. At every step it copies `{surv(pred)[L-2:0], u}` from the
predecessor it chose. All 4 x L flip-flops may toggle at every step.

The key observation is this. After a step into state `j`, the last two bits
of the path are `u(t-1) = j[0]` and `u(t) = j[1]`. They are fixed by the state
number, whichever path got there. The survivor memory therefore stores only
`stored(j) = surv(j)[L-1:2]` (6 bits for L = 8) and rebuilds the full survivor
as

    surv(j) = {stored(j), j[0], j[1]}

Working the register-exchange update through this split gives

    pred        = {j[0], dec(j)}
    stored'(j)  = {stored(pred)[L-4:0], dec(j)}

Here `dec(j)` is the ACS decision, which is also the oldest bit of the chosen
predecessor. The bit shifted into the stored part is exactly that decision:
the bit that drops out of the part implied by the state. So each state's
register holds the last L-2 decisions along its own survivor path, and no
traceback is needed to read it out.

In `acs_matrix`, the two lowest bits of each `data_out[j]` are constants for
this reason, and synthesis reports them as idle outputs.

## Pipeline (`pipe_viterbi`, `acs_matrix`, `acs_stage`, `vit_controller`)

```
data_recv[15:0] ─┬─ sym 0 ──────────────► stage 0 ─► stage 1 ─► ... ─► stage 7 ─► min-PM select ─► data_dec
                 ├─ sym 1 ─ 1 reg ─────────────────────┘                   │
                 ├─ ...                                                    │
                 └─ sym 7 ─ 7 regs ────────────────────────────────────────┘
```

* **`acs_stage`** is one trellis step: a BMU, four ACS units, the path
  metric registers (`pmu`) and the HREM survivor registers (`smu_hrem`).
  Its outputs are registered, so a step costs one clock.
* **`acs_matrix`** chains eight stages. Symbol k passes through k skew
  registers, so it meets its own block at stage k. Stage 0 starts every
  block at path metric 0 in all four states (every start state equally
  likely) and with empty survivors. Path metrics are 7 bits and never
  normalised. That is enough because a block's metrics cannot exceed 16.
* **`vit_controller`** is a valid shift register. `stage_en[k]` is high
  when stage k holds a valid block, and only then do that stage's survivor
  registers load. This is the design's gated survivor clock (`clk_HRE`),
  written as a clock enable so that everything stays in one clock domain.
  Path metric registers load every clock.
* **`pipe_viterbi`** picks the state of smallest final metric and
  registers its survivor into `data_dec`.

Timing: a word sampled with `in_valid` at clock edge n appears on
`data_dec` with `out_valid` after edge n+8. The throughput is one word per
clock, and `data_dec` holds its value between words.

**Block decoding limits the correction.** Each block of 8 symbols is decoded
on its own: no state carries over from the previous block, and nothing is
known about the next one. The last one or two bits of a block are therefore
protected much less than in a decoder with a long traceback depth. In the
end-to-end test, about one flipped bit in 20 gives these results:

* every error-free block decodes to its message;
* about three quarters of the blocks with errors are corrected;
* the rest are decoded wrongly.

## Serial interface and the top (`s2p`, `viterbi_system`)

`s2p` collects symbols, one per clock with `sym_valid`, into the 16-bit word
with the first symbol at the top, and pulses `word_valid`. Symbols may arrive
back to back or with gaps.

In `viterbi_system`, `rx_sym`/`rx_valid` drive both `s2p` (and through it
the pipelined decoder) and the serial decoder. A block's bits appear:

* on `dec_data`/`dec_valid` 9 clk cycles after the edge that sampled the
  block's last symbol;
* on `tb_data`/`tb_valid` `NSTAGE + 2` = 10 clk2x cycles after that same
  edge.

The convolutional encoder (`conv_encoder`, registered output, one symbol per
input bit) has its own ports. A channel can then be put between `enc_sym`
and `rx_sym`, as the top-level testbench does.

## Traceback decoder (`serial_viterbi`, `path_reconstruction`, `dp_ram`)

`serial_viterbi` is the textbook loop: BMU → four ACS units → path metric
registers, fed back to the ACS for the next symbol. The decisions of every
step go to `path_reconstruction`. The loop restarts the metrics at the first
symbol of every 8-symbol block. At the last symbol it hands over the state of
smallest metric.

`path_reconstruction` writes the four decision bits of each step into one
word of a dual-port RAM (`dp_ram`). The RAM has 2 banks of 8 words: one block
is written while the other is traced. When a block is complete, a toggle
signals the reconstruction side, which runs on `clk2x`. There, a register
holds the current path number (a state). The RAM is read from the last step
backwards, and for each step:

* the path number selects its decision bit from the word read;
* the decoded bit is the path number's MSB;
* the new path number is `{path[0], decision}`.

A traceback takes 9 clk2x cycles, well under the 8 clk cycles before its
bank is written again.

`clk2x` must be twice the frequency of `clk` with coincident rising edges.
No synchroniser is used, so the clocks must be related.

## Side blocks

* **`decoder_2to4`**: `y[i]` is high when `a == i`. The source design builds
  this decoder from 3-transistor NAND gates. That is a transistor-level
  technique, and only the logic function is given here.
* **`flash_adc_encoder`**: latches a 2^N-1 bit thermometer code from a
  comparator bank and counts its ones, as a Wallace-tree decoder does. A
  single "bubble" in the code then moves the result by at most one level.
  N = 3 by default (`ADC_NBITS` in the top), which is this design's choice.
  Output after two clock edges. The resistor ladder and comparators are
  analog and are not modelled; their outputs are the top's `adc_thermo`
  input.

## Where this departs from, or adds to, the source design

* **Hard decisions.** The branch metric is the Hamming distance on 2-bit
  symbols, matching the 2-bit decoder inputs of the source design. It also
  mentions mapping bits to the 3-bit soft values -3/+3; that soft-decision
  variant is not built.
* **Survivor clock.** The survivor clock of the "asynchronous" variant is
  a clock enable. No derived or gated clock is generated.
* **Handshake signals.** `in_valid`/`out_valid` on the decoder, and all
  other handshake signals, are additions. The source design's decoder has
  only `data_recv`, `clk`, `rst` and `data_dec`.
* **Traceback decoder sizing.** Its block framing, bank layout and clock
  handover are this design's choices. They were chosen so that it matches
  the pipelined decoder bit for bit.
* **Reset.** All reset is synchronous and active high (`rst`). It clears
  metrics, survivors and the pipeline valid bits. The RAM is not reset.

## Sizes

From coarse synthesis:

| block | flip-flop bits | memory bits |
|---|---|---|
| pipelined decoder | 413 | 70 (the symbol skew registers) |
| whole top | 531 | 134 |

The pipelined decoder has 28 port bits: the 26 of the original interface
(16 in, 8 out, clk and rst) plus the two valid signals.

## Files and simulation

`rtl/` holds one module (or the package `vit_pkg`) per file. `tb/` holds one
self-checking testbench per module, `tb_<module>.sv`, plus `vit_ref_pkg.sv`.
That package is an untimed reference decoder with full-length survivors, and
the testbenches compare against it. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb_viterbi_system` runs the whole top at its default parameters. It sends
3000 random blocks through encoder, channel and both decoders, checks bits
and latencies, and counts that each mechanism occurred: corrected and
uncorrected blocks, ACS ties, held survivor stages, input gaps and
tracebacks.

To run one testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/vit_pkg.sv tb/vit_ref_pkg.sv tb/tb_viterbi_system.sv \
    --top-module tb_viterbi_system -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another. The simulator resolves modules
from `rtl/` through `-Irtl`.

The parameters `NSTAGE` (block length, at least 4 and a power of two) and
`PM_W` (at least clog2(2·NSTAGE+1)) can be changed at the top. Elaboration
checks both with assertions. The HREM and traceback units are written for
K = 3.
