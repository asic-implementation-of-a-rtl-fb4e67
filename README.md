# Huffman compressor for 10-bit detector samples

This is a small lossless compressor for the sample stream of a particle-detector
readout channel. A 10-bit ADC delivers one sample every 100 ns (10 MS/s). Between
collisions the signal sits on a baseline, so neighbouring samples differ by very
little. The compressor sends the *difference* between each sample and the one
before it. It Huffman-codes that difference so that the common small values take
1 to 4 bits, and packs the codes back to back into 10-bit output words. On data
with the usual statistics this gives about four times fewer bits, with no loss.

The RTL follows the architecture of a 130 nm ASIC compressor designed for the
SAMPA readout chip of the ALICE experiment ("version 2" of that design). It has
two clock domains, a dictionary limited to 9-bit codes plus an escape code, and
a five-state packing controller. Where the original leaves details open, this
implementation makes its own choices. They are listed in
[Departures and open points](#departures-and-open-points).

## Signal flow

```
            CLK_10MHz domain                         CLK_50MHz domain
  DATA ──► Reg.1 ──► Reg.2                ┌────────────────────────────────────┐
   10      │          │                   │ toggle   ┌──────────┐  start_FSM   │
           └─(+) ─(-)─┘                   │ sync ──► │ code     │ ──► FSM (5   │
               restador  (11-bit diff)    │ (2 FF)   │ queue 32 │     states)  │
                 │                        │          └────┬─────┘      │ ctrl  │
             codificador (code, len)      │               ▼            ▼       │
                 │                        │   datapath (bit counters, NACUM)   │
           output register + toggle  ───► │   shft_acumular (shift reg, 10-bit │──► SALFIN[9:0]
                                          │                  buffer)           │──► flag
                                          └────────────────────────────────────┘──► overflow
```

* `rest_codif` (sample clock). Reg.1 takes the new sample and Reg.2 the old
  Reg.1. `restador` forms Reg.1 − Reg.2 as an 11-bit two's-complement value.
  `codificador` maps it to a code. The code, its length and a toggle bit are
  registered and then held for a full sample period.
* `top_compresor` (packing clock). It synchronises the toggle, pushes each new
  code into a queue, and packs codes with `compressor_fsm` driving
  `big_datapath`. `big_datapath` is `datapath` plus `shft_acumular`.

## The code

Differences in −15..+15 (about 99 % of real detector data) get a prefix code of
at most 9 bits. Any other difference is sent as the 6-bit header `111000`
followed by the 11-bit two's-complement difference, which makes 17 bits.

| difference | code | bits | | difference | code | bits |
|---|---|---|---|---|---|---|
| 0 | `0` | 1 | | | | |
| +1 | `100` | 3 | | −1 | `101` | 3 |
| +2 | `1100` | 4 | | −2 | `1101` | 4 |
| +3 | `111010` | 6 | | −3 | `111011` | 6 |
| +4 | `1110010` | 7 | | −4 | `1110011` | 7 |
| +5 | `1111000` | 7 | | −5 | `1111001` | 7 |
| +6 | `11110100` | 8 | | −6 | `11110101` | 8 |
| +7 | `11110110` | 8 | | −7 | `11110111` | 8 |
| +8..+15 | `111110` + (v−8) in 3 bits | 9 | | −8..−15 | `111111` + (\|v\|−8) in 3 bits | 9 |
| other | `111000` + 11-bit difference | 17 | | | | |

The codes for 0, ±1, ±2 and the escape header come from the original design.
Its codes for ±3..±15 were not available. The ones above fill the remaining
code space: the tree is complete, codes get longer as the magnitude grows, and
the longest dictionary code is 9 bits, as in the original. A different table for
these rare values changes only `codificador.sv` and the reference model in
`tb/tb_huff_ref.sv`.

After reset both sample registers hold 0. The first code is therefore the first
sample minus zero, normally an escape carrying the absolute value. A decoder
that also starts from 0 rebuilds every sample exactly: it adds each decoded
difference to a running total.

## Packing: the five-state controller

This is the part that needs the most care. The packer holds two counts:

* `bitsAcubuff`, the number of bits already in the 10-bit output buffer (0..10);
* `bitsAcucode`, the number of bits of the current code not yet placed (0..17).

The code sits left-aligned in a 17-bit shift register. Each pass moves
`NACUM = min(bitsAcucode, 10 − bitsAcubuff)` bits from the top of the shift
register into the buffer, just below the bits already there. `comp` is
`bitsAcucode > 10 − bitsAcubuff`, meaning the code does not fit. It selects
between "buffer becomes full, subtract NACUM from the rest" and "add the whole
code, nothing left".

| state | action | next |
|---|---|---|
| STANDBY | if a code is queued (`start_FSM`): load it, pop the queue | ACUMULATE, else stay |
| ACUMULATE | compute `comp` and `NACUM`, latch them | ACTUALIZE |
| ACTUALIZE | move NACUM bits, update both counts | DETERMINE |
| DETERMINE | test `bitsAcubuff == 10` | OUTPUT CHARGE if full, else STANDBY |
| OUTPUT CHARGE | copy the buffer to SALFIN, clear it, pulse `flag` | ACUMULATE if `bitsAcucode != 0`, else STANDBY |

The states and transitions are those of the original controller. The split of
work between ACUMULATE and ACTUALIZE is this implementation's reading of it.

**Cycle cost per code:**

* 4 cycles if the buffer does not fill;
* 5 cycles if it fills exactly;
* 4 more cycles for each further word the code spills into.

A 17-bit escape code can cover parts of three words and then takes up to 12
cycles.

Example: the buffer holds 7 bits and the code is `1100` (+2).
ACUMULATE gives `comp = 1` and NACUM = 3. ACTUALIZE moves `110`, the buffer is
full, and 1 bit is left. DETERMINE goes to OUTPUT CHARGE, which sends the word.
One bit is left, so the FSM returns to ACUMULATE. This time NACUM = 1 and the
`0` becomes the first bit of the next word. DETERMINE then finds 1 bit in the
buffer and goes to STANDBY.

## Two clocks, the code queue, and the throughput limit

A new code arrives every 100 ns, which is 5 cycles of the 50 MHz packing clock.
An average code needs a little over 4 cycles. At a compression ratio near 4
(about 2.6 bits per sample, one word every ~4 samples) the packer averages
about 4.5-4.8 cycles per sample. That is fast enough, but not by much.

Codes that spill over a word boundary, and above all runs of 17-bit escape
codes, need more than 5 cycles. A steep detector pulse produces exactly such a
run. The queue between the two domains absorbs these bursts. It holds
`FIFO_DEPTH` = 32 codes. On packet-shaped test data the queue peaked at about 20
codes with pulses up to 400 ADC counts and at 26 with pulses up to 900 counts.
A sustained stream of escape codes, such as a square wave at full scale, would
still overflow any finite queue. In that case the code is dropped and the sticky
`overflow` output is set until reset.

The clocks need no phase relation. The sample side flips `toggle` once per
code. The packing side passes it through two flip-flops, and when the
synchronised value changes it captures code and length. Those have then been
stable for at least two packing cycles and stay stable until the next sample
edge. This works whenever the packing clock is at least about four times the
sample clock.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `CLK_10MHz` | in | 1 | sample clock |
| `CLK_50MHz` | in | 1 | packing clock |
| `reset` | in | 1 | asynchronous, active high, both domains |
| `DATA` | in | 10 | unsigned sample, taken on each `CLK_10MHz` rising edge |
| `SALFIN` | out | 10 | last complete output word; first code bit in `SALFIN[9]` |
| `flag` | out | 1 | high for the one `CLK_50MHz` cycle in which `SALFIN` shows a new word |
| `overflow` | out | 1 | sticky: a code was lost because the queue was full |

**Latency:**

* One sample clock to Reg.1, and one more to the registered code.
* 2-3 packing cycles of synchronisation.
* 4-5 packing cycles of packing.

A word leaves only once it is full; there is no flush. A receiver therefore sees
the last few samples of a burst only when later samples push them out. Holding
`DATA` constant for eleven sample periods ends with ten 1-bit zero codes, which
is enough to push out a partly filled word.

## Files

`rtl/`:

| file | contents |
|---|---|
| `huffman_pkg.sv` | widths, escape header, the control-bundle struct `dp_ctrl_t`, the state enum |
| `huffman_compressor.sv` | top level |
| `rest_codif.sv` | sample registers, subtractor, encoder, output register |
| `restador.sv` | subtractor |
| `codificador.sv` | dictionary |
| `top_compresor.sv` | synchroniser, queue, FSM, datapath |
| `code_fifo.sv` | code queue (first-word-fall-through) |
| `compressor_fsm.sv` | five-state controller |
| `big_datapath.sv` | `datapath` + `shft_acumular` |
| `datapath.sv` | bit counters, `comp`, `NACUM` |
| `shft_acumular.sv` | shift register, 10-bit buffer, SALFIN register |

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`, plus:

* `tb_huff_ref.sv`: the reference code table, encoder and bit-serial decoder,
  written independently of the RTL.
* `tb_workload_packets.sv`: data sets shaped like the original evaluation data
  (see below).

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, from the top directory:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_huffman_compressor \
    -y rtl -y tb +libext+.sv rtl/huffman_pkg.sv tb/tb_huff_ref.sv tb/tb_huffman_compressor.sv
./obj_dir/Vtb_huffman_compressor
```

Use the same command for any other testbench; the package files come first.

What the tests cover:

* **`tb_huffman_compressor`** runs the top at its default parameters with
  20 000 samples. Their differences follow the original statistics: 41 % zero,
  44 % ±1, a thin tail and 0.5 % escapes. The test decodes `SALFIN` and rebuilds
  every sample. It requires at least one of each of: an escape code, a code split
  over two words, a 17-bit code split over three words, and a queue backlog. It
  then forces an overflow with full-scale jumps. The compression ratio it reached
  was 3.79.
* **`tb_workload_packets`** sends two data sets back to back:
  * 1099 packets of 1000 samples (collisions at 10 kHz);
  * 5495 packets of 200 samples (collisions at 50 kHz).

  Each packet has its own baseline, noise and shaped pulses. That is 2.2 million
  samples in about 20 s of simulation. Every sample is rebuilt exactly, with
  ratios of 4.25 and 4.04 and no overflow.
* **`tb_compressor_fsm`** checks every transition, the control lines of each
  state and the 4- and 5-cycle costs.
* **`tb_codificador`** checks all 2047 possible differences.

## Departures and open points

Taken from the original design:

* the two-clock structure (10 and 50 MHz) and the top-level ports `DATA`,
  `SALFIN`, `flag`, `reset`;
* Reg.1/Reg.2 differential encoding;
* the codes for 0, ±1, ±2 and the 6-bit escape header with 11 raw bits;
* the 9-bit limit on dictionary codes and the 10-bit output buffer;
* the five states and their transitions;
* the datapath elements: `10 −` subtractor, `>` comparator, adder, `NACUM`
  subtractor, and the multiplexers choosing 10 / sum and difference / 0.

This implementation's own choices:

* **Codes for ±3..±15.** They are not the original's. The original reported a
  ratio of 3.89 on recorded data. This table reaches 3.8-4.3 on the synthetic
  data here, but cannot be compared on the recorded data.
* **Clock crossing.** The toggle synchroniser is this design's own; the
  original does not say how the domains exchange data.
* **Code queue and `overflow`.** Both are additions. The queue is about 700
  storage bits, more than the rest of the design, and is the first thing to
  resize if area matters. Its depth is a parameter.
* **Meaning of `flag`, MSB-first bit order, asynchronous active-high reset.**
  None of these is specified in the original.
* **Per-state actions of the FSM.** These are inferred. The original gives only
  the states and their transition conditions.
* **Escape payload.** It is the 11-bit *difference*, not the absolute sample.

Not included:

* The earlier single-clock version, with a frequency divider, a 100 MHz
  processing clock and a ten-state packer. The version built here replaces it.
* The analog front end and DSP that deliver `DATA`.
* Area, power and maximum frequency. The original's 130 nm figures are
  standard-cell results that RTL alone cannot reproduce: about 5000 µm², 0.33 mW
  and 450 cells without the queue.
