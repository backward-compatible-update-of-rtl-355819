# Firmware clock and data recovery for the WEST timing network

The timing network of the WEST tokamak sends events and a common time base from
one central emitter to every electronics crate over simplex optical fibres. The
line is a 100 Mbit/s serial stream. It carries one byte every 100 ns, coded as
two 4b/5b symbols and then NRZI line coded. When nothing is to be sent, the
emitter fills the line with the JK sync pair. The receivers were built around
TAXI chips, which hold an analog clock and data recovery (CDR) circuit. Those
chips are no longer made.

This design recovers the clock and data in an FPGA without any CDR chip. An
ordinary I/O block samples the line at 1 GHz, ten times the bit rate, with its
input serializers running in DDR mode. Everything after that is plain
synchronous logic at 100 MHz, clocked from a local oscillator that is not locked
to the emitter. That logic:

- finds the bit boundaries in the samples and follows them as they drift;
- picks one sample per bit;
- undoes the NRZI and 4b/5b coding, framing the code words on JK.

The same boundary positions, known to 1 ns, drive an output serializer that
regenerates a divided clock (1 MHz by default) for acquisition hardware.

Beside the receiver, the top level also holds a second FPGA function of the same
network upgrade. It is an eight-input event concentrator that merges event
sources into the master emitter without losing codes that arrive together.

## Receiver chain

```
 serial_in ──► iserdes_1to10 ──► transition_lock ──► nrzi_decoder ──► word_align ──► dec4b5b ──► code / code_valid
  100 Mb/s     1 GHz samples,    0/1/2 line bits      0/1/2 bits       10-bit words    bytes       code_sync / code_error
               10 per cycle      per cycle                                                          code_timestamp
                                  │ boundary phase, boundaries per word
                                  ▼
                          bit_transition_counter ──► oserdes_10to1 ──► recovered_clk (1 Gb/s pattern)
                                  └──► bit_count (recovered time base)

 osc_clk 100 MHz ──► divider_pll ──► clk / clk_bar 500 MHz (serializers), word_clk 100 MHz (all logic)
```

All the logic runs on `word_clk`, which comes from the local oscillator. One
`word_clk` cycle spans ten samples, which is one nominal bit period. The
emitter's bit clock is a little faster or slower than that. So a code word
normally takes 10 cycles, and sometimes 9 or 11.

## Following a drifting bit boundary

This is the core of the design (`transition_lock`), and the part that needs
the most care.

The samples of each word are numbered 0 (earliest) to 9. A transition is where
a sample differs from the one before it. The last sample of the previous word
counts as the one before sample 0. Each cycle the block takes the first
transition in the word and compares it with the tracked boundary phase
`edge_pos`:

- **Acquisition.** The first transition after reset, or after lock is lost,
  sets `edge_pos` directly.
- **Tracking.** Every later transition moves `edge_pos` one sample towards
  itself. The distance is taken modulo 10, in the range −5…+4. This is
  bang-bang tracking: a phase jump on the line is followed back at 1 ns per
  transition, without losing lock.
- **Sampling.** The line is read half a bit after the boundary, at sample
  `sp = (edge_pos + 5) mod 10`, where the eye is widest.

Drift makes `sp` wrap around the word edge now and then. The wrap decides how
many bits leave the block that cycle:

| event | meaning | bits forwarded this cycle |
|---|---|---|
| `sp` unchanged or moves by one, no wrap | normal | 1: sample `sp` |
| `sp` goes 9 → 0 | remote clock slower: the next bit centre falls in the next word | 0 (underflow) |
| `sp` goes 0 → 9 | remote clock faster: two bit centres fall in this word | 2: sample 0, then sample 9 |

Here is why this gives every bit exactly once. Take the slow case. The last
bit was read at sample 9 of word *n−1*. The next bit centre is about 10 ns
later, at sample 0 of word *n+1*. Reading sample 0 of word *n* would read the
same bit a second time, 1 ns after the first reading. The fast case is the
mirror image.

The same wrap rule, applied to `edge_pos` itself, tells how many bit boundaries
fell in the word: 1, 0 or 2 (`bnd_n`). That report feeds the clock generator.

**Lock** rises after 16 transitions in a row land within one sample of
`edge_pos`. It drops, and acquisition restarts, in two cases:

- 8 transitions in a row land more than two samples away;
- 16 words pass with no transition at all. The 4b/5b code never leaves more
  than three bits without one, so this means loss of signal.

No bits are forwarded while unlocked.

The 4b/5b code guarantees a transition at least every three bits. So tracking
at one sample per transition can follow frequency offsets far beyond those of
crystal oscillators. The simulations use ±0.2 % and ±0.5 %.

## Framing and decoding

`nrzi_decoder` turns line bits into data bits: each data bit is the XOR of two
consecutive line bits. It keeps the last line level from one cycle to the next.

`word_align` shifts 0, 1 or 2 bits per cycle into a 10-bit register. After
every bit it compares the register with JK (`11000 10001`, first bit on the
left). The 4b/5b code reserves JK, and JK cannot appear across data symbols. A
match fixes the word boundary, and then a word is delivered every ten bits. A
JK that turns up off the current framing moves the framing at once and pulses
`realign`. This happens after a bit slip on the line.

`dec4b5b` splits each word into two symbols, the first being the high nibble,
and decodes them with the standard 4b/5b table:

- two data symbols give a byte on `code` with `code_valid`;
- JK gives `code_sync`;
- anything else gives `code_error`.

## Recovered clock and time base

`bit_transition_counter` counts the bit boundaries reported by the lock. The
count runs modulo `DIV_BITS`, which is 100 for 1 MHz or 1000 for 100 kHz. The
regenerated clock:

- rises at the boundary where the count returns to 0;
- falls at the boundary where the count reaches `DIV_BITS/2`.

The clock is sent as a 10-sample pattern per cycle to `oserdes_10to1`, so each
edge lands on the 1 ns sample where its boundary was seen. The recovered clock
therefore carries the 1 ns quantisation of the sampler as jitter. In
simulation its period stays within 3 ns of 100 bit periods.

The same block keeps `bit_count`, the number of recovered bits since reset. It
is a time base in the emitter's clock domain. `wts_cdr` stamps every decoded
word with it: `code_timestamp` is valid in the cycle of `code_valid`.

The divider starts at reset, not at a word boundary. Two receivers therefore
produce 1 MHz clocks with different phases, just as the legacy receivers'
dividers do.

## Event concentrator

`miso_concentrator` merges up to eight event sources into the master emitter,
one code per 100 ns byte slot. Each source gives a byte and a strobe,
asynchronous to the emitter's 10 MHz byte clock:

- a two-flop synchronizer detects the strobe's rising edge;
- the edge loads the code into that input's pending register;
- each slot sends the lowest-numbered pending code.

Input 0 carries the periodic pulse generator, the busiest source at up to
2 kHz. Codes arriving together are sent in consecutive slots, so none is lost.
The worst wait is seven slots, 700 ns. Two saturating counters per input
monitor the traffic:

- `collisions`: codes that found another input's code pending;
- `overruns`: codes dropped because the same input's previous code was still
  waiting. The older code is kept.

The strobe must stay high, and the code stable, for three byte-clock cycles. A
code reaches the output 4 to 11 cycles after its strobe.

## Clocks, reset and latency

- `divider_pll` makes `clk`/`clk_bar` (500 MHz, opposite phases) and
  `word_clk` (100 MHz) from `osc_clk`.
- `rst` of the receiver is asynchronous. Internally, reset is held while the
  PLL is unlocked and released through a two-flop synchronizer on `word_clk`.
  That synchronizer powers up in reset.
- All receiver blocks register their outputs. From the first bit of a byte on
  the line to `code_valid` takes about 150 ns: the 100 ns of the byte plus
  about five cycles of pipeline. The spread is one word cycle, from the
  unknown sampling phase.
- The concentrator has its own clock `conc_clk` and synchronous reset
  `conc_rst`.

## Modelled, not built

Three blocks stand for FPGA primitives. They are behavioural models, with
delays and dual-edge processes, so they simulate but do not synthesize. On an
FPGA they are replaced by the vendor primitives:

- `divider_pll`: clock generation.
- `iserdes_1to10`: two cascaded DDR input serializers. It samples on both
  500 MHz clocks and presents the last ten samples on each `word_clk` edge,
  earliest in bit 0.
- `oserdes_10to1`: two cascaded DDR output serializers, bit 0 first, with a
  fixed latency of one to two word periods.

Their latencies, lock times and jitter are not those of real parts.

The receiver's users (the command-interpreting logic of the crate boards) and
the master emitter are outside the design. Their signals are ports of
`wts_top`. The testbenches drive the line with an emitter model
(`tb/wts_emitter_model.sv`). It sends 4b/5b NRZI at an adjustable bit period,
and can drop bits or hold the line on request.

## Choices not fixed by the source material

The block structure, the clock plan and the rates come from the original
design description:

- 1 GHz sampling from two 500 MHz clocks;
- ten samples per 100 MHz word;
- 0, 1 or 2 bits per cycle;
- 10-bit words on JK;
- a recovered 1 MHz or 100 kHz clock at 1 ns resolution;
- eight concentrator inputs.

The following are this implementation's own choices:

- the tracking rule, the mid-bit sampling point and the lock/unlock criteria
  (16 / 8 transitions, 16 silent words);
- the JK and data symbol codes (the standard 4b/5b table), the bit order
  (first bit at the MSB of a word, high nibble first) and the NRZI convention
  (1 = transition);
- immediate re-framing on an unexpected JK;
- the `code_error` flag and the `code_timestamp` register;
- the 50 % duty cycle and free-running phase of the recovered clock;
- the whole inside of the concentrator: strobe interface, one pending register
  per input, fixed priority, counters;
- reset scheme, register stages, counter widths (`TS_W` = 32, `CNT_W` = 16).

Not built:

- a recovered 10 MHz byte clock as such (`DIV_BITS` = 10 would give one);
- full-duplex links with round-trip latency measurement;
- traffic monitoring on the optical splitters;
- the spy-node functions.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `wts_top`, `wts_cdr`, `bit_transition_counter` | `DIV_BITS` | 100 | recovered clock = 100 Mbit/s ÷ `DIV_BITS` |
| `wts_top`, `wts_cdr`, `bit_transition_counter` | `TS_W` | 32 | width of `bit_count` and `code_timestamp` |
| `wts_cdr`, `transition_lock` | `LOCK_EDGES` / `UNLOCK_EDGES` | 16 / 8 | lock qualification |
| `transition_lock` | `LOS_WORDS` | 16 | silent words before loss of signal |
| `wts_cdr` and the datapath | `OVS` | 10 | samples per word (from `wts_pkg`) |
| `wts_top`, `miso_concentrator` | `N_IN` | 8 | event sources |
| `wts_top`, `miso_concentrator` | `CNT_W` | 16 | monitoring counter width |

## Files

- `rtl/wts_pkg.sv`: shared constants (samples per word, JK) and the 4b/5b
  symbol decode function.
- `rtl/wts_top.sv`: top level, receiver and concentrator side by side.
- `rtl/wts_cdr.sv`: the receiver chain.
- `rtl/transition_lock.sv`, `rtl/nrzi_decoder.sv`, `rtl/word_align.sv`,
  `rtl/dec4b5b.sv`, `rtl/bit_transition_counter.sv`: synthesizable receiver
  blocks.
- `rtl/miso_concentrator.sv`: synthesizable concentrator.
- `rtl/divider_pll.sv`, `rtl/iserdes_1to10.sv`, `rtl/oserdes_10to1.sv`:
  behavioural models of the FPGA primitives.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/wts_emitter_model.sv`: the line emitter model.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a
watchdog in case of a hang. The checks compare against values the testbench
works out itself. For example, the testbenches keep their own copy of the
4b/5b table, and the unit test of `transition_lock` builds its oversampled
words from an ideal line model.

- `tb_transition_lock`: a random NRZI line at ±0.5 % offset. The forwarded bit
  stream must equal the line bit for bit. Underflows may occur only with the
  slow clock, overflows only with the fast one. Boundaries counted must equal
  bits forwarded. Lock must come within 64 words.
- `tb_nrzi_decoder`, `tb_dec4b5b`: exhaustive or random comparison against
  the coding rules.
- `tb_word_align`: words delivered as sent, spacing 9, 10 and 11 cycles, and
  one `realign` after a 3-bit slip, with correct words from the next JK on.
- `tb_bit_transition_counter`: every output sample against a closed-form
  reference.
- `tb_miso_concentrator`: random asynchronous traffic; every code delivered
  once, in order, on time. Also a forced eight-way collision and a forced
  overrun.
- `tb_divider_pll`, `tb_iserdes_1to10`, `tb_oserdes_10to1`: the models' rates,
  phases and bit orders.
- `tb_wts_cdr`: emitter model to bytes, at +0.2 % then −0.2 % clock offset.
  Checks ordering, fixed latency, timestamp steps, the recovered 1 MHz period,
  and that underflow, overflow and 9/10/11-cycle word spacing all occur.
- `tb_wts_top`: the whole design at its default parameters. Concentrator
  traffic is fed through the emitter model into the receiver and checked end
  to end, with collisions, an overrun, both clock offsets, a bit slip
  (re-framing and code errors) and a 500 ns line interruption (lock lost and
  re-acquired). It fails if any of these mechanisms never happened. It
  simulates about 130 µs in well under a second.
- `tb_wts_long_run`: 10 ms of traffic shaped like the real network. The line
  carries:
  - JK almost all the time;
  - a monitoring byte every 512 µs;
  - random event bytes tens of microseconds apart;
  - a remote clock 100 ppm slow and then 100 ppm fast.

  One 1 MHz receiver and one 100 kHz receiver listen to the same line. Neither
  may ever unlock, miss a code or report a false one. Each recovered clock is
  compared with an ideal clock divided from the remote bit clock: its rising
  edges stay within 1 ns of that clock, where the limit checked is 5 ns.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_wts_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/wts_pkg.sv tb/tb_wts_top.sv
./obj_dir/Vtb_wts_top
```

Any other testbench runs the same way with its own name. The two-state
simulator starts unreset variables at random values, so every block resets what
it reads. `+verilator+seed+N` changes the random traffic.
