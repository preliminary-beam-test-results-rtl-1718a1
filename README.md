# Bunch-by-bunch longitudinal feedback for a 200-bunch storage ring

This is synthesizable SystemVerilog for the digital signal path of a
longitudinal damper for a ring with 200 bunches spaced at 2 ns (500 MHz bunch
frequency, 2.5 MHz revolution frequency), modelled on the feedback system of
the Taiwan Light Source. Every bunch's phase error is digitised once per bunch
passage. One turn in twenty is filtered, bunch by bunch. The resulting kick is
then played back to a kicker modulator for the next twenty turns. On the side,
raw phase-error histories of all bunches are logged into memories that a host
can read without stopping the loop.

The main idea comes from the original system. A 500 MS/s stream is too fast
for one processor, so it is spread over eight parallel lanes. Each lane
carries 25 bunches and goes to its own processor over a slow, byte-wide,
handshaked link. On the way back, eight lanes are merged into one stream.
Down-sampling by 20 brings the work per processor to 25 samples every 8 µs.

```
            adc_a (even bunches) ──┐                        ┌──────────────┐
 fast ADC                          ├─ adc_demux_unit ──8 links─▶ dsp_channel ×8 ─8 links─▶ dac_mux_unit ─▶ dac_data ─▶ DAC / modulator
            adc_b (odd bunches)  ──┘   demux 1:4 ×2, FIFOs ×8  │ FIR + record │            reorder, 20-turn replay
                                                                └──────┬───────┘
                                                          host read port (rd_chan, rd_addr, rd_data)
```

## Top-level interface (`tls_ldamper`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bunch clock (500 MHz in the ring); active-low asynchronous reset |
| `rev_marker` | in | 1 | high in the clock of bunch 0 of every turn |
| `adc_a`, `adc_b` | in | 8 | ADC outputs: even bunches on A, odd bunches on B, offset binary |
| `coef` | in | 4 × 16 | FIR coefficients, signed Q2.14, shared by all lanes |
| `fb_enable` | in | 1 | low holds the DAC at mid-scale |
| `kick_offset` | in | 8 | kick delay in whole bunch clocks |
| `rec_arm`, `rec_len` | in | 1, 14 | start a record of `rec_len` samples per bunch in all eight memories |
| `rec_busy`, `rec_done` | out | 8 | per processor: record armed or running; record complete |
| `rd_chan`, `rd_addr`, `rd_data` | in, in, out | 3, 18, 8 | host read of the record memories, data one clock later |
| `dac_data` | out | 8 | DAC code, offset binary, one per bunch clock |
| `new_set` | out | 1 | one-clock pulse: a new kick set has just been switched in |
| `sample_turn` | out | 1 | the current turn is a sampled one |
| `overflow` | out | 1 | sticky: a lane FIFO lost a sample (does not happen at the design rates) |

## Bunches, lanes and slots

Everything rests on one fixed numbering, so it is worth getting straight first.

* **Bunch** `b` = 0 … 199 counts bunch clocks from the revolution marker.
  `rev_marker` is high in the clock of bunch 0.
* The ADC has two outputs, 180° apart, each running at 250 MS/s. Bunch `b`
  is on `adc_a` if `b` is even and on `adc_b` if `b` is odd. Each output holds
  its value for two clocks.
* Each output is split 1:4 (`demux_1to4`). Output A gives bunches 8m, 8m+2,
  8m+4 and 8m+6; output B gives 8m+1, 8m+3, 8m+5 and 8m+7. Together that is
  **lane** `j = b mod 8`.
* Within a lane, bunch `b` sits in **slot** `m = b / 8` = 0 … 24. The slot
  indexes the filter history and the record memory of that lane's processor.

Every word on a link carries its bunch number (`link_word_t` in
`ldamper_pkg`: bits 15:8 bunch, bits 7:0 sample or kick, bits 31:16 zero).
Nothing downstream therefore depends on the arrival order. The DAC/MUX unit
puts each kick in place by its tag.

## One 20-turn cycle

| turn in cycle | what happens |
|---|---|
| 0 (sampled turn, `sample_turn` high) | after every group of 8 bunches, the 8 demultiplexed samples are written into the 8 lane FIFOs: 25 writes per lane over the turn |
| 0 … ~6 | each lane drains its FIFO over its link; the processor filters each sample as it arrives (1 clock) and sends the kick on; the DAC/MUX unit collects the 200 kicks in the back half of its double buffer |
| first marker after the 200th kick (measured: within 7 turns of the sampled turn's start, about 2.8 µs) | the buffer halves swap and `new_set` pulses |
| every turn | the front half is played out, one code per bunch clock; the kick of bunch `b` appears in the clock after bunch `b + kick_offset` |

With a new set every 20 turns, each set is replayed for 20 turns. If a set
came late, the old one would simply keep playing. Samples from the 19 other
turns are never stored.

`kick_offset` (0 … 199, larger values count as 0) shifts the whole kick
pattern by whole bunch clocks against the marker. This is the timing
adjustment that lines each kick up with its own bunch at the kicker: the
cable and modulator delays are not known to the logic. Finer, sub-bunch
phase adjustment is outside this RTL.

The turn counter starts at the first revolution marker after reset; that turn
is a sampled one. Until the first set arrives, and whenever `fb_enable` is
low, the DAC gets mid-scale (`8'h80`, zero kick).

## The comm-port links

Sixteen links run at the rate of the boards they connect: eight from the
ADC/DEMUX unit to the processors, eight from the processors to the DAC/MUX
unit. They follow the byte-wide 'C4x communication-port handshake.
A 32-bit word goes as four bytes, least significant first. Each byte is a
four-phase exchange on two active-low wires:

1. the sender puts the byte on `cd` and, one clock later, pulls `cstrb_n` low;
2. the receiver takes the byte and pulls `crdy_n` low;
3. the sender releases `cstrb_n`;
4. the receiver releases `crdy_n`.

Both ends synchronise the incoming wire with two flip-flops. A byte therefore
takes at least 7 clocks and a word at least 28; the testbenches measure about
43. A receiver holding a finished word nobody has taken (`c4x_rx`, `ready` low)
does not answer the next strobe, so back-pressure travels up the link and
nothing is dropped. The token exchange that lets a real 'C4x port change
direction is not implemented: every link here carries data one way only.

Throughput budget: a lane needs 25 words per 4000 clocks (8 µs). One link
carries about 90 at the measured 43 clocks per word (over 140 at the 28-clock minimum).

## Filter

`bunch_fir` keeps, for each of its 25 bunches, the last three samples and computes

    y = c0·x[n] + c1·x[n-1] + c2·x[n-2] + c3·x[n-3],   x = sample − 128

with `coef` signed Q2.14 (16384 = 1.0). The sum is shifted right by 14
(rounding toward minus infinity) and saturated to −128 … 127. It leaves as an
offset-binary DAC code. All eight processors share the `coef` input. Useful settings:

| `coef` | effect |
|---|---|
| `{16384, 0, 0, 0}` | copy-through: the DAC reproduces the ADC input (electronics check) |
| `{-16384, 0, 0, 0}` | kick = −phase error, the sign inversion that damped the beam in the original system's first tests |
| any 4-tap set | a band-pass or phase-shifting filter per bunch; no coefficient values are given for the original |

Change `coef` only between sampled turns, for instance in turn 15 of the
cycle. Otherwise one set mixes the old and the new coefficients. Histories
are cleared by reset only.

## Observation records

Each processor has a 256 kB record memory (`record_mem`), written from the
same samples the filter sees. Sample `i` of slot `s` is at byte
`s·10000 + i`, so each bunch has room for 10,000 samples, which is 80 ms at
one sample per 8 µs. A `rec_arm` pulse sets the length from `rec_len`
(clamped to 1 … 10000). Writing starts with the next slot-0 sample, so all
bunches begin at the same sampled turn, and stops after `rec_len` samples
per bunch. Then `rec_done` goes high, one bit per processor. The feedback
keeps running all the time. To read bunch `b`, sample `i`, set `rd_chan = b mod 8`
and `rd_addr = (b/8)·10000 + i`; `rd_data` follows one clock later.

## Files

| file | role |
|---|---|
| `rtl/ldamper_pkg.sv` | sizes (200 bunches, 8 lanes, 25 slots, down-sampling 20, 4 taps, 256 kB, 10,000 per bunch), word type, coefficient type |
| `rtl/tls_ldamper.sv` | top: ADC/DEMUX unit, 8 processor channels, DAC/MUX unit, host read multiplexer |
| `rtl/adc_demux_unit.sv` | bunch and turn counting, down-sampling, two 1:4 demultiplexers, 8 FIFOs, 8 link senders |
| `rtl/demux_1to4.sv` | 1:4 word demultiplexer with frame sync |
| `rtl/sample_fifo.sv` | lane FIFO (32 words, show-ahead, sticky overflow) |
| `rtl/c4x_tx.sv`, `rtl/c4x_rx.sv` | the two ends of a comm-port link |
| `rtl/dsp_channel.sv` | one processor's work: link in, record, FIR, link out |
| `rtl/bunch_fir.sv` | per-bunch 4-tap FIR with saturation |
| `rtl/record_mem.sv` | 256 kB dual-port record memory with arm/done control |
| `rtl/dac_mux_unit.sv` | 8 link receivers, tag-addressed double buffer, 20-turn replay, DAC output |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_tls_ldamper` runs the whole design at full size; `tb_record_workload` takes 1024- and 10,000-sample records |
| `tb/c4x_link_src.sv`, `tb/c4x_link_sink.sv` | behavioural link ends, written independently of the RTL ones |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. The
testbenches use 2-state simulation and initialise everything they read. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb --top-module tb_tls_ldamper \
  rtl/ldamper_pkg.sv tb/tb_tls_ldamper.sv -o sim
./obj_dir/sim
```

`tb_tls_ldamper` runs 155 turns at the default sizes in well under a second.
It checks every DAC code of every turn against an independent reference
filter, and it reads back the records of all 200 bunches. It also counts the
mechanisms it has exercised: sampled and skipped turns, set switches, 20-turn
replays, copy-through, sign inversion, the full FIR, saturation, the kick
offset, feedback off and record completion. `tb_record_workload` simulates 80 ms of beam (44
million clocks), which takes a few minutes.

Assertions in the RTL check three rules: a byte stays stable while its strobe
is low, a received word stays on offer until it is taken, and the DAC buffer
halves swap only at a revolution marker.

## Departures from the original system, and what to trust

* **The processors are logic here.** In the original, two commercial VME
  boards with four fixed-point DSPs each run the filter in software, and a
  vendor adapter with a 2k × 32 bidirectional FIFO connects each DSP to its
  comm ports. `dsp_channel` does the same arithmetic in logic, and the links
  connect to it directly. The host's VME global-bus access becomes a plain
  read port.
* **One clock.** The original runs ECL demultiplexers at 250 MHz and a CPLD
  controller with TTL FIFOs at lower rates. Here everything runs on the
  bunch clock, with strobes for the slower rates. A hardware build would put
  the FIFOs, the controllers and the links in a slower clock domain.
* **Choices of this design, not of the original:** the assignment of even and
  odd bunches to the two ADC outputs; the bunch tag in every link word; the
  FIFO depth; the offset-binary codes with `8'h80` as zero; the coefficient
  format, rounding and saturation; the arm/done record control and address
  layout; the swap rule of the DAC double buffer; the `fb_enable` gate; the kick
  offset in whole bunches; and
  the active-low asynchronous reset. The byte order and handshake of the links
  are the usual 'C4x port scheme, not details taken from the original boards.
* **Numbers that do follow the original:** 200 bunches, 8 lanes of 25, two
  ADC outputs each split by four, down-sampling 20, 8-bit samples, 20-turn
  replay, 4 filter taps, 256 kB of record memory per processor and 10,000
  samples per bunch.
* **Not modelled:** the ADC, the DAC, the ECL/TTL level translators, the
  modulator and kicker, and the beam. The testbenches check the logic against
  reference models; they do not show that any coefficient set damps a beam.
