# Vernier coarse-fine TDC with a single time-amplifier chain

This converter measures the time from a START edge to a STOP edge, between
0 and 320 ps, as a 10-bit code. The nominal step is 10 ps / 32 = 0.3125 ps.
It works in two steps:

* **Coarse step.** A vernier delay line with a 10 ps step finds the stage
  where STOP overtakes START. That stage gives the 5 upper bits. The time
  still left over at that stage, the *residue*, is below 10 ps.
* **Fine step.** The residue is amplified about 40 times and measured again
  by a second vernier line. That gives the 5 lower bits.

Most coarse-fine TDCs put one time amplifier on every coarse stage. Here a
multiplexer picks out the one tap pair that holds the residue, so a single
amplifier chain is needed. The gain of a time amplifier is never exactly
right, so the design measures the gain at every conversion:

* A second multiplexer takes the *next* stage, where STOP is ahead by
  10 ps minus the residue.
* A second, identical amplifier chain and fine converter measure that interval.
* The two fine results add up to "one coarse step, amplified". A digital
  compensator divides the residue's code by this sum.

The design also has a calibrated offset register.

The repository holds synthesizable RTL for all digital parts, and
behavioural (event-timed) models for the analog parts: delay lines, delay
buffers and time amplifiers. With these models the whole converter can be
simulated end to end.

## Signal path

```
START, STOP
   |
   v
coarse_tdc: 31-stage vernier line (START slow, STOP fast, 10 ps per stage)
            31 arbiter flops -> thermometer CQ[30:0]
            32 tap pairs START[0..31] / STOP[0..31]
   |
   v
signal_selector
   delay_stage (1 ns on every tap)
   sel_generator (CQ -> Sel = n)
   MUX A: (START[n],   STOP[n])     interval r          (residue)
   MUX B: (STOP[n+1],  START[n+1])  interval 10 ps - r  (complement)
   |                                   |
   v                                   v
two_stage_ta (Type-I x20, Type-II x2)  two_stage_ta
   |                                   |
   v                                   v
fine_tdc 1 (94 + 32 flops)             fine_tdc 2
   |                                   |
   +--------------+--------------------+
                  v
tdc_readout: capture -> encoders -> compensator -> code = n*32 + fine
```

`vernier_tdc_top` connects all of the above. `tdc_readout` is the
synthesizable digital back end on its own.

## Coarse conversion and the stage index

START runs through buffers of 60 ps and STOP through buffers of 50 ps. Only
the 10 ps difference matters. Each stage therefore removes 10 ps of START's
lead.

* Flop k is clocked by STOP[k] and samples START[k], so it holds 1 while
  START is still ahead at stage k.
* For an interval T between 10n and 10(n+1) ps, CQ[0..n] are 1 and the
  rest are 0.
* `sel_generator` counts the ones and returns n = ones - 1. A bubble in the
  code shifts n by at most one.
* If there are no ones (T <= 0), n = 0. The negative fine lines then see a
  negative residue, and the result clips to 0.

The line has 31 flops and a 32nd tap (the line output). That tap lets MUX B
reach stage n+1 when CQ is all ones. Intervals from 0 to 310 ps get their
own codes. From 310 to 320 ps the code stays at the top value, 991.

## Why the delay stage exists

Sel is computed from the coarse flops, so it only becomes valid after STOP
has passed stage n. The selected taps START[n] and STOP[n] toggle before
that. Also, while the flops fill up, Sel counts up from 0, and it passes
stages whose taps have already risen.

Every tap is therefore delayed by 1 ns before the multiplexers. That is
longer than the largest interval plus one stage. So no tap that a
multiplexer has selected rises before Sel has moved past it, and no false
edge reaches an amplifier. `tb_signal_selector` checks that MUX A's output
rises exactly once, at START + 60n + 1000 ps.

## Time amplifier

`two_stage_ta` chains two `vernier_ta` models:

* **Type-I:** gain 20, ±20 ps input range.
* **Type-II:** gain 2, ±400 ps input range.

The total gain is about 40. A model waits for both input edges. It raises
the output of the earlier input 100 ps after the later input, and the other
output gain × interval after that. The interval is clipped to the input
range first. An optional `OFFSET_PS` is added to the input interval; it
stands for the amplifier's offset. If one input rises and falls again before the
other has risen, the model drops that edge and waits for a new pair. That
way it recovers from the random start-up levels of the delay lines.

The models are linear. A real amplifier's gain drifts with the input
interval, with process and with supply. Absorbing that drift is the
compensator's job. The testbenches exercise it by running gains of 30, 36,
40 and 44.

## Fine conversion

Each `fine_tdc` has two vernier lines with the same 10 ps step:

* **Positive line:** 94 flops. START is slow, and the first flop sits after
  one stage. FQP holds floor(T/10 ps) ones, up to 94.
* **Negative line:** 32 flops. STOP is slow, and the first flop sits at the
  inputs. FQN holds ceil(-T/10 ps) ones when T < 0.

`fine_encoder` counts both lines (7 and 5 bits) and subtracts. The result is
FOUT = floor(T / 10 ps), a 7-bit signed value saturated to -64..63. With a
gain of 40 and a 10 ps step, one FOUT code is 0.25 ps at the input.
FOUT1 + FOUT2 is close to 40.

## The compensator (gain and offset correction)

`compensator` receives FOUT1 (the amplified residue) and FOUT2 (the amplified
complement). It computes:

```
FSUM  = FOUT1 + FOUT2                         8-bit signed
DOUT  = floor(4096 / FSUM)                    7-bit, 4096 = 32 * 2^7
PROD  = FOUT1 * DOUT                          14-bit signed
RND   = (PROD >>> 7) + PROD[6]                round half up
FINE  = clip(RND - OFFSET, 0, 31)             5-bit result
```

FSUM is the measured number of fine codes per coarse step. So
FOUT1 × 32 / FSUM is the residue in units of 1/32 of a coarse step,
whatever the amplifier gain is.

**The divider.** The division is a non-restoring array of controlled
add/subtract (CAS) cells (`cas_divider`, `cas_cell`):

* Each cell XORs the divisor bit with the row control and adds the result
  to the remainder bit.
* The first row always subtracts.
* Every later row subtracts if the previous remainder was non-negative, and
  adds otherwise.
* Each quotient bit is the inverted sign of its row.

The quotient is correct only while the upper dividend part (32) is below
the divisor. So for FSUM <= 32 (gain below the nominal 32) DOUT is clamped
to 127 and `sat_o` is set. The result then simply reads FOUT1, with no
correction.

**Offset.** With the same edge on START and STOP and `cal_i` high during the
sample pulse, FOUT1 is loaded into an 8-bit register. Later results
subtract it, saturated to -16..15. The register is cleared by reset.

**Published correction table.** Twelve published (FTDC1, FTDC2) pairs were
replayed through this arithmetic. All twelve outputs are within one code
of the published outputs. In seven rows the published value is one lower
than this rounding gives. The published values follow neither rounding nor
truncation in every row, so rounding was kept: it is closer to the ideal
code.

**Known limit.** An offset in the amplifier chain also changes FSUM: the
residue chain's offset enters FOUT1 and so FSUM. The offset register does
not correct that part. `tb_vernier_tdc_top` shows it: with a -0.45 ps offset
and gain 44, the mean error is still about +1 code after calibration.

## Read-out and timing

`tdc_readout` is clocked. A conversion runs like this:

1. With START and STOP low, pulse `clr_i` to empty all flops.
2. Raise START, then STOP after the interval.
3. Wait until the edges have passed all lines: 1.9 ns coarse, 1 ns delay
   stage, up to about 1 ns amplifier, 5.7 ns fine. The testbenches wait
   12 ns.
4. Pulse `sample_i` for one clock. The flop banks are captured in that
   cycle. In the next cycle they are encoded and compensated.
5. `code_o = {n, fine}` appears with a one-cycle `valid_o` two cycles after
   `sample_i`. `sat_o` and `clip_o` come with it.
6. Drop START and STOP before the next `clr_i`.

A calibration sample (`cal_i` high) loads the offset and produces no
`valid_o`. At the published 1 MHz conversion rate, all of this fits easily
within one period.

## What is RTL and what is a model

| module | kind | notes |
|---|---|---|
| `tdc_pkg` | package | widths and counts |
| `vernier_sampler` | RTL | arbiter flop bank, async clear, one clock per flop |
| `therm_count`, `sel_generator`, `pair_mux` | RTL | combinational |
| `cas_cell`, `cas_divider`, `fine_encoder`, `compensator` | RTL | |
| `tdc_readout` | RTL | complete digital back end |
| `vernier_delay_line`, `delay_stage` | model | ideal transport delays |
| `vernier_ta`, `two_stage_ta` | model | linear gain, clipping, offset |
| `coarse_tdc`, `fine_tdc`, `signal_selector` | model + RTL | delay models around RTL flops/muxes |
| `vernier_tdc_top` | model + RTL | complete converter |

All files use `timescale 1ps/1fs`; the models take their delays in ps as
`real` parameters. Synthesis of the models is not intended.

The models are ideal: no jitter, no mismatch between stages or between the
two amplifier chains, and no gain nonlinearity. Simulation therefore shows
the nominal 0.3125 ps step. Silicon built this way measures coarser,
somewhere between sub-picosecond and about 1.5 ps depending on supply. When
judging the results, keep in mind that the compensator is exercised here
only against gain and offset errors.

## Design choices not fixed by the source

These are the choices made here. The published design fixes only the
structure and the widths.

* **Flop orientation.** Which input of each flop is D and which is the
  clock. The clear pulse before each conversion.
* **Sel.** Computed as ones - 1 of CQ.
* **MUX B.** It takes stage n+1 with the pair exchanged. This reading comes
  from the published fine codes: FTDC2 falls while FTDC1 rises, and their
  sum stays about constant.
* **Two amplifier chains.** One under each multiplexer, as the selector
  drawing shows.
* **Analog values.** The 10 ps step of the fine lines, the absolute buffer
  delays, the 1 ns delay stage, and the amplifier ranges and base delays.
* **Divider operands.** The published compensator drawing labels the sum on
  the divider's remainder inputs and a 6-bit value on its divisor inputs.
  That cannot correct a gain. Here the constant 32·2^7 is divided by FSUM
  instead, which reproduces the published correction table. So the divisor
  is 8 bits wide and the remainder 10 bits.
* **Offset source and width.** The offset register is fed from FOUT1, as
  the published compensator drawing shows. It is converted to 5 bits by
  saturation; no shift is applied. So the offset is subtracted in FOUT1
  units, not in final-code units. With FSUM near 40 the two differ by about
  20 %. An alternative is to store the compensated zero-input result
  instead; that would change only the register's input.
* **Saturations and clipping.** FOUT, DOUT, the offset and the final result.
* **The read-out.** Capture registers, strobe, calibration control and the
  two-cycle latency.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tdc_pkg.sv tb/tb_compensator.sv \
          --top-module tb_compensator -Mdir obj && ./obj/Vtb_compensator
```

| testbench | what it checks |
|---|---|
| `tb_therm_count`, `tb_sel_generator`, `tb_pair_mux` | exhaustive lengths, bubbles, every select value |
| `tb_cas_divider` | 4096 divided by every divisor from 33 to 255, and 3000 random divisions |
| `tb_fine_encoder` | all positive and negative lengths, saturation |
| `tb_compensator` | the published table (±1 code), 2000 random cases against a real-arithmetic reference, DOUT for every FSUM, offset loading and saturation |
| `tb_tdc_readout` | 500 conversions, two-cycle latency, calibration |
| `tb_vernier_sampler`, `tb_vernier_delay_line`, `tb_delay_stage` | edge order, tap times, clear |
| `tb_coarse_tdc`, `tb_signal_selector`, `tb_fine_tdc` | codes and intervals over the whole range, no early multiplexer edge |
| `tb_vernier_ta`, `tb_two_stage_ta` | gain, clipping, polarity, latency, offset |
| `tb_vernier_tdc_top` | four converters with gains 40, 36, 44 and 30 and with offsets; every coarse code, calibration, quotient saturation, clipping and negative fine codes each occur; codes within ±3 of ideal |
| `tb_vernier_tdc_full` | the converter at its default parameters: calibration, the published table's intervals and 16 intervals over 0..300 ps |

At default parameters, codes land within about one code of T / 0.3125 ps.
The testbenches also pass when all state starts at random values
(`+verilator+rand+reset+2`). Every flop bank is cleared with a rising
`clr_i` edge before it is first read, and the read-out is reset.

One simulation artefact needs care. The simulator does not schedule a
run-time zero delay reliably (`#0` computed from a real). The amplifier
model and the testbenches therefore raise simultaneous edges in the same
statement. Calibrating with truly simultaneous START and STOP puts the first
negative-line flop on an exact tie. It reads "STOP first", which stores an
offset of -1 and shifts later codes up by one.

The top-level testbench takes about three minutes to compile because it has
four converter instances; it then simulates in about 20 s.
