# Fast digital integrator for rotating-coil flux measurements

Accelerator magnets are measured with rotating coils.  A coil turns inside the
magnet, and an encoder on its shaft sends a pulse at fixed angles.  The
voltage induced in the coil is the time derivative of the flux linked with
it.  So the flux change between two encoder pulses is the integral of the
coil voltage over that interval.  Older instruments integrate with analog
voltage-to-frequency converters.  This design converts the voltage to digital
right away, with an 18-bit ADC at up to 800 kS/s, and integrates digitally.

The RTL here is the FPGA of such an instrument.  It:

* starts the ADC conversions and reads the results;
* corrects each sample for offset and gain;
* sums the samples between consecutive rising edges of the encoder trigger;
* stores one *flux increment* per trigger (the sum, plus how many samples it
  holds) until the host reads it;
* runs the instrument state machine;
* runs a self-calibration that trims the analog offset and gain with 16-bit
  codes, using a dichotomic (bisection) search on the ADC output;
* drives the range of the programmable-gain amplifier;
* provides the register interface on the local bus.

The architecture, the state machine, the calibration procedure and the
numbers marked *given* below come from the published description of the
instrument ("A Fast Digital Integrator for Magnetic Field Measurements at
CERN").  That description gives block functions but not their logic.  The
register map, handshakes, encodings, widths not listed as *given*, and all
timing constants are this design's own choices.  They are listed in
[Departures and choices](#departures-and-choices).

## Block structure

```
 coil ──► input mux ──► PGA ──► ADC ═══╗          (analog, outside the FPGA)
        (coil/short/ref)  ▲            ║ adc_cnvst / adc_busy / adc_data
 offset DAC ◄─┐           │            ▼
 ref + divider◄┤       pga_ctrl     adc_if ──► err_corr ──► flux_integrator ──► flux_fifo
              │           ▲            │  raw       corrected     ▲  records       │
              └──── self_cal ◄─────────┘                          │                ▼
                          ▲           trig_in, index_in ──► trig_detect ×2     bus_regs ◄──► local bus
                          │                                                        │
                       fdi_ctrl ◄──────────── commands / status ───────────────────┘
 por_n, ON, reset button ──► local_io ──► board reset, over-range / error indicators
```

| module | role |
|---|---|
| `fdi_top` | the FPGA: wires everything, no logic of its own but a saturation of the buffer fill level |
| `adc_if` | conversion start every `sample_div` clocks, capture on the fall of busy, over-range flag |
| `err_corr` | `y = ((x - offset) * gain) >>> 15`, one clock |
| `trig_detect` | synchroniser, glitch filter, rising-edge pulse; one for the encoder trigger, one for the zero-encoder pulse |
| `flux_integrator` | sum and sample count per trigger interval |
| `flux_fifo` | 512-deep buffer of flux records, with overflow flag |
| `self_cal` | three-step dichotomic calibration |
| `pga_ctrl` | range check, gain and reference selection, settling wait |
| `fdi_ctrl` | instrument state machine and `instrument_status` register |
| `bus_regs` | local-bus registers, commands, interrupts |
| `local_io` | reset generation, button debounce, indicator stretching |
| `fdi_pkg` | widths, state / command / input-select enums, status and record structs |

The clock is the board's 20 MHz oscillator (*given*).  Every timing number
below is in these clocks.

## The integration

### What a flux increment is

`adc_if` starts a conversion every `sample_div` clocks.  The default is 25
clocks, i.e. 1.25 µs or 800 kS/s (*given* as the fastest rate).  A value of
32 gives 625 kS/s.  `err_corr` corrects each sample, and the result goes to
`flux_integrator` as a 20-bit signed value.

`flux_integrator` only works while a measurement is armed:

1. The first trigger rising edge after arming opens the first interval.  It
   produces no record.  If MODE bit 0 is set, triggers are ignored until
   the zero-encoder pulse (`index_in`) has risen, so the first interval
   starts at the first trigger at or after the zero position.  A trigger in
   the same clock as the zero pulse counts.
2. Each later edge closes the open interval and opens the next one.  The
   closed interval is written as a record `{ovf, flux[47:0], nsamp[23:0]}`.
   * `flux` is the sum of the corrected samples in the interval.
   * `nsamp` is how many samples were summed.
3. A sample that arrives in the same clock as the trigger pulse goes into the
   new interval.

The host turns a record into physical units:

```
  Ts          = sample_div / 20 MHz
  LSB         = full_scale_V / 2^17          (FULL_SCALE register, in mV)
  Δφ  [V·s]   = flux * LSB * Ts
  T_mk [s]    = nsamp * Ts                   (time between the two triggers)
```

This is a rectangular-rule integral.  The time between triggers is known to
one sampling period, because the hardware counts samples and does not
time-stamp the trigger edges.

A 48-bit accumulator holds at least 2^28 full-scale samples (over five
minutes at 800 kS/s).  The 24-bit count saturates after about 21 s at
800 kS/s.  If it saturates, the record's `ovf` bit is set.

### Latency and where a sample lands

These are the clock counts from the pins to the integrator:

* `adc_busy` falls → `sample_valid`: 2 clocks.
* `sample_valid` → `err_corr` output: 1 clock.
* `trig_in` rising edge → trigger pulse: 2 synchroniser clocks plus `TRIG_FILT`
  (4) filter clocks.

An encoder edge therefore closes its interval about 6 clocks (300 ns) after it
happens.  Any sample that reaches the integrator before the trigger pulse is
counted in the old interval.  At 800 kS/s a sample reaches the integrator
every 25 clocks, so the interval boundary moves by at most one sample.  The
same sample cannot be counted twice or lost.

### Buffering

Records go into `flux_fifo`, which holds 512 records (one turn at 512 points
per turn).  The host reads `FLUX_LO`, `FLUX_HI`, then `FLUX_N`.  Reading
`FLUX_N` removes the record from the buffer.  If a record arrives while the
buffer is full, it is dropped and the sticky `overflow` flag is set.
`fdi_ctrl` treats this as lost data: the instrument goes to RECOVERY with
error source `ERR_MEAS`.

## Self-calibration

A `SELF_CAL` command starts `self_cal`, which runs three steps (*given*):

| step | input (`in_sel`) | adjusts | stops when the ADC output reaches |
|---|---|---|---|
| 1 | shorted (`IN_SHORT`) | offset DAC (`dac_code`) | zero code |
| 2 | voltage reference (`IN_VREF`) | gain divider (`pot_code`) | most positive code, 131071 |
| 3 | coil (`IN_COIL`) | offset DAC (`dac_code`) | zero code |

Step 2 keeps the DAC at the result of step 1.  The reference level follows
the selected range: `pga_ctrl` drives `vref_sel` with the range index.

Each step is a 16-bit bisection that finds **the smallest code whose ADC
output is at or above the target**.  The search assumes the ADC output rises
with the code.  This "first code at or above" form matters for step 2: the
ADC clips at full scale, so "equal to full scale" holds for every code above
the right one.

The search runs like this:

1. Try the all-ones code.  If even that stays below the target, the step
   fails: `err` pulses, `err_step` says which step failed, and the
   instrument goes to RECOVERY with `ERR_CAL`.
2. From the most significant bit down, try the best code so far with that
   bit cleared (the lower bits are still ones).  If the ADC output is still
   at or above the target, keep the bit cleared.

For each trial, the new code is driven, the block waits `CAL_SETTLE` clocks
(64 by default), and then takes the next ADC sample.  One step is 17 samples.
The whole calibration is 3 × 17 + 1 = 52 samples, about 52 × 89 clocks
(0.23 ms) at the default settings.

After step 3 the block takes one more sample at the final code and keeps it
as the residual offset.  With a monotonic chain this value is small and not
negative.  `err_corr` subtracts it from every sample.  The calibration codes
are readable on the bus (`CAL_DAC`, `CAL_POT`, `RESID`), and they stay on
`dac_code` / `pot_code` until the next calibration.  Storing them in
non-volatile memory is left to the processor.

The calibration can also repeat on its own.  If `CAL_PERIOD` is not zero,
`fdi_ctrl` counts clocks since the last calibration.  When the count reaches
`CAL_PERIOD`, a calibration becomes due.  It starts the next time the
instrument is in READY with no command waiting, so a measurement is never
interrupted.  Writing 0 turns this off (the reset value).

The gain correction coefficient (`GAIN`, 1.0 = 0x8000) is written by the
host.  The hardware calibration sets the analog gain exactly.  The
coefficient is for correcting a known gain error on top of that.

## Instrument state machine

`fdi_ctrl` has the states of the instrument firmware (*given*):

```
BOOTSTRAP ──dev_ready──► READY ──SELF_CAL cmd / period──► SELF_CAL ──done──► READY
    ▲      ─timeout──┐     │  ──MEASURE cmd───► MEASURE  ──N points / STOP──► READY
    │                │     └──any other cmd──► CONFIG   ──applied, settled──► READY
    │                ▼
    └──RESET cmd── RECOVERY ◄── any error (boot time-out, bad range,
                      │                     calibration failure, buffer overflow)
                      └──READY cmd──► READY
```

* **CONFIG** handles every command other than self-calibration and
  measurement.  A `CONFIG` command copies the pending configuration
  registers into the active ones, if `pga_ctrl` accepts the range.  It then
  waits while the PGA settles (`PGA_SETTLE`, 1000 clocks).  Any other
  command passes through CONFIG and does nothing.
* **MEASURE** clears the flux buffer and arms the integrator.  It ends after
  `N_POINTS` records, or on `STOP` if `N_POINTS` is 0.
* **The status register** holds the last state entered.  It is *not*
  updated on entry to RECOVERY, so during recovery it still shows where the
  error happened (*given*).  On an error the register also records:
  * the failing state;
  * a one-hot error source: boot, configuration, calibration or measurement;
  * the processor's 8-bit error code (`dsp_err` input).

  The error flag clears when RECOVERY is left.

`instrument_status` layout (`status_t`): `[18] err`, `[17:15] err_state`,
`[14:11] err_src`, `[10:3] dsp_err`, `[2:0] state`.
State codes: 0 BOOTSTRAP, 1 READY, 2 CONFIG, 3 SELF_CAL, 4 MEASURE,
5 RECOVERY.  Command codes: 1 CONFIG, 2 SELF_CAL, 3 MEASURE, 4 READY,
5 RESET, 6 STOP.

## Local-bus registers

On a write, the address and data are sampled when `bus_wr` is high.  On a
read, `bus_rd` is asserted for one clock, and `bus_rdata` is valid with
`bus_rvalid` in the next clock.  One access can be made every clock.

| addr | name | access | content |
|---|---|---|---|
| 0x0 | CMD | W | [2:0] command |
| 0x1 | STATUS | R/W | [18:0] instrument_status, [19] sticky over-range (write 1 to clear), [20] flux buffer empty, [21] PGA settling, [31:22] buffer fill level |
| 0x2 | RANGE | RW | [3:0] range index 0..9 = 0.1, 0.25, 0.5, 1, 2.5, 5, 10, 25, 50, 100 V (*given* ranges) |
| 0x3 | SAMPLE_DIV | RW | clocks per sample, reset 25 |
| 0x4 | N_POINTS | RW | increments per measurement, 0 = until STOP, reset 512 |
| 0x5 | GAIN | RW | gain coefficient, reset 0x8000 |
| 0x6 | CAL_DAC | R | [31:16] DAC code from step 1, [15:0] DAC code from step 3 |
| 0x7 | CAL_POT | R | gain divider code |
| 0x8 | RESID | R | residual offset, sign-extended |
| 0x9 | FLUX_LO | R | oldest record, flux bits 31:0 |
| 0xA | FLUX_HI | R | [31] count saturated, [15:0] flux bits 47:32 |
| 0xB | FLUX_N | R | sample count; the read removes the record |
| 0xC | FULL_SCALE | R | active full scale in mV |
| 0xD | IRQ_EN | RW | enables: [0] ADC, [1] FPGA, [2] priority-0 |
| 0xE | MODE | RW | [0] start integrating at the zero-encoder pulse, reset 0 |
| 0xF | CAL_PERIOD | RW | clocks between automatic calibrations, 0 = off (reset) |

RANGE, SAMPLE_DIV, N_POINTS, GAIN and MODE are *pending*: they take effect
only when a CONFIG command succeeds.  CAL_PERIOD takes effect at once.

There are three interrupt outputs:

* `adc_irq` pulses once per sample.
* `fpga_irq` is high while flux data is waiting.
* `prio0_irq` is high while the instrument is in error.

## Outside the RTL

These parts have no logic in this design.  Their signals are ports of
`fdi_top`:

| part | ports |
|---|---|
| input switch, PGA, ADC | `in_sel`, `pga_gain`, `adc_*` |
| 16-bit offset DAC | `dac_code` |
| voltage reference and its 16-bit programmable divider | `vref_sel`, `pot_code` |
| processor | `dev_ready`: all devices initialised; `dsp_err`: the processor's error code |
| CompactPCI bridge | `bus_*` |
| non-volatile calibration memory, board oscillator | none |

The ADC interface is generic, not specific to one converter:

* `adc_cnvst` is a one-clock active-high start pulse.
* The result is a parallel two's-complement word, valid when `adc_busy`
  falls.

If a start tick comes while the previous conversion is still busy, that
conversion is skipped (`miss`, internal).

## Departures and choices

* **Integration in logic.**  In the described instrument, a floating-point
  processor integrates the samples and the FPGA handles I/O and correction.
  Here the integration is fixed-point FPGA logic, so the design works without
  the processor.  The described instrument also mentions an on-line flux
  interpolation algorithm.  It is not built, because it is not specified.
* **Correction arithmetic.**  The described instrument says only that offset
  and gain are corrected in real time from stored calibration values.  The
  formula, the Q1.15 gain format and the use of the step-3 residual as the
  offset are this design's own.
* **Search direction.**  The bisection assumes the ADC output rises with both
  trim codes.  If the board's polarity is the reverse, invert the code at the
  pins.
* **Signal meanings.**  The meanings of the three interrupts and of the
  over-range signal, plus the whole register map, are this design's own.
* **Local I/O.**  The reset button, the ON switch and the indicators are
  handled by `local_io`: asynchronous assertion, a 2-clock synchronous
  release, a 1 ms button debounce, and indicators held for at least 100 ms.
  None of these values is given.
* **Trigger input.**  The trigger is taken as a clean digital input with a
  4-clock glitch filter.  The threshold-based edge search on sampled encoder
  signals, used on the PC-based validation station, is not part of the board.
* **Zero-encoder start.**  The zero-encoder pulse is a second clean digital
  input with the same filter.  Whether the first interval waits for it is
  a MODE bit, off by default.
* **Periodic calibration.**  The described board calibrates periodically,
  but no period is given.  Here the period is a register, off at reset, and
  each periodic run is the full three-step procedure.
* **Buffer depth.**  The buffer depth (512) and the boot time-out (1,000,000
  clocks = 50 ms) are this design's own.

## Capacity against the described operating points

| operating point | samples per increment | fits |
|---|---|---|
| reference test: 6.469 rad/s, 512 points per turn | ≈1518 at 800 kS/s | yes: count needs 11 of 24 bits; one turn is exactly the 512-record buffer |
| new coils: 20 kHz trigger rate, 10 turns/s | 40 | yes, if the host drains 20 k records/s (the buffer holds 25.6 ms) |
| typical integration time 10 µs | 8 | yes: 300 k bus reads/s needed, up to 20 M/s possible |
| shortest integration time 1.25 µs | 1 | yes: the trigger must stay high and low ≥ 5 clocks each |
| 625 kS/s sampling of the validation station | `sample_div` = 32 | yes |

## Simulation

Every module has a self-checking testbench in `tb/`.  Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.  To run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fdi_pkg.sv rtl/<module>.sv tb/tb_<module>.sv --top-module tb_<module>
./obj_dir/Vtb_<module>
```

For the whole design, `tb_fdi_top` needs `tb/fe_model.sv` and every file in
`rtl/`.  It runs at the default parameters and takes a few seconds.  It uses
`fe_model`, a behavioural model of the analog chain and the ADC: a linear
model with an offset error, a DAC step, a gain range set by the divider, a
conversion time, and clipping.  The coil voltage is a sine whose peaks clip
the ADC.  The test:

1. lets the boot time out, then recovers with a user reset;
2. sends a configuration with an invalid range, which is refused, then a
   valid one;
3. runs a calibration that fails (reference too small), then one that
   succeeds, and checks the codes against an exhaustive search of the model;
4. measures 64 increments, each compared exactly with the sum the test
   computes from the ADC words it saw on the pins;
5. starts an endless measurement that waits for the zero-encoder pulse,
   checks that nothing is stored before the pulse, and stops it with STOP;
6. overflows the buffer by not reading it;
7. lets the calibration timer start a calibration from READY.

It also checks that every one of these mechanisms, the over-range indicator
and the three interrupts occurred.

`tb_workloads` runs the operating points of the table above through the
full design: the reference test for one full turn, the 20 kHz trigger rate,
and the 1.25 µs single-sample interval.
