# Tri-state FSK demodulator for wirelessly timed stimulation pulses

An implanted microstimulator powered over an inductive link can also take its
commands from that link. If the external controller does all the timekeeping
(every change of an electrode's current is a separate command), the implant
needs no timers, but pulse edges can then only fall on command-frame
boundaries: with 20-bit frames at 2.5 Mb/s that is an 8 us grid.

This design removes the grid by giving every single carrier cycle a meaning:

| carrier cycle at | meaning                                               |
|------------------|-------------------------------------------------------|
| f1 (slowest)     | data bit 1, one recovered clock pulse                 |
| f0 (fastest)     | data bit 0, one recovered clock pulse                 |
| fN = (f0 + f1)/2 | neutral: no clock pulse, the implant holds its state  |
| anything else    | error: no clock pulse, error flag asserted            |

Data therefore arrive at up to one bit per carrier cycle. Neutral cycles
keep the link powered but freeze everything clocked by the recovered
clock. So the controller can stretch any phase of a stimulation pulse by any
whole number of carrier periods. The timing resolution becomes 1/fN instead
of one frame time. Freezing the clock also saves the dynamic power of a
clock that would otherwise run with nothing to do.

The RTL is in `rtl/` and the testbenches are in `tb/`. Two stages are analog
in silicon: the clock recovery and the analog timer. They are written as
behavioural models, with real-valued signals and delays. The digital block and
the shift register are synthesizable.

## Signal chain

```
 tank_p/tank_n ──> fsk_clock_recovery ──ck_in──┬──> fsk_analog_timer ──code[3:0]──┐
 (real, volts)     comparator w/ hysteresis    │                                  v
                                               └──────────────────────────> fsk_digital_block
                                                                            │ data_out
                                                                            │ clock_out ──> fsk_shift_register ──> frame
                                                                            │ error_n                            bit_count
```

`tri_state_fsk_demod` (the top) wires these four stages together. The types and
code constants they share are in `fsk_pkg`.

## How one carrier cycle is measured

The frequency of a cycle is read from the length of its **low half**. While
`ck_in` is low, a constant current I_C charges a capacitor C, so its voltage
rises as Vc = I_C·t/C. Four comparators compare Vc with references
V1 < V2 < V3 < V4, taken from a resistor string. When `ck_in` rises, the
comparator outputs form a thermometer code that tells how long the half-cycle
was:

| Vc at the end of the low half | code {C4,C3,C2,C1} | cycle            |
|-------------------------------|--------------------|------------------|
| below V1                      | 0000               | too short: error |
| V1 … V2                       | 0001               | f0: bit 0        |
| V2 … V3                       | 0011               | fN: neutral      |
| V3 … V4                       | 0111               | f1: bit 1        |
| above V4                      | 1111               | too long: error  |

Any non-thermometer pattern is also an error. C1, the comparator against the
lowest reference, is bit 0 of `code`. The references must satisfy

    V1 < I_C/(2·f0·C) < V2 < I_C/(2·fN·C) < V3 < I_C/(2·f1·C) < V4

For the best tolerance to transmitter frequency drift, V2 and V3 sit in the
middle of their windows. V1 and V4 set the edges of the accepted band.
Shortly after `ck_in` rises, the capacitor is discharged (`T_DISCHARGE_NS`)
and the code returns to 0000.

### Default component values

The defaults suit f0/fN/f1 = 250/215/180 kHz. The half-periods are then
2000, 2326 and 2778 ns. I_C = 10 uA into C = 10 pF gives a 1 V/us ramp, so each
reference in volts is its crossing time in microseconds:

| reference | value    | how it was chosen                                         |
|-----------|----------|-----------------------------------------------------------|
| V1        | 1.8372 V | the same distance below 2000 ns as V2 is above it         |
| V2        | 2.1628 V | middle of 2000 … 2326 ns                                  |
| V3        | 2.5517 V | middle of 2326 … 2778 ns                                  |
| V4        | 3.0039 V | the same distance above 2778 ns as V3 is below it         |

The accepted band is then roughly 166 kHz to 272 kHz. For another carrier set,
compute the half-periods and place the references the same way. Changing
`IC_UA` or `C_PF` only rescales the ramp.

## The digital block: when things happen

`fsk_digital_block` does the decoding. The hardest part to get right is the
timing, so here it is cycle by cycle:

```
carrier cycle        |<------- cycle k ------->|<------ cycle k+1 ------>|
ck_in                 ‾\__________/‾‾‾‾‾‾‾‾‾‾‾‾\__________/‾‾‾‾‾‾‾‾‾‾‾‾‾\_
                        ^ timer starts   ^ rising edge: code of cycle k sampled
data_out, error_n                        X== result of cycle k ===========
clock_out (k valid)   ...                ‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__________/‾‾‾‾‾
clock_out (k neutral)                    ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
                                                        ^ shift register takes bit k
```

* On the rising `ck_in` edge that ends the low half of cycle k, the block
  samples the code. It updates `data_out` and `error_n` and registers a clock
  enable. The `symbol` output tells which of the four cases it was.
* `clock_out = ck_in | ~enable`. The enable only changes while `ck_in` is
  high, so this OR gate cannot glitch. For a valid bit, `clock_out` follows
  `ck_in` down at the start of cycle k+1. That falling edge is where the shift
  register takes the bit, half a cycle after `data_out` settled.
* For a neutral or erroneous cycle, `clock_out` stays high for the whole of
  the next cycle, and `data_out` keeps its value.
* The latency from the end of a symbol's low half to `data_out` is zero cycles.
  The bit is shifted in half a carrier cycle later. One bit per carrier cycle
  is the maximum rate.

`error_n` is active low. It separates a neutral cycle (`error_n` = 1, clock
frozen) from a too-short, too-long or malformed cycle (`error_n` = 0, clock
frozen). Logic outside the demodulator can use it, for instance to reset the
stimulator.

## The shift register

`fsk_shift_register` takes `data_out` on each falling edge of `clock_out`.
New bits enter at bit 0. After WIDTH bits, `frame[WIDTH-1]` holds the oldest
bit. `bit_count` counts the bits taken since reset. The default width is one
20-bit command, about what a 1024-site stimulator needs for a site address,
an amplitude and a few control bits. The stimulator that consumes `frame` is
not part of this RTL. `frame` is brought out on the top instead.

## Analog stages as behavioural models

* `fsk_clock_recovery`: in silicon, a cross-coupled differential pair across
  the receiver LC tank. Here it is a comparator on `v_p - v_n` with a
  hysteresis of `HYST_V` (0.1 V). `ck_in` is low during the negative half of
  the tank voltage.
* `fsk_analog_timer`: an event-driven model of the current-source, capacitor
  and comparator circuit above. Each falling `ck_in` edge schedules the four
  comparator trip times V_k·C/I_C. A trip is dropped if `ck_in` has risen
  first. The discharge is scheduled `T_DISCHARGE_NS` after the rising edge. A
  new low phase always starts from an empty capacitor.

Both models use `real` ports and `#` delays. They need `--timing` in Verilator
and are not meant for synthesis. `fsk_analog_timer` declares
`timeunit 1ns / timeprecision 1ps`, like every other file.

## Choices not fixed by the original description

* The reset: `rst_n`, asynchronous and active low. It sets `data_out` = 0, the
  clock frozen high, `error_n` = 1, and an empty shift register.
* On error codes, `data_out` holds its value (the published truth table leaves
  it as don't-care).
* The component values, the references, the hysteresis and the discharge
  time. No such values were published. The references are derived as above
  from the 250/215/180 kHz carrier set used in the published measurements.
* The shift-register width (20), its shift direction and the `bit_count` and
  `symbol` outputs.
* The decoder assumes f0 > fN > f1. The protocol allows other orderings, but
  those would need a different mapping of codes to symbols in
  `fsk_pkg::decode_code`.
* Not built: frame synchronisation ("reset on a unique frame"), which belongs
  to the older synchronous link and has no defined pattern here. Also not
  built: the LC tank, the external transmitter and the 16-site stimulator
  back end.

## Verification

Each testbench checks its outputs against values it computes on its own,
counts the checks and ends with one line `TB_RESULT checks=N failures=M`. A
watchdog ends the run as a failure if it hangs.

| testbench                | what it checks                                                                                                                                     |
|--------------------------|----------------------------------------------------------------------------------------------------------------------------------------------------|
| `tb_fsk_digital_block`   | 2000 cycles of random codes against a truth-table model; `clock_out` high or low in both halves of each cycle                                      |
| `tb_fsk_analog_timer`    | random low-half lengths across all five windows; the code mid-phase, 1 ns before the sampling edge, after the edge and after the discharge          |
| `tb_fsk_clock_recovery`  | sine inputs at three frequencies: one rising and one falling edge per cycle; noise inside the hysteresis is rejected                               |
| `tb_fsk_shift_register`  | 3000 bits with frozen stretches, against a reference model                                                                                         |
| `tb_tri_state_fsk_demod` | the whole chain at default parameters (see below)                                                                                                  |
| `tb_fsk_demod_2m5`       | the same test at 2.5 Mb/s                                                                                                                          |
| `tb_fsk_pulse_timing`    | command A, then n = 0..12 neutral cycles, then command B: A stays frozen, and B arrives exactly n·(1/fN) later (within 1 ns) at the predicted time |
| `tb_fsk_freq_drift`      | all three carriers drifted together by -10 % .. +10 %: every cycle decodes to the symbol predicted from the references; clean from -7 % to +7 %, wrong beyond about ±7.5 % |

The end-to-end test is `tb_tri_state_fsk_demod`. Its stimulus and checks are
in `tb/fsk_demod_e2e.svh`, which both end-to-end benches share. A behavioural
transmitter (`tb/fsk_carrier_source.sv`) sends a phase-continuous sine, one
cycle per symbol. The stream is 40 random 20-bit frames, interleaved with
runs of 1 to 6 neutral cycles and with out-of-band cycles at 330 kHz (too
short) and 150 kHz (too long). After every cycle the bench checks:

* `symbol`, `data_out` and `error_n`;
* the number of recovered clock edges: exactly one after a valid bit, none
  after a neutral or bad cycle;
* the shift-register contents and the bit count;
* that each frame arrives intact.

It also checks that every mechanism happened: bit 0, bit 1, a neutral freeze,
a too-short error, a too-long error, and recovery after an error.
`tb_fsk_demod_2m5` runs the same test with f0 = 3.0 MHz, fN = 2.5714 MHz and
f1 = 2.1429 MHz (a mean bit period of 400 ns). For that carrier set, the
timer is set to 100 uA and V1..V4 = 1.528/1.806/2.139/2.528 V. 2.5 Mb/s covers
the 2.46 Mb/s that a 1024-site visual prosthesis would need: 1024 sites × 20
bits × 4 commands × 30 frames/s.

Both benches pass, each with 800 bits. `tb_fsk_pulse_timing` shows the
timing resolution directly. At the default carrier set, each added neutral
cycle moves the arrival of the next command by 4651.1 ns, which is 1/215 kHz.
This is how an asymmetric biphasic pulse is built: the same commands, with
different neutral runs in the two phases. `tb_fsk_freq_drift` measures the drift tolerance that comes from centring V2
and V3. With the default references, all three carriers may drift together by
about ±7.5 % before the first cycle is misread. All eight benches finish
within a few seconds.

What this does *not* establish: the models are ideal, with no comparator
offset, noise, ramp non-linearity or tank ringing. So the margins shown are
the margins of the reference placement, not of a circuit. Physical limits on
the carrier frequency are outside these models.

## Simulating

Everything needs Verilator 5 with `--timing`. From the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_tri_state_fsk_demod -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/fsk_pkg.sv tb/tb_tri_state_fsk_demod.sv
./obj_dir/Vtb_tri_state_fsk_demod
```

Replace the top module and the testbench file to run any other bench. To try
another carrier set, copy `tb/tb_fsk_demod_2m5.sv`. Change its five frequency
localparams, and set the timer references as described under *How one
carrier cycle is measured*.
