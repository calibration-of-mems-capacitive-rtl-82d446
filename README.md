# Electrical-stimulus BIST for capacitive MEMS accelerometers

Accelerometers are normally calibrated by shaking each device on a test
machine, which is expensive. This design instead excites the sensor
electrically. A sine-like voltage, swept from 1 kHz to 6 kHz, is applied to the
sensor plates. The sensor's response goes through the readout the chip already
has (capacitance-to-voltage converter, gain stage and sigma-delta modulator),
and the digitized result is stored for every frequency. Software then maps
this electrical frequency response to the mechanical calibration coefficients.
That mapping is not part of this RTL.

The hardware added for the test is a stimulus generator with very little
logic:

* a **ROM-less direct digital frequency synthesizer (DDFS)**. Its phase
  accumulator's most significant bit is a square wave at 24 times the
  stimulus frequency.
* a **24-step DAC control**. A mod-24 counter is advanced by that square wave.
  A decoder and OR gates turn the count into switch controls.
* a **sine-weighted resistor string** with 13 taps, followed by an RC filter and
  a unit-gain buffer. Closing one tap per step gives a stair-stepped sine.

This repository gives synthesizable SystemVerilog for the digital parts:
sweep sequencer, DDFS, dither generator, DAC control and capture memory. The
resistor string and the output stage are analog, so they come as behavioural
models with real-valued voltages. Two other DAC forms that were considered
and rejected are also modelled: current steering and switched capacitor.
Both use the same control phases. The sensor and its analog readout are not
in the RTL. The stimulus leaves the top on a port (`stim_v`), and the
modulator bitstream comes back on another (`adc_bit`). The testbenches
supply simple models of the sensor and the modulator so that the whole
loop can be simulated.

## Signal chain

```
 sweep_controller --M word--> ddfs_accumulator --MSB (24 x f)--> dac_control
        |                       ^ dither_lfsr                        | tap_sel[12:0]
        | capture_en, freq_idx                                       v
        v                                                 resistor_string_dac
 capture_buffer <-- adc_bit <-- [sigma-delta <- gain <- C2V      | vtap
        |                        <- MEMS sensor] <-- stim_v <-- dac_output_stage
    rd_addr/rd_data                 (not in this RTL)          (RC filter + follower)
```

Everything runs on a single 1 MHz clock (`clk`). In the system this design
comes from, the DDFS and the capture memory sit in an FPGA and the DAC sits on
the test chip. Here both halves are in one module (`bist_top`).

## From tuning word to stair sine

This is the part that takes the most care to follow.

**DDFS.** On every clock, the 16-bit accumulator adds the tuning word M and
wraps on overflow. Its MSB is therefore a square wave of frequency

    f_DDFS = M * 1 MHz / 2^16          (resolution 15.26 Hz)

There is no phase-to-amplitude ROM. The sine shape comes from the DAC, so the
DDFS only has to say *when* to take the next step.

**Division by 24.** Each rising edge of the MSB advances the DAC control's
step counter by one. 24 steps make one sine period, so

    f_stim = f_DDFS / 24 = M * 1 MHz / (24 * 2^16)     (resolution 0.64 Hz)

| stimulus | DDFS      | M     |
|----------|-----------|-------|
| 1 kHz    | 24.0 kHz  | 1573  |
| 3.5 kHz  | 84.0 kHz  | 5505  |
| 6 kHz    | 144.0 kHz | 9437  |
| 10 kHz   | 240.0 kHz | 15728 |

The DDFS frequency is kept below a third of the clock (333 kHz) to limit
spurs. The edge detector needs it below half the clock.

**Jitter.** The MSB edges fall on clock edges, so a step lasts either
floor(2^16/M) or ceil(2^16/M) clocks. The mean step length is exact. This
one-clock jitter is what the optional dither (below) is meant to spread out.

**Steps and levels.** Step k (0..23) holds the level sin(k * 15 deg). Seven
magnitudes occur, sin 0 .. sin 90 in 15-degree steps, and 13 signed levels.
Each signed level is one tap of the resistor string. P1 is the top tap (+1),
P7 the middle tap (0) and P13 the bottom tap (-1):

| step k     | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  | ... | 11 | 12 | 13 | ... | 18  | ... | 23  |
|------------|----|----|----|----|----|----|----|----|-----|----|----|----|-----|-----|-----|-----|
| level      | 0  | .26| .5 | .71| .87| .97| 1  | .97| ... | .26| 0  |-.26| ... | -1  | ... |-.26 |
| tap        | P7 | P6 | P5 | P4 | P3 | P2 | P1 | P2 | ... | P6 | P7 | P8 | ... | P13 | ... | P8  |
| magnitude  | PZ | PA | PB | PC | PD | PE | PF | PE | ... | PA | PZ | PA | ... | PF  | ... | PA  |

Over one period this gives:

* PZ (zero) is active twice.
* PF (peak) is active twice.
* PA..PE are active four times each.
* P1 and P13 are closed once each.
* Every other tap is closed twice.

Every switch control is therefore the OR of a fixed group of the 24 decoded
phases (`switch_logic`). The unsigned magnitude phases `mag` and the
half-period flag `neg_half` are also brought out. A DAC that switches a
reference between +Vref and -Vref for the two halves would use these instead
of the 13 taps.

**Pipeline.** The MSB is treated as an asynchronous input, since in the
original partition it crosses from the FPGA to the chip. It passes a two-flop
synchronizer and a rising-edge detector. The step count changes on the third
clock edge after the MSB's rising edge is first sampled. A new M word takes
effect one clock after `m_load`, without clearing the accumulator, so the
phase stays continuous. The stimulus therefore follows a retune within about
four clocks plus one DDFS period.

## Resistor string

The string is R1 R2 R3 R4 R5 R6 R7 R7 R6 R5 R4 R3 R2 R1, from top (3.3 V) to
bottom (0 V). There are 13 switched taps between the resistors:

| R1      | R2      | R3       | R4       | R5       | R6       | R7       |
|---------|---------|----------|----------|----------|----------|----------|
| 47.3 kΩ | 8.32 kΩ | 24.73 kΩ | 39.89 kΩ | 51.95 kΩ | 60.29 kΩ | 64.62 kΩ |

Each inner resistor is about 250 kΩ per unit of sine difference. For example,
R7 / (sin 15 - sin 0) = 249.7 kΩ and R2 / (sin 90 - sin 75) = 244 kΩ. The end
resistors R1 set the swing. The taps come out at 1.65 V + 1.387 V * sin(m * 15 deg):
0.263 V at P13, 1.65 V at P7 and 3.037 V at P1. Every tap is within 2.5 mV of
the ideal sine level. These residual errors set the low-order harmonics of
the stimulus.

The model (`resistor_string_dac`) recomputes the tap voltage whenever
`tap_sel` changes. It holds the last value when no switch is closed, as the
filter capacitor would. It reports an error if two switches are closed.

## Alternative DACs: current steering and switched capacitor

Two other forms of the sine-weighted DAC were designed before the resistor
string was chosen. Both are modelled so they can be compared. Both take the
magnitude phases `mag` (PZ .. PF) and `neg_half` from `switch_logic`, not the
13 taps. Neither is used by `bist_top`.

**Current steering (`current_steering_dac`).** Six currents, each one step of
the sine:

| I1    | I2    | I3    | I4    | I5    | I6     |
|-------|-------|-------|-------|-------|--------|
| 26 µA | 24 µA | 21 µA | 16 µA | 10 µA | 3.3 µA |

These are close to 100 µA * (sin(15j deg) - sin(15(j-1) deg)). Magnitude level
m switches on I1 .. Im, a thermometer code. Sources carry the upper half
period and six equal sinks carry the lower one. A transimpedance amplifier
gives `vout = VCM + RTIA * I`. The gain and common mode are not known; RTIA =
13.8 kΩ and VCM = 1.65 V give the resistor string's swing. The levels are
within 2 mV of a sine. The harmonics 2..11 of the 24 levels sit 63 dB
down. Mismatch is this DAC's weakness: one cell 5 % high drops that to
49 dB.

**Switched capacitor (`sc_dac`).** A bank of six capacitors feeds an
integrator with feedback capacitor C7. Capacitor Cj is sized to one sine
increment: Cj / C0 = sin((7-j) * 15 deg) - sin((6-j) * 15 deg).

| C1     | C2     | C3      | C4       | C5      | C6      |
|--------|--------|---------|----------|---------|---------|
| 302 fF | 898 fF | 1.43 pF | 1.867 pF | 2.15 pF | 2.34 pF |

On each step, one capacitor's charge, VREF * Cj, moves onto C7:
* added while the magnitude rises;
* subtracted, using the same capacitor, while it falls.

VREF changes sign for the lower half period. PZ closes a reset switch across
C7, so the output returns exactly to the analog ground at both zero crossings
of every period. C0 = C6 / sin 15 = 9.04 pF, and the model uses C7 = C0. VREF =
1.12 V and a 1.65 V ground match the measured output of a fabricated version
(about 0.53 .. 2.77 V). With the rounded capacitor values the peak lands at
2.763 V.

This DAC's weakness is leakage. Charge lost from the bank makes the steps
droop. `LOSS` is the fraction of each charge packet that is lost (default 0).
A loss of 2 % lowers the peak by 2 %, but each reset clears the error.

## Output filter and follower

An RC low-pass filter smooths the steps and switch glitches. A rail-to-rail
op-amp connected as a voltage follower then drives the sensor. The op-amp's
input stage has complementary NMOS and PMOS pairs, so its transconductance
doubles in mid-range. In a follower this does not change the unit gain, so
the model (`dac_output_stage`) uses:

* an exact first-order update every 50 ns, with time constant `TAU_NS`;
* an ideal gain of 1, clipped to the rails.

The R and C values are not known. The 1 µs default is short compared with the
shortest step (6.9 µs at 6 kHz).

## Sweep and capture

`sweep_controller` holds a table of tuning words computed at elaboration:

    M(k) = round((F_START + k * F_STEP) * 24 * 2^16 / REFCLK)

The defaults give 11 frequencies, 1 kHz .. 6 kHz in 500 Hz steps. On `start`,
for each frequency in turn, the controller:

1. loads M(k);
2. pulses `step_start`;
3. keeps `capture_en` high for `DWELL_CYCLES` clocks (default 16384, i.e.
   16.4 ms, or 16 periods at 1 kHz).

After the last frequency it loads M = 0, which stops the stimulus, and raises
`done` until the next `start`.

`capture_buffer` stores one `adc_bit` per clock while `capture_en` is high:

* Bits are packed LSB first into 16-bit words.
* Frequency k owns words k*1024 .. k*1024+1023, which is 11264 words or
  180 kbit in total.
* Read through `rd_addr`/`rd_data`, with a one-cycle latency.
* `capture_overflow` flags bits beyond a record's length.

The stored bits are the raw modulator output. Decimation and the extraction of
magnitude and phase are left to the software that reads the memory.

## Dither

`dither_lfsr` is a 16-bit maximal-length LFSR (x^16+x^14+x^13+x^11+1). When
`dither_en` is high, its two low bits are added to the tuning word on every
clock. This randomises the truncation pattern of the MSB edges, spreading
discrete spurs into the noise floor. It raises the mean M by 1.5, a frequency
shift of at most 0.1 %. Dither is off unless `dither_en` is set.

## Measured behaviour

These numbers come from simulating the default configuration, with the
testbenches below.

* **Frequency.** The stimulus period at every sweep step equals
  24 * 2^16 / M clocks within 0.5 %.
* **Swing.** The stimulus swings between about 0.26 V and 3.04 V.
* **Spectrum.** Measured over whole periods of the filtered stimulus, with and
  without dither:
  * fundamental: 1.384 V;
  * largest harmonic between 2 and 22: 63–65 dB below the fundamental, the 5th
    being the largest, caused by the residual tap errors;
  * images of the 24-step stair at harmonics 23 and 25: -27 to -31 dB, as
    expected for a zero-order-hold sine (1/23 and 1/25).

  The spurious-free range the design aims for is 55 dB. Here it is read as
  applying to the harmonics below the stair images.
* **Top of the range.** At 10 kHz, the top of the DAC's 1–10 kHz range, the
  DDFS MSB runs at 240 kHz. A DAC step then lasts 4 or 5 clocks, because the
  MSB edges fall on the 1 MHz clock grid. This step-length jitter raises the
  3rd harmonic to 41.5 dB below the fundamental. That meets the DAC
  specification's 40 dB but not 55 dB. The jitter comes from the 1 MHz
  reference, not from the synchronizer: a counter clocked directly by the
  MSB would see the same edges. The 1–6 kHz sweep stays above 63 dB.
* **Dither.** At these settings dither moves the low-harmonic figures by up to
  3 dB either way. The residual tap errors, not DDFS jitter, dominate.

* **Driving a sensor.** `tb/mems_model.sv` models one sensor axis. It is a
  mass-spring-damper: m = 3.4e-9 kg, k = 3.5 N/m, damping ratio 0.7, so the
  resonance is at 5.1 kHz. It is pushed by the electrostatic force
  eps0*A/2*(V/d)^2, with the proof mass biased at 1.65 V. With the stimulus
  sweeping 1..6 kHz:
  * the mass moves at twice the stimulus frequency;
  * the component at the stimulus frequency itself is 58-76 dB lower;
  * the motion at 2f follows the second-order response within 0.2 % in
    magnitude and 0.5 deg in phase at every sweep step;
  * from 1 kHz to 6 kHz it falls from 68 nm to 12 nm as 2f passes the
    resonance.

  The model also takes an acceleration input. A sensor shaken at 1 g
  follows the same second-order response. A sensor with a 10 % stiffer
  spring moves 0.911 times as far as the nominal one at 1 kHz stimulus
  (2 kHz motion). The ratio approaches 1 towards 6 kHz. The electrical and
  mechanical stimuli give the same ratio at every sweep step, to four
  digits. This is why an electrical sweep can stand in for the shaker:
  the low end of the sweep carries most of the information about the
  spring.

  The capacitance change also passes a linear stand-in for the readout
  (0.8 V + 20 mV/fF) into a first-order sigma-delta model, and `bist_top`
  stores the bits. A windowed DFT of the stored bits at 2f recovers the
  readout's 2f amplitude within 0.4 % and its phase within 0.4 deg at every
  frequency. Recording this
  magnitude and phase across the sweep is what the capture memory is for.

## Top-level interface (`bist_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | 1 MHz clock, asynchronous active-low reset |
| start | in | 1 | begin a sweep (accepted when idle or done) |
| dither_en | in | 1 | add LFSR dither to the tuning word |
| adc_bit | in | 1 | sigma-delta modulator output, one bit per clock |
| rd_addr / rd_data | in / out | 14 / 16 | capture memory read port, data one clock later |
| busy, done | out | 1 | sweep running / finished |
| freq_idx | out | 4 | frequency being recorded (0 = 1 kHz .. 10 = 6 kHz) |
| capture_overflow | out | 1 | record overflow |
| ddfs_msb | out | 1 | DDFS output |
| step | out | 6 | DAC step 0..23 |
| tap_sel | out | 13 | resistor-string switches P1..P13 (bit 0 = P1) |
| mag | out | 7 | magnitude phases {pz,pa,pb,pc,pd,pe,pf} |
| neg_half, period_start | out | 1 | lower half-period; first cycle of each period |
| stim_v | out | real | stimulus voltage for the sensor |

Parameters: `N` (16), `REFCLK_HZ` (1e6), `F_START_HZ`/`F_STOP_HZ`/`F_STEP_HZ`
(1000/6000/500), `DWELL_CYCLES` (16384), `DITHER_BITS` (2), `WORD_W` (16),
`TAU_NS` (1000.0).

## Where this RTL departs from the description or fills gaps

* **Single clock.** In the original design the DAC's counter is clocked by the
  DDFS MSB itself. Here the counter runs on the 1 MHz clock and uses the
  synchronized MSB edge as an enable. This avoids a derived clock and adds
  three clocks of latency.
* **Design choices.** The following were not specified and are this
  implementation's own:
  * the two-flop synchronizer;
  * the M buffer's load strobe;
  * the reset behaviour;
  * the sweep dwell time;
  * the start/done handshake and stopping the DDFS after a sweep;
  * the capture format (raw bits, LSB first, fixed region per frequency);
  * the LFSR polynomial and the dither amplitude;
  * the filter time constant;
  * the 3.3 V / 0 V string supply. It is chosen because it reproduces the
    specified 0.3–3 V swing.
* **Tap order.** Which half of the period is positive (steps 1..11 use the
  upper taps) is a convention.
* **Alternative DACs.** The thermometer switching of the current cells, the
  falling-quarter charge subtraction, the integrator capacitor, VREF and the
  amplifier gain are this implementation's reading. The sub-phases of the
  switched-capacitor circuit's switches are not modelled; each charge moves
  at once, 1 ps after the phase change.
* **Not included.** The C2V converter, gain stage, sigma-delta modulator and
  the statistical mapping software are outside this RTL. The sensor and the
  modulator exist only as simple testbench models. In the sensor model the
  gap (2 µm), plate area and proof-mass bias are this implementation's own
  values. They scale the motion but not its frequency response.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_bist_top -y rtl -y tb +libext+.sv rtl/bist_pkg.sv tb/tb_bist_top.sv
./obj_dir/Vtb_bist_top
```

| testbench | what it covers |
|-----------|----------------|
| tb_bist_top | two full sweeps at default size (one dithered), through a first-order sigma-delta model (`tb/sd_modulator_model.sv`) fed directly by the stimulus; frequency per step, swing, capture memory contents, bit density, and a count of each mechanism (DDFS overflow, counter wrap, zero crossing, peak, lower half, retune, dither, done) |
| tb_mems_response | full sweep driving the sensor model: motion at 2f, magnitude and phase of the response against the second-order model, static deflection, roll-off above resonance; mechanical 1 g stimulus on a nominal and a 10 % stiffer sensor, and the stiff/nominal ratio seen electrically against mechanically; the 2f amplitude and phase read back from the capture memory against the analog values |
| tb_stimulus_spectrum | harmonic content of the stimulus at 1, 3.5 and 6 kHz, with and without dither, and at 10 kHz from a second instance swept 9..10 kHz |
| tb_ddfs_accumulator | phase against a reference, M-buffer loading, phase-continuous retune, MSB rate for M = 1573 and 15728 |
| tb_dither_lfsr | sequence against a reference LFSR, enable/hold, maximal length |
| tb_step_counter, tb_phase_decoder, tb_switch_logic, tb_dac_control | counting and wrap, one-hot decode, tap and phase groups derived from sin(k*15 deg), synchronizer latency and divide-by-24 |
| tb_resistor_string_dac, tb_dac_output_stage | tap voltages against the ideal sine, first-order step response and rail clipping |
| tb_current_steering_dac, tb_sc_dac | levels of the alternative DACs against the sine, half-period symmetry, harmonics and the effect of one mismatched current cell; reset at the zero crossings and droop with charge loss |
| tb_sweep_controller, tb_capture_buffer | tuning-word table, dwell lengths, done/restart; bit packing, addressing and overflow |

Each full-size run takes about two seconds.

## Files

* `rtl/bist_pkg.sv`: shared constants and types, including the step-to-tap
  and step-to-magnitude functions.
* `rtl/<module>.sv`: one module per file, as named above.
* `tb/`: the testbenches, the sigma-delta modulator model and the sensor model.
