# On-chip time measurement: SystemVerilog models

This repository holds two ways to measure very short time intervals on a
chip. Both turn time into something easier to measure.

* **PTMA (programmable time measurement architecture).** The unknown
  interval becomes a voltage, and the voltage becomes a longer time. Before
  that, a small programmable front end pulls the interval out of one or two
  analogue waveforms. The interval can be:
  * a rise time (10 % to 90 %);
  * a fall time (90 % to 10 %);
  * a pulse width (50 % to 50 %);
  * a propagation delay (Vin1 at 50 % to Vin2 at 50 %).

  The converter charges a capacitor with a large current while the interval
  lasts. It then discharges the capacitor with a current twelve times
  smaller. The discharge time is counted with a 2 GHz clock, so one count
  stands for 500 ps / 12 = 41.67 ps of input. This is finer than the clock
  period.
* **HTDC (homodyne time-to-digital converter).** A mixer multiplies a clock
  by a delayed copy of itself. A low-pass filter then keeps the DC part,
  which depends on the delay. A first-order delta-sigma ADC and a counting
  decimator turn that DC level into a number.

The two architectures share no signals. The top module `otm_top` places them
side by side: `u_ptma` is the complete PTMA chip and `u_htdc` is the HTDC
chain.

```
otm_top
├── ptma_chip            I/O buffers + reference generator + core
│   ├── io_gate (x2)     input and output buffers, enabled by io_en
│   ├── ref_generator    1.08 / 0.6 / 0.12 V or external references
│   └── ptma_core
│       ├── clock_generator (x2)  2.5 GHz comparator clock, 2 GHz counter clock
│       ├── cal_pulse_gen         1 ns calibration pulse
│       ├── pib                   programmable interface block
│       │   ├── pib_switches      seven analogue switches
│       │   ├── rr_comparator     clocked rail-to-rail comparator
│       │   ├── switch_controller mode + comparator -> switch code
│       │   └── comparator_control  passes exactly one pulse
│       ├── tvc                   time-to-voltage converter
│       └── processing_block
│           ├── rr_comparator     "capacitor still above 0 V"
│           └── dp_counter        8-bit counter and register
└── htdc
    ├── htdc_mixer
    ├── nonoverlap_clkgen         phi1, phi1d, phi2, phi2d
    ├── sc_lpf                    2nd-order switched-capacitor low-pass
    ├── ds_modulator              1st-order delta-sigma modulator
    └── decimation_filter         ones counter over OSR = 32 samples
```

## Modelling conventions

* Every file uses `timescale 1ps/1fs`. Analogue nodes are `real` values in
  volts.
* The analogue blocks are behavioural models:
  * switches, comparators and the time-to-voltage converter;
  * clocks, references, calibration pulse, mixer, filter and modulator.

  They use delays and `initial`/`always` processes with `#` waits. They are
  meant for simulation with timing, for example
  `verilator --binary --timing`, and not for synthesis.
* These blocks are plain synthesizable logic:
  * the switch controller;
  * the comparator control;
  * the counter;
  * the I/O gating;
  * the non-overlapping clock generator;
  * the decimation filter.
* Package `ptma_pkg` holds:
  * the mode encoding (`00` rise, `01` fall, `10` pulse width,
    `11` propagation);
  * the switch indices;
  * the supply and reference voltages.

## PTMA

### Measurement sequence

1. Raise `pwrup`. Both ring-oscillator clocks start.
2. Set `mode`. Apply the signals to `vin1` (and to `vin2` for propagation
   delay).
3. Raise `start`. The PIB arms and watches the inputs.
4. The PIB produces one active-low pulse, `pib_out_n`. The pulse lasts as
   long as the chosen interval.
5. During the pulse the TVC charges its capacitor with 60 µA. After the
   pulse it discharges with 5 µA.
6. The processing block counts 2 GHz periods while both of these hold:
   * the capacitor is above a 1 mV threshold;
   * the PIB output is high again.
7. When the discharge ends, the counter value is latched into `data` and
   `valid` goes high.
8. Lower `start` to clear the result and re-arm.

Result: **interval ≈ data × (5 µA / 60 µA) × 500 ps = data × 41.67 ps**.
The 8-bit register therefore covers up to 255 counts, about 10.6 ns.

### Programmable interface block (the hard part)

The PIB turns a waveform into a clean pulse with one comparator and seven
switches. Each measurement needs two threshold crossings. The first crossing
starts the pulse and the second one ends it. In three of the four modes the
second crossing is against a different reference or a different input.

* **Switch map.** Each switch connects one source to one comparator input:

  | switch | connects    |
  |--------|-------------|
  | sw0    | Vin1 → vinp |
  | sw1    | Vin1 → vinn |
  | sw2    | VrefH → vinp |
  | sw3    | VrefL → vinn |
  | sw4    | Vin2 → vinn |
  | sw5    | VrefM → vinp |
  | sw6    | VrefM → vinn |

  With this map every code of the truth table below makes a sensible
  comparison.
* **Switch controller.** It is combinational. Its input is
  `mode` together with the comparator output.

  | mode | comp = 0 | comp = 1 | meaning |
  |------|----------|----------|---------|
  | 00 | 0001001 | 0000110 | starts at Vin1 > VrefL, ends at Vin1 > VrefH |
  | 01 | 0000110 | 0001001 | starts at Vin1 < VrefH, ends at Vin1 < VrefL |
  | 10 | 1000001 | 1000001 | high while Vin1 > VrefM |
  | 11 | 1000001 | 0110000 | starts at Vin1 > VrefM, ends at Vin2 > VrefM |

  After the first crossing, the comparator output switches the inputs to
  the second comparison. That comparison is arranged so that the output
  falls again at the second crossing. The result is one comparator pulse
  from the first threshold to the second.
* **Comparator.** The comparator is clocked at 2.5 GHz and has a 175.65 ps
  decision delay. Every crossing is therefore seen on the next 400 ps
  clock edge. Pulse edges, and so the measured widths, are quantised to
  400 ps. The measurement is only as fine as this clock, even though the
  converter behind it resolves 41.67 ps. The testbenches allow ±450 ps to
  ±500 ps for this reason.
* **Comparator control.** Once the switch code falls back to the first
  comparison, the comparator fires again. So the PIB must pass only the
  first pulse. The control is a small state register clocked by the
  comparator clock:
  * ARMED to PULSE when the comparator is seen high;
  * PULSE to DONE when it is seen low again.

  DONE opens the switch between comparator and output, so later comparator
  pulses no longer get through. The complementary switch
  controls `sc[2] = done` and `sc[1] = ~done` come from this one flag, and
  `pib_out_n = ~(comp & armed & sc[1])`. The flag sets on the falling edge
  that ends the first pulse. The register resets asynchronously while
  `pwrup & start` is low.
* **Clean restart.** The switch controller sees the comparator only while
  `pwrup & start` is high. Without this, a comparator output left high by
  the previous measurement would keep the second-comparison switches closed
  when the next measurement starts.

### Time-to-voltage converter and processing block

* **TVC.** It integrates ideal straight ramps in 5 ps steps,
  `dV = I·dt/C`. The charge current is 60 µA, the discharge current is
  5 µA and the capacitor is 1 pF. A 10 ns input reaches 0.6 V, which stays
  under the 1.2 V rail. The voltage never goes below 0 V.
* **Processing block.** A second comparator compares the capacitor voltage
  with 1 mV. This threshold is low because a higher one cuts off the end of
  the slow discharge: a 10 mV threshold lost about 2 ns, which is three
  counts.
* **Counter.** `dp_counter` counts on the 2 GHz clock while enabled. On the
  falling edge of the enable it copies the count into `data` and sets
  `valid`. While `valid` is set, nothing changes until the synchronous
  clear, which is `~start`.

### Clocks, references, calibration and I/O

* **Clocks.** `clock_generator` is a NAND gate plus six inverters in a
  ring, each stage with delay τ. A toggle flip-flop divides the ring
  frequency by two to square the duty cycle.
  * τ = 17.85 ps gives a 4 GHz ring and a 2 GHz counter clock.
  * τ = 14.29 ps gives the 2.5 GHz comparator clock.
  * `pwrup` low stops both clocks.
* **References.** `ref_generator` supplies 90 %, 50 % and 10 % of 1.2 V
  from a resistor string when `int_ref_en` is high. When it is low, the
  external pins are used.
* **Calibration.** With `cal_en` high, `vin1` is replaced by a 1 ns,
  full-swing pulse triggered by `start`. Measured in pulse-width mode it
  gives about 24 counts in theory. Because of the 400 ps quantisation the
  simulation reads 19 (800 ps).
* **I/O.** `io_gate` models the tri-state buffers. With `io_en` low, the
  inputs are gated off and `data`/`valid` read 0 with `data_oe` low.

## HTDC

* **Mixer.** The clocks are square waves of amplitude ±0.6 V around 0.6 V.
  Their product is +A² while the clocks agree and −A² while they differ.
  The mixer output average therefore falls linearly with the delay, from
  0.96 V at zero delay to 0.24 V at half a period.
* **Non-overlapping clocks.** An 800 MHz master clock is divided by 8 into
  a 10 ns sampling period. The four phases are:
  * φ1 in slots 1–2 and φ1d in slots 1–3;
  * φ2 in slots 5–6 and φ2d in slots 5–7.

  Assertions check that the φ1 and φ2 phases never overlap.
* **Low-pass filter.** `sc_lpf` is a second-order section with fc = 120 kHz
  and Q = 0.707. It is updated once per φ1 with the exact average of the
  mixer output since the last update. This makes the filter see the true
  DC value of a GHz waveform without sampling aliasing.
* **Delta-sigma modulator.** It is first order, with references 1.2 V /
  0 V:
  * it samples on φ1;
  * on φ2 it adds `(vin − VCM) − (vfb − VCM)` to the integrator;
  * its flip-flop chooses the feedback reference.

  The density of ones equals `vin / 1.2 V`.
* **Decimation filter.** It counts the ones in each window of OSR = 32
  samples and latches the sum with a strobe.

Example at 1 GHz with the default settings:

| delay | filtered input | counts per 32 samples |
|-------|----------------|-----------------------|
| 0 ps | 0.96 V | 25.6 |
| 125 ps | 0.78 V | 20.8 |
| 250 ps | 0.60 V | 16.0 |

The slope is 38.4 counts per clock period of delay, that is 0.038 counts
per ps at 1 GHz.

## Verification

* Every module has a self-checking testbench `tb/tb_<module>.sv` that ends
  with `TB_RESULT checks=N failures=M` and has a watchdog.
* `tb_otm_top` runs the top with default parameters:
  * all 14 intervals from 400 ps to 3 ns in all four PTMA modes;
  * the 16 measurements of the fabricated chip (2.1 ns to 3.5 ns across the
    four modes) and a 9 ns rise time, which needs 216 of the 255 counts;
  * calibration, external references and isolated I/O;
  * in parallel, three HTDC delays on a 1 GHz clock.

  It counts each mechanism separately and checks every result against the
  formulas above.

To run one testbench with plain Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_otm_top \
    rtl/ptma_pkg.sv $(ls rtl/*.sv | grep -v ptma_pkg) tb/tb_otm_top.sv
./obj_dir/Vtb_otm_top
```

`ptma_pkg.sv` must come first. `-Wno-fatal` keeps Verilator's warnings about
the testbenches' computed delays from stopping the build. The full run takes about 20 s of wall time
and simulates 75 µs.

## Where this model departs from the original design

* **Switch codes.** The codes follow the published truth table. A worked
  example in the original description disagrees with that table; the table
  was kept because it gives a working comparison in every mode.
* **Currents.** One passage uses 40 µA / 8 µA, which gives a resolution of
  100 ps. The measured chip uses 60 µA / 5 µA, and that pair is used here.
  The capacitor value is not published; 1 pF is used.
* **Conversion time.** With 60 µA / 5 µA a 9 ns rise time needs 108 ns to
  convert. The original quotes 56 ns for that case, which would need a
  smaller current ratio.
* **Comparator control edge.** The flag sets at the end of the first pulse,
  as the description says. It is not taken from the clock path of the
  circuit drawing.
* **Quantisation.** The original chip reads the 1 ns calibration pulse as
  24. This model reads 19, because the 400 ps comparator clock shortens the
  pulse to 800 ps. The fabricated chip errs by -260 ps to -330 ps, and this
  model's errors are within the same one-clock band.
* **Own choices.** These values are not published and were chosen here:
  * the 2.5 GHz comparator clock made with a second ring of shorter stages;
  * the 1 mV end-of-discharge threshold;
  * the resistor ratios of the reference string;
  * the HTDC mixer amplitude;
  * the HTDC modulator references;
  * the position of the non-overlapping clock edges within the period.

## Not modelled / limits

* Transistor-level parts have no digital model:
  * the comparator bias circuit;
  * the op-amps of the switched-capacitor stages;
  * the jitter analysis of the divide-by-two stage.

  They are represented by ideal behaviour inside the models that use them.
* Analogue non-idealities are not modelled: switch on-resistance, charge
  injection, comparator offset and noise.
* HTDC resolution in the femtosecond range is not reached with this mixer
  model. One decimation window can hold at most 32 counts, and one count
  is worth about 26 ps of delay at 1 GHz.
