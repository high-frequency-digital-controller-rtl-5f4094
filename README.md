# Digital PWM controller for a 1 MHz DC/DC converter

This is a voltage-mode PWM controller for a switching DC/DC converter. It
regulates a buck converter's output at 2.7 V, switching at 1 MHz, and
needs almost no analog circuitry. It is built on three ideas, each of which
makes one block small:

* **The error only needs a few values.** A regulator has to hold its output
  inside a narrow window around the reference, so the A/D converter must have
  a fine step (about 40 mV) but only a small range. The converter here outputs
  just nine codes, e = -4 … +4.
* **A nine-valued error makes table look-ups cheap.** The control law
  `d(n+1) = d(n) + A(e(n)) + B(e(n-1)) + C(e(n-2))` is computed from three
  programmable 9-entry tables and one adder. No multiplier is needed, and any
  linear or nonlinear law can be loaded.
* **Fine timing comes from a ring oscillator, not a fast clock.** An 8-bit
  DPWM at 1 MHz would need a 256 MHz counter clock. Here, a 32-cell ring
  oscillator supplies 5 bits of timing and a 3-bit counter the other 3. The
  ring runs at 8 MHz, and that is also the system clock of the whole chip.

The A/D converter is itself a chain of logic gates. It runs from the voltage
it measures: a higher supply makes the gates faster, so a test pulse travels
further along the chain in a fixed time.

The design follows the architecture and sizes of a published prototype
controller IC: an 8-bit hybrid DPWM, 1 MHz switching, an 8 MHz system clock,
an 8-tap delay-line A/D converter and 8/9/8-bit tables. The sections below
mark where this RTL makes its own choices.

## Block diagram and files

```
            v_sense (real)                           out = c(t)
                │                                        ▲
     ┌──────────▼──────────┐ e(n)  ┌─────────────────┐ d ┌─┴──────────────┐
     │ analog_switch       │──────▶│ lut_compensator │──▶│ hybrid_dpwm    │
     │ delay_line (model)  │       │ tables A,B,C    │   │ counter, cmp,  │
     │ delay_line_adc      │◀─cnt──│ adder, d(n) reg │   │ mux, SR latch  │
     │  └ thermo_encoder   │       └───────▲─────────┘   └──▲─────┬───────┘
     └─────────────────────┘               │ table writes   │taps │sys_clk
                                   ┌───────┴────────┐   ┌───┴─────┴──┐
        external memory ◀────────▶ │ lut_loader     │   │ dpwm_ring  │
                                   └────────────────┘   │ (model)    │
                                                        └────────────┘
```

| file | kind | what it is |
|---|---|---|
| `rtl/dpwm_ctrl_pkg.sv` | package | error-code type, table select enum, table-write struct |
| `rtl/dpwm_controller_top.sv` | RTL top | wires everything; real-valued `v_sense`/`v_ref` ports |
| `rtl/hybrid_dpwm.sv` | RTL | counter, two comparators, 32:1 tap mux, output SR latch, duty clamp |
| `rtl/dpwm_ring.sv` | behavioural model | 32-cell self-oscillating ring, start/stop |
| `rtl/delay_line.sv` | behavioural model | supply-dependent gate delay line, 8 taps |
| `rtl/analog_switch.sv` | behavioural model | V_ref / V_sense switch for calibration |
| `rtl/delay_line_adc.sv` | RTL | test/sample/select timing, sample flip-flops, calibration registers |
| `rtl/thermo_encoder.sv` | RTL | thermometer code → signed code |
| `rtl/lut_compensator.sv` | RTL | three tables, adder, 10-bit accumulator |
| `rtl/lut_loader.sv` | RTL | power-up table load from external memory |

The ring oscillator, the delay line and the input switch are behavioural
models: they use `#` delays and `real` voltages, and they will not
synthesize. On silicon the ring and the delay line are ordinary standard
cells, but their behaviour *is* their analog delay. Everything else is
synthesizable. It runs on one clock, `sys_clk`, except for the DPWM's output
latch.

## The hybrid DPWM and its slot arithmetic

This is the part that most needs care, because its timing is asynchronous.

The ring holds one travelling pulse. Tap `q[j]` pulses once per revolution,
and successive taps pulse one cell delay apart, so one revolution of 32 cells
is split into 32 slots. The counter advances once per revolution. Eight
revolutions make one switching period, which therefore has 256 slots:

```
slot s = cnt * 32 + j        (cnt = counter, j = tap currently pulsing)
```

* **Set.** At slot 0 (`cnt == 0` and tap 0 pulses), the output latch is set.
* **Reset.** At slot d (`cnt == d[7:5]` and the multiplexer, steered by
  `d[4:0]`, passes the pulse of tap `d[4:0]`), the latch is reset.
* **Result.** The output is high for exactly d slots, so the duty ratio is
  d/256.

Race-free ordering is the delicate point. The set and reset terms AND a tap
with a comparison against the counter. If the counter changed while a tap
used in such a term was high, a zero-delay simulation (and real silicon)
would show a spurious pulse. This design avoids that as follows:

* the counter (and every other flip-flop) is clocked by
  `sys_clk = ~q[31]`, i.e. on the *falling* edge of the last tap;
* in the ring model, each tap is high for only half a cell delay, so that
  edge falls in a gap where no tap is high.

If you replace the ring model with a real ring whose pulses overlap, keep
this rule: the counter must change only while the taps that feed the
set/reset terms are low.

Other details:

* `d_in` and `en` are registered at the start of each period. A command that
  changes mid-period takes effect in the next period.
* The command is clamped to 8 … 249, i.e. 3.1 % … 97.3 %. These are the
  minimum and maximum duty ratios measured on the prototype. How the
  prototype enforced them is not known.
* The output latch is an `always_latch` with reset dominant. It is the only
  latch in the design, and it is intended.
* `ring_run` low stops the ring within one cell delay. Every clock stops with
  it, and the output latch keeps its state, so clear `en` (or assert reset)
  before you stop the ring.

Default timing: a 1000/256 ns cell delay, so 1 µs periods and a 125 ns
`sys_clk`.

## The delay-line A/D converter

### Basic mode (`CALIBRATE = 0`, the default)

Per switching period, with eight 125 ns slots:

| slot | 0 … 5 | 6 | 7 |
|---|---|---|---|
| `test` | 1 | 1 | 0 (line reset) |
| action | pulse travels | taps captured at start of slot | all cells cleared |

1. **Conversion.** The conversion time is 6/8 of a period (750 ns).
2. **Encoding.** `thermo_encoder` counts the ones in the captured taps.
   The error is `e = 4 - ones`. So the pattern with the first four taps set
   (`q1..q4 = 1111`, `q5..q8 = 0000`) is e = 0, and a low output gives a
   positive error.
3. **Validity.** `e` is valid during slot 6 (`e_valid`).
4. **Compensator.** The compensator updates at the start of slot 7.
5. **DPWM.** The DPWM uses the new duty ratio from the next period on.

Counting ones, rather than finding the first zero, is this design's choice.
It also tolerates a bubble in the code.

### The delay-line model

`delay_line.sv` uses the first-order gate delay
`t_d = K·V/(V − V_th)²` with V_th = 0.8 V. Each step of the pulse uses the
supply voltage *at that moment*, so the result is an average of V_sense over
the conversion. This averaging is what gives the converter its immunity to
switching spikes.

The sizing is this design's own choice, standing in for a transistor-level
design:

* `K` is chosen so that 2.7 V lands half-way between taps 4 and 5 at 750 ns;
* the first tap is cell 33;
* one tap then corresponds to about 40 mV, and the nine codes span about
  ±180 mV.

`K_SCALE` stretches all delays, to mimic process or temperature drift.

### Calibrated mode (`CALIBRATE = 1`)

The line's delay drifts with process and temperature, and so does the
voltage it regulates to. Calibrated mode corrects this by converting twice
per period, with the same line:

| slot | 0 1 2 | 3 | 4 5 6 | 7 |
|---|---|---|---|---|
| `select` | 0 (V_ref) | 1 | 1 (V_sense) | 0 |
| `test` | 1 | 0 | 1 | 0 |
| captures | start of slot 2: reference | e_ref stored | start of slot 6: sense | result stored |

1. **Reference conversion.** In the first half the line converts the precise
   reference. Its code, `e_ref = ones_ref − 4`, is stored when `select` rises.
2. **Sense conversion.** In the second half the line converts V_sense.
3. **Result.** When `select` falls, the output register loads
   `e = e_ref − (ones_sense − 4)`, limited to ±4.
4. **Why it works.** Any offset common to both conversions cancels, and the
   sign still means "output too low ⇒ positive e".

Consequences:

* Each conversion now has only 2 slots (250 ns); the top module sizes the
  line model for that automatically.
* The result arrives one slot later than in basic mode.
* The reference conversion need not be repeated in every period.
  `CAL_INTERVAL = N` runs it in one period of N: the first after reset, and
  every Nth after that.
  * In the other periods the line stays reset during the first half, which
    saves its switching power.
  * `e_ref` keeps its last value, and it is 0 until the first reference result.
  * The default is 1, i.e. every period.

The slot positions are this design's choice; only the half-period split is
given by the original timing.

## The look-up-table compensator

* **Tables.** Three tables of nine entries, with entry `e + 4` addressed by
  e(n), e(n−1) and e(n−2). Entries are two's complement: 8 bits for A,
  9 bits for B, 8 bits for C.
* **PID example.** For a PID law the entries are `a·e`, `b·e`, `c·e`.
* **Accumulator.** The sum of the tables and the previous value is kept as a
  10-bit signed accumulator, `d(n)`. This design limits it to 0 … 511, so it
  never wraps.
* **Duty command.** `d = acc[8:1]`, i.e. the sign bit and the LSB are
  dropped, so table entries are in units of half a duty LSB.
* **Timing.** The update takes one clock after `e_valid`.

**Storage size.** The original description gives 8/9/8-bit entries, which
total 225 bits, but also states 234 bits in total. The RTL follows the
per-table widths (`A_W`, `B_W`, `C_W` are parameters).

Assertions check that `e` stays within ±4 and that table writes are in range.

**Power-up programming (`lut_loader`).** After reset the loader reads
external words 0…26 one per clock:

* A occupies words 0–8, B 9–17 and C 18–26;
* within a table, word i holds the entry for e = i − 4;
* each word is 9-bit two's complement;
* the memory must be asynchronous and answer within one 125 ns clock.

`ready` rises on the 29th clock after reset. Only then are the A/D
converter, the compensator and the DPWM output enabled, and until then `out`
stays low. The memory organisation and this handshake are this design's
choices.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it establishes |
|---|---|
| `tb_hybrid_dpwm` | pulse width = clamp(d)·3.906 ns (±10 ps) for 19 values incl. 0, 5, 249, 255; 1 µs period; 125 ns clock; mid-period command changes ignored; output off with `en` low |
| `tb_dpwm_ring` | one tap at a time, in order, 3.906 ns apart; 125 ns revolution; stop and restart on tap 0 |
| `tb_delay_line` | tap codes from 2.45 V to 2.95 V against an independent computation of the delay law; zero code at 2.7 V; bins 30–50 mV; immediate clear; slower line gives fewer taps |
| `tb_thermo_encoder` | all 256 input patterns |
| `tb_delay_line_adc` | slot-by-slot timing of `test`, `sample`, `select`, `e_valid` in both modes; captured codes, e, e_ref with random taps; reference conversion every 4th period |
| `tb_lut_compensator` | random tables and error sequences against a reference model, incl. both accumulator limits; no update with `run` low |
| `tb_lut_loader` | every word read once and written to the right table entry; `ready` timing; reload after a second reset |
| `tb_analog_switch` | select polarity |
| `tb_dpwm_controller_top` | closed loop at default parameters (details below) |
| `tb_controller_calibration` | both A/D modes with a delay line 10 % slower than designed (details below) |

**Closed-loop test (`tb_dpwm_controller_top`).** The controller drives a
switched buck model (`tb/buck_model.sv`) and loads PID tables from
`tb/ext_memory_model.sv`. The power stage is 5 V in, 1 µH / 100 µF, with an
assumed 50 mΩ ESR and DCR. The PID coefficients are a = 25, b = −24, c = 1,
chosen for this test; the original coefficients are not published. The test
covers:

* power-up load of the tables;
* soft start from zero duty, settling at 2.69 V (inside the zero-error bin)
  after about 106 µs;
* a 1 A → 2 A load step, during which the output stays within
  2.604 … 2.750 V, inside the ±180 mV A/D range;
* a 5 V → 6 V line step;
* a reset and reload.

Throughout, every output pulse width is checked against the duty command of
its period. The run takes about one second of wall time.

**Calibration test (`tb_controller_calibration`).** With a delay line 10 %
slower than designed, the uncalibrated controller regulates to 2.84 V and
the calibrated one to 2.70 V. So does a calibrated controller that repeats
its reference conversion only every eighth period, which uses 22 test
pulses where the every-period one uses 40.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_dpwm_controller_top rtl/dpwm_ctrl_pkg.sv tb/tb_dpwm_controller_top.sv
./obj_dir/Vtb_dpwm_controller_top
```

Replace the module name to run any other testbench. The testbenches need no
data files.

## How far to trust it, and where it departs from the original

* **Faithful:**
  * the architecture: A/D → three-table compensator → hybrid DPWM, with a
    ring-derived system clock and power-up table loading;
  * all sizes: 8-bit DPWM = 3-bit counter + 32-cell ring, 1 MHz / 8 MHz,
    8 taps, nine error codes, 8/9/8-bit entries, 10-bit adder reduced to
    8 bits;
  * the 6/8-period conversion time and the end-of-period line reset;
  * the calibration principle: reference in one half-period, sense in the
    other, subtract.
* **This design's own choices:**
  * the encoder;
  * the exact slot of every strobe in calibrated mode;
  * the counter clock edge and the tap-to-mux numbering;
  * the duty clamp mechanism;
  * accumulator limiting and reset values;
  * the external-memory format and handshake;
  * all delay-line and ring model constants.
* **Regulation point.** The prototype's delay line was sized for a
  reference of about 2.5 V, but it measured 2.7 V, and the converter was run
  at 2.7 V. The model is centred on 2.7 V with 40 mV steps. The measured
  zero-error bin was about 53 mV wide.
* **Ring frequency.** The original text gives the ring frequency once as
  2^n_c·f_s and once as 2^n_d·f_s. Only 2^n_c·f_s matches the 8 MHz it
  quotes, and that is what is built.
* **Calibration sign.** The sign convention of the calibration subtraction
  is stated both ways in the original. This design uses `e_ref − sense`
  with a rising-with-voltage code, which gives the correct loop polarity.
* **Not built:**
  * DLL-based calibration;
  * frequency tuning by extra delay elements in the ring;
  * non-consecutive delay-line taps (the model has a `TAP_STEP` parameter,
    but the sizing assumes 1).
* **Outside the chip and not modelled in `rtl/`:** the external memory, the
  bandgap reference and the power stage. Simple models of the memory and
  the power stage are in `tb/`.
* **Limits of the behavioural models.** They reproduce timing only to the
  extent of their simple equations. Metastability of the tap-sampling
  flip-flops, which on silicon sample an asynchronous pulse, is not modelled.
