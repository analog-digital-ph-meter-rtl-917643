# Single-chip pH meter: 7-bit successive-approximation A/D with decimal display

A pH sensor produces a voltage that rises linearly with pH, from 0.5 V to
1.0 V. This chip turns that voltage into a reading of pH 1.1 to 13.8, in
steps of 0.1, on three seven-segment digits. It runs from a 3 V battery. The
user presses a momentary "sample" button. That press starts an on-chip
oscillator, the chip converts the voltage, and the oscillator stops again so
that no clock power is drawn between readings.

The conversion is successive approximation. A seven-bit register holds a
guess. A level shifter and an R-2R ladder turn the guess into a voltage, and
an analog comparator says whether the guess is below the sensor voltage. One
bit is decided per clock, msb first.

The 128 codes map straight to 128 tenths of pH, so the chip needs no scaling
logic: code + 11 is the pH in tenths (0 -> 1.1, 127 -> 13.8). A plain
binary-to-BCD converter and three segment decoders finish the job.

A built-in self test replaces the analog loop with a counter and a digital
comparator. It compresses the display outputs of all 128 steps into a
signature and reports go / no-go.

This repository holds:

- synthesizable SystemVerilog for the whole digital part (`ph_meter_core` and
  below);
- behavioural models of the analog parts (level shifters, ladder,
  comparator, oscillator);
- a chip-level top, `ph_meter_chip`, that joins the two;
- a self-checking testbench for every module.

## The conversion loop

```
            +-------------------+   sar/sarn   +---------------+  REF(0..6)  +-----------+
 sample --->| timing_ctrl       |      +------>| level shifter |------------>| R-2R      |
            | (osc on/off,reset)|      |       +---------------+             | ladder    |
            +-------------------+      |                                     +-----+-----+
                                       |                                           | v_dac
            +-------------------+      |                      v_sensor -->+--------v------+
            | sar_register      |------+                                  | comparator    |
            | ctrl: one-hot     |<-------------- keep ---------------------+---------------+
            +-------------------+
```

`sar_register` contains two seven-bit registers:

- `ctrl` is a one-hot control shift register. Its single 1 marks the bit
  being decided.
- `result` holds the bits decided so far.

The value sent out, `trial = result | ctrl`, is the result with the bit under
test forced to 1. At each clock edge, the flip-flop that `ctrl` selects loads
the comparator decision `keep`, and the 1 in `ctrl` moves one place toward
the lsb:

- `keep = 1` means the sensor is above `trial`, so the bit stays 1;
- `keep = 0` means the guess was too high, so the bit becomes 0.

After seven clocks `ctrl` is empty, `done` is high and `result` holds the
reading. A clear loads `ctrl = 1000000` and `result = 0`. An assertion checks
that `ctrl` is always one-hot or empty.

The ladder output is `V = 0.5 V + trial x 0.5 V / 128`, so one step is
3.906 mV. The comparator's decision "sensor above trial" makes the
conversion return

    code = ceil((v_sensor - 0.5 V) / 3.906 mV) - 1      (clamped to 0..127)

For example, a sensor voltage halfway between ladder steps 59 and 60 reads
pH 7.0.

## Start, stop and timing (`timing_ctrl`)

The switch is asynchronous, and the clock is off when it is pressed. So the
press acts directly:

- It sets the `run` flag asynchronously. `run` is the oscillator enable, so
  nothing has to be clocked to wake the chip up.
- It asynchronously clears a two-flop reset synchroniser. The chip-wide
  reset `clear_n` is therefore low while the button is held.
- `clear_n` goes high on the second oscillator edge after the button is
  released.

Then:

| phase                                  | clocks                  |
|----------------------------------------|-------------------------|
| reset release after the switch opens   | 2                       |
| conversion, one bit per clock          | 7                       |
| edge that sees `done` and clears `run` | 1                       |
| **normal reading**                     | **10** (about 10 ms at 1 kHz) |
| one self-test step (7 + 1 restart)     | 8                       |
| **whole self test**                    | **2 + 128 x 8 = 1026**  |

The register keeps its value after the oscillator stops, so the display holds
the reading until the next press. The display decodes the register output at
all times, so the digits change during the seven conversion clocks.

The oscillator model (`clock_oscillator`) defaults to 1 kHz. That is slow
enough for a resistor ladder that takes milliseconds to settle. The real
oscillator's frequency is not known.

## From code to digits

1. **`add_offset`** adds 11. The 8-bit result, 11..138, is the pH in tenths.

2. **`bin2bcd`** converts 0..255 to three BCD digits using three cells
   (`bcd185_cell`). Each cell does the job of a 74HC185 binary-to-BCD
   converter. A cell converts a six-bit number 0..63 into a tens digit (0..6)
   and a units digit. The number's lsb goes straight to the units lsb; only
   the upper five bits are converted.

   The three cells are cascaded as follows. Write the input as
   `v = 4m + r`, with `m = v[7:2]` and `r = v[1:0]`:

   - cell 1 converts `m` into `10 t1 + u1`;
   - cell 2 converts `{u1, r}`, which equals `4 u1 + r`, into `10 t2 + u2`.
     `u2` is the final units digit;
   - so `v = 40 t1 + 10 t2 + u2`. Because `t2 <= 3`, the tens count
     `4 t1 + t2` is simply the bit string `{t1, t2[1:0]}`. Cell 3 converts it
     into hundreds and tens.

   The testbench checks all 256 inputs.

3. **`bcd_to_7seg`**, one per digit, drives the segments. They are active
   high, in the order `{g,f,e,d,c,b,a}`. 6 and 9 have tails. Codes 10..15
   are blank.

4. The leading digit (tens of pH) is blanked when it is 0, so pH 7.0 shows as
   " 7.0". The decimal point after the middle digit is assumed to be
   permanently lit on the display, so the chip has no output for it.

## Built-in self test

Setting `test_mode = 1` and pressing `sample` runs the self test. In test
mode:

- **Digital comparator replaces the analog path.** The comparator feedback
  into the approximation register comes from `digital_comparator` instead of
  the analog comparator. Its input is the 7-bit `test_counter`.
- **The test is "greater than or equal".** The digital comparator keeps a
  bit when `count >= trial`. The analog path in effect tests "greater than".
  With ">=", converting an integer count returns exactly that count, so every
  step has one known display.
- **One step per conversion.** Each completed conversion is one step. In
  that clock cycle the signature register takes in the 21 segment lines, the
  counter advances, and the conversion restarts.
- **The oscillator stops after step 127.** The register keeps the last
  reading (13.8).
- **Pad outputs.** The analog comparator output goes to `comp_pad` and the
  clock to `clk_pad`, so the analog half can be checked from outside. Both
  pads are 0 outside test mode.

`signature_register` is a 21-bit multiple-input signature register, one bit
per segment line. Each step it computes:

    sig <= (sig << 1) ^ (sig[20] ? 21'h000005 : 0) ^ segments

That is a Galois LFSR with polynomial x^21 + x^2 + 1, seeded with 0 by the
reset. On the last step the new signature is compared with the hard-wired
`GOOD_SIGNATURE = 21'h1CCDCB`, and `go_nogo` is set if they match.

This constant depends on the segment patterns and on the leading-zero
blanking. If you change either, recompute it: `tb/tb_ref_pkg.sv` has
`good_signature()`, which runs the same recurrence over
`display_ref(0..127)`.

## Analog parts and the voltage convention

The analog blocks are behavioural models, not circuits. They pass voltages
as unsigned 32-bit integers in nanovolts (`ph_meter_pkg::volt_nv_t`). These
integers elaborate in synthesis front ends that reject `real`, and
0.5 V / 128 = 3 906 250 nV is exact.

| model               | what it does |
|---------------------|--------------|
| `ref_level_shifter` | Per bit, REF(N) is 1.0 V when SAR(N)=1 and SARN(N)=0, and 0.5 V for the reverse. If SAR(N) and SARN(N) are not complementary, it outputs the midpoint. |
| `r2r_ladder`        | Solves the ladder exactly from the bottom up with its Thevenin equivalent (resistances in milliohms). R = 30 kohm and 2R = 60 kohm are parameters, so ratio errors can be studied. The bottom 2R termination goes to the 0.5 V reference. Settling time is not modelled. |
| `analog_comparator` | `vout = VP > VN + OFFSET_NV`. The sensor goes on VP, the ladder on VN. |
| `clock_oscillator`  | Toggles every `HALF_PERIOD_NS` while enabled. Held low while off. |

The diode references (0.5 V and 1.0 V) are analog bias circuits. They enter
the chip top as the ports `v_ref_lo` and `v_ref_hi`, and `v_ref_lo` is also
the ladder bottom. Pads are not modelled.

## Top-level interface (`ph_meter_chip`)

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `sample`        | in  | 1     | momentary switch, active high |
| `test_mode`     | in  | 1     | 1 = built-in self test |
| `v_sensor`      | in  | 32    | sensor voltage, nV |
| `v_ref_lo`      | in  | 32    | 0.5 V reference, nV |
| `v_ref_hi`      | in  | 32    | 1.0 V reference, nV |
| `seg[2:0]`      | out | 3x7   | segments `{g..a}`; `seg[2]` is the leftmost digit |
| `go_nogo`       | out | 1     | self test matched the good signature |
| `selftest_done` | out | 1     | self test has finished |
| `comp_pad`      | out | 1     | analog comparator, test mode only |
| `clk_pad`       | out | 1     | clock, test mode only |
| `busy`          | out | 1     | oscillator running |

Parameter: `OSC_HALF_PERIOD_NS` (default 500 000, which gives 1 kHz).

`ph_meter_core` has the same digital ports. It replaces the voltage ports
with `clk` (from the oscillator), `cmp_analog` (from the comparator), `sar`
and `sarn` (to the level shifters), and `osc_en`.

## Files

| file | contents |
|------|----------|
| `rtl/ph_meter_pkg.sv` | widths, offset 11, nanovolt type, segment and BCD types |
| `rtl/ph_meter_chip.sv` | chip top: core plus analog models |
| `rtl/ph_meter_core.sv` | digital part: all blocks below, the test-mode select and the pads |
| `rtl/timing_ctrl.sv` | switch, reset synchroniser, oscillator enable, self-test steps |
| `rtl/sar_register.sv` | approximation and control registers |
| `rtl/test_counter.sv`, `rtl/digital_comparator.sv`, `rtl/signature_register.sv` | self test |
| `rtl/add_offset.sv`, `rtl/bin2bcd.sv`, `rtl/bcd185_cell.sv`, `rtl/bcd_to_7seg.sv` | display path |
| `rtl/ref_level_shifter.sv`, `rtl/r2r_ladder.sv`, `rtl/analog_comparator.sv`, `rtl/clock_oscillator.sv` | behavioural analog models |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_core_128_steps.sv` | all 128 input steps as separate readings, with an external counter and comparator |
| `tb/tb_ref_pkg.sv` | independent reference models: segment patterns, expected display, signature |

## Simulating

Use Verilator 5 with timing support. For example, the end-to-end chip test at
default parameters:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ph_meter_pkg.sv tb/tb_ref_pkg.sv tb/tb_ph_meter_chip.sv --top-module tb_ph_meter_chip
    ./obj_dir/Vtb_ph_meter_chip

Substitute any other testbench name. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

`tb_ph_meter_chip` does the following:

- takes nine readings (pH 1.1, 13.8, a value near 7.0, 10.0 and others);
- checks each reading's display and its duration (9 to 11 clock periods);
- runs the full 1026-clock self test and requires `go_nogo`;
- counts that each mechanism happened: readings, oscillator stops, blanked
  and two-digit displays, pad clock edges, comparator-pad activity, and a
  passing self test.

It simulates about 1.2 s of chip time in well under a second.

Power-up state is not defined. Flip-flops start random in a two-state
simulator, so the first press of `sample` is what puts the chip in a known
state. Every testbench presses it (or clears the block) before checking
anything.

## Design choices not fixed by the original description

- Sequencing:
  - the two-clock reset release;
  - stopping the oscillator on the clock after `done`;
  - the one-clock restart between self-test steps;
  - stepping the counter once per conversion.
- Forming `trial` by OR-ing the control register into the result.
- Display:
  - the display follows the register during a conversion;
  - the leading digit is blanked when it is 0;
  - the decimal point has no output.
- Segment patterns and polarity.
- Signature register width, polynomial, seed and the resulting good
  signature.
- The cascade of three 74HC185-type cells. Inside each cell the logic is a
  divide and remainder by ten, which has the same truth table as the part.
- Oscillator frequency.
- Analog models: ideal comparator, instant ladder, nanovolt integers. Switch
  bounce is not filtered.
- Where the self-test decode taps in. One reading of the self-test diagram
  feeds the add-11 stage from the counter. Here it is fed from the
  approximation register, as in normal mode. That way the signature covers
  the register and the digital comparator as well as the display logic.
