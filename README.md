# Flash ADC with a double-base logarithmic encoder

A flash ADC normally ends in an encoder that turns the comparators'
thermometer code into a binary number. A DSP working in a logarithmic number
system would then have to convert that binary number into its own format
before it could use it. This design skips the conversion. Its encoder, the
double-base log encoder (DBLE), outputs each sample directly as two signed
exponents `(b, t)`:

    sample  ≈  2^b · 3^t   volts

In this format a multiplication is just an addition of exponents. The
encoder is a ROM with one row per ADC level, so the speed of the flash
architecture is kept: one new sample per clock, one clock of latency.

This RTL covers the 6-bit version. The input range runs from about 542 mV to
1050 mV. Both exponents are 9-bit two's complement numbers in [-256, 256).
Every output lies within 0.15 LSB of its level's nominal voltage.

## Signal path

```
 vin_mv ──► 63 TIQ comparators ──► 0-1 generator ──► binary-exponent ROM ──► sense amps ──► exp_out.b
 (real)     thermometer code       64 one-hot     ├► ternary-exponent ROM ─► sense amps ──► exp_out.t
                                   word lines     └──────────────────────────────────────► code_onehot
```

| Module | Kind | Role |
|---|---|---|
| `dble_pkg` | package | Sizes, the `dlns_t` type `{b, t}`, and the ROM contents |
| `tiq_comparator_bank` | behavioural model | 63 threshold comparators, producing a thermometer code |
| `zero_one_generator` | logic | Thermometer code to one of 64 word lines |
| `nor_rom_array` | logic | NMOS NOR ROM with active-low bit lines. It is used twice. |
| `sense_amp` | logic | Clocked sense amplifiers that invert and latch the bit lines |
| `dble_encoder` | logic | The two ROM arrays plus 18 sense amplifiers |
| `flash_adc_dble` | top | The whole converter |

### Comparators (`tiq_comparator_bank`)

In silicon these are threshold-inverter-quantisation (TIQ) comparators: each
one is a pair of inverters, sized so that it switches at its own threshold.
They are analog, so this file is an ideal behavioural model with a `real`
input in millivolts and no offset, noise or delay.

Level `k` (k = 0…63) stands for `V(k) = 550 mV + (k−1)·LSB`, where
`LSB = 500/62 mV ≈ 8.065 mV`. Comparator `i` switches at the midpoint between
levels `i−1` and `i`. Inputs below 546 mV give level 0. Inputs above about
1046 mV give level 63.

### 0-1 generator (`zero_one_generator`)

It raises `word_line[k] = therm[k] & ~therm[k+1]`. The two end rows are
special:
- `word_line[0] = ~therm[1]`, so level 0 also gets a ROM row.
- `word_line[63] = therm[63]`.

Bubbles in the thermometer code are not corrected. The top has an assertion
that the word lines are one-hot.

### ROM arrays (`nor_rom_array`) and sense amplifiers (`sense_amp`)

Each column has a bit line that is precharged high. A stored 1 is an NMOS
transistor from the bit line to ground, gated by the row's word line. When a
row is selected, its 1-cells discharge their bit lines, so the array's output
is active low. If several rows were selected at once, the bit lines would
show the OR of their words; that is the wired-NOR behaviour of the real array.

Two arrays share the word lines: 64 × 9 cells for `b` and 64 × 9 cells for
`t`. That gives 18 output columns and 577 programmed cells. The sense
amplifiers latch `~bit_line_n` on the rising clock edge. They have a
synchronous, active-low reset to zero.

## The exponent table

This is the core of the design. For each level `k`, the ROM stores the pair
that minimises `|2^b·3^t − V(k)|` over all `b, t ∈ [-256, 256)`. Because
`log2(3)` is irrational, the values `b + t·log2(3)` for b and t in that range
fall very densely near any target. This is why pairs such as
`(-134, 84) → 549.75 mV` look arbitrary but are accurate.

A wider exponent range gives a smaller worst-case error, and the gain
flattens out at about 2^9. Nine bits (a sign bit plus eight) is the chosen
size.

The table in `dble_pkg` (`B_EXP`, `T_EXP`) was produced by an exhaustive
search. For each `t`, only the two integers `b` next to `log2(V / 1 V) − t·log2(3)`
can be nearest. So each level needs 1024 candidates, and the smallest error
is kept.

Sixteen rows are the originally published reference points: levels 1, 5, 9,
…, 61. For example:

| level | input (mV) | b | t | 2^b·3^t (mV) | error (LSB) |
|---|---|---|---|---|---|
| 1 | 550.00 | −134 | 84 | 549.75 | 0.031 |
| 21 | 711.29 | −10 | 6 | 711.91 | −0.077 |
| 49 | 937.10 | 11 | −7 | 936.44 | 0.081 |
| 61 | 1033.87 | 195 | −123 | 1034.99 | −0.138 |

The search reproduces all sixteen of these published pairs. The other 48
rows come from the same rule. Some figures for the table:
- The worst error over all 64 rows is 0.138 LSB.
- The mean error over the sixteen reference rows is 0.052 LSB.

To use a different input range or exponent width, rerun the same search and
replace `B_EXP`/`T_EXP` and `EXP_W`. The testbenches recompute the search
independently in `tb/dble_ref_pkg.sv`, so they follow such a change
automatically. The only exception is `tb_table1_workload`, which checks
against the published numbers.

## Interface and timing of `flash_adc_dble`

| Port | Dir | Type | Meaning |
|---|---|---|---|
| `clk` | in | logic | sample clock |
| `rst_n` | in | logic | synchronous reset, active low; clears `exp_out` |
| `vin_mv` | in | real | analog input in millivolts |
| `exp_out` | out | `dble_pkg::dlns_t` `{b, t}`, 2 × signed [8:0] | sample as exponents |
| `code_onehot` | out | logic [63:0] | active word line, for observation |

The path from the comparators through the ROM is combinational. `exp_out`
changes at the rising edge and shows the input that was present at that
edge, so the latency is one cycle. The device accepts one sample per cycle.

The reference implementation was a transistor-level 0.18 µm circuit rated at
3.3 GHz. That rating says nothing about this RTL's timing.

## What is and is not modelled

- **Not built: the consumer.** A DSP, for example a FIR filter
  `y(n) = Σ x(n−i)·h(i)` working on `x = 2^b·3^t`, would take `exp_out`. Its
  multiplier and adder circuits are not specified, so it is left out.
- **No sign bit.** Inputs are always positive, so no sign bit is produced
  for the sample value. The exponents themselves are signed.
- **Choices made in this design:**
  - the level spacing (fitted to the published reference inputs)
  - the midpoint thresholds
  - the extra word line for level 0
  - the form of the 0-1 generator
  - the clocked sense amplifiers, with one cycle of latency and a reset
- **Analog behaviour is idealised.** Precharge timing, sense-amplifier
  offsets, comparator offsets and bubble errors are not modelled.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_tiq_comparator_bank` | Sweep and random inputs. The output must be a thermometer code whose level is the nearest nominal level. |
| `tb_zero_one_generator` | Every thermometer code gives exactly the right word line. |
| `tb_nor_rom_array` | Every row of the binary array against the independent search. Also no-row precharge and two-row wired-NOR. |
| `tb_sense_amp` | One-cycle latency, hold between edges, reset. |
| `tb_dble_encoder` | All 64 rows stepped one per clock. Checks (b, t), the 0.15 LSB bound, the sixteen published pairs and the 0.052 LSB mean error. |
| `tb_flash_adc_dble` | End to end at full size: a ramp and 3000 random samples, one per clock. Checks latency, the one-hot row, (b, t), the error bound, and reset. It counts the coverage of all 64 levels and of under- and over-range inputs, and fails if any of them never happens. |
| `tb_table1_workload` | The sixteen published input voltages run through the whole ADC, compared with the printed level, exponents, value and error. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/dble_pkg.sv tb/dble_ref_pkg.sv tb/tb_flash_adc_dble.sv \
    --top-module tb_flash_adc_dble -o sim
./obj_dir/sim
```

Replace the last testbench file and `--top-module` to run another one. Every
testbench finishes in seconds.
