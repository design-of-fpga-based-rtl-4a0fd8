# A sampled P/PI/PD/PID controller in fixed-point logic

This is a digital PID controller built entirely from adders, multipliers, a
divider and registers, meant to replace a microcontroller or PC in a simple
control loop. Once per sampling period it reads a set point `SP` and a plant
measurement `Y` and computes

    ERR(k)  = SP - Y(k)
    POUT(k) = KP * ERR(k)
    IOUT(k) = IOUT(k-1) + KI * TS * ERR(k)           (backward-shift integral)
    DOUT(k) = KD / TS * (ERR(k) - ERR(k-1))          (backward-shift derivative)
    PID_OUT = round(POUT + IOUT' + DOUT')

`IOUT'` and `DOUT'` are the integral and derivative terms, each passed or
zeroed by one of two select bits. The bits pick the controller structure:

| DC | IC | structure |
|----|----|-----------|
| 0  | 0  | P         |
| 0  | 1  | PI        |
| 1  | 0  | PD        |
| 1  | 1  | PID       |

The gains `KP`, `KI`, `KD` and the sampling time `TS` are plain inputs. They
can be retuned from outside without touching the logic. The only clock is
`Mclk`, which must run at 32 times the sampling rate.

The design follows a published FPGA controller. Its structure comes from that
source: the blocks, the bus widths, the sign-magnitude multipliers, the
sequential `KD/TS` divider, the divide-by-32 clock, the latch-select stage,
the rounding final adder and the first-order test plant. The binary-point
positions, the saturation behaviour, the in-period schedule and the reset are
choices of this implementation. They are marked as such below and in each
file's header.

## Number formats

Everything is integer arithmetic on fixed-point words. Getting the binary
points right is the hard part of reading the RTL. All of them are defined in
`rtl/pid_pkg.sv`.

| signal              | bits | format                | range / step                     | origin |
|---------------------|------|-----------------------|----------------------------------|--------|
| `SP`, `Y`           | 8    | signed integer        | -128 .. 127                      | width from source |
| `ERR`               | 16   | signed Q8.8           | -128 .. 127.996                  | from source |
| `KP`, `KI`, `KD`    | 12   | unsigned Q4.8         | 0 .. 15.996, step 1/256          | width from source, point chosen |
| `TS`                | 8    | unsigned Q0.8 seconds | 3.9 ms .. 996 ms, step 3.9 ms    | width from source, point chosen |
| `POUT/IOUT/DOUT`    | 20   | signed Q12.8          | ±2047.996                        | width from source, point chosen |
| `KD/TS` quotient    | 20   | unsigned Q12.8        | 0 .. 4095.996                    | chosen |
| `PID_OUT`           | 12   | signed integer        | -2048 .. 2047                    | from source |
| `KS` (test plant)   | 8    | unsigned Q0.8         | 0 .. 0.996                       | width from source, point chosen |

The source gives the gain range as "0.0-16.99" and `TS` as "1.00-1000.00 ms"
in 8 bits. Neither fits its word exactly. The formats above are the closest
that do, and they hold the evaluation settings exactly: 0.125 is 32 and 0.5
is 128 in every format.

Because `SP` and `Y` are integers, the fraction byte of `ERR` is always zero
in this design. It is kept because the rest of the datapath is scaled for it.

### Sign-magnitude multiplication

Each term is formed the way the source draws it. A multiplier works on the
magnitude of the signed operand and the unsigned constants. Then a
"conditional two's complement" stage negates the result only when the error
(or the change in error) was negative. In detail:

- **P**: `|ERR| * KP` is a Q12.16 value. It is shifted right 8 bits.
- **I**: `|ERR| * KI * TS` is a Q12.24 value. It is shifted right 16 bits.
- **D**: `|ΔERR| * (KD/TS)` is a Q20.16 value. It is shifted right 8 bits.

Each magnitude is then limited to 19 bits (2^19 - 1) and the sign is applied.
Truncating the magnitude means every term rounds toward zero. So a very small
error gives exactly zero, whatever its sign. A reference model that floors
negative products will disagree with this design by one LSB.

### Saturation and rounding (choices of this design)

- `SP - Y` needs 9 bits. It saturates to the 8-bit integer range of `ERR`.
- `ERR(k) - ERR(k-1)` saturates to 16 bits. The 16-bit subtractor's overflow
  output is used for this.
- The integral accumulator saturates at ±(2^19 - 1) instead of wrapping.
- The final sum is 22 bits wide, so it cannot overflow. It is rounded to the
  nearest integer, with ties going up (+0.5 rounds to 1, -0.5 rounds to 0).
  The result is then saturated to 12 bits.
- The test plant rounds the same way and saturates its 12-bit state. Its
  8-bit `Y` output is that state saturated to -128 .. 127.

## One sample period: the 32-cycle schedule

`KD/TS` is computed by a radix-2 restoring divider that produces one quotient
bit per `Mclk` cycle. A 20-bit quotient takes 20 cycles. This divider is why
`Mclk` is 32 times the sample rate. `clock_control` is a 5-bit counter, the
five divide-by-two flip-flops of the source. It splits each period into
one-cycle enables:

| phase (Mclk cycle) | enable      | action |
|--------------------|-------------|--------|
| 0                  | `div_start` | divider samples `KD`, `TS` and starts |
| 1 .. 20            | —           | one quotient bit per cycle; quotient loaded at the end of 20 |
| 28                 | `err_en`    | error latch takes `SP - Y` |
| 29                 | `ctrl_en`   | P, I and D latches load; D's previous-error latch takes `ERR(k)` |
| 30                 | `out_en`    | I/D select latches load (zero if the term is disabled) |
| 31                 | `sample_en` | `PID_OUT(k)` is final; the test plant loads `Y(k)` |

Every register is clocked by `Mclk` and loaded through one of these enables.
The source's "latches enabled by CLK" therefore become ordinary enabled
flip-flops, and there is a single clock domain. `clk_out` is the divided
clock (counter MSB, `Mclk/32`) and is only an output.

Timing seen from the ports:

- One new `PID_OUT` appears every 32 `Mclk` cycles.
- It is final 3 cycles after `ERR` is latched, and it holds until phase 30 of
  the next period.
- During phase 30, `PID_OUT` already includes the new P term but still the
  previous I and D terms. Sample it at `sample_en`.
- The quotient used in period k is computed in that same period from the
  `KD` and `TS` present at phase 0. A change made before phase 0 takes effect
  in that period.

## Blocks

| module             | does |
|--------------------|------|
| `pid_pkg`          | formats, `mode_e` (P/PI/PD/PID), magnitude/sign/saturation helpers |
| `clock_control`    | Mclk ÷ 32 counter, divided clock, phase enables |
| `error_calc`       | `ERR = SP + (-Y)`, carry-in 0, saturated, latched |
| `p_controller`     | `KP*ERR`, sign-magnitude, latched |
| `i_controller`     | `KI*TS*ERR` increment plus the fed-back `IOUT(k-1)`, latched |
| `kd_ts_divider`    | sequential restoring divider, `KD*256/TS`, 20 cycles; `TS = 0` gives all ones |
| `d_controller`     | divider, previous-error latch, subtractor, second multiplier, latched |
| `id_latch_select`  | I and D latches with enables `IC`/`DC`; disabled means zero |
| `final_adder`      | two chained adders, round-to-nearest, 12-bit saturation |
| `pid_controller`   | the controller, wired as the source's block diagram |
| `test_model`       | plant `Y(k) = KS*Y(k-1) + KS*U(k)` |
| `pid_system`       | top: controller plus plant, or controller fed by an external converter |

Notes on particular blocks:

- **Switching structures.** `DC` and `IC` act only on the select latches, as
  in the source. The I and D controllers keep running while their term is
  switched off. Switching from P to PI therefore adds whatever the integral
  has built up since reset, bounded by the accumulator's saturation.
- **Converter input.** In `pid_system`, `loop_sel = 1` closes the loop
  through the test plant. `loop_sel = 0` takes `Y` from `y_adc`. That input is
  offset binary from an external ADC and is turned into two's complement by
  inverting its MSB. Only the feedback goes through this conversion. `SP` is
  taken as a two's complement digital input.
- **Subtractor.** The source's drawing uses an inverter and a carry-in of 0,
  which computes `ERR(k) - ERR(k-1) - 1 LSB`. This design computes the exact
  difference of the derivative equation instead.
- **Reset.** The source shows no reset. Here `rst` is synchronous and active
  high. It clears every latch, the divider and the phase counter, so
  `ERR(k-1)` after reset is 0. The first sample therefore gives the usual
  "derivative kick".

## Closed-loop behaviour

The evaluation setup is SP = 5, TS = 0.5 s, KP = 0.125, KI = 0.5, KD = 0.125
and plant KS = 0.5. With it, the end-to-end testbench gives these `Y` values
for the first ten samples (5 s):

| structure | Y(1..10)              | settles at |
|-----------|-----------------------|------------|
| P         | 1 1 1 1 1 1 1 1 1 1   | 1 |
| PI        | 1 2 3 4 4 4 4 5 5 5   | 5 |
| PD        | 1 1 1 1 1 1 1 1 1 1   | 1 |
| PID       | 2 2 3 3 4 4 4 5 5 5   | 5 |

The published FPGA responses agree on most points:

- P settles at 1.
- PI reaches 5 at about 5 s; here it is 4 s.
- PID reaches 5 at about 6 s; here it is 4 s.
- PD differs: the published curve settles near 0.75, with a fractional `Y`.
  This design's plant outputs integers, so it settles at 1.

P and PD cannot reach the set point because the output is rounded to whole
units. With `KP = 0.125`, an error of 4 gives a rounded `PID_OUT` of 1, which
holds the plant at 1.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block
with an independent integer model of the arithmetic, `tb/pid_ref_pkg.sv`,
written with 64-bit integers rather than bit slices. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `clock_control_tb`: the count, the divided clock, and that each enable
  comes at the right phase exactly once per 32 cycles.
- `error_calc_tb`, `p_controller_tb`, `i_controller_tb`, `d_controller_tb`,
  `final_adder_tb`, `test_model_tb`: random and corner operands, with
  saturation reached; the latches must hold while their enable is low.
- `kd_ts_divider_tb`: quotient correct, exactly 20 cycles from start to done,
  and the quotient holds while a division runs.
- `id_latch_select_tb`: all four structures.
- `pid_controller_tb`: open loop, 120 samples, with random inputs and random
  structures. It checks every internal term, and that `PID_OUT` moves only at
  the expected phases.
- `pid_system_tb`: the full-size, end-to-end test with no parameter
  overrides. It runs:
  - the four evaluation responses above;
  - a P to PID switch without reset;
  - the offset-binary converter path;
  - large gains that saturate `PID_OUT` and the plant.

  It counts each of these and fails if one never happened.

Assertions check two rules of the schedule: the divider is never restarted
while busy, and the D term is never latched while a division is still
running.

## Simulating

The packages must come first on the command line. Verilator finds the
modules through `-y`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/pid_pkg.sv tb/pid_ref_pkg.sv tb/pid_system_tb.sv \
        --top-module pid_system_tb -o sim
    ./obj_dir/sim

To test another block, replace `pid_system_tb` with that block's testbench.
Each testbench finishes in well under a second. Lint a single module with
`verilator --lint-only -Wall -y rtl rtl/pid_pkg.sv rtl/<module>.sv`.

## Changing it

- **Word widths and binary points** live in `pid_pkg`. The shifts in
  `p_controller`, `i_controller` and `d_controller` follow from the `*_FB`
  constants. The reference package in `tb/` uses literal shifts of 8 and 16
  and must be edited to match.
- **The schedule** is in `clock_control`. `STAGES` sets the period to
  `2**STAGES`. It must be at least 5, because the divider needs 21 cycles
  before the D latch loads at phase `2**STAGES - 3`.
- **Term outputs.** The I and D outputs are 20 bits, so a wider gain range
  (for example a fifth integer bit for gains up to 31.99) means widening
  `K_W` and checking the 19-bit magnitude limit of the terms.

Lint gives only unused-signal and unused-parameter warnings. One example is
the low byte of `ERR`, which is always zero, as explained above.
