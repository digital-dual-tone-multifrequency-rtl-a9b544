# Digital DTMF receiver with three-phase hard-limited correlation

A push-button telephone sends each key as two simultaneous tones, one from
a low group (697, 770, 852, 941 Hz) and one from a high group (1209, 1336,
1477, 1633 Hz). This receiver takes 13-bit linear samples at 8 kHz and
reports which of the 16 keys was pressed. It uses no multipliers.

The main idea is to correlate the input with square waves instead of
sine waves. Each reference is `sign(sin(2*pi*f*t + phase))`, so multiplying
a sample by it only means adding or subtracting the sample. A plain
sine/cosine correlator needs squares and a square root to remove the input
phase. Here, each frequency is correlated with three square waves 60 degrees
apart (0, pi/3, 2*pi/3), and the largest of the three magnitudes is kept.
Whatever the input phase, one reference is within 30 degrees of it, so the
maximum varies little with phase. The result is compared against a fixed
fraction of the input's own magnitude sum, which makes the decision
independent of the signal level.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It runs on one
clock of 1024 kHz and has no vendor cells.

## How a key is recognised

The work is done in windows of 100 samples (12.5 ms).

1. **Correlation.** For every frequency `f` and phase `k`, the detector
   forms `C[f][k] = sum over n of x[n] * z[f][k][n]`. Here `z` is +1 or -1,
   taken from `sign(sin(2*pi*f*(n-49.5)/8000 + k*pi/3))`, so the window is
   centred on t = 0.
2. **Maximum over phase.** `M[f] = max_k |C[f][k]|`. As in the original
   circuit, the absolute value of a negative sum is formed by inverting its
   bits, so it comes out one less than the true value.
3. **Power data.** `L = sum |x[n]|` over the same window. The threshold is
   `P = c * L`, where `c` is 3/8, 1/2, 5/8 or 3/4, chosen with the `s0`/`s1`
   pins.
4. **Frequency selection.** Frequency `f` is *present* if `M[f] > P`. The
   window is *valid* only if exactly one low-group frequency and exactly
   one high-group frequency are present. Its *number* is
   `{low index, high index}`, 2 bits each.
5. **Level.** The window has *level* if `L > MIN_LEVEL` (default 2000).
   A window without level is a pause.
6. **Decision**, once per window:
   - *Amplitude drop.* The previous number's two maxima are checked. If
     either has fallen below 3/4 of its value in the previous window, the
     window is treated as a pause even if its level is high. This is how
     the window in which a tone stops part-way is recognised. That window's
     spectrum is smeared and would otherwise break the duration count.
   - *Duration counter.* In a window with level, it counts up when the
     number is valid and equal to the previous valid number, and stops at 2.
     Any other window with level clears it. In a pause it holds.
   - *Interval counter.* It is reset to 1 by every window with level. In a
     pause, once the duration counter is 2, it counts up to 4.
   - The step from 3 to 4 accepts the digit. This happens on the third
     pause window after three equal valid windows.

   On acceptance, the key code goes out on `button` and `digitav` rises.

Key codes on `button`: keys 1 to 9 give 1 to 9, `0` gives 10, `*` 11,
`#` 12, `A` to `C` 13 to 15, and `D` gives 0.

## The time-shared schedule

This is the part that takes the most care to follow in the code. One
sample lasts 128 clocks. The clock divider (`dtmf_timing`) issues a
**step enable** every 16 clocks, which makes 8 steps per sample. It also
issues a **sample enable** every 128 clocks, which loads the input
register.

```
clock cycle in sample:  15   31   47   63   79   95  111  127
step  (ROM step 0..7):   0    1    2    3    4    5    6    7   <- input register loads at 127
frequency served:     1633 1477 1336 1209  941  852  770  697
```

At each step, the ROM (`dtmf_rom`) outputs the three sign bits of one
frequency for the current sample index. Each of the three correlators
(`dtmf_corr`, one per phase) then adds or subtracts the sample into that
frequency's running sum. Each correlator keeps its eight sums in a
circulating 8 x 20-bit shift register. The sum at the tail is read, updated
and shifted back in at the head. After 8 steps every frequency has been
served once and the register is back in place. So three adders do the work
of 24 correlators.

**Window boundaries.** On sample 0 of a window the value read from the
register is masked to zero, which starts a new sum. On sample 99 the
adder's output is the finished sum. That step therefore delivers one
frequency's three finished sums to `dtmf_comp3` (maximum over phase).
`dtmf_freqsel` registers the maximum and compares it with `P` on the next
step.

The level sum (`dtmf_level`) is updated on step 0 of each sample. It is
latched at step 0 of sample 99 and held for the next 100 samples. So `P` is
already final when the first comparison of the window is made, and it
stays stable until the last one.

**Result timing.** The last comparison (697 Hz) is made on step 0 of the
next window. The window result is strobed one clock later, which is every
12 800 clocks. The decision logic acts on that strobe.

**Latency.** A digit is accepted 200 to 400 samples (25 to 50 ms) after
the tone stops. That covers three pause windows, the first of which may be
the window in which the tone stopped.

The first window after reset contains one sample of the reset value (0).
This is because the correlator serves sample 0 before the first input is
latched. Every later window holds 100 consecutive input samples.

## Blocks

| module | role |
|---|---|
| `dtmf_pkg` | widths (13-bit input, 20-bit sums), window length, frequencies, result struct |
| `dtmf_receiver` | top: detection, decision and test multiplexer; chip-level pins |
| `dtmf_detect` | detection part: input register, divider, ROM, 3 correlators, level, phase maximum, frequency selection, serial level output |
| `dtmf_timing` | divide-by-16 step enable and divide-by-128 sample enable; divided clocks as square waves for test |
| `dtmf_rom` | 2400-bit sign table (24 references x 100 samples), computed at elaboration; step and sample counters |
| `dtmf_corr` | one correlator: add/subtract, 8 x 20-bit circulating register matrix, masking at window start |
| `dtmf_level` | sum of absolute values, minimum-level comparison, power fraction from `s0`/`s1` |
| `dtmf_magcmp` | magnitude comparator built from cascaded 2-bit cells (greater / less outputs) |
| `dtmf_comp3` | approximate absolute values and maximum of three sums |
| `dtmf_freqsel` | per-frequency comparison with `P`, one-per-group rule, number encoding, stored maxima |
| `dtmf_decision` | amplitude-drop check, number comparison, duration and interval counters, digit-available flag |
| `dtmf_sysdata` | number-to-key-code table |
| `dtmf_testpow` | shifts each window's level sum out MSB first |
| `dtmf_testmux` | routes one of six 4-bit groups of internal nodes to the test pins |

## Interface of `dtmf_receiver`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 1024 kHz master clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `datin` | in | 13 | two's-complement sample; sampled once every 128 clocks, may change at any time |
| `resdigav_n` | in | 1 | low clears `digitav` (an acceptance in the same clock wins) |
| `s0`, `s1` | in | 1 each | power fraction: 00 gives 3/8, 01 gives 1/2, 10 gives 5/8, 11 gives 3/4 (`s0` is the first bit) |
| `s0tst`, `s1tst`, `s2tst` | in | 1 each | test group select |
| `button` | out | 4 | key code of the last accepted digit |
| `digitav` | out | 1 | a digit has been accepted since the last clear |
| `inplatclktest` | out | 1 | 8 kHz sample clock (square wave) |
| `romcktest` | out | 1 | 64 kHz step clock (square wave) |
| `tstout` | out | 4 | selected test group |

Test groups (`{s2tst,s1tst,s0tst}`, with bits listed as tstout[3..0]):

| code | tstout[3:0] |
|---|---|
| 0 | serial level bit, level, window valid, comparison of the current step |
| 1 | sign bits of the three correlator adders, finished-sum step |
| 2 | ROM sign bits for phases 2, 1 and 0, window start |
| 3 | interval counter (3 bits), numbers equal |
| 4 | duration counter (2 bits), digit accepted, amplitude drop |
| 5 | step clock, sample clock, step enable, sample enable |
| 6, 7 | zero |

## Measured behaviour

`tb_dtmf_specs` plays each case four times through the full receiver.
Each time it uses a different key, random tone phases and a random offset
against the windows. The tones are 1000 LSB each. The table gives how many
of the four trials were accepted.

| case | fraction 1/2 | fraction 3/8 |
|---|---|---|
| frequency +-1.5 %, +-1.8 % | all | |
| frequency +-3.0 % | some or none | most |
| frequency +-3.5 % | none | some or none |
| tone 23 ms, 24 ms | none | |
| tone 40 ms | most (alignment-dependent) | |
| tone 60 ms | all | |
| pause 30 ms / 40 ms between equal keys | some / most | |
| pause 60 ms | all | |
| high tone +4 dB | most | all |
| high tone -4 dB | most | |
| high tone -5 dB | none | all |
| high tone -8 dB | none | none |

In short:

- **Frequency.** It meets an operate band of 1.8 % and a reject point of
  3.5 %.
- **Duration.** Three whole windows are needed, so a 40 ms tone is
  accepted only when it is well aligned with the windows. Tones of 24 ms or
  less are always rejected.
- **Twist.** Up to about 5 dB works only with the 3/8 fraction.
- **Level.** The minimum level (sum of |x| over 100 samples > 2000, a mean
  magnitude of 20 LSB) is a bare number. It has not been calibrated to dBm.

## Departures from the original circuit, and own choices

- **Serial operations.** The original compared the phase maxima, the level
  and the power data bit-serially, using the 1 MHz clock. Here those
  comparisons are parallel, inside one step. The cascaded 2-bit comparator
  cell is kept (`dtmf_magcmp`) and used for both the level comparison and
  the comparison with `P`.
- **Clocks.** The original used divided clocks. Here there is one clock
  with enables, and the divided clocks exist only as test outputs.
- **Power data width.** It is kept at 20 bits. The original shifted out
  only 16 bits of it, and which 16 is not known.
- **Amplitude-drop check.** It comes from the reference algorithm model of
  the design rather than from its gate-level description. Without it,
  almost no digit is accepted: the window in which a tone stops is usually
  invalid, and an invalid window clears the duration counter.
- **Repeated key.** The previous number survives a pause. So when the same
  key is pressed again, its first valid window already finds the duration
  counter at 2, and one window of tone followed by three pause windows is
  enough to accept it again. This follows the reference model.
- **Own choices**, where the original is not specific:
  - `MIN_LEVEL` = 2000, on the assumption that the model's threshold uses
    the same sample scale;
  - `resdigav_n` is active low;
  - the node-to-group map of the test multiplexer;
  - the serial level output goes MSB first at one bit per step, with a
    frame count;
  - the reset is synchronous.
- **Not included.** Pads and supply pins.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dtmf_pkg.sv rtl/*.sv \
          tb/tb_dtmf_receiver.sv --top-module tb_dtmf_receiver
./obj_dir/Vtb_dtmf_receiver
```

| testbench | what it covers |
|---|---|
| `tb_dtmf_receiver` | End to end at default parameters, about 20 000 samples. All 16 keys, acceptance latency, rejection cases, twist, digit-available clear, test multiplexer, power-data arithmetic. Counts every mechanism and fails if one never happened. |
| `tb_dtmf_specs` | The specification sweep above. |
| `tb_dtmf_detect` | Compares every window's 8 maxima, level, valid and number with a floating-point reference model. Checks the 12 800-clock result spacing. |
| `tb_dtmf_decision` | Compares random window sequences with a reference model of the decision rules. |
| others | One per block, against independent models: ROM bits against `$sin`, correlator sums, level and power values, comparator, phase maximum, frequency selection, serialiser, key-code table, test multiplexer, divider timing. |

Concurrent assertions in the timing, ROM, frequency-selection and decision
blocks check invariants during every simulation: a sample enable falls on a
step, the sample index stays below 100, the result strobe lasts one cycle,
and the duration and interval counters stay within 0..2 and 1..4.
Run with `--assert` to enable them.

A unit testbench needs only `dtmf_pkg.sv` and its module (plus
`dtmf_magcmp.sv` for the level and frequency-selection blocks, and
`dtmf_sysdata.sv` for the decision block).

## Changing it

- **Frequency set, window length and phase count.** These live in
  `dtmf_pkg`. The ROM table follows automatically: its formula is in
  `dtmf_rom`. For a different sample rate or frequency, keep the exact
  integer form `U = 3*f*(2n-99) + 8000*k` in mind. It assumes integer
  frequencies, fs = 8000 and a window of 100.
- **Sum width.** The 20-bit width must hold `WIN_LEN * 4096`.
- **Step schedule.** Eight steps per sample are tied to the eight
  frequencies. A fourth phase would need a fourth correlator and a wider
  `dtmf_comp3`.
- **Minimum level.** `MIN_LEVEL` is a parameter of the top.
