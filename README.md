# DTMF tone generation and Goertzel detection

A telephone key press is sent as two sine tones at once: one of four
low-group "row" frequencies and one of four high-group "column" frequencies.
This design builds that signal on chip from a 4-bit key code, adds Gaussian
noise to it, and recovers the key by measuring the energy at the eight DTMF
frequencies with Goertzel filters. Its central point is the frequency detector.
It comes in two forms that give bit-identical results:

* **shared** (`goertzel_rsa`, the default): one multiplier and one adder are
  time-shared by all eight frequencies under a small scheduling state machine;
* **parallel** (`goertzel_bank`): eight independent filters, each with its own
  multipliers.

It is a loop-back test system. The generator half stands in for a telephone
and the detector half is the receiver. Everything runs in one clock domain at a
sample rate set by a clock enable.

```
key_in[3:0] ─► dtmf_fws ─► dds_core ─► tones_generator ─► awgn_gen ─► detector ─► max_index_est ─► freq_to_digit_lut ─► out[3:0]
              phase words   2 x (phase    tone1+tone2       + noise     8 powers    two strongest      tone pair → key
                            acc + cos LUT) (signal_out)     (awgn_out)  per block   indices
Signal[15:0] (noise seed) ───────────────────────────────────┘
```

## Frequencies and key codes

| | 1209 Hz | 1336 Hz | 1477 Hz | 1633 Hz |
|---|---|---|---|---|
| **697 Hz** | 1 | 2 | 3 | A |
| **770 Hz** | 4 | 5 | 6 | B |
| **852 Hz** | 7 | 8 | 9 | C |
| **941 Hz** | * | 0 | # | D |

A key is coded as its hex value: `0`–`9` → 0–9, `A`–`D` → 0xA–0xD,
`*` → 0xE, `#` → 0xF. The detector returns the same code. Inside the design,
frequency index 0–3 is a row (697…941 Hz) and index 4–7 is a column
(1209…1633 Hz).

The package `dtmf_pkg` derives every constant from a formula during
elaboration, so there is no table of numbers to trust:

| constant | formula | defaults |
|---|---|---|
| DDS phase increment | round(f · 2^16 / 8000) | 5710 … 13378 |
| Goertzel bin | k = round(N · f / 8000) | 18 20 22 24 31 34 38 42 (N = 205) |
| Goertzel coefficient | round(2 cos(2πk/N) · 2^14) | signed Q14 in 18 bits |
| DDS carrier table | round(63 · cos(2πi/256)) | 256 × 7-bit signed |

The cosines come from an integer-only constant function, `dtmf_pkg::cos_q30`.
It folds the angle into [0, π/4] and sums a Taylor series in 64-bit fixed
point. It stays within 4·10⁻⁹ of the floating-point value, and it lets
synthesis tools fold the tables without real arithmetic.

## Tone generator

* **`dtmf_fws`** is the frequency word selector. This combinational look-up
  turns the key code into a low (row) and a high (column) phase increment.
* **`dds_core`** holds two direct digital synthesisers. Each one is a
  **`dds_phase_acc`**, made of a phase-increment register (Δp), an adder and a
  16-bit phase register fed back into the adder. The top 8 phase bits address a
  **`dds_cos_lut`**. `tone1` carries the column tone and `tone2` the row tone,
  each 7-bit signed with an amplitude of 63. The tone frequency error is below
  0.06 Hz.
* **`tones_generator`** adds the two tones into the 8-bit `signal_out`. The sum
  cannot overflow.
* **`awgn_gen`** adds the noise. It advances a 16-bit LFSR
  (x¹⁶+x¹⁴+x¹³+x¹¹+1) by 16 steps per sample and adds its four fresh nibbles as
  signed values. This sum of four uniform draws is a central-limit
  approximation of Gaussian noise, with variance 85 (σ ≈ 9.2, mean −2). The
  noise is added to the signal with saturation to 8 bits, which gives
  `awgn_out`. The seed is the top-level `Signal` input, loaded during reset.
  An all-zero seed is replaced by 0xACE1.

Every register in the chain advances only on the `sample_tick` strobe, one
clock in every `SAMPLE_DIV`. The default of 15625 gives 8 kHz from a 125 MHz
clock. Latency from a key change to the noisy sample is three strobes. The
increment register holds a new word back by one sample, then come the cosine
register, the tone sum and the noise register.

## Goertzel detection

For each frequency the detector runs the second-order resonator

```
s[n] = x[n] + c·s[n-1] − s[n-2],     c = 2 cos(2πk/N)
```

over a block of N = 205 samples. It does not form the complex output
y = s[N-1] − W_N^k·s[N-2]. Instead it computes the squared magnitude directly:

```
P = a² + b² − ((c·a) >>> 14)·b,      a = s[N-1], b = s[N-2]
```

A negative result, caused by truncation, is clamped to zero. P is the energy
of the N-point DFT at bin k. With a pure tone of amplitude A on the bin,
P ≈ (A·N/2)². The states are then cleared for the next block.

Fixed-point rules, identical in both detector forms:

* c is signed Q14. The product c·s is shifted right arithmetically by 14
  (floor) and truncated to the 24-bit state.
* States are 24-bit signed. A full-scale 8-bit tone on the lowest bin grows
  the state to about 25 000 in 205 samples, so 24 bits leave a wide margin.
  Nothing checks for overflow.
* Powers are 48-bit unsigned.

At N = 205 and 8 kHz the bins are 39 Hz apart. DTMF frequencies are at least
8 % apart, so a tone that is off by ±1.5 % still lands in its own filter's
main lobe. The testbenches check this for all 16 keys.

### Shared detector (`goertzel_rsa`)

All eight resonators use one signed 24×24 multiplier and one adder/subtractor.
Their states live in two 8-entry register files, `s1[]` (s[n-1]) and `s2[]`
(s[n-2]). The coefficients are elaboration-time constants, and a state
machine steps through them:

| state | clocks | multiplier operands | action |
|---|---|---|---|
| IDLE | – | – | waits for a sample (new or held), latches it, bumps `cnt` |
| UPD | 8 (i = 0…7) | c_i × s1[i] | s1[i] ← x + (prod >>> 14) − s2[i]; s2[i] ← s1[i] |
| PW0 | 1 per i | c_i × s1[i] | t ← prod >>> 14 |
| PW1 | 1 per i | s1[i] × s1[i] | acc ← prod |
| PW2 | 1 per i | s2[i] × s2[i] | acc ← acc + prod |
| PW3 | 1 per i | t × s2[i] | power[i] ← max(acc − prod, 0); clear s1[i], s2[i] |
| DONE | 1 | – | `power_valid` pulse |

The UPD, PW0, PW1, PW2 and PW3 rows are the five datapath steps. An ordinary
sample occupies the datapath for 9 clocks, including the IDLE clock that takes
it. The N-th sample of a block (`cnt` = N−1) is followed by the power phase:
4 clocks for each of the 8 frequencies, then DONE. `power_valid` therefore
rises on the 41st clock edge after the edge that took the last sample.

The next block's first sample arrives while the powers are still being
computed whenever `SAMPLE_DIV` < 42. The design handles that case:

* A one-entry buffer keeps that sample (`held`), and the machine takes it as
  soon as it returns to IDLE.
* A second sample that arrives while the buffer is full is lost. The loss sets
  the sticky `overrun` output, and an assertion fires in simulation.
* Overrun cannot happen when samples are at least 25 clocks apart. At the
  default rate the machine is busy for at most 41 of every 15625 clocks.

### Parallel detector (`goertzel_bank`)

There are eight `goertzel_filter` instances fed the same sample, plus a 12-bit
sample counter `cnt` that marks the N-th sample. Each filter does its update
and, on the last sample, its power in the same clock, using its own
multipliers. All eight powers appear together, with `power_valid` one clock
after the last sample. The powers are bit-identical to the shared form's.
Select this form with `USE_RSA = 0`.

## Decision

* **`max_index_est`** takes the eight powers on `power_valid` and finds the
  index of the largest and of the second largest. Ties go to the lower index.
  It also flags whether the second largest reaches `MIN_POWER` (default 2²⁰).
  An on-bin tone of amplitude 63 gives about 4·10⁷, and the default noise
  alone gives about 2·10⁴.
* **`freq_to_digit_lut`** accepts the pair only if one index is a row and the
  other a column, and the flag is set. It then returns the key at that
  position.
* The top latches the key into `out` and pulses `out_valid`. For a rejected
  block it pulses `out_reject` and keeps the previous `out`. Both pulses come
  2 clocks after `power_valid`.

Blocks are free-running, one decision every N samples (25.6 ms at 8 kHz). A
block during which the key changed holds two keys' tones, and its decision is
meaningless. The next block is clean.

## Top level: `Goertzel_Algorithm_Design`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock (125 MHz assumed by the default divider) |
| `rst` | in | 1 | **active-low** synchronous reset |
| `key_in` | in | 4 | key code to transmit |
| `Signal` | in | 16 | noise generator seed, loaded during reset |
| `out` | out | 4 | last decoded key |
| `out_valid` | out | 1 | one-clock pulse: `out` was just updated |
| `out_reject` | out | 1 | one-clock pulse: the last block gave no valid key |
| `signal_out` | out | 8 | clean DTMF sample (probe) |
| `awgn_out` | out | 8 | noisy DTMF sample fed to the detector (probe) |
| `cnt` | out | 12 | sample index inside the current block (probe) |
| `overrun` | out | 1 | shared detector lost a sample (sticky; always 0 for the parallel form) |

| parameter | default | meaning |
|---|---|---|
| `USE_RSA` | 1 | 1 = shared detector, 0 = parallel detector |
| `SAMPLE_DIV` | 15625 | clocks per sample (must be ≥ 25 for the shared detector) |
| `N` | 205 | Goertzel block length (2…4096) |

Widths and formats (sample 8 bits, tone 7 bits, phase 16 bits, LUT 256
entries, coefficient Q14, state 24 bits, power 48 bits) are localparams in
`dtmf_pkg`. Bins and coefficients follow automatically when `N` changes.
Detection quality at other N has not been checked.

## What follows the source design and what is this implementation's

Taken from the source:

* the system structure: keypad code → frequency word selector → two-channel
  DDS (phase-increment register, adder, phase register, cosine LUT) → tone sum
  → additive noise → eight-frequency Goertzel detection → largest and second
  largest index → frequency-to-digit table;
* the Goertzel recursion and its output stage;
* the idea of one resource-shared datapath scheduled by a state machine,
  against eight parallel filters;
* the top-level name and the ports `key_in[3:0]`, `Signal[15:0]`, `clk`, `rst`
  and `out[3:0]`;
* the probe widths `signal_out[7:0]`, `AWGN_OUT[7:0]` and `cnt[11:0]`;
* that `rst` is high while the design runs.

Chosen here, because the source does not give them:

* sample rate 8 kHz, N = 205 and the clock divider;
* all word widths and fixed-point formats;
* the key coding;
* the noise generator, and the use of `Signal` as its seed;
* the sharing schedule, the one-sample buffer and `overrun`;
* the detection threshold and the rejection rules;
* synchronous reset;
* the extra ports `out_valid`, `out_reject` and `overrun`.

Other points where this implementation departs or interprets:

* **"Only two frequencies" in the shared form.** The source says the
  resource-shared detector uses only two frequencies. Here that is taken to
  mean that the shared datapath works on one filter's state pair at a time.
  All eight frequencies are still measured every block.
* **The DDS stays digital.** The source describes the DDS as digital-to-analog
  conversion. No DAC is modelled.
* **Debug probes become ports.** The on-chip logic analyser and its JTAG
  controller (Xilinx ChipScope ILA/ICON) are vendor debug cores. The signals
  they watched are brought out as ports instead.

Not included:

* the keypad itself, which is external;
* the Zynq ARM processing system and its AXI interfaces, which the detector
  does not use;
* the Xilinx FFT-128 core, which serves as a comparison baseline only.

## Size

These are the yosys coarse-synthesis cell counts (word-level cells, so an
adder or a multiplier is one cell), taken at the default parameters:

| module | cells | of which multiply/multiply-add | flip-flop bits | memory bits |
|---|---|---|---|---|
| `goertzel_rsa` (shared) | 101 | 2 | 496 | 576 (state register files) |
| `goertzel_bank` (parallel) | 88 | 32 (4 per filter) | 781 | 0 |
| `Goertzel_Algorithm_Design` (shared) | 347 | 3 | 621 | 4288 (mostly the two 256×7 cosine ROMs) |

The shared detector synthesises to 2 multiply or multiply-add cells and the
parallel one to 32. The price of sharing is control logic, the state
multiplexers and 41 clocks of latency at the end of each block.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

| testbench | what it checks |
|---|---|
| `tb_dtmf_pkg` | integer cosine against `$cos` over ~12 000 angles; increments, bins and coefficients against floating-point recomputation; keypad tables |
| `tb_sample_tick` | strobe spacing and first strobe |
| `tb_dtmf_fws` | both phase words of all 16 keys |
| `tb_dds_phase_acc` | random increments and enables against a model, including the one-sample delay of the increment register |
| `tb_dds_cos_lut` | all 256 entries |
| `tb_dds_core` | 300 samples of three tone pairs against a floating-point DDS model |
| `tb_tones_generator` | random and extreme sums, hold when not enabled |
| `tb_awgn_gen` | every noise sample against an independent LFSR model; saturation at both rails; mean and variance over 40 000 samples; zero seed |
| `tb_goertzel_filter` | bit-exact power against an independent integer model for each frequency, on-bin accuracy against (A·N/2)², `power_valid` timing, no leakage between blocks |
| `tb_goertzel_bank` | all 8 powers bit-exact for all 16 keys with noise at 0 and ±1.5 % offset; strongest row and column; timing |
| `tb_goertzel_rsa` | the same, plus the 41-edge latency, samples held during the power phase (counted), no overrun |
| `tb_max_index_est` | 2000 random sets including ties against a reference |
| `tb_freq_to_digit_lut` | all 128 index pairs × threshold |
| `tb_Goertzel_Algorithm_Design` | shared and parallel tops side by side (sample every 30 clocks): every key pressed twice, changed mid-block; both decode each key on the clean block and agree on every decision; counts saturations, held samples and mid-block key changes |
| `tb_Goertzel_Algorithm_Design_full` | the top at its default parameters (8 kHz from 125 MHz, N = 205): all 16 keys decoded, decisions exactly 205 × 15625 clocks apart; about 100 M clocks, about a minute |

`tb/goertzel_ref_pkg.sv` holds the reference Goertzel model and a DTMF sample
synthesiser shared by the detector testbenches.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -Itb -y tb \
    rtl/dtmf_pkg.sv tb/tb_goertzel_rsa.sv --top tb_goertzel_rsa
./obj_dir/Vtb_goertzel_rsa
```

Every RTL file passes `verilator --lint-only -Wall`, with style warnings only.
