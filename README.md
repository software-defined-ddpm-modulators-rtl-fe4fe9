# DDPM D/A converter with a priority-free modulator

A dyadic digital pulse modulator (DDPM) turns an N-bit code `n` into a
repeating pattern of `2^N` one-clock slots that contains exactly `n` ones.
The ones are spread in a fixed, nested way:

- input bit N-1 (the MSB) is output in every other slot;
- bit N-2 is output in every other one of the slots left over;
- and so on down to bit 0, which gets one slot;
- the last slot of the pattern is always 0.

Bit `i` therefore occupies `2^i` slots, spaced as evenly as they can be.
Most of the spectral energy of such a stream lies at high frequency. A
first-order RC filter on a digital pin is then enough to recover the analog
level `n / 2^N * VDD`. That makes a DAC out of a single output pin.

This repository holds SystemVerilog for such a DAC, with 8 bits, a 150 MHz
system clock and 500 ns slots. It follows the modulator architecture of
*Software-Defined DDPM Modulators for D/A Conversion by General-Purpose
Microcontrollers* (IEEE Access, 2022). That architecture was meant for a
microcontroller interrupt routine. Here it is a clocked circuit.

Around the modulator there are a slot timer, a test-pattern source (a static
code or a 25 Hz sine), and the two-segment ("double-slope") predistortion
used to correct pin-driver asymmetry. A behavioural model of the RC
reconstruction filter completes the design.

## Which input bit goes in which slot

Number the slots of a pattern `c = 1, 2, ..., 2^N`, with the counter holding
`c mod 2^N`. Let `k` be the position of the lowest `1` in `c`. Slot `c`
outputs input bit `N-1-k`:

- odd `c` (k = 0) gives the MSB;
- `c = 2, 6, 10, ...` (k = 1) gives the next bit;
- and so on up to `c = 2^(N-1)`, which gives bit 0.

`c = 2^N` wraps the counter to 0. It has no `1` at all, and its slot is the
closing 0.

The same pattern has a recursive definition. This is what the testbenches
check against:

```
T_0 = (empty)      T_i = [T_(i-1), b_(N-i), T_(i-1)]      pattern = [T_N, 0]
```

Example, N = 4 and n = 10 = 1010b:
`1 0 1 1 1 0 1 0 1 0 1 1 1 0 1 0`, which has 10 ones.

## Finding the lowest one without a priority encoder

The classic hardware modulator finds `k` with a priority multiplexer. A
simple software version tests the counter bits one at a time, which costs up
to N iterations. The architecture used here gets a one-hot word for `k` in
three steps that cost the same for any N (`ddpm_first_one`):

1. `prev XOR present`. Incrementing the counter flips every bit from bit 0
   up to and including the lowest 1 of the new value. The XOR is therefore a
   thermometer word: ones from bit 0 up to bit `k`.
2. Shift right by one. This gives ones from bit 0 up to bit `k-1`.
3. Add one. This leaves a single 1, at bit `k`.

Worked example with 4 bits, previous value 1001 and present value 1010:

```
XOR   = 0011
>> 1  = 0001
+ 1   = 0010   -> k = 1
```

Next, the one-hot word is ANDed with the input code, and the result is
ORed down to the output bit. The code is stored bit-reversed
(`ddpm_input_reg`), so one-hot bit `k` meets input bit `N-1-k`. The reversal
happens once per pattern, when the code is loaded, and not once per slot.

### The wrap slot

With an N-bit counter, the step from `2^N-1` to 0 XORs to all ones. The
chain above would then select bit N-1 of the one-hot word, which is input
bit 0. That would output bit 0 twice per pattern, giving `n + b_0` ones
instead of `n`.

To avoid this, `ddpm_counter` keeps the carry out of its last increment, and
the chain runs N+1 bits wide with the carry as bit N. On the wrap the
one-hot bit is bit N. No input bit matches it, so the closing slot is 0 as
the definition requires.

The counter resets into exactly that state: count 0, previous value
`2^N-1`, carry 1. This is the last slot of a pattern of code 0, so the first
tick after reset starts a clean pattern.

## Timing

```
 ddpm_tick_gen --tick--> ddpm_opt_modulator --ddpm_out--> pin --> RC model
                             |  ^
                 sample_load |  | next_code register
                             v  |
 ddpm_test_pattern --valid--> ddpm_predistort --done
```

**Slot.** One tick every `TICK_DIV` = 75 clocks, which is 500 ns or a 2 MHz
slot rate at 150 MHz. The tick steps the counter. In the next cycle the
output register takes the slot's bit. So `ddpm_out` changes two clock edges
after the tick edge and then holds for the 75 clocks of the slot. Ticks must
be at least two cycles apart, and an assertion checks this.

**Pattern.** A pattern is 256 slots, or 19200 clocks, so the sample rate is
150 MHz / 75 / 256 = 7812.5 samples/s. The code is taken on the first tick
of each pattern, when the counter steps from 0 to 1. `sample_load` pulses in
that cycle, and `mod_code` shows the code being converted.

**Sample pipeline.** The same `sample_load` pulse asks `ddpm_test_pattern`
for the next sample:

1. The sample appears one cycle later.
2. `ddpm_predistort` converts it in N+FRAC+3 = 27 cycles, or passes it
   through in one cycle when compensation is off.
3. The result waits in the next-code register until the next pattern starts.

So each sample is converted one pattern after it is requested. The first
pattern after reset converts code 0. An assertion checks that the divider is
idle whenever a pattern starts.

## Double-slope predistortion

A pin whose rising and falling edges differ in speed adds a fixed error to
every pulse. That bends the transfer curve into two straight segments. The
correction applied to a code `n` is:

```
n' = round( n / (1 + a) )                    for n <  2^(N-1) (1 + a)
n' = round( (n - (2^N - 1) a) / (1 - a) )    for n >= 2^(N-1) (1 + a)
```

`a` comes from a one-time calibration. It is given on the `alpha` port as a
signed fixed-point number with FRAC = 16 fractional bits, and must satisfy
`|a| < 1/2`, which an assertion checks.

`ddpm_predistort` rewrites both branches as one integer division:

- lower branch: `num = n 2^16` and `den = 2^16 + A`;
- upper branch: `num = n 2^16 - 255 A` and `den = 2^16 - A`;
- in both: `n' = floor((2 num + den) / (2 den))`, which rounds to nearest,
  with halves going up.

A restoring divider computes one quotient bit per clock. The result is
clamped to 0..255. The port `upper` (`upper_region` at the top) shows which
branch was used.

`round` is to the nearest integer, as the correction is defined.

## Test patterns

`ddpm_test_pattern` has two modes:

- **Static** (`PAT_STATIC`): returns `static_code`, for static transfer
  (INL/DNL) measurements.
- **Sine** (`PAT_SINE`): returns
  `x[k] = 128 + 0.9 * 128 * sin(2 pi k * 25 Hz / f_s)`.

The sine uses a 32-bit phase accumulator with step
`round(2^32 * 25 / 7812.5)` = 13743895. The phase is rounded to 4096 points
per period. A quarter-wave table of 1025 magnitudes is computed at
elaboration with `$sin` and mirrored into the other three quarters. In
the tests the output stays within 0.55 LSB of the exact sine.

Switching to static mode pauses the sine phase. Switching back resumes it
where it stopped.

## RC filter model

`ddpm_rc_filter_model` is behavioural and not synthesizable. It models the
board's 100 kOhm / 1 nF low-pass filter (time constant 100 us) on a 3.3 V
pin. Each clock it applies the exact exponential step response. The output
`v_out_uv` is in microvolts.

The pin is ideal: its edges are symmetric and it has no switching noise. The
model therefore shows none of the nonlinearity that predistortion exists to
correct.

The synthesizable part of the design is `ddpm_dac_core`. `ddpm_dac_top`
places the model next to it.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | resolution in bits (`ddpm_pkg::DDPM_BITS`) |
| `TICK_DIV` | 75 | system clocks per slot (500 ns at 150 MHz) |
| `SYS_CLK_HZ` | 150000000 | system clock, used for the sine frequency |
| `ALPHA_FRAC` | 16 | fractional bits of `alpha` |
| `SINE_HZ` | 25 | test sine frequency |
| `AMP_PERMILLE` | 900 | test sine amplitude, per mille of half scale |

The modulator blocks are generic in `N`. The testbenches also run a 4-bit
first-one finder.

## Top-level ports (`ddpm_dac_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `en` | in | 1 | runs the slot timer |
| `mode` | in | `pattern_mode_e` | static code or sine |
| `static_code` | in | N | code for static mode |
| `comp_en`, `alpha` | in | 1, 18 | predistortion enable and factor (signed, 16 fractional bits) |
| `ddpm_out` | out | 1 | the DDPM bitstream (pin) |
| `sample_load` | out | 1 | pulse at each pattern start |
| `mod_code` | out | N | code converted in the current pattern |
| `slot_count` | out | N | counter value (slot within the pattern) |
| `raw_code` | out | N | latest test-pattern sample, before predistortion |
| `upper_region` | out | 1 | upper predistortion branch used for the latest sample |
| `v_out_uv` | out | 32 | filter output, microvolts (model) |

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=.. failures=..` line.

- `tb_ddpm_first_one`: all 256 counter steps against a bit-scan reference,
  plus the 4-bit example above.
- `tb_ddpm_opt_modulator`: 16 full patterns, including codes 0, 1, 127, 128
  and 255 and random codes. Every slot is compared with the recursive
  definition. A 4-bit instance converts the n = 10 example above. Also checks the two-edge output latency, the `load` timing and
  the count of ones.
- `tb_ddpm_counter`, `tb_ddpm_input_reg` and `tb_ddpm_tick_gen`: against
  reference models. The timer's 75-clock period is checked.
- `tb_ddpm_predistort`: every code at five values of alpha plus 500 random
  pairs, against the formula in floating point. Also checks the 28-cycle
  latency and bypass.
- `tb_ddpm_test_pattern`: static mode, and 700 sine samples against the
  exact sine.
- `tb_ddpm_rc_filter_model`: charge and discharge curves, and the average
  of a square wave.
- `tb_ddpm_dac_top`: the whole design at default sizes, over 71 patterns.
  It checks:
  - the pattern length, cycle-exact;
  - that the pin is high for exactly 75 * code clocks in each pattern;
  - the converted code against a reference pipeline;
  - both predistortion branches with both signs of alpha, and bypass;
  - mode switches both ways;
  - full scale;
  - that the RC output settles to `3.3 V * code / 256` within 2 mV.

  It also counts each of these mechanisms and fails if one never occurs.
- `tb_ddpm_dac_sweep`: all 256 codes at default sizes. Every code gives
  exactly 75 * code high clocks, so the digital transfer curve is ideal.
  A compensated sweep must stay monotonic.
- `tb_ddpm_dac_sine`: two full periods of the 25 Hz sine (625 samples). A
  DFT of the per-pattern pin averages gives 49.0 dB SNDR, or 7.85 effective
  bits. This is the ideal 8-bit limit at 90 % amplitude; a real pin adds
  noise and edge errors on top.

Each testbench runs with plain Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ddpm_pkg.sv tb/tb_ddpm_dac_top.sv --top-module tb_ddpm_dac_top -o sim
./obj_dir/sim
```

The full-size runs take a few seconds each.

## Departures and limits

- **Timing.** The document's modulator is an interrupt routine on a
  microcontroller. The register timing, the pipeline between the blocks, the
  reset states and the fixed-point format of `alpha` are this design's own.
  Each file's header says which parts follow the document.
- **Counter wrap.** The carry bit that forces the closing 0 slot is this
  design's addition. With a plain N-bit wrap, the XOR/shift/+1 chain would
  repeat input bit 0 in that slot.
- **Other architectures.** The document also describes older modulator
  architectures and compares against them: a parallel-load shift register, a
  priority-multiplexer modulator, a variant that degrades gracefully under
  overscaling, and an iterative shift-register modulator. They are not
  included.
- **Analog side.** The microcontroller itself, its I/O pad and the pin's
  analog errors are not modelled. The measured INL, DNL and SNDR of the
  document's prototype depend on them and cannot be reproduced here.
- **Synthesis.** `ddpm_test_pattern` builds its table with `$sin` at
  elaboration. The tool must evaluate real-valued constant functions;
  Verilator and slang-based flows do.
