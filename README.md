# Digital PLL FM demodulator

A frequency-modulated carrier, sampled at 8 bits once per clock, is
demodulated by locking a numerically controlled oscillator (NCO) to it. The
phase-locked loop is entirely digital: a multiplier compares the input with
the NCO's cosine, a first-order filter removes the double-frequency product,
and the filtered error steers the NCO's phase step. Once the loop is locked,
the filtered error is exactly the correction that keeps the NCO on the
input's instantaneous frequency, so it *is* the demodulated message. A
16-tap moving average cleans it up for a DAC.

This is a small, fully synthesizable design (about 300 flip-flops, one
8x8 multiplier, one 256x8 ROM) written in SystemVerilog-2017.

```
             8b            8b                12b Ve(n)         12b
 fm_in ──► phase_detector ──► loop_filter ──┬──────────► fir_filter ──► dmout
 (ADC)     (Booth 8x8,       H(z)=1/(z-15/16)│             (16-tap mean)   │
            top byte)            ▲            ▼                          dmout[11:4]
                                 │        loop_gain (x1/1024)              ▼
                                 │            │ 18b Vd(n)               fm_out (DAC)
                                 │            ▼
                                 └──8b──── nco  (18b accumulator + 1/16 offset,
                                                 quarter-wave cosine ROM)
```

## Signal formats

All data are two's complement.

| signal | width | meaning |
|---|---|---|
| `fm_in` | 8 | input sample, full scale ±127 |
| `nco_out` | 8 | NCO cosine, ±127 |
| phase detector output | 8 | `(fm_in * nco_out) >>> 8`, the top byte of the 16-bit product |
| `ve` (loop filter) | 12 | demodulated signal, before the FIR |
| `vd` (gain) | 18 | NCO phase-step correction, in units of 2^-18 cycle per clock |
| `dmout` | 12 | 16-sample mean of `ve` |
| `fm_out` | 8 | `dmout[11:4]`, for an 8-bit DAC |
| `address` | 10 | NCO cosine address (phase in 1/1024 cycle) |

## How the loop works

### Phase detector
With input `sin(ωn + θi)` and NCO `cos(ωn + θo)`, the product is
`½[sin(2ωn + θi + θo) + sin(θi − θo)]`. The second term is the phase error.
The 8x8 product is formed by a radix-4 Booth multiplier (`booth_mult`) and
only its top byte is kept. For full-scale signals the useful term has a gain
of about 31.5 per radian (127·127/2/256), so near lock the detector delivers
`≈ 31.5·sin(θe)`.

### Loop filter
`b[n+1] = a[n] + b[n] − (b[n] >>> 4)`, i.e. `H(z) = 1/(z − 15/16)`. The
15/16 factor costs one shift and one subtract. Its DC gain is 16, so the
8-bit input range (−128…127) maps to −2048…2032: the 12-bit register is
exactly wide enough and cannot overflow. At the double carrier frequency
(1/8 of the clock) the gain is only about 1.3, so the ripple there is small
next to the DC term.

### Gain and NCO
The NCO is an 18-bit phase accumulator. Its top 10 bits address one cosine
cycle (1024 points); the 8 bits below are a fraction of an address step.
Every clock it advances by

```
OFFSET + Vd,   OFFSET = 2^18 / 16 = 16384   (free-running at 1/16 of the clock)
```

so at a 16 MHz clock it free-runs at 1 MHz, with 16 samples per cycle.

The gain block applies a factor of 1/1024 of a cosine address step per unit
of `ve`. With 8 fraction bits that is `Vd = ve / 4`, rounded to nearest:
`(ve + 2) >>> 2`. Consequences for
the user:

* **Frequency scale.** In lock the mean of `ve` is `4·Δ`, where `Δ` is the
  input's phase step minus 16384, in units of 2^-18 cycle per clock. One
  unit of `ve` is `f_clk / 2^20`: 15.26 Hz at a 16 MHz clock.
* **Lock range.** `ve` cannot exceed about 16 × 31.5 ≈ 504 at full-scale
  input. That limits the correction to about ±126 units, or ±0.8 % of the
  free-running frequency (±7.7 kHz at 16 MHz). The amplitude of the input
  enters the loop gain directly. A weaker input narrows the lock range and
  slows the loop.
* **Dynamics.** Loop delay is about five clocks: the phase detector, loop
  filter and accumulator registers, plus the two-stage NCO output. The loop
  settles within a few hundred clocks after a frequency step. The end-to-end
  test sends one bit per 1024 clocks and sees the level settle to within
  ±40 of its final value.

### Cosine ROM and quadrants
Only the first quarter of the cosine is stored: 256 × 8 bits, entry
`j = round(127·cos(2π(j + 0.5)/1024))`. The half-step offset makes the
mirrored quarters exact. Address bits [9:8] select the quadrant:

| address `i` | output |
|---|---|
| 0 … 255 | `+rom[i]` |
| 256 … 511 | `−rom[511 − i]` |
| 512 … 767 | `−rom[i − 512]` |
| 768 … 1023 | `+rom[1023 − i]` |

`511 − i` and `1023 − i` are the bitwise complement of the low 8 bits. The
table is loaded with `$readmemh` from `rtl/cos_rom.hex`, a path relative to
the directory where the simulator or synthesis tool is run. Regenerate it
from the formula above if the amplitude or size is changed.

### Output FIR
A 16-tap filter with all coefficients 1/16 (a moving average), built in
transposed form. Each new sample goes to every adder, and a chain of 15
registers carries the partial sums. The 16-bit sum is shifted right by 4.
It nulls the residual double-carrier ripple (period 8 samples) and its
harmonics, which fall on its zeros at multiples of f_clk/16.

## Timing

| path | latency |
|---|---|
| phase detector | 1 clock (registered output) |
| loop filter | 1 clock |
| loop gain | combinational |
| NCO: `vd` → accumulator → `address` | 1 clock |
| NCO: `address` → `nco_out` | 2 clocks (ROM read, complement/select) |
| FIR: `ve` → `dmout` | 1 clock, plus a group delay of 7.5 samples |

All registers use a synchronous, active-high reset to zero. One sample is
taken per clock; there is no handshake.

## Relation to the original design

The structure follows a published DPLL FM receiver: the block chain, all
widths (8/16/12/18/10 bits), the 15/16 loop filter, the 1/1024 gain, the
1/16 NCO offset, the 256×8 quarter-wave ROM and its quadrant mapping, and
the 16-tap 1/16 FIR in transposed form. Choices made here where that
description was silent or self-contradictory:

* **Number format.** Signed two's complement throughout.
* **Phase detector output.** The top byte of the product is kept, matching
  the description of cropping the most significant bits.
* **Loop filter coefficient.** 15/16 = 0.9375.
* **Gain.** The 1/1024 factor is applied in cosine-address steps, as
  described under *Gain and NCO*. A literal divide of the 12-bit value by
  1024 would leave no usable correction.
* **ROM contents.** The cosine values, amplitude 127 and half-step offset
  are this design's choice.
* **Outputs.** The FIR output is 12 bits (`dmout`), and its top 8 bits are
  the DAC output (`fm_out`).
* **Converters.** The ADC and DAC are analog parts of the FPGA board and are
  not part of the RTL. `fm_in` and `fm_out` are their digital sides.
* **Pipelining.** Register placement and reset style are this design's choice.
* **NCO spectral purity.** The original aims for a 70 dB spurious-free dynamic
  range from the cosine table. With 8-bit amplitudes and a 10-bit phase, this
  NCO's spurs are limited to roughly 50 dB below the carrier. Reaching 70 dB
  would need wider ROM words and a wider phase detector input.

For scale: the original FPGA implementation reports 498 flip-flops and a
400 MHz maximum clock on a Virtex-5. This RTL has 304 flip-flops. No timing
closure has been done on it.

The original receiver was tested with carriers of 80–156 MHz carrying 64-bit
text messages. This RTL tracks a carrier at f_clk/16 ± 0.8 %. Such carriers
therefore have to be converted to f_clk/16 before they reach `fm_in`; at a
400 MHz clock f_clk/16 would be 25 MHz. The same five messages are
demodulated bit-exactly in the end-to-end testbench at that scaled carrier.

## Files

| file | content |
|---|---|
| `rtl/fm_pkg.sv` | widths, sample types, quadrant enum |
| `rtl/fm_receiver.sv` | top: `dpll` + `fir_filter` |
| `rtl/dpll.sv` | the loop: `phase_detector`, `loop_filter`, `loop_gain`, `nco` |
| `rtl/phase_detector.sv`, `rtl/booth_mult.sv` | Booth multiplier phase detector |
| `rtl/loop_filter.sv` | 15/16 IIR |
| `rtl/loop_gain.sv` | 1/1024 gain |
| `rtl/nco.sv`, `rtl/cos_rom.sv`, `rtl/cos_rom.hex` | NCO and its quarter-wave table |
| `rtl/fir_filter.sv` | 16-tap moving average |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the design with values computed independently:
integer or real-valued models, not the RTL itself. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_phase_detector`: random, corner and swept operands against
  `floor(a·b/256)`.
* `tb_loop_filter`: cycle-by-cycle integer model, saturation limits, impulse.
* `tb_loop_gain`: all 4096 inputs.
* `tb_cos_rom`: all 256 entries against `$cos`.
* `tb_nco`: accumulator model, free-running period of 16, random
  corrections, all four quadrants, output against `$cos`.
* `tb_fir_filter`: 16-sample history model, full-scale and step inputs.
* `tb_dpll`: sine inputs offset by 0, ±40, ±80 and 20 units. Checks
  frequency lock (the NCO advances exactly as far as the input) and
  `mean(ve) = 4·Δ`. An offset of 250 units, outside the lock range, must
  not lock, and the loop must re-lock after stepping back in range.
* `tb_fm_receiver`: the five 64-bit messages, FSK-modulated at ±60 units,
  1024 clocks per bit, at the default sizes. Checks:
  * every bit is recovered;
  * each bit's level is 240 ± 40;
  * `dmout` matches a FIR model of `ve` every clock, and `fm_out` is
    `dmout[11:4]`;
  * lock, positive and negative deviation, all NCO quadrants and FIR
    smoothing each occur.

  The whole run takes well under a second.

To run one, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fm_pkg.sv tb/tb_fm_receiver.sv \
          --top-module tb_fm_receiver
./obj_dir/Vtb_fm_receiver
```

Replace `fm_receiver` with any module name for its unit test. Verilator
reports the product's unused low byte in `phase_detector` and unused package
constants. Both are expected.
