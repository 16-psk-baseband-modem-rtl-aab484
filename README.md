# 16-PSK baseband modem

A baseband modem that sends four bits per symbol as one of 16 phases on a
circle, all in fixed-point logic with no general-purpose arithmetic beyond
one FIR filter per branch. The transmit side collects serial bits into 4-bit
words, Gray-codes them, looks the code up in a 16-entry table of 8-bit I/Q
points, and smooths the I and Q streams with a 33-tap raised-cosine filter.
The receive side decides each symbol with three thresholds and two sign bits,
undoes the Gray code and sends the bits out serially again.

The two halves are connected back to back: the 8-bit filter outputs drive the
decision logic directly. D/A and A/D converters, carrier mixers and the RF
front end would sit in between in a radio, but they are not part of this
RTL. The top level, `psk16_modem`, therefore returns at `serial_out` exactly
the bits it received at `serial_in`, 22 clocks later, and brings out the
shaped I/Q samples (`tx_i`, `tx_q`) that a D/A converter would take.

```
serial_in -> S/P -> Gray encoder -> 16-ary mapper -+-> LPF (I) --+--> tx_i
  (en)       ^                                     +-> LPF (Q) --+--> tx_q
             | sel (2-bit counter)                                |
                                                                  v
serial_out <- P/S <- Gray decoder <- [register] <- decision device
               ^                        ^
               | sel (restarts per symbol)  sym_center (symbol-centre strobe)
```

## Why Gray coding and what the table holds

On a 16-PSK circle, noise most often pushes a symbol onto a neighbouring
point. The labels are assigned so that neighbours differ in one bit. A binary
word `k` (0..15) is sent at phase `(2k+1) * 11.25` degrees under the label
`g = k ^ (k >> 1)`. Label 0000 sits just above the positive I axis and the
labels advance counter-clockwise: 0001, 0011, 0010, 0110, and so on.

The mapper is addressed by the Gray label. Its coordinates use four levels,
0.98, 0.83, 0.56 and 0.20 of full scale, times 127: 124, 105, 71 and 25.
Values are two's complement.

| Gray | phase (deg) | I | Q | | Gray | phase (deg) | I | Q |
|------|------|------|------|-|------|------|------|------|
| 0000 | 11.25 | 124 | 25 | | 1100 | 191.25 | -124 | -25 |
| 0001 | 33.75 | 105 | 71 | | 1101 | 213.75 | -105 | -71 |
| 0011 | 56.25 | 71 | 105 | | 1111 | 236.25 | -71 | -105 |
| 0010 | 78.75 | 25 | 124 | | 1110 | 258.75 | -25 | -124 |
| 0110 | 101.25 | -25 | 124 | | 1010 | 281.25 | 25 | -124 |
| 0111 | 123.75 | -71 | 105 | | 1011 | 303.75 | 71 | -105 |
| 0101 | 146.25 | -105 | 71 | | 1001 | 326.25 | 105 | -71 |
| 0100 | 168.75 | -124 | 25 | | 1000 | 348.75 | 124 | -25 |

`symbol_mapper` does not store these numbers literally. It generates them
from the four magnitudes (parameter `MAG`): it converts the Gray label back
to `k`, then the quadrant `k[3:2]` selects the signs and whether I and Q swap.
Synthesis reduces this to a 16-word constant table. The read is synchronous,
with one clock of latency.

## The wave-shaping filter

This is the part that needs the most care. Each branch has one `lpf`: a
direct-form FIR with 33 taps and a 32-stage delay line. The 8-bit
coefficients (`psk16_pkg::LPF_COEF`) sample a raised cosine with roll-off
β = 0.25:

    h(t) = cos(2πβt) / (1 - (4βt)²) · sinc(t),   t = -4.000001 + 0.25k,  k = 0..32

The taps span ±4 symbols at four samples per symbol. The small offset in `t`
steps around the 0/0 points at t = ±1. Each value is scaled by 128 and
rounded. The centre tap, 1.0, does not fit in 8 signed bits and is clipped
to 127:

    0 1 1 0 0 1 2 3 0 -7 -15 -16 0 34 77 114 127 114 77 34 0 -16 -15 -7 0 3 2 1 0 0 1 1 0

**Truncation.** Each 8×8 product is cut back to 8 bits by keeping bits
14..7, so the 7 fraction bits are dropped and the result is rounded down. The
33 truncated products are summed in a chain of 8-bit adders that discards
the carry, so the sum is taken modulo 256. This keeps every adder at 8 bits.
The price is that a sum outside −128..127 wraps around instead of clipping.

**One impulse per symbol.** The filter runs at the bit clock. With four bits
per symbol, that is four samples per symbol, which matches the 0.25-symbol
tap spacing. The mapper output enters the filter only on the one clock after
it is read. On the other three clocks of the symbol the filter input is
zero. As a result:

* At a symbol's centre, 16 clocks after its impulse entered, every other
  symbol sits on a tap whose coefficient is 0 (the raised cosine's zero
  crossings). The output is then exactly `floor(127·v/128)` for the symbol's
  value `v`: 123, 104, 70 or 24 in magnitude. The receiver sees no
  interference from neighbouring symbols.
* Between centres, the shaped waveform overshoots. For some symbol patterns
  the exact sum leaves the 8-bit range and the output wraps. In the
  end-to-end random test, about 1,500 of the roughly 10,000 clocks that
  carried 2,500 random symbols had a wrapped I or Q sample. The decisions
  only use centre samples, so they are not affected, but a D/A converter fed
  from `tx_i`/`tx_q` would see these wrapped samples.

`y` is combinational from `x(n)` and the delay line. There is no output
register. The critical path is therefore 33 multipliers feeding a 32-adder
ripple.

**Symbol grid and `en`.** Zero leakage at the centres needs every impulse
on the same four-clock grid. The selection counter `sel` that drives the S/P
converter therefore runs freely from reset. `en` must be held high or low
for whole symbols (sel = 00..11). A symbol period with `en` low sends
nothing, and the filter input stays zero. An assertion in `modulator` checks
this rule. If `en` gaps were allowed at arbitrary lengths, neighbours would
land on non-zero taps at the centre sample. In testing, that moved samples
across decision thresholds.

## Symbol decision

`decision_device` is combinational and looks at one I/Q pair:

| bit | meaning | logic |
|-----|---------|-------|
| D3 | Q < 0 | sign bit of Q |
| D2 | I < 0 | sign bit of I |
| D1 | point near the Q axis | NOT(\|I\| > C2) |
| D0 | \|Q\| is one of the two middle levels | (\|Q\| > C1) XOR (\|Q\| > C3) |

The thresholds are 0.905, 0.695 and 0.38 of full scale, times 127:
C1 = 115, C2 = 88 and C3 = 48 (parameters). Each lies midway between two
neighbouring magnitude levels. The magnitude is bits 6..0,
inverted when the sign bit is set. That is the one's complement, so |x|−1
for negative x, and it keeps the comparators 7 bits wide. The bias of one
code does not matter, because the thresholds lie between the levels. The
tightest margin is |Q| = 123 against C1 = 115, 8 codes. Any disturbance of ±7 codes or
less at a symbol centre therefore cannot cause an error.

The demodulator stores the four decided bits when `sample` marks a symbol
centre. In the top level, `sample` is the modulator's `sym_center`: the
mapper strobe delayed by the filter's group delay of 16 clocks. The Gray
decoder and the parallel-to-serial converter then send the word out MSB
first over the next four clocks. The P/S converter is a one-hot AND-OR
multiplexer, and its 2-bit counter restarts at 00 on every stored symbol.
Symbol centres must be at least four clocks apart.

### Noise performance

The per-axis decision is cheap, but it is not an optimal phase detector.
Take two neighbouring points at 56.25° and 78.75°. D0 tells them apart on
|Q| alone, and their |Q| values (0.83 and 0.98) are only 0.15 of full scale
apart. That leaves about 8 codes of margin at the symbol centre. The
distance between the points on the circle, 2·sin(11.25°) = 0.39, would
allow about 24.

`tb_ber_sweep` measures the result with Gaussian noise added to the filter
outputs:

| Eb/N0 (dB) | 10 | 15 | 20 | 25 | 30 |
|------------|----|----|----|----|----|
| measured BER (24,000 bits) | 7.7e-2 | 2.0e-2 | 2.9e-3 | 0 | 0 |
| ideal 16-PSK detector | 4.0e-2 | 9.6e-4 | 1.7e-8 | ~0 | ~0 |

At these points the original design's published floating-point simulation
gives similar values: about 1e-1, 3e-2 and 5e-3 at 10, 15 and 20 dB, and
1e-5 near 25 dB.

## Timing

For a symbol whose first bit is on `serial_in` in cycle c (with `en` high
and `tx_sel` = 00):

| cycle | event |
|-------|-------|
| c .. c+3 | bits 3, 2, 1, 0 sampled |
| c+4 | binary word and Gray code valid (`tx_bin`, `tx_gray`) |
| c+5 | mapper output valid (`map_i`, `map_q`); impulse enters the filters |
| c+21 | symbol centre on `tx_i`/`tx_q`; `sym_center` high |
| c+22 .. c+25 | bits 3..0 on `serial_out`, `serial_valid` high |

Throughput is one bit per clock. No clock rate is fixed by the RTL.

## Where this design departs from or fills in the original description

The described modem defines the block chain, the Gray XOR structures, the
AND-gate S/P and P/S converters, the 33-tap raised-cosine filter with 8-bit
truncation after every multiply and add, and the sign/threshold decision
with its NAND and XOR gates. This implementation adds or chooses the
following:

* **Bit order:** MSB first in both converters.
* **Word register:** the S/P output is held in a word register that changes
  once per symbol.
* **Mapper levels:** the magnitudes are the constellation's two-decimal
  levels times 127. A published waveform of the original lists eight mapper
  words. Six of them equal this table. The other two are one bit away from
  it and would make the constellation asymmetric, so the symmetric values
  are used.
* **Coefficient format:** Q1.7, rounded, with the centre tap clipped. Products
  keep bits 14..7, and the adder chain discards the carry.
* **Filter input:** zero insertion, one impulse per symbol.
* **`en` rule:** `en` changes only at symbol boundaries, and the
  selection counter runs freely.
* **Symbol timing:** the `sym_center` strobe is taken from the transmitter,
  because the receiver has no timing recovery.
* **Magnitude:** the decision device uses the one's-complement magnitude.
* **Threshold codes:** the 8-bit codes are derived from the decimal
  thresholds. The original's binary codes do not follow one consistent
  scale. C2 is taken as 0.695, the midpoint of the 0.56 and 0.83 levels,
  where the original's value reads 0.605. The other two thresholds are
  exact midpoints, and 0.605 would leave only 0.045 of margin on one
  side.
* **Reset and control:** reset is asynchronous and active low (`rst_n`).
  The handshake signals `en`, `word_valid`, `valid` and `serial_valid` are
  this design's own.
* **Not included:** converters, RF, pads and physical design. The FPGA test
  fixture (clock divider, pattern ROM, LCD, LEDs, noise switch) is also left
  out, apart from a testbench that adds noise between the halves.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block
against values the bench computes independently, often with real
arithmetic: phases from `$cos`/`$sin`, and filter coefficients recomputed
from the raised-cosine formula.

* `tb_psk16_modem` runs the top level at its default size. It first sends
  the symbol sequence 0000, 0001, 0101, 1101, 1001, 0100 and checks its Gray
  and mapper values. It then sends 2,000 symbols back to back and 500 symbols
  with idle periods. It checks:
  * every recovered bit and its exact 22-clock latency;
  * `tx_i`/`tx_q` on every clock, against a bench model of the truncating
    filters.

  It also counts that each mechanism occurs: all 16 points sent, idle
  periods, truncated products and wrapped filter sums.
* `tb_noise_levels` adds pseudo-random noise from a 15-bit LFSR between
  modulator and demodulator, at ±2, ±4, ±7, ±15 and ±31 codes. It expects
  no errors up to ±7 and errors at ±31. Measured: 0, 0, 0, 44 and 361 bit
  errors out of 2,400.
* The testbenches also cover the remaining blocks: the leaf blocks
  exhaustively or with random stimulus, the filter against a bit-exact
  model, and the modulator and demodulator on their own.

* `tb_ber_sweep` measures the bit-error rate against Eb/N0 (see Noise
  performance).

Limits: nothing here has been timed against a cell library.

## Simulating

Every file is plain SystemVerilog. The shared package must come first. For
example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/psk16_pkg.sv tb/tb_psk16_modem.sv --top-module tb_psk16_modem -o sim
./obj_dir/sim
```

`-Wno-fatal` keeps lint warnings in the testbenches' own arithmetic from
stopping the build. Each testbench ends with a line
`TB_RESULT checks=N failures=M`. Use any other `tb/tb_*.sv` in the same
way.

## Files

| file | content |
|------|---------|
| `rtl/psk16_pkg.sv` | widths, types, constellation levels, thresholds, filter coefficients |
| `rtl/sp_converter.sv` | serial-to-parallel converter |
| `rtl/gray_encoder.sv`, `rtl/gray_decoder.sv` | Gray code conversions |
| `rtl/symbol_mapper.sv` | 16-ary mapper (constellation table) |
| `rtl/lpf.sv` | 33-tap truncating FIR |
| `rtl/modulator.sv` | transmit chain with two filters and the symbol-centre strobe |
| `rtl/decision_device.sv` | threshold decision |
| `rtl/ps_converter.sv` | parallel-to-serial multiplexer |
| `rtl/demodulator.sv` | receive chain |
| `rtl/psk16_modem.sv` | top level, modulator looped into demodulator |

To change the filter, edit `LPF_COEF` and `LPF_TAPS` in the package. Keep
the tap count at 4m+1, so that the centre tap falls on the four-sample
symbol grid. `modulator` derives the symbol-centre delay, (taps−1)/2, from
the tap count, and the end-to-end latency changes with it. To move the constellation, change `SYM_MAG` and the thresholds
together.
