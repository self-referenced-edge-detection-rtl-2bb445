# Self-referenced edge detection PWM transceiver

A pulse-width-modulated (PWM) link sends data as the width of one pulse per
carrier cycle. A conventional PWM receiver needs a PLL to make several
sampling clocks, shifted in time, that find where the falling edge is. This
design needs no PLL and no receive clock at all. Each received pulse is
compared with a copy of itself delayed by about half a carrier period. The
pulse's own rising edge, which is never modulated, is the time reference for
its own falling edge, which carries the data.

The same comparison, with other delay lengths, gives two more functions:

* **Inter-cycle error check (ECC).** The distance between the falling edges
  of two adjacent pulses is compared with one carrier period. This gives a
  second, independent opinion on each bit, and it corrects isolated errors
  of the main receiver.
* **Jitter measurement.** If the delay is made n periods longer, each latch
  compares two carrier edges n cycles apart. Counting how often each latch
  reads 1 gives points of the cumulative distribution (CDF) of the carrier's
  timing error. That measurement is what you need to choose the modulation
  step and the carrier frequency, and to calibrate the delay lines.

The RTL is a time-accurate simulation model of the whole link. The analog
parts are behavioural models with real delays. The digital parts are
synthesizable SystemVerilog.

## Signalling

Defaults: carrier period `T = 500 ps` (2 GHz) and modulation step
`dT = 25 ps`. The 2 GHz carrier gives 4 Gb/s in 2-bit mode and 2 Gb/s in
1-bit mode, the two rates the design targets. The value of `dT` is this
design's own choice. It leaves a margin of `dT` at every comparison.

Pulse width for symbol `s`:

```
width = 0.5T + (2s - 3) dT        s = 0..3
      = 175, 225, 275, 325 ps     (T = 500, dT = 25)
```

The three receiver latches sample at `0.5T - 2dT`, `0.5T` and `0.5T + 2dT`
after the rising edge (200, 250 and 300 ps). Each one sits midway between two
possible falling-edge positions:

| symbol | width | latches (0.5T+2dT, 0.5T, 0.5T-2dT) | decoded |
|-------:|------:|:----------------------------------:|--------:|
| 00 | 0.5T - 3dT | 0 0 0 | 0 |
| 01 | 0.5T - dT  | 0 0 1 | 1 |
| 10 | 0.5T + dT  | 0 1 1 | 2 |
| 11 | 0.5T + 3dT | 1 1 1 | 3 |

In 1-bit mode a 0 is sent as symbol 01 and a 1 as symbol 10. The middle
(0.5T) latch alone then decides the bit. This mapping is this design's
choice.

## Transmitter (`pwm_transmitter`)

```
carrier ─► duty control (-3dT) ─┬──────────────────────────────┬─► OR ─► tx_out
                                ├─► 2dT ─┐                     │   ▲
                                ├─► 4dT ─┼─► selector (4:1) ───┼───┘
                                └─► 6dT ─┘      ▲     (input 0 = undelayed)
                   tx_data ─► modulation circuit
```

* `pwm_duty_control` narrows the 50 % carrier to `0.5T - 3dT`. It holds back
  the rising edge by `3dT` and keeps the falling edge. That constant shift of
  every pulse does not matter to a self-referenced receiver.
* `pwm_delay_line` makes copies delayed by 2, 4 and 6 dT.
* `pwm_selector_or` ORs the undelayed pulse with the selected copy. The
  rising edge stays where it was, and the falling edge moves later by `2s·dT`.
* `pwm_modulation_circuit` registers `tx_data` on the rising carrier edge.
  At that moment every selector input is low, so changing the selection
  cannot glitch the output. The symbol is sent in the pulse that starts `3dT`
  later.

## Main receiver (`pwm_receiver`)

`rx_in` drives three delay lines and the data inputs of three
`pwm_edge_latch` comparators. Each delayed copy's rising edge clocks one
latch. That latch therefore reads 1 when the pulse is still high at its
delay, which means the falling edge came later. `pwm_thermo_decoder` counts
the ones. It also flags a code with a bubble (a 1 above a 0) as invalid. The
symbol is registered on the next rising edge of `rx_in`.

Each line also has an input that adds delay:

* `extra_ps`, common to all three lines, is set to `(n - 0.5)T` in
  jitter-test mode.
* `trim_ps[i]` is for calibrating line `i` on its own.

The latches are built as edge-triggered samplers on the rising edge of the
delayed signal.

## Error check and correction (1-bit mode)

`pwm_aux_receiver` inverts `rx_in`, so that falling edges become rising edges,
and delays the result by `T - dT` and `T + dT`. Each delayed edge clocks a
latch that samples the inverted signal. The latch shows whether the *next*
falling edge has already arrived. Adjacent falling edges are `T` apart when
the bit does not change, `T + 2dT` apart for 0→1 and `T - 2dT` apart for 1→0.
So:

| A- A+ | meaning |
|:-----:|---------|
| 00 | 0 → 1 |
| 01 | no change |
| 11 | 1 → 0 |
| 10 | impossible |

`pwm_ecc` holds the raw bit `D2` and the previous corrected bit `D1`. It
looks up an error code in a 16-entry table of `(A-A+, D1D2)`: 0 where the pair
matches the transition, otherwise 1. On an error it stores the inverted raw
bit in `D1`, which is the corrected output. The A-/A+ pair is registered
together with the raw bit. Without that register it would be compared with
the wrong pair of bits, because both receivers settle in the same carrier
cycle.

This part of the design needs the most care in use:

* **The corrected output trusts A-/A+ over the raw bit.** With a correct pair
  and a correct `D1`, every single wrong raw bit is repaired, even several in
  a row. But the table cannot repair a wrong `D1`: it keeps it. That is why
  the reset state is consistent. `D1 = D2 = 0` and `A = 01` ("no change").
  The A+ latch resets to 1, and during reset the transmitter sends the zero
  of the current mode. **Change `mode_1bit` only while `rst_n` is low.**
* The ECC only helps against errors that move the rising edge, or the
  falling edge too little to fool the inter-cycle comparison. An error that
  corrupts the falling-edge spacing corrupts A-/A+ as well, and then the
  error is passed on.
* The ECC is clocked by the rising edge of `rx_in`. The corrected bit of a
  pulse appears two received rising edges after that pulse.

## Falling-edge-only decoding

The two auxiliary latches are enough to receive 1-bit PWM without the main
receiver. `pwm_edge_only_decoder` rebuilds each bit from the previous bit and
the pair:

* 00: the bit became 1.
* 11: the bit became 0.
* 01 (and the impossible 10): the bit is unchanged.

The data thus follow from the accumulated falling-edge period. The decoder
ignores rising edges entirely. It is differential, so one wrong pair inverts
every later bit until a transition of the other sense. After reset it assumes
the previous bit was 0. The top brings its result out as `rx_bit_edge_only`.

## Jitter measurement

Set `jitter_test = 1` and `jitter_n = n`. Every receiver line then becomes
`nT - 2dT`, `nT` and `nT + 2dT`. Latch `i` reads 1 when carrier edge `k+n`
arrives before edge `k` plus its delay. A `cdf_start` pulse makes
`pwm_jitter_cdf_counter` count, over 1024 cycles, how often each latch read
1. The counter is clocked on the falling edge of `rx_in`, away from the latch
updates.

* For a clean carrier the outer counts are 0 and 1024 and the middle count
  is about half. This is the "small jitter" case: `dT` can shrink or the
  carrier can speed up.
* Outer counts away from 0 and 1024 mean the n-cycle timing error reaches
  `2dT`.

Sending symbol 11 during the test gives the widest pulses. The widest pulses
give the most room before a latch would see the pulse's falling edge instead
of its rising edge.

The rule that turns the counts into a new `dT`, carrier frequency or trim
setting is not part of this RTL. The counts, `jitter_n` and `rx_trim_ps` are
ports, so an external controller can implement that rule.

## Top level (`pwm_transceiver`)

The transmitter, main receiver, auxiliary receiver, ECC and CDF counters in
one block. The channel is outside: connect `tx_out` to `rx_in` through
whatever wire model you need.

| port | dir | meaning |
|------|-----|---------|
| `carrier_clk` | in | carrier clock (2 GHz at defaults) |
| `rst_n` | in | asynchronous active-low reset |
| `mode_1bit` | in | 0: 2-bit PWM, 1: 1-bit PWM with ECC (change under reset) |
| `tx_data[1:0]` | in | symbol, sampled on each rising carrier edge; bit 0 only in 1-bit mode |
| `tx_out` / `rx_in` | out / in | to and from the channel |
| `jitter_test`, `jitter_n[3:0]` | in | add `(n-0.5)T` to the receiver lines |
| `rx_trim_ps[3][16]` | in | per-line trim in ps |
| `cdf_start` | in | start a 1024-cycle count, sampled on the falling edge of `rx_in` |
| `rx_thermo[2:0]`, `rx_data[1:0]`, `rx_code_valid` | out | latch outputs, registered symbol, valid code |
| `rx_bit_raw`, `rx_bit_corrected`, `ecc_error` | out | 1-bit decision before and after ECC, error code |
| `rx_bit_edge_only` | out | 1-bit decision from falling edges alone |
| `cdf_count[3][11]`, `cdf_busy`, `cdf_done` | out | CDF counts and status |

Parameters: `T` (ps), `DT` (ps) and `CDF_WINDOW`. The defaults are in
`pwm_pkg`.

Latency: a symbol sampled on carrier edge k appears on `rx_data` after the
received rising edge of pulse k+1. That is one carrier period plus `3dT`
plus the channel delay.

Timing limits at other parameter values: `6dT < 0.5T` (the latest copy must
end before the next symbol is selected), and the jitter must stay below `dT`
for error-free data.

## Files

| file | kind | content |
|------|------|---------|
| `rtl/pwm_pkg.sv` | package | T, dT, widths, types |
| `rtl/pwm_delay_line.sv` | behavioural | transport delay with trim |
| `rtl/pwm_duty_control.sv` | behavioural | `-3dT` duty control |
| `rtl/pwm_modulation_circuit.sv` | RTL | symbol register and selector mapping |
| `rtl/pwm_selector_or.sv` | RTL | selector and OR |
| `rtl/pwm_transmitter.sv` | model | transmitter |
| `rtl/pwm_edge_latch.sv` | RTL | timing comparator |
| `rtl/pwm_thermo_decoder.sv` | RTL | thermometer to binary, bubble flag |
| `rtl/pwm_receiver.sv` | model | main receiver |
| `rtl/pwm_aux_receiver.sv` | model | inter-cycle receiver |
| `rtl/pwm_ecc.sv` | RTL | error check and correction |
| `rtl/pwm_edge_only_decoder.sv` | RTL | falling-edge-only 1-bit decoder |
| `rtl/pwm_jitter_cdf_counter.sv` | RTL | CDF counters |
| `rtl/pwm_transceiver.sv` | model | top level |

The models marked "model" are synthesizable except for the delay elements
and duty controller they contain. For silicon, those two would be custom
analog cells.

## Simulating

Each `tb/tb_<module>.sv` is self-checking and prints
`TB_RESULT checks=N failures=M`. All files use `timeunit 1ps`. For example,
the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/pwm_pkg.sv rtl/*.sv tb/tb_pwm_transceiver.sv \
  --top-module tb_pwm_transceiver -o sim
./obj_dir/sim
```

`tb_pwm_transceiver` runs the top at its default parameters, in about two
seconds. It uses 2-bit symbols with ±10 ps carrier jitter, then a
trimmed line that produces a bubble code. Next come two jitter tests: n=1 at
±30 ps, where the outer counts are 0 and 1024 and the middle about 550, and
n=2 at ±60 ps per cycle, where the counts spread. Last, after a reset into
1-bit mode, 600 bits in which isolated 1-pulses have a rising edge held back
by 2dT in the channel. In that last phase every such pulse is misread by the
main receiver, flagged by the ECC and corrected. The falling-edge-only
decoder is right throughout. The 2-bit symbols come from a PRBS7
(`x^7 + x^6 + 1`).

## Departures and limits

* `dT = 25 ps` and the CDF window (1024 cycles) are this design's choices.
  `T = 500 ps` follows from the 2 Gb/s-per-bit rate.
* The transmitter has three delay elements (2, 4 and 6 dT) plus a direct
  path into the selector. The direct path counts as the fourth selector
  input.
* How the duty controller narrows the pulse, the decoder's bubble flag, the
  receiver's output register, the 1-bit transmit mapping, the clocks of the
  ECC and the CDF counters, and all reset behaviour are this design's own.
* The ECC registers A-/A+ beside the raw bit, a pipeline stage the original
  schematic does not show.
* The data-rate optimisation and delay-line calibration algorithms are not
  implemented. Only their measurement and actuation hooks are.
* The falling-edge-only decoder treats the pair 10 as "unchanged". That is
  this design's choice.
* Not built: the PLL-based conventional receiver, which serves only as a
  comparison. Also not built: ECC variants with other inter-cycle
  distances, such as `0.5T` or several periods.
* Bit-error rates of 1e-12, area and power are properties of silicon and are
  not modelled.
