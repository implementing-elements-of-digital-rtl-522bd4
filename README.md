# Digital transverse feedback: signal-processing RTL

A transverse feedback damps the betatron oscillations of a particle beam in a
circular accelerator. It measures the beam's transverse position error at a
beam position monitor (BPM), processes it, and applies a proportional kick
with a deflector ("kicker") further round the ring. Two conditions must hold
for the kick to damp the motion:

* **Phase.** The betatron phase between the measuring point and the deflector
  must be an odd multiple of 90°. Two BPMs placed a quarter betatron
  wavelength apart give two signals in quadrature. Weighting them with
  `b1 ≈ cos φ` and `b2 ≈ sin φ` and adding them synthesises a *virtual
  pick-up* at any betatron phase φ, because
  `cos(ωt − φ) = cos ωt·cos φ + sin ωt·sin φ`.
* **Timing.** The kick must hit the same particles that were measured. The
  processing delay plus the fixed delays of cables and electronics must
  equal the particles' flight time from pick-up to kicker:
  `T_coarse + T_fine + T_fix = T_flight`. This total is usually less than
  one turn.

The revolution frequency changes during acceleration. The design therefore
makes every filter frequency and every delay a register that a control
processor can rewrite while the beam circulates.

This repository holds the FPGA signal-processing part as synthesizable
SystemVerilog, plus self-checking testbenches. The processor, converters and
PLLs are outside it. The target is a 100 MHz main clock, 12-bit ADCs and a
14-bit DAC.

## Signal chain

```
adc1 ─▶ reg ─▶ BPM delay (T_BPM) ─▶ notch (T_rev) ─▶ ×b1 ─┐
                                                            Σ ─▶ coarse delay ─▶ fine delay ─▶ dac
adc2 ─▶ reg ─▶ reg ───────────────▶ notch (T_rev) ─▶ ×b2 ─┘      (T_coarse)      (T_fine)
```

| Stage | Module | What it does |
|---|---|---|
| ADC capture | `tfb_dsp_top` | Registers the 12-bit two's-complement words and sign-extends them to 14 bits. |
| BPM delay | `delay_line` | Delays BPM 1 by the flight time to BPM 2, so both channels see the same particles. BPM 2 gets one matching register. |
| Notch filters | `notch_filter` | `y[n] = x[n] − x[n − T_rev]`. Removes the closed-orbit offset and everything else that repeats every turn. |
| Mixer | `coef_mixer` | Computes `b1·x1 + b2·x2`, the virtual pick-up. |
| Coarse delay | `delay_line` | Delays by whole 10 ns clock cycles. |
| Fine delay | `fine_delay_path`, `fine_delay_ctrl` | Delays in 125 ps steps by handing the data to phase-shifted PLL clocks. |
| Control registers | `tfb_ctrl_regs` | Memory-mapped registers written by the processor. |

Shared widths, types and the register map are in `tfb_pkg`.

## The RAM delay line (coarse delay, one-turn delay, BPM delay)

All three integer-cycle delays use one structure, `delay_line`:

* A 1024 × 14-bit dual-port RAM with one clock for both ports.
* A free-running 10-bit counter gives the write address.
* The read address is the write address minus the requested delay, taken
  modulo 1024.

Timing details:

* The output is registered. A sample appears `delay + 1` clock edges after
  it was sampled.
* For `delay = 0` the RAM output is bypassed with the word being written.
  Without this bypass, a read at the write address would return a word 1024
  cycles old.
* The settings take 10-bit values (0–1023). The longest delay is therefore
  about 10 µs, which covers one turn down to a 100 kHz revolution frequency
  (1000 cycles).
* RAM contents are not reset. For up to 1024 cycles after start-up, long
  delays output whatever the RAM held.

The notch filter uses `delay = T_rev` and subtracts the delayed word from a
copy of the input that has been registered once. Its frequency response is
`|H| = 2|sin(π f / f_rev)|`:

* zeros at every revolution harmonic;
* +6 dB half-way between harmonics;
* a phase that jumps at each zero.

The control software must allow for that gain and phase.

`T_rev` is a whole number of clock cycles. A revolution period that is not a
multiple of 10 ns, such as 666.7 ns at 1.5 MHz, must be rounded. Rounding
moves the notches slightly off the harmonics.

## The fine delay: moving data between phase-shifted clocks

This is the least obvious part. Three PLLs run from the main clock and
produce `clk_left`, `clk_mid` and `clk_right` with programmable phase lags.
The lags come in steps of 125 ps, one eighth of the PLL's 1 ns VCO period.
The data crosses from one clock to the next through small RAMs:

```
main clk data ─▶ [reg @clk_left] ─▶ [1-word RAM  wr@clk_left / rd@clk_mid]
              ─▶ [1-word RAM  wr@clk_mid / rd@clk_right] ─▶ [reg @clk_right] ─▶ dac
```

Each one-word RAM is written on one clock and read on a later-phased clock.
The read captures the word written most recently. This works as long as each
clock lags its left neighbour by more than zero and less than a full period.
The output register runs on `clk_right`, so the DAC samples leave at
`clk_right`'s phase. Moving that phase moves the analog output in time.

One step could not span a full period, so the shift is split in two.
`fine_delay_ctrl` sets:

| Clock | Lag (125 ps steps) |
|---|---|
| `clk_left` | 0 |
| `clk_mid` | ⌊(T_fine + 2) / 2⌋ |
| `clk_right` | T_fine + 2 |

* `T_fine` is clipped to 0–79. Whole periods belong to the coarse delay.
  When the fine delay is disabled, `T_fine` counts as 0.
* Each neighbouring pair is at most 5 ns apart and the total span is at
  most one 10 ns period, with one exception. The largest setting,
  T_fine = 79, puts `clk_right` at 81 steps, which is 5.125 ns after
  `clk_mid` and 10.125 ns after `clk_left`. Clipping at 78 would respect
  both limits, but would leave a 125 ps hole in the delays reachable
  together with the coarse delay.
* The extra 2 steps (250 ps) are a fixed offset. They guarantee that
  `clk_mid` lies strictly between its neighbours. If two clocks had
  coincident edges, the crossing would lose or gain a whole cycle.

**Resulting timing.** A word that leaves the coarse delay after main-clock
edge *k* reaches the DAC at

    t = (k + 4) · 10 ns + (T_fine + 2) · 125 ps

measured from main-clock edge 0. The testbenches check this exact time.

**PLL reprogramming.** When `T_fine` or the enable changes, the controller
reloads only the PLLs whose phase must change, one at a time:

1. It presents the phase on `pll_phase[i]`.
2. It pulses `pll_reconfig[i]` for one cycle.
3. It waits one cycle, then waits for `pll_busy[i]` to fall.

It never sends a request to a PLL that is still busy. The status register
reads 1 once all three PLLs hold the current targets. While the phases move,
the DAC stream can repeat or skip a sample, so change `T_fine` between beam
cycles or accept one disturbed sample.

In real silicon the crossings need timing constraints on the PLL phases.
This RTL does not model setup or hold.

## Latency budget

Take an ADC word that the ADC register captures from `adc2` at main-clock
edge *j*. After that edge it passes these stages on its way to the fine
delay:

| Stage | Cycles |
|---|---|
| BPM 2 alignment register | 1 |
| Notch filter | 2 |
| Mixer | 2 |
| Coarse delay | T_COARSE + 1 |

The word leaves the coarse delay after edge *j* + 6 + T_COARSE. The DAC
drives it from the `clk_right` edge at

    (j + 10 + T_COARSE) · 10 ns + (T_FINE + 2) · 125 ps

* A word from `adc1` arrives T_BPM cycles later.
* When the coarse delay is disabled, T_COARSE counts as 0. When the fine
  delay is disabled, T_FINE counts as 0.
* The fixed part, 100.25 ns, belongs to `T_fix` in the timing budget. So do
  the converters' own pipeline delays, which are not included.

## Arithmetic

* Samples are 14-bit two's complement. The 12-bit ADC words are
  sign-extended, so the notch filters never saturate in practice. They still
  saturate if fed full-scale 14-bit data.
* `b1` and `b2` are 18-bit signed with 16 fraction bits (range −2 … +2), to
  match the FPGA's 18 × 18 multipliers.
* The mixer computes `floor((b1·x1 + b2·x2) / 2^16)` and saturates it to 14
  bits.

## Control registers

`tfb_ctrl_regs` has a simple 32-bit, word-addressed bus:

* `write` / `writedata` take effect on the clock edge.
* `read` returns `readdata` with `readdatavalid` one cycle later.
* Reads and writes must not happen in the same cycle (an assertion checks
  this).

| Addr | Name | Bits | Meaning |
|---|---|---|---|
| 0 | B1 | 17:0 | Coefficient b1 (signed, 16 fraction bits; reads back sign-extended) |
| 1 | B2 | 17:0 | Coefficient b2 |
| 2 | T_REV | 9:0 | Revolution period in clock cycles (notch filters) |
| 3 | T_COARSE | 9:0 | Coarse delay in clock cycles |
| 4 | T_FINE | 6:0 | Fine delay in 125 ps steps (0–79 used) |
| 5 | ENABLE | 2:0 | Bit 0: notch filters. Bit 1: coarse delay. Bit 2: fine delay. |
| 6 | T_BPM | 9:0 | Delay of BPM 1, clock cycles |
| 7 | STATUS | 0 | Read only. Fine-delay PLLs hold T_FINE. |

All registers reset to 0. The output is therefore silent (b1 = b2 = 0), and
the filters and delays are bypassed until the processor configures them.

A control program typically does the following for a revolution frequency
`f_rev` and a programmable delay `D`, which is the flight time minus all
fixed delays:

* `T_REV = round(100 MHz / f_rev)`
* `T_COARSE = floor(D / 10 ns)`
* `T_FINE = round((D mod 10 ns) / 125 ps)`; a result of 80 becomes 0 with
  `T_COARSE` one higher
* `T_BPM` = the BPM-to-BPM flight time in cycles
* `b1, b2` = the cos/sin weights for the required phase, corrected for the
  notch filter's gain and phase at the betatron frequency.

Examples:

* 2 MHz with a 25 ns step: `T_REV = 50`, `T_COARSE = 2`, `T_FINE = 40`.
* 1.5 MHz with a 253 ns delay: `T_REV = 67`, `T_COARSE = 25`, `T_FINE = 24`.

## Top-level interface (`tfb_dsp_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 100 MHz main clock. Synchronous active-high reset. |
| `adc1`, `adc2` | in | 12 | BPM 1 / BPM 2 difference signals, two's complement, `clk` domain |
| `address`, `write`, `writedata`, `read` | in | 3, 1, 32, 1 | Register bus |
| `readdata`, `readdatavalid` | out | 32, 1 | Register read data |
| `clk_left`, `clk_mid`, `clk_right` | in | 1 | Fine-delay PLL outputs |
| `pll_phase[3]` | out | 3 × 7 | Phase lag per PLL (index 0 = left, 1 = mid, 2 = right), 125 ps steps |
| `pll_reconfig`, `pll_busy` | out, in | 3, 3 | Reconfiguration handshake per PLL |
| `dac` | out | 14 | DAC word, two's complement, `clk_right` domain |

Outside this RTL, connected through the ports above:

* the ADC and DAC chips (and any offset-binary conversion they need);
* the three PLLs and their vendor reconfiguration logic, which must turn a
  phase value into the PLL's own phase-step or scan-chain operations;
* the embedded processor with its RTOS, TCP/IP stack and control software;
* the host program.

An alternative source for the revolution period, measuring an external RF
signal instead of receiving `T_REV` from the processor, is not included.

## Design decisions

The overall architecture, the sizes (12-bit ADC, 14-bit datapath and DAC,
1024-word delay RAMs with a 10-bit counter, 100 MHz clock, 125 ps fine steps
over 10 ns, three PLLs with two one-word crossing RAMs) and the set of
control values follow the original system description. The following are
this implementation's own choices:

* two's-complement converter formats;
* the extra register that aligns BPM 2 with the BPM-delay latency;
* the `delay + 1` latency of the delay lines and the zero-delay bypass;
* saturation and the notch-filter bypass;
* the coefficient format, rounding and mixer pipeline;
* one enable for both notch filters, and "coarse disabled" implemented as
  delay 0;
* the PLL phase split, the 250 ps offset, the T_fine clipping and the
  reconfiguration handshake;
* the register map, bus protocol and reset values, and the T_BPM register.

The original system could keep 2 ms of 12-bit samples in on-chip memory.
This implementation builds only the 1024-word delays. Deeper delays need a
larger `ADDR_W` in `tfb_pkg`, which widens every delay setting.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `delay_line_tb` | Random data. Delays 0, 1, 1023 and random values, changed on the fly. Exact `delay + 1` latency. |
| `notch_filter_tb` | Input repeating every turn, including an orbit offset, is cancelled exactly. Full-scale saturation. Bypass. Changing `T_rev` up to 1000. |
| `coef_mixer_tb` | Unit gains, cos/sin weights, random and saturating values against a 64-bit model. |
| `fine_delay_path_tb` | Three PLL models. For twelve `T_fine` settings, every DAC sample's value and exact arrival time to the picosecond. |
| `fine_delay_ctrl_tb` | PLL phases after reset and after each setting. Only changed PLLs are reloaded. Clipping, disable, `ready`, update time. |
| `tfb_ctrl_regs_tb` | Reset values, random writes and reads, read latency, sign extension, status. |
| `tfb_dsp_top_tb` | The whole chain at full size, against a reference model (below). |

`tfb_dsp_top_tb` acts as the control processor. It configures the chain over
the register bus for these scenarios:

* 2 MHz revolution frequency;
* the 25 ns (20 ns coarse + 5 ns fine) step;
* 1.5 MHz with a 253 ns delay;
* 100 kHz with long delays;
* maximum delays;
* notch off;
* coarse and fine delay off;
* fine-delay clipping;
* mixer saturation.

For each scenario it checks every DAC sample, with its value and its
sub-cycle arrival time, against a reference model. It also counts each
mechanism and fails if one never happened.

Two more testbenches reproduce the measurements the system was
characterised with:

* `notch_response_tb` sweeps a sine from 0.5 to 5 MHz through a notch filter
  set for a 2 MHz revolution frequency. It measures gain and phase by
  correlation and checks:
  * exact nulls at 2 and 4 MHz;
  * +6.02 dB at 1, 3 and 5 MHz;
  * the linear phase sawtooth `90° − 180°·f/f_rev`, to within 0.5°.
* `tfb_phase_step_tb` runs the full chain, switches the delay from 0 to
  25 ns (2 coarse cycles + 40 fine steps) and measures the DAC output phase
  in continuous time. The phase step is −9.000° at 1 MHz, and −4.5° and
  −13.5° at 0.5 and 1.5 MHz, with unchanged amplitude: a pure 25 ns time
  shift. The absolute phase at delay 0 is −36.09° at 1 MHz, which is the
  fixed 100.25 ns latency.

`pll_phase_model` (in `tb/`) is a behavioural PLL with a phase input and a
reconfiguration handshake. It exists only for simulation.

Running a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tfb_pkg.sv tb/tfb_dsp_top_tb.sv \
          --top tfb_dsp_top_tb -Mdir obj && ./obj/Vtfb_dsp_top_tb
```

Replace the testbench name to run another one. Every file holds one module
or package named after the file, so `-Irtl -Itb` is enough for Verilator to
find the rest. The full-size end-to-end test runs in well under a second.
