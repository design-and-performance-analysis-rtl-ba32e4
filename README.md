# Asynchronous gated-ring-oscillator time-to-digital converter

This converter turns the width of a pulse into a 9-bit number, and it does so without a
clock. While the pulse is high, a ring of 13 inverters oscillates. Counters count the
ring's edges, and the total count is the measured time. While the pulse is low, the ring
is not stopped and reset. It is *gated*: every inverter is cut off from its supply, so
the ring freezes mid-swing and later resumes from exactly where it stopped. The part of
a period that one measurement could not resolve is therefore counted by the next one.
Over a stream of measurements, the quantization error is pushed to high frequencies
(first-order noise shaping). Because nothing toggles between measurements, the circuit
only uses power while a pulse is being measured.

| Quantity | Value |
|---|---|
| Ring | 13 gated inverter stages, 285.7 kHz (period 3.5 us, stage delay 134.6 ns) |
| Counters | 7 ripple up counters, 6 bits each, on 7 of the 13 stages |
| Output | 9 bits; about 2 codes per microsecond (7 edges per 3.5 us); largest code 7 x 63 = 441 |
| Range | up to about 220 us per measurement before a 6-bit counter wraps |
| Inputs | START and STOP (for a pulse: START = pulse, STOP = its inverse), rst |

## Data flow of one measurement

```
 START ──►┌────┐ EN  ┌──────────────────┐ node[12:0]   7 taps   ┌──────────────┐
 STOP ──┬►│ SR ├────►│ gated ring, 13   ├──────────────────────►│ 7 x 6-bit     │
        │ └────┘     │ stages (model)   │                       │ ripple counter│
        │            └──────────────────┘                       └──────┬───────┘
        ├── clear (level) ─────────────────────────────────────────────┘ cnt[7]
        │                                                              ▼
        └── load (rising edge) ───────────────────────────────► 7 x 6-bit registers
                                                                       │ held[7]
                                                                       ▼
                                               3-level adder tree ──► code[8:0]
```

1. **START** sets the latch (`sr_latch`), and EN rises. The ring runs, and each counter
   counts the rising edges of its own tap.
2. **STOP** clears the latch, and the ring freezes at its current phase. On the same
   rising edge, the seven registers (`count_capture`) take the counts, and the counters
   are cleared. The counters stay cleared for as long as STOP is high.
3. The adder tree (`adder_tree`) sums the seven registers. The sum is `code`, which is
   valid one adder delay after STOP rises and stays valid until the next STOP.

When STOP and START are both high, STOP wins. `rst` clears the latch, the counters and
the registers, and puts the ring into a known start state.

## Held phase and noise shaping

This is the part that makes the design more than a counter. Consider a single measurement
of width `T`. The ring advances `T / t_d` stage delays. The counters only see the edges
that actually reached a tapped stage. Whatever fraction of an edge spacing is still in
flight when STOP arrives is lost to this measurement. That loss is the quantization error
`q[n]`, somewhere between 0 and one tap spacing.

A free-running or reset ring would throw that fraction away every time. A gated ring keeps
it, because the frozen ring is already `q[n]` of the way to its next counted edge when the
next measurement starts. The next code therefore contains an extra `+q[n]`. The error of
measurement `n` becomes `q[n] - q[n-1]`: the quantizer error is differentiated.

- Summed over any number of measurements, the codes follow the summed input time to
  within one edge spacing.
- In the frequency domain, the error spectrum is multiplied by |1 - z^-1|², which is very
  small at low frequencies and large near half the measurement rate.

The 8192-frame testbench (see below) shows exactly this. The running error sum stays
below 0.75 code. The error power in the lowest 32 DFT bins is about four orders of
magnitude below that in the highest 32 bins.

### Choice of the seven tapped stages

In an odd ring of `N = 13` inverters that starts with one edge at stage 0, stage `i`
rises `(i+1)` stage delays after the start if `i` is even. If `i` is odd, it rises
`(i+14)` stage delays after the start. The period is `2N = 26` stage delays.

Taps 0, 4, 8, 12, 3, 7 and 11 rise at 1, 5, 9, 13, 17, 21 and 25 stage delays. These
seven edges are spread almost evenly over the period: six gaps of 4 stage delays and one
of 2. Each code is therefore worth about one seventh of a period (0.5 us). Taps at
stages 0, 2, …, 12 would bunch all seven edges into one half of the period, and the
resolution would be uneven. The tap list is the `TAPS` constant in `agro_tdc_pkg`.

## The gated ring oscillator (`rtl/gro.sv`, behavioural)

A ring of inverters with switched supplies is an analog circuit, so `gro` is a
behavioural model and cannot be synthesized. A real implementation needs a full-custom
or standard-cell ring with a header/footer switch on each stage.

The model uses the fact that an odd ring with a single edge has exactly one stage whose
output is about to change. It tracks which stage that is and how much of that stage's
delay `TD_NS` has already elapsed. Time advances in steps of `STEP_NS` (1 ns):

- A step counts only if `en` is still high at the end of it.
- When the accumulated time reaches `TD_NS`, the stage output toggles and the edge moves
  to the next stage. The remainder is kept, so a non-integer stage delay is exact on
  average.
- While `en` is low, the model waits for `en` without using any simulation time, and it
  keeps the accumulated fraction.

Parameters: `N` (13), `TD_NS` (134.6 ns, so that 26 stage delays = 3.5 us = 285.7 kHz)
and `STEP_NS`. The model resolves an enable edge to the next 1 ns step. The testbenches
therefore place STOP half a step off that grid.

## Counters and registers

`async_counter` is a chain of toggle flip-flops. Bit 0 toggles on the rising edge of its
tap, and each higher bit toggles on the falling edge of the bit below it. The counter
needs no clock and has no logic between the bits. It does need time for a carry to ripple
through all six bits, and that ripple must settle before STOP loads the registers.
`clr` is an asynchronous, active-high clear.

`count_capture` holds one 6-bit register per counter. It loads on the rising edge of
STOP, which is also the edge that starts clearing the counters. In RTL simulation the
non-blocking assignment semantics give the register the old count. In silicon, this is a
hold-time requirement: the path from counter to register must be slower than the
register's hold time. Delay buffers in that path are the intended fix.

## Adder tree

The seven counts are added in three levels, each one bit wider than the last:

| Level | Adders | Inputs → output |
|---|---|---|
| 1 | 3 × 6-bit | (c0+c1), (c2+c3), (c4+c5) → 7 bits each, carry kept |
| 2 | 2 × 7-bit | (L1a+L1b), (L1c + c6) → 8 bits each |
| 3 | 1 × 8-bit | L2a + L2b → 9 bits |

The tree is purely combinational. Its largest possible sum, 441, fits in 9 bits.

## What follows the source design and what does not

Taken from the published design:
- the START/STOP latch, the gated ring and counters on ring outputs
- 13 stages at 285.7 kHz
- 6-bit asynchronous up counters
- 6-bit registers that capture the counts before the counters are cleared between
  measurements
- the three-level adder tree with 6/7/8-bit adders and a 9-bit result

Choices made here:
- **Seven counters, not thirteen.** The source says the ring's outputs each have a
  counter. However, its adder tree takes seven 6-bit inputs. Its measured transfer
  curves (about 2 codes/us at 285.7 kHz) also correspond to seven counted edges per
  period. Thirteen counters would not fit a 9-bit result, so seven are built.
- **Which stages are tapped**, and where the seventh count enters the adder tree
  (at level 2).
- **Registers before the adder, not after.** The block diagram that introduces the idea
  shows a single register after the adder. The described implementation puts one register
  per counter in front of the adders, and that is what is built.
- **Control details.** STOP has priority in the latch. The registers load on the STOP
  edge. A global `rst` was added. The counters count rising edges.
- **The counter-enable signal is not built.** A counter-enable label appears in the block
  diagram. No separate enable exists here, because a gated ring produces no edges while
  EN is low.
- **Ring-model details.** The start state, the 1 ns model step and the way a partial
  stage delay is held.

Not modelled:
- **Analog effects.** Power, area, process corners and the analog waveform of a frozen
  stage are not modelled.
- **Timing at STOP.** In RTL the ring and the counters have no delay. Whether the last
  ripple carry has settled when STOP arrives, and whether the hold-time rule is met, must
  be checked at gate level with real delays.

## Files

| File | Contents |
|---|---|
| `rtl/agro_tdc_pkg.sv` | sizes (`N_STAGES`, `N_COUNTERS`, `CNT_W`, `OUT_W`), types, `TAPS` |
| `rtl/agro_tdc.sv` | top level |
| `rtl/sr_latch.sv` | START/STOP enable latch |
| `rtl/gro.sv` | gated ring oscillator, behavioural model |
| `rtl/async_counter.sv` | 6-bit ripple up counter |
| `rtl/count_capture.sv` | count registers |
| `rtl/adder_tree.sv` | three-level adder tree |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two system tests |

Everything except `gro` is synthesizable. The counters and registers use derived clocks
(tap edges, counter bits, STOP), as a clockless design must.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Build and
run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_agro_tdc rtl/agro_tdc_pkg.sv tb/tb_agro_tdc.sv -o sim
obj_dir/sim
```

| Testbench | What it shows | Run time |
|---|---|---|
| `tb_agro_tdc` | Top level at default sizes. A 5 kHz sweep (20–180 us), a 15 kHz sweep (6.5–58.5 us) and 64 frames of a 9.68 kHz duty-cycle-modulated pulse. Each code is checked against an independent count of tap edges, against the ideal `width × 7 / 3.4996 us` (±2) and for a bounded running error. It also checks the slope of 2 codes/us and that the counters are cleared by STOP. It checks that the ring resumes from a held phase and that level-1 carries occur. | seconds |
| `tb_agro_tdc_fft` | 8192 frames of the 9.68 kHz duty-cycle-modulated pulse. It checks every code, checks that the running error stays within 2 codes, and checks the shaping of the error spectrum (low band at least 20× below high band). | about 2.5 min |
| `tb_gro` | Ring period, the single-edge invariant, no change while gated, and toggles matching the total enabled time across 300 random gaps. | seconds |
| `tb_async_counter`, `tb_count_capture`, `tb_adder_tree`, `tb_sr_latch` | Each module against a software model. | seconds |

The 5 kHz sweep gives codes of 40, 80, …, 360 for widths of 20, 40, …, 180 us, and the
15 kHz sweep gives 13, 26, …, 117. Both are linear within one code.

To change a size, edit `agro_tdc_pkg`. The adder tree is written for seven inputs. With
another counter count, `adder_tree` and `TAPS` must be redone, and `OUT_W` must hold
`N_COUNTERS × (2^CNT_W − 1)`. To change the ring frequency, edit `TD_NS` in `gro` and in
the two system testbenches.
