# Fractional-N DLL for clock synchronisation

A delay-locked loop that delays an external clock until its rising edge
lines up with a reference clock of the same frequency. The phase error can
be anything from 0 to a full period. A plain DLL can only give a delay that
is a whole number of its cells. This one gets a finer step by borrowing the
idea of a fractional-N PLL. The feedback tap of the core DLL hops between
neighbouring taps under a delta-sigma modulator. The loop therefore locks to
a *fractional* number of cells per period, and every cell delay, and so
every output phase, moves in steps of about T/100.

The default operating point is 200 MHz (T = 5 ns). Here one cell is nominally
500 ps and one fine step is about 5 ps per cell, or about 50 ps at the
output.

## The delay line and its taps

One voltage-controlled delay line (VCDL) of 13 equal cells carries the
external clock. P0 is the line input and Pk is the output of cell k. Every
cell has the delay

    T_D = T/10 - (T/20) * Vc,      Vc in [-1, +1]

so a cell is T/10 at Vc = 0 and up to 1.5·T/10 long at Vc = -1.

Three groups of taps are used:

| taps     | used by                                            |
|----------|----------------------------------------------------|
| P0       | core-loop reference (the line input)               |
| P4..P13  | coarse selection: the output clock `coarse_clk`     |
| P7..P11  | fine feedback `dll_clk`, chosen by the modulator   |
| P6, P7   | clock of the modulator, one cell ahead of its taps |

Why P4..P13 and not P1..P10: once the fine loop has stretched the cells, the
line from P0 to the feedback is 8 to 10 cells long, not exactly 10. With
P4..P13 the worst case (P4 chosen) needs at most 25 % more cell delay to
cover the whole period. That is well inside the range of the cell.

## Three loops on one line

**Core loop (an ordinary DLL).** A phase-frequency detector compares P0 with
the feedback `dll_clk`. A charge pump and a second-order R-C1-C2 filter turn
the UP/DN pulses into Vc. The loop settles when the feedback edge is exactly
one period behind P0. After reset the feedback is P10, so every cell becomes
T/10 and the coarse taps P4..P13 sit T/10 apart across one period.

**Coarse loop.** A 10:1 multiplexer picks `coarse_clk` among P4..P13. The
coarse phase detector reports two things:

- `updn`: whether the coarse edge lags the reference;
- `hold`: whether the coarse edge leads it by less than T/10.

The coarse FSM shifts its one-hot select `mux[9:0]` one place at a time. It
moves towards less delay when the clock lags, and towards more delay
otherwise. It stops when `hold` rises. After `hold` has stayed high for a
while, the FSM freezes the selection and raises `en`. From then on the
coarse clock leads the reference by at most one cell.

**Fine loop.** The remaining lead (0 .. T/10) is removed by making every
cell slightly longer. The fine FSM feeds `delay_step` to the modulator. The
modulator turns it into a stream of feedback taps whose long-run average
position is

    X = P_B + 0.5 + delay_step / N        (N = 10 steps per cell)

Here P_B = 9 for the tap group P8..P11 and P_B = 8 for the group P7..P10.
The core loop forces the average feedback delay to one period, so each cell
settles at T/X. Lowering `delay_step` by one raises X by 0.1, which
lengthens every cell a little and pushes `coarse_clk` later by about T/100.
The fine FSM keeps lowering `delay_step` until `hold` falls, that is, until
the coarse clock stops leading. It then keeps the value and re-checks every
`M_TIMER` fine updates.

## How the fine step is produced: the modulator and its two tap groups

This is the least obvious part of the design.

- **Modulator.** It is a second-order digital delta-sigma loop with a
  4-level (2-bit) quantizer:

      a1 <= a1 + x - y              (first integrator)
      a2 <= a2 + a1 - y             (second integrator, delay-free path)
      y   = Q(a2 + dither)          levels 0..3

  Thresholds are -N/2, 0, +N/2. Level q feeds back (2q - 3)·N/2. So the
  input range -N/2..+N/2 maps onto an average level of 1.5 + x/N. The
  quantization error is shaped twice by (1 - z^-1). What is left is
  high-frequency tap hopping, which the loop filter removes.
- **Dither.** The LSB of a 24-bit maximal-length LFSR (x^24 + x^23 + x^22 +
  x^17 + 1) is added with a weight of one quantizer level. This breaks up the
  idle tones a 2nd-order loop produces at rational inputs.
- **Tap selection.** The level (0..3) plus `adr_ctrl` (0 or 1) selects one of
  P7..P11. `mod_out` is that choice, one-hot and registered.
- **Two groups.** Four levels cover only four taps, but a full cell of
  adjustment needs the average to move across five. `adr_ctrl` therefore
  shifts the window:
  - with `adr_ctrl` = 1 the taps are P8..P11 (average 9.0..10.0);
  - with `adr_ctrl` = 0 they are P7..P10 (average 8.0..9.0).
- **Group switch.** The fine FSM starts in group 1 at +N/2, i.e. average
  P10, which is the plain DLL. It steps down. If it reaches -N/2 while
  `hold` is still high, it jumps to +N/2 in group 0. Both settings give
  X = 9.0, so the jump does not disturb the loop.
- **Modulator clock.** It comes from P7 in group 1 and P6 in group 0
  (`trgr_ctrl`). That tap is one cell ahead of the earliest selectable tap,
  so a new selection is in place before the edge it is meant to pass.

The fine FSM moves only once every `FINE_DIV` reference clocks (50 ns at
200 MHz). This lets the analog loop settle before the coarse phase detector
is asked again.

## Blocks

| module | kind | what it is |
|---|---|---|
| `fracn_dll` | model (top) | wires everything; contains the analog models |
| `fracn_dll_pkg` | package | tap counts, widths, `step_t` |
| `vcdl` | model | delay line, transport delay per cell, law above |
| `charge_pump_filter` | model | I_CP = α·S·I_SS into C1, R, C2; event driven |
| `fine_pd` | RTL | PFD with start-up flip-flop |
| `coarse_pd` | RTL | three flip-flops on the delayed coarse clock |
| `phase_mux` | RTL | one-hot AND-OR clock multiplexer (10:1, 5:1, 2:1) |
| `fsm` | RTL | synchronisers, fine strobe, the two FSMs |
| `fsm_coarse` | RTL | one-hot ring, step/hold counters, `en` |
| `fsm_fine` | RTL | `delay_step`, groups, stop, re-check timer |
| `dsm_modulator` | RTL | accumulators, dither, one-hot output |
| `dsm_quantizer` | RTL | 2-bit quantizer with N/2-based thresholds |
| `pn_gen` | RTL | 24-bit LFSR |
| `reset_sync` | RTL | reset release synchronised to the modulator clock |

The replica-bias circuit, which turns the filter voltage into the delay
cells' bias, is not modelled. The delay-line model takes the normalised
control value directly.

### Coarse phase detector

Two three-cell copies of the delay line are driven by the same Vc:

- one delays the reference, giving R1, R2 and R3 (one, two and three cells
  late);
- the other delays the coarse clock by three cells.

On that delayed coarse edge three flip-flops sample R1, R2 and R3. Call the
samples q1..q3.

- `updn = q3`: the reference, three cells late, is already high, so the
  coarse clock lags.
- `hold = q1 & q2 & ~q3`: the coarse edge falls between the reference and
  one cell before it.

The ten regions of a period (A..J, T/10 each) then give `updn` = 0 in A..E,
1 in F..J, and `hold` = 1 in E only.

### Fine phase detector

It is a standard two-flip-flop PFD with one extra flip-flop in front (RDY).
RDY is cleared while `start` is low and set by the first reference edge.
The UP flip-flop samples RDY, so the very first reference edge produces no
UP pulse. The first feedback edge leaves the line one period after the
first reference edge, so it belongs to the *second* one. Without RDY the
detector would pair it with the first. It would then see a full period of
"delay too long" and drive the line towards zero delay.

The clear of the two flip-flops acts `RST_DELAY_NS` after both are set.
The default is 1 ns, T/5 at 200 MHz, and the top passes T_REF/5. Even in
phase, UP and DN are therefore pulses of that width, which keeps a real
charge pump out of its dead zone. Synthesis ignores the delay; it is a
property of the circuit that the simulation keeps.

### Charge pump and filter

- The pump current is I_CP = α·S·I_SS, with α = 0.2, S = `s_code` and I_SS
  the replica-bias current. At 200 MHz: 198 µA with S = 3 gives 119 µA.
- The pump drives C1 = 5 pF. R = 11.4 kΩ joins it to C2. The voltage on C2
  is the control node, so the transfer is 1/(s²C1C2R + s(C1+C2)).
- C2 = 1.95 pF is this design's choice. It puts the second pole 1/(RC2) at
  45 Mrad/s.
- The voltage is converted to the cell's normalised control with the delay
  gain KDL = 1 ns/V: Vc = V·KDL/(T/20).
- UP (reference first, line too long) raises Vc, which shortens the cells.

## Interface of the top (`fracn_dll`)

| port | dir | meaning |
|---|---|---|
| `ext_clk` | in | clock to be delayed (P0) |
| `ref_clk` | in | clock to align to; also clocks the FSM |
| `rst_n` | in | asynchronous, active low |
| `n_half[3:0]` | in | N/2; 5 for N = 10 |
| `s_code[2:0]` | in | charge-pump current code S |
| `coarse_clk` | out | the aligned clock |
| `dll_clk` | out | core-loop feedback |
| `mux[9:0]`, `en` | out | coarse selection (bit i = P(4+i)), fine enable |
| `delay_step`, `adr_ctrl`, `trgr_ctrl`, `locked`, `recheck` | out | fine FSM state |
| `updn`, `hold`, `up`, `dn`, `mod_out[4:0]`, `coarse_step` | out | detector and modulator signals |
| `vc` (real) | out | normalised control value |

Parameters:

- `T_REF_NS`, `ISS_UA`, `R_KOHM` and `KDL_NS_V` set the analog operating
  point. Their defaults are for 200 MHz.
- `STEP_WAIT` (4): reference clocks between coarse moves.
- `HOLD_WAIT` (16): clocks of steady `hold` before `en`.
- `FINE_DIV` (10): reference clocks per fine update.
- `M_TIMER` (100): fine updates between re-checks.

Timing from reset to lock at 200 MHz is 90–175 reference clocks:

- up to about 4·(number of coarse moves) clocks for the coarse search;
- 17 clocks of hold;
- 10 clocks per fine step.

## Results at 200 MHz

The ten initial errors of the design's test table (0.25..4.75 ns) all pick
the expected coarse tap (P4..P13). The final average ratio is within 0.2 of
the required one, X = N·T/D. Here D is the delay that tap P_N must give
(the error, or the error plus one period). The averaged control value is
within 0.05 of the table's (about two fine steps), which is the ideal
2·(1 − 10/X). After lock, the coarse edge
trails the reference by 10–90 ps on average, with 40–100 ps peak-to-peak
variation from the tap hopping.

The final `delay_step` values are often one to three steps lower than the
table (e.g. 3.75 ns: −3 against −1; 4.75 ns: −2 against +1). That means the
fine loop here stops a little later. There are two reasons:

- The core loop needs somewhat more than one 50 ns fine period to settle
  after a step. The detector therefore sees the previous step's effect only
  partly, and the FSM can take one step too many.
- The coarse detector samples single edges. Those edges carry the ±20–40 ps
  ripple of the tap hopping, which is comparable to one fine step (about
  40 ps at the output).

The end state is therefore exact only to about ±1 step. A trial with a
doubled fine period (`FINE_DIV` = 20) ended four of the ten cases within
0.01 of the required ratio and seven within 0.03. The spread stays. The default keeps the original
50 ns fine period.

### Other frequencies and a finer resolution

The original design lists analog operating points down to 10 MHz. The test
at 100, 50 and 10 MHz uses the following settings:

| frequency | I_SS | S | R | delay gain |
|---|---|---|---|---|
| 100 MHz | 74.4 µA | 2 | 29.2 kΩ | 6.67 ns/V |
| 50 MHz | 32.6 µA | 1 | 56.8 kΩ | 14.25 ns/V |
| 10 MHz | 5.09 µA | 1 | 308 kΩ | 222 ns/V |

The resistances are the values the MOS resistor actually reaches, not the
smaller design targets. The delay gains are slopes of the published V_CTRL
table. At every point the loop locks on the right coarse tap. X̂ is within
0.2 of the required ratio. The mean residual lead or lag stays within
−1.5 %..+2.5 % of the period.

A fourth run stays at 200 MHz but sets N = 20 (`n_half` = 10). `delay_step`
then spans −10..+10, each step is T/200, and the final error roughly
halves (−5..+41 ps mean).

Two effects show up at the lower frequencies:

- **Group switch.** The tap group and the modulator clock change at the
  same moment. This can disturb `hold` for a cycle, so the fine FSM may
  stop on the first value of the new group while the clock still leads by
  about one step.
- **Re-check.** The periodic re-check repairs this. If the clock still
  leads, tuning resumes downward. If it lags, `delay_step` goes up by one.
  Once locked, the loop therefore moves between two adjacent steps at most
  once per re-check period. The test measures again after the first
  re-check and applies the same limits.

## Where this design departs from the original

- **Coarse detector polarity.** The prose says `updn` is high when the coarse
  clock leads. The region table says `updn` is 1 only in the lagging regions
  F..J. The table is followed.
- **Fine feedback mux.** It is driven by `mod_out` (the modulator output),
  not by `delay_step`.
- **PN register.** It is 24 bits, as in the synthesized modulator. The
  system-level study used 22.
- **`delay_step`.** It is a 5-bit signed value (−5..+5 needs 5 bits).
- **Fine FSM clock.** The fine FSM runs on a strobe of the reference clock
  rather than on a separate slower clock.
- **Synchronisers.** `updn`/`hold` pass through two-flop synchronisers,
  because the coarse PD is clocked by a delayed clock.
- **Modulator reset.** The modulator is held in reset (pointing at P10)
  until `en` rises.
- **Coarse ring wrap.** The coarse ring wraps from P13 to P4. The step and
  hold waits are assumed values.
- **Re-check.** After a re-check, a lagging clock moves `delay_step` up by
  one. A clock that leads again resumes the downward search. The original
  states only that `hold` is re-checked every M cycles. M itself is not
  given; 100 fine updates are used.
- **Loop gain.** The original quotes a cell delay gain of 1 ns/V. It also
  states a design rule of I_CP·K_DL/C1 = 1/10, which at 119 µA and 5 pF
  needs 4.2 ns/V. The model uses 1 ns/V per cell. The detector sees about
  9.5 cells, so the loop corrects about 23 % of a phase error per cycle.
- **Analog parts.** These are idealised:
  - the delay law is linear in Vc;
  - the pump currents match;
  - R is fixed per operating point;
  - supply noise and the replica bias are absent.
- **400 MHz.** This operating point is not simulated.

## Simulating

Everything runs with Verilator 5 (`--binary --timing`). Each testbench is
self-checking and prints `TB_RESULT checks=N failures=M`.

End to end, the ten 200 MHz cases run at default parameters in well under a
second:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/fracn_dll_pkg.sv tb/tb_fracn_dll.sv --top-module tb_fracn_dll
    ./obj_dir/Vtb_fracn_dll

The other operating points and the N = 20 run use
`tb/tb_fracn_dll_freq.sv` (with `tb/dll_freq_run.sv`). It is built the same
way and runs in about 40 s. Block tests are
`tb/tb_<module>.sv`. For the modulator and FSM benches, add
`rtl/fracn_dll_pkg.sv` ahead of the bench.

The end-to-end bench counts every mechanism and fails if one never occurs:

- coarse moves in both directions, and wrap-around;
- `en`;
- fine steps and the group switch;
- locks and re-checks;
- UP and DN pulses, none shorter than T/5;
- use of every fine tap.

Things to change:

- **Another frequency:** set `T_REF_NS`, `ISS_UA`, `R_KOHM`, `KDL_NS_V` and
  the `s_code` input together.
- **A finer step:** set `n_half` (N/2). `delay_step` then spans ±N/2. Widen
  `STEP_W`/`HALF_W` in the package if N/2 exceeds 15.
- **Loop speed:** `STEP_WAIT`, `HOLD_WAIT`, `FINE_DIV` and `M_TIMER` trade
  lock time against settling margin.
