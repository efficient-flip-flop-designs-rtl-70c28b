# XSEUFF 1 and XSEUFF 2: scan flip-flops that outvote soft errors

A charged particle striking a chip can flip a stored bit: a *single-event
upset* (SEU) in a latch. It can also put a short glitch on a wire: a
*single-event transient* (SET) that reaches a flip-flop input from the logic
in front of it. Crosstalk can do the same, or it can delay a data edge past
the clock edge. A plain master/slave flip-flop latches whichever of these
is present while it samples, and then keeps the wrong value for a whole
cycle.

The two flip-flops here fix this with the latches that a scan flip-flop
already has. A level-sensitive scan flip-flop has a master/slave pair for
the system path (PH2, PH1) and a master/slave pair for the scan chain
(LA, LB). In functional mode the scan pair sits idle. Here it is reused
instead: LA and LB take extra samples of the data input at slightly
different instants, and a majority voter combines those samples with the
system latch. One corrupted sample is then outvoted. A keeper on the voter
output lets the stored value also ride through an upset in any one latch
while the clock is low. Both cells keep full scan capability: shift,
update and capture.

* **XSEUFF 1** samples D at the CLK rise (LA), at the rise of a delayed
  system clock (PH2 → PH1), and again while CLK is high (LB). Its
  clock-to-Q delay is no worse than that of a plain scan flip-flop. In
  return, D must stay stable for the whole high half of the clock.
* **XSEUFF 2** samples D at the clock edge (PH2) and twice more just after
  it (LA at T1, LB at T2), timed by two short pulses from a shared
  generator. Besides SEUs and SETs, it also corrects a data edge that
  arrives late by up to T1 − T0. Its output is final only after T2, so it
  is slower.

Both cells assume one upset per flip-flop per clock cycle.

## Where a flip-flop is vulnerable

Every latch can be hit in two ways:

* a glitch arrives just as the latch closes;
* a stored bit flips while the latch is opaque.

Together these cover the *window of vulnerability*: the latch setup time
plus the whole opaque phase. A cell is hardened only if every such event,
at any time in the cycle, is outvoted. That is the property the
testbenches check: they inject a glitch at each closing instant and flip
each storage node in each clock phase.

## XSEUFF 1: shadow latches on a separate clock

The cell has two clocks:

* `clk` drives the scan latches. It can be routed on the existing scan
  clock tree.
* `sys_clk` drives the system latches. It is `clk` delayed by Δ1.

Δ1 = t_hold(LA) + W_MTT + t_setup(PH2). Here W_MTT is the widest transient
the cell must survive.

| latch | transparent while | closes (samples D) at |
|-------|-------------------|------------------------|
| LA    | CLK low           | CLK rise, T0 |
| PH2   | SYS_CLK low       | SYS_CLK rise, T0 + Δ1 |
| PH1   | SYS_CLK high      | passes PH2, holds from T0 + P/2 + Δ1 |
| LB    | CLK high          | CLK fall, T0 + P/2 |

The voter's three inputs are:

* a multiplexer output: LA while CLK is high, the kept output value while
  CLK is low;
* LB;
* PH1.

A glitch narrower than Δ1 can corrupt LA or PH2, but not both. LB is still
open while the glitch passes, so it recovers. The output therefore settles
to the right value by the SYS_CLK rise. It takes the new D at the CLK rise
itself, because LA and LB already agree there.

In the low half-cycle LA reopens and stops being a valid sample. The
multiplexer then swaps it for the keeper. From that point the output
changes only if LB and PH1 agree on a new value. One flipped latch, or a
flipped output node, cannot change the output.

The price of this scheme is that D must be stable while CLK is high, since
LB is open then.

## XSEUFF 2: temporal sampling after the edge

PH2 is transparent while `clock` is low and closes at the rising edge, T0.
LA and LB are transparent while their gating input is low. The gating
comes from `sync_gen`:

* Sync(LA) goes low at T0 and back high at T1 = T0 + δ1. LA keeps the data
  line's value at T1.
* Sync(LB) is Sync(LA) through a buffer of delay δ0. It is low from
  T0 + δ0 to T2 = T1 + δ0. LB keeps the data line's value at T2.

PH1 is the voter with keeper (multiplexer M1 in front of it):

* while `clock` is high it votes on (PH2, LA, LB);
* while `clock` is low, M1 replaces PH2 by PH1's own output, so the vote is
  over (PH1, LA, LB).

What this tolerates:

* A glitch over T0 corrupts only PH2.
* A glitch over T1 corrupts only LA. A glitch over T2 corrupts only LB.
* A data edge that arrives late, between T0 and T1, corrupts only PH2.
* A flip of LA, LB or the output node during the low phase is outvoted by
  the other two.

The limits in this zero-delay model are:

* A transient wider than T2 − T1 (= δ0) can cover both T1 and T2. It then
  corrupts LA and LB together.
* Data later than T1 is missed by both PH2 and LA.

In silicon these bounds also contain the latches' setup and hold times and
the multiplexer delays. The late-data bound agrees with the original
design's equation for the maximum delay, Δmax ≈ T1 − T0.

The original bound for the pulse width runs from the T0 sampling window to
the T2 window (≈ T2 − T0). In this model a pulse is outvoted only if it
covers at most one of the three sampling instants. That gives
min(T1 − T0, T2 − T1), which is 100 ps at the defaults rather than 220 ps.
`tolerance_sweep_tb` measures both limits.

One generator can drive any number of cells. In `xseuff_top` it serves the
whole XSEUFF 2 register.

## The voter with keeper (`vote_keeper`)

Both cells end in the same structure. A majority voter drives the output
node, a keeper holds that node, and a multiplexer selected by the clock
feeds either a fresh sample (`a`) or the node's own value back into the
voter:

    q = sel ? maj(a, b, c) : maj(q, b, c)

While `sel` is low this is a latch that only moves when `b == c`. It is
written as the loop it is in silicon, so a forced flip of `q` is re-voted
and restored at once. Lint tools report this loop as a combinational loop,
and that is expected. In XSEUFF 1 the inputs are (LA, LB, PH1) with CLK as
the select. In XSEUFF 2 they are (PH2, LB, M2) with `clock` as the select.

The voter's output inverter is not modelled. Both cells are
non-inverting: `q` follows `d`.

## Scan operation

In test mode the functional clock is expected to be parked low. XSEUFF 1
is in test mode when `testbar` is 0; XSEUFF 2 when `scan_mode` is 1. In
test mode:

* The functional enables of LA and LB are switched off.
* `sca` loads LA from `si`. `scb` loads LB from LA. `so` is LB.
* Alternating `sca` and `scb` shifts the chain by one cell. In a register,
  cell *i*'s `si` is cell *i−1*'s `so`. After shifting in a word
  most-significant bit first, with SCA then SCB for each bit, cell *k*
  holds bit *k* in both LA and LB.
* **Update** applies the shifted word:
  * XSEUFF 1: `update` copies LB into PH1. LB and PH1 then agree, and the
    voter's output follows. XSEUFF 1 has no hold path: while the chain
    shifts, its output can follow LB whenever LB happens to agree with PH1.
  * XSEUFF 2: while shifting, an AND of `scan_mode` and not-`update`
    switches M2 from LA to PH1's own output. The voter then sees PH1
    twice, so the output holds during shifting. Pulsing `update` restores
    LA at the voter. Since LA = LB after a shift, the cell takes the word.
* **Capture**: run one functional cycle with `capture` high, then shift
  out, SCB first.
  * XSEUFF 1: LA's functional input is PH1, which holds the response, so
    LA takes the response during the low half-cycle.
  * XSEUFF 2: LA samples the cell's output in its Sync window.
* **Stuck-at test (XSEUFF 2)**: shift opposite values into LA and LB, then
  disable the generator (`x2_sync_en` = 0). The voter is then decided by
  PH2, which exposes stuck-at faults on the voter inputs.

Both cells carry assertions for these rules. They fire in simulation if a
scan clock or update is pulsed in functional mode, or if the functional
clock rises in test mode.

## The top: `xseuff_top`

The top holds two registers side by side. Each register has `N_FF` cells,
with its own controls and its own scan chain. The two designs are
alternatives, so either half can be used on its own.

| group | ports |
|-------|-------|
| XSEUFF 1 register | `x1_clk`, `x1_testbar`, `x1_sca`, `x1_scb`, `x1_update`, `x1_capture`, `x1_si`, `x1_d[N_FF]` → `x1_q[N_FF]`, `x1_so` |
| XSEUFF 2 register | `x2_clock`, `x2_scan_mode`, `x2_sca`, `x2_scb`, `x2_update`, `x2_capture`, `x2_sync_en`, `x2_si`, `x2_d[N_FF]` → `x2_q[N_FF]`, `x2_so` |

The XSEUFF 1 register shares one `clk_delay` (CLK → SYS_CLK). The XSEUFF 2
register shares one `sync_gen`.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_FF` | 8 | cells per register (chosen here) |
| `DELTA1_PS` | 200 | Δ1, the SYS_CLK lag of XSEUFF 1 (chosen here, for a 1 GHz clock) |
| `SYNC_WIDTH_PS` | 120 | δ1, the Sync(LA) low time, T1 − T0 (chosen here) |
| `SYNC_SKEW_PS` | 100 | δ0, the Sync(LB) lag, T2 − T1 (chosen here) |

The source design gives formulas for these delays but no values. The
defaults suit a 1 ns clock in a zero-delay simulation: a transient of up to
200 ps is tolerated by XSEUFF 1, and data arriving just under 120 ps late
is still corrected by XSEUFF 2.

## What is modelled, and how faithfully

* **Cells**: `latch2`, `vote_keeper`, `xseuff1` and `xseuff2` are
  synthesizable latch-level descriptions. `latch2` is a two-port D latch:
  port 1 (the scan or update port) has priority when both enables are
  high.
* **Timing elements**: `clk_delay` and `sync_gen` are behavioural models
  with `#` delays and cannot be synthesized. In silicon, `clk_delay` is a
  sized buffer chain. `sync_gen` is two transmission gates switched by
  delayed clocks, plus a keeper, an OR gate and an output buffer. Only the
  waveform of `sync_gen` is modelled. Its `en` input is an addition here,
  used for the stuck-at test.
* **Choices made here, where the source design leaves the detail open**:
  * capture sources: PH1 for XSEUFF 1, the output for XSEUFF 2;
  * XSEUFF 1's update path is LB → PH1;
  * `testbar` / `scan_mode` gate the functional enables of LA and LB;
  * M1 is selected by `clock`;
  * the AND gate drives M2;
  * LA and LB of XSEUFF 2 sample the data line rather than PH2. This is
    required for the late-data correction.
* **Not modelled**: reset (the cells have none), transistor-level delays,
  power and transistor counts. The original evaluation gives these
  transistor overheads against a plain scan flip-flop:

  | design | single cell | whole ISCAS'89 circuits (average) |
  |--------|-------------|-----------------------------------|
  | XSEUFF 1 | 54 % | 28 % |
  | XSEUFF 2 | 37 % | 20 % |

  It also reports clock-to-Q delay 1.00× and power 2.70× for XSEUFF 1,
  and 1.25× and 1.95× for XSEUFF 2. None of these figures can be checked
  in RTL.
* Apart from the latch and loop messages, lint reports only unused package
  constants.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `latch2_tb`, `vote_keeper_tb`: random stimulus against a reference model.
* `clk_delay_tb`, `sync_gen_tb`: check the waveform at picosecond
  resolution.
* `xseuff1_tb`, `xseuff2_tb`, one cell each, with these cases:
  * random data;
  * glitches at every sampling instant;
  * late data (XSEUFF 2);
  * single flips of every storage node in both clock phases, made with
    `force`/`release` on the latch variable;
  * scan shift, update and capture;
  * the XSEUFF 2 stuck-at mode;
  * the known limits: a glitch wider than Δ1, a glitch over both T1 and
    T2, and data later than T1. Here the output is expected to be wrong.
* `xseuff_top_tb`: both 8-bit registers at default parameters, end to
  end. It runs random words, disturbances on random bit sets, upsets,
  full-word scan-in, update, capture and scan-out, and the
  generator-disabled mode. It counts how often each of 13 mechanisms
  happened, and fails if one never did.
* `fig_scenarios_tb`: the three characterisation scenarios, replayed on the
  default top next to an unhardened scan flip-flop (`bsff_model`, a
  testbench-only model) that gets the same clock and data:
  * a transient at the XSEUFF 1 sampling instants;
  * a noise pulse over the XSEUFF 2 clock edge;
  * late data for XSEUFF 2.

  The hardened outputs must stay right while the reference goes wrong.
* `tolerance_sweep_tb`: sweeps transient width and position, and data
  lateness, in 10 ps steps. It checks the measured limits against the
  bounds for this zero-delay model:
  * XSEUFF 1: W_MTT = Δ1 = 200 ps;
  * XSEUFF 2: min(δ1, δ0) = 100 ps for transients;
  * XSEUFF 2: T1 − T0 = 120 ps for late data.

To run a testbench with Verilator 5 (the package first, then the
modules):

    verilator --binary --timing --assert -Wno-fatal \
      rtl/xseuff_pkg.sv rtl/latch2.sv rtl/vote_keeper.sv rtl/clk_delay.sv \
      rtl/sync_gen.sv rtl/xseuff1.sv rtl/xseuff2.sv rtl/xseuff_top.sv \
      tb/xseuff_top_tb.sv --top-module xseuff_top_tb
    ./obj_dir/Vxseuff_top_tb

The testbenches need `--timing`, because the timing models and the stimulus
use delays. Every simulation takes well under a second.

## Files

| file | contents |
|------|----------|
| `rtl/xseuff_pkg.sv` | `maj3()` and default delays |
| `rtl/latch2.sv` | two-port D latch (LA, LB, PH1 of XSEUFF 1; LA, LB of XSEUFF 2) |
| `rtl/vote_keeper.sv` | majority voter with output keeper and multiplexer |
| `rtl/xseuff1.sv` | XSEUFF 1 cell |
| `rtl/clk_delay.sv` | Δ1 delay, CLK → SYS_CLK (behavioural) |
| `rtl/xseuff2.sv` | XSEUFF 2 cell |
| `rtl/sync_gen.sv` | Sync(LA)/Sync(LB) pulse generator (behavioural) |
| `rtl/xseuff_top.sv` | the two registers |
| `tb/*_tb.sv` | one testbench per module, plus `fig_scenarios_tb` and `tolerance_sweep_tb` |
| `tb/bsff_model.sv` | unhardened reference flip-flop for `fig_scenarios_tb` |
