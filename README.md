# Ring-oscillator all-digital PLL

This is an all-digital phase-locked loop with no frequency divider. A
one-bit (bang-bang) phase detector samples the oscillator on the reference
clock and asks for "faster" or "slower". An up/down counter integrates those
requests into a control word `N`. The oscillator is a ring of AND-OR delay
elements whose length is picked by a one-hot word. Fine frequency steps come
from switching each oscillator cycle between two adjacent chain lengths, `L`
and `L+1`. A small signed adder-accumulator, clocked by the oscillator
itself, does the switching. The phase detector looks only at the sampled
level of the oscillator, not at its frequency, so the loop needs no divider,
and the oscillator runs well above the reference.

The logic (phase detector, counter, subtractor, accumulator, multiplexer)
is synthesizable SystemVerilog. The ring oscillator and the phase detector's
delay element are analog in nature, so they are behavioural models built from
gate delays. This means the whole loop, oscillator included, can be simulated
with plain Verilator in `--timing` mode.

## The loop

```
            +-----------------+  shift_left (up)   +----------------+  N
 f_ref ---->| phase detector  |------------------->| up/down counter|-----+
            |  3 DFFs on f_ref|  shift_right (dn)  |  (clk = f_ref) |     |
     +----->|  + DE delay     |------------------->+----------------+     |
     |      +-----------------+                                           v
     |                                                        +------------------+
     |                                                        | full subtractor  |
     |                                                        |  N - M           |
     |                                                        +------------------+
     |                                                          | N-M      | N
     |                                                        +------------------+
     |                                    msb --------------->| 0: N-M   1: N    |
     |                                     ^                  +------------------+
     |                                     |                          | adder
     |                                     |   signed register <------+  (clk = f_dco)
     |                                     +---- msb of register
     |                                     |
     |     l_code (L)   ----> 0 +------+   |
     |     l1_code (L+1)----> 1 | mux  |<--+
     |                          +------+
     |                              | one-hot chain length
     |                      +---------------+
     +------ f_dco <--------| ring oscillator|<--- enable
                            +---------------+
```

| Module | Kind | Role |
|---|---|---|
| `adpll_top` | structural | the loop above |
| `phase_detector` | RTL | bang-bang decisions, one every second reference cycle |
| `pd_delay_element` | behavioural | delay `DE` that sets the phase detector's dead zone |
| `updown_counter` | RTL | integrates decisions into `N` (the loop filter) |
| `full_subtractor` | RTL | forms `N - M` |
| `frac_accumulator` | RTL | adder, input multiplexer and signed register; its sign bit picks `L` or `L+1` |
| `chain_length_mux` | RTL | picks the one-hot word for `L` or `L+1` |
| `ring_oscillator` | behavioural | NAND enable gate plus four AND-OR elements (`ring_delay_cell`) |
| `adpll_pkg` | package | shared defaults and the `pd_decision_e` type |

## Frequency control: the one part worth reading twice

The ring's period for a fixed chain length `L` is `2 * L * t_de`. The signal
crosses each selected element once per half period: forward to the
turn-around element and back. Whole elements give coarse steps, so the
accumulator dithers between `L` and `L+1`.

The accumulator register `acc` is `W+1` bits wide and signed. It is updated
on every rising edge of the oscillator output:

| sign of `acc` | `msb` | adder input | chain length for the next cycle |
|---|---|---|---|
| `acc >= 0` | 0 | `N - M` (negative) | `L` |
| `acc < 0`  | 1 | `N` (positive)     | `L+1` |

`acc` stays in `[-M, M-1]`. Over `M` cycles the positive steps and the
negative steps cancel, so the sign bit is 0 in exactly `N` of every `M`
cycles, give or take one. This is a first-order sigma-delta modulator. The
mean period is therefore

```
T_dco = 2 * t_de * (L + 1 - N/M)
```

Here `M = 2**W`. A larger `N` means more short cycles, and so a higher
frequency. One step of `N` changes the period by `2*t_de/M`, which is
7.9 ps at the defaults. The cost is jitter: consecutive periods are either
`2*L*t_de` or `2*(L+1)*t_de`, never anything in between. Only their average
is fine-grained.

At the defaults (`t_de = 1006 ps`, `W = 8`, `L = 3`) the oscillator covers
124.3 MHz (`N = 0`) to 165.9 MHz (`N = 255`). It sits at 142 MHz when the
counter is at mid-scale, `N = 128`, which is also the counter's reset value.

The accumulator changes the ring's control word right after a rising edge.
That word then holds for both halves of the cycle that follows, so every
cycle has a 50 % duty cycle.

## Phase detector and dead zone

On every rising edge of `f_ref`, three flip-flops update:

* `s_out` samples `f_dco`;
* `s_de` samples `f_dco` delayed by `DE` (`pd_delay_element`);
* `toggle` inverts, so decisions are allowed only in every second cycle.

Then

```
shift_left  = toggle & ~s_out & ~s_de   // f_dco still low: its edge is late  -> count up
shift_right = toggle &  s_out &  s_de   // high for more than DE: edge early  -> count down
```

If the two samples differ, the oscillator edge fell inside the `DE` window
just before the reference edge, and no correction is made. `DE` is therefore
the width of the dead zone. The outputs are combinational from the
flip-flops. They are valid for the whole reference cycle after an edge, and
the counter, also clocked by `f_ref`, applies them at the next edge.
`decision` gives the same information as an enum (`PD_HOLD`, `PD_LEFT`,
`PD_RIGHT`). An assertion checks that the two requests are never high
together.

## Ring oscillator model

`ring_oscillator` has a NAND gate whose inputs are `enable` and the return
path. The NAND output is `f_dco`, and it drives the forward path into every
delay element. Each `ring_delay_cell` computes

```
ret_out = (fwd_in & sel) | (ret_in & ~sel)     // after t_de, inertial
```

The element whose one-hot bit is set turns the forward signal back; the
elements before it pass the return signal on. The whole element delay is
lumped into the return path and the NAND has zero delay, so the half period
is exactly `L * t_de`. With `enable` low, `f_dco` rests high. When `enable`
rises, `f_dco` falls at once and then oscillates. An all-zero control word
never closes the ring, so the output stops.

Lint reports a combinational loop through `f_dco`. That is the ring itself,
and it is intended.

## How the loop behaves

The counter is the only filter: the loop integrates phase decisions into
frequency and has no proportional path. A bang-bang loop like this has no
stable resting point. In simulation, at the defaults with a 50 MHz
reference and `L = 3`, the oscillator starts at 142 MHz (`N` at mid-scale).
It then drifts to wherever up and down decisions roughly balance. Over 2 ms,
`N` ranged from 57 to 145 and the frequency measured in 2 µs windows from
131.5 to 144.6 MHz, with a mean of 136.7 MHz (`tb_adpll_wander` reproduces
this). The output never holds a fixed
phase relationship to the reference, and it is not frequency-locked to an
integer multiple of it either. Keep this in mind before using it as a clean
clock. Adding a proportional path, or a filter between the phase detector
and the counter, would be the natural next step. That is not part of this
design.

The simulation does not model dissipation. A power figure of about 0.3 mW is
quoted for a transistor-level implementation of this loop; the models here
cannot check it.

## Parameters

| Name | Default | Where | Meaning |
|---|---|---|---|
| `STAGES` / `NUM_STAGES` | 4 | top, ring, mux | delay elements in the ring, i.e. width of the one-hot words |
| `W` / `CNT_W` | 8 | top, counter, subtractor, accumulator | width of `N`; `M = 2**W` |
| `TDE` / `TDE_PS` | 1006 ps | top, ring | delay of one ring element |
| `DE` / `DE_PS` | 200 ps | top, delay element | dead-zone width |
| `RESET_VALUE` | 0 (top: `2**(W-1)`) | counter | value of `N` after reset |
| `M` | `2**W` | subtractor | accumulator modulus |

The four-element ring and the use of one-hot words for `L` and `L+1` belong
to the design. The counter width, `t_de`, `DE`, `M`, the saturation and the
reset values are choices made for this implementation. `t_de` is picked so
that mid-scale gives 142 MHz.

## Departures and open points

* The loop's block diagram shows a block labelled LPF after the oscillator,
  but nothing describes what it does. The detailed loop schematic feeds the
  oscillator straight back to the phase detector, and so does `adpll_top`.
  The up/down counter serves as the loop filter.
* The phase detector's gate-level wiring is not fully defined. The
  polarity used here (both samples low = up) is the one that gives negative
  feedback. The dead-zone rule (samples differ = no action) follows from
  sampling the signal and its delayed copy.
* The counter saturates at 0 and `2**W-1` rather than wrapping. A wrap would
  throw the oscillator from one end of its range to the other.
* All registers have an asynchronous active-low reset `rst_n`.
* The `L` and `L+1` one-hot words are top-level inputs. Nothing in the
  design chooses `L`. Nothing checks that `l1_code` is `l_code` shifted by
  one, so other pairs also work: the mean period is then a mix of the two
  lengths given.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/adpll_pkg.sv \
    tb/tb_adpll_top.sv --top-module tb_adpll_top -o sim
./obj_dir/sim
```

Replace `tb_adpll_top` with any other testbench name. All files use
`timeunit 1ps`.

`tb_adpll_top` runs the whole loop at the default parameters. It runs with
`L = 3` for 30 µs and then with `L = 1` for 12 µs, and checks the
following independently of the RTL:

* every oscillator period is `2*L*t_de` or `2*(L+1)*t_de`, with equal halves;
* in every window of 256 oscillator cycles, the number of short cycles
  matches the sum of `N/M` to within 2;
* every phase-detector decision matches the oscillator level sampled at the
  reference edge and `DE` earlier;
* the counter follows the decisions exactly;
* the ring rests high while disabled and stops when disabled;
* the start-up period at mid-scale `N` is `2*t_de*(L+0.5)` (142 MHz for
  `L = 3`), within 2 %.

It fails if up, down, dead-zone, off-cycle, short-chain or long-chain events
never happen. It takes well under a second.

`tb_adpll_wander` runs the loop for 2 ms at the defaults. For every 2 µs
window it checks the measured frequency against the one predicted from the
mean of `N`, to within 1 %. It also checks that `N` never reaches either end
of its range. It prints the range the loop covered, and takes about a
second.

The block testbenches:

| Testbench | What it checks |
|---|---|
| `tb_phase_detector` | random sample levels; every-second-cycle gating; all decision cases |
| `tb_pd_delay_element` | exact delay on random edges; a short pulse is swallowed |
| `tb_updown_counter` | random requests against a model; both saturation limits |
| `tb_full_subtractor` | all `N`, for `M = 256` and `M = 200` |
| `tb_frac_accumulator` | register, carry and sign every cycle; `N`-in-`M` duty for many `N` |
| `tb_chain_length_mux` | all adjacent pairs; random words |
| `tb_ring_oscillator` | period `2*L*t_de` and duty cycle for `L` = 1..4; alternating `L`/`L+1`; enable |
