# Glitch-free discretely programmable clock generator (DPCG)

A clock generator for one synchronous island of a GALS (globally asynchronous,
locally synchronous) system. It can be switched at any time between a few
discrete frequencies, and it can be paused. The output clock never glitches,
and nobody waits for a new oscillator to settle: the frequency change shows
up only as one longer low phase of the clock.

The main idea is to use **two identical programmable ring oscillators that take
turns**. One drives the output at the current frequency, while the other is
stopped and holds the next frequency code. A change goes like this:

1. The new code is stored for the idle ring.
2. The running ring is stopped in its low phase.
3. The idle ring is released.
4. The output multiplexer follows whichever ring is not stopped.

Outside a change only one ring oscillates.

The rings themselves are analog in silicon (a chain of gate delays), so here
they are behavioural delay models. Everything else is clockless handshake
logic written as synthesizable SystemVerilog: latches, C-elements, a mutex
and a few gates.

```
 req_f/ack_f/data_f ─┐                     ┌───────────────┐
                     ├─► arbiter ─► event_controller ─ gate/gated ─┐
 req_g/ack_g ────────┘      │             │ f_mux, ck_f          │
                            ▼             ▼                      ▼
                     switch_control   mux_flipflops        clock_switch
                       (R/A per ring)  code0 code1        ring_head x2 + mux ─► clock
                            │             │   │              ▲  │
                            └─────────────┼───┼──────────────┘  │ s / del_s
                                          ▼   ▼                 │
                                 prog_ring_element x2 ◄─────────┘
```

## Interface and handshakes

All channels are four-phase (return-to-zero) handshakes. There is no input
clock.

| port | dir | width | meaning |
|---|---|---|---|
| `rst_n` | in | 1 | asynchronous active-low reset |
| `req_f`, `ack_f` | in, out | 1, 1 | frequency channel |
| `data_f` | in | 2 | frequency code, must be stable from `req_f+` until `ack_f+` |
| `req_g`, `ack_g` | in, out | 1, 1 | gating (pause) channel |
| `clock` | out | 1 | generated clock |

**Frequency change.** Put the code on `data_f`, then raise `req_f`. The code
is stored when `ack_f` rises. Lower `req_f`; `ack_f` then falls. The old
ring then stops at its next falling edge. The new ring starts and gives its
first rising edge one of its own half periods later. So the first new edge
comes at most half an old period plus half a new period after `ack_f-`.

**Gating.** Raise `req_g`. The running ring is stopped in its low phase,
then `ack_g` rises. The clock stays low and neither ring oscillates. Lower
`req_g`. The ring is released and `ack_g` falls. The first rising edge comes
half a period later.

**Codes.**

| `data_f` | ring length | period with default delays | frequency |
|---|---|---|---|
| 0 | 7 stages | 2032 ps | 492 MHz |
| 1 | 15 stages | 3120 ps | 321 MHz |
| 2 | 30 stages | 5160 ps | 194 MHz |
| 3 (unused) | 30 stages | 5160 ps | 194 MHz |

The reference design reaches 491, 317 and 194 MHz at 1.2 V. The two delay
parameters below are fitted to those numbers.

**Reset.** Hold `rst_n` low for at least one slow-ring period, so that both
stopped rings settle. Both code registers are loaded with code 2 (the
slowest). When reset is released, ring 0 starts.

## How a frequency change is sequenced (`event_controller`)

This is the part to understand first. The controller has three inputs,
`new_f`, `gated0` and `gated1`, and four outputs, `f_mux`, `ck_f`, `gate0`
and `gate1`. It repeats a cycle of two halves: ring 0 → ring 1, then
ring 1 → ring 0. Starting with ring 0 running (`f_mux = 0`, `gate0 = 0`,
`gate1 = 1`):

1. `new_f+` → `ck_f+`. `ck_f` is both the channel acknowledge and the clock
   of the code registers. Since `f_mux` is still 0, the code goes into
   ring 1's register.
2. `new_f-` → `ck_f-`, then `f_mux+`, then `gate0+`.
3. Ring 0 stops in its low phase → `gated0+`.
4. `gate1-`. Ring 1 may start only now.
5. `gated1-`: ring 1 runs and drives the clock. The change is complete.

The second half mirrors this with the rings exchanged. The logic that
implements it is small:

- `ck_f = C(new_f, ready)`, a Muller C-element. Here
  `ready = steady & (next_mux == f_mux)`, and `steady` means "ring `f_mux`
  runs and the other is stopped". A request that arrives while a change is
  still in progress therefore waits.
- `f_mux` toggles through a master/slave pair of latches controlled by
  `ck_f`. `next_mux` takes `~f_mux` while `ck_f` is high. `f_mux` takes
  `next_mux` once `ck_f` is low. So `f_mux` changes just after `ck_f-`, never
  while the code is being written.
- `gate0 = f_mux | ~gated1` and `gate1 = ~f_mux | ~gated0`. A ring is released
  only once the other ring reports it has stopped. The two gates are never
  low together.
- `busy = (next_mux ^ f_mux) | ~steady` is high from `ck_f+` until the
  change is complete. The arbiter uses it.

## Stopping a ring in its low phase (`ring_head`)

Each ring is a loop: `s`, then the delay line, then `del_s`, then the ring
head, then `s` again. The ring head is the only inverting stage:
`s = ~(del_s & run)`. The ring runs while `run` is high. When `run` is low
it parks with `del_s` high, which is the clock-low phase. The ring's clock
phase is `ndel = ~del_s`.

Two standard latch + AND clock gates are cascaded:

- **Stage 1.** `gate` is sampled by a latch that is transparent while
  `ndel` is low. Then `clk1 = ndel & ~gate_l` and `gated = gate_l`.
- **Stage 2.** The switch control's request `r` is sampled by a latch that
  is transparent while `clk1` is low. Then `clock = clk1 & ~r_l` and
  `a = r_l`.

A latch can only change while its clock input is low. So a gated clock is
always cut during its low phase, and it restarts with a full high phase.
`run = ~gate_l & ~r_l`, so a gated ring stops oscillating, not just its
output.

`clock_switch` holds the two ring heads and the output multiplexer, which
selects `clock1` while `gated0` is high and `clock0` otherwise. The select
changes only at moments when both ring clocks are low:

- `gated0+` comes after ring 0 has stopped low, while ring 1 is still stopped.
- `gated0-` comes after ring 1 has stopped low (`gated1+` precedes `gate0-`),
  and ring 0 needs half a period before its first rising edge.

## Gating and arbitration (`switch_control`, `arbiter`, `mutex`)

`switch_control` is a multiplexer for a handshake. It sends the gating
request to the ring named by `f_mux` (`r0` or `r1`) and passes that ring's
acknowledge back. The acknowledge goes through a C-element together with
`r0 | r1`, so `ack` completes the return-to-zero phase correctly.

The two external channels are unrelated and can fire together, so a mutex
serialises them:

- The frequency side requests the mutex with `req_f | busy`. It keeps the
  mutex until the new ring drives the clock.
- The gating side requests it with `req_g | ack_s`. It keeps the mutex until
  its handshake has returned to zero.

The mutex is two cross-coupled latches. A zero-delay model cannot resolve an
exact tie at random, so a tie goes to the frequency side. A loser just sees
no acknowledge until the winner is done.

## Programmable ring element (behavioural)

`prog_ring_element` models the delay line: `LEN_SLOW` = 30 stages of
`T_AND_PS` each, tapped after 7, 15 or 30 stages. A fixed `T_FIX_PS` stands
for the multiplexers and the ring head. The ring period is
`2 * (len * T_AND_PS + T_FIX_PS)`. The defaults are 68 ps and 540 ps. In
silicon, delay and therefore frequency scale with supply voltage: about
2.2× slower at 0.8 V than at 1.2 V. Well bias also tunes it. Here those
effects exist only as these two parameters, which `dpcg` passes down.
Change the ring code only while its ring is stopped. The controller
guarantees that.

## What is this implementation's own

These parts follow the reference design:

- the block structure
- the signal names
- the handshake order of the event controller
- the two cascaded latch + AND gates of the ring head
- the C-element-based switch control
- the ring lengths

These are choices made here:

- **Event controller logic.** It is derived here from the handshake
  sequence. It is not a gate-for-gate copy of a reference netlist, which
  also contains scan test shells that are not built.
- **Arbiter.** Its hold conditions and the controller's `busy` output are
  additions that keep a gating request out while a change is in progress.
- **Ring stop.** The stop input of the ring head's NAND is driven by both
  gating latches (`run`).
- **Output multiplexer.** It is selected by `gated0`.
- **Codes and reset.** The 2-bit code encoding, the reset input and the
  reset code are this implementation's own.
- **`ack_f` timing.** `ack_f` falls before the rings are exchanged, not
  after, following the handshake sequence.

## Limits

- **Zero delay.** All control logic simulates with zero delay. The timing
  rules that matter in silicon cannot be seen in this model. For example,
  `gated` and `a` must rise only after the clock is really cut, and the
  latch and AND of a gate must sit close together. Metastability of the
  mutex and of the gating latches is not modelled either.
- **Intended latches and loops.** Lint reports latches and combinational
  loops (Verilator `UNOPTFLAT`). They are intended, and each module's header
  says why. The loops settle after every input change.
- **Synthesis.** Synthesis of the control gives latches and gates. Turning
  it into a hazard-free netlist needs the usual asynchronous-design care,
  such as dedicated C-element and mutex cells. The ring model is not
  synthesizable in any useful sense.

## Files

| file | content |
|---|---|
| `rtl/dpcg_pkg.sv` | code type, ring lengths, `ring_length()` |
| `rtl/dpcg.sv` | top |
| `rtl/arbiter.sv`, `rtl/mutex.sv` | channel arbitration |
| `rtl/event_controller.sv` | frequency-change sequencer |
| `rtl/switch_control.sv`, `rtl/c_element.sv` | gating-handshake multiplexer |
| `rtl/clock_switch.sv`, `rtl/ring_head.sv` | ring closing, gating, output mux |
| `rtl/mux_flipflops.sv` | code registers of the two rings |
| `rtl/prog_ring_element.sv` | behavioural delay line |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a watchdog. Delays need `--timing`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/dpcg_pkg.sv rtl/*.sv tb/tb_dpcg.sv --top-module tb_dpcg -Mdir obj_dpcg
./obj_dpcg/Vtb_dpcg
```

`tb_dpcg` runs the whole generator at its default delays and checks:

- every frequency against the model formula, and within 2 % of 491, 317 and
  194 MHz
- the switch latency and the stretched low phase
- that no clock pulse is shorter than the fastest half period
- gating
- simultaneous requests on both channels
- a request issued while a change is still running
- the unused code

It counts each of these and fails if one never happened.

`tb_dpcg_vscale` runs the top with both delays scaled by 2.2, which stands
in for a 0.8 V supply. It checks that every code then gives the 1.2 V
frequency divided by 2.2, and it repeats the glitch and gating checks.

When driving these modules from a testbench, change inputs at least 1 ps
after an event you waited on. With Verilator, an input written in the same
time step as a `wait` on a signal inside one of the control loops was
observed not to propagate.
