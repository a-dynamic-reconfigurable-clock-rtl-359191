# Dynamically reconfigurable clock generator

A processor saves power when it can lower its clock frequency while demand is low and raise it when
demand returns. Changing the frequency of a running clock carries risks. The system clock may glitch,
give a runt pulse, or stay at a frequency nobody chose while a PLL relocks. Any of these can corrupt
state in every register the clock reaches.

This design changes the clock a different way. Every selectable frequency already exists as the
output of a locked PLL. A **clock changer** moves the system clock from one PLL output to another in a
few cycles:

1. It stops the system clock cleanly while the clock is low.
2. It hands its internal clock over from the old PLL output to the new one, without glitches.
3. It restarts the system clock from a low phase.

The digital system never sees a shortened pulse. It sees a pause of a few clock periods, and then the
new frequency.

Two versions of the circuit are provided:

* **Fixed PLLs** (`clock_changer`, default 4 clocks): n PLLs run all the time at fixed frequencies.
  A change costs only the clock changer's switching time.
* **Two adjustable PLLs** (`pll_pair_changer`): one PLL drives the system while the idle one is
  programmed to the new frequency. Once the idle PLL reports lock, a two-input clock changer switches
  to it. A change costs the lock time plus the switching time, with far fewer PLLs.

Both versions sit side by side in the top module `dyn_clock_gen`, with separate ports. The PLLs
themselves are analog, and so are not part of the RTL. So is the *decision maker*, the processor-side
logic that decides when to change frequency and to which. Their signals are ports of the top.

## Interface to the decision maker

| signal | dir | meaning |
|---|---|---|
| `change` | in | One-cycle request, on a rising edge of the system clock. Give it only when no change is in progress (an assertion checks this). |
| `new_clock_value` | in | Fixed version: index of the requested PLL output. Index 0 is the lowest frequency and N_CLK-1 the highest; larger values are clamped. Pair version: the PLL's frequency code. |
| `changed` | out | One-cycle pulse when the change is complete. The next request may follow. |
| `min_ck`, `max_ck` | out | The running clock is the lowest or the highest available, so no further change in that direction is possible. |
| `sys_clk` | out | The gated system clock. |

The decision maker runs on `sys_clk`, which is held low during a change. So it cannot issue a second
request in the middle of a change. It only has to wait for `changed` before the next one.

## The five parts of the clock changer

```
 pll_clk[N-1:0] ──┬──────────────► selector ── req_clk ──► synchroniser ──► sync_out / armed
                  │                  │ step ─────────────────┘                    │
                  └──────────────► switcher ◄─────────────────────────────────────┘
                                     │ clk_int (internal clock)
                                     ├──► changer_fsm (sequencing)
                                     └──► isolator ──► sys_clk
```

* **isolator**: `sys_clk = clk_int & en`, where `en` is a register on the *falling* edge of
  `clk_int`. The gate therefore opens and closes only while the clock is low. The pulse on which
  `change` is sampled is the last full pulse before the pause.
* **selector**: on the request it stores the new index, and a multiplexer then gives the requested
  clock `req_clk`. One internal cycle later, after the multiplexer has settled, it raises `step`.
  `req_clk` goes only to the synchroniser and to the switcher's hand-over logic, never to the system,
  so a glitch on it at this moment is harmless.
* **switcher**: a glitch-free N-input clock multiplexer. Each input has its own enable flip-flop,
  clocked on the falling edge of that input, and `clk_int` is the OR of all the gated inputs. At most
  one enable is ever set.
* **synchroniser**: two rising-edge flip-flops bring `step` into the `req_clk` domain. A falling-edge
  flip-flop (`armed`) then opens a gate, and `sync_out = req_clk & armed` is a pulse train whose rising
  edges are exactly those of the requested clock.
* **changer_fsm**: runs on `clk_int`, with states `IDLE → ISOLATE → STEP → CLEAN → DONE`.

### The hand-over, edge by edge

This is the core of the design. Old edges are rising edges of the current clock; new edges are
rising edges of the requested clock.

| when | what happens |
|---|---|
| old edge 0 | The FSM samples `change`, loads the selector and raises `stop`. The system clock's pulse 0 is its last. |
| old fall 0 | The isolator closes: `sys_clk` stays low. |
| old edge 1 | The selector raises `step`. `clk_int` still gives this pulse to the internal logic. |
| old fall 1 | The switcher drops the old enable. `clk_int` is now low and stays low. |
| new edges 1–2 | `step` passes the synchroniser's two flip-flops. In parallel, *released* also passes two flip-flops in the new domain. *released* means `step` is high and every input other than the requested one is disabled. |
| new fall | The synchroniser arms: `sync_out` pulses from the next new edge on. |
| new fall | With `armed` and *released* both seen, the switcher sets the new clock's enable. |
| new edge | This is the first `clk_int` edge since old edge 1. The FSM, waiting in `STEP`, knows the switch is done. It clears `step`, records the new index, and drops `stop`. |
| new fall | The isolator opens. The system clock restarts at the next new edge, with a full pulse. |
| later | In `CLEAN` the FSM waits until the synchroniser is back to all zeros. Then it pulses `changed` and returns to `IDLE`, so the next change starts from reset values. |

The pause of the system clock is therefore about 1.5 old periods plus 5–7 new periods. It does not
depend on how many clocks there are. For the test clocks (half periods of 10, 7, 5 and 3 ns) the
pause measured 3.0 to 17.5 old periods. Over 24 pairs of 16 clocks whose half periods lie between
3.0 and 6.0 ns, it measured 4.2 to 9.3 old periods, identical to the pause of a 2-clock changer
given the same clocks. A request for the clock already running measured 6.0 old
periods: the old enable drops and the same clock is then taken up again.

Why it cannot glitch:

* Each enable changes only while its own clock is low.
* The new enable is set only after the old one is known to be off, through the synchronised
  *released* signal. So the two enables never overlap.
* `clk_int` can therefore only pause, low, between two complete pulses.
* The isolator adds a second, independent low-phase gate on the system clock itself.

Timing constraints for implementation:

* `step` and `cur_idx` go from a rising edge to the falling-edge enable of the same clock. That is a
  half-cycle path.
* The enable vector into the *released* synchroniser, and `step` into the synchroniser, are
  asynchronous crossings. Treat them as such: false paths to the first flip-flop of each synchroniser.
* The clock mux and gating cells (`&` / `|` on clocks) should become glitch-free clock cells, or be
  kept as balanced gates.

## Two adjustable PLLs (`pll_pair_changer`)

`pll_pair_changer` has the following states:

1. **IDLE**: wait for a request. On `change` it stores the code.
2. **PROG**: send the code on `prog_data`, with a one-cycle `prog_load` strobe to the *idle* PLL
   (the one not driving `clk_int`).
3. **UNLOCK**: wait until that PLL's lock input falls (it is synchronised by two flip-flops).
4. **LOCK**: wait until the lock input rises again.
5. **SWITCH / WAIT**: request a change in the internal two-input clock changer to the idle PLL, and
   wait for its `changed`.

The system keeps running on the old PLL throughout the locking, even while the idle PLL's output is
erratic. `min_ck` and `max_ck` compare the running code with `MIN_CODE` and `MAX_CODE`. The
programming interface and the lock handshake are this design's own choices: the PLL is expected to
drop lock when it is programmed.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `clock_changer`, `selector`, `switcher`, `changer_fsm`, `dyn_clock_gen` | `N_CLK` | 4 | Number of fixed PLL outputs; must be at least 2. The value is a free choice. |
| same | `RESET_IDX` | 0 | Clock running after reset. |
| `pll_pair_changer`, `dyn_clock_gen` | `PROG_W` | 8 | Width of the PLL frequency code. |
| `pll_pair_changer` | `MIN_CODE`, `MAX_CODE`, `RESET_CODE` | 0, 255, 0 | Code limits for `min_ck` / `max_ck`, and the code after reset. |

Each version has an asynchronous, active-low reset (`fixed_rst_n`, `pair_rst_n`). While a version
is in reset, its `RESET_IDX` clock passes straight through.

## Where this departs from the original circuit

* **Duty factor of the synchroniser output.** The original synchroniser produces a 25 % duty-factor
  pulse. It does this with combinational delays that must be held within a quarter of the clock
  period. Delay-tuned logic cannot be written as synthesizable RTL, so here the output pulse is one
  whole high phase of the requested clock (50 % for a symmetric clock). The frequency, the
  alignment with the requested clock's rising edges and the freedom from glitches are unchanged.
  The switcher relies on none of the 25 % shape.
* **Switching time.** The original circuit takes between 7 original periods (two PLLs) and 20
  (many PLLs). Here the time depends on the ratio of the two frequencies, not on the number of
  PLLs. It came to between 3 and 17.5 original periods in the tests, and to 6 for equal
  frequencies.
* **Inner structure.** The following are this design's own:
  * the split into signals between the four blocks;
  * the per-input enables of the switcher and its *released* handshake;
  * the FSM states and the `change`/`changed` pulse handshake;
  * the index encoding of the new-clock bus and the clamp of out-of-range values;
  * the programming and lock handshake of the adjustable PLLs.

  What the original describes, the blocks follow: what each block does and in which order (stop
  low, select, step, synchronise, switch, restart low, reset the registers).

## Files

RTL (`rtl/`):

* `clkgen_pkg.sv`: FSM state type.
* `isolator.sv`, `selector.sv`, `synchroniser.sv`, `switcher.sv`, `changer_fsm.sv`: the parts of the
  clock changer.
* `clock_changer.sv`: the five parts wired together.
* `pll_pair_changer.sv`: the two-adjustable-PLL version.
* `dyn_clock_gen.sv`: the top.

Testbenches (`tb/`):

* One `tb_<module>.sv` per module. Each is self-checking and ends with a `TB_RESULT checks=…
  failures=…` line.
* `tb_dyn_clock_gen.sv` runs the top at its default parameters. Both versions run at once through a
  sequence of changes. It checks:
  * the new periods;
  * `min_ck` / `max_ck`;
  * that the system clock never glitches;
  * that each mechanism (up, down, same clock, min, max, lock wait, synchroniser pulses) occurs.
* `tb_switch_time.sv` measures the pause of the system clock for a range of frequency pairs, with
  2 clocks and with 16 clocks.
* `adj_pll_model.sv` is a behavioural adjustable PLL, used only by testbenches. Its half period is
  `20 ns − 60 ps × code`, it locks in 200 ns, and its output is erratic while unlocked.

To simulate one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/clkgen_pkg.sv tb/tb_dyn_clock_gen.sv \
          --top-module tb_dyn_clock_gen
./obj_dir/Vtb_dyn_clock_gen
```

Replace the testbench name to run another one. Every testbench runs in well under a second.
