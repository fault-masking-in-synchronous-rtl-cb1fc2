# Fault masking in three-stage pipelines: 4-phase, 2-phase and clocked

A short disturbance on a wire (a particle strike, a ground bounce) only becomes
an error if the circuit *stores* it. This design provides three small FIFO
pipelines that move data through three storage stages in three different
ways, so that you can inject such transient faults and count how many are
masked:

| pipeline | what decides when a stage stores | storage | module |
|---|---|---|---|
| 4-phase bundled data (Muller pipeline) | C-element handshake, return-to-zero | latch, open while Lt is low | `fp_pipeline` |
| 2-phase bundled data | XNOR of request and acknowledge, transition signalling | request latch and data latch, open while Lt is high | `tp_pipeline` |
| synchronous | global clock | rising-edge D flip-flops | `sync_pipeline` |

There is no logic between the stages: the pipelines are pure FIFOs, because the
point of interest is the control, not the data path. `fault_masking_top` puts
the three side by side with all their ports brought out. Every stage has
fault-injection inputs and an observation output, and the end-to-end testbench
runs a complete fault-injection campaign against all three.

The structure, the delay values and the experiment follow the study
*Fault Masking in Synchronous and in Asynchronous Logic – A Comparison*.
Where this RTL departs from it, or fills a gap it leaves, the section
"Departures and open points" says so.

## The 4-phase stage (`fp_stage`)

```
            +-----+   M    Rout           Delta         Ain           D2
  Rin  ---->|  C  |--[dly]--+------------[dly]----------+----------[dly]---> Lt
  Aout --o->|     |         |                           |                     |
            +-----+         +--> next stage Rin         +--> previous stage   |
                                                             Aout             v
  data_in ------------------------------------------------------------> [latch] --> data_out
                                                              (transparent while Lt = 0)
```

* The C-element takes Rin and the *inverted* successor acknowledge Aout. Rout
  rises when a request is present and the successor is empty, and falls when
  the request is gone and the successor has acknowledged. In every other
  input combination the C-element holds. That hold is the masking: a glitch on
  one input is ignored unless the other input already has the glitch's value.
* Rout passes the matched delay Delta (13 ns) and becomes the acknowledge Ain
  to the predecessor. Ain passes a short delay D2 (1 ns) and becomes the latch
  control Lt, so that Ain and Lt are distinct events in a trace.
* The C-element's gate delay M (3 ns) is modelled at its output.
* All handshake edges are active rising; the falling edges form the
  return-to-zero half of the cycle.

This is the simplest Muller control. At most every second stage holds an
item, because Aout must be low before Lt can rise.

**Timing.** A producer answers each Ain edge after T_Rin and a consumer copies
Rout to Aout after T_Aout. The slowest of three loops then sets the cycle,
and each loop is traversed twice per item:

| loop | delay |
|---|---|
| input | T_Rin + M + Delta |
| between two stages | 2M + Delta |
| output | M + T_Aout |

So the cycle per item is `2 * max(T_Rin + M + Delta, 2M + Delta, M + T_Aout)`.
Simulation gives exactly 42 ns for T_Rin/T_Aout = 4/18 ns and 82 ns for 4/38,
25/17 and 25/26 ns. These are the cycle lengths of the reference study.

## The 2-phase stage (`tp_stage`)

```
  Rin ---> [request latch]--[TD2]--+--> Rout (next stage Rin)
                 ^                 |
                 | Lt              +--[Delta]--> Ain (previous stage Aout)
                 |                 |
  Lt <--[TXNOR]-- XNOR(Rout, Aout) <-- Aout (next stage's Ain)
  data_in ---> [data latch] ---> data_out      (both latches transparent while Lt = 1)
```

* An item is signalled by a *toggle* of Rin. While the stage is empty (Rout
  equals Aout) Lt is high and both latches are open. The toggle passes the
  request latch and appears on Rout after TD2 (2 ns).
* Rout now differs from Aout, so the XNOR output drops Lt after TXNOR
  (130 ps). Both latches close and hold request and data.
* Rout also passes the delay element D (Delta = 15 ns) and becomes the
  acknowledge to the predecessor.
* When the successor acknowledges by toggling Aout, Lt rises again and the
  next request, if one is waiting, passes.

The masking element here is the XNOR and latch pair. A glitch on Rin only
passes while the latch is open, and a glitch on Lt only matters when Rin and
Rout differ.

**Timing.** One item takes
`max(T_Rin + TD2 + Delta, 2 TXNOR + 2 TD2 + Delta, T_Aout + TXNOR + TD2)`.
Simulation gives 44.26 ns per two items at 3/20 ns and 64.26 ns at 3/30 ns,
equal to the reference study. Input-limited settings differ; see below.

## The synchronous pipeline (`sync_pipeline`)

Three rising-edge flip-flops on one clock. A disturbance on a flip-flop's D
input propagates only if it is present while the flip-flop samples
(latching-window masking). In the RTL the sampling window has zero width. The
testbench stands in for a real setup-plus-hold window T_win by making the
fault pulse T_win = 10 ns wide and starting it at a uniformly random time in
a clock period. The probability that such a pulse is captured
is then `min(1, T_win / T_clk)`, so a *faster* clock propagates *more*
faults.

The flip-flops have no clock-to-output or propagation delay (t_CO, t_PD):
no values for them are known, and they only shift where in the period the
sensitive window lies. Faults on the clock itself are not injected. They
would always propagate, so they add nothing to the comparison.

## Fault injection and how masking is judged

**Fault ports.** Each asynchronous stage has `flt_force` and `flt_value`, five
bits each, indexed by `bd_pkg::ctrl_sig_e`: Rin, Ain, Rout, Aout, Lt. While
`flt_force[s]` is 1, signal s is driven to `flt_value[s]`. This is the pulse
model: at fault onset the signal is forced to the inverse of its fault-free
value and held there for the fault duration. The forcing points are:

* Rin and Aout: where they enter the stage's C-element (4-phase) or its
  request latch and XNOR (2-phase).
* Rout, Ain and Lt: on the stage's own nets, so every reader sees the fault.

**Observation.** `sig` returns the five signals as seen after injection.
`sync_pipeline` has one force bit and value per flip-flop D input, and
`stage_q` returns every flip-flop's output.

**Campaign (`tb/tb_fault_masking_top.sv`).** Every run starts from reset, so
all runs share one timeline.

1. *Golden run.* Record the middle stage's five signals as an event trace.
   Cut one steady-state cycle (from one Rout rise to the next) into states:
   the intervals between trace events.
2. *Methodical injection.* In the middle of each state, force each of the five
   signals in turn. b_i is the number of signals whose fault is not masked.
   This gives the failure probability of one fault,
   `f = sum_i (b_i / 5) * (t_i / T)`, where t_i is the state's duration and
   T the cycle.
3. *Random injection.* Run 500 single faults, each in its own run from reset,
   on a random signal at a uniformly random time in that cycle. Compare the
   count of unmasked faults with `E = 500 f`. The check allows 4 sigma of the
   binomial spread plus 3 %.

**Masking rule.** A fault is *masked* if deleting the first trace entry that
differs from the golden trace, and the entry after it (the fault's own two
edges), leaves a trace equal to the golden one. Only the sequence of states is
compared, not their times, so a fault that only shifts timing counts as
masked. The last eight entries are not compared, because the end of the run
cuts them off.

**Operating points.** The speed of a handshake pipeline is described by DIFF,
the slack between the input and output loops:

* 4-phase, input faster: DIFF = T_Aout - Delta - T_Rin. The testbench uses
  T_Rin = 4 ns and T_Aout = 17 ns + DIFF.
* 4-phase, output faster: DIFF = T_Rin + Delta - T_Aout. The testbench uses
  T_Aout = 17 ns and T_Rin = 4 ns + DIFF.
* 2-phase: diff = T_Rin - T_Aout + Delta.

Results at the default parameters, 500 faults per point, with a 500 ps fault
pulse on the handshake pipelines. "f" comes from the per-state model; "sim"
is the count of unmasked faults from random injection. The cycle is one
period of the middle stage's trace: one item for 4-phase, two items for
2-phase.

| 4-phase DIFF (ns) | 1 | 2 | 5 | 10 | 20 | 30 | 40 | 50 |
|---|---|---|---|---|---|---|---|---|
| cycle (ns) | 42 | 44 | 50 | 60 | 80 | 100 | 120 | 140 |
| f | 0.419 | 0.418 | 0.464 | 0.413 | 0.410 | 0.408 | 0.543 | 0.551 |
| sim, input faster | 175 | 199 | 191 | 209 | 218 | 211 | 234 | 260 |
| sim, output faster | 208 | 192 | 207 | 187 | 203 | 216 | 258 | 232 |

| 2-phase diff (ns), T_Rin/T_Aout | -12, 3/30 | -2, 3/20 | 3, 3/15 | 7, 10/18 | 10, 13/18 |
|---|---|---|---|---|---|
| cycle (ns) | 64.26 | 44.26 | 40 | 54 | 60 |
| f | 0.493 | 0.419 | 0.423 | 0.475 | 0.488 |
| sim | 251 | 254 | 214 | 243 | 271 |

| synchronous T_clk (ns) | 10 | 20 | 30 | 40 | 50 | 60 | 70 | 80 | 90 | 100 | 110 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| expected 500 min(1, T_win/T_clk) | 500 | 250 | 167 | 125 | 100 | 83 | 71 | 63 | 56 | 50 | 45 |
| propagated | 500 | 240 | 170 | 122 | 98 | 85 | 82 | 72 | 61 | 48 | 38 |

The testbench's checks:

* Every random count lies within the statistical tolerance of 500 f.
* The synchronous pipeline follows T_win / T_clk. Its propagated faults fall
  from 500 to about 40 as the clock slows. These are the same numbers the
  reference study reports, within a few tens.
* The handshake pipelines show the study's trend only weakly: a slowly
  driven pipeline lets more faults through than a fast one. For 4-phase, f
  stays near 0.41 up to DIFF = 30 ns and rises to about 0.55 at 40 and 50 ns.
  For 2-phase, f is lowest near diff = 0 and higher at both ends. The
  absolute levels differ from the study; see below.

## Departures and open points

* **Failure probabilities differ from the reference values.** The reference
  study reports f = 0.21 for the 4-phase pipeline and 0.66 to 0.67 for the
  2-phase one. Here both come out between 0.41 and 0.55, mostly with two bad
  signals per state. Over its 4-phase DIFF sweep the study counts 105 rising
  to 196 unmasked faults of 500. This design gives 175 to 260, a weaker rise.
  Over its 2-phase sweep the study counts 318 to 352; this design gives 214
  to 271. The study gives neither the fault duration nor the exact point where
  each of the five signals is forced, and both change b_i.
  * The 500 ps pulse width is this design's choice (`W_PS` in the testbench).
  * So are the forcing points listed above.
  * Delays are transport delays, so a short pulse is never swallowed by a
    delay element. It is not known whether the original simulation used
    inertial delays.
  The study's method is reproduced: state durations, bad-signal counts, f and
  E = n f. Its numbers are not.
* **2-phase input side.** Here the producer answers each Ain toggle after
  T_Rin, so the input loop is T_Rin + TD2 + Delta. The reference state
  durations for input-limited settings add up to Delta + T_Rin per item: 36
  and 46 ns per two items, against 40 and 50 ns here. Output-limited cycles
  match exactly.
* **TD2 in the 2-phase stage.** The 2-phase circuit drawing has no D2 element,
  but its delay list has T_D2 = 2 ns. It is taken as the request latch's
  delay. With that reading the documented state durations (130 ps, 2 ns,
  12.87 ns, ...) and the output-limited cycles come out exactly.
* **Choices where the study is silent:**
  * data width: 8 bits;
  * reset: active-high, asynchronous for the handshake pipelines, synchronous
    for the clocked one, all to zero;
  * the 4-phase data latch has zero delay;
  * the C-element is written as a latch enabled by "inputs equal".
* **Delay elements are behavioural.** `delay_elem` is a simulation model of a
  matched delay line. Synthesis ignores it, so the asynchronous pipelines
  synthesize to their latches and gates without delays. Realising them in
  silicon needs real delay lines sized for the process.
* **Lint notes.** The always_latch blocks give latch reports on purpose.
  Verilator also reports "no latches detected" for the open-low latch in
  `fp_stage`; that report is a false alarm, and the latch's testbench checks
  both polarities.

## Files

| file | content |
|---|---|
| `rtl/bd_pkg.sv` | signal indices and the 5-bit control vector type |
| `rtl/muller_c.sv` | C-element |
| `rtl/d_latch.sv` | D-latch, either polarity |
| `rtl/delay_elem.sv` | behavioural transport delay |
| `rtl/fp_stage.sv`, `rtl/fp_pipeline.sv` | 4-phase stage and pipeline (defaults M 3 ns, Delta 13 ns, D2 1 ns) |
| `rtl/tp_stage.sv`, `rtl/tp_pipeline.sv` | 2-phase stage and pipeline (defaults TXNOR 130 ps, TD2 2 ns, Delta 15 ns) |
| `rtl/sync_pipeline.sv` | flip-flop pipeline |
| `rtl/fault_masking_top.sv` | the three pipelines side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module; `tb_fault_masking_top` is the campaign above |

All asynchronous delays are integer picoseconds (`timeunit 1ps`). The
pipelines take `NSTAGES`, `WIDTH` and their delays as parameters.

## Simulating

The testbenches need Verilator 5 with timing support. Each prints
`TB_RESULT checks=N failures=M` at the end. For example:

```
verilator --binary --timing --assert -Irtl rtl/bd_pkg.sv tb/tb_fp_pipeline.sv \
          --top-module tb_fp_pipeline -o sim
./obj_dir/sim
```

Replace `tb_fp_pipeline` with any other testbench name. The two pipeline testbenches
also assert the handshake rules at every stage. An output request changes
only when the output channel allows it, and an acknowledge only answers a
pending request. This holds for both signalling styles. Verilator finds the
modules in `rtl/` by file name. The full fault campaign
(`tb_fault_masking_top`) runs about 17,000 short simulations from reset and
finishes in about half a minute.

To try other operating points, edit the `async_experiment` and
`sync_experiment` calls at the end of `tb_fault_masking_top`. The arguments
of `async_experiment` are the pipeline (0 for 4-phase, 1 for 2-phase),
T_Rin and T_Aout in ps, and a label. The argument of `sync_experiment` is
T_clk in ps. Change `W_PS` for a different fault
duration.
