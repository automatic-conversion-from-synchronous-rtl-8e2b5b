# Bundled-data asynchronous circuits converted from synchronous RTL

A synchronous RTL model is a set of registers, a data-path between them, and a
controller (an FSM or a chain of pipeline stages) that decides which registers
are written in each clock cycle. This design keeps the registers and the
data-path unchanged and removes the global clock. Each state (non-pipelined
circuits) or each pipeline stage (pipelined circuits) gets its own small
**control module**. A control module receives a request, waits a matched delay
that covers the data-path of its state, and then issues a short **local clock**
pulse. That pulse writes the registers the original state would have written,
and it passes the request on to the next state. This is the *bundled-data*
style: data travel on ordinary wires, and a delayed request travels beside them
and arrives after the data have settled.

Two example circuits are converted this way, each in a plain and an optimised
form:

* a four-state FSM with a branch, which computes `(cond ? in0 : in1) * (in0 + in1)`;
* a three-stage pipeline with input-valid bits and a stall, which computes `(in0 + 10) * 3`.

Both sit side by side in `bd_top`.

## The control module `ctrl_i`

```
 inputs --[w0 glue]--> w0 (= st) --[sd: SD_DELAY]--> dreq --.
                                                            XOR --> lclk
                 out --[pd: PD_DELAY]--> ackd --------------'      |
                  ^                                                 |
                  '----------- toggle DFF  <--- rising lclk --------'
 lst = st XOR out
```

All requests are **two-phase**. Every transition of `w0`, rising or falling,
is one request, and every transition of `out` is one answer.

* When `w0` changes, the delay element `sd` passes the change on after
  `SD_DELAY`. The XOR then sees its two inputs differ, and `lclk` rises.
* The rising `lclk` toggles the DFF, so `out` now equals `w0` again. After
  `PD_DELAY` the change in `out` reaches the other XOR input through `pd`, and
  `lclk` falls.

Each request therefore yields exactly one local-clock pulse, `PD_DELAY` wide
and `SD_DELAY` after the request. `out` is the request to the successor states.

`lst = st XOR out` is high from the moment a request arrives until the module
has answered, that is, while the state is active. The operand-isolation
latches use it.

### Timing numbers

The matched delay plus the DFF delay equals one clock period of the synchronous
original, so the asynchronous circuit keeps the original's data-path timing:

| Quantity | Value | Origin |
|---|---|---|
| clock period CT | 1000 ps | the method's example |
| DFF / pulse width PD | 1 ps | the method's DFF model; the pulse width is this design's choice |
| SD = CT − PD | 999 ps | the method |

A state therefore takes 999 ps from request to local clock. The three states of
one run of the FSM take 3 × 999 = 2997 ps.

### How `w0` is formed (`W0_MODE`)

The glue in front of `sd` depends on where the requests come from:

* **XOR merge** (`W0_XOR`). `w0` is the XOR of the predecessors' `out`
  signals. With two-phase signalling, a transition on any input is a
  transition of `w0`. With a single predecessor, this is a plain wire.
* **C-element** (`W0_CELEM`). Used by the first state, which must wait for two
  things: a new `start` from outside, and the feedback from the last states
  showing that the previous run has finished. The feedback (the XOR of the last
  states' `out`) is inverted before the C-element, so that after reset, with
  every signal at 0, the first `start` passes. A `start` that arrives early is
  not lost: the C-element holds it until the feedback returns.
* **Branch** (`W0_BRANCH`). `lclk` of the predecessor is ANDed with the
  branch condition. The result clocks a toggling flip-flop (`bd_branch`), so
  `w0` changes only for the branch actually taken. The taken and not-taken
  targets use the condition and its complement (`COND_VAL`).

## Glue logic between control and data-path

* **Register write clocks.** A register written in several states is clocked
  by the OR of those states' `lclk`. For example, `reg4` in the FSM example is
  written in state 2 or state 3, so it uses `lclk2 | lclk3`. Only one of the two
  can pulse in a run.
* **Multiplexer controls.** A multiplexer that the original FSM switched by
  state is switched by `st XOR out` of the selecting state. That signal is high
  exactly while that state is active.

## Non-pipelined example (`bd_sample_np`)

| State | Registers written | Next state | Control module |
|---|---|---|---|
| 0 | `reg0 ← cond`, `reg1 ← in0`, `reg2 ← in1` | 1 | C-element of `start` and the feedback |
| 1 | `reg3 ← reg1 + reg2` | 2 if `reg0[0]` is 1, else 3 | XOR glue with one predecessor |
| 2 | `reg4 ← reg1 × reg3` | back to 0 | branch on `reg0[0] = 1` |
| 3 | `reg4 ← reg2 × reg3` | back to 0 | branch on `reg0[0] = 0` |

* The multiplexer in front of the multiplier selects `reg2` while state 3 is
  active.
* `done = out2 XOR out3` toggles once per run. It is also the feedback into
  state 0.
* From a `start` transition to the `done` transition takes 2997 ps.
* `start` and `done` are both two-phase.

## Pipelined example (`bd_sample_pl`)

This is the subtlest part of the design.

| Stage | Register | Written when |
|---|---|---|
| 0 | `reg0 ← in0` | `istart` |
| 1 | `reg1 ← reg0 + 10` | `creg0` |
| 2 | `reg2 ← reg1 × 3` | `creg1` |

* `creg0` and `creg1` are the valid bits of the original control circuit.
* Every write, including the writes of the valid bits, also requires
  `stall_n = 1`.
* The stages' control modules form a chain: ctrl0 → ctrl1 → ctrl2.

**One transition of `start` is one pipeline step**, the counterpart of one
clock edge. Suppose `start` toggles at time *t*:

* ctrl0 fires at *t* + 999.
* ctrl1 fires at *t* + 1998, and ctrl2 at *t* + 2997.

With a new toggle every 1000 ps, stage *i* handles token *m* while stage *i*−1
handles token *m*+1. The three stages of consecutive tokens fire within about
3 ps of each other, with the downstream stage first. This mirrors the
synchronous pipeline, where all stages capture on the same clock edge and each
reads its predecessor's *old* value. Because the downstream stage fires first,
it has already captured its input before the upstream register changes.

Consequences for a user of the block:

* **Inputs are sampled in a firing window.** `istart`, `in0` and `stall_n` of a
  step are sampled in the window that ends 999 ps after that step's toggle.
  `stall_n` is sampled by all three stages. Change these inputs between windows;
  half a step after the toggle is safe.
* **Latency.** A token entered with toggle *m* appears on `out0` 2997 ps after
  that toggle.
* **Stall and bubble.**
  * With `stall_n = 0`, no register or valid bit changes in that step.
  * With `istart = 0`, a bubble (cleared valid bit) enters the pipeline, and
    the downstream registers keep their values when the bubble reaches them.
* **D-latch variant.** The latches are open for the 1 ps pulse. At a 1000 ps
  step, the stages of consecutive steps fire about one pulse width apart, so a
  downstream latch can still be open when its upstream source changes. Every
  value passed from one stage to the next (`add0`'s and `mul0`'s results, and
  the valid bits) therefore goes through a 2 ps hold delay `hd_reg` first,
  which is the method's remedy for hold violations. With it, the latch variant
  runs at the full 1000 ps rate.

## Optimisations

All are parameters and default to off (the plain conversion).

* **Modularised data-path units.** The adder, multiplier and multiplexer are
  separate modules (`bd_add`, `bd_mul`, `bd_mux2`). They can therefore be
  constrained and synthesised per unit.
* **Appropriate DFFs (`GATED_WRITE`).** The register enable moves out of the
  register into the write clock, so `wclk = lclk AND enable`. This gives plain
  DFFs without enable, in the spirit of clock gating. It applies to the
  pipeline, whose enables come from the valid bits and the stall. The FSM
  circuit needs no enables at all, because each register is clocked only by
  the states that write it.
* **Operand isolation (`OP_ISOLATION`).** D latches (`bd_iso_latch`) sit
  between `reg1`/`reg2` and the multiplexer that feeds the multiplier. They are
  open only while state 2 or 3 is active (`lst2 | lst3`). When state 0 reloads
  `reg1` and `reg2`, the multiplier's inputs do not move, which saves its
  switching power.
  * The placement follows the method's latch-insertion rule: a latch may go on
    a path only if the path's delay plus the latch delay stays below the
    state's critical-path delay plus a margin (10% here).
  * With the method's example unit delays (register 150, multiplexer 100,
    multiplier 1100, latch 120 ps), the state-2/3 path with a latch is
    1470 ps. That is below 1350 ps + 10% = 1485 ps, so latches go on both
    multiplexer inputs.
  * Only the FSM circuit gets isolation latches. In a pipeline that accepts a
    token every step, every stage is busy in every step. Its operands change
    anyway, so latches there would only add delay.
* **D latches instead of DFFs (`USE_DLATCH`).** Every data and valid register
  becomes a latch, transparent during its local clock pulse (`bd_reg` with
  `LATCH = 1`). This is smaller and uses less power, but hold time becomes
  critical.
  * In the FSM, the multiplexer control would fall while the `reg4` latch is
    still open, so a hold delay `hd_mux` of 2 ps (`HD_DELAY`) is placed on it.
  * For the pipeline, see the D-latch variant above.

## Reset and start-up

`rst` is asynchronous and active high. It clears:

* every toggle DFF, branch flip-flop and C-element;
* every register and latch.

Hold `rst` for longer than SD + PD (about 1 ns). During that time, whatever the
delay lines held at power-up flushes out. Otherwise a phantom request can
emerge after reset.

After reset, every request and answer signal is 0. The first `start` is
expected as a rising edge.

## Modelling notes

`bd_delay` is a behavioural delay (`assign #DELAY`, inertial). It stands for:

* `sd` (two inverters per stage in the original flow);
* `pd`;
* the hold delay.

Synthesis reads it as a wire. A real implementation would build these delays
from library cells and hold them against the data-path's worst-case delay.

The C-element and the optional isolation and register latches are written as
`always_latch` blocks, so synthesis reports them as latches. They are intended:
they are the storage elements of the asynchronous circuit.

## Verification

Each block has a self-checking testbench in `tb/`. The end-to-end tests compare
against the behaviour of the synchronous originals:

* **`tb_bd_sample_np`** runs all four optimisation settings of the FSM in
  parallel.
  * It checks results, the 2997 ps latency, and one `done` per `start`.
  * It checks a `start` held by the C-element (the held run ends at 6 × 999 ps).
  * It checks that the isolation latches keep the previous operand while
    `reg1` is reloaded.
* **`tb_bd_sample_pl`** streams random tokens, bubbles and stalls through
  three copies of the pipeline (plain, gated write, latch) against a cycle
  model. It also checks the first-token latency.
* **`tb_bd_top`** drives a plain and a fully optimised copy of the top. It
  counts each mechanism and fails if one never happened: both branch outcomes,
  the handshake, a held request, isolation, latches, tokens, bubbles, stalls,
  suppressed gated clocks and pipeline latency.
* **`tb_bd_top_full`** runs the top at its default parameters.

## Departures from the method, and how far to trust the design

Choices made here that the method does not spell out:

* **The external interface of the FSM circuit.** `start` and `done` are
  two-phase signals, with one transition per run.
* **The C-element feedback is inverted.** This lets the first `start` after
  reset pass.
* **The pipeline's stall input is named `stall_n`.** It keeps the original
  sense: 1 lets the registers write.
* **Stage 1 of the pipeline adds 10.** The original example's circuit diagram
  shows an adder here. One textual version of it names a subtractor, while
  also feeding the adder's output to the register.
* **Sizes chosen here:** the 1 ps pulse width, and the 2 ps hold delays in
  both latch variants.

What the tests show, and what they do not:

* The testbenches show that the circuits compute what the synchronous
  originals compute, step for step. They also show that the latencies are the
  matched delays.
* The data-path in simulation has zero delay, so the setup side of each
  bundled-data constraint is met trivially. Whether 999 ps covers a real
  adder or multiplier depends on the synthesised data-path and is not checked
  here.
* Hazards on the glue gates (the OR of local clocks, the AND gating) are not
  modelled either. In a real implementation they must be kept glitch-free,
  for example by the method's own use of fixed library cells.

## Simulating

The testbenches need no files besides `rtl/` and `tb/`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bd_pkg.sv tb/tb_bd_top.sv --top tb_bd_top
./obj_dir/Vtb_bd_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Timing
control (`--timing`) is required, because the delay elements are real
simulation delays. All timescales are 1 ps.

## Not built

* **The benchmark circuits** used to evaluate the method: DIFFEQ, EWF, IDCT,
  MLP, AES and LeNet. Their synchronous sources are not part of this design. A
  converted version would be assembled from the same control module and glue
  rules, with one control module per state or stage (from 4 to 41).
* **The standard-cell primitives.** The original flow instantiates library
  cells (XOR, DFF, inverters) for a hazard-free control circuit. Here the
  control module is plain RTL.
* **The conversion tool.** It turns a synchronous model into these circuits
  automatically. The circuits here show its output for the two examples.

## Files

| Path | Contents |
|---|---|
| `rtl/bd_pkg.sv` | shared constants (`DATA_W`, `CT_PS`, `PD_PS`, `SD_PS`) and the `w0` mode type |
| `rtl/bd_ctrl.sv` | the control module |
| `rtl/bd_celement.sv`, `rtl/bd_branch.sv`, `rtl/bd_delay.sv` | parts of the control module |
| `rtl/bd_reg.sv`, `rtl/bd_iso_latch.sv`, `rtl/bd_add.sv`, `rtl/bd_mul.sv`, `rtl/bd_mux2.sv` | data-path |
| `rtl/bd_sample_np.sv`, `rtl/bd_sample_pl.sv`, `rtl/bd_top.sv` | the example circuits and the top |
| `tb/tb_<module>.sv` | testbenches |
