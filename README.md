# Kernel-based power management for sequential components

Most controllers spend nearly all of their time in a handful of states and
rarely visit the rest, which exist for corner cases. This design exploits that.
Next to the full combinational logic **CL** of a sequential component it places
a **computational kernel K**. K is a much smaller block that produces the same
outputs and next state as CL, but only while the present state is one of the
frequent states: the *kernel state set* S_p. In every cycle exactly one of CL
and K does the work. The inputs of the block that is not working are held
constant, so its logic does not switch and draws almost no dynamic power.
Seen from outside, the result behaves cycle for cycle exactly like the original
component.

The RTL here is the architecture that wraps CL and K: the selector, the
dual-state flip-flops, the selection register and the multiplexers. CL and K
belong to the particular component being optimised, so they connect through
ports. Deriving K and S_p from a component is an offline synthesis step and is
not part of this RTL.

## How one cycle works

```
            +-------+   cl_x, cl_s  +----+  cl_z (p), cl_t (u)    +-----+
 x -------->|       |-------------->| CL |----------------------->| MUX |--> z
            | DSFFs |               +----+                        | 0/1 |
   +------->|       |   k_x, k_s    +----+  k_z (r), k_t (v)      |     |--> t --+
   |        |       |-------------->| K  |----------------------->|     |        |
   |        +-------+               +----+                        +-----+        |
   |           ^ sel                                                 ^           |
   |           |                   +----+        kernel_active       |           |
   |           +-------------------|Sel |<-----+---[FF]--------------+           |
   |                               +----+      |                                 |
   +-------------------------------------------+---------------------------------+
                      t (forced to RESET_STATE during reset)
```

* **Sel** (`kernel_sel`) looks only at the next state `t` and answers one
  question: can K handle the next cycle, that is, is `t` in S_p? The primary
  inputs are left out on purpose, which keeps Sel small. Sel sits in series
  with the next-state path, so its delay adds to the critical path.
* The **state register and the input register are dual-state flip-flops**.
  Each DSFF holds two copies. Copy 1 feeds CL and copy 2 feeds K. At a clock
  edge with `sel = 1` copy 2 loads and copy 1 holds. With `sel = 0` it is the
  other way round.
* Sel is also stored in a plain flip-flop. Its output, `kernel_active`, steers
  the output MUX and the next-state MUX for the whole following cycle
  (input 0 = CL, input 1 = K).

The key property is this: **the copy a cycle reads is always the copy that was
loaded at the edge that started that cycle.** The frozen copy is never read
until it has been loaded again. This has three consequences:

* The DSFF copies need no reset of their own.
* K only has to be correct for present states in S_p, for every input value.
  Its results for other states are never selected.
* A next state outside S_p is simply computed by K and then handed to CL.
  Such a state is one step from the kernel set. It is why K must be correct
  for all of its own transitions, including the ones that leave S_p.

Both the CL copy and the K copy keep the one-cycle input register of the
original component. The outputs `z` therefore have the same timing as the plain
component: `z` in cycle n+1 is a function of the state and the input `x`
sampled at edge n. The architecture adds no latency.

## The three DSFF realisations

Parameter `DSFF_STYLE` (type `kernel_pm_pkg::dsff_style_e`) selects how the
DSFFs are built. All three behave the same at the clock edge.

| `DSFF_STYLE` | module | how the idle copy holds | clock load |
|---|---|---|---|
| `DSFF_MUX` (default) | `dsff_mux` | a recirculating multiplexer in front of each flip-flop | two flip-flops per bit |
| `DSFF_GATED` | `dsff_gated` + `clk_gate` | the copies form two clusters ("kernel" and "original"); each cluster has a latch-based clock gate; Sel enables one gate and its complement the other | two clock gates |
| `DSFF_CELL` | `dsff_cell` (behavioural) | a sense-amplifier DSFF cell with one shared sampling stage and two slaves; the latched selection chooses which slave is written | one flip-flop |

* `DSFF_MUX` is the plain functional form and is fully synchronous.
* `DSFF_GATED` needs no multiplexers. Only one cluster gets a clock pulse in
  any cycle, which removes almost all of the extra clock power. The price is
  two gated clock nets to route, and their skew must be controlled.
  `clk_gate` uses the usual glitch-free form: a latch that is transparent
  while the clock is low, followed by an AND with the clock. Sel must settle
  before the rising edge. It does so here because it is computed from the
  state registers in the cycle before.
* `DSFF_CELL` instantiates `dsff_cell` once per bit. `dsff_cell` is a **logic
  model of a transistor-level cell**, not synthesizable RTL. It has the
  cell's differential pins (`D/DN`, `S/SN`, `Q1/Q1N`, `Q2/Q2N`) and an optional
  clock-to-output delay `TCQ`. Use this style for simulation, or replace
  `dsff_cell` with a real library cell that has the same pins.

## The kernel state set

`kernel_sel` describes S_p as a sum of cubes. State `t` is a kernel state
when, for at least one cube `i`,
`(t ^ CUBE_VAL[i]) & CUBE_MASK[i] == 0`. Bits where the mask is 0 are free.
Examples:

* the default (one cube, mask `14'h3FFC`) is the set {0, 1, 2, 3};
* a cube with a full mask is a single state;
* a cube `VAL = 14'h2000, MASK = 14'h3000` covers 0x2000 to 0x2FFF.

You may use a Sel whose set is smaller than the states K really handles. The
result stays correct and only loses some power saving. That is a useful trade
when a small, fast Sel matters more.

## Connecting a component

`kernel_pm_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `x` | in | `IN_W` | primary inputs |
| `z` | out | `OUT_W` | primary outputs |
| `kernel_active` | out | 1 | 1 in cycles where K computes |
| `cl_x`, `cl_s` | out | `IN_W`, `STATE_W` | registered inputs and present state to CL |
| `cl_z`, `cl_t` | in | `OUT_W`, `STATE_W` | CL's outputs and next state |
| `k_x`, `k_s` | out | `IN_W`, `STATE_W` | registered inputs and present state to K |
| `k_z`, `k_t` | in | `OUT_W`, `STATE_W` | K's outputs and next state |

Both CL and K must be purely combinational.

The contract for K: for every present state in the set described by
`CUBE_VAL`/`CUBE_MASK`, and for every input, `k_z` and `k_t` must equal
`cl_z` and `cl_t`. For other present states K may return anything.

`RESET_STATE` is the component's reset state. It does not have to be a
kernel state. While `rst` is high, the value loaded into the state DSFF (and
seen by Sel) is forced to `RESET_STATE`. The clock must therefore run during
reset.

Parameter defaults are the sizes of the small ISCAS'89 controller s298:
`IN_W = 3`, `OUT_W = 6`, `STATE_W = 14`. The default kernel set {0..3} is only
a placeholder. Set the four size and set parameters for your own component.

Two concurrent assertions in `kernel_pm_top` check the mutual exclusion on
every edge: `cl_x`/`cl_s` do not change while `kernel_active` is 1, and
`k_x`/`k_s` do not change while it is 0.

## Origin of each part, and this design's own choices

Taken from the architecture as published:

* the block structure;
* the DSFF load and hold rule (`sel = 1` loads the kernel copy);
* the registered selection that drives the MUXes;
* Sel as a function of the next state only;
* the MUX input numbering (0 = CL, 1 = K);
* the clustered gated-clock form, with a latch and an AND per cluster, and
  the two clusters enabled by the two phases of Sel;
* the pins and slave structure of the DSFF cell;
* the s298 sizes used as defaults.

Choices made here, where the source says nothing:

* synchronous active-high reset, applied through the data path;
* rising-edge clocking;
* no reset on the DSFF copies;
* the cube encoding of S_p and the default set {0..3};
* the polarity of the clock-gate latch;
* which slave of the cell `S = 1` writes (slave 2, to match the functional
  model);
* the cell model's behaviour for non-complementary inputs;
* packaging DSFFs as W-bit banks;
* keeping a separate Sel flip-flop in the gated-clock style.

Not covered:

* The published flow also re-optimises CL, using the kernel-active condition
  as a don't-care set. That would be done inside your CL.
* Generating K and Sel from a component is not covered. The published flow
  offers three ways: exact symbolic analysis, simulation-based state
  profiling, or iterative structural simplification of a netlist.
* Savings reported for this architecture: roughly 50% power on small
  benchmark controllers, and roughly 30% with the approximate kernel
  extraction methods. The cost is about 34 to 55% extra area and 6 to 19%
  extra delay. These numbers have not been reproduced here. This RTL has no
  CL or K netlist of those benchmarks.

## Files

`rtl/`:

* `kernel_pm_pkg.sv`: DSFF style enum and default sizes
* `kernel_pm_top.sv`: the architecture
* `kernel_sel.sv`: the selector
* `kernel_mux.sv`: the output and next-state MUX
* `dsff_mux.sv`, `dsff_gated.sv`, `clk_gate.sv`, `dsff_cell.sv`: the DSFFs

`tb/`:

* `tb_dsff_mux`, `tb_dsff_gated`, `tb_dsff_cell`: random load and hold
  against a reference model; both copies are checked, and the complementary
  outputs of the cell.
* `tb_clk_gate`: exactly one pulse per enabled cycle; no glitch when the
  enable changes in the high phase.
* `tb_kernel_sel`: exhaustive over all 2^14 states, for the default set and a
  three-cube set.
* `tb_kernel_mux`: random.
* `tb_kernel_pm_top`: end to end, with all three DSFF styles side by side.
* `tb_kernel_pm_full`: `kernel_pm_top` at its default parameters, 20000
  cycles.
* Helpers:
  * `tb_example_fsm`: a small example component. Its loop through states
    0..3 is left on input 7. The other states walk back into the loop. K is
    simplified to read only the two low state bits, so it is wrong everywhere
    outside the kernel.
  * `tb_ref_component`: the same component built the plain way.
  * `tb_pm_monitor`: the per-cycle checker.

The end-to-end tests compare `z` with the plain component in every cycle.
They also check that `kernel_active` equals "the reference state is in
{0..3}", and that the idle block's inputs stayed frozen. Each test requires
every mechanism to occur at least once:

* kernel cycles and CL cycles;
* switches in both directions;
* frozen inputs on both sides;
* reset, including a second reset in mid-run.

They also count bit toggles at CL's inputs and at the plain component's
registers. This is a rough proxy for the switching that CL sees. The test
fails unless CL sees fewer toggles. With the example component, K is in use
in about 71% of cycles. CL's inputs then toggle about a third as often as
the plain component's registers: roughly 4,500 toggles against 13,900 in
5,000 cycles.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/kernel_pm_pkg.sv tb/tb_kernel_pm_top.sv --top-module tb_kernel_pm_top
./obj_dir/Vtb_kernel_pm_top
```

Replace the testbench name to run any other test. `--timing` is needed for
the delays in the testbenches and in the cell model. Lint the RTL with
`verilator --lint-only -Wall -y rtl rtl/kernel_pm_pkg.sv rtl/kernel_pm_top.sv`.
Lint reports unused package constants; those warnings are expected.
