# Runtime MTL monitors built from TrueNorth spiking neurons

A runtime monitor watches a system's digital signals and says, step by step,
whether a temporal specification still holds. This design builds such
monitors out of nothing but configured copies of one circuit: the
deterministic TrueNorth neuron (IBM's integrate-leak-fire model). Each
logical or temporal operator of past-time Metric Temporal Logic (MTL) is a
small, fixed circuit of neurons with particular weights, leaks, thresholds
and reset modes. A formula is monitored by wiring those circuits together
along its parse tree. A monitor's output neuron spikes on every step where
the specification holds; a missing spike marks a violation.

The worked example is a 46-neuron monitor for a missile-launch safety
property, with a signal generator that can inject faults, as on the FPGA
demonstrator of the original work ("Monitoring of MTL Specifications With
IBM's Spiking-Neuron Model"). Next to it sits a bank holding every other
temporal tester, so the whole operator library is part of the design.

All RTL is SystemVerilog-2017 and synthesizable. Every module has a
self-checking testbench.

## The neuron (`tn_neuron`)

A neuron holds a signed membrane potential V (20 bits). Each time step:

1. **Integrate.** Each of up to 255 input axons has a type G in 0..3 and a
   connection bit. An active, connected axon adds the neuron's weight for its
   type, `s[G]`.
2. **Leak.** V changes by the leak `lambda`. In leak-reversal mode
   (`epsilon` = 1) it changes by `sgn(V) * lambda` instead. A positive lambda
   then pushes V away from zero and a negative one pulls it towards zero. V
   does not leak when it is exactly 0.
3. **Threshold and reset.**
   - **V >= alpha:** the neuron spikes. Reset mode `gamma` picks what happens
     to V:
     - 0: V = R;
     - 1: V = V - alpha;
     - 2: V is kept.
   - **V < beta:** no spike, and a negative reset. With `kappa` = 1, V
     saturates at beta. Otherwise gamma picks:
     - 0: V = -R;
     - 1: V = V - beta;
     - 2: V is kept.

`beta` is a signed threshold, so a configuration writes it as a negative
number. Sums are formed 36 bits wide, and V saturates at the limits of its
20-bit range. Weights and leak are 9-bit signed values. alpha, beta and R
are 18-bit signed values. All of these widths follow the published TrueNorth
neuron; the source does not fix them. The stochastic synapse, leak and
threshold modes of the full TrueNorth model are not implemented. The
hardware here is the deterministic model, and no monitor needs those modes.

The configuration (`tn_cfg_t` in `tn_pkg`) and the per-axon connection and
type bits are ports. The operator circuits tie them to constants, which
synthesis folds away. A run-time loader could drive them instead.

## Time steps and evaluation order

This is the part that most needs care. In a software model, a neural circuit
is evaluated neuron by neuron within each time step, in a chosen order. A
neuron evaluated after its parent sees the parent's spike of the *same*
step. A neuron evaluated before its parent sees the parent's spike of the
*previous* step. The hardware reproduces that:

- `spike` is combinational. It is the step's output, computed from the
  stored potential V(t-1) and the axon inputs of step t. Neurons chained
  through `spike` settle within one clock cycle, like an in-order
  evaluation.
- `spike_q` is the spike of the previous step, registered. Wiring a child to
  `spike_q` gives the "evaluated before its parent" behaviour.
- On a clock edge with `tick` = 1, every neuron stores its new V and its
  spike. Without `tick`, nothing changes, so a slow time base needs only a
  strobe. `rst_n` (asynchronous, active low) clears V and the stored spikes
  to 0.

The only registers on a signal path are the stored spikes inside the
Previous operator. Everything else in a monitor is one combinational step
function. Each step's verdict is therefore available in the same cycle as
its inputs.

## Operator library

| Module | Operator | Neurons | Construction |
|---|---|---|---|
| `tn_logic` | AND, OR, NOT, NOR, NAND, a -> b | 1 | memoryless neuron: weights ±9 (NOT: -4), per-operator leak, alpha 1, beta -1, reset to R = 0 |
| `tn_prev` | previous: y(t) = phi(t-1) | 2 | identity neuron n1; identity neuron n2 reads n1's `spike_q` |
| `tn_once` | once: phi at some step so far | 1 | weight 7, alpha 4, reset to R = 5, which exceeds alpha, so the neuron keeps firing |
| `tn_punctual_once` | P{A}: y(t) = phi(t-A) | 2A | chain of A Previous operators |
| `tn_rise` | phi and previous not phi | 4 | NOT, Previous, AND |
| `tn_bounded_once` | O[0,A]: phi within the last A steps | 6 | falling-edge detector (NOT, Previous, AND), counting core neuron, OR with phi |
| `tn_historically` | H: phi at every step so far | 1 | inputs phi (weight 0) and not phi (-18), leak 4, alpha 4, beta -4, R 9 |
| `tn_bounded_hist` | H[0,A]: phi over [t-A, t] | 1 | counts consecutive phi (non-reset mode); not phi (weight -256) saturates the count to 0 |
| `tn_hist_interval` | H[A,B] = P{A} H[0,B-A] | 1+2A | bounded historically, then a delay chain |
| `tn_since` | phi1 S phi2 | 4 | y(t) = phi2 OR (phi1 AND y(t-1)): AND, OR, Previous |
| `tn_bounded_since` | phi1 S[0,B] phi2 | 11 | (phi1 S phi2) AND O[0,B] phi2 |

Every module exports its neuron count as the local parameter `NEURONS`.

The two counting neurons do the real temporal work:

- **Bounded-once core.** The falling edge of phi loads V with A+1. A leak of
  -1 counts V down, and the neuron spikes while V >= 1, which covers the A
  steps after phi's last occurrence. phi itself enters through the most
  negative weight, so V saturates at beta = 0 and any count in progress is
  cleared. An OR neuron adds the steps on which phi itself holds.
- **Bounded-historically neuron.** V counts consecutive steps on which phi
  holds. Once the count reaches A+1, which is the length of the window
  [t-A, t], the neuron spikes. It keeps spiking while phi holds, because
  mode 2 does not reset V. A step without phi saturates V back to 0.

Edge conventions: Previous and rise are false at the first step after reset.
A bounded Historically is false until its whole window lies inside the
recorded history. A bounded Once uses whatever history exists.

## The missile-launch monitor (`missile_monitor`)

Three signals: `l` (launch enable), `f` (fire enable) and `d` (detonation).
The property: *after `l` rises, `f` must rise within four steps, and no
detonation may occur on the fire-edge step or on any of the five steps
after it.* As a future-time formula:

    rise(l) -> O+[0,4]( rise(f) AND H+[0,5] NOT d )

A monitor can only judge steps that are already complete. The formula is
therefore evaluated in past form, shifted back by its temporal depth of
4 + 5 = 9 steps:

    P{9} rise(l) -> O[0,4]( P{5} rise(f) AND H[0,5] NOT d )

The verdict `ok` of step t judges a launch edge at step t-9. When no launch
edge is 9 steps back, the implication holds trivially. The circuit has 46
neurons:

- rise(l): 4
- P{9}: 18
- rise(f): 4
- P{5}: 10
- NOT d: 1
- H[0,5]: 1 (its inverse input is `d` itself)
- AND: 1
- O[0,4]: 6
- implication: 1

`launch_seen` and `fire_ok`, the two sides of the implication, are brought
out for observation.

The testbenches check this past-form circuit against the future-time
property, evaluated directly on the recorded signals. That check confirms
the shift by 9.

## Demonstrator and top level

`missile_stimulus` plays a periodic launch sequence, one sample per time
step. Every period of 24 steps, `l` rises at step 2 and stays high for 10
steps. `f` rises 3 steps after `l` and stays high for 3 steps. `d` pulses 8
steps after the `f` edge. The 2-bit `scenario` input, sampled at each period
start, injects a fault:

| `scenario` | Sequence | Result |
|---|---|---|
| 0 | nominal | property holds |
| 1 | `f` never rises | violation |
| 2 | `f` rises 6 steps after `l` (late) | violation |
| 3 | `d` 2 steps after the `f` edge (early) | violation |

All of these timings are this design's choice.

`missile_demo` connects the generator to the monitor. With `use_ext` = 1 it
monitors `ext_l`, `ext_f` and `ext_d` instead. On each tick it registers the
step's verdict in `ok_q` (with `ok_valid`) and counts violated steps in a
saturating 16-bit `violations` counter.

`tn_monitor_top` is the top level. It holds `missile_demo` and
`tn_operator_bank` side by side, sharing clock, reset and `tick`. The bank
feeds two general inputs, `p` and `q`, to one instance of every temporal
tester, plus a NOT neuron that supplies the inverse of `p` to the
Historically testers (58 neurons). Its outputs are the packed struct
`bank_out_t`.

## Where this design departs from the published tables

The construction follows the original work. Its operator tables, taken
literally, disagree in places with its own text or with the operators'
semantics. This design resolves them as follows:

- **Bounded-once edge weight.** The table gives the edge weight as A. With
  leak -1 and alpha 1, that yields only A-1 spikes after the last phi. The
  text requires A spikes, so the weight here is A+1.
- **Bounded-historically threshold.** The table gives alpha = A. The window
  [t-A, t] holds A+1 steps, so alpha here is A+1.
- **Implication leak.** The table gives leak -5 with weights (9, -9). That
  computes "in0 AND NOT in1", which is the negation of an implication. This
  design uses leak 4, which gives in1 -> in0. The module's antecedent `a`
  drives the -9 axon.
- **Logic-neuron thresholds.** The logic-operator table gives beta = -1
  (for NOT), and this design uses it for every logic neuron. The table
  leaves the positive threshold open; alpha = 1 is used. Every operator's truth table
  then holds, and V returns to 0 after every step.
- **Sign of beta.** The model equations write the negative threshold as a
  magnitude (V < -beta). The operator tables and constraint systems use it
  as a signed value (V < beta), and the Once tester works only that way. The
  signed reading is used throughout.
- **Fan-in.** The text allows up to 255 inputs per neuron; the integration
  sum runs over 256. 255 is the default of `N_AXONS`.

With the literal table values for the two counting neurons, their
testbenches fail.

## Size

After generic synthesis (Yosys, before technology mapping):

| Module | Flip-flop bits |
|---|---|
| `missile_monitor` (46 neurons) | 937 |
| whole top | 2062 |

Each neuron stores 20 bits of potential and 1 stored spike. The published
FPGA build of the same monitor used 1129 flip-flops and 4606 LUTs on a Zynq
XC7Z020. The potential width is the main lever. The counting neurons saturate
rather than wrap, so a narrower potential still works, provided it holds
R, -R, the -256 weight and the thresholds A+1 of the configurations used. It is one constant in `tn_pkg`.

## Verification

Each module has a testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`, and a watchdog ends any run that hangs.

- **`tb_tn_neuron`** (255 axons). Random configurations cover every reset
  mode, saturation and leak reversal. Random axon activity, types and
  connectivity drive the neuron. Every spike and every next potential is
  compared with an integer reference model, and the test requires each
  mechanism to occur.
- **Operator testbenches.** Random bursty input streams and cycles without
  tick drive the operator, with a reset every 150 steps. The output is
  compared with the operator's definition, evaluated directly on the
  recorded history, and the neuron count is checked.
- **`tb_missile_monitor` and `tb_missile_demo`.** Random launch episodes,
  plus the generator's four scenarios for the demo, are checked against the
  future-time property. The tests require satisfied launches and violations
  from a missing fire edge, a late fire edge and an early detonation.
- **`tb_tn_monitor_top`.** End to end at default parameters: the
  demonstrator and the operator bank are checked together.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/tn_pkg.sv tb/tb_tn_monitor_top.sv --top-module tb_tn_monitor_top
    ./obj_dir/Vtb_tn_monitor_top

Replace the testbench name to run another one. Every run takes well under a
second.

## Changing the design

- **New formula.** Put it in past form: shift a bounded-future formula back
  by its temporal depth, and rewrite H[a,b] as P{a} H[0,b-a]. Then
  instantiate one tester per node of the parse tree. A Historically tester
  needs the inverse of its operand, from a `tn_logic` NOT neuron or from an
  already available complement.
- **Intervals.** These are module parameters (`A`, `B`).
- **Neuron widths.** These are in `tn_pkg` (`W_S`, `W_L`, `W_TH`, `W_V`).
  Keep them wide enough for the most negative weight (-2^(W_S-1)) and for
  the thresholds A+1.
- **New operator neurons.** New configurations go in `tn_pkg` next to the
  existing `cfg_*` functions.
