# IRRM-MC: an input-queued ATM switch with service-class priority

An input-queued switch avoids the internal speed-up an output-queued switch
needs, but it must decide in every cell time (a *time slot*) which inputs may
send to which outputs: each input and each output carries at most one cell per
slot. This design makes that decision with **iterative round-robin matching with
multiple classes (IRRM-MC)**. It is iSLIP-style request/grant/accept matching in
which every iteration belongs to one ATM service class:

* every input keeps one random-access cell RAM per service class (CBR, rtVBR,
  nrtVBR, ABR, UBR);
* every class has its own **control plane**, which holds the routing headers of
  that class's cells and its own round-robin pointers;
* in each slot the planes run one iteration each, in priority order. The CBR
  plane matches first. Every later plane works only on the inputs and outputs
  that the planes before it left unmatched. CBR traffic therefore always gets
  first claim on the fabric and UBR traffic gets what is left.

With a single class the scheme reduces to single-iteration iSLIP (the RTL needs at least two classes). The price of the
priority is five planes instead of one. The reward is that the delay of the
time-critical classes stays small even when the total load is high.

## Structure

```
            +----------------- irrm_mc_switch ---------------------------------+
 in_cell -->| input_port x N                                                   |
            |   vc_discriminator --> class_cell_buffer x 5 (one RAM per class) |
            |          | header (class, output, RAM address)     ^ read        |
            |          v                                          |            |
            |   control_plane x 5 (plane c = class c)             |            |
            |     cell_header_queue x N  (one per input)          |            |
            |     input_control  x N     (request, accept, ptr A) |            |
            |     output_control x N     (grant, ptr C)           |            |
            |          ^  unmatched masks / matches               |            |
            |   iteration_controller (slot sequencer) ------------+            |
            |   switch_fabric (N x N crossbar) ------------------------------> | out_cell
            +------------------------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/atm_pkg.sv` | Cell width and header field positions, class encoding |
| `rtl/irrm_mc_switch.sv` | Top level |
| `rtl/input_port.sv` | One input line: discriminator and the five class RAMs |
| `rtl/vc_discriminator.sv` | VPI-indexed connection table giving class and output port |
| `rtl/class_cell_buffer.sv` | Random-access cell RAM with free-list allocation |
| `rtl/control_plane.sv` | One class plane: N header queues, N input and N output controls |
| `rtl/cell_header_queue.sv` | Headers of one class at one input, and the request vector |
| `rtl/input_control.sv` | Request and accept phases, accept pointer A |
| `rtl/output_control.sv` | Grant phase, grant pointer C |
| `rtl/rr_arbiter.sv` | Round-robin "nearest to the pointer" selector |
| `rtl/iteration_controller.sv` | Slot sequencing, unmatched masks, early stop, transfer |
| `rtl/switch_fabric.sv` | Nonblocking crossbar with registered outputs |

## One matching iteration

Each plane performs the three phases in a single clock cycle. They are
combinational from the registered queue state to the registered pointers.

1. **Request.** An unmatched input requests every *unmatched* output for which
   its header queue in this plane holds a cell. A request is one bit per output.
2. **Grant.** An unmatched output that receives requests grants the one nearest
   to its pointer C, going round the circle upward from C. The pointer position
   itself has the highest priority.
3. **Accept.** An input that receives grants accepts the one nearest to its
   pointer A. A then moves to one position beyond the accepted output. C moves to
   one position beyond the granted input **only if** that grant was accepted.

The accept-conditional update of C is what keeps round-robin pointers from
synchronising. Each plane has its own A and C pointers, so the fairness of one
class does not depend on the traffic of another.

The accepting input takes from its header queue the **oldest** header for the
accepted output. Cells of one class for the same output leave in arrival order.
Cells for different outputs may overtake one another; that is the point of a
random-access buffer.

## The time slot

A slot lasts `NUM_CLASSES + 3` clock cycles (8 by default). `slot_start` marks
phase 0.

| Phase | What happens |
|---|---|
| 0 | Each input may present one cell. It is classified, written to its class RAM at a free address, and its header (output, address) is appended to the header queue of its input in the plane of its class. The unmatched masks are set to all ones. Cells scheduled in the previous slot appear on `out_valid`/`out_cell`. |
| 1 .. 5 | Plane 0 (CBR) .. plane 4 (UBR) run their iteration. Matches clear bits of the unmatched masks and are recorded per input as (output, class, address). Once every input and output is matched, no further plane is enabled. |
| 6 | Every matched input reads its cell from the RAM of the matched class. |
| 7 | The cells cross the crossbar and are registered at the outputs. |

A cell can be scheduled in the slot it arrives in. It leaves exactly one slot
after the slot in which it was scheduled. The slot length is fixed even when the
iterations stop early, so input and output slots stay aligned.

Status outputs:

* `iters_used` reports how many planes ran in the last finished slot.
* `interrupted` reports whether the iterations stopped early in that slot.
* `contention[c]` is set when an output receives several requests in plane c's
  iteration.
* `multi_grant[c]` is set when an input receives several grants in that
  iteration.

## Cell format and connection tables

Cells are carried whole: 424 bits, the 53-byte ATM cell. The 5-byte UNI header
sits in the top 40 bits (GFC 4, VPI 8, VCI 16, PT 3, CLP 1, HEC 8). Cells pass
through unchanged; there is no header translation at the output.

Each input has a 256-entry connection table indexed by the VPI. It is written
through `cfg_we`, `cfg_port` (which input), `cfg_vpi`, `cfg_valid`, `cfg_cls`
and `cfg_dest`. An entry gives the service class (0 = CBR ... 4 = UBR) and the
output port. Reset clears every table.

A cell is discarded, and flagged for its arrival cycle, in two cases:

* its VPI is not provisioned (`drop_unknown`);
* the RAM of its class at that input is full (`drop_full`).

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 16 | Ports (N x N switch) |
| `NUM_CLASSES` | 5 | Service classes = planes = RAMs per input (at least 2) |
| `DEPTH` | 64 | Cells per class RAM per input; also the header-queue depth |

`CELL_W` (424) and `VPI_W` (8) are constants in `atm_pkg`. N need not be a power
of two. The connection tables must then never name an output at or above N.

## How far it follows the underlying scheme, and where it departs

These parts follow the IRRM-MC scheme directly:

* one RAM per class per input;
* one plane per class, with per-input header queues, input controls and output
  controls;
* the three phases and both pointer rules;
* strict priority order of the planes;
* passing only the unmatched ports on to the next plane;
* stopping once all ports are matched.

These are choices of this implementation:

* **Slot timing.** One cycle per iteration, then a read cycle and a transfer
  cycle.
* **Same-slot service.** A cell may be served in its arrival slot.
* **Classification.** Cells are classified by VPI only, with the output port
  stored in the same table entry.
* **Buffering.** The RAM depth, lowest-free-address allocation, synchronous
  read, and dropping cells on overflow.
* **Header queues.** Compacting shift queues; entries for the same output leave
  in arrival order.
* **Fabric.** An AND-OR crossbar with registered outputs.
* **Status outputs.** `iters_used`, `interrupted`, `contention` and
  `multi_grant`.

Two rules could reasonably have gone the other way:

* **Pointer C.** The grant pointer could move either to the granted input or to
  one past it. The RTL moves it one past, which is the iSLIP rule and keeps a
  just-served input from being favoured again.
* **Arrival slot.** A stricter switch would make every cell wait at least one
  slot before it can be scheduled. Here a cell can be scheduled in its arrival
  slot, so an uncontended cell waits zero slots. The priority-queue estimate
  below counts delay the same way.

Not built:

* the iSLIP and PIM baselines (one queue per input, several iterations on one
  plane, or random selection);
* the analytical delay model itself, which is mathematics rather than hardware.

## Measured behaviour

All runs below use the default configuration (16 x 16, 64-cell RAMs) with the
class mix CBR 40 %, rtVBR 20 %, nrtVBR 20 %, ABR 10 %, UBR 10 % at 80 % load.
Delays are mean queueing delays in slots.

| Traffic | CBR | rtVBR | nrtVBR | ABR | UBR |
|---|---|---|---|---|---|
| Bernoulli, uniform outputs | 0.35 | 1.52 | 4.13 | 8.68 | 17.81 |
| Priority-queue estimate, `1/((1-p*s(h-1))(1-p*s(h))) - 1` | 0.47 | 1.83 | 4.34 | 8.92 | 16.86 |
| On-off, mean burst 10 cells | 6.27 | 32.8 | 86.8 | 167 | 334 |

A Bernoulli sweep at other loads (2000 slots each) gives:

| Load | CBR | rtVBR | nrtVBR | ABR | UBR |
|---|---|---|---|---|---|
| 40 %, measured / estimate | 0.12 / 0.19 | 0.38 / 0.57 | 0.63 / 0.93 | 0.90 / 1.30 | 1.20 / 1.60 |
| 70 %, measured / estimate | 0.25 / 0.39 | 1.00 / 1.39 | 2.55 / 2.92 | 4.40 / 5.14 | 7.31 / 8.01 |
| 95 %, measured / estimate | 0.52 / 0.61 | 2.38 / 2.75 | 9.89 / 8.69 | 31.3 / 27.7 | 162 / 137 |

In the estimate, p is the load and s(h) is the cumulative share of classes 1..h.

* Under Bernoulli traffic no cell was lost, even at 95 % load.
* Under bursty traffic the delays of all classes grow several-fold, and 0.7 % of
  the cells were dropped by full UBR/ABR RAMs. Deeper RAMs (`DEPTH`) remove the
  drops.
* Under both kinds of traffic the CBR delay stays small.

## Verification

Every module in `rtl/` except the package and `rr_arbiter` has a self-checking
testbench in `tb/`. The arbiter is covered through the input and output control
tests. Each testbench compares the block with an independent model and ends with
a line `TB_RESULT checks=<n> failures=<n>`.

| Testbench | Covers |
|---|---|
| `tb_vc_discriminator` | table writes, withdrawals, lookups |
| `tb_class_cell_buffer` | allocation order, read data and latency, freeing, full |
| `tb_cell_header_queue` | request vector, oldest-per-output removal, push and pop together, full |
| `tb_input_control`, `tb_output_control` | phases, round-robin choice, pointer rules, wrap-around, refused grants |
| `tb_control_plane` | a complete plane against a model with queues and pointers |
| `tb_iteration_controller` | slot phases, masks, early stop, read and transfer records, statistics |
| `tb_switch_fabric` | random permutations, one-cycle latency |
| `tb_input_port` | classification, drops (unknown path, full RAM), read-back |
| `tb_irrm_mc_switch` | whole switch at 4 x 4, DEPTH 4, against the reference model in `switch_harness` |
| `tb_irrm_mc_switch_full` | the same at the default parameters |
| `tb_workload_bernoulli`, `tb_workload_onoff`, `tb_workload_bernoulli_sweep` | the traffic runs in the tables above |

`tb/switch_harness.sv` is the reference model used by the whole-switch tests.
It keeps per-input, per-class queues and every plane's pointers. For each slot it
predicts:

* the delivered cells, one slot later;
* the drops;
* the number of planes run and whether the iterations stopped early;
* the per-plane contention and multiple-grant flags.

In the mechanism test (`SCEN = 0`) it also requires each mechanism to occur at
least once:

* early stop;
* output contention;
* several grants at one input;
* a match in a lower plane;
* a cell held back by a higher class;
* RAM overflow;
* an unknown path.

Running a test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_irrm_mc_switch \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/atm_pkg.sv tb/tb_irrm_mc_switch.sv
./obj_dir/Vtb_irrm_mc_switch
```

The default-size tests take about a minute each, most of it compilation.

Assertions in the RTL check protocol invariants during simulation:

* an input accepts only an output that granted it;
* a port is matched at most once per slot;
* no output is selected twice in the crossbar.

## Changing the design

* **Fewer or more classes.** Set `NUM_CLASSES`; the planes run in index order,
  index 0 highest.
* **Deeper buffers.** Set `DEPTH`. The RAM and header queue grow together.
  Request and pop logic are linear in `DEPTH`.
* **Different classification** (VCI, or VPI and VCI together). Change
  `vc_discriminator`; the rest only sees class and output port.
