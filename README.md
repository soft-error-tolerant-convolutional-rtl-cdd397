# Soft-error tolerant CNN classification with an ensemble of small networks

On an SRAM-based FPGA a radiation-induced upset in the configuration memory
changes the circuit itself. A CNN accelerator hit this way either produces
degraded results (a corrupted PE array) or fails outright: it hangs, or it
raises its "done" signal too early. Triplicating a strong network (TMR of a
ResNet 110) masks this but triples the cost.

This design replaces the one strong network by an **ensemble of weaker ones**:
ResNet 20, 32 and 44, each on its own small accelerator in the same FPGA. An
upset normally touches one accelerator only. A **robust combiner** adds up the
class scores of the networks, and it detects a failing network and drops it
from the vote:

* a network whose result arrives outside its normal time window has hung or
  terminated early;
* a network whose own decision disagrees with the ensemble more than four times
  in a row has a corrupted datapath.

The combiner is the single point that every decision passes through, so it is
itself duplicated. A compare & select stage resolves a disagreement between
the two copies.

The RTL covers the parts of the system that are defined down to their logic:

| module | role |
|---|---|
| `ensemble_top` | NUM_NETS accelerator PE arrays, instruction-port sharing and the duplicated combiner |
| `dwc_combiner` | two `combiner` copies and `compare_select` |
| `combiner` | score buffers, sum/arg-max machine, one `exception_timer` and one `mismatch_counter` per network |
| `exception_timer` | checks the time window of one network's output enable |
| `mismatch_counter` | counts consecutive disagreements of one network |
| `compare_select` | chooses between the two combiner copies |
| `conv_pe_array` | the CONV engine of one accelerator: P PEs |
| `pe` | N_OC output channels × N_IC multipliers, adder trees, accumulators |
| `dsp_dual_mult` | two int8 products from one 27×18 multiplier |
| `axi_rd_arbiter` | lets two accelerators fetch instructions through one AXI read port |
| `ensemble_pkg` | shared types, widths and default time windows |

## The robust combiner

### Data flow for one image

1. `start` is pulsed when an image has been issued to all accelerators. All
   timers restart and the combiner enters collection. A `start` is accepted
   only while `busy` is low.
2. Each accelerator *i* presents its ten class scores on `score[i]`. It sends
   one word per clock while `en[i]` is high, class 0 first. Scores are unsigned
   8-bit values, and a higher score means a more likely class. The words go
   into a ten-entry buffer per network, so networks of different depth may
   finish at very different times.
3. Collection ends when every network has either delivered ten words, been
   flagged by its timer, or been excluded before.
4. The sum machine scans the ten classes, one per clock. For each class it adds
   the scores of the *trusted* networks only and keeps the running maximum and
   its index. A trusted network is one that is not excluded, whose timer said
   `ok`, and that delivered all ten words. Ties go to the lower class. In the
   same scan each network's own arg-max (`net_label`) is found.
5. `out_valid` pulses with `out_label` and `out_sum`. In the same clock every
   trusted network's mismatch counter is updated: a mismatch if its own label
   differs from the ensemble label, a match otherwise.

If no network is left, the sums are all zero and the result is label 0,
sum 0.

**Latency:** `out_valid` is high in the 11th clock after the edge that takes in
the last score word. That is 1 clock to leave collection and 10 clocks of
summation. Behind the DWC stage the final label comes one clock later (12).

### Detecting a hung or early accelerator: `exception_timer`

The timer counts clocks from `start`. The first `en` seen at clock *k* gives:

* `early` if *k* < T_MIN;
* `ok` if T_MIN ≤ *k* ≤ T_MAX;
* `timeout` in the clock after *k* = T_MAX if no `en` has come.

Verdicts are registered and held until the next `start`.

The windows come from the networks' measured processing times: 3.2, 4.8, 6.7
and 8.3 ms for ResNet 20/32/44/56. They are converted at an assumed 200 MHz,
with ±5 % around the nominal time:

| network | T_MIN (cycles) | T_MAX (cycles) |
|---|---|---|
| ResNet 20 | 608 000 | 672 000 |
| ResNet 32 | 912 000 | 1 008 000 |
| ResNet 44 | 1 273 000 | 1 407 000 |
| ResNet 56 | 1 577 000 | 1 743 000 |

Both the clock and the margin are choices of this implementation. On real
hardware, measure the spread of each network's processing time and set the
`T_MIN`/`T_MAX` parameter arrays from it. The entries are in the order in
which the networks are connected.

A network flagged early or timed out is dropped from that image's sum, and it
stays excluded (`net_excluded`) until `clear_faults`. A hung accelerator
therefore does not slow down every later image by a full time window.

### Detecting a degraded accelerator: `mismatch_counter`

A corrupted PE array mostly yields an accelerator that is still mostly right,
or one that is badly wrong. A badly wrong one produces runs of wrong answers.
In the fault-injection study behind this design, a network that kept at least
90 % accuracy never gave more than three wrong results in a row. The counter
counts consecutive mismatches and a match resets it. When the count exceeds
C_T = 4, which is at the fifth consecutive mismatch, the network is excluded
until `clear_faults`. Only networks whose scores were used in a decision are
counted.

The threshold is defined as "larger than C_T". The same study could also be
read as "four in a row is already a fault". Set `C_T = 3` to get that
behaviour.

### Duplication with comparison: `dwc_combiner`, `compare_select`

When a combiner copy is hit by an upset, its result is almost always wrong in
a way that is easy to recognise. Its control may be stuck, so that label and
sum stay at their reset value 0. Or scores may be dropped from the sum, so
that the winning sum is *smaller* than the fault-free one. `compare_select`
uses this property:

* same label from both copies: that label is output;
* different labels: the label with the **higher winning sum** is output, and
  `repair` flags the other copy. A tie selects copy 0.

If only one copy raises valid, its result is used and the silent copy is
flagged. Outputs are registered, so they appear one clock after the copies'
`out_valid`. The rule relies on the scores being non-negative, so that leaving
scores out can only lower a sum. If your accelerators produce signed logits,
add an offset before they enter the combiner.

`repair` is only a report. Restoring a copy (for example by reconfiguring it)
is outside this RTL. A fault in `compare_select` itself can at worst request
an unnecessary repair.

## The accelerators' PE arrays

Each base network runs on an instruction-set CNN engine: instruction
dispatch, a LOAD/SAVE data mover to DDR, a CONV module, an ALU for pooling and
activations, and an on-chip memory pool. Of these, only the CONV module's PE
array is given here.

* `conv_pe_array`: P = 4 PEs. Each PE works on a different row of the input
  feature map. The weights are broadcast to all PEs, and each PE gets the N_IC
  input-channel activations of its own row.
* `pe`: N_OC = 8 output channels. Each channel has N_IC = 8 multipliers and an
  adder tree, so it performs 8 MACs per clock. Sums go into 32-bit
  accumulators. The configuration does 4 × 8 × 8 = 256 MACs, or 512
  operations, per clock: the "512-parallelism" accelerator of the base
  networks.
* `dsp_dual_mult`: multipliers are built in pairs for output channels 2k and
  2k+1. The pair shares one activation, and both weights are packed into the
  27-bit port as `w_hi·2^18 + w_lo`. The low product is the low 16 bits of the
  result. The high product is bits 33:18 plus bit 17, which adds back the
  borrow of a negative low product. One PE thus uses 32 such multipliers.

PE handshake:

* `in_valid` carries a term. With it, `acc_clear` marks the first term of an
  output and `in_last` the last one.
* `out_valid` pulses two clocks after the last term: one clock for the
  multiplier register, one for the accumulator.
* The accumulated sums stay in `acc` until the next output starts.

Requantising the sums to 8 bits and writing them back belong to the
accelerator's ALU/save path, which is not part of this RTL.

## Sharing the instruction ports: `axi_rd_arbiter`

The processing system offers only two general-purpose AXI ports, so two
accelerators share one port for their instruction fetch. Their data and
weights go through one high-performance port each, which needs no logic here.
With three networks, ResNet 20 and 32 share port 0 and ResNet 44 has port 1
to itself. With four, 32 and 44 share one port and 20 and 56 the other.
`GP_SLOT[port][slot]` in `ensemble_top` holds the network index per port slot
(-1 = empty); a port with one user is wired straight through.

`axi_rd_arbiter` handles the AXI4 read channels only, since instruction fetch
never writes. It keeps one burst in flight: it grants a waiting master
(round robin, one clock after its ARVALID at the earliest), passes its
address, routes the R beats back to it, and releases the port after RLAST.
The next grant then prefers the other master. The AR payload is forwarded
unchanged, including the ID, so the slave sees ordinary AXI4 bursts.

## What is outside the RTL

`ensemble_top` brings out as ports the signals where the following parts
would connect:

* per accelerator, the PE-array operand and result buses: these connect to
  the memory pool and the controller;
* the score streams with their output enables: these come from the SAVE path;
* `start` and `clear_faults`: these come from the system controller.

These parts are not given here:

* **instruction dispatch, data mover, ALU, memory pool** of the base
  accelerators. They belong to an existing CNN engine whose instruction set,
  buffer organisation and ALU operations are not specified here.
* **AXI/DDR/ARM processing system** and the accelerators' data traffic on
  the high-performance ports. The shared instruction ports are brought out
  as `gp_*`, the accelerators' own fetch masters connect at `inst_*`.
* **fault-injection hardware** (clock-freezing synchronizer, ICAP access).
  These serve evaluation only.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_NETS` | 3 | base networks (1–4); 3 = ResNet 20+32+44, 4 adds ResNet 56 |
| `P`, `N_IC`, `N_OC` | 4, 8, 8 | PE array size; 4, 16, 16 gives the 2048-parallelism engine |
| `ACC_W` | 32 | accumulator width (own choice) |
| `C_T` | 4 | consecutive-mismatch threshold |
| `CNT_W` | 21 | timer width; must hold T_MAX |
| `T_MIN`, `T_MAX` | see table above | time windows, indexed by network |
| `GP_SLOT` | '{'{0, 1}, '{2, -1}} | network in each slot of each shared instruction port |

Other ensembles of three networks work with the same hardware once the windows
are set. For example, 20+32+56 needs ResNet 56's window as the third entry.
With the defaults, a ResNet 56 in the third slot would be flagged as timed
out. Four networks need `NUM_NETS = 4`; the 10-bit sum holds 4 × 255.

## Own choices and departures

These choices are not fixed by the source design:

* score format (unsigned 8-bit);
* 200 MHz clock and ±5 % windows;
* one class per clock in the sum machine;
* score buffering per network;
* exclusions that persist until `clear_faults`, for exceptions as well as
  mismatches;
* tie rules (lower class index; copy 0 in compare & select);
* the lone-valid rule in compare & select;
* PE accumulator width, pipeline depth and handshake;
* the bit layout of the dual multiplication;
* round-robin arbitration with one burst in flight on a shared instruction port.

Known differences from the reference build:

* The reference compare & select stage registers only the 4-bit label (four
  flip-flops). This one also registers the winning sum, a valid bit and the
  disagree/repair report (18 flip-flops), so that the system can see which
  copy to repair.
* Resource figures and processing times of the reference FPGA build were not
  reproduced; the PE array here is plain RTL, not hand-mapped to DSP blocks.
* The accuracy figures printed by `tb_ensemble_workload` come from synthetic
  score vectors, not from trained networks; they show the mechanism, not the
  classification accuracy of real ResNets.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ensemble_pkg.sv tb/ens_tb_pkg.sv tb/tb_combiner.sv \
    --top-module tb_combiner -o sim
./obj_dir/sim
```

Replace `tb_combiner` by any testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_dsp_dual_mult` | corner and random operands; clock enable |
| `tb_pe` | random dot products of 1–100 terms against a model; idle cycles; latency |
| `tb_conv_pe_array` | a 3×3×8 convolution over 4 rows against direct convolution |
| `tb_exception_timer` | early, in-window (at both bounds), late and missing enables |
| `tb_mismatch_counter` | fifth mismatch excludes; a match restarts the run; clear |
| `tb_compare_select` | agreement, selection by sum, ties, lone valid |
| `tb_combiner` | vote, time out, early termination, mismatch exclusion, no network left, random images, latency |
| `tb_axi_rd_arbiter` | two masters with random bursts and a stalling slave: data to the right master, alternation under load, a lone master |
| `tb_dwc_combiner` | a combiner copy stuck at 0 or giving a wrong, smaller result never changes the final label; the faulty copy is reported |
| `tb_ensemble_top` | whole system, short windows: conv results, shared instruction fetch under contention and every protection mechanism, counted |
| `tb_ensemble_workload` | four-network system (20+32+44+56), 4000 images with synthetic scores: fault-free, then each network in turn hangs, terminates early or answers at random; labels against the model, the failed network must be dropped and accuracy stay within 5 points |
| `tb_ensemble_top_full` | one image at the default configuration (about 1.34 million clocks, about 10 s) |

`ens_tb_pkg` holds the reference model used by the combiner-level
testbenches. `axi_rd_slave_model` (a DDR stand-in whose data is the address)
and `inst_fetch_model` (an accelerator issuing instruction bursts) drive the
AXI side of the system testbenches. The testbenches emulate faults inside the combiner with
`force` on the outputs of one copy.
