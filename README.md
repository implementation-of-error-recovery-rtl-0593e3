# SMERTMR: scan-chain-based multiple error recovery for TMR

Triple modular redundancy (TMR) masks one wrong replica by voting, but it
repairs nothing. A second fault in another replica, or a fault that sits
unseen inside a replica's state, eventually defeats the vote. SMERTMR fixes this without recomputing anything.
It reuses the scan chains that every replica already has for manufacturing test:

1. It reads the full internal state of all three replicas through their scan chains.
2. It counts, for each pair of replicas, how many state bits differ.
3. From those three numbers it works out which one or two replicas are wrong.
4. It shifts a good replica's state into the wrong ones.

A replica that keeps failing is treated as permanently broken. The system
then continues as a master/checker pair on the other two.

This repository holds synthesizable SystemVerilog for the whole scheme. It is
built around a small example replica (a 3-bit counter). It follows the scheme
published as "Implementation of Error Recovery in TMR Systems using Scan
Chain-based Technique" (S. N. Qureshi, V. Kusanur). Where that description
leaves details open, this implementation's own choices are listed in
[Design choices](#design-choices-and-departures).

## The system at a glance

```
            c_in ─┬──────────────┬──────────────┐
                  ▼              ▼              ▼
            ┌──────────┐   ┌──────────┐   ┌──────────┐
  sci[0] ──►│ replica I│   │replica II│   │replica III│◄── sci[2]
            │ SCI/SCO  │   │ SCI/SCO  │   │ SCI/SCO   │
            └──┬────┬──┘   └──┬────┬──┘   └──┬────┬───┘
             q[0] sco[0]    q[1] sco[1]    q[2] sco[2]
               │    │         │    │         │    │
               ▼    └────┬────┼────┴────┬────┼────┘
          tmr_voter ◄────┼────┘         │    │
          (majority,     ▼              ▼    │
           error)   mismatch_counters   scan_router ◄── FMR (F1..F3)
               │    (XOR per pair,      (muxes, priority encoder,
               │     counter12/13/23)    SCE = rec|cmp|test)
               │         │
               │         ▼
               │    fault_locator ──► FMR1/FMR2 ──► permanent_fault_detector
               │         │                          (MRFM, NCF > TR ?)
               ▼         ▼                                │
          smertmr_controller (Normal / Comparison / Recovery /
                              Master-Checker / Unrecoverable) ◄─┘
```

| File | Block |
|---|---|
| `rtl/smertmr_pkg.sv` | States, module ids, fault-locator verdict |
| `rtl/tmr_module.sv` | One replica: example 3-bit down counter whose flip-flops form a scan chain |
| `rtl/tmr_voter.sv` | Bitwise 2-of-3 majority and the disagreement (error) flag |
| `rtl/mismatch_counters.sv` | XOR of each replica pair's scan-out bits; counter12/13/23, up in comparison and down in recovery |
| `rtl/fault_locator.sv` | Fault Locator Unit: counts → faulty replicas |
| `rtl/scan_router.sv` | Scan-in multiplexers, their select gates, priority encoder, scan-enable OR |
| `rtl/permanent_fault_detector.sv` | MRFM history register and NCF consecutive-fault counters |
| `rtl/master_checker.sv` | Duplex operation after a replica is dropped |
| `rtl/smertmr_controller.sv` | State machine, scan shift counter, faulty modules register (FMR) |
| `rtl/smertmr_top.sv` | Everything wired together |

## Reading a replica's state without destroying it

The controller turns on the scan enable of all three replicas and connects each
replica's scan output back to its own scan input. The chain then rotates: after
`Lsc` clocks (the chain length) every bit has passed the scan output once and
the register is back where it started. This design has one chain per replica,
with `Lsc = W`, the replica width.

While the chains rotate, three XOR gates compare the scan outputs of the pairs
I/II, I/III and II/III. Each mismatch increments that pair's counter. After
`Lsc` clocks, `counter_ij` holds the Hamming distance between the states of
replicas i and j. Nothing was lost, and the replicas did no work in the
meantime. They are simply held; they do not recompute.

Two events start this **comparison mode**:

* **A voter error.** The three outputs disagree.
* **The `checkpoint` input.** The system integrator raises it in idle
  (slack) time. It finds *latent* faults: corrupted state that has not yet
  reached an output. Frequent checkpoints keep latent faults from building up
  until a second fault arrives. The interval is the surrounding system's
  business, for example a timer firing in known idle periods; no timer is
  built in.

## Locating faulty replicas from three numbers

This is the heart of the scheme, and it is where its limits lie. With distances
`c12`, `c13` and `c23`, the fault locator applies these rules in this order:

| Pattern | Verdict |
|---|---|
| all three zero | no fault: back to normal |
| `c_ij == c_ik != 0` and `c_jk == 0` | replica *i* alone is faulty |
| `c_jk = x`, `c_ik = y` (both nonzero) and `c_ij == x + y` | replicas *i* and *j* are faulty; *k* is good |
| anything else | unrecoverable |

The single-fault rules are tried for i = I, II, III, then the double-fault
rules. The faulty replicas are written to the faulty modules register as two
2-bit ids, `FMR1` and `FMR2`. The lower id goes first, and 0 means none. For
example, replicas I and II are `FMR1 = 01`, `FMR2 = 10`.

The double-fault rule only holds when the two faulty replicas are wrong in
**different bits**. Then the distance between them is the sum of their
distances to the good replica. If both are wrong in the same bit, they agree
with each other there. The pattern then looks like a single fault in the
*good* replica, and recovery copies the wrong state over it. Faults in all three
replicas are outside the scheme's reach. The exhaustive campaign in
`tb/smertmr_fault_campaign_tb.sv` makes this concrete for the 3-bit replica.
It covers 8 start values × every flip-mask combination on the three replicas:

| Fault class | restored | wrong state | unrecoverable |
|---|---|---|---|
| one replica | 168 | 0 | 0 |
| two replicas, disjoint bits | 288 | 0 | 0 |
| two replicas, shared bits | 0 | 744 | 144 |
| all three replicas | 0 | 2448 | 240 |

There are also 56 cases where all three replicas are flipped identically. No
voter can see those.

So the guarantee is this: any fault in one replica, and any two faults in
different bits of two replicas, are repaired. Both are measured at the moment
the error is detected.

**This is why the replicas stop the moment an error is seen.** `run` drops in
the same clock in which the voter error or checkpoint is present, not one clock
later. One more functional step would let carries in the replica logic spread a
fault into other bits. A clean double fault could then turn into a
shared-bit one and be blamed on the wrong pair. An earlier version of this
design let the replicas run for that one clock. Its end-to-end test showed
exactly this misdiagnosis.

## Recovery and its built-in check

In **recovery mode** the scan multiplexer of each faulty replica, selected by
`Recovery AND F(i)`, takes its input from a source replica. The source is the
lowest-numbered fault-free replica, chosen by a priority encoder from the FMR
bits. Fault-free replicas keep rotating. After `Lsc` clocks every faulty
replica holds a copy of the source's state.

The scan outputs are compared again during the copy, and now each mismatch
*decrements* its counter. The bits shifted out are the same ones the comparison
saw, so a clean copy brings every counter back to zero. If a counter is nonzero
at the end, or a counter would have to go below zero, another fault struck
during recovery. Going below zero is recorded in a sticky `underflow` flag and
does not wrap. The system then enters the unrecoverable condition, because the
fault can no longer be located.

## Permanent faults and master/checker mode

Each completed comparison stores its faulty mask in the **MRFM** register.
For each replica, **NCF** counts how many comparisons in a row have found it
faulty. A comparison that finds the replica healthy resets its count, and a
clean checkpoint counts as such a comparison. When a comparison locates a
single faulty replica whose NCF would exceed the threshold `TR`, that replica
is declared permanently faulty. Instead of recovering it:

* the system enters **master/checker** mode on the other two replicas. The
  lower-numbered one is the master and drives `out`; the other is the checker;
* the voter error and `checkpoint` are ignored from then on;
* a master/checker disagreement leads to the unrecoverable condition.

A run of transient faults that happen to hit the same replica TR+1 times in a
row is taken as permanent. With faults spread evenly over three replicas this
happens with probability `1/3^(TR-1)`. The default is `TR = 2`.

## Off-line scan testing

While `offline_test` is high in normal state, every chain shifts and the
replicas take their scan inputs from `test_si[2:0]`. Their scan outputs appear
on `sco[2:0]`. Voter errors and checkpoints are ignored meanwhile. This is the
chains' original purpose: manufacturing test.

## Controller states and timing

| From | Event | To |
|---|---|---|
| Normal | voter error or `checkpoint` | Comparison (counters cleared) |
| Comparison | no mismatch | Normal |
| Comparison | 1 or 2 replicas located | Recovery |
| Comparison | single replica located, permanently faulty | Master/Checker |
| Comparison | pattern fits no rule | Unrecoverable |
| Recovery | all counters zero | Normal |
| Recovery | a counter nonzero or underflow | Unrecoverable |
| Master/Checker | master ≠ checker | Unrecoverable |
| Unrecoverable | reset only | |

Comparison and recovery each last `Lsc + 1` clocks: `Lsc` shift clocks and one
decision clock. With the default `Lsc = 3`:

* A transient fault found by the voter is repaired **2·Lsc + 3 = 9 clocks**
  after the clock that injected it. That is one clock for the voter, then
  comparison, then recovery.
* A checkpoint that finds nothing costs **Lsc + 1 = 4 clocks** of stopped
  operation.

`out_valid` is low whenever the replicas are stopped, and after an
unrecoverable condition.

## Top-level interface (`smertmr_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising-edge clock, asynchronous active-low reset |
| `c_in` | in | 1 | replica count enable (the example function's input) |
| `checkpoint` | in | 1 | request a state comparison (use in slack time) |
| `offline_test`, `test_si` | in | 1, 3 | scan test mode and per-chain scan inputs |
| `fis` | in | 3×W | fault-injection flip masks per replica; tie to 0 in use |
| `out`, `out_valid` | out | W, 1 | voted (or master) output, and whether it is valid |
| `voter_error` | out | 1 | replica outputs disagree |
| `q`, `sco` | out | 3×W, 3 | replica values and scan outputs |
| `state`, `comp`, `rec`, `mc`, `uc` | out | 3, 1 each | controller state and its decoded flags |
| `fmr1`, `fmr2`, `f_mask` | out | 2, 2, 3 | faulty modules register, as ids and as the mask F(1..3) |
| `mrfm` | out | 3 | most recent comparison's faulty mask |

Parameters: `W = 3` (replica width, which is also the chain length) and `TR = 2`.

## Design choices and departures

The original description gives the scan chain use, the counters, the location
algorithm, the multiplexer/priority-encoder structure, the state diagram and
the MRFM/NCF/TR mechanism. The following are this implementation's own choices:

* **The replica.** The scheme applies to any circuit with full scan. Here a
  3-bit down counter with enable stands in for the user's circuit. Its width
  and counting direction match the example waveforms published with the scheme.
* **Chain length** `Lsc = W`: one chain per replica.
* **Timing.** There is one decision clock after each shift phase. The replicas
  stop in the clock an error or checkpoint is seen (see above).
* **Counter width** `$clog2(Lsc+1)`. Counters saturate going up. Going below
  zero sets a sticky underflow flag, which counts as a failed recovery.
* **Fault-locator order.** Single-fault rules come before double-fault rules. The
  double-fault rule requires both partial distances to be nonzero.
* **Source replica**: the lowest-numbered fault-free one.
* **Permanent faults.** `TR = 2`; the value is not specified in the original.
  NCF resets on any comparison that finds the replica healthy. Master/checker
  mode is entered only when a single replica is located. With two faulty
  replicas, both are recovered.
* **Master/checker**: the lower-numbered remaining replica is the master. The
  unrecoverable condition is left only by reset.
* **Off-line test** takes external scan inputs `test_si`. The original only
  shows the test mode as an input to the scan-enable OR.
* **Fault injection** through `fis` masks inside each replica, for experiments.
* **Size.** The synthesized design has 38 flip-flop bits. The replicas hold 9
  of them. The rest are the counters and underflow flag, MRFM/NCF, and the
  controller with FMR. A reference FPGA implementation of the scheme reported 24
  flip-flops and 2 latches. That implementation's exact contents (for example
  whether it held NCF history) are not known. This design has no latches.
* **Not built.** The published power and FPGA utilisation figures belong to a
  specific FPGA implementation and are not reproduced. Extending the scheme to
  five replicas was only suggested as future work.

## Using your own circuit

Replace `tmr_module` with your circuit. Keep the `sce`/`sci`/`sco` scan
interface, with all state flip-flops on one chain of length `Lsc`. Scan must
have priority over the function, and the circuit must hold its state when
`run` (its enable) is low. Set `LSC` in `smertmr_top` to the chain length. Set
the counter width so that it can hold `Lsc`; this happens automatically through
`$clog2`. If the replica has several chains, the pairwise comparison needs one
XOR and counter set per chain position, or the chains must be concatenated.

## Simulation

Every testbench is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/smertmr_pkg.sv \
    tb/smertmr_top_tb.sv --top-module smertmr_top_tb -o sim
./obj_dir/sim
```

Swap in any other testbench the same way:

| Testbench | What it shows |
|---|---|
| `tb/smertmr_top_tb.sv` | End to end at default size. It covers: a double fault in replicas I and II, repaired; single faults in each replica; a checkpoint that finds nothing; a checkpoint that catches a fault; a fault during recovery; an unlocatable triple fault; permanent fault → master/checker → master error; off-line scan load; a 60-fault random soak. It checks latency and counts each mechanism |
| `tb/smertmr_fault_campaign_tb.sv` | The exhaustive campaign above (4096 experiments) |
| `tb/smertmr_controller_tb.sv` | Every state-diagram path, with its clock counts |
| `tb/fault_locator_tb.sv` | All 64 counter combinations against an independent hypothesis model |
| `tb/scan_router_tb.sv` | All 4096 input combinations |
| `tb/mismatch_counters_tb.sv`, `tb/permanent_fault_detector_tb.sv`, `tb/tmr_module_tb.sv`, `tb/tmr_voter_tb.sv`, `tb/master_checker_tb.sv` | Unit tests against testbench models |

All of these pass. Each unit testbench was also confirmed to fail against a
deliberately broken copy of its block. The whole design lints cleanly under
Verilator `-Wall`, apart from unused-parameter and style notices. It also
elaborates in Yosys with the slang front end.
