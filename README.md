# Hardware checkpointing for intermittently powered accelerators

A battery-less device that runs on harvested energy keeps its charge in a small
capacitor. One charge gives a few tens of thousands of clock cycles, but a
long computation (an FFT-based peak detector, a hash over a large buffer, a
loop whose length depends on its input) needs far more. This RTL lets such a
computation finish anyway. The progress of a custom hardware design is saved
to non-volatile memory (NVM) at checkpoints and picked up again after the
next power-up.

Two ideas from the published checkpointing scheme shape the design:

* **Checkpoint circuits sit at fixed places, chosen at design time.** There
  is at least one at the end of every loop of the design's state machine
  (the *loop-end*). A loop that runs a data-dependent number of times can
  therefore always save its progress.
* **Whether a checkpoint is actually taken is decided at run time.** At
  power-up the chip measures the capacitor voltage. It works out how many
  cycles the stored energy lasts (`Nc`) and loads a down-counter with
  `alpha*Nc`, where `alpha` = 0.7. Checkpoint locations reached while the
  counter is above zero are simply passed. The first one reached at zero
  saves the state and then switches the device off until the capacitor has
  recharged.

The RTL has two parts. The first is the checkpointing machinery itself: a
tree of checkpointing circuits, a root controller with the counter, an
energy estimator and an NVM controller. The second is a small example
application with an input-dependent loop, into which that machinery is
embedded.

## Files

| file | contents |
|---|---|
| `rtl/ckpt_pkg.sv` | word width, tree link structs, NVM header magic, application FSM states |
| `rtl/cpc_node.sv` | checkpointing circuit (CPC) embedded in each module |
| `rtl/cpc_root.sv` | root CPC: power-cycle sequencer, contains the three below |
| `rtl/cp_counter.sv` | activation down-counter |
| `rtl/energy_est.sv` | ADC sampling and `alpha*Nc` computation |
| `rtl/nvm_ctrl.sv` | NVM memory controller (root only) |
| `rtl/ckpt_top.sv` | top module: application FSM, its CPC, the root CPC |
| `rtl/app_dp.sv`, `rtl/app_alu.sv`, `rtl/app_iter.sv` | modules of the example application, each with its CPC |
| `tb/tb_*.sv` | self-checking testbenches (see below) |
| `tb/ehd_platform.sv` | simulation model of the harvesting platform around `ckpt_top` |
| `tb/nvm_model.sv` | behavioural NVM (persistent, fixed latencies) |

## One power cycle, as the root sees it

`cpc_root` runs the following sequence after every power-on reset (`rst_n`
rising):

1. **Sense.** Request one ADC conversion of the capacitor voltage. Compute
   the cycle budget and load it into the counter (about 10 cycles).
2. **Look for a checkpoint.** Read the header word at NVM address 0.
3. **Restore.** This step runs only if the header is valid. Read words
   1..N from the NVM and push them down the CPC tree; each module loads its
   registers as its share arrives. One settle cycle follows, then `restored`
   pulses. If the header is not valid, `fresh_start` pulses and the
   application starts from reset.
4. **Run.** `app_en` is high and the counter falls by one per cycle. When
   the application reaches a checkpoint location it raises `cp_req`:
   * counter above 0: nothing happens (`cp_skipped` pulses);
   * counter at 0: `app_en` drops *in the same cycle*. The application stays
     frozen and `cp_taken` pulses.
5. **Save.** Write a zero header, which invalidates the old checkpoint. Then
   stream the whole tree into NVM words 1..N and write the header
   `{16'hC4E7, N}`.
6. **Off.** Raise `pwr_off` and wait for the supply to disappear.

When the application finishes while a checkpoint is stored, the root holds
it for one NVM write and zeroes the header (`cleared`). The next run then
starts fresh. A finished application is never checkpointed, even when its
last state is a checkpoint location.

The top reports `done` only after that clear, when the root's `nvm_clean`
says no image is left. If `done` came earlier, a supply failure during the
clear would restore an older checkpoint and run the job again. The host has
already taken the result at that point, and may have started the next job,
which the replayed job would then corrupt. The stress testbench found this
case.

The header is written last on purpose. If the supply fails in the middle of
a save, the NVM has no valid header, and the next power-up starts the
computation from the beginning. It never restores a half-written image. The
cost is one extra NVM write per checkpoint. A double-buffered image would
keep the older checkpoint instead. That was not done, because the counter
leaves 30 % of the energy for the save.

## The checkpointing tree

Every module of the checkpointed design contains one `cpc_node`. A node is
connected to three things:

* the registers of its own module that must survive (`regs_q` out of the
  module, `regs_d`/`regs_load` back into it);
* the nodes of the modules it instantiates (its children);
* the node of its parent module.

Only the root talks to the NVM, so nothing but one link per module instance
has to be routed through the hierarchy.

Data move in a **depth-first walk**. A node first sends its own `NLOCAL`
words, in index order, and then the complete stream of child 0, then of
child 1, and so on. A restore delivers the same sequence: the node keeps the
first `NLOCAL` words and hands the rest to its children in turn. Placing a
node's own words before its children's is a choice made here.

Each link is a pair of packed structs from `ckpt_pkg`:

| `cpc_down_t` (parent to child) | `cpc_up_t` (child to parent) |
|---|---|
| `start`, `op_restore`: open a save (0) or restore (1) on the subtree, one cycle | `up_valid`, `up_data`, `up_last`: saved words; `up_last` on the subtree's final word |
| `up_ready`: parent takes the saved word | `dn_ready`: subtree takes the restore word |
| `dn_valid`, `dn_data`: restore words | `dn_last`: raised with `dn_ready` for the word that completes the subtree |

A word moves in a cycle where valid and ready are both high. While a child's
words are in transit, the node connects the child's stream straight through
(combinationally). Any number of levels therefore moves one word per cycle,
plus one cycle each time a child is opened. Because of `up_last`/`dn_last` a
node never needs to know how many words its children hold: each subtree
reports its own end. The price is a combinational valid/ready path as deep as
the module hierarchy.

On a restore, a node collects its words in a shadow copy. It pulses
`regs_load` one cycle after its last word, and the module then loads all its
registers at once. A module gives `regs_load` priority over its normal
update.

### Example word order

`ckpt_top` → `app_dp` → (`app_alu`, `app_iter`) gives the 8-word image:

| NVM address | word |
|---|---|
| 0 | header `{16'hC4E7, 16'd8}` (0 = none) |
| 1 | top: `{28'b0, at_cp, state[2:0]}` |
| 2 | top: `result` |
| 3 | top: `steps` |
| 4 | `app_dp`: `a` |
| 5 | `app_dp`: `b` |
| 6 | `app_alu`: `{30'b0, gt, eq}` |
| 7 | `app_alu`: `diff` |
| 8 | `app_iter`: `iter` |

## When to checkpoint: the energy budget

`energy_est` turns the ADC code into the counter's load value. The energy
still usable before the supply cuts out at `VOFF` is `C/2 * (V^2 - VOFF^2)`.
Dividing it by the average energy per cycle gives `Nc`. Every factor apart
from `V^2` is a constant, so the whole expression becomes one fixed-point
constant, computed at elaboration from `real` parameters:

```
K          = ALPHA * C_F * VFS^2 / (2 * E_CYC * 2^(2*ADC_W))
K_Q        = floor(K * 2^FRAC)                  (FRAC = 24)
est_cycles = floor((code^2 - voff_code^2) * K_Q / 2^FRAC), 0 below VOFF
```

The hardware is one squarer, one subtractor and one constant multiplier,
over four pipeline cycles. At the defaults (3.3 µF, 0.7, 3.0 V, 350 pJ per
cycle, 10-bit ADC with 6 V full scale), a capacitor at 5.0 V gives a budget
of about 52 800 cycles. The testbench accepts a result within 0.1 % + 2
cycles of the exact real-valued formula.

The counter (`cp_counter`) is loaded at power-up and counts every running
cycle. It stops at zero. The margin `1 - alpha` covers two things: phases
where the real consumption is above average, and the energy of the save
itself.

## Where checkpoints are: the example application

The application is a five-state FSM with a loop from S2 back through S3, the
shape used to explain the method:

```
S1 --start--> S2 --> S3 --(a == b)--> S4 --> S5 --(!start)--> S1
               ^      |
               +------+ (a != b: subtract, count)
```

It computes `gcd(op_a, op_b)` by repeated subtraction and also counts the
subtraction steps (`steps`). The number of passes through the loop depends
on the data: gcd(12, 18) takes 2, gcd(1000003, 3) takes 333 336.
`CP_MASK` (bit *i* for the state encoded *i*) marks the states that end with
a checkpoint circuit. The default is S3 only, the loop-end.

When the FSM leaves a marked state it sets `at_cp`. In the next cycle,
before the following state runs, the root either lets it continue or
freezes it and saves. The saved image is therefore the state right *after*
the loop-end completed. After a restore, `at_cp` is set again and the fresh
budget lets the FSM continue at once.

The modules follow a typical hierarchy: a top module with the FSM, a
datapath module, and two submodules inside it. `app_dp` holds the operands;
`app_alu` compares and forms the difference in S2; `app_iter` counts. Each
of them has its own CPC.

## Parameters (`ckpt_top`)

| parameter | default | meaning | origin |
|---|---|---|---|
| `C_F` | 3.3e-6 | storage capacitor [F] | published platform |
| `VOFF` | 3.0 | supply switch-off voltage [V] | published platform |
| `ALPHA` | 0.7 | fraction of `Nc` run before checkpoints activate | published value |
| `E_CYC` | 350e-12 | average energy per cycle [J] | chosen: about 100× a 3.5 µW harvest at 1 MHz |
| `VFS` | 6.0 | ADC full scale [V] | chosen |
| `ADC_W` | 10 | ADC width | chosen |
| `CNT_W` | 32 | counter width | chosen |
| `AW` | 16 | NVM word address width | chosen |
| `CP_MASK` | `5'b00100` | states that end with a checkpoint circuit | loop-end S3 |

The package fixes the word width (`CP_DW` = 32).

## Ports (`ckpt_top`)

* `clk`, `rst_n`: `rst_n` is the power-on reset, low while the supply is off.
  Everything except the NVM is volatile.
* Application: `start` (hold high until `done`), `op_a`, `op_b`, `done`,
  `result`, `steps`. `done` rises once the FSM is in S5 *and* no checkpoint
  is left in the NVM. From then on, no supply failure can take the job
  back. After `start` falls, the FSM returns to S1.
* ADC: `adc_start` is a one-cycle request; the converter answers with a
  one-cycle `adc_valid` and `adc_data`, at any later time.
* NVM: `nvm_req` is held with `nvm_we`, `nvm_addr` and `nvm_wdata` until a
  one-cycle `nvm_ack`; read data come with the ack. One request is in flight
  at a time, so any memory latency works.
* Power: `pwr_off` is held high once a checkpoint is stored.
* Status: `app_en`, `budget` (counter), `v_code` (sensed voltage), and
  one-cycle pulses `cp_taken`, `cp_skipped`, `restored`, `fresh_start`,
  `cleared`.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`, stops itself with a
cycle watchdog, and needs nothing but verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ckpt_pkg.sv tb/tb_ckpt_top.sv --top-module tb_ckpt_top
./obj_dir/Vtb_ckpt_top
```

| testbench | what it checks |
|---|---|
| `tb_cp_counter` | load priority, count-down, stop at 0, against a reference model |
| `tb_energy_est` | budget against the real-valued energy formula over a code sweep; 4-cycle latency; zero below `VOFF` |
| `tb_nvm_ctrl` | random reads/writes through the behavioural NVM; request-to-response time = latency + 2 |
| `tb_cpc_node` | a 3-node tree under random stalls: depth-first order, `up_last`/`dn_last`, load pulses; 8 cycles for 6 words with no stalls |
| `tb_cpc_root` | fresh start, budget value, skip with budget left, same-cycle stop at 0, NVM image, restore, clear on completion, power lost mid-save |
| `tb_ckpt_top` | whole device at default parameters inside the platform model (below): three gcd jobs, results and step counts against a reference; every mechanism must occur |
| `tb_nvm_tech` | the same long job on Flash, PCM and STT-RAM copies of the platform; results, time and energy overhead |
| `tb_cp_placement` | one long job with four checkpoint placements (`CP_MASK`): loop-end only, after every state, inside the loop, and none in the loop. The first three must finish with the same checkpoint count; the last must never finish |
| `tb_power_traces` | the same job under a constant harvest and five random impulse harvests; results, checkpoint count and overheads must not depend on the trace |
| `tb_ckpt_stress` | 40 random gcd jobs with checkpoints after S1..S4, tiny budgets, random ADC values and NVM latencies, and random supply failures (about one per 1500 cycles) that hit runs, saves, restores and clears. Every restore must reproduce the full register state of the last checkpoint whose header write completed, and every job must give the right result |

`tb/ehd_platform.sv` models the surroundings of the chip:

* a capacitor charged by a constant harvest of 1 % of the chip's power or,
  with `TRACE=1`, by random impulses with the same mean. The gaps between
  impulses are exponentially distributed (Poisson arrivals) and their sizes
  normally distributed; the voltage is clamped at the ADC full scale;
* a supply switch that turns the chip on at 5.0 V and off below 3.0 V or on
  `pwr_off`;
* the ADC;
* an NVM that costs time and energy per word access.

The time spent recharging is added up without clocking the chip, so a job
that needs a hundred million cycles of recharge still simulates in under a
second. In `tb_ckpt_top`, one chosen power cycle draws 60 % more energy than
the estimator assumes. The supply then fails before a checkpoint, and the
chip resumes from the previous checkpoint and redoes the lost work.

Typical results (`tb_ckpt_top`, Flash-like NVM): gcd(1000003, 3) needs
666 676 cycles of computation. It completes after 14 power cycles, with 12
checkpoints, one supply failure and 714 764 powered cycles; most of the
7 % extra comes from the failed power cycle. `tb_nvm_tech`, with no failures,
reports a time overhead of 0.2 % and an energy overhead of about 31 % for
Flash, 12 % for PCM and 3 % for STT-RAM. The energy overhead of the save
depends strongly on the NVM's energy per written word. Here a 32-bit word is
counted as 32 cells at 17.5 / 6 / 1.6 nJ each, which makes one Flash
checkpoint of 10 writes cost 5.6 µJ. That is a fifth of a full charge for
this tiny application.

Area, from a generic yosys synthesis: the whole top has 529 cells and 803
flip-flop bits. The root alone (estimator, counter, NVM controller and
sequencer) takes 185 cells and 322 flip-flop bits. A node costs a few tens
of cells plus a shadow copy of its module's words. In this tiny example
the checkpointing logic is therefore most of the chip. In a large
accelerator the root is a fixed cost, and each node grows only with the
number of words its module saves. The shadow copy doubles the flip-flops of
the saved registers; a design short on area can instead load each word
straight into its register as it arrives.

`tb_cp_placement` (PCM-like NVM) shows what the placement does. Extra
checkpoint circuits cost nothing at run time: after every state or only at
the loop-end, the job takes 12 checkpoints at 11.6 % energy overhead.
Without a circuit inside the loop, the job restarts from the beginning at
every power-up and never finishes.

`tb_power_traces` gives the same 12 checkpoints and the same overheads on all
six traces; only the time spent off (94 to 97 million cycles) changes. The
harvest is far below the chip's consumption, so the capacitor discharge
depends only on the chip. A typical `tb_ckpt_stress` run has about 1650
power cycles, 1500 checkpoints and 200 supply failures, 50 of them during a
save.

## How far this follows the published scheme

Taken from it:

* a CPC in every module, joined in a tree along the module hierarchy;
* only the root has a memory controller, and the counter sits in the root;
* the depth-first transfer order;
* checkpoint circuits at the ends of states, at least at every loop-end;
* energy sensing at power-up, a down-counter loaded with `alpha*Nc` that
  stops at 0;
* activation only at 0, then switching the device off;
* the 3.3 µF / 3.0 V platform and `alpha` = 0.7.

Chosen here:

* all widths, port protocols and the link structs;
* each node's own words before its children's;
* the NVM header, the invalidate-then-write save, and clearing on
  completion;
* no checkpoint of a finished application, and holding `done` back until
  the NVM is clean;
* computing `Nc` as a constant multiplication of `V^2 - VOFF^2`;
* the energy per cycle, the ADC range and the 5.0 V turn-on point of the
  platform model;
* the example application, and saving *all* of its registers (the scheme
  saves only those still needed after the checkpoint, which is a subset).

Not provided:

* **The tool that places checkpoints.** The published scheme finds extra
  checkpoint locations between loop-ends with a dynamic program: at most `D`
  states apart, at minimum total save cost. It then writes CPCs into the
  Verilog that HLS generates. That step is design-time software. Here its
  result is the `CP_MASK` parameter. A five-state FSM never needs more than
  the loop-end.
* **The benchmark accelerators** (FFT peak detection, matrix-vector
  products, AES, SHA-256, MD5). They were HLS-generated and their internals
  are not available. The CPC tree and the root do not depend on the
  application: any module can get a `cpc_node` by listing its live registers
  and its child modules' links.
* **The ADC, the NVM, the harvester and the power switch.** These exist only
  as testbench models.

## Embedding the circuit in another design

For each module:

1. Gather its state registers into `logic [NLOCAL-1:0][31:0] regs_q`.
2. Give each register a load path from `regs_d` when `regs_load` is high,
   with priority over normal operation.
3. Gate all normal updates with the root's `app_en`.
4. Instantiate `cpc_node #(.NLOCAL(n), .NCHILD(k))`, with the child links
   going to the CPC ports of its submodules.

In the top module, connect the top node's parent link to `cpc_root`. Drive
`cp_req` from a register that is set when a checkpointed state completes,
and `app_done` from the design's done state. Report completion to the
outside only together with `nvm_clean`.
