# Autonomous instruction memory with a branch target buffer

In a pipelined CPU, the fetch stage sends an instruction address to memory
every cycle, yet almost all of those addresses are predictable: they are
"previous address + 1", or the target that the branch target buffer (BTB)
predicts. This design moves the BTB out of the CPU and into the instruction
memory's bus module. The memory then works out each next fetch address
itself and streams one instruction per cycle to the CPU. The instruction
address bus carries a value in only two cases:

* a **restart**: the program start after reset, or the restart address
  after an exception;
* a **branch in EXE**: the CPU marks it with `B`, puts its target on the
  address bus and reports the outcome on `TK`.

Everything else the CPU needs to know comes back on the `PRED` line: whether
the memory predicted the delivered instruction as a taken branch. The CPU
works out the PC of each instruction itself, so no PC is ever sent back from
memory to CPU.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, apart from
the two assertions in the top module. It lints cleanly with
`verilator -Wall` except for one warning noted below.

## Structure

```
aim_system                 top: CPU flow control + [BTB+IM] + bus wiring
├── cpu_flow_ctrl          CPU side: PC tracking, branch decode, B/TK/target, flush, ECPT
└── auto_imem              the [BTB+IM] bus module
    ├── btb_fetch_unit     next-address choice, IF/ID/EXE PC and prediction tracking
    ├── btb_table          64-entry direct-mapped BTB (tag, target, 2-bit counter)
    │   └── sat_counter    two-bit saturating predictor update
    └── imem               16384 x 32 instruction memory, synchronous read
aim_pkg                    shared types: addresses, bus structs, predictor states, opcodes
```

The CPU's datapath (register file, ALU, data memory) is not part of this
RTL. The flow control needs only four things from it, and they are ports of
`aim_system`:

* `ex_taken`: the branch condition of the instruction in EXE;
* `ex_fault`: an execution exception;
* `dmem_fault`: a data memory exception;
* `irq`: an external interrupt.

The instruction in EXE comes out (`ex_valid`, `ex_pc`, `ex_instr`), so that a
datapath can act on it.

## The bus

The bus is two packed structs from `aim_pkg`:

| signal | direction | driven when | meaning |
|---|---|---|---|
| `addr` (32) | CPU → memory | restart cycle, or a branch in EXE | start/restart PC, or the branch target |
| `addr_drv` | CPU → memory | | the address bus carries a value this cycle |
| `b` | CPU → memory | branch in EXE | the instruction in EXE is a branch |
| `tk` | CPU → memory | branch in EXE | that branch is taken |
| `ecpt` | CPU → memory | | exception raised by the CPU |
| `instr` (32) | memory → CPU | every cycle | instruction for the CPU's IF stage |
| `pred` | memory → CPU | every cycle | the BTB predicted this instruction as a taken branch |
| `ecpt` | memory → CPU | | instruction memory exception |

The two `ecpt` outputs are ORed into one ECPT line, which both sides obey.
`addr_drv` stands for the drive enable of a shared bus. It also makes the
bus use measurable.

## Cycle by cycle

Both sides keep the PCs of the instructions in IF, ID and EXE, and the
prediction made for each. The two copies are independent, and they must
agree. The top module asserts this every cycle: the IF PCs must match, and
both sides must see the same mispredictions.

**Memory side (`btb_fetch_unit`).** Let `pc_if` be the address whose
instruction is on the bus this cycle. The BTB is looked up with `pc_if`
combinationally. The next address goes straight to the synchronous memory,
so its instruction is on the bus in the following cycle. The next address
is chosen in this order:

1. in a restart cycle: the value on the address bus;
2. if the branch in EXE was mispredicted (`b` set and `tk` differs from the
   prediction recorded for it): the bus target if it was taken, else its
   PC + 1;
3. on a BTB hit whose counter says taken: the stored target, with `PRED` = 1;
4. otherwise `pc_if + 1` (addresses count instructions, not bytes).

The BTB is updated in the cycle the branch is in EXE. If the branch has no
entry, one is created with the target taken from the address bus and a
counter of *weakly taken*. That counter, or the counter of an existing
entry, is then stepped by `tk` in the same write: so a new entry ends up
strongly taken or weakly not taken.

**CPU side (`cpu_flow_ctrl`).** The CPU computes the PC of the instruction it
receives from the instruction in ID: that instruction's target if it came
with `PRED` = 1, otherwise its PC + 1. Right after a restart or a recovery,
it uses the PC it has just sent or computed instead. ID decodes the branch
and computes its PC-relative target. At the start of EXE, the CPU drives
`b`, the target and `tk`. On a misprediction it drops the instructions in IF
and ID and takes the same recovery address as the memory.

Timing, counted in cycles:

| event | cost |
|---|---|
| reset released | cycle 0 sends the start PC; the first instruction arrives in cycle 1 and is in EXE in cycle 3 |
| correctly predicted branch (taken or not) | none: one instruction per cycle |
| misprediction | 2 (the instructions in IF and ID are flushed; the correct one arrives in the next cycle) |
| exception | ECPT cycle + restart cycle: the next instruction reaches EXE 4 cycles after the ECPT cycle |

A program of N instructions with M mispredictions and no exceptions has its
last instruction in EXE N + 2 + 2M cycles after reset.

## Exceptions and restart

ECPT can be raised by any of these:

* an undefined opcode in ID;
* `ex_fault` for the instruction in EXE;
* `dmem_fault`;
* `irq`;
* the memory, when a fetch beyond the last word reaches EXE.

The memory does not raise its exception when the failed fetch happens,
because that fetch may be on a wrong path that a later misprediction
flushes. Instead, a fault bit travels with the tracked PCs and is raised
only if the instruction reaches EXE without having been flushed. Without
this, a branch predicted taken towards an unmapped address could raise an
exception on every visit, even though the branch is never taken.

On ECPT both sides drop everything in flight. In the next cycle (the restart
cycle) the CPU drives `EXC_VECTOR` on the address bus, and the memory loads
it as its fetch address. Reset works the same way, with `START_PC`. No
return address is saved: the design has no return-from-exception mechanism.

An `EXIT` instruction that reaches EXE stops the CPU (`halted`), and the
statistics counters stop with it. The memory keeps streaming, but nothing
is accepted any more.

## Instruction format

The flow control needs only four facts about an instruction: is it a
branch, what is its target, is it undefined, and is it the exit. The format
chosen here is:

| bits [31:28] | instruction | rest |
|---|---|---|
| `0` | ALU or any other non-control operation | [27:0] belong to the datapath |
| `1` | conditional branch | target = PC + sign-extended [15:0]; [27:16] free for the condition |
| `2` | EXIT | |
| other | undefined, raises ECPT in ID | |

The memory side never decodes instructions. Only `cpu_flow_ctrl` and
`aim_pkg` depend on this format.

## Parameters

| parameter | default | where | notes |
|---|---|---|---|
| `BTB_ENTRIES` | 64 | `aim_system`, `auto_imem` (`ENTRIES` in `btb_table`) | direct-mapped, full tags; power of two |
| `IMEM_WORDS` | 16384 | `aim_system`, `auto_imem` (`WORDS` in `imem`) | 32-bit words, 64 KiB |
| `START_PC` | 0 | `aim_system`, `cpu_flow_ctrl` | first fetch address after reset |
| `EXC_VECTOR` | 0x100 | `aim_system`, `cpu_flow_ctrl` | restart address after an exception |

The address and instruction widths (32 bits) are package constants. The
predictor is a plain saturating up/down counter (0 = strongly not taken …
3 = strongly taken), and its upper bit is the prediction. The
cycle/branch/misprediction counters are 32 bits wide. That is enough for
about 4.29 billion cycles: a run of 1.4 billion instructions with 250
million branches mispredicted 10 % of the time needs about 1.43 billion.

## What comes from the reference design, and what is this design's own

These follow the reference design:

* the BTB placed in the instruction memory's bus module;
* the information exchanged (start PC, B, target, TK, PRED, ECPT) and the
  pipeline stage that produces each;
* the PC/prediction tracking up to EXE on both sides;
* the four-way choice of the next fetch address and the recovery addresses;
* the creation of BTB entries on B, weakly taken;
* a two-bit saturating predictor stepped by TK;
* the flush of IF and ID on a misprediction;
* the counters of cycles, branches and mispredictions.

These are choices made here, because the reference is silent or ambiguous:

* the BTB organisation and size, the memory size, the synchronous read and
  the program-load port;
* the instruction format and the EXIT instruction;
* the one-cycle restart handshake and the exception vector;
* the `addr_drv` flag.
* The BTB entry is created for the branch in EXE. The reference algorithm
  names the ID-stage PC in one place and the EXE-stage PC in another; EXE is
  where B arrives.
* After a branch predicted not taken turns out taken, fetch resumes at the
  target on the address bus, the same address the CPU side computes.
* On an exception the design restarts at a vector instead of halting.
* The memory exception is reported when the failed fetch reaches EXE (see
  above).
* Branches are counted when they resolve in EXE, rather than when they are
  decoded.
* The CPU takes no stalls: it accepts one instruction every cycle.

The reference also names, without giving any detail, two future
extensions: sending the target only when the BTB lacks it, and letting the
memory decode branches and add the offset itself. Neither is built. With
this RTL the target is sent for every branch resolved in EXE.

## Address bus traffic

Without its own BTB, a memory needs one 32-bit address per fetched
instruction. With this design the address bus carries one value per
resolved branch, plus one per restart. Each branch also costs the B and TK
lines, so a branch costs 34 bits and everything else costs nothing. The
saving therefore depends on how many branches the code has, and hardly at
all on how well they are predicted. A misprediction costs cycles, but no
extra bus traffic.

`tb_bus_traffic` measures this on synthetic loop programs. The programs have
the dynamic branch densities of six media benchmarks: adpcm, epic, g721,
gsm, jpeg and mpeg2, with 6–18 % of instructions being branches. A second
series keeps one density and adds data-dependent branches, which lowers the
BTB accuracy from about 90 % to 70 %. Results of one run:

| program | branches | BTB accuracy | address bits, plain memory | address bits, this design | saving |
|---|---|---|---|---|---|
| adpcm-like | 8.9 % | 88 % | 478,368 | 45,286 | 90.5 % |
| epic-like | 14.4 % | 86 % | 272,544 | 41,648 | 84.7 % |
| g721-like | 16.2 % | 85 % | 262,848 | 45,184 | 82.8 % |
| gsm-like | 6.3 % | 84 % | 746,848 | 49,638 | 93.4 % |
| jpeg-like | 13.0 % | 88 % | 303,744 | 41,954 | 86.2 % |
| mpeg2-like | 16.5 % | 86 % | 246,304 | 43,280 | 82.4 % |
| mpeg2-like, 0 % coin-flip loops | 16.5 % | 90 % | 237,952 | 41,750 | 82.5 % |
| mpeg2-like, 100 % coin-flip loops | 18.0 % | 71 % | 440,448 | 84,080 | 80.9 % |

Inside the [BTB+IM] module, the BTB still hands the memory one address per
cycle, including the wrong-path fetches after a misprediction. So the
traffic does not disappear: it moves from the shared bus into the module.

The end-to-end test (`tb_aim_system`) is much denser in branches, about one
instruction in three, and includes five exceptions. There the address bus
carries 260 values (8,828 bits) instead of 723 addresses (23,136 bits).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sat_counter` | all 8 state/outcome pairs and the hysteresis of the predictor |
| `tb_imem` | random writes and reads against a model; one-cycle read latency; fault and zero data beyond the memory; writes beyond the memory are ignored |
| `tb_btb_table` | 3000 random lookups and updates of an 8-entry table against a model: hits, index conflicts, targets kept, counter saturation, initial state, reset |
| `tb_btb_fetch_unit` | 5000 random cycles with a rule-based BTB stand-in: next-address priority, recovery addresses, PRED, BTB update outputs, memory exception only for unflushed faults |
| `tb_auto_imem` | a CPU model in the testbench runs loops, an irregular branch, an always-taken branch and a jump beyond memory; every delivered word carries its own address, so the stream is checked against program order; first instruction in cycle 1 after the start cycle; one memory exception |
| `tb_cpu_flow_ctrl` | a memory model with random predictions and a random program: restart addresses, PC tracking, B/TK/target, flushes, ECPT sources, EXE order and 1/3/4-cycle spacing, EXIT, counters |
| `tb_bus_traffic` | eleven synthetic loop programs on the whole system at default sizes: program order, exactly one address-bus value per branch plus the start, saving above 50 %, accuracy falling over the second series |
| `tb_aim_system` | the whole system at default sizes: nested loops, random branches, every exception source once, EXIT; EXE order and timing against a program-order model; address bus used only for restarts and branches; counters; every mechanism seen at least once |

To run one testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_aim_system \
    rtl/aim_pkg.sv tb/tb_aim_system.sv
./obj_dir/Vtb_aim_system +verilator+rand+reset+2
```

Verilator finds the other modules through `-Irtl`. Each testbench runs in
well under a second.

## Known limitations

* No datapath, so no real programs: the testbenches stand in for the
  datapath and decide branch outcomes themselves.
* No return from exceptions (no exception PC is kept).
* The BTB lookup and the next-address choice happen in the same cycle as
  the memory address setup. That path (BTB read, tag compare, address
  multiplexer, SRAM address) is the critical one.
* Verilator reports SYNCASYNCNET on `rst_n` in `aim_system`. It comes from
  the assertions there, which use `rst_n` as a disable condition while the
  flops use it as an asynchronous reset. It does not affect the logic.
