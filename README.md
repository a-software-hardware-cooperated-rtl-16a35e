# T-POC folding Java core

A stack machine such as the Java Virtual Machine spends a large share of its
instructions moving values: roughly four bytecodes in ten only push a constant
or a local variable onto the operand stack (producers, P) or pop the top of
stack into a local variable (consumers, C). A Java processor can hide that
traffic by *folding*. It issues a run of bytecodes such as
`iload a; iload b; iadd; istore c` as a single register-style operation,
`c = a + b`, in one cycle.

The POC model decides what folds dynamically, by comparing each bytecode with
the group built so far. It does not use a fixed list of patterns. But it can
only fold producers that sit right in front of the operator that uses them. A
compiler often pushes an operand long before its operator, with other
computation in between, and such a producer then issues on its own.

T-POC (tagged POC) fixes this in software. A rescheduler reorders each basic
block so that every operator is preceded directly by its operands. Where an
operand is the result of an earlier group, the rescheduler writes a one-byte
**P' tag** in its place. To the folding hardware a P' tag is just another
producer. Its value is "whatever the earlier group left on the stack", taken
by forwarding from the pipeline or from the top of stack.

The hardware change is therefore small: the decoder recognises one more
opcode. The rest of the work is the POC folding unit and a forwarding network
that a folding pipeline needs anyway.

This repository holds the hardware half: a six-stage, single-issue Java core
with a 4-foldable POC folding unit, a 7-byte instruction queue and P' tag
support. It is written in synthesizable SystemVerilog. The rescheduler is
software. The testbenches carry the programs in both forms: as a compiler
emits them, and rescheduled.

## Example

The running example is a 17-bytecode fragment that computes several
expressions and ends with a compare-and-branch:

    original:     P1 P2 P3 P4 P5 OE1 OE2 P6 P7 P8 OE3 P9 OE4 C1 OE5 OE6 OB1
    rescheduled:  P1 [P4 P5 OE1] [P3 P' OE2] [P7 P8 OE3] [P' P9 OE4 C1]
                  [P6 OE5] [P' P' OE6] [P2 P' OB1]

In the original order POC folding finds only three folded groups, and the body
needs 11 issue cycles. The rescheduled body has five P' tags and 22 bytes
instead of 17 bytecodes. It issues as 8 groups, one per cycle, and gives the
same results. `tb_tpoc_java_core` runs both orders and checks the 3-cycle
saving exactly, with the branch taken and not taken.

## POC types and the folding check

Every bytecode gets one of six POC types:

| type | meaning | examples (this design's assignment) |
|------|---------|-------------------------------------|
| P    | pushes a value from a constant, a local variable or a P' tag | `iconst_*`, `bipush`, `sipush`, `ldc`, `iload*`, `aload*`, P' |
| O_E  | operator executed directly by the datapath | arithmetic, logic, shifts, conversions, compares, array loads |
| O_B  | branch | `if*`, `if_icmp*`, `goto` |
| O_C  | operator needing micro-code | field access, `new`, `checkcast`, `instanceof` |
| O_T  | operator that cannot fold at all | stack shuffles, `iinc`, calls, returns, switches |
| C    | pops the top of stack into a local variable | `istore*`, `astore*` |

The folding unit (`poc_fold_unit`) looks at the first four bytecodes in the
instruction queue. It chains three copies of one rule cell, `poc_fold_check`.
Each cell compares the *combined* bytecode N, which summarises everything
folded so far, with the next bytecode N+1. It returns two things:

* **relation**: FI (foldable) or SI (serial);
* **status**: C (keep checking) or E (stop here).

The combined bytecode then becomes the new N. The rules are:

| N \ N+1       | P       | O_E, O_C | O_B   | O_T   | C      |
|---------------|---------|----------|-------|-------|--------|
| P (run of k)  | P, SI/C | O, FI/C  | FI/E  | SI/E  | FI/E   |
| O_E, O_C      | SI/E    | SI/E     | SI/E  | SI/E  | FI/E   |
| O_B, O_T, C   | SI/E    | SI/E     | SI/E  | SI/E  | SI/E   |

The data types of the two sides must match (int with int, reference with
reference); otherwise the result is SI/E. The issued group ends at the last FI
relation.

Several points in these rules are hard to get right. The cell implements them
as follows:

* **A run of producers is "SI/C".** The producers do not fold with each other,
  but checking goes on in case an operator follows. If one does, the whole run
  folds into it. If the run ends with nothing that consumes it, the design
  issues only the first producer and leaves the rest for the next cycle.
  Issuing the whole run at once would need a multi-push datapath.
* **Producer count.** A run of k producers folds into an operator with n
  source operands only if k ≤ n. When k < n, the missing operands are already
  on the stack; for example `iload; iadd` adds a local variable to the top of
  stack. A run folds into a consumer only if k = 1.
* **Operator + consumer ends the group (FI/E).** Once the result goes to a
  local variable, nothing further can use it.
* **O_E and O_C are treated alike** for folding. An O_C bytecode folds, then
  traps at execution, because this core has no micro-code (see below).

With these rules the group boundaries of the example come out exactly as
listed above, in both orders.

The POC type of each opcode is not listed per opcode by the model. The table
in `poc_classifier` is this design's own assignment, derived from the JVM
specification. That includes `iinc` as O_T, and `pop` and `dup` as O_T.

## P' tags and result identification

The P' tag uses opcode `0xCB`, which the JVM leaves unused; the constant is
`OP_PTAG` in `poc_pkg`. It is classified as a producer of width one whose
source is "data forwarding or top of stack". The folding rules therefore need
no new case for it.

The decoder (`tpoc_decoder`) turns a group into one operation. It tracks the
stack depth `sp` as the issued groups see it, which lets it compute every
stack access statically. The **identification number** of a result is simply
the stack slot it will occupy. Later groups name their stack operands by slot
number, and the operand-read stage compares those numbers with the
destinations in flight.

The operand order inside a group is the key convention. Take a group with an
operator of n sources and k folded producers:

* sources 0 … n−k−1 are values already on the stack (the deepest first);
* sources n−k … n−1 are the producers, in program order;
* a P' tag denotes a pending result. The **last** P' of a group is the top of
  stack (`sp−1`), the P' before it is `sp−2`, and so on. Implicit stack
  operands lie below all the P' slots.

This ordering is what the rescheduler must produce. It matches the example,
where `[P' P' OE6]` combines the older result (EFG(2,1), deeper) as the
first operand with the newer one (EFG(3,1), on top) as the second.

A P' tag that ends up alone in a group, with nothing to fold into, moves the
top of stack onto itself. It issues as an ordinary group with no other effect.

### Rescheduled code and foldability

Slot numbers are counted from the top of the stack *within a group*. A
rescheduled program is therefore only correct on a core whose folding
window produces the same groups the rescheduler planned. Suppose code written
for foldability 4 contains `[P3 P' OE2]` and runs on a 2-foldable core. There
`P3` issues alone and pushes its value, and the P' that follows then names
`P3`'s value instead of the older result. The rescheduler must target the
foldability of the core it feeds, which is the model's own arrangement: it
uses the N-foldable POC check as its kernel.

With a smaller N an operator cannot take all of its operands in the group. The
operands it leaves out must already be on the stack, below the slots its P'
tags name. A constant or variable among them is pushed on its own at its
original place. Given that choice, the testbench's rescheduler model picks,
for each operator, how many operands to fold so that the fewest groups
result. For example, at N = 3 it drops a P' to make room for the store in
`[P op C]`.

## Pipeline

`tpoc_java_core` follows the six stages F D R E C W:

| stage | what happens |
|-------|--------------|
| F | `instr_queue` holds 7 bytes of bytecode. It is refilled to full every cycle from `bytecode_mem` through seven read ports, and it splits its head into up to four classified bytecodes. |
| D | `poc_fold_unit` picks the group. `tpoc_decoder` builds the operation: ALU function, two operands, destination (stack slot or local variable), branch target and new `sp`. |
| R | Two `pid_forward` muxes fetch the operands, taking the nearest in-flight result with a matching slot or variable: E first, then C, then W. Otherwise they read the stack file or the local-variable file (`word_regfile`, with write-through). |
| E | `exec_unit`: integer ALU and branch condition. A taken branch, a `return` or a trap flushes F, D and R and restores `sp`. |
| C | No data-cache operation runs, so this stage only carries the result. |
| W | The result is written to the operand-stack file (64 words) or the local-variable file (256 words). |

One group issues per cycle. Every pending result is forwarded, so there are no
data stalls. A taken branch costs the groups that were already fetched behind
it.

The model prescribes forwarding from E over C, then the top of stack. This
design also forwards from W. A value written in W is also visible through the
files' write-through, so the W path only makes the priority explicit.

`perf` counts the following: cycles, groups, bytecodes issued (P' tags
included), folded groups, P' tags, stack push/pop bytecodes executed and how
many of them were folded, operands supplied from E, C, W and from the files,
and taken branches.

## What executes and what traps

The datapath is 32-bit integer. It executes:

* int and reference constants and loads (`aload` treats a reference as a word);
* stores;
* `iadd isub imul iand ior ixor ishl ishr iushr ineg i2b i2c i2s`;
* the int compare-with-zero and compare-two branches, and `goto`;
* `iinc`, `pop`, `dup`, `nop`;
* `return`, which halts the core.

All other bytecodes are still classified and folded correctly. When one
reaches E, the core stops with `trapped` set, and `trap_pc` / `trap_op` give
its address and opcode. The same happens to an operator with more than two
sources (array stores). A trap is where a complete processor would fall back
to micro-code or software.

## Interface

`tpoc_java_core #(FOLD=4, QBYTES=7, IMEM_BYTES=4096, LV_WORDS=256)`:

* Hold `start` low and write the program byte by byte with `imem_we`,
  `imem_waddr` and `imem_wdata`.
* Raise `start`. Execution begins at address 0.
* `halted` rises at `return` or at a trap.
* Local variables can be read back at any time through `dbg_lv_addr` and
  `dbg_lv_data` (combinational).
* `sp` is the decoder's stack depth.
* Reset is asynchronous and active low.

FOLD is the foldability. The model's main configuration is 4 with a 7-byte
queue, and it also evaluates 2 and 3. The fold unit supports 1 to 4. QBYTES
may be raised up to 15, the limit of the queue's byte count.

## How far it can be trusted

Every module has a self-checking testbench. Each testbench was also run
against a copy of its module with one deliberate bug, and that run fails.

The core is tested three ways:

* **`tb_tpoc_java_core`** (runs at full size, with default parameters):
  * the example in both orders, with the branch taken and not taken: results,
    groups, P' count and the 3-cycle saving. Of the body's ten pushes and
    pops, 6 fold in compiler order (P1, P2, P3 and P6 issue alone) and 9 once
    rescheduled (only P1 alone);
  * a loop with `iinc` and backward branches (sum 1..12 = 78, 13 taken
    branches);
  * a trap on `getfield`.

  It also requires every mechanism to occur at least once: folded groups, P'
  tags, forwarding from E, C and W, file reads, taken branches, halts and
  traps.
* **`tb_tpoc_workload`** runs 60 random straight-line integer basic blocks,
  of 16 and of 64 bytecodes, on cores of foldability 4, 3 and 2. Each block
  runs in compiler order and in T-POC order. The rescheduled form is produced
  by a small model in the testbench, for each foldability (see "Rescheduled
  code and foldability" above). Both forms are checked against a stack-machine
  interpreter. The rescheduled form must also hit the predicted numbers of
  groups, P' tags and folded push/pop bytecodes exactly, and never be slower.
  On these blocks the figures are as follows. "Issued per cycle" counts the
  program's own bytecodes, not P' tags; "pushes/pops folded" is the share of
  P and C bytecodes that issued inside a larger group.

  | foldability | compiler order: issued per cycle | pushes/pops folded | rescheduled: issued per cycle | pushes/pops folded |
  |---|---|---|---|---|
  | 4 | 2.2 | 87 % | 2.7 | 100 % |
  | 3 | 2.1 | 83 % | 2.2–2.3 | 89 % |
  | 2 | 1.5 | 55 % | 1.5 | 55 % |

  These figures describe random expression blocks without branches, not
  Java programs.

* The unit testbenches compare the classifier with hand-written tables, the
  fold unit with a software model of the rules at FOLD 4, 3 and 2, and the
  queue with a byte-exact model under random consumption and redirects.

Limits:

* Only straight-line blocks and simple loops were run. Real Java programs
  need calls, objects, long and floating-point arithmetic and exceptions,
  which trap here, so no benchmark program runs on this core.
* Both the folding statistics and the test programs' groupings follow the
  rules described above. A different reading of the producer-count rule would
  change the groupings.

## Departures from the model

* The T-POC rescheduler is not hardware and is not included. Programs must
  arrive already rescheduled.
* The test model of the rescheduler handles expression trees in straight-line
  code only.
* O_C bytecodes, which need micro-code, and every bytecode outside the
  integer subset trap instead of executing. There is no data cache, so the C
  stage is empty.
* The instruction queue is refilled to full each cycle, as if instruction
  supply were ideal, and there is no instruction cache.
* The per-opcode POC type table, the producer-count limits, issuing only the
  first bytecode of an unfolded producer run, the P' opcode value, the P'
  slot order, forwarding from W, the register-file sizes and the branch
  handling are this design's own choices.
* The folding table marks operator + consumer as continuing, but the model's
  own worked example ends the check there. This design ends it.

## Simulating

Compile `poc_pkg.sv` first, then the other RTL files, then one testbench:

    verilator --binary --timing -Wno-fatal -j 8 \
        rtl/poc_pkg.sv $(ls rtl/*.sv | grep -v poc_pkg) \
        tb/tb_tpoc_java_core.sv --top-module tb_tpoc_java_core
    ./obj_dir/Vtb_tpoc_java_core

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. All of them finish in a few seconds to about a minute.

| testbench | covers |
|-----------|--------|
| `tb_tpoc_java_core` | whole core at default parameters, example and mechanisms |
| `tb_tpoc_workload` | random 16- and 64-bytecode blocks, original and rescheduled |
| `tb_poc_classifier` | POC type, length, operands of every opcode |
| `tb_poc_fold_check` | each cell of the folding table, type mismatch |
| `tb_poc_fold_unit` | group choice against a reference model, FOLD 4/3/2 |
| `tb_instr_queue` | refill, consumption, redirect, window validity |
| `tb_bytecode_mem` | seven read ports, write port |
| `tb_tpoc_decoder` | operand slots, P' order, destinations, sp, traps, flush |
| `tb_pid_forward` | forwarding priority and sources |
| `tb_exec_unit` | ALU functions and branch conditions |
| `tb_word_regfile` | reset, reads, write-through |

## Files

`rtl/poc_pkg.sv` holds the shared types. These are the POC and data type
enums, the decoded-bytecode record `dec_t`, the group record `fgrp_t`, the
operation record `uop_t` and the counters `perf_t`, together with the
constants (`MAX_FOLD`, `IQ_BYTES`, `OP_PTAG`). The top is
`rtl/tpoc_java_core.sv`. Each module's opening comment describes its
interface and timing, and says what follows the model and what is this
design's choice.
