# A superscalar core that checks every instruction by running it twice

A transient fault, such as a particle strike that flips a bit in an adder or in the
issue logic, corrupts one execution of one instruction and then disappears.
Storage can be protected by parity or ECC. The execution datapath and its control
cannot. This core protects them by time redundancy, at little hardware cost, in an
out-of-order machine:

* Every instruction that is about to commit is **reissued**. It is sent to a
  functional unit a second time.
* The outcome of its first execution has been kept in its window entry. The
  second outcome is **compared** with it.
* If they differ, the instruction is treated like a **mispredicted branch**. The
  whole window is flushed and fetch restarts at the faulty instruction. That
  instruction then runs twice again and, since the fault was transient, gets it
  right.

Software never sees the fault. The only cost is the extra trips through the
functional units, which take bandwidth the machine usually leaves idle. Reissues
cannot stall on dependences: by the time an instruction is ready to commit,
everything it depends on has been resolved.

The RTL is a complete core that runs programs. It is written in SystemVerilog-2017
and has testbenches that inject faults and check that none reaches the
architectural state.

## Block map

```
 instr_mem ──► fetch_unit ──► decoder ×WIDTH ──► ruu (register update unit, 64 entries)
    ▲             ▲  ▲                            │  ▲  rename_table, int_regfile
    │   branch_predictor (gshare, BTB, RAS)       │  │
    │             ▲                               ▼  │
    │             └── training at commit ──── func_unit ×NFU  (universal: all ops)
    │                                            load_store_unit (MPORTS ports)
    │                                            result_comparator (in ruu, per unit/port)
    └─ program load                              data_mem (stores written at commit)
```

| file | role |
|---|---|
| `ft_pkg.sv` | instruction set, micro-op, RUU entry states, event counters |
| `ft_core.sv` | top level: wires the blocks below |
| `fetch_unit.sv` | PC, fetches WIDTH words per cycle along the predicted path |
| `branch_predictor.sv` | 4K-counter gshare, 1K-entry 4-way BTB, 8-entry return stack |
| `instr_mem.sv`, `data_mem.sv` | flat always-hit memories standing in for the L1 caches |
| `decoder.sv` | instruction word to micro-op |
| `rename_table.sv` | architectural register to producing RUU entry |
| `int_regfile.sv` | 32 × 64-bit committed registers |
| `ruu.sv` | the window: dispatch, wakeup, select, reissue, check, commit, recovery |
| `func_unit.sv` | universal unit: latency 1, multiply 4, divide 12 |
| `load_store_unit.sv` | load ports: memory read or forwarded store data |
| `result_comparator.sv` | compares first and second outcome |

## Life of an instruction in the RUU

Each entry moves through the states of `rstate_e`. Their order matters: every
state from `S_DONE1` on already holds the first outcome.

```
S_WAIT ─issue─► S_EXEC1 ─┬─────────────────────────────► S_DONE1 ─reissue─► S_EXEC2 ─┬──────────────────► S_DONE2 ─► commit
                         └ load: S_MEMQ1 ─► S_MEM1 ──────┘                           └ REDUNDANT_LOAD=1, load:
                                                                                       S_MEMQ2 ─► S_MEM2 ┘
```

**First pass.** Dispatch takes a whole fetch group or nothing. It renames sources
through the rename table: each source is either ready now or tagged with the RUU
entry that produces it. An entry with both operands ready competes for a free
unit. Select is oldest first. A result is broadcast on the unit's bus. A consumer
woken by a broadcast in cycle *t* can issue in cycle *t+1*. A load first computes
its address in a functional unit and then waits in `S_MEMQ1` for a load port.

**Ready for commitment.** The RUU computes a *ready prefix* from the head. The
prefix runs over entries that have their first outcome (`S_DONE1` or later). It
stops at the first entry that does not, and it stops after a control instruction
whose resolved next PC differs from the predicted one, because everything younger
is on a wrong path. Entries in `S_DONE1` inside the prefix are eligible for reissue.

**Reissue.** A reissue uses the same select logic, the same oldest-first rule and
the same units as first issues. Reissue candidates are the oldest entries in the
window, so in practice they win. A reissued instruction runs on the operand values
it captured at its first issue. Second outcomes are not broadcast: consumers have
already used the first ones.

**Check.** When the second outcome returns, a `result_comparator` compares it with
the held one and the entry moves to `S_DONE2` with a fault bit. What is compared
depends on the instruction:

| instruction | compared |
|---|---|
| ALU, MUL, DIV, LUI | register value |
| store | address and store data |
| load, REDUNDANT_LOAD = 0 | address only |
| load, REDUNDANT_LOAD = 1 | address, then the reloaded data |
| BEQ, BNE, JAL, JR | next PC and link value |

The comparator itself is assumed to be fault free. In silicon it would need to
be hardened; here it is plain logic.

**Commit.** Up to WIDTH entries in `S_DONE2` retire per cycle from the head:

* Retiring entries write the register file and clear their rename mappings
  (only if the mapping still names them).
* At most two stores (`SPORTS`) write the data memory per cycle.
* At most one control instruction commits per cycle. It trains the predictor and
  ends the commit group.

## Recovery: a fault is a misprediction

There is one recovery path, and both events use it:

* the head entry's fault bit is set: the redirect target is the entry's own PC;
* a committing control instruction's next PC differs from the one fetch
  predicted: the redirect target is the resolved next PC.

In both cases the RUU raises `flush_o` and a redirect PC. In one cycle this:

* empties the window;
* clears the rename table;
* drops the work in flight in the functional units and load ports;
* empties the fetch register;
* copies the committed return stack into the speculative one.

Fetch restarts at the redirect PC in the next cycle.

Because nothing is committed before both outcomes agree, the register file and the
data memory are never touched by a faulty result. The faulty instruction itself is
refetched and checked again.

The mechanism this follows also mentions a second recovery scheme, built on the
selective reissue used to repair data misspeculation. That scheme is not built
here. Full flush is simpler, and faults are rare.

## Loads: two variants

A load is an address calculation plus a memory access, and the access is the
slow part. The parameter `REDUNDANT_LOAD` chooses between two variants:

* `REDUNDANT_LOAD = 0` (default). The reissue repeats only the address
  calculation, and only the address is compared. The data memory is assumed to
  be covered by parity or ECC, so its read need not be repeated. Reissued loads
  then cost no load-port bandwidth and leave the window sooner.
* `REDUNDANT_LOAD = 1`. The reissued load also goes back to a load port (states
  `S_MEMQ2` and `S_MEM2`) and the two data words are compared. This protects the
  load path too.

**Memory ordering.**

* A load may not access memory while any older store in the window has an
  unknown address (counted as `mem_waits`).
* Once all older store addresses are known, the youngest older store to the same
  64-bit word forwards its data, counted as `load_forwards`. Forwarding is this
  design's own addition.
* Stores write memory only at commit, after their check.
* A load's result is ready one cycle after the port accepts it.

## Front end and branch prediction

* `fetch_unit` reads WIDTH consecutive words per cycle.
* `branch_predictor` looks at the raw words of the group and predicts each slot:
  * **BEQ/BNE** are taken when the 2-bit counter says taken *and* the BTB holds a
    target. The counter is picked by PC bits [11:0] XOR a 12-bit global history.
  * **JAL** is taken when the BTB hits.
  * **JR** is taken to the top of the speculative return stack when that stack is
    not empty.
* The group is cut after the first slot predicted taken, and fetch continues at
  its target.
* A HALT also cuts the group. Fetch then pauses until a redirect.
* Each slot carries its predicted next PC into the RUU. The RUU compares it with
  the resolved next PC at commit.

Training happens at commit, one control instruction per cycle:

* The counter moves toward the outcome and the global history shifts it in. The
  history is therefore committed history, not speculative history.
* Taken branches and jumps write their target into the BTB: 256 sets × 4 ways,
  with round-robin replacement per set.
* A call is a JAL that writes a non-zero link register. A return is a JR.
* Fetch pushes calls onto, and pops returns from, a speculative return stack.
* Commit does the same on a committed copy. Every flush restores the speculative
  stack from the committed copy.

## Instruction set

This is a small 64-bit integer ISA with 32-bit instructions. Program counters
count words. Data addresses are byte addresses of 64-bit words, and the low three
bits are ignored.

```
[31:26] opcode  [25:21] rd, or store data / first compare register  [20:16] rs1
[15:11] rs2 (register forms)                                        [15:0]  imm16
```

| op | code | meaning |
|---|---|---|
| NOP | 0 | — (also any code above 19) |
| ADD SUB AND OR XOR SLT SLL SRL | 1–8 | rd = rs1 op rs2 (SLT signed, shifts by rs2[5:0]) |
| ADDI | 9 | rd = rs1 + sext(imm) |
| LUI | 10 | rd = sext(imm) << 16 |
| MUL | 11 | rd = low 64 bits of rs1 × rs2, 4 cycles |
| DIV | 12 | rd = rs1 / rs2 signed, 12 cycles; divide by zero gives all ones |
| LD | 13 | rd = mem[rs1 + sext(imm)] |
| ST | 14 | mem[rs1 + sext(imm)] = r[25:21] |
| BEQ BNE | 15 16 | if r[25:21] ==/!= rs1: pc += sext(imm) |
| JAL | 17 | rd = pc + 1; pc += sext(imm) |
| HALT | 18 | stop the core once it commits |
| JR | 19 | pc = rs1 |

Register r0 reads as zero, and writes to it are dropped.

## Parameters and the two machines

| parameter (`ft_core`) | default | meaning |
|---|---|---|
| `WIDTH` | 4 | fetch, dispatch and commit width |
| `RUU_SIZE` | 64 | window entries |
| `NFU` | `WIDTH` | universal functional units |
| `MPORTS` | `WIDTH/2` | load ports |
| `REDUNDANT_LOAD` | 0 | see *Loads* |
| `IMEM_WORDS` | 32768 | 128 KB of instructions |
| `DMEM_WORDS` | 16384 | 128 KB of data |

The defaults are the 4-way machine. The 8-way machine is
`WIDTH=8, NFU=8, MPORTS=4`. Predictor sizes are parameters of `branch_predictor`
(`PHT_ENTRIES=4096, BTB_ENTRIES=1024, BTB_WAYS=4, RAS_DEPTH=8`).

## Using the core

1. Hold `rst_n` low.
2. Write the program through `imem_we_i/imem_waddr_i/imem_wdata_i`. Write the data
   through `dmem_ld_we_i/dmem_ld_addr_i/dmem_ld_data_i`. The memories are not
   reset, so initialise what the program reads.
3. Release reset and raise `start_i`. Fetch begins at PC 0.
4. `halted_o` rises when HALT commits.

While the core runs:

* `cm_*` give the commit trace: per slot, valid, register write, destination,
  value and PC.
* `stats_o` (`core_stats_t`) counts cycles, commits, first issues, reissues,
  detected faults, redirects, RUU-full stalls, busy-unit stalls, forwards, held
  loads, memory reads and taken transfers followed on the predicted path.
* `dmem_dbg_addr_i/dmem_dbg_data_o` read the data memory.
* `inject_i[f]` with `inject_mask_i` arms a one-shot XOR on the next result of
  unit *f*. This is a test hook that models a transient fault. The flip lands in
  the address or next-PC word for loads and control instructions, and in the
  value word otherwise.

## Simulating

Each testbench is self-contained and prints `TB_RESULT checks=… failures=…`.
With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/ft_pkg.sv tb/tb_prog_pkg.sv \
          tb/tb_ft_core.sv --top-module tb_ft_core -o sim && ./obj_dir/sim
```

Replace `tb_ft_core` with any other testbench. The block testbenches need only
`rtl/ft_pkg.sv` and their own file. `-Wno-fatal` keeps the width notes some testbenches raise on mixed-width
arithmetic from stopping the build. In the RTL, the only warnings left are harmless:

* address bits above a memory's size, or below the word, go unused;
* `load_store_unit` has a forwarding flag that the top does not read;
* the commit-rule assertion in `ruu.sv` samples `rst_n`, which is also the
  asynchronous reset.

| testbench | what it shows |
|---|---|
| `tb_ft_core` | full 4-way core at its defaults, details below |
| `tb_ft_core_8way` | the same program on the 8-way machine with `REDUNDANT_LOAD=1` |
| `tb_ruu` | the RUU (16 entries, redundant loads) with a bench-side front end, random programs and random fault injection, against an in-order model |
| `tb_branch_predictor` | every slot's direction and target against a reference model, random traffic, default sizes |
| `tb_func_unit` | every operation, its latency in cycles, busy/ready handshake, fault hook |
| `tb_fetch_unit`, `tb_decoder`, `tb_rename_table`, `tb_int_regfile`, `tb_load_store_unit`, `tb_instr_mem`, `tb_data_mem`, `tb_result_comparator` | unit behaviour against directed and random expectations |

`tb_ft_core` runs a 200-iteration loop kernel. The kernel has loads, MUL and DIV,
stores, a load that must take forwarded data, a store whose address is late, a
call and a return, and a long divide chain that fills the window. The bench
injects a fault into a functional unit every 997 cycles. It then checks:

* every committed instruction against an in-order reference model;
* the arrays in memory and the final sum;
* that each mechanism happened at least once: reissue of every commit, detection
  and recovery of every injected fault, redirects, RUU-full stalls, busy-unit
  stalls, forwarding, loads held behind unknown store addresses, and
  predicted-taken fetch.

Last measured:

| | cycles | commits | faults injected / detected | result |
|---|---|---|---|---|
| 4-way | 22655 | 4896 | 5 / 5 | 14297 checks, 0 failures |
| 8-way, `REDUNDANT_LOAD=1` | 22603 | 4896 | 5 / 5 | 14298 checks, 0 failures |

The kernel's long divide chain makes the IPC low (about 0.2). The kernel was
written to exercise every mechanism, not to measure performance.

## How this departs from the machine it models

* **Caches.** The modelled machine has non-blocking 128 KB 2-way L1 caches and an
  8 MB L2. Here they are flat, always-hit memories of the L1 capacities. Miss
  latencies, blocks and tags are absent.
* **ISA.** The modelled machine runs the Alpha ISA. This core runs the small
  integer ISA above. There are no floating-point registers or units.
* **Storage protection.** Parity or ECC on the register file, the RUU and the
  caches is assumed, not built.
* **This design's own choices** where the source is silent:
  * the number of units equals the width;
  * the units are not pipelined;
  * mispredictions are resolved at commit;
  * one control instruction commits per cycle;
  * the global history is kept at commit;
  * BTB replacement is round-robin;
  * store-to-load forwarding;
  * all-or-nothing dispatch;
  * a full flush on recovery;
  * asynchronous active-low reset.
* **Fault injection.** The injection ports are a verification aid of this design.
