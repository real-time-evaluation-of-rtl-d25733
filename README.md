# nMPRA-MT: a five-stage pipeline with per-task hardware contexts

nMPRA-MT is a processor for hard real-time work. Its aim is that switching
between tasks costs nothing and adds no jitter. It does not save and restore
registers in software. Instead, every piece of state a task has in the
pipeline exists once per task:

- the program counter;
- the general-purpose register file;
- each of the four pipeline registers.

A hardware scheduler, the nHSE, names the active task every cycle. Only that
task's copies are read and updated. When a higher-priority task becomes
ready, the next cycle simply works on its copies. The instructions the old
task had in flight stay in its own pipeline-register copies and carry on
when it runs again. Nothing is flushed and nothing is saved.

This RTL is a synthesizable SystemVerilog model of that architecture, with
16 task contexts. It follows the published block structure of nMPRA-MT. The
instruction set, register map, memory sizes and hazard policy are this
design's own; those choices are listed under "Where this model departs or
chooses".

## The pipeline and its task copies

```
          tid (from nHSE, set on the falling edge)
            |      |           |          |           |          |
   PC[t] -> IMEM -> IF/ID[t] -> ID + RF[t] -> ID/EX[t] -> EX (ALU) -> EX/MEM[t] -> MEM -> MEM/WB[t] -> WB -> RF[t]
                                                        forward unit   data memory / nHSE window
                                   hazard unit                          + mux after the memory
```

- **Storage.** `pc_bank`, `regfile_bank` and four `pipe_reg_bank`
  instances hold NTASKS copies each. Reads are combinational from the copy
  of `tid`. Writes happen on the rising edge, into the copy of `tid` only.
- **One task at a time.** In a given cycle all five stages belong to the
  same task. The stages are its IF, ID, EX, MEM and WB, read from its
  copies. Forwarding and hazard detection therefore only compare
  instructions of one task.
- **No task ready.** When no task is ready, `run` is low and no copy
  changes.
- **Fine-grained mode (MT_EN = 1).** The scheduler alternates cycle by
  cycle between the two highest-priority ready tasks. Each one then issues
  one instruction every two cycles.

Stage by stage:

| stage | work |
|---|---|
| IF  | Fetch at the task's PC from the shared instruction memory. |
| ID  | Decode (`idecode`) and read the task's register bank. A value written by WB in the same cycle is passed straight through. |
| EX  | The ALU works on operands chosen by `forward_unit` (EX/MEM first, then MEM/WB). Branches (`beq`, `bne`) and jumps (`j`, `jal`, `jr`) resolve here. A taken one turns the task's IF/ID and ID/EX copies into bubbles. There is no delay slot, so the cost is 2 of the task's own cycles. |
| MEM | `mem_protect` checks the access. It then goes to `data_memory`, or to the nHSE register window when `addr[31] = 1`. `wb_mux` sits *after* the memory and picks the memory data, peripheral data or the ALU result. MEM/WB therefore holds a single word. |
| WB  | Write the task's register bank. |

Load-use hazards: `hazard_unit` holds the task's PC and IF/ID for one cycle
and puts a bubble into ID/EX. The loaded value is then forwarded from
MEM/WB.

## The scheduler (nHSE) and its timing

The nHSE changes state on the **falling** clock edge. The pipeline uses the
**rising** edge. So the task id is settled half a cycle before the pipeline
uses it. On each falling edge the nHSE does four things, in order:

1. ORs the event lines `ev_in` into the pending-event set.
2. Applies the register-window write that the MEM stage completed at the
   previous rising edge. It keeps a one-entry request register for this.
   Because of that request register, a store that makes its own task wait
   is never repeated when the task resumes.
3. Wakes every waiting task whose wait mask meets a pending event, and
   clears those events.
4. Picks the ready task with the lowest index (task 0, HT0, has the highest
   priority). In MT mode it alternates between the first and the second
   ready task.

Timing that follows from this:

- An event is seen at the first falling edge after it arrives.
- If it wakes a task of higher priority, that task owns the pipeline from
  the very next rising edge.
- In simulation, a program that waits and then stores to `GPIO_OUT` shows
  the new pin value 3 cycles after the sampling edge. This held for every
  event phase tried, so the response has no cycle jitter.
- `ev_in` is sampled without a synchronizer. On silicon, an asynchronous
  source needs one in front of it.

### Register window (`addr[31] = 1`, offset `addr[7:0]`)

| offset | name | access |
|---|---|---|
| 0x00 | GPIO_OUT | read/write, any task |
| 0x04 | GPIO_IN | read |
| 0x08 | TASK_EN | read/write, HT0 only; bit 0 stays 1 |
| 0x0C | WAIT | write: the writing task waits for any event in the mask `wdata`. Read: pending events. |
| 0x10 | MT_EN | read/write, HT0 only |
| 0x14 | TID | read: id of the task reading it |
| 0x18 | FAULT | read: one sticky write-protection fault bit per task. Write (HT0 only): 1 clears the bit. |
| 0x1C | EVT_PEND | read |
| 0x80 + 8i | WIN_BASE of task i | HT0 only |
| 0x84 + 8i | WIN_LIMIT of task i (inclusive) | HT0 only |

After reset only HT0 is enabled. HT0 is also the only task whose writes to
the configuration registers take effect. Writes from other tasks are
dropped silently.

## Task classes and memory isolation

- **Tasks.** Tasks 0 to NHT−1 (default 0–7) are hard threads (HT). The
  rest are soft threads (ST).
- **Data memory.** There are two arrays. The HT memory occupies bytes
  `[0, 4·HT_WORDS)`. The common ST memory occupies the next `4·ST_WORDS`
  bytes.

`mem_protect` enforces these rules:

- HT0 may access everything.
- The other HTs may read anywhere. They may write only inside their window
  `[WIN_BASE, WIN_LIMIT]`.
- STs cannot read or write the HT memory. They write the common memory
  freely.

A refused write is dropped. A refused read returns 0. Either one sets the
task's FAULT bit.

## Instruction set

32-bit MIPS-I encodings, no delay slots:

- R-type: `add addu sub subu and or xor nor slt sltu sll srl sra jr`
- I-type: `addi addiu slti sltiu andi ori xori lui lw sw beq bne`
- J-type: `j jal`

Other details:

- Only whole aligned words are accessed.
- Unknown encodings execute as NOPs.
- After reset, task *i* starts at byte address `i · (IMEM_WORDS/NTASKS) · 4`.
- Calls use `jal`/`jr` with a stack kept in software, so nesting depth is
  limited only by memory. Six levels of a recursive function with 8-byte
  frames need 48 bytes of stack per task.

## Parameters (top `nmpra_mt_top`)

| parameter | default | meaning |
|---|---|---|
| NTASKS | 16 | task contexts; the architecture was evaluated with 4, 8 and 16 |
| NHT | 8 | tasks 0..NHT−1 are hard threads |
| NEVT | 8 | external event lines |
| IMEM_WORDS | 1024 | instruction memory, shared |
| HT_WORDS / ST_WORDS | 1024 / 1024 | HT memory / common ST memory |

Size grows linearly with NTASKS. Per task, that means 32 registers, one PC
and about 370 bits of pipeline registers.

## Where this model departs or chooses

- **One clock.** nHSE logic runs on the falling edge of the CPU clock. The
  published FPGA prototype instead used a second clock, shifted by 240° with
  33 % duty, from a clock manager. That clock manager is not modelled.
- **No-stall claim.** With two tasks interleaved, the published description
  says the pipeline never stalls. In this model each task keeps its own
  pipeline copies, so interleaving halves each task's rate. A load-use pair
  still costs its task one bubble, and a taken branch still costs 2 of its
  cycles.
- **Not specified by the architecture, chosen here:**
  - the instruction set;
  - the register map;
  - the event/WAIT mechanism;
  - fixed priority by task index;
  - which two tasks MT mode pairs;
  - the ST access rules;
  - one write window per task;
  - memory sizes and start addresses.
- **Not built.** Synchronization and communication between tasks, apart
  from events.
- **Register file at reset.** The registers themselves are not reset. A
  reset-cleared valid bit per register makes them read 0 until first
  written.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

`tb_nmpra_mt_top` runs the whole processor at its default size. Three tasks
run real programs, built with the encoders in `tb/nmpra_asm_pkg.sv`:

- HT0 configures the scheduler. It then runs a summing loop, a load-use
  pair, a call/return and a GPIO read. It then waits for events four times,
  switches on MT mode, waits again and reads FAULT.
- An HT writes inside and outside its window.
- An ST probes the HT memory and a privileged register.

The test checks:

- the memory results;
- the refused accesses;
- the fault bits;
- that the event response has no cycle jitter;
- that each of these happened at least once: stall, flush, forwarding,
  task switch, MT interleave, protection fault, wake-up, peripheral read.

It takes about 500 cycles.

`tb_nmpra_workloads` builds the processor with 4, 8 and 16 contexts. Each
build runs a recursive function nested six levels deep in two tasks, which
MT mode interleaves cycle by cycle. The test checks the results, the stack
frames and the restored stack pointers. It also checks that the run takes
the same number of cycles (228) in all three builds.

Simulating with plain Verilator, for example the top:

```
verilator --binary --timing -Irtl rtl/nmpra_pkg.sv tb/nmpra_asm_pkg.sv rtl/*.sv \
  tb/tb_nmpra_mt_top.sv --top-module tb_nmpra_mt_top -o sim && ./obj_dir/sim
```

For a unit test, list `rtl/nmpra_pkg.sv`, the block's file and
`tb/tb_<block>.sv`. The simulator has two states only. The testbenches
therefore clear the data memories themselves, and the instruction memory is
loaded through the `imem_*` port while reset is held.
