# OMI core: a multithreaded processor where code flows to data

Most processors move data to the code: loads and stores fetch operands into
registers for a fixed instruction stream. This design turns that around.
Memory has no load or store instructions. Each thread instead steers four
*data counters*, which work like program counters for data. Any instruction
reads memory by naming a register that stands for "the word this counter
points at", and writes memory the same way. Control instructions work on
code the way loads and stores work on data: `exec` jumps to code, `fork`
starts code as a new thread, `wait` parks a thread until a data word is
written, and `kill` ends the threads parked on an address. Arithmetic lives
in swappable *operation modules* (OMI sets). A thread can ask for a
different set with `omi N`, and if the core does not carry that set the
thread is handed off to another core.

The RTL is one core with four hardware threads, a code memory, a data memory
and a host port (`omi_system`). It issues one instruction per cycle. There
is no pipeline, so every result is visible to the next instruction of any
thread.

## Registers: general, magic and per-thread

Register specifiers are 5 bits:

| spec  | name      | read                                    | write                 |
|-------|-----------|-----------------------------------------|-----------------------|
| 0-15  | `$0-$15`  | general register, **shared by all threads** | same              |
| 16    | `$rdaddr` | global read counter                     | sets it               |
| 17    | `$rladdr` | loop read counter                       | sets it               |
| 18    | `$wraddr` | global write counter                    | sets it               |
| 19    | `$wladdr` | loop write counter                      | sets it               |
| 20    | `$rd`     | `mem[$rdaddr]`                          | ignored               |
| 21    | `$rl`     | `mem[$rladdr]`                          | ignored               |
| 22    | `$wr`     | `mem[$wraddr]`                          | `mem[$wraddr] <= v`   |
| 23    | `$wl`     | `mem[$wladdr]`                          | `mem[$wladdr] <= v`   |
| 24    | `$cnt`    | loop iteration count                    | ignored               |

The general registers are shared. Forked code segments pass values through
them: the parent sets `$5` and forks, and the child reads `$5`. The four data
counters belong to each thread, just as its pc does. A forked thread starts
with a copy of its parent's counters, so a parent can hand a data pointer to
its child. A thread started by the host starts with all four at zero.
Counters do not move by themselves when memory is read or written. They
move only when written, or when a loop steps them.

So `add $rl, 100, $wl` reads the word at the loop read counter, adds 100 and
stores the result at the loop write counter. It is one instruction.

## Instruction set

| group     | instructions | effect |
|-----------|--------------|--------|
| core      | `mov a,dst`, `set imm,dst` | copy a register or an immediate |
| OMI op    | function `f`, `a`, `b`/imm, `dst` | default set: 0 add, 1 sub, 2 sll, 3 srl, 4 sra, 5 and, 6 or, 7 xor, 8 mod |
| condition | `cmp ncmp gt gte lt lte a, b/imm` | set the thread's flag; if false, squash the next instruction |
| loops     | `l`, `lr`, `lw`, `lrw` | run the next `len` instructions N times or while the flag holds; `lr`/`lw`/`lrw` step the loop read/write counters by signed strides after every iteration |
| flow      | `exec`, `fork`, `wait`, `kill` with an address in a register or an immediate | jump; new thread; sleep until that data word is written; end the threads sleeping on it |
| OMI set   | `omi N` | switch the thread's OMI set; N ≠ 0 migrates the thread off this core |

Comparisons are signed. `mod` is an unsigned remainder (`x mod 0 = x`). Shifts
use `b[4:0]`. An OMI function this core lacks does nothing and pulses
`ev.illegal`.

### Encoding

There is one 96-bit instruction word, `omi_pkg::instr_t`, from MSB to LSB:

```
op[5] dst[5] ra[5] rb[5] b_imm[1] lmode[2] len[8] func[8] rsvd[13] stride_r[16] stride_w[16] imm[32]
```

Operand a is always register `ra`. Operand b is `imm` when `b_imm` is set,
and register `rb` otherwise. Loop trip counts come from `imm` (`LM_IMM`),
from register `ra` (`LM_REG`) or from the flag (`LM_COND`). The
encoding is wide on purpose: every field has its own bits, so decode is a
struct access. `tb/omi_asm_pkg.sv` has one function per instruction form
and serves as a small assembler.

## Loops, $cnt and predication

This is the part most easily misread, so here are the exact rules
(`omi_loop_unit`, `omi_core`):

* A loop instruction at address P with length L makes P+1..P+L the body.
  Each thread has one loop level. A loop instruction inside a body replaces
  the running loop.
* Counted loop with N = 0, condition loop with a false flag, or L = 0: the
  body is skipped and `$cnt` becomes 0.
* Inside the body, `$cnt` is the iteration number, starting at 0. Right after
  the loop it is the number of iterations run. It stays valid until the next
  loop instruction.
* When the last body instruction retires, the loop counters step by their
  strides, once per iteration and also after the last one. If that
  instruction also wrote the counter, the stride is added to the written
  value. Then the thread goes back to P+1 or goes on to P+L+1.
* A condition loop repeats while the flag is true when the body ends. Put
  the condition instruction last in the body, as in
  `lt $7,100 / l cond,2 / sll $7,1,$7 / lt $7,100`.
* A false condition squashes the next instruction of the same thread. A
  loop instruction is never squashed: the condition in front of it is its
  trip test. A condition at the end of a body does not squash anything in
  the next iteration or after the loop.
* `exec` inside a body leaves the loop.

## Threads: fork, wait, kill, migrate

`omi_scheduler` holds four contexts. Each has a state (free, ready or
waiting), a pc, the address it waits on, its OMI set and its flag and skip
bits. Each cycle it picks the next ready thread after the one that issued
last (round-robin).

* `fork` takes the lowest free context. If none is free, the forking thread
  stalls on the fork and tries again on its next turn (`ev.fork_stall`).
* `wait a` parks the thread. Any write to data word `a` makes it ready
  again at the instruction after the wait. The write can come from a thread
  (`$wr`/`$wl`) or from the host. This is the core's cheap free/busy
  synchronisation: a word acts as a mailbox, and writing it is the signal.
  A write in the same cycle as the `wait` issues does not count. Only the
  host can write in that cycle, since the core runs one instruction per
  cycle. Because a wake-up is an edge, not a level, a producer must not post
  to a mailbox before its consumer is parked on it. The example programs
  order their threads so that this holds.
* `kill a` frees every context waiting on `a`. A kill beats a write to the
  same address in the same cycle.
* `omi N` with N ≠ 0 frees the context and pulses `migrate_valid` with the pc
  to resume at and the set requested. Loop state is not carried.
  Whatever sits above the core (another core, an OS) is responsible for
  resuming the thread.
* There is no halt instruction. A thread that has finished parks itself on
  a `wait` that is never satisfied, or it is killed.

## Top level and timing

`omi_system` ports, all synchronous to `clk`, with asynchronous active-low
`rst_n`:

* `prog_we/prog_addr/prog_data`: write one instruction into code memory.
  Code memory is not reset, so load every word a program can reach.
* `host_we/host_addr/host_wdata/host_wready`: write a data word. A core
  write takes the port first. The host write is done in a cycle where
  `host_wready` is high, so hold it until then. `host_rdata` is an
  asynchronous read at `host_addr`. Data memory is not reset.
* `start_valid/start_pc/start_ok`: start a thread in a free context.
* `migrate_*`, `busy` (a thread is ready), `active` (a context is in use),
  `thread_state`, and `ev`, a struct of one-cycle event strobes: retire,
  squash, forked, fork_stall, sleep, wake, kill, loop_again, loop_exit,
  zero_trip, exec, migrate, illegal, mem_write.

Latency: an instruction is fetched, executed and written back in the cycle
its thread issues. A thread that has k ready peers issues every k+1 cycles.
A waiting thread becomes ready the cycle after the write it waits on. Both
memories read asynchronously. For an SRAM implementation, registered reads
would need a pipeline stage that this design does not have.

Default parameters: 4 threads, 32-bit data, 16 general registers, 256
instruction words, 1024 data words.

## Files

| file | block |
|------|-------|
| `rtl/omi_pkg.sv` | types: opcodes, `instr_t`, thread context, event struct |
| `rtl/omi_system.sv` | top: core, memories, host port |
| `rtl/omi_core.sv` | decode, operand read, execute, next-pc logic |
| `rtl/omi_scheduler.sv` | thread contexts, fork, issue, wait/kill |
| `rtl/omi_loop_unit.sv` | per-thread loop state and `$cnt` |
| `rtl/omi_data_counters.sv` | per-thread data counters |
| `rtl/omi_alu.sv` | default OMI set |
| `rtl/omi_cond.sv` | condition unit |
| `rtl/omi_regfile.sv` | shared general registers |
| `rtl/omi_data_mem.sv`, `rtl/omi_imem.sv` | memories |

Every block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_omi_system.sv` runs the whole system
at its default sizes. It runs a forked pipeline in which stages sleep on
mailbox words: one stage is killed, one migrates, one fork stalls, and the
host wakes the main thread. It counts every mechanism listed above and fails
if one never happens. `tb/tb_omi_core.sv` runs a single-thread program over
the whole instruction set and checks the rate of one instruction per cycle
(82 retired instructions to its final wait).

`tb/tb_omi_aes_pipeline.sv` runs two AES round steps as a forked pipeline,
in the style the architecture was designed for. For each of four 16-byte
blocks, the main thread forks a ShiftRows stage and an AddRoundKey stage,
and they pass the block along through mailbox words. ShiftRows computes
`out[r+4c] = in[r+4((c+r) mod 4)]` in an `lw` loop driven by `$cnt` and
`mod`. AddRoundKey xors with the key in an `lrw` loop. The parked stages
are killed after each block. The results are checked against a reference
model. The four blocks take 739 cycles.

To simulate, for example, the system test:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_omi_system \
  rtl/omi_pkg.sv tb/omi_asm_pkg.sv rtl/omi_*.sv tb/tb_omi_system.sv
./obj_dir/Vtb_omi_system
```

Leaf tests need only `rtl/omi_pkg.sv`, the module and the testbench.

## Departures and open points

The instruction set, the magic registers, the loop forms, the condition
instructions, the flow-control instructions and the default OMI function
list follow the architecture this RTL implements. The following are this
design's own choices, because the architecture leaves them open:

* Everything about encoding, widths and sizes: the 96-bit word, 5-bit register
  specifiers, 16 general registers, 32-bit data, 4 threads, memory depths,
  separate code and data memories.
* Per-thread data counters copied at fork. The alternative reading, one set
  shared by all threads, makes any two threads that both use `$wraddr`
  race each other.
* Both `$wr` and `$wl` are readable and writable. The architecture
  describes `$wl` as reading the word at the loop write address, but pairs
  it with `$wr` as the write register.
* The OMI numbering: functions 0-7 are the eight basic operations, and 8 onward
  belong to the module. The architecture's two ranges overlap at 7. `mod` is
  function 8.
* The loop, `$cnt` and predication rules above, the per-iteration stride
  (stated as "each cycle"), signed comparisons, and stall-on-full fork.
* Only the default OMI set is built. A set with a ShiftRows instruction
  (for AES) is mentioned but not specified, so threads that request it
  migrate. The multicore system that would receive migrated threads is not
  part of this RTL.
* No memory-ordering rules are defined. The single-cycle, one-thread-per-cycle
  organisation sidesteps them, and a pipelined version would have to define
  them.
