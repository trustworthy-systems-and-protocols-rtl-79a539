# Instruction-level hardware monitors for embedded and multi-core processors

An attacker who hijacks a program, by smashing a stack or injecting code, makes the
processor run instructions the program's binary never contained or in an order it never
allowed. The hardware here catches that one instruction at a time. Before a program
runs, its binary is analysed offline into a **monitoring graph**. The graph has one node
per instruction. Each node lists a small hash of every instruction that may legally come
next. While the program runs, a monitor beside the processor hashes each retired
instruction and checks it against the current node. A match moves the monitor to the
next node. A mismatch is reported to the processor as an attack, with one lookup in the
graph memory per instruction.

One such checker is not enough for a real system. An operating system keeps many tasks
alive and switches between them, and on a multi-core chip it also moves tasks between
cores. The RTL contains two monitors that follow the OS through this:

* **`mthm`**, a multi-task monitor for a single-core embedded processor running a small
  real-time OS. The OS tells it about process creation and context switches through a
  small register interface. It keeps up to four graphs in on-chip memory and loads
  missing ones from an external graph pool by DMA. It also sees the interrupt line, and
  switches by itself to the interrupt handler's graph.
* **`mc_monitor`**, a monitor for a multi-core processor running a full OS. It has one
  checker per core (an *IVSL*, for instruction validation and sequencing logic) and a
  coordinator that handles the OS's commands. A crossbar connects each core's checker to
  the graph memory of the task that core is running. When a task moves to another core,
  its monitoring state moves over an internal bus with it.

The top level, `hwmon_top`, places the two monitors side by side. They serve different
processors and share no signals. They do share the datapath blocks that follow one
instruction.

## The monitoring graph and how it is stored

All graph memories have 32-bit rows. One graph, counted from the start of its slot or
memory, is laid out as follows:

| rows | contents |
|---|---|
| 0–7 | sixteen 16-bit **group base addresses**. Row *r* holds group 2r+1 in bits [31:16] and group 2r+2 in [15:0]. An unused group holds `0xFFFF`. |
| 8 | multi-core monitor only: the **start PC**, the address of the program's first instruction |
| 8 (single-core) or 9 (multi-core) | the **start entry**. Its only successor is the first instruction. |
| after that | the entries, grouped as described below |

An entry is `{next_state[31:16], valid_hash[15:0]}`:

* `valid_hash` has one bit per possible hash value. Bit *h* is set when some legal
  successor of this instruction hashes to *h*. Successors of one instruction must have
  different hashes. The offline graph builder ensures this.
* `next_state` locates the successors' own entries, as described next.

**The hash** of an instruction is the number of ones in its 32-bit word, kept to four bits
(a count of 32 wraps to 0). `hash_unit` computes it and also gives the one-hot form.

**Groups and blocks.** Suppose an entry has *n* bits set in `valid_hash` (its fan-out). Its
successors' entries are stored as a block of *n* consecutive rows in the region of group
*n*, ordered by increasing hash. Group *n*'s region starts at base address *n*. The
`next_state` field is the block's number within its group. When the instruction with the
*k*-th lowest permitted hash (k counted from 0) is executed, the next entry is at

```
next = base[n] + next_state * n + k
```

`hash_compare` produces the match, *n* and *k*, `base_addr_rf` gives `base[n]`, and
`seq_logic` does the multiply-add. An entry with `valid_hash == 0` marks the end of a
program.

This indexing costs no extra memory: every row holds one real entry. The header of 8 or 9
rows is the only overhead. The price is that the graph builder must number the blocks of
each group densely. The testbench package `tb_graph_pkg` builds such graphs from random
programs. It is an independent reference for the format and a starting point for a real
graph builder.

## Following one instruction

The graph memory reads synchronously. The monitor keeps the read address of the entry it
will need next on its address lines, so the entry is on the data lines when the next
instruction arrives. During the cycle of an instruction:

1. the one-hot hash is compared with `valid_hash` of the current entry;
2. on a match, the sequencing logic's next address drives the memory and is registered
   as the new address pointer;
3. on a mismatch, the attack is flagged (see each monitor below).

One instruction per clock is sustained.

## Single-core multi-task monitor (`mthm`)

### Processor interface

The processor sees six word registers (`reg_addr`):

| addr | register | use |
|---|---|---|
| 0 | ENABLE | bit 0: monitoring on. The processor sets it after an operation finishes. |
| 1 | PID | process ID of the process an operation concerns (5 bits) |
| 2 | GID | graph ID of a new process (5 bits) |
| 3 | OP | writing starts an operation: 1 create, 2 context switch, 3 terminate. The write also turns monitoring off and clears Done. |
| 4 | STATUS | bit 0 enable, bit 1 done, bit 2 error, bit 3 attack seen |
| 5 | IRQ | bit 0: follow interrupts; bits 12..8: graph ID of the interrupt handler |

A context switch is done in three steps:

1. The OS writes PID and then OP=2.
2. It polls STATUS until Done is set.
3. It finishes its own register restore and sets ENABLE.

The monitor then checks the new process's instructions from where it last stopped. When
an attack is found, `recovery` pulses once, one cycle after the offending instruction.
The attack bit is also set, and monitoring stays off until the processor enables it
again.

### Interrupts (`os_event`)

The processor's interrupt line also goes to the monitor (`irq`). The handler's graph must
stay resident; one process created with that graph is enough to keep its slot. While IRQ
bit 0 is set, a rising edge of `irq` starts an internal operation (ENTER):

1. Save the interrupted process's pointer.
2. Select the handler graph's slot and load its base addresses if needed.
3. Follow the handler from its start entry.

`stall` is high from the interrupt edge until the switch is done, about 15 cycles. The
processor must hold its first handler instruction during that time. When the handler
ends, the OS's ordinary context switch (OP 2) returns monitoring to the interrupted
process, at the point where it stopped. Clearing IRQ bit 0 makes the monitor ignore the
line. An illegal instruction inside the handler pulses `cpu_reset` instead of `recovery`,
for the processor's reset pin. A fault there means the system itself is suspect.

### Bookkeeping (`mthm_ctrl`)

* **Process table** (four entries): PID, GID and the saved address pointer of each
  process.
* **Graph slot table** (one entry per slot): the resident GID, the number of live processes
  using it, and a time stamp of the slot's last use. The graph memory has 16K rows,
  divided into four fixed slots of 4,096 rows. Slot *s* starts at row `s*4096`. The
  address pointer is relative to the slot, and a frame adder adds the slot's start
  address before the memory.

The operations:

* **Context switch.**
  1. Save the running process's pointer.
  2. Look up the next process's GID and slot.
  3. If that graph is not the one whose base addresses are loaded, read header rows 0–7
     into the base registers.
  4. Restore the next process's pointer and set Done.

  This takes 13 cycles from the OP write to Done, or 4 cycles when the graph is
  unchanged.
* **Create.** Insert {PID, GID, start pointer} in a free process entry. If the graph is
  resident, count the new process against its slot: Done follows 3 cycles after the OP
  write. Otherwise choose a slot: a free one if there is one, else the least recently used
  slot with no live processes. Then start the DMA.
* **Enter handler.** Used for interrupts (see above). It takes the same 13 cycles as a
  context switch, or 4 without a base register reload. It fails with Error if the
  handler's graph is not resident.
* **Terminate.** Free the process entry and decrement its slot's process count. This is
  what lets a slot become replaceable.

Error (STATUS bit 2) is set with Done in three cases: an unknown PID, a full process table,
or no replaceable slot.

### Graph pool and DMA (`graph_dma`)

The pool is an external memory addressed by {GID, word}. Word 0 of a graph holds its row
count *N*, and words 1…N are its rows. The DMA copies them to rows 0…N−1 of the slot. From
start to done takes *N*+4 cycles. The graph pool itself, and the cryptographic check
that would normally guard it, are outside this RTL.

## Multi-core monitor (`mc_monitor`)

### IVSL states

Each IVSL (`ivsl`) is in one of three states:

* **stopped**: the core runs something that is not monitored, such as the kernel or an
  unregistered task. Instructions are ignored.
* **paused**: a monitored task is selected, but the core is elsewhere. This happens before
  the task's first instruction, and inside a trap or interrupt handler. The IVSL waits for
  the core to reach the task's **resume PC**. That instruction is checked and the IVSL
  becomes active.
* **active**: every retired instruction is checked. An instruction flagged `trap` is the
  first one of a trap or interrupt handler. It pauses the IVSL, and the resume PC becomes
  the last checked PC + 4. Annulled instructions (squashed delay slots) are ignored in
  every state.

When a task reaches an entry with no successors, `job_done` is set and the IVSL stops. On
a mismatch, `discrepancy` is set and the IVSL stops.

Each IVSL keeps a small table (four entries) of {PID, GID, graph pointer, resume PC}. An
entry whose PID is `0xFFFFFFFF` is empty.

### Coordinator

The OS's monitor driver issues one command at a time on the `cpu_*` port: a one-cycle
`cpu_valid` strobe, finished by a `cpu_done` pulse. The coordinator keeps a table of
{PID, GID, core} with eight entries. It turns each command into a 51-bit internal bus word:

| bits | field |
|---|---|
| [31:0] | PID (data) |
| [35:32] | source IVSL |
| [39:36] | destination IVSL |
| [42:40] | command: 1 task init, 2 context switch, 3 stop, 4 retrieve, 5 free |
| [50:43] | GID |

The driver's commands are handled as follows:

| driver command | what happens |
|---|---|
| task init (PID, GID, core) | The entry is recorded. The IVSL makes a stopped entry. The GID is also the number of the graph memory holding the graph. |
| context switch (PID, core), task last on the same core | The crossbar points that core's IVSL at the task's graph memory. The IVSL saves the task it was following, reads rows 0–8 of the graph (base registers and start PC) and restores the task's pointer and resume PC. The task is paused until the core reaches the resume PC. |
| context switch, task last on another core (**migration**) | The coordinator sends *retrieve* {source, destination, PID} and gives the transfer bus to the source IVSL. The source sends three words in order: {resume-valid bit 31, GID in [7:0]}, the resume PC, the graph pointer. It then marks its entry empty. The destination stores the words, performs a context switch on its own and acknowledges. The coordinator then records the new core. |
| context switch to a PID not in the table | The IVSL is told to stop. |
| terminate | The entry is removed here and in the IVSL. |

Counted from the clock edge that samples `cpu_valid` to the edge that raises `cpu_done`,
a context switch takes 14 cycles and a migration 18.

### Attack reporting

Each core has its own interrupt line, `irq[c]`, together with `attack_pid[c]`. Only the
core that ran the bad instruction is interrupted, and its handler knows which process to
kill.

### Crossbar and graph memories

There are two graph memories of 9,472 rows × 32 bits each. Every memory has one read port
per IVSL, so the crossbar (`graph_xbar`) is purely combinational and two cores never wait
for each other. Graphs are written through the `ld_*` port. In a full system a secure
graph loading engine drives that port.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `MT_DEPTH` | 16,384 | rows of the single-core graph memory (14-bit address) |
| `MT_NSLOT`, `MT_SLOT_ROWS` | 4, 4,096 | graph slots |
| `MT_NPROC` | 4 | processes tracked |
| `NCORE`, `NGM` | 2, 2 | cores and graph memories of the multi-core monitor |
| `MC_GM_DEPTH` | 9,472 | rows per multi-core graph memory |
| IVSL / coordinator table | 4 / 8 entries | `IV_NENT`, `CO_NENT` of `mc_monitor` |

Benchmark graphs of about 80 rows fit a single-core slot many times over. Graphs of a
full small OS kernel (over 20,000 entries) fit neither monitor at these sizes. Graphs of
7,800–9,100 entries fit a multi-core graph memory but not a single-core slot. Use
`MT_NSLOT=1, MT_SLOT_ROWS=16384` for one large graph.

After synthesis, the top has about 1,900 word-level cells, 2,400 flip-flops and
1.13 Mbit of memory. The memory splits into 524,288 bits for the single-core monitor and
2 × 303,104 bits for the multi-core one.

## Where this design departs from its source description, and what it leaves out

* **Grouping.** The original description groups graph states by their fan-in. Here an
  entry's successors are grouped by the entry's fan-out, because that is what the hardware
  knows when it forms the next address. The next-address formula itself is this design's.
* **Timing.** The original single-core monitor needed 17 cycles for a context switch and
  17 (under 20) for creating a process. This design needs 13 (4 without a base register
  reload) and 3.
* **Base registers after a graph load.** They are not reloaded at once. They are loaded at
  the next context switch to that graph, which every process goes through before it runs.
* **Identifier widths.** PID and GID are 5 bits on the single-core side. Some of the
  source's signals are 4 bits wide while its example tables use values up to 31.
* **Interrupt stall.** The original adds 6 cycles of stall per interrupt. Here the switch to
  the handler graph reuses the context switch, so the stall is about 15 cycles. The stall
  is its own output rather than the Done bit.
* **Slot placement.** Slots sit at fixed multiples of 4,096 rows rather than at arbitrary
  frame addresses.
* **Migration handshake.** The coordinator ends a migration on the destination IVSL's
  acknowledge. That acknowledge comes after the last record word has been received, not
  merely sent.
* **Not included:**
  * **Trusted functions.** Pausing when an untrusted function calls a trusted one needs a
    graph encoding that is not defined.
  * **System-call graphs.** The interrupt part of OS monitoring is included. Switching
    to a system call's graph, named by a field inside the calling task's graph entries,
    is not. That entry format and the per-category base registers it needs are not
    defined well enough to build.
  * **Outside parts.** The processors, the graph loading engine and the graph pool are
    outside the RTL.
* **Fixed choices.** The single-core register map, the command encodings, the record
  word order, the table sizes and the stopping of the monitor after an attack are fixed
  choices of this design.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/mon_pkg.sv tb/tb_graph_pkg.sv \
    tb/tb_hwmon_top.sv --top-module tb_hwmon_top
./obj_dir/Vtb_hwmon_top
```

| testbench | what it exercises |
|---|---|
| `tb_hwmon_top` | The whole design at its default sizes. Both monitors run at once. It counts every mechanism (task init, context switch, migration, pause on trap, resume, annul, job done, stop, interrupt, terminate; graph load, resident create, switch with and without base reload, LRU replacement, recovery, interrupt following with stall) and fails if one never happened. |
| `tb_mc_monitor` | two tasks on two cores, crossing migrations, completion, an attack on one core |
| `tb_ivsl` | one IVSL through its whole life cycle, including both ends of a migration |
| `tb_coordinator` | the bus words, crossbar selection, grant, table update and interrupts |
| `tb_mthm` | the single-core monitor with five graphs in a pool model, replacement, interrupts and attacks in a task and in the handler |
| `tb_os_event` | the interrupt edge detection, priority of processor operations and the stall window |
| `tb_mthm_ctrl` | exact operation latencies, header reads, the LRU choice and the enter-handler operation |
| `tb_graph_dma`, `tb_graph_mem`, `tb_graph_xbar`, `tb_base_addr_rf`, `tb_seq_logic`, `tb_hash_compare`, `tb_hash_unit` | the building blocks, against values computed in the testbench |

`tb_graph_pkg` generates the random programs and their graphs. Programs use straight-line
code with backward branches, and the testbenches walk legal paths through them. An attack
is an instruction word whose hash the current entry does not allow.

## Files

* `rtl/mon_pkg.sv`: shared widths, the graph entry and internal bus word types,
  the command encodings and the register map.
* Datapath: `hash_unit`, `hash_compare`, `seq_logic`, `base_addr_rf`, `graph_mem`.
* Single-core monitor: `mthm` (top of that monitor), `mthm_ctrl`, `graph_dma`,
  `os_event`.
* Multi-core monitor: `mc_monitor` (top of that monitor), `coordinator`, `ivsl`,
  `graph_xbar`.
* `hwmon_top`: both monitors side by side.
