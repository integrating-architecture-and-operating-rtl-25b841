# A multiprocessor with a hardware monitor for process communication

This RTL implements the multiple processor organization described in G. J. Nutt,
*Integrating Architecture and Operating Systems*. The main idea is to move two
operating-system services out of kernel software. Address relocation goes into the
processors' memory path. Interprocess communication goes into a dedicated engine, the
**Processor Interface (PI)**. The PI owns all the state that communication needs: process
identities, rights, interrupt addresses, accept flags and message queues. It keeps this
state in a memory module that no other unit interprets. It executes the communication
instructions one at a time, so it acts like a monitor in hardware: mutual exclusion comes
for free, and no rights check depends on kernel code that could be overwritten.

In the original, the processors and the PI are microprogrammed bit-slice machines. Here the
PI's algorithms are a hard-wired state machine. The processors stay outside the RTL, because
no instruction set is given for them. Their memory and interrupt connections are ports of the
top module.

## Organization

```
   M_0 ... M_{n-1}    M_n ... M_{2n-2}    M_{2n-1}
    |  \      |  \        |        |        |    \
    |   +-----+---+-------+--------+--------+-----+---- shared memory bus ---- IOP
    |         |                                    |
   P_0 ...  P_{n-1}                                PI   (private paths drawn vertically)
```

* **n processors, 2n memory modules** (`mem_module`). Every module has two ports: a private
  port and a bus port.
  * Processor `P_j` has a private path to `M_j`, where its programs normally live.
  * `M_n..M_{2n-2}` are shared (operating system code, overflow segments). They have no
    private path.
  * `M_{2n-1}` belongs to the PI. The PI reaches it over its own private path. The
    processors reach it only over the bus.
* **Shared bus** (`shared_bus`). It has n+1 masters: the processors and the I/O processor
  (IOP). It can reach any module, carries one reference per cycle, and arbitrates round
  robin (`rr_arbiter`). Read data returns one cycle after the grant.
* **Processor memory port** (`proc_mem_port`), one per processor. It relocates each
  reference (`reloc_unit`) and looks at the module number of the physical address. If the
  number is the processor's own module, the reference takes the private path. Otherwise it
  takes the bus.

A physical address is `{module number, word}`, with `$clog2(2N)` bits for the module and
`AW` bits for the word. By default 3 + 10 of the 16 address bits are used.

## Relocation

Each processor has four relocation registers: `BASE1`, `LEN1`, `BASE2` and `MODE`. The
registers cover the strategies the design allows for a process that does not fit in its own
module:

| MODE | physical address | fault |
|---|---|---|
| `RELOC_ONE_SEG` | `BASE1 + la` | `la >= LEN1` (bound check) |
| `RELOC_TWO_SEG` | `la < LEN1` ? `BASE1 + la` : `BASE2 + (la - LEN1)` | never |
| `RELOC_ABSOLUTE` | `la` | reference not privileged |

* Two-segment mode puts the first `LEN1` words of a program in the processor's own module
  and the rest in contiguous words of a shared module.
* One-segment mode may also span adjacent modules. The port routes each word by its own
  module number.
* Absolute addressing exists so that privileged code can reach `M_{2n-1}`, for example to
  write a PI call.
* Relocation takes two cycles. The original puts the cost of firmware relocation at about
  two microcycles.

## Process communication

### Rights come from ID bits

Every process (level `i` of multiprogramming on processor `j`, written `(i,j)`) has an
`H`-bit **ID**. The rights follow from the bits (`id_rights`):

* **Cooperation:** two processes may cooperate when their IDs share a set bit. This
  relation is symmetric.
* **Privilege:** `a` has privilege over `b` when they cooperate and every bit of `b` is also
  set in `a`. This relation is a partial order, and it is the hierarchy of the system.
* **Loading an ID:** a process may load an ID only with bits it has itself, and only into a
  process over which it has privilege. No two processes may hold the same ID.

Example with H = 4:

| process | ID |
|---|---|
| (0,0) | 1111 |
| (0,1) | 1100 |
| (1,0) | 0011 |
| (0,2) | 0001 |

* (0,0) has privilege over everyone.
* (0,1) can talk only to (0,0).
* (1,0), (0,2) and (0,0) can all talk to each other.
* (1,0) has privilege over (0,2).

A process names its receiver by loading the receiver's ID into its own **S** register.

### Two kinds of message

| | PREEMPT (active) | SIGNAL (passive) |
|---|---|---|
| right needed | privilege | cooperation |
| receiver must have | `PA` set | `PA` and `CA` set |
| receiver restarts at | address given by the sender | receiver's own `INT` |
| receiver's PC saved at | `J + j'` in `M_{2n-1}` | `K + j'` in `M_{2n-1}` |
| flags cleared on delivery | `PA` | `PA`, `CA` |

On delivery:

* The receiving processor is interrupted at the end of its current instruction.
* It gets the sender's A-register.
* The sender's `PA` is set.

`PA` and `CA` act as binary semaphores: a process closes them around critical sections.

A message is **queued** in the receiver's FIFO when either of these holds:

* the receiver is not running on its processor;
* its flags are closed.

A queued message is delivered later, when one of these happens:

* the operating system **SCHEDULEs** the receiver;
* the receiver reopens its flags with **SET_ACCEPT**.

Only the head message can be delivered, and only if the receiver's flags accept its kind.
Delivery closes `PA`, so one message goes out per opportunity.

### Calling the PI

A process calls the PI by storing a **call word** in its processor's mailbox `I + j` in
`M_{2n-1}`. It uses a privileged absolute write over the bus. The PI watches writes on that
module's bus port and serves waiting mailboxes round robin. It reads the call, executes it,
and pulses `done[j]` with a status. This pulse is the instruction-complete interrupt: the
calling processor waits for it.

Call word (`mp_pkg::pi_call_t`):

| bits | 31:28 | 27:24 | 23:16 | 15:0 |
|---|---|---|---|---|
| field | opcode | target level i' | target processor j' | operand |

| opcode | effect | status |
|---|---|---|
| `OP_PREEMPT` (1) | preempt the process whose ID equals the caller's S; new PC = operand | DELIVERED, QUEUED, DENIED, NOTFOUND, QFULL |
| `OP_SIGNAL` (2) | signal the process whose ID equals S | same |
| `OP_SCHEDULE` (3) | level `operand` now runs on the calling processor; return its ID, S and INT for the processor to restore; deliver the head of its queue if accepted | OK, DELIVERED, BADCALL |
| `OP_LOAD_ID` (4) | ID of (i',j') := operand, with the checks above | OK, DENIED |
| `OP_LOAD_S` (5) | own S := operand | OK |
| `OP_LOAD_INT` (6) | own INT := operand | OK |
| `OP_SET_ACCEPT` (7) | own PA := operand[1], CA := operand[0], then try the queue | OK, DELIVERED |
| `OP_READ_REG` (8) | return own descriptor word operand[1:0] in `done_data` | OK |

A caller whose processor has no scheduled process gets `ST_BADCALL`.

### What the PI keeps in `M_{2n-1}`

| words | content |
|---|---|
| `Q = 0 .. L-1` | queue space: `QENT` two-word message entries, free ones on a free list |
| `L .. L+4mn-1` | one four-word descriptor per process; (i,j) at `L + 4(i*n + j)` |
| `K .. K+n-1` | PC of `P_j` saved by a signal |
| `J .. J+n-1` | PC of `P_j` saved by a preemption |
| `I .. I+n-1` | mailbox of `P_j` |

The bases are `L = 2*QENT`, `K = L + 4mn`, `J = K + n` and `I = J + n`. With the defaults
(n = m = 4, `QENT` = 32) this gives L = 64, K = 128, J = 132 and I = 136.

Descriptor, one word per line:

```
word 0   ID                                   [H-1:0]
word 1   S                                    [H-1:0]
word 2   PA [31] | CA [30] | Q.Length [15:0]
word 3   Q.Link [31:16] | INT [15:0]
```

Message entry:

```
word 0   S/P [31] (1 = preempt) | Q.Link [30:16] | sender's A-register [15:0]
word 1   preempt address
```

After reset, the PI spends `I + n` cycles clearing this module and then raises `ready`. It
gives process (0,0) an all-ones ID, so (0,0) is the supervisor from which every other ID is
derived.

### Interrupting a processor

`int_req[j]` stays high, with `int_kind`, `int_pc` and `int_areg`, until the processor
answers. It answers with `int_ack[j]` and presents its old PC on `proc_pc[j]` in that cycle.
The PI then stores that PC in the save word.

## Timing

* **Memory modules:** synchronous, one-cycle read latency.
* **Private-path reference:** 5 cycles from `p_req` to `p_done`: 2 for relocation, 1 to
  route, 2 for the memory.
* **Bus reference:** the same, plus any wait for a grant.
* **PI:** its memory reads take 3 cycles each. A call costs roughly:
  * a register load: about 20 cycles;
  * a preempt or signal: about 3 cycles per descriptor searched for the receiver, plus
    about 12;
  * an enqueue: about 3 cycles per message already queued for the receiver.

## Parameters

Set on `multiproc_top`:

| name | default | meaning |
|---|---|---|
| `N` | 4 | processors. There are 2N memory modules. |
| `M` | 4 | levels of multiprogramming per processor |
| `H` | 4 | ID and S width. Must be at most 16. |
| `QENT` | 32 | message entries in the PI's queue space |
| `AW` | 10 | word address bits per module. `2*QENT + 4*M*N + 3*N` must fit in `2**AW`. |

`mp_pkg` fixes the memory words at 32 bits. Addresses, PCs, `INT` and A-register contents
are 16 bits.

The source gives no numbers for n, m, word width or module size. The defaults above are this
design's choice. H = 4 matches the source's worked example.

## Where this design goes beyond or departs from the source

* **The PI is hard-wired.** In the source it is a microprogrammed bit-slice processor. The
  algorithms are the same.
* **Relocation is hardware.** The source does it in processor microcode. The registers and
  the modes are the ones the source discusses.
* **These are this design's own definitions:**
  * the bit positions of the descriptor and message fields;
  * the second word of a message entry, which holds the preempt address;
  * the call word;
  * the status codes;
  * all handshakes.
* **Queues are FIFO linked lists with a free list.** The source only names ENQUEUE and
  DEQUEUE.
* **Queued messages are also delivered on SET_ACCEPT.** The source delivers them only when
  a process is scheduled. Here, reopening `PA`/`CA` also delivers the waiting head message.
* **LOAD_ID may target an empty slot.** A slot whose ID is 0 may be loaded by any process
  whose own ID covers the new value. Without this, no new ID could ever be created, because
  privilege requires shared bits. LOAD_ID names its target explicitly. It also rejects an ID
  that another process already holds.
* **SCHEDULE hands registers back with the completion pulse.** The authoritative ID, S and
  INT stay in `M_{2n-1}`. SCHEDULE hands them back on `pi_sched_id`, `pi_sched_s` and
  `pi_sched_int`, valid with the completion pulse, for the processor to restore into its own
  registers.
* **The PI keeps the record of what is running.** The level running on each processor is
  kept in PI registers, set by SCHEDULE.
* **The IOP is only a bus port.**

## Verifying and using the RTL

Each module has a self-checking testbench in `tb/`. Each testbench prints one line,
`TB_RESULT checks=N failures=F`:

| testbench | covers |
|---|---|
| `id_rights_tb` | all 4-bit ID pairs, and the worked example |
| `rr_arbiter_tb` | rotation, and a reference model under random requests |
| `mem_module_tb` | random dual-port traffic, and write collisions |
| `reloc_unit_tb` | all three modes against a reference, and the 2-cycle latency |
| `shared_bus_tb` | three masters and four modules, and contention |
| `proc_mem_port_tb` | routing, the 5-cycle private latency, and faults |
| `processor_interface_tb` | every opcode, status, delivery, queueing order, queue full, refusals, and saved PCs |
| `multiproc_top_tb` | the whole system at its default size, end to end. The testbench plays the processors and the IOP. It also counts that the private paths, bus contention, relocation faults, sharing through a shared module, PI delivery, queueing, dequeueing, refusal and simultaneous PI calls all occur. |

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mp_pkg.sv \
          tb/multiproc_top_tb.sv --top-module multiproc_top_tb -Mdir obj
./obj/Vmultiproc_top_tb
```

To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/mp_pkg.sv rtl/multiproc_top.sv
```

Lint reports only unused-bit and reset-style warnings. One of them comes from the bus's
grant assertion, which uses the asynchronous reset as its disable.
