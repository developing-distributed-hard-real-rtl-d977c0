# Mock Turtle: a multi-CPU core for distributed hard real-time control

Mock Turtle is a block to be dropped into an FPGA design when control
software must react to events with a fixed, known delay, and several nodes of
a network must act in step. Instead of one processor with interrupts and
caches, it gives every task its own small CPU that runs from its own on-chip
memory and polls for work, so the time an instruction sequence takes never
depends on what the other CPUs do. The CPUs meet only where they have to: an
atomic shared memory, message queues to the host computer and to remote
nodes, and a shared peripheral bus. Time comes from White Rabbit (a
sub-nanosecond network time distribution) when it is present, from a local
counter otherwise.

The CPU is uRV, a compact RV32IM RISC-V core with a four-stage pipeline whose
timing is simple enough to reason about by hand: every instruction except a
division or a taken jump completes at one per clock.

This RTL implements the whole core: eight uRV CPUs (by default) with private
memories, the Shared Interconnect crossbar, the Shared Memory with atomic
operations, the Host and Remote Message Queues, per-CPU local registers, and
the host's control and debug registers. It stops at the core's boundary.
The White Rabbit PTP core, the network transport for remote messages, the
user peripherals and the host are outside it and reach it through ports.

## Structure

```
                 host Wishbone slave + interrupt
                              |
                         mt_host_if ----------------- mt_ctrl_regs (reset, pause,
                          |      |                     upload, debug consoles, IRQ mask)
                    HMQ host side |                         |  upload / reset / pause / debug
                          |      v                          v
 CPU 0 .. N-1:  mt_cpu_cb x N  + host ----> mt_wb_crossbar "Shared Interconnect"
   (uRV, private RAM,                         |        |        |        |
    local regs, DP port)                    SMEM      HMQ      RMQ      SP master
                                         (atomic)  (CPU side) (network  (user cores)
                                                               streams)
```

| File | Block |
|------|-------|
| `rtl/mock_turtle_core.sv` | top: core blocks, Shared Interconnect, SMEM, HMQ, RMQ, host side |
| `rtl/mt_cpu_cb.sv` | CPU Core Block: CPU, private memory, I/O bridge, small crossbar, local registers |
| `rtl/urv_cpu.sv` | uRV pipeline |
| `rtl/urv_regfile.sv`, `urv_shifter.sv`, `urv_multiplier.sv`, `urv_divider.sv`, `urv_csr.sv` | pipeline units |
| `rtl/urv_iobridge.sv` | splits CPU data accesses between private RAM and a Wishbone master |
| `rtl/mt_cpu_mem.sv` | private dual-port program/data RAM |
| `rtl/mt_local_regs.sv` | per-CPU time, delay, queue status and debug output |
| `rtl/mt_wb_crossbar.sv` | Wishbone crossbar (used for the Shared Interconnect and inside each core block) |
| `rtl/mt_smem.sv` | shared memory with atomic operations |
| `rtl/mt_mq_slot.sv`, `mt_mq_wb_side.sv`, `mt_hmq.sv`, `mt_rmq.sv` | message queues |
| `rtl/mt_ctrl_regs.sv`, `mt_host_if.sv` | host control/debug registers and host address decoding |
| `rtl/mt_fifo.sv` | small FIFO helper |
| `rtl/mt_pkg.sv`, `rtl/urv_pkg.sv` | bus structs, address maps, opcodes, CSR numbers |

All buses are Wishbone classic single transfers carried as two structs,
`wb_m2s_t` {cyc, stb, we, sel[3:0], adr[31:0], dat[31:0]} and `wb_s2m_t`
{ack, dat}. Every slave in the design answers with a registered ack (one
wait state at least); there are no err, retry or stall signals. Reset is
synchronous and active low everywhere.

## The uRV pipeline

This is the part that needs the most care to change, because the single-cycle
throughput depends on a precise split of work between the stages.

| Stage | Work |
|-------|------|
| F | program counter, instruction memory request; the word arrives one cycle later with `im_valid_i` |
| D | decode, immediates, register file read (the RAM sits beside D), operand selection including the X2 bypass, hazard detection |
| X1/M | ALU, branch decision and target, CSR access, data memory request, shifter and multiplier first halves, divider |
| X2/W | load data alignment, shifter and multiplier second halves, result select, register write |

**Register file.** Two copies of a 32x32 RAM (one per read port), written
together. Read addresses are registered, so data appear one cycle after the
address, which is why the read is issued while the instruction is still in
F/D. A write to a register read in the same cycle returns the new value
(read-after-write bypass).

**Bypasses and interlock.** An ALU result in X2 is selected in D when D reads
that register; an ALU result in X1 is forwarded into X1 itself (D only sets a
flag), which keeps the X2-to-ALU path short. Results of loads, shifts and
multiplications are not bypassed at all: if D needs one while it is still in
X1 or X2, D holds and sends a bubble (the interlock). So:

- dependent ALU instructions run back to back;
- `lw x5,...` followed by `add x6,x5,...` costs two extra cycles, as does a
  shift or multiply followed by its user; one independent instruction in
  between removes one of them.

**Branches.** Branches and jumps are resolved in X1. A taken branch, JAL,
JALR, trap or MRET redirects fetch through a register, so it costs the
instruction's own cycle plus three. A branch not taken costs one cycle, the
same as any other instruction (there is no prediction).

**Division.** With `WITH_DIVIDER = 1` DIV, DIVU, REM and REMU hold X1 for 37
cycles in all (one quotient bit per cycle, sign correction, result), giving
the RISC-V results for division by zero and overflow. With
`WITH_DIVIDER = 0` they raise an illegal-instruction exception so software
can emulate them. MULH, MULHSU and MULHU always trap the same way: the
multiplier computes only the low 32 bits (three 16x16 partial products in X1,
summed in X2).

**Exceptions and interrupt.** Misaligned loads and stores, illegal
instructions, ECALL and EBREAK trap to `mtvec` (direct mode), saving `mepc`
and `mcause`; MRET returns. One external interrupt input (`mie`/`mip` bit 11,
`mstatus.MIE`/`MPIE`) is taken when an instruction is in X1. Implemented CSRs:
mstatus, mie, mip, mtvec, mscratch, mepc, mcause, mcycle/cycle, time and
mimpid; other addresses read zero. The interrupt CSR set is deliberately
smaller than the RISC-V privileged specification. Inside Mock Turtle the
interrupt input is tied low: the CPUs poll.

**Memory buses.** Instructions: `im_addr_o`/`im_rd_o`, answered by
`im_valid_i` with the word. Data: a one-cycle `dm_load_o` or `dm_store_o`
pulse from X1 with address, byte selects and store data; X2 waits for
`dm_load_done_i`/`dm_store_done_i`, so any number of wait states is allowed.
`urv_iobridge` sends addresses below 0x8000_0000 to the private RAM (done one
cycle later) and the rest to a registered Wishbone master. A peripheral
access takes longer than a RAM access: one cycle to register the Wishbone
request, one grant cycle for each crossbar on the way, and the slave's own
wait states.

## CPU Core Block

Each `mt_cpu_cb` holds one CPU, its private memory (default 64 KiB), the I/O
bridge and a one-master crossbar to three places:

| CPU address | Target |
|-------------|--------|
| 0x0000_0000 .. | private program/data memory (size `MEM_SIZE`) |
| 0x8000_0000 | local registers |
| 0x9000_0000 | Dedicated Peripheral (DP) master, private to this CPU |
| 0xA000_0000 | shared memory; bits [18:16] select the atomic operation |
| 0xA010_0000 | Host Message Queue, CPU side |
| 0xA020_0000 | Remote Message Queue, CPU side |
| 0xC000_0000 .. | Shared Peripheral (SP) master |

Local registers (byte offset): 0x00 core number, 0x04 number of CPUs, 0x08
seconds, 0x0C cycles within the second (White Rabbit when `wr_time_valid_i`,
else a local counter rolling over at `CYCLES_PER_SEC`), 0x10 delay (write a
count, it decrements every cycle down to 0), 0x14 HMQ incoming slots
pending, 0x18 RMQ incoming slots pending, 0x1C HMQ outgoing slots full, 0x20
RMQ outgoing slots full, 0x24 debug character (write).

The host uploads and dumps the private memory while the CPU runs: an upload
access takes the memory's data port in a cycle the CPU leaves free. The
control logic can hold each CPU in reset and can pause it; pause withholds
instruction words, so the pipeline drains and waits without losing state.

## Shared Interconnect and shared memory

`mt_wb_crossbar` decodes each master's address against base/mask pairs (the
first match wins; an unmapped access is acknowledged with data 0 so nothing
hangs). Every slave has its own round-robin arbiter, so two CPUs reaching
different slaves proceed in the same cycle. A grant is registered (one cycle)
and covers one transfer: it ends on the slave's ack, so a master cannot keep
a slave by holding `cyc`. The Shared Interconnect has the N CPUs and the host
as masters and SMEM, HMQ, RMQ and SP as slaves.

`mt_smem` performs every access as a read-modify-write inside the slave and
serves one access at a time, which makes each operation atomic against all
masters including the host:

| Address bits [18:16] | Offset | Operation |
|---|---|---|
| 0 | 0x0_0000 | plain read / write with byte selects |
| 1 | 0x1_0000 | write: add |
| 2 | 0x2_0000 | read: test-and-set (returns old value, stores 1) |
| 3 | 0x3_0000 | write: subtract |
| 4 | 0x4_0000 | write: bit set (OR) |
| 5 | 0x5_0000 | write: bit clear (AND NOT) |
| 6 | 0x6_0000 | write: bit flip (XOR) |

The add and test-and-set offsets are the original ones; the other four codes
are this design's. A spin lock reads the lock word at its address + 0x2_0000
until the read returns 0, and is released by a plain write of 0.

## Message queues

A queue is a set of one-way slots. Each slot (`mt_mq_slot`) is a FIFO of
`2**ENTRIES_LOG2` whole messages of up to `2**WORDS_LOG2` words. A writer
fills the message being built, then commits it with its size; only then does
the reader see it. The reader reads the head message by word index and
discards it. There is no flow control: a commit into a full slot is dropped
and counted. This keeps every writer's timing independent of its reader.

Both sides of a queue use the same register window (`mt_mq_wb_side`), with
W = `WORDS_LOG2` (7 by default):

| Byte address bits | Meaning |
|---|---|
| W+6 | 0 outgoing slot (CPUs to host/network), 1 incoming slot |
| W+5 .. W+3 | slot number |
| W+2 | 0 control registers, 1 message words |
| W+1 .. 2 | word index |

With the defaults: outgoing slot s at `0x400*s`, incoming slot s at
`0x2000 + 0x400*s`, message words at +0x200. Control words: +0x0 STATUS =
{full, empty, 6'b0, count[7:0], head size[15:0]}; +0x4 COMMAND, write
`0x4000_0000 | size` to commit (writer side) or `0x8000_0000` to discard the
head message (reader side); +0x8 DROPPED count. The CPUs write outgoing and
read incoming slots; the host does the reverse.

**HMQ** (`mt_hmq`): the host side sits behind the host port at 0x0001_0000.
It raises two interrupt requests: an outgoing slot holds a message, and an
incoming slot is empty. **RMQ** (`mt_rmq`): a committed outgoing message is
sent at once on the `rmq_tx_*` stream (valid/ready, `last`, slot number) and
discarded. The lowest-numbered ready slot goes first, one word every two
cycles. Words on `rmq_rx_*` fill the incoming slot named by `rmq_rx_slot_i`.
The word flagged `last` commits the message. `rmq_rx_error_i` throws away
the partial message, so a broken transfer is never seen by a CPU. These
streams are meant for a UDP/Etherbone transport core outside this design.

## Host interface

The host sees one Wishbone slave and one interrupt line.

| Host address | Target |
|---|---|
| 0x0000_0000 | control and debug registers |
| 0x0001_0000 | HMQ, host side (layout above) |
| 0x0010_0000 .. 0x001F_FFFF | shared memory through the Shared Interconnect, same atomic offsets |

Control registers: 0x00 identification 0x4D54_0100; 0x04 number of CPUs;
0x08 core reset bits (all set after reset: CPUs stay stopped until the host
has loaded them); 0x0C core pause bits; 0x10 upload core number; 0x14 upload
byte address; 0x18 upload data (a write stores a word, a read dumps one;
either advances the address by 4; the ack waits for the memory); 0x1C
interrupt mask (bit 0 outgoing message, bit 1 incoming slot empty; reset
value 1); 0x20 debug status (bit c: core c's console has characters); 0x24
raw interrupt requests; 0x40 + 4c pop core c's debug console, {valid, char}
(0 when empty). Each console is a 16-character FIFO; characters arriving when
it is full are lost.

Bring-up: write 0x10 and 0x14, stream the program words into 0x18 for each
core, then clear the core's bit in 0x08. Programs start at address 0.

## Parameters (top)

| Parameter | Default | Meaning |
|---|---|---|
| `N_CPUS` | 8 | CPU Core Blocks, 1 to 8 |
| `MEM_SIZE` | 65536 | private memory per CPU, bytes |
| `SMEM_SIZE` | 16384 | shared memory, bytes |
| `HMQ_N_OUT`, `HMQ_N_IN` | 2, 2 | HMQ slots per direction (up to 8) |
| `RMQ_N_OUT`, `RMQ_N_IN` | 2, 2 | RMQ slots per direction (up to 8) |
| `MQ_ENTRIES_LOG2` | 2 | messages per slot = 4 |
| `MQ_WORDS_LOG2` | 7 | words per message = 128 |
| `CYCLES_PER_SEC` | 125000000 | local time counter rate |
| `WITH_DIVIDER` | 1 | hardware divider in every CPU |
| `WITH_RMQ` | 1 | build the Remote Message Queue; without it its window reads 0 and nothing is sent |

Only `N_CPUS` (up to 8), the 37-cycle divide, the two-cycle shifter and
multiplier, the jump costs and the 64 KiB memory of an example system come
from the original description. Memory, queue and slot sizes are left to the
user there, and the values above are only defaults.

## Departures and open points

- The self-describing bus (SDB) record used for discovery by host software is
  not built; the identification register stands in for it.
- The original core allowed the earlier LM32 CPU as an alternative; only uRV
  is provided.
- Register maps, address maps, the message-queue register layout, the
  network stream interface, the crossbar arbitration and the meaning of
  "pause" are this design's own.
- The simplified interrupt CSR layout of uRV is not specified in detail in
  the source; a one-interrupt subset of the standard layout is used.
- No cache, debug unit or JTAG.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops; a watchdog ends a stuck run.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mt_pkg.sv rtl/urv_pkg.sv tb/rv_asm_pkg.sv tb/tb_mock_turtle_core.sv \
    --top-module tb_mock_turtle_core -Mdir obj -o sim
./obj/sim
```

(replace the testbench name for another block; `rv_asm_pkg.sv`, a small
RV32IM encoder used to write test programs inside the testbenches, is needed
by the CPU-level ones). Verilator reports some unused-signal and width-style
warnings; they are harmless and can be silenced on the command line with
`-Wno-lint -Wno-style`.

`tb_mock_turtle_core` runs the top at its default size, with all eight CPUs
and 64 KiB each, in about a second. The host uploads one program into all
cores. It uses every atomic operation, a test-and-set spin lock, division
and multiplication, DP and SP accesses, and a host round trip through the
HMQ. It also overflows an HMQ slot (two drops counted), sends a message to
the network and receives one after a broken transfer. Finally it reads the
debug consoles, pauses and resumes a core and dumps memory while the cores
run. It counts interconnect contention, interlock cycles, X1 and X2
bypasses, data-bus wait cycles, taken jumps, divider cycles (X1 held for 36
cycles after each division's first), drops, host interrupts, transmit
back-pressure and broken transfers, and fails if any never occurred.
`tb_mock_turtle_core_normq` builds a two-CPU core without the RMQ and
without dividers: it checks that the RMQ window is harmless and that DIV
traps as an illegal instruction to a software handler. `tb_urv_cpu` checks
every RV32IM instruction class, the bypasses, the interlock and jump/divide
cycle counts, traps and the interrupt, with and without memory wait states.
