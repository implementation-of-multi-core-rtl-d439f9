# A shared-bus multi-core MIPS I system built from PLASMA-style cores

Up to four small 32-bit MIPS I cores run independent tasks side by side. Each
core has a private RAM that holds its program and private data. All cores
share one main bus to a shared RAM and a set of peripherals. Nothing in the
core is changed except one small addition: a request line. The core raises it
for every load or store that leaves its private memory. A central arbiter
grants the bus to one core at a time, in the order the requests arrived, and a
bus multiplexer connects the granted core to the main bus. So the cores run at
full speed as long as they stay in their own memory, and they wait in line only
for shared accesses. How much four cores gain over one therefore depends almost
entirely on how often a task touches the shared bus. The workload testbench
measures exactly that.

Everything is synthesizable SystemVerilog (IEEE 1800-2017), with no vendor
primitives. The memories are plain arrays with a synchronous read, so FPGA
tools infer block RAM.

```
             +-----------+   +-----------+         +-----------+
             | core 0    |   | core 1    |   ...   | core N-1  |
             | mlite_cpu |   | mlite_cpu |         | mlite_cpu |
             | + private |   | + private |         | + private |
             |   RAM     |   |   RAM     |         |   RAM     |
             +--+-----+--+   +--+-----+--+         +--+-----+--+
           req  |     | bus     |     |               |     |
             +--v-----|---------v-----|---------------v--+  |
             |  arbiter (FIFO, core number breaks ties)  |  |
             +------------------+------------------------+  |
                         gnt    |        all core buses     |
             +------------------v---------------------------v--+
             |            main_bus_mux (one-hot select)        |
             +------------------+------------------------------+
                                | main bus
        +-----------+-----------+---------+-----------+----------+
        |           |           |         |           |          |
   shared RAM     UART      IRQ status  counter     GPIO      read data (registered,
  0x1000_0000   +0x00       /mask +0x20  +0x50    out +0x30    back to all cores)
                           +0x10                  in  +0x40
                  (peripherals at 0x2000_0000)
```

## The core (`mlite_cpu`)

The core is organised like the PLASMA core. There are separate units for the
next PC (`pc_next`), the memory interface (`mem_ctrl`), the decoder
(`control`), the register file (`reg_bank`), the operand and result
multiplexers (`bus_mux`), and three execution units (`alu`, `shifter`, `mult`).
The three execution units drive zero when they are not selected, and their
outputs are OR-ed onto one result bus, `c_bus`. The decoder turns each opcode
into a packed control word (`plasma_pkg::ctrl_t`), which steers all the other
units.

**Instruction set.** It runs the MIPS I user-mode instructions, with these
exceptions:

- The unaligned-access instructions LWL, LWR, SWL and SWR decode as no-ops.
- Undefined opcodes are also no-ops.
- There is no memory management, and there are no floating-point or other
  coprocessor instructions.
- MFC0 and MTC0 reach only two COP0 registers: STATUS (12) and EPC (14).

The core is big-endian: byte 0 of a word is bits 31:24.

**Timing.** Memory is synchronous. The core presents `address_next` (and
`byte_we_next` for a write) before the clock edge, and the word comes back on
`data_r` one cycle later. `address` and `byte_we` are the registered copies
that belong to the word now on `data_r`.

- **Ordinary instructions take one cycle.** The opcode fetched in cycle *n*
  arrives in cycle *n+1*, where it is decoded, executed and written back. In the
  same cycle, the next fetch address goes out.
- **Loads and stores take two cycles.** In the first cycle, the core holds its
  PC and puts the data address, byte enables and store data out instead of a
  fetch address. In the second cycle, the load data arrive, are aligned and
  sign- or zero-extended, and are written back, while the fetch address goes out
  again. Store data is copied onto every byte lane, and only the enabled lanes
  are written.
- **Pauses.** Whenever the core did not advance in the previous cycle, `data_r`
  no longer holds the current opcode. `mem_ctrl` therefore keeps a copy of it.
  The external `mem_pause`, a missing bus grant, and a busy multiplier all
  pause the core safely, in either cycle of a load or store.

**Branches** have the MIPS delay slot. `pc_next` keeps two registers:

- `pc_current`, the address of the instruction being executed;
- `pc_after`, the address of the instruction after it.

A taken branch or jump changes only the address *after* `pc_after`. The
delay-slot instruction therefore always runs. Branch targets are relative to
the delay-slot address.

**Multiply and divide** run one bit per cycle. Multiply is shift-and-add, and
divide is restoring division. An operation takes 32 cycles, plus one
sign-correction cycle for signed operands. The core keeps running during this
time. MFHI or MFLO only pause it if the result is not ready yet.

**Interrupts and exceptions.** Software enables interrupts by setting STATUS
bit 0 with MTC0. A core takes `intr_in` only if three things hold:

- interrupts are enabled;
- the current instruction is not in a delay slot (its EPC could not be
  re-executed correctly);
- the core is not in the second cycle of a load or store.

When it takes the interrupt, the core does the following:

- the current instruction is replaced by a no-op;
- its address goes to EPC;
- STATUS bit 0 is cleared;
- the fetch continues at 0x3C.

SYSCALL and BREAK take the same path. Their EPC is the address of the SYSCALL
or BREAK itself, so the handler must add 4 before returning. A handler returns
with `mfc0 rX,14 ; jr rX ; mtc0 rY,12`. The MTC0 in the delay slot turns
interrupts back on. Reset starts execution at address 0.

## The shared bus

### Request and grant (`bus_req`, `arbiter`)

`bus_req` is combinational. In the first cycle of a load or store whose address
has a non-zero upper nibble, it raises `req` and pauses the core until `ack`
(the arbiter's grant) arrives. While paused, the core keeps the data address,
byte enables and write data on its outputs. Instruction fetches and accesses
below 0x1000_0000 stay in the private RAM and never request the bus.

The arbiter works like this:

- A core that asks while the bus is free gets it one cycle later. The grant is
  a registered one-hot vector `gnt`.
- Requests that arrive while the bus is busy enter a FIFO in arrival order.
- Requests that arrive in the same cycle enter the FIFO in core-number order,
  so core 0 before core 1, and so on.
- When the owner drops `req`, the bus goes to the head of the FIFO in the next
  cycle.
- The FIFO has DEPTH entries, and DEPTH defaults to the core count. That is the
  worst case: every core waiting at once.
- A core must keep requesting until it is served. An assertion checks this.
- `busy[i]` means "another core owns the bus". `valid` means "the owner is still
  requesting", i.e. a transfer is on the bus. With all four cores requesting
  constantly, `gnt` steps through 1, 2, 4, 8 and `busy` through E, D, B, 7.

### One shared access, cycle by cycle (bus free)

| cycle | core                                   | arbiter / bus                          |
|-------|----------------------------------------|----------------------------------------|
| 1     | first cycle of load/store; `req` high, paused | request seen                    |
| 2     | still paused, address held             | `gnt` high; slave takes address (and writes) |
| 3     | second cycle: read data arrive and are written back; `req` drops | registered read data on the bus |
| 4     | next instruction                       | bus free, next grant possible          |

A shared load or store thus costs the core 3 cycles instead of 2, and it holds
the bus for 2 cycles. When the bus is taken, the core simply stays in cycle 1
until its turn comes.

### Multiplexer and slaves (`main_bus_mux`, top level)

`main_bus_mux` is an AND-OR multiplexer driven by the one-hot grant. It passes
the granted core's next address, byte enables, registered address and byte
enables, and write data. With no grant it outputs zeros. The slaves act only
while `valid` is high. The read data of the bus are registered once and sent to
every core. Each core uses them only when its own registered address points
outside its private RAM.

## Memory map and peripherals

| address            | what                                                          |
|--------------------|---------------------------------------------------------------|
| 0x0000_0000        | private RAM of each core (LOCAL_WORDS words; program starts at 0, interrupt vector at 0x3C) |
| 0x1000_0000        | shared RAM (SHARED_WORDS words), byte/halfword/word access     |
| 0x2000_0000 + 0x00 | UART: write sends a byte (ignored while sending); read returns the last received byte and clears "data available" |
| 0x2000_0000 + 0x10 | interrupt mask (8 bits, read/write)                            |
| 0x2000_0000 + 0x20 | interrupt status (read): bit 0 UART data available, bit 1 UART transmitter idle, bit 2 counter bit COUNTER_IRQ_BIT, bit 3 GPIO input 31 |
| 0x2000_0000 + 0x30 | GPIO output register (read/write, drives `gpio_out`)           |
| 0x2000_0000 + 0x40 | GPIO input register (read; `gpio_in` through a 2-flop synchroniser) |
| 0x2000_0000 + 0x50 | cycle counter (read; 32 bits, +1 every clock, cleared by reset)|

The interrupt status register shows the sources as they are; it is not latched.
The interrupt line is the OR of status AND mask, and it goes to every core. A
core only takes it if it has enabled interrupts itself, so software picks which
core serves which source. Address bits 27:14 are not decoded, so each region
repeats through its 256 MB.

The UART uses 8 data bits, no parity, one stop bit and LSB first. Each bit lasts
CLKS_PER_BIT clocks. The default of 434 gives 57600 baud at 25 MHz, or 115200
baud at 50 MHz. The receiver synchronises `uart_read` and samples in the middle
of each bit. It keeps only frames with a valid stop bit.

## Parameters (top level, `plasma_multicore`)

| parameter        | default | meaning                                          |
|------------------|---------|--------------------------------------------------|
| NCORES           | 4       | number of cores (2 is the other intended setting; any value from 1 up works) |
| LOCAL_WORDS      | 2048    | private RAM per core, in 32-bit words (8 kB)     |
| SHARED_WORDS     | 4096    | shared RAM, in words (16 kB)                     |
| CLKS_PER_BIT     | 434     | UART bit time in clocks                          |
| COUNTER_IRQ_BIT  | 18      | counter bit used as an interrupt source          |

Ports: `clk`, `reset` (synchronous, active high), `uart_read` (serial in),
`uart_write` (serial out), `gpio_in[31:0]`, `gpio_out[31:0]`. Programs are
placed in the private RAMs (`g_core[i].u_local_ram.mem`) before reset is
released. On an FPGA that would be an initialised RAM, and in simulation the
testbenches write them by hierarchical reference.

## What the bus costs: measured speedup

`tb_workload_speedup` builds the system three times, with 1, 2 and 4 cores. It
splits the same work, 160,000 instructions, evenly over the cores. Each core
runs a loop of L instructions, B of which are loads from shared RAM.

| share of shared-bus instructions | loop      | 2 cores | 4 cores |
|----------------------------------|-----------|---------|---------|
| 2 %                              | 1 of 50   | 2.00    | 4.00    |
| 3.22 %                           | 1 of 31   | 2.00    | 4.00    |
| 4.17 %                           | 1 of 24   | 2.00    | 4.00    |
| 10 %                             | 1 of 10   | 2.00    | 4.00    |
| 15 % (also at 1.6 million instructions) | 3 of 20 | 1.86 | 3.71 |
| 16.7 %                           | 1 of 6    | 2.00    | 4.00    |
| 50 %                             | 2 of 4    | 1.82    | 2.50    |
| 62.5 %                           | 5 of 8    | 1.65    | 1.90    |

Each shared load holds the bus for 2 cycles. The bus therefore saturates once
NCORES × B × 2 exceeds the loop time in cycles, L + 2B on one core. Below that
point, loops with a single load settle into a round-robin rhythm and lose
nothing. Bursts of back-to-back loads, as in the 15 % loop, collide and lose a
little even earlier.

The published measurements come close to 2 and 4 only for long tasks with a
small bus share. They fall off much sooner as the share rises: four cores give
about 3.2 at a few percent and about 1.5 at 15 %. Two differences explain this:

- There, tasks were scheduled by an operating system, whose cost shrinks with
  task length.
- Here, instruction fetches never use the shared bus.

Neither effect is modelled here. The size of the work therefore does not change
these speedups.

## Where this design departs from the published system, and what it assumes

Following the published description:

- the core's unit structure and signal names;
- the MIPS I user instruction set without unaligned access;
- four (or two) cores, with the core otherwise unchanged apart from the request
  sub-module;
- the arbiter policy: free bus to the first requester, FIFO for later ones, core
  number for simultaneous ones, FIFO at least as deep as the core count;
- the arbiter waveform (rotating grant, busy = other core owns the bus);
- the bus multiplexer;
- the four peripherals: an 8-bit no-parity UART with a receive and a transmit
  register, interrupt status and mask registers, a 32-bit cycle counter, and
  GPIO output and input registers.

This design's own choices:

- **Memory.** Private RAMs, with instruction fetches kept off the shared bus.
  The memory map. All memory sizes.
- **Bus timing.** The registered grant and the one-cycle registered bus read
  data, which give the 3-cycle, 2-bus-cycle shared access.
- **Interrupts.** The interrupt sources. Interrupts go to all cores. Interrupt
  entry at 0x3C with EPC/STATUS, and no interrupts in delay slots.
- **Multiplier.** Its 32/33-cycle latency.
- **UART.** Its bit timing and sampling.
- **Not built.** The original core's optional third pipeline stage, its
  optional 4 kB cache, and its Ethernet controller. The cache and Ethernet are
  described by name and size only.
- **Decoder output.** The control word is a 60-bit packed struct, the same
  width as the original's, but its field layout is this design's.

Port lists follow the published block diagrams, with two differences:

- The memory controller's diagram shows an output `mem_ack` whose meaning is not
  given. Here the memory controller has `data_phase` (first cycle of a load or
  store, which is what drives the bus request) and `second_cycle`. It also has
  a `stall_in` input, so that a busy multiplier can hold the instruction.
- The arbiter has `busy` and `valid` outputs besides the per-core grants.

Known limits:

- ADD, ADDI and SUB do not trap on overflow. They behave like ADDU, ADDIU and
  SUBU.

- Unaligned loads and stores simply ignore the low address bits.
- There are no atomic operations or locks on the shared bus. Tasks that share
  data must coordinate in software, for example with one writer per word as in
  the tests.
- The private RAMs are not reachable from other cores or from the bus.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops. Build and run one with plain
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/plasma_pkg.sv tb/mips_asm_pkg.sv tb/mc_prog_pkg.sv rtl/*.sv tb/tb_plasma_multicore.sv \
  --top-module tb_plasma_multicore -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the last file and the top name for any other testbench.

| testbench                   | what it shows                                                       |
|-----------------------------|---------------------------------------------------------------------|
| `tb_<block>`                | one per RTL module, random stimulus against a reference written in the testbench |
| `tb_mlite_cpu`              | one core running a self-checking MIPS program: every instruction class, delay slots, an interrupt, random memory pauses and bus grant delays, exact cycle counts |
| `tb_plasma_multicore`       | the four-core system with a fast UART. It checks every core's result and counts each mechanism: grants per core, contention, two or more cores queued, multiplier stalls, the interrupt, UART in both directions |
| `tb_plasma_multicore_full`  | the same run at the default parameters (434-clock UART), 200 iterations per core |
| `tb_workload_speedup`       | the speedup table above                                             |

`tb/mips_asm_pkg.sv` has one encoder function per instruction, so a test
program can be written as SystemVerilog function calls. `tb/mc_prog_pkg.sv`
builds the multi-core test programs from those functions.
