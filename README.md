# Butterfly Processor Node, in SystemVerilog

The Voice Funnel is a packet-voice concentrator built on the Butterfly
multiprocessor. Its computing element is the **Processor Node**:

- an MC68000 with a segment-based memory management unit;
- up to four 128 KB memory modules;
- a 4 KB bootstrap ROM;
- an adapter to the BIOLINK I/O bus;
- a receiver and a transmitter for the Butterfly Switch, the network that
  connects the nodes.

All of these share one 16-bit **Data bus**. They are not connected to each
other directly. A small microprogrammed processor, the **Processor Node
Controller (PNC)**, makes every transfer on the bus, one per clock. Each
MC68000 memory reference runs as a short PNC microprogram: MMU translation,
memory cycle and acknowledge. The same goes for each switch message and each
BIOLINK DMA word.

The parts whose timing is too tight for a polled microprogram get their own
small state machines. These are:

- the receiver, which assembles messages, rejects them and checks Restart
  messages;
- the transmitter, which retries, picks paths and generates checksums;
- the BIOLINK adapter.

These parts call the PNC with **microinterrupts**. The PNC itself is built
like a 2900-family bit-slice machine: a 2911-style sequencer, a 2901-style
ALU, a 1K × 64 control store with a pipeline register, and a priority
encoder. The encoder turns 32 request lines into service-routine addresses.

This repository is synthesizable RTL for that node, with the PNC, MMU, memory
system, ROM interface, BIOLINK adapter, switch receiver and switch
transmitter. The MC68000, the EPROM chip and the switch itself stay outside,
as ports.

```
              MC68000 bus                 EPROM        BIOLINK
                  |                         |             |
             +----+-----+  +-----+   +------+-----+ +-----+--------+
             |   MMU    |  | IRQ |   | boot ROM   | | BIOLINK       |
             | SAR RAM  |  | arb |   | controller | | adapter (FSM) |
             +----+-----+  +--+--+   +------+-----+ +-----+--------+
                  |           |             |             |
  ==================== 16-bit Data bus (one source, one destination per clock)
       |            |               |                 |             |
  +----+----+  +----+------+  +-----+--------+  +-----+--------+    |
  |   PNC   |  |  memory   |  | switch       |  | switch       |    |
  | seq/ALU |  | interface |  | receiver     |  | transmitter  |    |
  | CS/MSRAG|  +----+------+  | 2 x 8-word   |  | 2 x 6-word   |    |
  +---------+       |         | FIFO         |  | buffers      |    |
               19-bit memory  +-----+--------+  +-----+--------+    |
               bus, 4 modules       |                 |
                              switch out port   switch in port
```

## Files

| File | Contents |
|---|---|
| `rtl/pn_pkg.sv` | Shared types: microword layout, sequencer/ALU codes, Data bus source and destination codes, branch conditions, request lines, MMU access types, memory operations |
| `rtl/processor_node.sv` | Top level: the Data bus multiplexer, destination decode, MC68000 handshake, interrupt wiring, restart |
| `rtl/pnc.sv` | PNC: sequencer + ALU + control store + MSRAG, flags, condition selection |
| `rtl/pnc_sequencer.sv` | 2911-style sequencer with 4-deep stack and four-way branch |
| `rtl/pnc_alu.sv` | 2901-style 16-bit ALU, 17 registers + Q |
| `rtl/pnc_control_store.sv` | 1K × 64 control store with output register and a load port |
| `rtl/pnc_msrag.sv` | Microinterrupt Service Routine Address Generator (32-line priority encoder) |
| `rtl/mmu.sv` | SAR RAM, ASAR, Address Register, page adder, access and protection decoding |
| `rtl/irq_arbiter.sv` | Seven-level interrupt priority encoder for the MC68000 |
| `rtl/boot_rom_ctrl.sv` | Two byte reads of the 4K × 8 EPROM per 16-bit word |
| `rtl/biolink_adapter.sv` | BIOLINK latches and state machine |
| `rtl/mem_interface.sv` | High-address-nibble selection and memory bus latches |
| `rtl/mem_module.sv` | One 128 KB memory module with byte parity, error register and self-refresh mode |
| `rtl/sw_receiver.sv` | Butterfly Switch receiver |
| `rtl/sw_transmitter.sv` | Butterfly Switch transmitter |
| `tb/tb_<module>.sv` | A self-checking testbench for each module |
| `tb/eprom_model.sv` | Behavioural 4K × 8 EPROM used by the testbenches |

Each file opens with a comment on its function, interface and timing. The
comment also separates what follows the original design from what was
chosen here.

## The PNC and its microword

Everything the node does is a microprogram, so the microword is the key to the
whole design. The original report gives its size (1K words of 64 bits) and the
parts of the machine, but no field layout. The layout below is this design's
own, collected as the packed struct `pn_pkg::uword_t`.

| Bits | Field | Use |
|---|---|---|
| 63:48 | `k` | 16-bit constant; a Data bus source (`BS_K`) |
| 47:43 | `bus_dst` | Data bus destination, a strobe to one block (`bus_dst_e`) |
| 42:39 | `bus_src` | Data bus source (`bus_src_e`) |
| 38:36 | `alu_dst` | ALU destination and rotate (`alu_dst_e`) |
| 35:31 | `b_addr` | ALU B register; also the transmitter RAM word and the memory high-nibble source (see below) |
| 30:26 | `a_addr` | ALU A register; `BS_REGA` puts it on the bus |
| 25:23 | `alu_src` | Operand pair R,S (`AQ AB ZQ ZB ZA DA DQ DZ`; D is the Data bus) |
| 22:20 | `alu_fn` | `ADD SUBR SUBS OR AND NOTRS XOR XNOR` |
| 19 | `sar_prot` | Selects the protection half of the SAR |
| 18:14 | `cond` | Branch condition (20 in use) |
| 13:10 | `seq` | Sequencer operation |
| 9:0 | `addr` | Branch address |

**One clock per microword.** The control store has an output register, so the
next word is fetched while the current one executes. A microword can do all of
the following at once:

- drive one source onto the Data bus;
- strobe one destination;
- run the ALU;
- branch.

The ALU flags (carry, zero, negative) are registered whenever the ALU fields
are non-zero, so a branch tests the flags of an earlier word. Carry-in is 1
for the two subtract functions.

**Sequencer operations** (`seq_op_e`):

- continue, jump and conditional jump;
- four-way branch: the target is `{addr[9:2], cond+1, cond}`, which tests two
  adjacent conditions at once;
- call, return, and conditional call and return, on a 4-deep stack;
- jump to word 0;
- load and jump through the internal register;
- `SQ_DISP`.

Microinterrupts are taken only in a `SQ_DISP` word. If a request is pending,
execution continues at its service routine. Otherwise it continues at `addr`,
which is usually the idle word itself. A routine therefore ends with
`SQ_DISP` back to idle, and a pending request is dispatched on the spot.

**Service routines.** The MSRAG picks the lowest-numbered pending request line
and jumps to `512 + 16·line`. Each routine has 16 words in the upper half of
the control store; it can jump elsewhere if it needs more.

| Line | Source | Routine |
|---|---|---|
| 0, 1 | receiver input buffer 0 / 1: a word is available, or the message is complete | 512, 528 |
| 2, 3 | transmitter buffer 0 / 1 sent | 544, 560 |
| 4 | transmitter saw a rejection | 576 |
| 5 | BIOLINK controller word captured (DMA) | 592 |
| 6 | BIOLINK device acknowledge | 608 |
| 7 | memory parity error | 624 |
| 8–12 | MC68000 access to local memory, remote memory, I/O space, segment 0, ROM (chosen by the MMU's access decoding) | 640–704 |
| 13 | MC68000 interrupt acknowledge cycle | 720 |

All request lines are levels. The service routine removes its cause, for
example by popping the word, clearing the flag or acknowledging the CPU.

**Branch conditions**:

- `C_TRUE`, and the ALU flags `C_CARRY`, `C_ZERO`, `C_NEG`, `C_NZ`;
- receiver buffer has data (`C_RX0/1`) or is done (`C_RXD0/1`);
- transmitter buffer not empty (`C_TXNE0/1`);
- ROM busy (`C_ROMBSY`);
- protection violation (`C_PROT`);
- Address Register bits 0–3 (`C_AR0`..`C_AR3`), for even/odd and four-way
  branching on data;
- BIOLINK DMA pending and acknowledge (`C_IODMA`, `C_IOACK`);
- MC68000 write cycle (`C_CPUWR`).

### Example: the MC68000 local-memory routine

```
640: bus = PADDR  -> MEMA_RD, b_addr=1 (nibble from the MMU),
     if CPUWR goto 648                                              ; microstep 1
641: if PROT (sar_prot=1) goto 646                                  ; microstep 2
642: bus = MEM    -> CPUD                                           ; microstep 3: data
643: CPUACK, DISP idle                                              ; DTACK
646: CPUACK with sar_prot=1, DISP idle                              ; BERR
648: bus = PADDR  -> MEMA_WW, b_addr=1                              ; write address
649: bus = CPUD   -> MEMW                                           ; write data
650: CPUACK, DISP idle                                              ; DTACK
```

From address strobe to DTACK a read takes 5 clocks, and so does a write.
That is 0.625 µs at 8 MHz, the figure the original execution-time table gives
for both.

Two points about the write path:

- **Protection.** The write path does not check protection. The SAR RAM
  gives only one half per microstep, so a check would cost one more step.
  The original table lists "check user mode write" as a separate, slower
  operation.
- **Parity.** Microstep 640 starts a read before the routine knows the cycle
  is a write. So the word being written must already hold good parity, as
  every word does once software has initialised memory.

## Memory system

- **Address.** A memory bus address is a 19-bit *word* address,
  `{nibble[3:0], Data bus[15:1]}`. Bit 0 of the Data bus selects the byte, and
  0 means the high byte, as on the MC68000. Field `b_addr[1:0]` of the
  microword chooses the nibble:
  - 0: the PNC's high-nibble register (`BD_MEMHI`);
  - 1: the MMU's translated address;
  - 2: the BIOLINK controller's address.
- **Three microsteps per access**:
  1. address and operation (`BD_MEMA_RD`, `_WW` word write, `_WB` byte write);
  2. write data (`BD_MEMW`);
  3. read data on the bus (`BS_MEM`).

  The PNC can do unrelated work in the second step of a read.
- **Modules.** Each module holds 64K words of 18 bits: 16 data bits and an odd
  parity bit per byte. A module answers when word address bits [17:16] match
  its `MODULE_ID` and bit 18 is 0.
- **Parity.** A parity error is stored in a 19-bit register that keeps the
  *earliest* error. This raises interrupt level 6 and function request 7.
  Reading the register with `BS_PERR` re-arms it. Control register bit 1
  writes wrong parity on purpose, so the checker can be tested.
- **Self-refresh.** After any reset a module is in self-refresh mode. It
  ignores the bus and refreshes itself every `REFRESH_INTERVAL` (20) clocks,
  so its contents survive while the PNC is not running. Writing 1 to control
  register bit 0 (`BD_MEMCTL`) hands refresh over to the PNC, which then issues
  `BD_REFRESH` strobes. An accepted Restart message resets the node, so memory
  returns to self-refresh.

## MMU

- **Segments.** The MC68000's 24-bit address is split into segment [23:16],
  page [15:8] and byte [7:0]. The 512 Segment Attribute Registers (SARs) are
  32 bits each. They are held as one 1K × 16 RAM: the relocation half and the
  protection half are two words at `{half, segment OR ASAR[8:0]}`. The
  Address Space Attribute Register (ASAR) moves a process's segments within
  the 512.
- **Translation.** A normal access reads the relocation half:

  ```
  PA[19:0] = { SAR[3:0], SAR[15:8] + VA[15:8], VA[7:0] }   (8-bit page adder)
  access   = SAR[7:6]: 00 local, 01 remote, 10 I/O, 11 segment 0
  ```

- **Protection.** In the service routine, a microword with `sar_prot=1` reads
  the protection half:
  - bits [0] supervisor read, [1] supervisor write, [2] user read,
    [3] user write;
  - bits [15:8] the highest page allowed.

  The resulting violation is a branch condition. An acknowledge given with
  `sar_prot=1` becomes a bus error if there is a violation.
- **Segment 0 windows.** Virtual segment FF maps to physical segment 0, where
  the node's control registers live. In segment 0, addresses 8000–8FFF and
  0–7 are ROM accesses; the latter supply the reset vectors.
- **PNC-generated addresses.** The PNC can load the Address Register
  (`BD_AR`), which then replaces the MC68000's address. It does this to write
  SARs (`BD_SARW`) or to translate addresses of its own. While it does so it
  holds the MC68000 off with `cpu_br` (`BD_BUSREQ`). The Address Register's
  low four bits are branch conditions.

## Butterfly Switch receiver and transmitter

The switch carries nibble-serial messages. The original report does not give
the message layout, so the one used here is this design's own:

```
to the switch:   {00,path} dest[7:4] dest[3:0] | header(4) data(4 x len) checksum(1)
from the switch:                                 header(4) data(4 x len) checksum(1)
header word:     { type[3:0], spare[3:0], len[7:0] }
checksum:        4-bit sum of header and data nibbles, seeded with the
                 Header Checksum register (the sum of the routing nibbles)
```

The switch consumes the path and destination nibbles.

**Receiver** (`sw_receiver`):

- **Input buffers.** There are two, each an 8-word (16-byte) FIFO in a 16 × 16
  dual-port RAM. The PNC can pop a word while a message is still arriving.
  Header bit `type[3]` chooses the buffer: 0 for messages that need a reply,
  1 for those that do not. A message whose buffer is still busy is rejected.
- **Flow control.** "Stop sending data" is raised while the buffer in use has
  room for fewer than two words. A message longer than the FIFO therefore
  flows through at the speed the PNC empties it.
- **Checksum.** A checksum error sets a status bit and raises interrupt
  level 7. The buffer stays busy until the PNC releases it with `BD_RXCTL`.
- **Restart.** Type 0 is Restart. It is never rejected, and its next four
  nibbles are a 16-bit password (`PASSWORD`, default `16'hB8B1`). With the
  right password the whole node is reset for one clock, and `restart_out`
  pulses. A wrong password only sets a status bit.

**Transmitter** (`sw_transmitter`):

- **Buffers.** Two output buffers are words 0–5 and 6–11 of a 16 × 16 RAM.
  Words 12–15 are spare storage for the PNC. The PNC writes a word with
  `BD_TXRAM`, or one byte of it with `BD_TXRAMH` or `BD_TXRAML`, with the
  word number in `b_addr`. It then sets the buffer's non-empty flip-flop with
  `BD_TXCTL`, with the destination node number in bits 15:8.
- **Long messages.** A message of up to 5 data words fits its buffer. It stays
  there until it has gone, so retries need no PNC work. A longer message, up
  to 255 data words, uses the buffer as a circular output FIFO:
  - the PNC loads the first words and starts it;
  - each word is freed as soon as its last nibble has been sent;
  - the PNC writes the next word into the freed place, watching
    `status[15:10]`.

  If a long message is rejected, the PNC must load it again from the header.
- **Sending.** The transmitter sends the message on its own, one nibble per
  clock. It may start before the data words are written, because every RAM
  word has a valid bit. Where a word is not yet written, or the switch says
  "stop", it sends nibbles marked *ignore*.
- **Rejection.** When rejected, it drops the frame, flags the rejection
  (request 4), and retries. If the other buffer holds a message, that one
  goes first.
- **Paths.** Every attempt takes the next path, round robin, among those
  enabled in the 4-bit Path Enable register (`BD_PATHEN`).
- **Completion.** When a message is sent, the non-empty flip-flop clears and
  the "sent" request (line 2 or 3) asks the PNC to acknowledge it.

## BIOLINK adapter

Two back-to-back 16-bit latches sit between the Data bus and the BIOLINK
address/data bus. A small state machine does the autonomous part of the work:

1. It grants the memory to the I/O controllers in round-robin order.
2. It captures the controller's word on its strobe and raises a microinterrupt
   (line 5).
3. It holds the controller until the PNC has done the memory cycle.
4. It returns the data with an acknowledge, driving the output latch onto the
   bus.

The PNC-side protocol is the `BD_IOCTL` register:

| Bits | Meaning |
|---|---|
| [3:0] | BIOLINK control lines driven by the PNC |
| [4] | go on to the next requester |
| [5] | done: pulse the acknowledge |
| [6] | drive the output latch during the acknowledge |

The BIOLINK's exact bus protocol is not described in the report. The
request / grant / strobe / acknowledge interface here is a simplification.

## MC68000 interface and interrupts

- **Accesses.** The MC68000 side is reduced to a level address strobe plus
  address, read/write, user/supervisor and write data. The node answers with
  a one-clock `cpu_dtack` or `cpu_berr` when the PNC executes `BD_CPUACK`.
  Read data comes from the latch the PNC loads with `BD_CPUD`; write data
  reaches the Data bus as `BS_CPUD`.
- **Interrupts.** The interrupt arbitrator encodes the highest pending level:
  - 7: receiver checksum error;
  - 6: memory parity error;
  - 4 and 3: the BIOLINK interrupt lines;
  - 5, 2 and 1: set by microcode with `BD_IRQSET`, from Data bus bits 4, 1 and 0.

- **Interrupt acknowledge.** The `cpu_iack` input marks an acknowledge
  cycle. Outside logic decodes it from the MC68000 function code. The cycle
  asks for service on request 13 rather than on an access-type line. The
  routine chooses the vector. It may fetch it from the I/O system or supply
  one itself. It puts the vector on the data port with `BD_CPUD`, clears
  what it serves, and ends with `BD_CPUACK`. The end-to-end test's routine
  supplies a fixed vector for the microcode-set level 5. Storing the I/O
  device number per level is left to microcode.

## Timing

One clock drives the whole node. Cycle counts in this text are converted to
time at 8 MHz, the MC68000's clock. The original PNC is quoted at up to
9 MHz, and nothing in the RTL depends on the rate. Latencies:

| Operation | Clocks |
|---|---|
| Microword | 1 |
| Memory access | 3 microsteps |
| ROM word | ready 16 clocks after `BD_ROMRD` (two bytes, `BYTE_WAIT` = 8 each), 2 µs |
| Microinterrupt dispatch | next word after a `SQ_DISP` word that sees the request |
| Receiver stop, reject and status | registered |
| Transmitter outputs | registered, one nibble per clock |

## Where this design departs from the original, or fills a gap

- **Own choices.** The following are all this design's own, because the
  report does not give them:
  - the microword layout;
  - bus source and destination codes;
  - condition and request numbering;
  - message formats, checksum rule and buffer sizes on the transmit side;
  - the SAR bit layout and protection bits;
  - which interrupt levels are used, apart from level 6 for parity;
  - the restart password.
- **Receiver reads.** The PNC reads an input buffer only through its head
  word, which it pops. In the original, any of the 16 receiver RAM words can
  be gated onto the Data bus. All 16 bus-source codes are in use, so random
  reads were left out.
- **No source node number.** Messages here carry no source node number. The
  original mentions one but not where it goes, so software can put it in a
  data word.
- **Long outgoing messages.** These are tested at module level only
  (`tb_sw_transmitter`, 21 words). The end-to-end test sends short outgoing
  messages and receives a long one.
- **Control store loading.** The control store is read-only in the original
  (PROMs). Here it has a load port (`cs_prog_*`) so that microcode can be put
  in during simulation. Reset clears only the output register.
- **No microcode.** The report lists the microprograms the PNC must run, such
  as the time-of-day clock, block transfers, queue handling, refresh and
  timeouts, but does not give their code. None is included. The testbenches
  load short microprograms of their own.
- **Not modelled**:
  - the MC68000/PNC clock synchronizer, which relies on a tuned delay line;
  - the ECL line drivers;
  - the power supplies and battery backup;
  - the switch itself.
- **High address nibble.** The block diagram of the memory interface marks
  the high-address logic with a 3. This design uses a 4-bit nibble, so that
  the memory bus address comes to the 19 bits the same diagram gives.
- **Header checksum register.** In the original the MC68000 loads it. Here the
  PNC loads it from the Data bus, which is also how MC68000 register writes
  reach any node register.
- **ROM read time.** The ROM word is ready in 2 µs, as in the original. But the
  complete MC68000 ROM read in the end-to-end test takes 21 clocks
  (2.6 µs), against 2.0 µs in the original's execution-time table.
  Shortening `BYTE_WAIT` would close the gap if the EPROM is fast enough.
- **Sizes.** The report's sizes are built as given:
  - four modules of 128 KB, 512 KB in all (the Voice Funnel needs about
    80 KB);
  - a 1K × 64 control store;
  - 512 SARs;
  - a 16-byte input FIFO per receive buffer;
  - a 4 KB ROM.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Stimulus is randomised
with `$urandom` where that helps.

| Testbench | What it checks |
|---|---|
| `tb_pnc_sequencer` | every operation, stack depth, four-way branch, dispatch |
| `tb_pnc_alu` | every function/operand/destination against a reference model, flags, rotates |
| `tb_pnc_control_store` | load and read-back, one-clock output register, reset to a no-op |
| `tb_pnc_msrag` | priority and routine addresses for random request patterns |
| `tb_pnc` | a loop, a call and return, two microinterrupts in priority order, all four cases of a four-way branch, and the cycle count of straight-line code |
| `tb_mmu` | translation, segment FF mapping, ROM windows, access types, protection for random SARs |
| `tb_irq_arbiter` | level encoding for random request sets |
| `tb_boot_rom_ctrl` | word assembly and the 16-clock latency |
| `tb_biolink_adapter` | round-robin grants, capture, acknowledge, output enable |
| `tb_mem_interface` | nibble selection and the address/data path |
| `tb_mem_module` | reads and writes of words and bytes, parity test mode, error register, self-refresh lockout |
| `tb_sw_receiver` | buffer choice, checksum verdict, rejection, full buffer, flow control, Restart password |
| `tb_sw_transmitter` | frame contents, checksum, ignore nibbles, stop, rejection and retry, path rotation, byte writes, a 21-word message through the 6-word buffer |

`tb_processor_node` runs the whole node with every parameter at its default:

- four 64K-word modules, a full control store and 512 SARs;
- a behavioural switch that loops the transmitter back to the receiver.

A short microprogram does all of the following:

1. Sets up the node and sends two messages, and stores them in memory.
   - The first is started before its data was written and is rejected once.
   - The second has its header written as two byte writes.
2. Serves MC68000 reads through the MMU: a good read, a protected segment
   that gives a bus error, and a ROM read. It also serves a local write and
   reads the word back. Then it acknowledges the level-5 interrupt. It checks that the local read and write take 5 clocks
   each and the ROM read 21.
3. Serves a BIOLINK DMA read.
4. Takes an 11-word message from "another node" that fills the input FIFO and
   forces the receiver's stop.
5. Accepts a Restart.

It counts each mechanism and fails if any never happens. The mechanisms are:
microinterrupts, rejection, ignore nibbles, switch stop, receiver stop, DTACK,
bus error, ROM wait, bus request, DMA, restart, the level-5 interrupt and its
acknowledge. It
finishes in well under a second.

To run a testbench with Verilator 5 (`-Wno-fatal` is needed because the
testbenches build constants with mixed widths, which Verilator warns about):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pn_pkg.sv tb/tb_processor_node.sv --top-module tb_processor_node
./obj_dir/Vtb_processor_node
```

The testbenches also pass when every register starts at a random value
(`+verilator+rand+reset+2`).

Verilator's `-Wall` lint still reports some width and unused-signal warnings:

- comparisons of narrow addresses with 32-bit parameters;
- package constants that a given module does not use;
- in the top level, MMU register outputs and status signals that only the
  testbenches observe.

None of them changes behaviour.
