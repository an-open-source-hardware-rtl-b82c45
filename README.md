# UDMA fabric for remote control of a SoC-FPGA

A SoC-FPGA (a processor and FPGA fabric on one chip) that is driven from a PC has memories in
three places: the PC, the processor and the fabric. This design treats all of them as one global
memory map and moves data with a single instruction:

    UDMA <src_addr> <dst_addr> <src_inc> <dst_inc> <N>

It copies N 32-bit words. Word k is read from `src_addr + k*src_inc` and written to
`dst_addr + k*dst_inc`. An increment of 0 keeps hitting one address, which is how a FIFO is
drained or filled.

Each part of the system that owns a piece of the map is a *local resource agent*. In a single
board the PC is one agent and the SoC-FPGA is another. Agents exchange packets over a link such as
TCP/IP. A UDMA instruction whose source and destination lie in the FPGA is handed by the processor
firmware to the fabric. There a hardware *UDMA processor* executes it as a Wishbone bus master.

This repository holds the fabric side of the SoC-FPGA agent in synthesizable SystemVerilog:

    processor side            FPGA fabric
    (SoC bus)
                  +------------------------------+      +-----------------+
    host_* ------>| ComBlock                     |      | UDMA processor  |
                  |   registers  --instruction-->|----->|  (WB master)    |
                  |              <--status-------|<-----|                 |
                  |   FIFO in  (proc -> fabric)  |      +--------+--------+
                  |   FIFO out (fabric -> proc)  |               | WB
                  |   TDPRAM  (port B: proc,     |      +--------+--------+
                  |            port A: WB)       |<-WB->| WB interconnect |
                  +------------------------------+      +--+-----------+--+
                                                           |           |
                                                         BRAM    user WB port
                                                                 (brought out)

The processor, its firmware, the SoC bus, the network link and the PC software are not hardware
built here. The testbench models the firmware and the PC, so the whole packet-to-memory path can be
simulated.

## Files

| file | content |
|---|---|
| `rtl/udma_pkg.sv` | instruction, command, status, Wishbone and packet types; memory map; register numbers |
| `rtl/udma_processor.sv` | the instruction engine (Wishbone master) |
| `rtl/wb_interconnect.sv` | one master to N slaves, decoded by address region |
| `rtl/wb_bram.sv` | block RAM as a Wishbone slave |
| `rtl/comblock.sv` | processor/fabric communication block: registers, two FIFOs, dual-port RAM |
| `rtl/sync_fifo.sv` | FIFO used twice inside the ComBlock |
| `rtl/tdpram.sv` | true dual-port RAM used inside the ComBlock |
| `rtl/soc_fpga_top.sv` | top level: everything above wired together |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The fabric memory map

Addresses are **word** addresses: one address holds one 32-bit word, and increments count words.
The upper half of an address selects a region:

| region `adr[31:16]` | resource | behaviour of an access |
|---|---|---|
| `0x0000` | BRAM, 1024 words | read/write, offset wraps at the depth |
| `0x0001` | ComBlock FIFOs | read pops *FIFO in*; write pushes *FIFO out*; any offset |
| `0x0002` | ComBlock TDPRAM port A, 1024 words | read/write |
| `0x0003` | user Wishbone port (brought out of the top) | whatever is attached |
| other | none | the interconnect answers `err` |

To add a resource, give it a region in `REGION_MAP` (in `udma_pkg`) and a port on the
interconnect (`NS`).

## The UDMA processor

### Control through the ComBlock registers

The firmware writes the instruction into ComBlock output registers 0–4: `src_addr`, `dst_addr`,
`src_inc`, `dst_inc` and `N`. Writing output register 5 issues a command from bits 1:0. The write
strobe of that register is the command strobe, so writing the same code twice issues it twice.

| code | command | effect |
|---|---|---|
| 1 | START | latch registers 0–4 and run. Ignored while busy. N = 0 completes at once. |
| 2 | STOP | abandon the transfer in progress after at most one more cycle. `stopped` is set and the words already moved stay moved. |
| 3 | RESET | abandon any transfer and clear status and count |

The processor reports back through ComBlock input registers. Register 0 holds the status word:
bit 0 `busy`, bit 1 `done`, bit 2 `stopped`, bit 3 `error`. Register 1 holds the number of words
moved. Input registers 2–15 are free and enter the top on `user_ireg`.

### Transfer timing

The engine moves one word at a time: a Wishbone read of the source, then a Wishbone write of the
destination. `cyc` stays high for the whole transfer. Every slave in this design acknowledges one
cycle after the strobe, so a word takes 4 cycles. A transfer of N words keeps `busy` high for
exactly 4·N cycles. A command written on the processor port reaches the engine one cycle after
the write.

A slave may hold `ack` low. The FIFO slave does this while *FIFO in* is empty (on a read) or
*FIFO out* is full (on a write). The transfer then simply waits for the firmware. This is how a
transfer longer than the FIFO streams through it: the firmware keeps pushing or draining while the
engine runs. STOP is the way out of a wait that will never end.

A Wishbone `err` ends the transfer with `error` set. This happens, for example, when an address
falls in no region.

### Stopping cleanly

Slaves register their `ack`, and a slave carries out an access on the clock edge where it first
sees the strobe. That edge can be the very one where STOP is taken. The engine therefore does not
drop the bus blindly. It lowers the strobe, keeps the address of the abandoned access, and waits
one cycle (state `S_DRAIN`, still reported busy) for a late answer. A late write `ack` is counted.
As a result, the count register always equals the number of words actually written, whatever the
cycle in which STOP arrives. A read that completes this way is dropped: a FIFO source has already
given the word up.

The same drain cycle, plus the fact that every slave drops `ack` for a cycle after each access,
keeps an abandoned access's `ack` from being taken as the answer to the next transfer. A stalled
slave (an empty FIFO) commits nothing once the strobe is gone, so STOP always ends a stall.

## The ComBlock

The ComBlock gives the processor and the fabric three ways to talk. It hides the SoC bus from the
fabric.

**Processor side.** A simple synchronous port stands in for the vendor SoC bus. A request is one
cycle of `host_valid`, together with `host_we`, `host_addr` and `host_wdata`. Read data return with
`host_rvalid` in the following cycle. In a real device, a bridge from the vendor bus (for example
AXI4-Lite) would drive this port. Word address map (11-bit address with the default 1024-word RAM):

| address | meaning |
|---|---|
| `0x400–0x7FF` (top address bit set) | TDPRAM port B |
| `0x00–0x0F` | output registers, read/write |
| `0x10–0x1F` | input registers, read only |
| `0x20` | FIFO data. A write pushes *FIFO in*; when the FIFO is full the word is dropped and `in_overflow` is set. A read pops *FIFO out*; when it is empty the read returns 0 and `out_underflow` is set. |
| `0x21` | FIFO status: bit 0 in_empty, 1 in_full, 2 out_empty, 3 out_full, 4 in_overflow, 5 out_underflow, 15:8 in_count, 23:16 out_count |
| `0x22` | FIFO control (write): bit 0 clears *FIFO in*, bit 1 clears *FIFO out*, bit 2 clears the two sticky flags |

**Fabric side.** The output registers come out as `oreg_o`. `oreg_wr_o` pulses for one cycle in
the cycle the new value appears. The input registers are inputs (`ireg_i`). The FIFOs and the RAM
are two Wishbone slaves.

## Packets

Agents exchange packets made of 32-bit words. Software builds and decodes them: the firmware on
the processor and the command line tool on the PC. The hardware here never sees a packet. Their
layout is given as types in `udma_pkg`:

| word | bits |
|---|---|
| header 0 | 31:16 header keyword, 15:12 protocol number, 11:4 packet type, 3:0 priority |
| header 1 | 31:16 destination agent ID, 15:0 source agent ID |
| payload | depends on the type |
| trailer | trailer keyword |

There are three packet types:

- **Command packet.** One payload word holding a command code (START/STOP/RESET) or an error
  message.
- **Raw data packet.** Carries data together with the destination half of a UDMA instruction, and
  a checksum.
- **UDMA packet.** Carries a whole instruction.

The keyword values and the type codes in `udma_pkg` belong to this design. The payload layouts
used in the testbench are also this design's: raw data = `dst_addr, dst_inc, N, data…, checksum`;
UDMA = `src, dst, src_inc, dst_inc, N`.

### What the firmware does (as modelled in `tb_soc_fpga_top`)

1. **Raw data packet for the fabric.** The firmware loads `UDMA FIFO→dst`: source `0x0001_0000`
   with increment 0, N words. It then issues START and pushes the payload into *FIFO in* as space
   allows, polling the status register until the transfer is done.
2. **UDMA packet with both ends in the fabric.** The firmware loads the instruction and issues
   START.
3. **UDMA packet that reads the fabric into the PC's memory.** The firmware loads
   `UDMA src→FIFO`, drains *FIFO out* while the transfer runs, and sends the words back to the PC
   in a raw data packet.
4. **Command packet.** The firmware writes the code into output register 5.

Step 1 followed by step 3 is the reference test application: the PC writes data into the BRAM and
reads it back to verify it.

## How far to trust it, and where it is this design's own

The architecture fixes these things: the instruction and its meaning, 32-bit words, the block split
(UDMA processor, Wishbone interconnect, BRAM, ComBlock with registers, FIFOs and dual-port RAM),
Wishbone inside the fabric, and the packet header layout. The following are choices made here,
because no source for them was available:

- **Sizes.** BRAM and TDPRAM have 1024 words each (one 36-kbit block). The FIFOs are 32 deep. There
  are 16 + 16 registers.
- **Register assignment and command codes.** The fabric address map and the ComBlock processor-side
  map are also this design's.
- **Command semantics.** START is ignored while busy. STOP keeps the words already moved. RESET
  clears status.
- **Flow control and errors.** The FIFO slave stalls instead of answering an error. The
  interconnect answers `err` for unmapped addresses.
- **Transfer engine.** The UDMA processor has no internal data buffer and moves one word per
  4 cycles. A reference implementation of this architecture used about 500 flip-flops and a
  block RAM for its UDMA processor, which suggests buffering or bursts. This engine is much
  smaller and slower per word.
- **Clocking.** One clock and one active-low asynchronous reset serve the whole fabric, including
  both sides of the ComBlock. Memories are not reset. A ComBlock whose processor side runs on
  another clock would need dual-clock FIFOs and synchronised register strobes. `tdpram` already
  has two clocks.
- **Processor port.** The ComBlock's processor port is a simple bus, not the vendor SoC bus.
- **Not built.** Application-specific parts are not built: the external hardware controllers and
  the core design. The user Wishbone port and `user_ireg` are where they attach.

Lint notes: `tdpram` writes its array from two clocked processes, which is what a true dual-port
RAM is; tools report it as multiply driven. Assertion `disable iff` clauses make tools report
`rst_n` as used both synchronously and asynchronously.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and finishes, and a
watchdog ends it if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_soc_fpga_top rtl/udma_pkg.sv tb/tb_soc_fpga_top.sv
    ./obj_dir/Vtb_soc_fpga_top

Replace the top module and file for a block test: `tb_udma_processor`, `tb_wb_interconnect`,
`tb_wb_bram`, `tb_comblock`, `tb_sync_fifo` or `tb_tdpram`.

What each testbench covers:

- **`tb_soc_fpga_top`** runs at the top's default sizes. It sends packets from a modelled PC
  through a modelled firmware. It writes all 1024 BRAM words from the PC and reads them back, then repeats that at 1, 31, 32, 33
  and 100 words, on both sides of the FIFO depth. It
  copies BRAM to TDPRAM and checks that the engine stays busy for exactly 4·N cycles. It scatters
  data to the user port with stride 2, stops a transfer stalled on an empty FIFO, and resets. It
  starts a copy by command packet and provokes a bus error. It counts FIFO-empty and FIFO-full
  stalls, each packet type, each command, TDPRAM, user-port and error responses, and fails if any
  never occurs.
- **`tb_udma_processor`** checks against a reference copy loop: negative and zero increments,
  N = 0, slaves that stall a random number of cycles, STOP, START while busy, bus errors and
  RESET.
- **`tb_comblock`** drives both sides. It checks register pulses, FIFO order, stalls in both
  directions, the sticky flags and sharing of the RAM between the two sides.
- **`tb_wb_interconnect`** checks that each access reaches only its slave and that unmapped
  addresses get `err`.
- **`tb_wb_bram`** checks ack latency, byte selects and that no access is acknowledged twice.
- **`tb_sync_fifo`** and **`tb_tdpram`** compare random traffic with reference models.
