# RiceNIC in SystemVerilog

A Gigabit Ethernet network interface card built from two FPGAs, which can
be programmed for research on how a NIC should work. The larger FPGA (a
Virtex-II Pro) has two embedded PowerPC 405 cores. They run the NIC
firmware on a processor local bus (PLB). The hardware around them
does the parts that need line-rate speed:

- moving frames between memory and the Ethernet MAC;
- TCP/UDP checksums;
- DMA bursts to and from the host.

Firmware drives every hardware unit through 64-bit descriptors in FIFO
queues. Policy stays in software, so it can be changed; the hardware only
carries out what it is told. The smaller FPGA (a Spartan-IIE) holds:

- the PCI side of DMA;
- a 2 MB SRAM that both the host and the NIC can reach.

The low 512 KB of that SRAM is cut into 128 contexts of 4 KB, one per
guest operating system. When a guest writes into its context, a
hardware event names the context to the firmware. The firmware then
does not have to poll 128 regions.

This repository is the RTL of both FPGAs' custom logic, joined in one
top module, `ricenic_top`. Vendor cores and chips are left outside as
ports:

- the PowerPC cores;
- the DDR controller and memory;
- the PCI core;
- the Gigabit MAC core and PHY;
- the SRAM chip.

```
            Virtex side                                      Spartan side
 PPC0 ─┐                                                 ┌── PCI master (DMA)
 PPC1 ─┤  ┌───────── PLB (plb_xbar, 5 masters x 8 slaves)│
 mac_tx┤  │ DDR port  BRAM 32K  UART  mac_tx/rx regs     │  dma_backend (2 KB buffer)
 mac_rx┤  │ DMA regs  event regs  SRAM window ──┐        │        │
 dma_fe┘  └─────────────────────────────────────┼────────┘        │
    │                                      bridge_virtex ═link═ bridge_spartan
    └────── DMA flits ─────────────────────────┘   ▲                │
                                                   │ events     sram_ctrl ── SRAM chip
 hw_events ── ring ──> scratchpad 2 KB <── PPC1    │                ▲
     ▲─────────────────────────────────────────────┘                └── PCI target (host PIO)
```

## Files

| File | Contents |
|---|---|
| `rtl/ricenic_pkg.sv` | Bus, descriptor and link types, address map, `csum_add` |
| `rtl/ricenic_top.sv` | Both FPGAs wired together |
| `rtl/plb_xbar.sv` | PLB: round-robin arbiter and address decoder |
| `rtl/plb_ram.sv` | 32 KB BRAM slave |
| `rtl/uart_plb.sv` | Serial console |
| `rtl/mac_tx.sv`, `rtl/mac_rx.sv` | MAC unit: descriptor queues, gather, checksum |
| `rtl/dma_frontend.sv`, `rtl/dma_backend.sv` | The two halves of the DMA unit |
| `rtl/bridge_virtex.sv`, `rtl/bridge_spartan.sv` | Ends of the inter-FPGA link |
| `rtl/sram_ctrl.sv` | Shared SRAM, contexts, update events |
| `rtl/hw_events.sv`, `rtl/scratchpad.sv` | Event notification and its 2 KB mailbox |
| `rtl/sync_fifo.sv` | FIFO used for the queues |
| `tb/tb_<module>.sv` | Self-checking testbench per module; `tb_ricenic_top` runs the whole card |
| `tb/tb_ricenic_stream.sv`, `tb/tb_ricenic_path.sv`, `tb/tb_ricenic_cdna.sv` | Whole-card workloads: line-rate streaming, host-to-wire paths, 128 guest contexts |
| `tb/plb_mem_model.sv`, `tb/sram_model.sv`, `tb/pci_host_model.sv` | Models of DDR, SRAM chip and host memory behind PCI |

## The bus

The design uses its own simplified PLB: single 64-bit transfers and no bursts.

- A master raises `plb_req_t` (`valid`, `we`, `addr`, `wdata`, `be`) and
  holds it until `plb_rsp_t.ack`. Read data comes with the ack.
- Every slave here acks one cycle after it sees `valid`.
- The crossbar gives one master at a time the bus, in round-robin order.
  It keeps the grant until the ack. On an idle bus, arbitration adds one
  cycle. When another master is waiting, the grant passes to it in the
  ack cycle, so a loaded bus moves one 64-bit word every two cycles.
- An address that matches no slave is acked with zero data.
- An assertion checks that a master keeps its request stable until the ack.

| Slave | Base | Size |
|---|---|---|
| DDR (port) | `0x0000_0000` | 256 MB |
| BRAM | `0x1000_0000` | 32 KB |
| UART | `0x2000_0000` | 4 KB |
| MAC transmit | `0x2000_1000` | 4 KB |
| MAC receive | `0x2000_2000` | 4 KB |
| DMA | `0x2000_3000` | 4 KB |
| Hardware events | `0x2000_4000` | 4 KB |
| SRAM window (through the bridge) | `0x3000_0000` | 2 MB |

The masters are PowerPC 0, PowerPC 1, MAC transmit, MAC receive and the
DMA front end, in that port order.

## MAC unit

### Transmit (`mac_tx`)

Firmware writes a `tx_desc_t` to `MACTX+0x00`. It is queued, and the write is dropped if the 32-entry queue is full.

| Bits | Field |
|---|---|
| 31:0 | fragment byte address (any alignment) |
| 42:32 | fragment length in bytes |
| 43 | `eop`: last fragment of the frame |
| 44 | `csum_en` (taken from the frame's first descriptor) |
| 52:45 | `csum_start`: first byte summed |
| 60:53 | `csum_ins`: where the 16-bit result goes |

The unit gathers fragments into a frame buffer until the `eop`
fragment, so one frame can come from several memory regions. For
example, the headers can come from one buffer and the payload from
another. It sums 16-bit words in ones-complement arithmetic while it
gathers, from `csum_start` to the end of the frame. It then writes the
complement big-endian at `csum_ins`.

As in usual checksum offload, firmware puts the pseudo-header sum in the
checksum field beforehand. The frame then goes out to the MAC core as
bytes with `valid`/`ready`/`last`. `MACTX+0x08` reads
`{frames sent, 16'b0, queue count}`.

The frame buffer has two 2 KB halves. One frame is sent from one half
while the next is gathered into the other. The buffer is built as eight
byte lanes, each with its own write port. That way all the bytes a
fetched word gives to a fragment are stored in one cycle, whatever the
alignment of the source and of the frame position. One word costs a PLB
read (three cycles on an idle bus) and one copy cycle, so gathering
runs at about 2 bytes per clock. The byte stream drains 1 byte per
clock, so frames leave back to back.

### Receive (`mac_rx`)

Firmware posts buffers with `rx_desc_t` at `MACRX+0x00`:

- address in bits 31:0, 8-byte aligned;
- size in bits 42:32.

Buffers are used in the order they were posted, wherever they are in
memory. A frame comes in from the MAC core as one byte per `valid`, with
`last` and `err` on its final byte, into one half of a two-frame
buffer. While it arrives, the unit adds up the ones-complement sum from `csum_start`.
That is register `0x18`, default 34: Ethernet plus a 20-byte IPv4
header.

At the end of the frame, the head buffer descriptor is taken and the
half is handed to a copy engine. Meanwhile the next frame arrives in the
other half. The copy engine writes the frame into the buffer with 64-bit
PLB writes,
and a completion is queued. Reading `0x08` pops it:

| Bits | Field |
|---|---|
| 31:0 | buffer address |
| 42:32 | frame length |
| 43 | error from the MAC core |
| 59:44 | raw checksum; firmware adds the pseudo-header and checks for `0xFFFF` |
| 63 | valid; clear when the queue is empty |

- A frame is dropped and counted (register `0x10` = `{dropped, received}`) when no buffer is posted.
- A frame is also dropped when it starts while both halves are still occupied.
- A buffer too small for its frame comes back as a completion with length 0 and the error bit.

## DMA unit

The DMA unit moves data between NIC memory and host memory. It is split over the two FPGAs:

- The front end (`dma_frontend`, Virtex side) keeps the descriptors and works in NIC memory.
- The back end (`dma_backend`, Spartan side) keeps a 2 KB buffer and drives the PCI core's master side.

Firmware queues a descriptor in two writes:

1. the 64-bit host address to `DMA+0x00`;
2. the command to `DMA+0x08`:
   - NIC address in bits 31:0;
   - byte length in bits 47:32;
   - bit 48 is the direction (1 = NIC to host).

The front end cuts each descriptor into bursts of at most 2 KB, the size
of the back-end buffer. One burst is in flight at a time.

- **Host to NIC.** The back end issues one PCI read of the whole burst
  and fills its buffer. It then streams the words over the link. The
  front end takes them into a four-word FIFO and writes them to NIC
  memory, so link transfers and bus writes overlap.
- **NIC to host.** The front end reads NIC memory and streams the words
  over. The back end issues one PCI write when it has the whole burst,
  then sends a completion flit.

`DMA+0x10` reads `{queue count, 16'b0, descriptors done}`. Addresses and
lengths must be multiples of 8 bytes. For scatter/gather, queue one
descriptor per region.

## The link between the FPGAs

Each direction carries `br_flit_t` flits with `valid`/`ready`. A flit holds a kind, a 64-bit address, 64-bit data, byte enables, a burst length and `last`.

| Kind | Virtex to Spartan | Spartan to Virtex |
|---|---|---|
| `PIO_RD` / `PIO_WR` | SRAM word access from the PLB window | read data / write ack |
| `DMA_RD` | host-to-NIC burst request | one data word of that burst |
| `DMA_WR` | NIC-to-host burst request | burst done |
| `DMA_DATA` | data word of a NIC-to-host burst | |
| `EVENT` | | context number that a guest wrote |

The Virtex end has one PIO access outstanding at a time. PIO flits go
out before DMA flits. The Spartan end sends events first, then PIO
answers, then DMA flits.

A PLB read of the SRAM therefore crosses the link twice, so the SRAM is
the slowest memory the processors see. That is why it is used for what
the host shares with the NIC, not as a working store.

## Shared SRAM, contexts and events

`sram_ctrl` serves two ports, taking turns when both are waiting:

- the host (PCI target, programmed I/O);
- the NIC (link PIO).

Each access takes three cycles from request to ack against a synchronous
SRAM chip that is 64 bits wide with byte enables.

A host write into the low 512 KB raises an event for context
`addr[18:12]`. The host's ack waits until the event has been accepted,
so no update can be lost. The event crosses the link to `hw_events`.

`hw_events` keeps one pending bit per context:

- If the bit was clear, the unit sets it and writes a record into the
  next slot of a 256-entry ring in the scratchpad. The record is
  `{sequence number[63:32], context[6:0]}`.
- If the bit was already set, the event merges with the pending one.

The second PowerPC reads the ring from its own scratchpad port, up to
the producer index at `EVT+0x00`. It services each context and clears
its bit by writing the context number to `EVT+0x08`. `EVT+0x10` and
`EVT+0x18` show the 128 pending bits.

At most 128 records can be pending, and the ring has 256 slots, so the
ring can never overflow.

## UART

The UART is 8N1, with 16-byte transmit and receive FIFOs. Its default divisor of 868 gives 115200 baud at 100 MHz.

| Offset | Access |
|---|---|
| `UART+0x00` | write: send a byte |
| `UART+0x08` | read: pop `{valid, byte}` |
| `UART+0x10` | read: status `{tx idle, rx overrun, rx available, tx full}` |
| `UART+0x18` | read/write: bit-time divisor |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each one also has a watchdog. For
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    --top-module tb_ricenic_top rtl/ricenic_pkg.sv tb/tb_ricenic_top.sv
./obj_dir/Vtb_ricenic_top
```

`tb_ricenic_top` builds the top at its default sizes and runs the whole
card in a few seconds. Each of these happens at least once, and the
testbench fails if one does not:

- a frame gathered from two fragments with its checksum inserted;
- a received frame with its checksum;
- a frame dropped for want of a buffer;
- DMA in both directions, with a 5000-byte transfer split into 2 KB bursts;
- guest writes that raise events, including one merged event;
- PLB access to the SRAM over the link;
- UART output;
- contention between masters on the PLB;
- back-pressure from the MAC core.

`tb_ricenic_stream` runs full-duplex TCP streaming, also at the default
sizes, with payloads of 60, 460, 960 and 1460 bytes. Transmit frames are
gathered from a header and an odd-aligned payload, with checksum
insertion. The MAC core model takes one byte per clock and pauses
24 clocks after each frame (preamble, FCS, inter-frame gap). At the same
time, receive frames arrive back to back at that rate.

The testbench fails on any clock where the core was ready and had no
byte, on any dropped frame, and on any wrong byte or checksum. Taking
one clock as one byte time of the line (125 MHz), it prints:

| TCP payload (bytes) | Transmit (Mb/s) | Ethernet limit (Mb/s) |
|---|---|---|
| 60 | 434.8 | 434.8 |
| 460 | 855.0 | 855.0 |
| 960 | 924.9 | 924.9 |
| 1460 | 949.3 | 949.3 |

The hardware path is never the bottleneck. On the real card, the
firmware's per-packet work limits small packets; that work is not
modelled here.

`tb_ricenic_cdna` puts all 128 contexts to use, also at the default
sizes. Guests, played through the host port, write control words into
their contexts in random order. Meanwhile a model of the firmware on the
second processor follows the event ring. For each record, it clears the
context's pending bit and only then reads the context over the link, so
a write that lands after the read raises a new event. The test checks:

- every guest's last word reaches the firmware;
- ring records arrive in sequence and wrap past the 256 slots;
- repeated writes are merged;
- writes above the context region raise nothing.

`tb_ricenic_path` runs the complete paths with 1514-byte frames, with
a model of the firmware in the loop.

- **Host to wire:** DMA from host memory into DDR. Firmware polls the
  DMA completion count, then queues the frame for sending. The result
  is 949.3 Mb/s of payload, which is line rate.
- **Wire to host:** frames arrive back to back into BRAM. Firmware pops
  each completion and queues a DMA to host memory. The last frame reaches
  the host about one frame time after it arrived.

The bus handover and the DMA FIFO above exist for this test. Without
them, host to wire reaches only 910 Mb/s.

The other testbenches exercise one module each with random traffic
against simple reference models. A few use smaller parameters to stay
short.

## Where this design makes its own choices

The following are defined in this RTL and would have to be matched to
real parts:

- **Vendor interfaces.** The PLB protocol, the MAC-core byte stream,
  the PCI master and target interfaces and the link format are
  simplified stand-ins. They are not the vendor protocols.
- **One clock.** Everything runs on one clock with an asynchronous
  active-low reset. The real card has separate clock domains for PCI
  (66 MHz), the MAC and the processors, with crossings in the vendor
  cores.
- **Formats.** Descriptor layouts, register maps, the address map and
  the event ring are this design's own.
- **Store and forward.** Both MAC directions hold whole frames, two
  per direction. Transmit finishes gathering a frame before it sends it.
  That lets the checksum go anywhere in the frame, at the cost of one
  frame of latency. Line rate relies on the bus:
  - The two MAC masters need roughly 6 to 7 of every 8 PLB clocks under full
    duplex, with 1 byte per clock on the line.
  - A slower PLB clock, or heavy processor traffic, would need a wider or
    burst-capable bus.
- **Where the DMA front end and the event unit attach.** Both hang off
  the Virtex end of the link. Both also have their own PLB ports here:
  - The DMA front end has a master port, for NIC memory, and a register
    port.
  - The event unit has a register port.

  A design that routes them through the bridge's bus port would change
  only the address decoding.
- **Control unit.** The control unit on the Virtex PLB is left out,
  because its purpose is not known.
- **Firmware.** The processors' firmware is not part of this RTL. That
  includes the timer-based profiler, the NAT and data-caching
  extensions, and the virtualization firmware.
