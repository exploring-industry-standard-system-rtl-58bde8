# A cycle-level PCI Express link model for SoC simulation

This RTL models a PCIe link between a host SoC and one memory-mapped
device. Its purpose is to let a device designed for an on-chip bus be
evaluated as if it were attached over PCIe. The CPU, the memory and the
device see ordinary bus ports. Between them every access is carried as
real PCIe packets:

- Transaction-layer packets (TLPs) with the 3-DW header layouts of the
  specification.
- Flow-control credits.
- Data-link sequence numbers, CRCs and ACK/NAK retransmission.
- Framing symbols on a configurable number of lanes.
- A link with a programmable latency in clock cycles.

The model is cycle-based, not bit-accurate at the electrical level. There
is no serializer, no 8b/10b coder and no separate link clock. Instead, a
timing model holds every group of lane symbols for a fixed number of cycles.
That latency parameter is how the model is calibrated to a real link.

Everything is synthesizable SystemVerilog in one clock domain with an
asynchronous active-low reset.

## The path of a request

```
 CPU ──epm/mmio──►┌──────────────┐  link  ┌──────────────┐  link  ┌───────────────┐──dev_mgr──► device regs
                  │ root complex │──────►│ timing model │──────►│ endpoint shim │
 memory ◄──dma────│  (+ stack)   │◄──────│ (each way)   │◄──────│  (+ stack)    │◄─dev_cli─── device DMA
                  └──────────────┘        └──────────────┘        └───────────────┘◄─dev_irq─── device irq
```

Three kinds of traffic cross the link.

**CPU access to the device.** A bus Get or Put on the endpoint-manager port
(`epm_*`) becomes a CfgRd0 or CfgWr0 TLP. The word address selects the
configuration register number. At the endpoint, the PCIeToTL adapter turns
the request into a Get or Put on the device's register port (`dev_mgr_*`).
The answer goes back as a Cpl or CplD and becomes the bus response.

**Device DMA.**
- A Get of 2^size bytes on the device's client port (`dev_cli_*`) becomes an
  MRd TLP of up to 32 DW. A Put becomes a 1-DW posted MWr.
- The root complex DMA node serves these requests against system memory
  (`dma_*`):
  - A write becomes one memory Put.
  - A read becomes one 4-byte Get per DW, all issued back to back.
- Memory may answer the Gets in any order. Each response is placed in a
  reorder buffer by its source ID. One CplD is sent when the buffer is
  complete.
- At the endpoint, each DW of the completion becomes one response beat to
  the device, in address order.

**Interrupts.** A rising edge on `dev_irq[i]` makes the shim send an MSI: an
MWr of the value `i` to `MSI_ADDR`. The root complex recognises that address
and sets bit `i` of its interrupt-pending register. `irq` to the CPU is the
OR of the pending bits that are also enabled.

## Packet formats inside the stack

All layers pass packets as streams of 32-bit beats (`beat_t`: data, sop, eop)
with a valid/ready handshake, one DW per cycle. Each layer adds to or removes
from this stream.

| layer | adds on transmit | |
|---|---|---|
| transaction | ECRC: CRC-32 over the header and payload, appended as one DW; the TD bit (bit 15 of DW0) is set | `pcie_tl_tx` |
| data link | a sequence-number DW before the TLP (12-bit number in bits 11:0) and an LCRC DW after it (CRC-32 over the sequence DW and the TLP) | `pcie_dll_tx` |
| data link | DLLPs are two DWs: `{type, 2'b0, hdr_credits[7:0], 2'b0, data_credits[11:0]}` (or the ACK/NAK sequence number in bits 11:0), then the CRC-16 (polynomial 0x100B) in bits 15:0 | `pcie_dll_tx` |
| physical | STP before a TLP, SDP before a DLLP, END after both; each DW becomes four byte symbols; PAD fills empty lanes | `pcie_phy_tx` |

Type codes follow PCIe:
- ACK 0x00, NAK 0x10.
- UpdateFC-P, -NP and -Cpl are 0x80, 0x90 and 0xA0, ORed with the VC number.
- STP, SDP, END and PAD are the K27.7, K28.2, K29.7 and K23.7 byte values, with
  a `k` flag beside each byte (`sym_t`).

On the link, one group of `LANES × SYMS_PER_LANE` symbols moves per cycle.

CRCs are computed MSB first, one DW per cycle, with an all-ones initial
value. The stack checks its own CRCs; they are not meant to interoperate
with other PCIe implementations.

## Flow control

Each receiver has RX buffers for each VC and for each of the three classes:
posted (MWr), non-posted (MRd, CfgRd, CfgWr) and completion. There is a
header buffer and a payload buffer per class.

Credits follow PCIe:
- One header credit per TLP.
- One data credit per 16 bytes of payload.

Flow control runs as follows:
1. After reset, the receiver sends an UpdateFC for every class with its full
   limits (`HDR_CREDITS`, `DATA_CREDITS`).
2. The transmitter keeps, for every VC and class, the last advertised limit
   and the credits it has consumed.
3. A TLP is sent only if `limit − (consumed + needed)` is non-negative in
   the modular arithmetic of the 8-bit header and 12-bit data counters.
   Otherwise it waits, and `credit_stall` is high.
4. When a TLP leaves an RX buffer towards the user, the receiver raises its
   limits by the credits freed and sends a new UpdateFC for that class.

There is no periodic refresh of the credit limits.

TLPs leave the RX side in arrival order, whatever their class. Among the
VCs, the TX side serves the highest-numbered VC first.

A TLP with a bad ECRC is dropped before it consumes buffer space, and
`ecrc_err` pulses. The transmitter has already counted its credits, so the
limits then stay one TLP short.

## ACK/NAK and replay

Every TLP sent by the data link layer is written into a replay buffer together
with its sequence DW and LCRC, and stays there until it is acknowledged.

The receiver checks the sequence number and the LCRC:

| TLP received | receiver action |
|---|---|
| good, in sequence | passed up, ACKed |
| duplicate (older sequence number) | dropped, ACKed again |
| bad CRC or out of sequence | dropped, NAKed with the last good sequence number |

The receiver keeps a TLP's DWs in a buffer and releases them only after
the LCRC has been checked. A damaged TLP is therefore never seen by the
transaction layer.

At the transmitter:
- An ACK frees every buffered TLP up to the sequence number it names.
- A NAK frees the same TLPs, then replays all the TLPs that are left, in
  order. `replay_start` marks the start of a replay.

There is no replay timer, so a lost ACK is recovered only by a later ACK or
NAK. Transmit priority is: ACK or NAK, then UpdateFC, then replays, then new
TLPs. A packet is never interrupted by another one.

## The link timing model

`pcie_timing_model` is one direction of the link. It is a queue of symbol
groups.

1. When a group enters, it is stamped with `now + LATENCY`, where `now` is a
   free-running 32-bit cycle counter.
2. The head group leaves in the first cycle in which `now` has reached its
   stamp. The comparison is safe across counter wrap.

Every group therefore takes exactly `LATENCY` cycles to cross, and groups
leave in order at up to one per cycle. The queue holds `DEPTH` groups. Its
depth must be at least `LATENCY` for a link that is sending every cycle not
to back up.

`err_inject` arms a single bit flip in the first data symbol after a later
STP. This is how the testbenches force a NAK and a replay.

## Root complex and endpoint shim

`pcie_root_complex` contains the following parts:
- A protocol stack.
- A packet-level round-robin arbiter between the endpoint manager and the
  DMA node.
- A router that holds each incoming 3-DW header and sends the TLP by type:
  - completions to the endpoint manager;
  - MWr to `MSI_ADDR` to the MMIO node;
  - other MRd and MWr to the DMA node;
  - anything else is dropped.

The MMIO node registers are at word offsets on the `mmio_*` port:

| offset | register | access |
|---|---|---|
| 0x00 | ID `0x5043_4965` | read |
| 0x04 | INT_PENDING | read, write one to clear |
| 0x08 | INT_ENABLE | read/write |
| 0x0C | MSI count | read |
| 0x10 | last MSI data | read |
| 0x14 | link error count | read |
| 0x18 | replay count | read |

`pcie_ep_shim` lets an unmodified bus device sit behind PCIe. It contains:
- a protocol stack;
- the PCIeToTL adapter (configuration requests to device register accesses);
- the TLToPCIe adapter (device requests to memory TLPs);
- the interrupt-to-MSI converter, which sends the lowest pending vector
  first;
- a three-way arbiter and a router by type.

The TLToPCIe adapter acknowledges a posted write to the device once the MWr
has been handed to the stack. It does not wait for memory.

## Parameters of the top (`pcie_model`)

| parameter | default | meaning |
|---|---|---|
| `LANES` | 8 | lanes; link group width in symbols together with `SYMS_PER_LANE` |
| `SYMS_PER_LANE` | 1 | symbols per lane per cycle |
| `PHY_LATENCY` | 500 | cycles to cross the link, each direction |
| `LINK_DEPTH` | 512 | symbol groups in flight per direction |
| `NUM_VC` | 1 | virtual channels |
| `HDR_CREDITS` | 32 | header credits per class and VC |
| `DATA_CREDITS` | 256 | data credits (16 B each) per class and VC, i.e. 4 KB |
| `MAX_READ_DW` | 64 | largest read served by the DMA node (256 B) |
| `NUM_IRQ` | 1 | device interrupt lines |
| `MSI_ADDR` | 0xFEE0_0000 | address that marks an MWr as an MSI |

Where the defaults come from:
- 8 lanes and a 500-cycle latency are the main configuration of the
  reference evaluation. They give a single-DW configuration read a round
  trip of 1071 cycles, about 1 µs at 1 GHz. That matches the round trip
  measured on a real 8-lane PCIe 3.0 link.
- The credit and buffer sizes are this design's choice of "large" RX
  buffers.

The top's remaining ports report events, one pulse per cycle in which they
happen; index 0 is the root complex and 1 the endpoint:
- `credit_stall`, `replay_start`, `fc_update` and `link_err`, per side;
- `reorder_event` and `msi_event`, at the root complex.

## Where this model departs from the reference description

These are the departures:
- **Datapath width.** Every layer moves one 32-bit DW per cycle, and the
  link moves `LANES × SYMS_PER_LANE` bytes per cycle.
  - Throughput is therefore `min(4, LANES × SYMS_PER_LANE)` bytes per cycle.
  - Fewer than four lanes do slow a transfer down.
  - Beyond four lanes, more lanes change nothing.
  - The reference scales bandwidth with the lane count up to 16 lanes, and
    reaches about 15 GB/s there.
- **Latency grows faster with read size than on a real link.** A completion
  is stored and forwarded whole at several points: the DMA node, the
  receiving data link layer (LCRC check) and the receiving transaction layer
  (ECRC check). Each of these adds about one cycle per DW. With 8 lanes, a
  4-byte read takes 1069 cycles and a 128-byte read takes 1255 cycles.
- **Sequence number and DLLP CRC** each take a full DW instead of 2 bytes.
- **Requests are not split.** The device adapter issues reads of up to
  32 DW (128 B). The DMA node serves at most `MAX_READ_DW` and returns a
  single completion. Longer reads are truncated.
- **One request at a time.** The DMA node serves one request at a time. It
  reads memory in 4-byte chunks.
- **Posted writes from the device are 1 DW.**
- **No replay timer and no periodic UpdateFC**, as noted above.
- **A single endpoint** with no switch. Configuration requests address
  registers directly, with no full configuration space.
- **The bus is a simplified TileLink-like channel pair.** It has
  single-beat requests, one response beat per DW, and source IDs used as
  PCIe tags.
- **Not part of this RTL:** the CPU, system memory, the network controller
  used in the reference case study, drivers and firmware. The testbench
  supplies behavioural stand-ins for the first three.

## Size

Synthesised with default parameters, the whole model is:
- about 5,000 word-level cells;
- about 3,300 flip-flop bits;
- about 390 kbit of buffer memory.

Most of the memory is the two link queues, at 512 groups × 8 symbols each.
The RX, TX and replay buffers make up the rest.

## Files

Packages and shared building blocks:
- `rtl/pcie_pkg.sv`: types, encodings and CRC functions.
- `rtl/pcie_fifo.sv`: a FIFO.
- `rtl/pcie_commit_fifo.sv`: a FIFO with commit and rewind, used for RX
  buffers that can drop a packet.
- `rtl/pcie_tlp_arb.sv`: a packet-level round-robin arbiter.

Protocol stack:
- `pcie_tl_tx`, `pcie_tl_rx`: transaction layer.
- `pcie_dll_tx`, `pcie_dll_rx`: data link layer.
- `pcie_phy_tx`, `pcie_phy_rx`: physical layer.
- `pcie_protocol_stack`: the three layers together.

Link: `pcie_timing_model`.

Root complex:
- `pcie_rc_mmio`, `pcie_rc_ep_manager` and `pcie_rc_dma`: the three nodes.
- `pcie_root_complex`: the nodes together.

Endpoint:
- `pcie_pcie_to_tl` and `pcie_tl_to_pcie`: the two adapters.
- `pcie_ep_shim`: the adapters together.

Top: `pcie_model`.

## Verification

There are five test programs. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog.

- **`tb/pcie_system_test.sv`** runs the whole `pcie_model` at its default
  parameters.
  - **Environment:**
    - A CPU driver.
    - A memory that accepts requests at a settable rate and answers after
      2–24 cycles in random order.
    - A small device with source, destination, length, command, done-count
      and scratch registers. Its copy engine reads with 16-word bursts and
      writes back with single posted writes, then pulses its interrupt.
  - **Checks:**
    - The ID register.
    - A configuration write and read-back, with the read round trip bounded
      to 1000–1150 cycles.
    - An error response for a missing register.
    - Three copies compared word by word. One runs against a memory that
      accepts 3% of requests, to exhaust credits.
    - Interrupt pending and clear.
    - Bit errors injected in each direction, with data still correct.
    - The error and replay counters.
  - **Required mechanisms:** the test fails unless credit stalls, UpdateFCs,
    damaged-packet detection at both ends, replays at both ends, DMA
    reordering, three MSIs, configuration reads and writes, and the exact
    count of MRd and MWr TLPs were all observed.
- **`tb/pcie_stack_test.sv`** joins two protocol stacks through two timing
  models.
  - **Set-up:** 4 lanes, a 40-cycle latency, and 8 header and 32 data
    credits.
  - **Traffic:** 180 random TLPs in both directions, with random
    back-pressure and one injected error.
  - **Checks:** every TLP is compared word by word. Credit stalls, UpdateFC,
    the NAK replay and the LCRC error must all happen, and no ECRC error may
    occur.
- **`tb/tb_pcie_read_latency.sv`** measures read round trips.
  - **Set-up:** three copies of the default model, with 1, 4 and 8 lanes.
  - **Traffic:** the device reads 4 to 128 bytes.
  - **Output:** the round trip of each read, which are the latency numbers
    quoted above.
  - **Checks:** the data, that latency grows with size, that one lane is
    slower than four, and that each latency lies within bounds.
- **`tb/tb_pcie_read_bandwidth.sv`** measures sustained read bandwidth.
  - **Set-up:** three copies of the default model, with 1, 4 and 16 lanes.
  - **Traffic:** 48 device reads of 128 bytes, with up to four in flight.
  - **Output:** about 0.36 bytes per cycle for every lane count. Four
    reads per round trip of about 1250 cycles is the limit, so lane count
    does not matter here.
  - **Checks:** the data, that bandwidth stays under 4 bytes per cycle,
    that one lane is slower than four, and that 16 lanes are no faster
    than four.
- **`tb/tb_pcie_timing_model.sv`** tests the link timing model.
  - **Exact latency:** every group must leave exactly `LATENCY` cycles after
    it was accepted, unchanged and in order.
  - **Queue full:** the queue must fill and push back.
  - **Error injection:** the flip must hit exactly the symbol after the STP,
    once.

The other `tb/tb_*.sv` files name the block they cover. Each instantiates
the system test or the stack test, whichever contains that block.

For example, to run the full system test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pcie_pkg.sv tb/tb_pcie_model.sv \
    --top-module tb_pcie_model
./obj_dir/Vtb_pcie_model
```

It runs about 50,000 cycles in well under a second. For the other tests,
replace the testbench file and the top-module name.

The assertions inside the RTL check for overflows of the RX and deframer
buffers and for a reused tag at the device adapter. They are active in
simulation.
