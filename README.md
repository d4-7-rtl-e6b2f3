# FPsPIN application block

sPIN is a programming model for smart NICs. For each incoming packet, the NIC
runs small user-supplied *handlers* (header, payload and tail handler) on
nearby cores. The handlers can rewrite the packet, send new packets and read
or write host memory. PsPIN is a RISC-V cluster built for this model. On its
own, though, it has no network port, no configuration path from the host and
no way to reach host memory.

This RTL is the glue that places PsPIN inside a NIC. It sits at the NIC's
per-interface AXI-Stream attach point, beside the NIC's application control
port (AXI-Lite) and its PCIe DMA engine. It adds four paths:

| path      | what it does | modules |
|-----------|--------------|---------|
| control   | lets the host load handler code and data into PsPIN memory, set every configuration register, start the cores and read what they print | `pspin_app_addr_map`, `pspin_ctrl_regs`, `apb_stdout` |
| ingress   | sorts received frames into "for PsPIN" and "for the host"; puts PsPIN's frames into a free L2 buffer slot and asks the scheduler to run the handlers | `pspin_ingress_datapath` = `pspin_pkt_match` → `pspin_pkt_alloc` → `pspin_ingress_dma` → `pspin_her_gen` |
| egress    | reads frames that handlers prepared in PsPIN memory and merges them with the host's transmit traffic | `pspin_egress_datapath` = `pspin_egress_dma` + `pspin_axis_arb_mux` |
| host DMA  | turns the handlers' AXI4 accesses to host memory into descriptors for the NIC's PCIe DMA engine, including unaligned writes | `pspin_hostmem_dma` (+ `pspin_dpram`) |

`fpspin_top` wires these together. The PsPIN cluster, the NIC and the
clock-domain crossings are not part of this RTL. Their connections are ports
of `fpspin_top`.

## Clocking and reset

Everything runs on a single clock `clk`. In the FPGA prototype this block and
PsPIN run at 40 MHz, while the NIC core runs at 250 MHz, so crossing FIFOs sit
on the NIC side of every stream and of the control port. Those FIFOs belong
outside this block.

All resets are synchronous and active low (`rstn`). The control register
`aux_rst` puts the whole data path back into reset without touching the
register file. It is also exported, so it can reset the PsPIN cluster.
After reset, no cluster fetches code, no frame matches, and no HER is issued.
The NIC therefore behaves as a plain NIC until the host configures it.

## Ingress: from frame to handler execution

### Matching (`pspin_pkt_match`, 4 cycles)

The matching engine decides which frames PsPIN handles, in a style similar
to iptables' `u32` match. There are `NUM_RULESETS` = 4 rulesets, each with
`NUM_RULES` = 4 matching units. Unit *u* holds an index `I`, a mask `M` and a
range `[S, E]`. It fires when

    S <= (W[I] & M) <= E

Here `W[I]` is the big-endian 32-bit word at bytes 4I..4I+3 of the frame.
A ruleset combines its units with AND (`MATCH_AND`) or OR (`MATCH_OR`). A
range with `S = E` is an equality test, and `S > E` can never fire, which
switches a unit off. A frame that any ruleset matches goes to PsPIN; if
several match, the lowest-numbered ruleset wins. Every other frame leaves
unchanged on the pass-through port back to the NIC. With `match_valid` low,
nothing matches.

For each frame that goes to PsPIN, the engine also produces a small metadata
record (`pkt_meta_t`):

- the SLMP message ID, a 32-bit field at byte 44, which is right after the
  2-byte SLMP flags that follow an IPv4 (no options) / UDP header;
- the End-Of-Message bit, which is the output of a fifth, dedicated unit in
  the matching ruleset (typically it tests the SLMP *eom* flag, bit 1 of
  byte 43);
- the ruleset ID;
- the length.

Rules see only the first 64-byte beat. That is enough for the
Ethernet + IPv4 + UDP + SLMP headers. Units with `I >= 16` never fire.

Latency: when the head beat is accepted, three register stages compute the
unit results, the ruleset results and the winner. The head beat leaves
exactly 4 cycles after it entered. The rest of the frame then follows at
one beat per cycle. The metadata can only be produced after `tlast`,
because only then is the length known.

### Slot allocation (`pspin_pkt_alloc`, `pspin_slot_pool`, 0 cycles)

A general allocator would have to handle out-of-order frees, which is
awkward in hardware. Instead, the 512 KiB L2 packet buffer is cut into two
halves of fixed-size slots. This works because network traffic is bimodal:
most packets are either tiny or full-size.

| half  | slot size | slots | used for |
|-------|-----------|-------|----------|
| lower | 128 B     | 2048  | frames of at most 128 B |
| upper | 1536 B    | 170   | frames of 129..1536 B (the 1514-byte MTU frame fits) |

Each half keeps its free slots in a FIFO (`pspin_slot_pool`). Allocating pops
the FIFO picked by the length. Freeing pushes back into the FIFO picked by
the address; PsPIN returns a slot on the `feedback` port once its handlers
have finished with the packet. A pool hands out never-used slots from a
counter before it reads its FIFO RAM. It behaves like a FIFO pre-filled in
address order, but needs no fill time after reset.

When the right class is empty, or the frame is longer than 1536 B, the
record is still passed on, flagged `drop`. The ingress DMA then discards the
frame and the drop counter increments. A frame never falls back to the other
class.

The allocator is combinational on the handshake (0 cycles).

### Ingress DMA (`pspin_ingress_dma`)

The order of arrival causes a complication: the frame data arrives first,
and its slot is known only afterwards. So the data is first buffered in a
2 KiB `pspin_axis_fifo` (one full-size frame). When the slot record
arrives, the frame is written over AXI4 to PsPIN's NIC inbound port:

- bursts are INCR and full width (64 B beats);
- a burst is split where it would cross a 4 KiB boundary;
- one burst is in flight at a time.

The record moves on only after the last write response. This matters
because PsPIN must not be scheduled on a packet that is not fully in
memory. After the metadata is taken, a slot that does not cross 4 KiB costs
len/64 + 4 cycles.

### HER generation (`pspin_her_gen`, 0 cycles)

The Handler Execution Request (`her_t`) combines two sources. From the
packet: message ID, EOM, L2 address and length. From the execution context
picked by the ruleset ID (one context per ruleset):

- header, payload and tail handler addresses and sizes;
- the handler's L2 memory region;
- the host memory window.

Contexts are registers. `her_gen_en` and each context's `enabled` bit act as
the configuration's *valid*: while either is low, requests wait rather than
being dropped.

## Control space

The host sees one 24-bit AXI-Lite window with 32-bit data.
`pspin_app_addr_map` compresses PsPIN's 32-bit host-slave address space
into it:

| address bits [23:22] | target | PsPIN / register address |
|----------------------|--------|--------------------------|
| `00` | L2 handler memory | `0x1c00_0000 + addr[21:0]` |
| `01` | L2 program memory | `0x1d00_0000 + addr[21:0]` |
| `1x` | control registers | `addr[15:0]` |

Inside the register window, the 16-bit address is `{grp[3:0], regid[11:0]}`.
The registers are 32-bit words, so register index `r = regid[11:2]`. The
complete map is in the header of `rtl/pspin_ctrl_regs.sv`. In short:

| grp | group | contents |
|-----|-------|----------|
| 0 | cluster | fetch enable per cluster, `aux_rst`, busy and MPQ-full status |
| 1 | stdout | pop one printed character `{valid, core, char}`, lost-character count |
| 2 | match | `match_valid`, mode per ruleset, I/M/S/E per unit, EOM unit |
| 3 | her_gen | `her_gen_en`, and per context: enable and every HER context field |
| 4 | stats | dropped packets, free small/large slots, egress frame counts, contention count |
| 5 | egress | round-robin enable |

Groups that must change consistently have an enable. The host clears it,
rewrites the group and sets it again. This applies to `match_valid`,
`her_gen_en` and each context's `enabled` bit.

**Standard output.** The cores print by storing a character to
`apb_stdout`. Core *c* writes byte offset 4*c*, so the block knows the
source core. Each character is queued with its core ID in a 1024-entry FIFO.
The host drains the FIFO through the stdout register; an empty FIFO reads
as 0. Characters that arrive while the FIFO is full are counted, not
queued.

## Egress (`pspin_egress_dma`, `pspin_axis_arb_mux`)

A handler that wants to send a frame leaves it in PsPIN memory and issues an
egress command `{id, addr, len}`; the address must be 64-byte aligned. The
egress DMA reads the frame with AXI4 bursts (split at 4 KiB). It streams the
data straight out: `keep` is trimmed on the last beat, and `rready` follows
the stream's `tready`. When the frame has gone, it reports `id` on the
completion port.

The arbiter merges this stream with the host's transmit stream one whole
frame at a time. By default PsPIN always wins when both inputs wait. Setting
the round-robin register makes the two inputs alternate instead. Grants per
input and contended grants are counted.

## Host DMA and unaligned writes (`pspin_hostmem_dma`)

Handlers reach host memory through an AXI4 master. The NIC's PCIe DMA
engine instead works with descriptors: host address, buffer-RAM address and
length. The bridge stages each burst in a dual-port RAM of 256 beats
(16 KiB), which is one maximum AXI4 burst.

- **Write:** the W beats are stored at RAM words 0.., and then one write
  descriptor is issued. The B response is sent when the engine reports
  completion, as SLVERR if it reports an error.
- **Read:** one read descriptor fills the RAM. The beats are then returned
  on R.

AXI expresses an unaligned write as aligned beats with byte strobes. The
real transfer is recovered from the first and last beat:

    offset = lowest set strobe bit of the first beat
    end    = highest set strobe bit of the last beat
    host address = (AWADDR aligned down to 64) + offset
    RAM address  = offset
    length       = beats*64 - offset - (63 - end)

For example, a 2-beat burst at `...0000` whose first beat has strobes from
byte 16 up and whose last beat ends at byte 40 becomes a 89-byte transfer
from host address `...0010`.

The bridge has these limits:

- only INCR bursts of full-width beats;
- one transaction at a time, and writes go first when both wait;
- no holes in the strobes inside a burst. The PCIe side cannot express
  arbitrary byte enables, and PsPIN's DMA master does not produce them.

Assertions flag narrow or non-INCR bursts and a misplaced `WLAST`.

## Latency summary

| block | cycles | check |
|-------|--------|-------|
| matching engine | 4 (head beat in → head beat out) | checked in the matching and end-to-end tests |
| allocator | 0 | checked |
| HER generator | 0 | checked |
| ingress DMA | frame fill + len/64 + 4 | not checked against a figure; depends on memory ready |
| host DMA | set by the PCIe engine (≈450 ns on the prototype) | not modelled in cycles |

## Where this RTL departs from the original FPsPIN

- The original uses library IP for several parts: the DMA engines (AXI write
  and read DMA), the stream FIFO, the arbiter, the dual-port RAM and the
  NIC's segmented DMA client interface. Here these are small
  purpose-written modules. The host-DMA side therefore uses a plain
  descriptor/RAM-port interface and not the NIC's segmented one.
- The original generates its register block from templates. The register
  numbering here is this design's own; only the grp/regid split is taken
  over.
- The original connects the stdout FIFO by hierarchical reference. Here it
  goes through ports, so the top stays synthesizable without cross-module
  references.
- Several details were chosen here, with a sensible choice made for each:
  - the stream width (512 bits);
  - the ruleset and unit counts, and the rule that the lowest ruleset wins;
  - the EOM unit;
  - which half of the buffer holds which slot class;
  - the drop flag;
  - the egress command format;
  - the FIFO and buffer depths;
  - the packet buffer base (`PKT_BUF_BASE` = 0).
- The ingress DMA latency follows from this design's own state machine. It
  is not tuned to the 8–70 cycles of the original.

## Simulating

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog. To run one with
plain Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl rtl/pspin_pkg.sv \
        tb/tb_fpspin_top.sv --top-module tb_fpspin_top -o sim --Mdir obj
    ./obj/sim

| testbench | what it covers |
|-----------|----------------|
| `tb_fpspin_top` | The whole block at its default size, with models of the host, PsPIN (memories, scheduler, cores printing) and the NIC's DMA engine. It covers: the address map; bypass and its 4-cycle latency; 300 matched and unmatched frames with random back-pressure, with L2 contents and every HER field checked; the 4 KiB burst split; slot exhaustion and oversize drops; `aux_rst`; egress under both arbitration modes with contention; unaligned host writes, error responses and reads; stdout. It counts each mechanism and fails if one never occurred. |
| `tb_fpspin_pingpong` | The UDP ping-pong workload at default size. Echo requests to port 5555 are matched into L2. A handler model swaps the addresses in place, sends the frame through the egress path and frees the slot. ARP and other frames reach the host, and the host transmits at the same time. It checks every reply byte for byte and reports the round trip through the block (about 17–106 cycles at 64–1514 bytes). |
| `tb_fpspin_datatypes` | The receive side of the MPI datatypes workload at default size. 16 messages of 3–8 SLMP packets arrive interleaved. A handler model reads each packet's message ID and offset from L2 and writes the payload to the message's host buffer at an unaligned address through the host-memory port. It checks every host byte, the EOM flag of every HER, and that all slots are freed. The datatype unpacking itself is handler software and is not modelled. |
| `tb_pspin_pkt_match` | AND/OR rulesets, metadata, 4-cycle latency, back-pressure, `match_valid` off |
| `tb_pspin_pkt_alloc` | slot classes, zero latency, no double allocation, exhaustion and drops, frees and reuse |
| `tb_pspin_her_gen` | every HER field for random contexts, gating by the enables |
| `tb_pspin_axis_arb_mux` | PsPIN priority, round-robin alternation, frame integrity, counters |

The simulator is two-state, so every register that is read has a reset
value, and testbench stimulus uses `$urandom`.

## Files

- `rtl/pspin_pkg.sv`: shared types (rules, metadata records, execution
  context, HER, egress command) and constants.
- `rtl/fpspin_top.sv`: the top level. Its port groups are: control port,
  PsPIN host slave, receive stream and pass-through, transmit streams,
  cluster control, scheduler (HER and feedback), L2 write port, egress
  commands and L2 read port, host-memory master, PCIe DMA descriptors and
  RAM port, and the APB stdout port.
- One module per remaining file in `rtl/`. Each file opens with a description
  of its interface and timing.
- `tb/`: the testbenches listed above.
