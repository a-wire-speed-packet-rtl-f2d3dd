# Wire-speed packet classification and capture for a NetFPGA-style data path

This is a small module that sits in series in a packet pipeline and copies
nothing. Instead, it **diverts** the packets that match a filter to the host.
It looks at the first 64 bytes of each packet as the packet streams in. If
those bytes match the filter, the module does two things as the packet leaves:

- it changes the packet's destination port to a host DMA interface;
- it overwrites the destination MAC address with the reserved tag
  `FF:FF:FF:FF:FF:FE`, so that host software can tell captured packets from
  other exception packets.

Packets that do not match pass unchanged. The module never stalls the
pipeline by itself. It delays each packet by a fixed ten 8 ns clocks
(80 ns), counting the clock in which the first word arrives. One more clock
is added for each extra module header in front of the packet.

The filter holds no knowledge of protocols. It is a 512-bit data pattern and a
512-bit mask over the first 64 bytes. Host software turns a rule such as "TCP
to 131.111.179.82 port 80 whose payload starts with GET" into those two bit
strings. Any protocol can therefore be matched, as long as its fields sit at
fixed byte offsets in the first 64 bytes.

The main configuration, `packet_capture_4port`, places one instance in each of
the four MAC receive paths, between the MAC receive queue and the input
arbiter. This gives every port its own filter. By default, port *p* captures to
DMA interface *p*.

## The packet bus

Packets move as one 64-bit data word and one 8-bit control word per clock,
with `wr`/`rdy` flow control:

| word | `ctrl` | `data` |
|------|--------|--------|
| module header(s) | non-zero; `0xFF` is the I/O-queue header | `[63:48]` one-hot destination port, `[47:32]` word count, `[31:16]` source port, `[15:0]` byte count |
| data word 0 | `0x00` | bytes 0–7 of the frame, byte 0 in bits 63:56 (destination MAC = bits 63:16) |
| data words 1 … n-2 | `0x00` | bytes 8 … |
| last data word | one-hot byte marker, non-zero | the remaining bytes |

In the one-hot port field, bit 2*p* is MAC port *p* and bit 2*p*+1 is DMA
interface *p*. These are the conventions of the NetFPGA framework. They are
collected in `rtl/pc_pkg.sv`.

## How a packet is classified

Filter word *i* (*i* = 0…7) consists of `filter_data[i]`, `filter_mask[i]`
and a flag `filter_valid[i]`. Word *i* of the packet gives:

- a **hit** if `(word & mask) == data`;
- a **miss** if `(word & mask) != data`;
- **neither** if the mask is zero or the entry was never written.

A packet matches if, by its eighth data word, there has been at least one hit
and no miss. Every pattern must therefore match: patterns combine with AND,
and OR is not supported. A filter whose words are all masked out matches
nothing. Erasing a filter means writing zero masks.

Some examples of where fields fall:

- The Ethertype is frame bytes 12–13, so it sits in word 1, bits 31:16. To
  match IPv4 only, set `filter_mask[1] = 64'h0000_0000_FFFF_0000` and
  `filter_data[1] = 64'h0000_0000_0800_0000`.
- The test `tb_packet_capture_4port` uses this compiled filter for TCP to
  131.111.179.82 port 80 with payload "GET":

      DATA 0000000000000000 0000000008004500 0000000000000006 000000000000836F
           B352000000500000 0000000000000000 0000000000004745 5400000000000000
      MASK 0000000000000000 00000000FFFFFF00 00000000000000FF 000000000000FFFF
           FFFF0000FFFF0000 0000000000000000 000000000000FFFF FF00000000000000

A data pattern is only useful at a fixed offset. Optional headers move every
field behind them. IP options make a frame miss a filter written for a
20-byte IP header, as the test shows. TCP options make payload matching
unreliable in general.

A packet shorter than eight data words never reaches the decision point, so it
is never captured. Real Ethernet frames are at least 60 bytes, which is eight
words, so this only affects runts.

## Timing: why the FIFO, and the decision queue

The hard part of the design is letting a packet's first word leave only after
the packet's decision is known, without ever stalling the stream.

```
 in_* ──┬──────────────► pc_small_fifo 72 x 10 ───► pc_header_rewrite ──► out_*
        │                                               ▲      ▲
        └─► pc_filter_check ──► decision queue (1 x 10) ┘      │
                 ▲  (one exception_pkt bit per packet)         exception_port
                 │ lookup at in_word_num
            pc_regs (filter_data / filter_mask RAMs, filter_valid, PORT_NUM_HITS) ◄─► register ring
```

1. **Matching on the way in.** Every word written into the FIFO goes at the
   same time to `pc_filter_check`. That block reads filter word
   `in_word_num` from the RAMs asynchronously and computes hit and miss in the
   same cycle. It accumulates them over the window.
2. **One decision per packet.** On the eighth data word, or on the last word
   of a shorter packet, the check pushes one bit, `exception_pkt`, into a
   small decision queue. This queue is itself a 1-bit `pc_small_fifo`.
3. **Holding the first word.** `pc_header_rewrite` pops the FIFO whenever the
   FIFO is not empty and `out_rdy` is high. The only exception is a packet's
   first word: it waits until that packet's decision is in the queue, then
   pops the decision together with the word.

A queue is needed, and not a single flag, because the FIFO can hold the tail
of one packet and the head of the next. Each queued decision belongs to a
packet whose first word is still in the FIFO. The queue therefore cannot
overflow, and an assertion checks this.

**Latency.** Suppose the I/O-queue header arrives at clock *t* and the eight
data words follow at *t*+1 … *t*+8. The decision is written into the queue at
the end of *t*+8, and the header leaves at *t*+9. Counting the arrival clock,
that is ten clocks, or 80 ns at 125 MHz. After that, one word leaves per clock
for as long as `out_rdy` stays high.

**Flow control.** `in_rdy` means "FIFO not full, or a word leaves this
cycle", so it depends combinationally on `out_rdy` while the FIFO is full.
A first word waits only until the words that make up its decision have
arrived. With one module header that is nine words, and with two it is ten,
which fills the FIFO. In both cases the first word leaves in the same cycle
that the next word arrives. As long as `out_rdy` is high, `in_rdy` never
drops, and the module never stalls the stream on its own. A packet with
three or more module headers needs more than ten entries before its
decision, and would deadlock a 10-deep FIFO.

## Rewriting a captured packet

The rewrite is combinational, between the FIFO head and `out_*`, so it costs
no cycle. For a captured packet:

- in the `0xFF` module header, bits 63:48 become `exception_port`, or the
  instance's `DEFAULT_EXCEPTION_PORT` when `exception_port` is zero;
- in data word 0, bits 63:16 (the destination MAC address) become `TAG_MAC`.

All other words, and all words of packets that are not captured, pass
unchanged. The original destination MAC is lost. Host software recognises
captured packets by the tag address.

## Register interface

Each instance has one register block on a daisy-chained register bus. The bus
struct is `reg_bus_t`: `req`, `ack`, `rd_wr_L`, a 23-bit `addr`, 32-bit `data`
and 2-bit `src`. A request goes in on `reg_in` and leaves one clock later on
`reg_out`. A block serves a request when the request is not yet acknowledged
and the address bits 22:6 equal the block's `BLOCK_TAG`. The block sets `ack`
and, for a read, puts the value in `data`. All other requests pass through
unchanged.

| offset | register | behaviour |
|-------|----------|-----------|
| 0 | `FILTER_TABLE_ENTRY_DATA_HI` | staging, bits 63:32 of a data word |
| 1 | `FILTER_TABLE_ENTRY_DATA_LO` | staging, bits 31:0 |
| 2 | `FILTER_TABLE_ENTRY_MASK_HI` | staging, mask bits 63:32 |
| 3 | `FILTER_TABLE_ENTRY_MASK_LO` | staging, mask bits 31:0 |
| 4 | `FILTER_TABLE_WR_ADDR` | writing *i* stores the staged data and mask as entry *i* and sets `filter_valid[i]` |
| 5 | `FILTER_TABLE_RD_ADDR` | writing *i* loads entry *i* into the staging registers for reading back |
| 6 | `PORT_NUM_HITS` | counts matched packets; a write sets it (write 0 to clear) |

**Uploading a filter** takes five writes per word. Write DATA_HI, DATA_LO,
MASK_HI and MASK_LO, then write the index *i* to WR_ADDR. Repeat for each *i*.

**Reset behaviour.** The filter RAMs are not reset. Instead, reset clears the
`filter_valid` flags, and an entry that was never written is ignored. Unused
offsets read as 0.

In `packet_capture_4port`, the four blocks sit in port order on one ring, at
tags `BASE_TAG` … `BASE_TAG+3`. A request takes four clocks from `reg_in` to
`reg_out`.

## Files

| file | contents |
|------|----------|
| `rtl/pc_pkg.sv` | widths, field positions, `pkt_word_t`, `reg_bus_t`, register offsets |
| `rtl/pc_small_fifo.sv` | fall-through FIFO (72 x 10 for packets, 1 x 10 for decisions) |
| `rtl/pc_dp_ram.sv` | 8 x 64 RAM, read/write port A, read port B, asynchronous reads |
| `rtl/pc_filter_check.sv` | word counter, hit/miss logic, per-packet decision |
| `rtl/pc_header_rewrite.sv` | output control and rewrite of captured packets |
| `rtl/pc_regs.sv` | register block, the two filter RAMs, valid flags, hit counter |
| `rtl/packet_capture.sv` | one complete filter instance |
| `rtl/packet_capture_4port.sv` | top: four instances with per-port defaults and one register ring |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters of `packet_capture`:

- `TAG_MAC`, default `48'hFFFF_FFFF_FFFE`;
- `DEFAULT_EXCEPTION_PORT`, default DMA 0. The four-port top sets DMA *p*;
- `BLOCK_TAG`;
- `FIFO_DEPTH`, default 10.

The filter window (8 words) is `FILTER_WORDS` in the package. Widening the
window also needs a FIFO at least one entry deeper than the window plus its
module headers.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
A watchdog turns a hang into a failure. For example, the end-to-end test of
the top at its default parameters:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/pc_pkg.sv tb/tb_packet_capture_4port.sv --top-module tb_packet_capture_4port
./obj_dir/Vtb_packet_capture_4port
```

Use the same command for any other `tb/tb_<module>.sv`. The tests use
`$urandom` for traffic, so different seeds
(`+verilator+seed+N +verilator+rand+reset+2`) give different packets. A
summary of what each test covers:

- `tb_packet_capture_4port` acts as the host and the surrounding modules. It
  uploads the filter above to ports 2 and 3 and erases ports 0 and 1. It then
  sends random frames: matching requests, near-misses that break one field,
  frames with IP options, and runts. Whether each frame should be captured is
  decided from its protocol fields. The test checks every output word, the
  default and overridden capture ports, the per-port hit counters read over
  the ring, a filter read-back and clearing a counter. It also counts that
  back-pressure, output stalls, runts, overrides and ring pass-through all
  occurred.
- `tb_packet_capture` checks the latency: 9 clocks for the first word, and a
  short packet leaves one clock after its last word. It also checks several
  filters, random stalls, `in_rdy` dropping when the FIFO is full, and
  `PORT_NUM_HITS`.
- The unit tests check each block against an independent model: FIFO against
  a queue, RAM against an array, the decision against a per-packet
  computation, rewrites against expected words, and registers against a
  model of the table.

## What this design adds to or assumes about the described module

The module's behaviour follows a published description. The following were
not given there and are this design's own choices:

- **Register bus.** The protocol, address split, register offsets and the
  width of the hit counter are modelled on the NetFPGA register ring.
- **Buffering.** The FIFO is written here from scratch, as a fall-through
  register array. The original used a library FIFO of the same 72 x 10 size.
  The per-packet decision queue is an addition of this design.
- **Packet boundaries.** A non-zero control word before the data is a module
  header. A non-zero control word after data has started is the last word.
  A packet whose only data word is also its last cannot be told from a
  header, which no Ethernet frame is.
- **Short packets.** A packet shorter than eight data words is never captured.
- **Port numbering.** The NetFPGA numbering is assumed (MAC *p* = bit 2*p*,
  DMA *p* = bit 2*p*+1), as are the rewritten field positions.
- **Example filter.** The Ethertype example is given here with mask
  `…FFFF_0000` and data `…0800_0000`. That follows the matching rule (mask
  ANDed with the packet, then compared with the data). Its original printing
  had the two values the other way round.
- **Reset.** All resets are synchronous and active high.
- **Filters on DMA ports.** The module can also sit in a DMA receive path;
  the four-port top filters only the MAC ports.
- **Not included.** The surrounding framework is not part of this RTL: MAC
  queues, input arbiter, DMA, host register access and the filter-compiling
  software. The alternative of a single shared instance after the input
  arbiter is not a separate top either, but one `packet_capture` placed there
  does exactly that.
