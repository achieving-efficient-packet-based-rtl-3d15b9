# SPMR: a packet-based memory link that carries many requests per packet

A processor that talks to its DRAM over a serial, packet-based link (as in the
Hybrid Memory Cube) usually sends one memory request per packet. Each packet
carries a 64-bit header and a 64-bit tail, whatever the size of its payload.
That overhead hardly matters for a 64-byte cache-line transfer. It dominates
once requests become fine-grained: a read request is all header and tail, and
an 8-byte sub-rank access moves 16 bytes of overhead for 8 bytes of data.

This design packs several requests into one packet, **single packet, multiple
requests (SPMR)**, so that they share one header and one tail. Response data of
several reads is packed the same way. On top of that:

- **Address compression.** The address of each request is replaced by a short
  reference into a base-address table that both link ends keep in step.
- **Large granularity.** A request may ask for anything from 8 B to 4 KB in
  8-byte steps. A merged run of contiguous accesses therefore travels as one
  request and keeps a DRAM row open.

The RTL is a complete single-channel system, from the requester interface down
to DDR3 commands for a sub-ranked DIMM:

```
 requester ──► read buffer ─┐                          ┌──────────── on-chip controller ─┐
           └─► write buffer ┴► packing scheduler ► packet generator ► serdes_tx ══ request link ══╗
                                                   (addr compressor)                             ║
           ◄── response decoder ◄═ serdes_rx ◄════ response link ═════╗                          ║
               ▲ outstanding-read list                                ║                          ║
                                                                      ║                          ║
 ┌─ off-chip controller ─────────────────────────────────────────────────────────────────────────╨──┐
 │ serdes_rx ► packet decoder (addr decompressor) ► request queue ► command scheduler ► ddr_* ports │
 │ serdes_tx ◄ response generator ◄──────────────── read data beats ◄── ddr_rdata                   │
 └──────────────────────────────────────────────────────────────────────────────────────────────────┘
```

The ddr_* ports would connect to a DDR3 PHY. The PHY itself is not part of the
RTL.

## Packet format

All sizes are in `rtl/spmr_pkg.sv`. A packet is 1 to 15 flits of 128 bits; 15
is the most the 4-bit LNG field can count.

- **Header.** Bits [63:0] of the first flit keep the HMC header positions:
  - CUB [63:61], the destination module
  - TAG [23:15], a running packet number
  - DLN [14:11] and LNG [10:7], both the flit count
  - CMD [5:0]

  The old 34-bit address range of the header is no longer used for an address.
  Its bits [29:24] now hold the number of requests in the packet.
- **Tail.** Bits [127:64] of the last flit keep a CRC-32 at tail [63:32] and a
  3-bit sequence number at tail [18:16]. The CRC uses polynomial 0x04C11DB7,
  starts at all ones and runs MSB first over every flit, with the CRC field read
  as zero.
- **Payload.** The payload lies between header and tail, packed bit by bit with
  no padding, starting at bit 64.
  - A request packet holds, for each request: the ADDR field, a 9-bit GRAN
    (number of 8-byte units minus one), and for writes (GRAN+1) × 64 bits of
    data.
  - A response packet holds, for each chunk: a GRAN and then the data.

A packet carries only one type of request, since CMD is shared. Its requests
all go to one module, since CUB is shared.

Savings example. Eight reads whose addresses hit the table take
64 + 8 × (12 + 9) + 64 = 296 bits, so three flits. Sent one per packet, they
would take eight single-flit packets.

## Address compression with a self-adaptive base table

Both ends hold a table of `TBL_N = 4` full 48-bit addresses. They start empty
at reset. For each request the sender searches the table for an entry within
a signed 9-bit byte difference of the new address. It then emits one of two
fields:

| case | field, LSB first | width |
|------|------------------|-------|
| hit  | `1`, base number (2 bits), signed difference (9 bits) | 12 |
| miss | `0`, base number (2 bits), full address (48 bits) | 51 |

- **Self-adaptive update.** After every request, hit or miss, the entry named in
  the field is overwritten with the address just sent. An ascending or
  descending stream of addresses therefore keeps hitting one entry: each step
  is measured from the previous address, not from a fixed base.
- **Miss victim.** On a miss, the entry to replace is chosen round-robin.
- **Keeping the tables equal.** The receiver applies the same update in the same
  packet order, so the two tables stay identical without any extra message. The
  packet decoder's table is updated only for packets whose CRC is correct. The
  sender never retransmits, so a dropped packet leaves the two tables different.
  Link retry is outside this design.

## Choosing what travels together

`packing_scheduler` looks at the read buffer and the write buffer, which are
collapsing queues of 16 entries. It alternates between the two buffers when
both hold requests.

- **Leader.** The oldest entry of the chosen buffer leads the batch.
- **Pass one.** It adds requests with the same CUB that lie in the leader's
  4 KB page. They are likely to compress against each other.
- **Pass two.** It adds the remaining same-CUB requests, in age order.
- **Size rule.** A request is skipped if, counted uncompressed, it could push
  the packet past 15 flits.
- **Limit.** A batch holds at most `MAX_REQS = 8` requests.

The choice is combinational. The chosen entries leave their buffer at the edge
on which the packet generator accepts the batch.

## Packet generation and decoding

`packet_generator` runs the requests through the compressor, one per cycle, and
appends them at a running bit offset. It then finishes the header and streams
the flits out, adding the tail and CRC to the last one. A batch of n requests
produces its first flit n+2 cycles after it is accepted.

Every request placed in a packet also produces an issue record (id, GRAN,
read/write). Reads go into the on-chip outstanding-read list (a `sync_fifo` of
64 entries). Packing pauses while that list is full.

`packet_decoder` works in three steps:

1. It collects the flits; LNG in the first flit gives their number.
2. It checks the CRC. A bad packet is dropped whole and signalled by a one-cycle
   `crc_err` pulse.
3. It hands out one decoded request per cycle to the 16-entry request queue,
   restoring each address through its copy of the table.

Requests are decoded one after another once the whole packet has arrived. The
field offsets could be computed ahead, to decode requests in parallel or while
later flits still arrive. That would cut latency but is not done here.

## DRAM side: sub-ranked DDR3

The memory is DDR3-1333 built from x8 devices. Each device forms its own
sub-rank (8 per rank), so one BL8 burst moves exactly 8 bytes.

`cmd_scheduler` takes requests in order and turns a request of GRAN+1 units
into GRAN+1 RD or WR commands, one per cycle:

- It uses an open-page policy. A different open row is closed first with PRE,
  then `TRP` cycles pass before ACT.
- After ACT, `TRCD` cycles pass before the first column command.
- Both timings are 9 cycles, from the CL9 speed bin.

The byte-address map is:

| bits | [5:3] | [12:6] | [15:13] | [16] | [31:17] |
|------|-------|--------|---------|------|---------|
| field | sub-rank | burst in row (column = burst × 8) | bank | rank | row |

This gives one 4 GB channel: 2 ranks × 8 banks × 32768 rows × 8 KB row buffer.
Because the sub-rank bits are lowest, a 64 B read spreads over the eight devices
of a rank. A 4 KB merged read stays in one row.

Not modelled:

- refresh
- tRAS, tRC, tCCD, tFAW
- read/write bus turnaround
- CAS latency, which belongs to the PHY and DRAM, beyond the data-return path

## Responses: chunks, order and flow control

When it accepts a read, the command scheduler tells `response_generator` how
many beats the read will return. Beats come back from ddr_rdata in issue order.

The generator cuts each read into chunks of at most 8 beats (64 B) and appends
them to the open response packet. A read larger than 64 B therefore spans
several chunks and possibly several packets. The packet is closed when any of
these holds:

- another full chunk might not fit in 15 flits
- the count field is full
- no read data is pending, so a lone read never waits for company

`rd_allow` holds RD commands back unless the beat FIFO has room for every RD
still in flight.

No tag travels with the data. The on-chip `response_decoder` pairs the chunks
in order with the head of the outstanding-read list. It outputs:

- `rsp_id`: the id of that read
- `rsp_data`: the chunk
- `rsp_gran`: words in the chunk minus one
- `rsp_last`: set on the chunk that completes the read

Ordering rules:

- **Writes are posted.** They get no response.
- **Reads and writes are buffered separately** and may overtake each other. A
  requester that reads its own recent write must wait for the write to drain,
  or avoid issuing the read until then.

## Links

`serdes_tx` and `serdes_rx` model each link direction at the word level. A flit
travels as four 32-bit words, least significant first, in four consecutive
cycles. The receiver buffers 30 flits (two maximum packets). It raises
`link_rdy` while at least two places are free, so the sender may start a flit
whenever it sees `link_rdy`. Both controllers share one clock here. The
electrical SerDes, clock recovery and link training are outside the RTL.

## Parameters

| where | parameter | default | meaning |
|-------|-----------|---------|---------|
| spmr_pkg | ADDR_W | 48 | byte address width |
| | FLIT_W / MAX_FLITS | 128 / 15 | flit size, longest packet |
| | LINK_W | 32 | link word per cycle |
| | GRAN_W | 9 | request size field, 8 B..4 KB |
| | TBL_N / IDX_W / DIFF_W | 4 / 2 / 9 | base table entries, base-number bits, signed difference bits |
| | WDATA_W | 512 | write data per request (64 B) |
| spmr_mem_system | BUF_DEPTH | 16 | read and write buffer entries |
| | MAX_REQS | 8 | requests per request packet |
| | RQ_DEPTH | 16 | off-chip request queue |
| | OS_DEPTH | 64 | outstanding reads |
| | TRCD / TRP | 9 / 9 | DRAM timings in controller cycles |

The 48-bit address, the 128-bit flit, the 32-bit link, the DDR3 organisation,
the 4-entry table with its 2-bit base number, and the 8 B minimum and 4 KB
maximum sizes follow the SPMR proposal.

The following are this design's own choices:

- buffer depths and the packet request limit
- the count field and the tail layout
- the ninth (sign) bit of the difference
- CRC polynomial and command codes
- scheduling and closing policies
- address map and DRAM timings
- the 64 B write limit. Writes carry their data in the request packet, and a
  15-flit packet holds at most 1792 payload bits.

## Not included

- **Two-level base table and per-thread tables.** The proposal mentions these
  refinements of address compression. They are not built, because table sizes
  and the address split are not specified and requests carry no thread number.
- **Merging contiguous requests.** This belongs in the processor (reorder buffer
  or compiler). The controller only accepts the merged request through GRAN.
- **DDR3 PHY and DRAM devices.** `tb/dram_model.sv` is a behavioural stand-in.
  It checks ACT/PRE/RD/WR legality, stores written words and answers after a
  fixed latency.
- **Second channel.** The proposal's system has two channels; one is built.
  More channels would be further instances of the off-chip controller.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end and has a
watchdog. Build and run one with plain verilator, for example the whole system
at its default sizes:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/spmr_pkg.sv tb/spmr_tb_pkg.sv tb/tb_spmr_mem_system.sv \
    --top-module tb_spmr_mem_system -o simv
obj_dir/simv +verilator+rand+reset+2
```

`tb/spmr_tb_pkg.sv` is needed only by testbenches that import it. Those are the
packet, compression and response testbenches, and the system testbench.

| testbench | what it checks |
|-----------|----------------|
| tb_spmr_mem_system | End to end, default parameters. Data checked word by word against a reference memory, with random back-pressure on the response side. Reads: fine-grained, strided and scattered, to two modules. Writes are followed by reads of the same bytes. Merged reads go up to 4 KB. A read burst fills the buffer. Fails if any mechanism never occurred: multi-request packets, write packets, table hits and misses, row hits and conflicts, multi-chunk reads, multi-read response packets, buffer-full and link stalls, read-space stalls. |
| tb_addr_compressor / tb_addr_decompressor | Fields against a software model of the table, including the worked example 0x46e44bf0 → 0x46e44ba8 (difference −0x48). |
| tb_packet_generator / tb_packet_decoder | Bit-exact packets against a software packet builder; CRC errors injected at the decoder. |
| tb_response_generator / tb_response_decoder | Chunking, packet closing and order matching against a software model. |
| tb_cmd_scheduler | DDR3 command legality, tRCD/tRP spacing, data through the DRAM model. |
| tb_spmr_workloads | Four synthetic traffic classes through the whole system, checking data and measuring the link bit budget (see below). |
| tb_packing_scheduler, tb_req_buffer, tb_sync_fifo, tb_serdes_tx, tb_serdes_rx | Selection rules, queue order and flow control against reference models. |

`tb/dram_model.sv` answers reads of never-written locations with a pattern
derived from the address. Tests can therefore check any read without
preloading memory.

## What the packing buys: synthetic traffic

`tb_spmr_workloads` runs four request streams through the full system at its
default sizes:

- **gups**: random 8 B reads and writes
- **graph**: an 8 B edge scan mixed with random 8 B vertex reads
- **stream**: a STREAM triad on 64 B lines
- **merged**: contiguous reads of 8 B to 4 KB

For each stream it splits every bit sent on both links into header and tail,
address, GRAN, data, and flit padding. It compares the header and tail bits with
one-request-per-packet framing of the same traffic. That framing uses one packet
per request plus one per 128 B of read data, at 128 bits each.

| stream | header+tail, SPMR | header+tail, one per packet | header+tail bits saved | address compression |
|--------|------------------|-----------------------------|------------------------|---------------------|
| gups   | 33.1 % | 75.0 % | 58.8 % | 0.94 |
| graph  | 26.9 % | 80.0 % | 79.9 % | 1.70 |
| stream | 9.0 %  | 29.4 % | 73.6 % | 3.94 |
| merged | 7.4 %  | 13.8 % | 45.5 % | 1.74 |

Compression depends on locality:

- **Random traffic (gups)** never hits the table. Each miss costs 51 bits
  against 48 uncompressed, so the ratio falls just below 1.
- **Strided streams** hit almost always. Each hit costs 12 bits.
- **Merged reads** advance by up to 4 KB per request. That is beyond the
  ±255 B reach of the difference field, so only the short ones hit.

These streams are synthetic. They show the mechanisms at work. They are not a
reproduction of any measured program.
