# FPGA data plane for mitigating reflection DDoS attacks

In a reflection (amplification) attack, the flood reaching a victim comes from
real public servers, such as open DNS resolvers, answering requests that the
attacker sent in the victim's name. The source addresses in that flood are
therefore genuine, and blocking the few sources that send most of it brings the
traffic back down to a rate the protected network can absorb.

This design is the packet-processing half of such a mitigation box. It runs on
the FPGA of a 100 GbE network card in a server. Software on the host decides what
to block. The FPGA does four things for it at line rate:

- it parses every packet;
- it tells software about the traffic it is asked to watch, by sending either
  whole packets or a small fixed record per packet (the *Unified Header*, UH);
- it drops every packet whose source address is in a large block table, and
  keeps packet and byte counters for each blocked source;
- it routes what is left back out: TTL decrement, longest-prefix-match next hop,
  and destination MAC / VLAN rewrite, tag insertion or tag removal.

The software side is not part of this RTL. It is expected to read the UHs and
counters, find the top contributing sources of an attack and write them into the
block table. Its view of the hardware is a set of ports on the top level.
`tb/tb_ddos_mitigation.sv` contains a minimal model of that loop:

- At the end of each interval it totals the traffic to a protected network
  from the UHs.
- If the total is over a limit, it blocks the largest sources, biggest first,
  until the remainder is under a target rate.

## Pipeline

```
            +-----+   +------------+   +------------+   +--------+   +----------------+
 RX MAC --->| hfe |-->| sel_filter |-->| blk_filter |-->| uh_gen |-->| pkt_check_drop |--+
            +-----+   +------------+   +-----+------+   +---+----+   +----------------+  |
                                             |              | UH                          |
                                  2 external memories       v                             v
                                  (cuckoo table)        +-------------------------------------+
                                                        |             rx_dma_mux              |--> software RX DMA
                                                        +-------------------------------------+
                                                                          |
            +--------+   +---------------+   +------------+   +---------+ |
 TX MAC <---| tx_mux |<--| mac_vlan_edit |<--| fwd_filter |<--| ttl_dec |<+
            +---+----+   +---------------+   +------------+   +---------+
                ^
                +-- software TX DMA
```

Every stage registers its output and uses a valid/ready handshake. Most stages
are a single register stage with `in_ready = !out_valid || out_ready`.
`blk_filter` adds FIFOs that cover the memory latency. Back-pressure travels
back one stage per clock, and a full pipeline moves one beat per clock.

### Stream and metadata conventions (`ddos_pkg`)

- A **beat** (`beat_t`) is 1024 data bits plus `sop`, `eop` and `empty` (the
  number of unused bytes in the last beat). Byte 0 of the frame is in the top
  eight bits. Every frame starts in a new beat, and frames carry no FCS.
- Inside the pipeline a beat travels with **metadata** (`bus_t = {beat, meta}`).
  The metadata is meaningful on the `sop` beat only. Each stage fills in its
  part:
  - `hfe` writes the parsed header `hdr_t`;
  - `sel_filter` writes `sel_hit`, `sel_rule` and `sel_act`;
  - `blk_filter` writes `blk_hit` and `blk_slot`;
  - `fwd_filter` writes `nh_hit` and `nh`.
- Stages that drop traffic always drop **whole packets**. They decide on the
  `sop` beat and remember the decision until `eop`.
- IPv4 addresses, forwarding prefixes included, are stored in the low 32 bits
  of the 128-bit address fields. An IPv4 prefix of length n covers bits 31 down
  to 32 − n.

### Why the bus is 1024 bits

An Ethernet frame of L bytes occupies the line for (L + 20) × 8 bits, counting
preamble and inter-frame gap. At 100 Gb/s a 64 B frame therefore arrives every
6.72 ns. With every frame starting in a new beat, a W-byte bus needs
ceil(L / W) clocks per frame.

At a 200 MHz clock (5 ns):

- A 64-byte bus falls behind for many lengths. For example, a 65 B frame takes
  10 ns but arrives every 6.8 ns.
- A 128-byte bus keeps up at every length from 64 to 1518 B. The tightest case
  is 129 B, which takes 10 ns against 11.92 ns on the line.

`tb_ddos_linerate` measures this on the whole pipeline: one beat is accepted
every clock, with no input stall, for 17 frame lengths.

## Header field extractor (`hfe`)

The extractor reads everything it needs from the first beat:

- Ethernet type, with an optional single 802.1Q tag;
- for IPv4: IHL, total length, TTL, protocol and both addresses;
- for IPv6: payload length, hop limit, next header and both addresses;
- TCP/UDP ports.

It works on two shifted copies of the beat. One starts at the IP header
(`data << 8*l3_off`) and the other at the L4 header. This keeps every field
extraction at a fixed bit position. IPv4 options of any length still leave the
ports within the first beat (at most 18 + 60 + 4 bytes).

`ip_len` is always the length of the whole IP packet. For IPv6 that means
payload length + 40. IPv6 extension headers are not walked, so ports are
reported only when the next header is TCP or UDP.

## Selection filter (`sel_filter`)

The selection filter holds 16 ternary rules, matched on IP version, source and
destination address, protocol and ports. A rule matches when
`((key ^ value) & mask) == 0`. The lowest-numbered matching rule wins, and
non-IP packets never match. Each rule carries three action bits:

| bit         | effect                                                        |
|-------------|---------------------------------------------------------------|
| `pkt_to_sw` | a full copy of the packet goes to software (if it survives check & drop) |
| `uh_to_sw`  | a 48-byte Unified Header goes to software                     |
| `blk_en`    | the source address is looked up in the block table            |

An operator typically programs one rule per protected prefix or service, for
example "UDP from port 53 to 198.51.100.0/24". The rule sets `uh_to_sw` so
software can measure the traffic, and `blk_en` so that blocked sources are
dropped. Traffic outside every rule is neither reported nor blocked, only forwarded.

## Blocking filter (`blk_filter`)

This is the most involved block.

### Table organisation

The table is an exact-match table of source addresses, built as a two-way cuckoo
hash. Each bank lives in its own external SRAM of 2^18 words. A word holds the
entry `{valid, v6, ip[127:0]}` and the counters described below. A key can sit
in only two places:

- slot `h0(key)` of bank 0, where `h0` is CRC-32 (polynomial 0x04C11DB7);
- slot `h1(key)` of bank 1, where `h1` is CRC-32C (polynomial 0x1EDC6F41).

Both CRCs are taken over the 129-bit key `{v6, ip}`, starting from all ones,
and truncated to 18 bits. A lookup is therefore one read of each memory, issued
in the same clock, followed by two comparators. A lookup never has to search
further.

Insertion is software's job. Software computes both hashes, and if both slots
are occupied it moves an existing entry to its alternative slot (the cuckoo
step). It then writes slots through `blk_cfg_*`. The table has 524 288 slots.
A two-choice table with one entry per slot starts failing insertions at about
half load, so the usable capacity is roughly 250 000 sources.

### Latency hiding

The memories answer `MEM_RD_LAT` (4) clocks after a read. The filter keeps
accepting a beat every clock during that time:

- Each beat goes into a data FIFO (64 beats).
- Each lookup travels down a delay line that matches the memory latency. At the
  end it is compared with the returned entries, and the result goes into a
  result FIFO (16 packets).
- Packets that need no lookup (non-IP, no rule, or `blk_en` clear) put a "miss"
  result in the same FIFO, so packets leave in order.
- A packet's first beat leaves only when its result is at the head of the result
  FIFO.
- Input is held off only when 16 results are outstanding, when the data FIFO
  is full, for the one clock of a statistics read, or while a slot write waits
  (both below).

### Statistics

Each slot's memory word holds more than the entry. It also holds the source's
32-bit packet counter and 48-bit byte counter, so a bank word is 210 bits:
`blk_slot_t = {valid, v6, ip, pkts, bytes}`. The byte counter counts the frame
without FCS, which is the IP header offset plus the IP length.

The lookup read already returns the counters. On a hit, the filter writes the
slot back with both counters incremented, in the same clock the read data
arrives. The table therefore needs no on-chip storage.

This creates a read-after-write hazard, because a read is answered
`MEM_RD_LAT` clocks after it is issued:

- Suppose a second packet from the same source arrives a few clocks after the
  first.
- Its read was issued before the first packet's write-back.
- So the memory returns the old counters.

To prevent this, the filter keeps the last `MEM_RD_LAT` writes of each bank in a
small window of address and data. These are exactly the writes a returning read
cannot yet reflect. The youngest write to the same slot replaces the memory
data before the compare and the increment. As a result:

- every packet of a back-to-back flood from one source is counted;
- a slot that software rewrites while a lookup of it is in flight is seen as
  rewritten.

Software reads a slot's counters through `blk_st_rd`/`blk_st_addr` (address =
`{bank, slot}`). The read uses the memory read port, so the packet input is
held for that one clock. The data comes back with `blk_st_valid` after
`MEM_RD_LAT` clocks, with the same window applied.

Writing a slot through `blk_cfg_*` also clears its counters, so a newly blocked
source starts from zero.

A slot write is a request. Software holds `blk_cfg_wr` until a clock with
`blk_cfg_ready` high, and the write happens in that clock. `blk_cfg_ready` is
low while a hit is writing counters back, and those write-backs use the same
memory write port. During a flood of blocked minimum-size packets there is a
hit write-back every clock, so a write that simply waited for a free clock
would never get one. The filter therefore takes no new packets while
`blk_cfg_wr` is held. The lookups already in flight drain, and the write goes
through within `MEM_RD_LAT` + 1 clocks.

Removing a source this way during its flood is clean:

- its packets turn from blocked to passed exactly once;
- no lookup that read the old entry writes it back.

## Unified Header (`uh_gen`)

A UH is one beat with `sop = eop = 1` and `empty = 80`, whose first 48 bytes
hold `uh_t`, most significant field first:

| bytes | field                                                    |
|-------|----------------------------------------------------------|
| 0–15  | source address (IPv4 in bytes 12–15)                     |
| 16–31 | destination address                                      |
| 32–33 | source port                                              |
| 34–35 | destination port                                         |
| 36    | protocol / next header                                   |
| 37–38 | IP length                                                |
| 39    | TTL / hop limit                                          |
| 40    | number of the matching selection rule                    |
| 41–42 | VLAN ID (12 bits), then flags: IPv6, VLAN present, ports valid, source blocked |
| 43–47 | reserved, zero                                           |

The UH is made before check & drop, so software also sees traffic from sources
it has already blocked. The `blocked` flag marks it. This lets the controller
tell when an attack from a blocked source has stopped.

## Drop points and counters

| stage            | drops                                                   | counter       |
|------------------|---------------------------------------------------------|---------------|
| `pkt_check_drop` | source found in the block table                         | `cnt_blocked` |
| `pkt_check_drop` | IPv4 with IHL < 5, total length < header length, or bad header checksum | `cnt_invalid` |
| `ttl_dec`        | IPv4 TTL or IPv6 hop limit of 0 or 1 (it would reach zero) | `cnt_expired` |
| `fwd_filter`     | IP packet with no matching route                        | `cnt_noroute` |

Non-IP frames pass through check & drop, TTL decrement and forwarding
unchanged.

## Forwarding

- **`ttl_dec`** decrements the TTL or hop limit. For IPv4 it also patches the
  header checksum incrementally: `~(~HC + ~m + m')` in one's-complement
  arithmetic, where m and m' are the old and new TTL/protocol word.
- **`fwd_filter`** holds 32 routes (IPv4 or IPv6 prefix, length, next hop) and
  compares all of them in parallel. The longest matching prefix wins, and the
  lowest index breaks a tie.
- **`mac_vlan_edit`** writes the next hop's destination MAC into the frame. If
  the route asks for an output VLAN, it handles two cases:
  - a tagged frame gets the 12-bit VLAN ID replaced, and the priority bits are
    kept;
  - an untagged frame gets a tag inserted after the source MAC, with priority 0.

  Insertion shifts the rest of the frame 4 bytes later. Each output beat is the
  4 bytes carried over from the previous input beat, followed by the first 124
  bytes of the current one. If the last input beat had fewer than 4 bytes free,
  one extra beat is sent, and the input waits for that one clock.

  A route can instead ask for untagged output (`vlan_strip`). A tagged frame
  then loses its tag, and the rest of the frame moves 4 bytes up:
  - Each output beat needs the first 4 bytes of the next input beat, so every
    beat of such a frame is held for one clock.
  - The frame's last beat leaves in an extra clock.
  - If the last input beat held 4 bytes or fewer, the frame ends one beat
    shorter.
- **`tx_mux`** merges the pipeline with the software TX DMA. It alternates
  between them packet by packet and never splits a packet.
- **`rx_dma_mux`** does the same on the software side. Packet copies and UHs
  share the RX DMA stream. A packet copy holds the stream until its last beat,
  and a waiting UH goes first between packets. If the DMA stream is full, the
  pipeline stalls rather than losing a copy.

## Where this design departs from, or adds to, its source description

The source describes these blocks by function and names the technique for each:

- ternary rule match;
- exact-match cuckoo table in external SRAM, with per-address statistics;
- LPM next-hop lookup.

The following points are this design's own choices:

- **Bus width, latency, table sizes and hash functions** are all chosen here.
  That includes the 1024-bit bus, 16 selection rules, 32 routes, the 2 × 2^18
  table slots, CRC-32/CRC-32C hashing, a 4-clock memory latency and the write
  window that hides it.
- **Counters in the table words.** The counters are kept in the same external
  memory word as the entry. The word is therefore 210 bits, which a real
  design would build from a wide memory or from two devices side by side.
- **UH before check & drop**, so that blocked traffic stays visible to
  software.
- **`blk_en` as a rule action.** Blocking applies only to traffic selected by a
  rule that enables it. This is this design's way of scoping block entries to a
  protected network.
- **VLAN editing** offers three cases: rewrite the ID, insert a tag or remove
  it. It costs one clock for each inserted frame that grows by a beat and for
  each stripped frame. At minimum-size frames, stripping every frame would
  therefore halve the rate.
- **Packet checks** cover the IPv4 header only. TCP/UDP checksums are not
  verified.
- **LPM** is a parallel compare over a small table, not a trie or TCAM. It is
  enough for a mitigation box with a handful of next hops, but not for a full
  routing table.
- **Rate limits** (limit and target rate per protected network) belong to the
  software controller. The hardware only counts and blocks.
- **Not built:** the software controller, the PCIe DMA engines, the Ethernet
  MAC/PHY and the external SRAMs. They appear as ports. `tb/qdr_model.sv` is a
  behavioural SRAM with fixed read latency, for simulation only.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. All of them use the
package `ddos_pkg` and the test helper package `tb_pkg`. With verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_ddos_top \
    rtl/ddos_pkg.sv tb/tb_pkg.sv rtl/sync_fifo.sv rtl/hfe.sv rtl/sel_filter.sv \
    rtl/blk_filter.sv rtl/uh_gen.sv rtl/pkt_check_drop.sv rtl/rx_dma_mux.sv \
    rtl/ttl_dec.sv rtl/fwd_filter.sv rtl/mac_vlan_edit.sv rtl/tx_mux.sv \
    rtl/ddos_top.sv tb/qdr_model.sv tb/tb_ddos_top.sv
./obj_dir/Vtb_ddos_top
```

For a unit testbench, list `ddos_pkg`, `tb_pkg`, the module, and `sync_fifo` /
`qdr_model` where the module needs them.

| testbench             | what it covers                                                     |
|-----------------------|--------------------------------------------------------------------|
| `tb_hfe`              | random Ethernet/VLAN/IPv4/IPv6/TCP/UDP/non-IP frames against a reference parse |
| `tb_sel_filter`       | ternary match, rule priority, rule rewrite                         |
| `tb_blk_filter`       | hits in either bank, misses, counters under back-to-back hits, statistics reads during traffic, removal of a source during its flood, stalls |
| `tb_uh_gen`           | UH contents byte by byte, UH back-pressure                          |
| `tb_pkt_check_drop`   | each drop reason, whole-packet removal, counters                   |
| `tb_rx_dma_mux`       | copies, UHs and their ordering under DMA back-pressure              |
| `tb_ttl_dec`          | TTL/hop limit, checksum patch checked by full recomputation         |
| `tb_fwd_filter`       | longest-prefix selection for IPv4 and IPv6, no-route drop           |
| `tb_mac_vlan_edit`    | MAC rewrite, VLAN ID rewrite, tag insertion with the extra tail beat, tag removal with the frame ending a beat shorter |
| `tb_tx_mux`           | fair packet-level merge, no interleaving                           |
| `tb_ddos_top`         | the whole design at default sizes: 400 mixed packets, software TX traffic, block-table writes and statistics read-back, checked against a reference model; also a 64-byte-frame burst at one frame per clock |
| `tb_ddos_mitigation`  | the mitigation loop: a controller model reads the UHs, blocks the biggest sources of an attack once a limit is exceeded, and checks that forwarded traffic falls below the target, legitimate traffic is untouched and the table counters match |
| `tb_ddos_linerate`    | 17 frame lengths from 64 to 1518 B, cycle count = beat count, bus time vs. 100 Gb/s line time |

`tb_ddos_top` also counts how often each mechanism fired and fails if any of
them never did: block, invalid, expiry, no-route drops, UHs, copies, VLAN
rewrites, insertions and removals, back-pressure stalls, TX contention and software TX.
