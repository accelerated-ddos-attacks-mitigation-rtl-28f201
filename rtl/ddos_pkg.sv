// Shared types and helper functions of the DDoS mitigation data plane.
//
// Packets move between the pipeline stages as a stream of 1024-bit beats (128
// bytes per clock). Every packet starts in a new beat, so a frame of L bytes
// takes ceil(L/128) clocks; at 200 MHz that is faster than 100 Gb/s Ethernet
// (L + 20 bytes of preamble and gap per frame) for every frame length from 64
// to 1518 bytes, the worst case being 129-byte frames (10 ns against 11.9 ns).
// A 512-bit bus would not keep up with frames of 65-104 bytes and many other
// lengths. Byte 0 of a beat, the first byte on the wire, sits in the top bits.
// `sop`/`eop` mark the first and last beat of a packet and `empty` counts the unused
// bytes at the end of the last beat. Each beat also carries a metadata record
// (`meta_t`) that the stages fill in as the packet goes through; it is meaningful
// on the first beat of a packet only, and a stage that needs it for later beats
// latches it at `sop`.
//
// The bus width, the field layout of the metadata, the Unified Header layout and
// the table entry formats are choices of this design; the document names the
// blocks and what they do, not their encodings.
package ddos_pkg;

  localparam int unsigned DATA_W  = 1024;
  localparam int unsigned BYTES   = DATA_W / 8;
  localparam int unsigned EMPTY_W = $clog2(BYTES);

  // Blocking table: two cuckoo banks of 2^BLK_AW slots each, one bank per
  // external memory (2 x 262 144 = 524 288 slots for the "over 250 000 rules").
  localparam int unsigned BLK_AW  = 18;
  localparam int unsigned SEL_IDW = 8;   // rule index width of the selection table

  localparam logic [15:0] ETH_VLAN = 16'h8100;
  localparam logic [15:0] ETH_IPV4 = 16'h0800;
  localparam logic [15:0] ETH_IPV6 = 16'h86DD;
  localparam logic [7:0]  PROTO_TCP = 8'd6;
  localparam logic [7:0]  PROTO_UDP = 8'd17;

  typedef struct packed {
    logic               sop;
    logic               eop;
    logic [EMPTY_W-1:0] empty;
    logic [DATA_W-1:0]  data;
  } beat_t;

  // Fields extracted by the header field extractor. IPv4 addresses are held in
  // the low 32 bits of the 128-bit address fields, upper bits zero.
  typedef struct packed {
    logic         is_ip4;
    logic         is_ip6;
    logic         has_vlan;
    logic         l4_valid;   // TCP/UDP ports were found within the first beat
    logic [11:0]  vlan_id;
    logic [6:0]   l3_off;     // byte offset of the IP header (14 or 18)
    logic [3:0]   ihl;        // IPv4 header length in 32-bit words
    logic [7:0]   proto;      // IPv4 protocol / IPv6 next header
    logic [7:0]   ttl;        // IPv4 TTL / IPv6 hop limit
    logic [15:0]  ip_len;     // IP packet length in bytes (header included)
    logic [127:0] src_ip;
    logic [127:0] dst_ip;
    logic [15:0]  src_port;
    logic [15:0]  dst_port;
  } hdr_t;

  // Actions of a selection rule.
  typedef struct packed {
    logic pkt_to_sw;  // send a copy of the whole packet to software
    logic uh_to_sw;   // send a Unified Header to software
    logic blk_en;     // the blocking filter applies to this traffic
  } sel_act_t;

  // Next hop from the forwarding filter.
  typedef struct packed {
    logic [47:0] dmac;
    logic        vlan_set;   // send on VLAN vlan_id: rewrite the tag, or insert one
    logic        vlan_strip; // send untagged: remove the tag (when vlan_set is 0)
    logic [11:0] vlan_id;
  } nh_t;

  typedef struct packed {
    hdr_t                  hdr;
    logic                  sel_hit;
    logic [SEL_IDW-1:0]    sel_rule;
    sel_act_t              sel_act;
    logic                  blk_hit;   // source address found in the blocking table
    logic [BLK_AW:0]       blk_slot;  // {bank, index} of the matching entry
    logic                  nh_hit;
    nh_t                   nh;
  } meta_t;

  typedef struct packed {
    beat_t beat;
    meta_t meta;
  } bus_t;

  // Exact-match key of the blocking table and one slot of the external memory.
  typedef struct packed {
    logic         v6;
    logic [127:0] ip;
  } blk_key_t;

  typedef struct packed {
    logic     valid;
    blk_key_t key;
  } blk_entry_t;

  // One slot of the blocking table as stored in external memory: the entry
  // and the packet and byte counters of that blocked source.
  typedef struct packed {
    blk_entry_t   ent;
    logic [31:0]  pkts;
    logic [47:0]  bytes;
  } blk_slot_t;

  // Ternary selection key and rule.
  typedef struct packed {
    logic         v6;
    logic [127:0] src_ip;
    logic [127:0] dst_ip;
    logic [7:0]   proto;
    logic [15:0]  src_port;
    logic [15:0]  dst_port;
  } sel_key_t;

  typedef struct packed {
    logic     valid;
    sel_key_t value;
    sel_key_t mask;    // 1 = bit must match
    sel_act_t act;
  } sel_rule_t;

  // Longest-prefix-match route. IPv4 prefixes are aligned to bit 31.
  typedef struct packed {
    logic         valid;
    logic         v6;
    logic [127:0] prefix;
    logic [7:0]   plen;
    nh_t          nh;
  } fwd_route_t;

  // Unified Header: the compact per-packet record sent to software instead of
  // the packet (48 bytes, sent as one beat).
  typedef struct packed {
    logic [127:0]       src_ip;
    logic [127:0]       dst_ip;
    logic [15:0]        src_port;
    logic [15:0]        dst_port;
    logic [7:0]         proto;
    logic [15:0]        ip_len;
    logic [7:0]         ttl;
    logic [SEL_IDW-1:0] sel_rule;
    logic [11:0]        vlan_id;
    logic               is_ip6;
    logic               has_vlan;
    logic               l4_valid;
    logic               blk_hit;
    logic [39:0]        rsvd;
  } uh_t;

  localparam int unsigned UH_BYTES = $bits(uh_t) / 8;

  // Byte `i` of a beat (byte 0 first on the wire).
  function automatic logic [7:0] get_byte(logic [DATA_W-1:0] d, int unsigned i);
    return d[DATA_W-1-8*i -: 8];
  endfunction

  // Bit-serial CRC-32 of a blocking key, used as the two cuckoo hash functions.
  function automatic logic [31:0] key_crc(blk_key_t k, logic [31:0] poly);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = $bits(blk_key_t) - 1; i >= 0; i--) begin
      if (c[31] ^ k[i]) c = (c << 1) ^ poly;
      else              c = c << 1;
    end
    return c;
  endfunction

  localparam logic [31:0] POLY_H0 = 32'h04C1_1DB7;  // CRC-32 (IEEE 802.3)
  localparam logic [31:0] POLY_H1 = 32'h1EDC_6F41;  // CRC-32C (Castagnoli)

  function automatic logic [BLK_AW-1:0] blk_hash(blk_key_t k, logic bank);
    logic [31:0] c;
    c = key_crc(k, bank ? POLY_H1 : POLY_H0);
    return c[BLK_AW-1:0];
  endfunction

  // One's-complement 16-bit addition with end-around carry.
  function automatic logic [15:0] oc_add(logic [15:0] a, logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
