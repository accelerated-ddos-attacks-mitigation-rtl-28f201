// Testbench helpers: builds Ethernet/VLAN/IPv4/IPv6/TCP/UDP packets from a
// descriptor, cuts them into bus beats and joins beats back into bytes.
// Checksums and hashes here are computed independently of the RTL package.
package tb_pkg;
  import ddos_pkg::*;

  typedef byte unsigned bytes_t[$];

  // Xorshift generator shared by all testbench code (reproducible runs).
  int unsigned rng_state = 32'h2545_F491;
  function automatic int unsigned rnd();
    rng_state ^= rng_state << 13;
    rng_state ^= rng_state >> 17;
    rng_state ^= rng_state << 5;
    return rng_state;
  endfunction

  typedef struct {
    bit          ip6;
    bit          nonip;
    bit          vlan;
    bit [11:0]   vid;
    bit [47:0]   dmac;
    bit [127:0]  src;
    bit [127:0]  dst;
    bit [7:0]    proto;
    bit [7:0]    ttl;
    bit [15:0]   sport;
    bit [15:0]   dport;
    int          paylen;    // bytes after the L4 ports
    bit          bad_csum;  // IPv4 only
  } desc_t;

  function automatic bit [15:0] csum_bytes(bytes_t b, int off, int len);
    bit [31:0] s = 0;
    for (int i = 0; i < len; i += 2) s += {b[off+i], b[off+i+1]};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return s[15:0];
  endfunction

  function automatic desc_t rand_desc();
    desc_t d;
    d.ip6      = (rnd() % 3) == 0;
    d.nonip    = (rnd() % 12) == 0;
    d.vlan     = rnd() % 2;
    d.vid      = 12'(rnd());
    d.dmac     = {16'h0200, 32'(rnd())};
    d.src      = d.ip6 ? {rnd(), rnd(), rnd(), rnd()} : {96'd0, 32'(rnd())};
    d.dst      = d.ip6 ? {rnd(), rnd(), rnd(), rnd()} : {96'd0, 32'(rnd())};
    case (rnd() % 4)
      0: d.proto = 8'd6;
      1, 2: d.proto = 8'd17;
      default: d.proto = 8'd1;
    endcase
    d.ttl      = 8'(2 + rnd() % 60);
    d.sport    = 16'(rnd());
    d.dport    = 16'(rnd());
    d.paylen   = 20 + rnd() % 200;
    d.bad_csum = 0;
    return d;
  endfunction

  function automatic bytes_t build(desc_t d);
    bytes_t b;
    int l3;
    for (int i = 5; i >= 0; i--) b.push_back(d.dmac[8*i +: 8]);
    for (int i = 0; i < 6; i++) b.push_back(8'h10 + 8'(i));
    if (d.vlan) begin
      b.push_back(8'h81); b.push_back(8'h00);
      b.push_back({4'h2, d.vid[11:8]}); b.push_back(d.vid[7:0]);
    end
    if (d.nonip) begin
      b.push_back(8'h08); b.push_back(8'h06);  // ARP-like payload
      for (int i = 0; i < 46; i++) b.push_back(8'(rnd()));
      return b;
    end
    l3 = b.size();
    if (!d.ip6) begin
      int tot = 20 + 4 + d.paylen;
      bit [15:0] ck;
      b.push_back(8'h08); b.push_back(8'h00);
      l3 = b.size();
      b.push_back(8'h45); b.push_back(8'h00);
      b.push_back(8'(tot >> 8)); b.push_back(8'(tot));
      b.push_back(8'h12); b.push_back(8'h34); b.push_back(8'h40); b.push_back(8'h00);
      b.push_back(d.ttl); b.push_back(d.proto); b.push_back(0); b.push_back(0);
      for (int i = 3; i >= 0; i--) b.push_back(d.src[8*i +: 8]);
      for (int i = 3; i >= 0; i--) b.push_back(d.dst[8*i +: 8]);
      ck = ~csum_bytes(b, l3, 20);
      if (d.bad_csum) ck ^= 16'h0101;
      b[l3+10] = ck[15:8]; b[l3+11] = ck[7:0];
    end else begin
      int pl = 4 + d.paylen;
      b.push_back(8'h86); b.push_back(8'hDD);
      l3 = b.size();
      b.push_back(8'h60); b.push_back(0); b.push_back(0); b.push_back(0);
      b.push_back(8'(pl >> 8)); b.push_back(8'(pl));
      b.push_back(d.proto); b.push_back(d.ttl);
      for (int i = 15; i >= 0; i--) b.push_back(d.src[8*i +: 8]);
      for (int i = 15; i >= 0; i--) b.push_back(d.dst[8*i +: 8]);
    end
    b.push_back(d.sport[15:8]); b.push_back(d.sport[7:0]);
    b.push_back(d.dport[15:8]); b.push_back(d.dport[7:0]);
    for (int i = 0; i < d.paylen; i++) b.push_back(8'(rnd()));
    return b;
  endfunction

  // Length of the frame as the RTL counts it (header offset + IP length).
  function automatic int frame_len(desc_t d);
    return (d.vlan ? 18 : 14) + (d.ip6 ? 40 : 20) + 4 + d.paylen;
  endfunction

  function automatic void to_beats(bytes_t b, ref beat_t q[$]);
    int n = (b.size() + BYTES - 1) / BYTES;
    for (int k = 0; k < n; k++) begin
      beat_t t;
      t = '0;
      t.sop = (k == 0);
      t.eop = (k == n - 1);
      t.empty = (k == n - 1) ? EMPTY_W'((BYTES - b.size() % BYTES) % BYTES) : '0;
      for (int i = 0; i < int'(BYTES); i++)
        if (BYTES * k + i < b.size()) t.data[DATA_W-1-8*i -: 8] = b[BYTES*k+i];
      q.push_back(t);
    end
  endfunction

  function automatic void add_beat(ref bytes_t b, input beat_t t);
    int n = t.eop ? int'(BYTES) - int'(t.empty) : int'(BYTES);
    for (int i = 0; i < n; i++) b.push_back(t.data[DATA_W-1-8*i -: 8]);
  endfunction

  // Header fields the extractor should report for a packet built from `d`.
  function automatic hdr_t exp_hdr(desc_t d);
    hdr_t h;
    h = '0;
    h.has_vlan = d.vlan;
    h.vlan_id  = d.vlan ? d.vid : 12'd0;
    h.l3_off   = d.vlan ? 7'd18 : 7'd14;
    if (d.nonip) return h;
    h.is_ip4   = !d.ip6;
    h.is_ip6   = d.ip6;
    h.ihl      = d.ip6 ? 4'd0 : 4'd5;
    h.proto    = d.proto;
    h.ttl      = d.ttl;
    h.ip_len   = 16'((d.ip6 ? 40 : 20) + 4 + d.paylen);
    h.src_ip   = d.src;
    h.dst_ip   = d.dst;
    h.l4_valid = d.proto == 6 || d.proto == 17;
    h.src_port = h.l4_valid ? d.sport : 16'd0;
    h.dst_port = h.l4_valid ? d.dport : 16'd0;
    return h;
  endfunction

  // Cut a packet into bus words carrying `m` as metadata on the first beat.
  function automatic void to_bus(bytes_t b, meta_t m, ref bus_t q[$]);
    beat_t t[$];
    to_beats(b, t);
    foreach (t[i]) begin
      bus_t w;
      w.beat = t[i];
      w.meta = (i == 0) ? m : '0;
      q.push_back(w);
    end
  endfunction

  // Reference bit-serial CRC of a blocking key (MSB first, init all ones).
  function automatic bit [31:0] ref_crc(bit [128:0] k, bit [31:0] poly);
    bit [31:0] c = '1;
    for (int i = 128; i >= 0; i--) begin
      bit fb = c[31] ^ k[i];
      c = c << 1;
      if (fb) c ^= poly;
    end
    return c;
  endfunction

endpackage
