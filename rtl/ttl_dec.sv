// TTL Decrement.
//
// Router hop processing for the cleansed traffic: decrements the IPv4 TTL or
// the IPv6 Hop Limit of every IP packet and drops the packet (all its beats)
// when the value reaches zero, i.e. when it arrives with 0 or 1. For IPv4 the
// header checksum is updated incrementally (RFC 1624, HC' = ~(~HC + ~m + m'),
// with m the 16-bit word holding TTL and protocol). Non-IP packets pass
// unchanged. A counter reports the packets dropped here.
//
// From the document: decrement of TTL or Hop Limit and dropping on zero. The
// incremental checksum update is this design's way of keeping the IPv4 header
// valid.
//
// Interface: valid/ready streams; one register stage, one beat per clock. The
// TTL and checksum bytes are in the first beat (IP header at byte 14 or 18).
module ttl_dec
  import ddos_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  bus_t        in,
  output logic        out_valid,
  input  logic        out_ready,
  output bus_t        out,
  output logic [31:0] cnt_expired
);

  logic              is_ip, expire, drop_now, drop_q;
  logic [7:0]        new_ttl;
  logic [DATA_W-1:0] new_data;

  assign is_ip   = in.meta.hdr.is_ip4 || in.meta.hdr.is_ip6;
  assign expire  = is_ip && in.meta.hdr.ttl <= 8'd1;
  assign new_ttl = in.meta.hdr.ttl - 8'd1;

  always_comb begin
    int unsigned  ttl_pos, ck_pos;
    logic [15:0]  old_ck, new_ck, m_old, m_new;
    ttl_pos = int'(in.meta.hdr.l3_off) + (in.meta.hdr.is_ip4 ? 8 : 7);
    ck_pos  = int'(in.meta.hdr.l3_off) + 10;
    old_ck  = {get_byte(in.beat.data, ck_pos), get_byte(in.beat.data, ck_pos + 1)};
    m_old   = {in.meta.hdr.ttl, in.meta.hdr.proto};
    m_new   = {new_ttl, in.meta.hdr.proto};
    new_ck  = ~oc_add(oc_add(~old_ck, ~m_old), m_new);
    new_data = in.beat.data;
    if (in.beat.sop && is_ip && !expire) begin
      for (int i = 0; i < int'(BYTES); i++) begin
        if (i == int'(ttl_pos)) new_data[DATA_W-1-8*i -: 8] = new_ttl;
        if (in.meta.hdr.is_ip4 && i == int'(ck_pos))     new_data[DATA_W-1-8*i -: 8] = new_ck[15:8];
        if (in.meta.hdr.is_ip4 && i == int'(ck_pos) + 1) new_data[DATA_W-1-8*i -: 8] = new_ck[7:0];
      end
    end
  end

  assign drop_now = in.beat.sop ? expire : drop_q;
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      out         <= '0;
      drop_q      <= 1'b0;
      cnt_expired <= '0;
    end else if (in_ready) begin
      out_valid     <= in_valid && !drop_now;
      out           <= in;
      out.beat.data <= new_data;
      if (in.beat.sop && is_ip) out.meta.hdr.ttl <= new_ttl;
      if (in_valid) begin
        drop_q <= drop_now && !in.beat.eop;
        if (in.beat.sop && expire) cnt_expired <= cnt_expired + 1'b1;
      end
    end
  end

endmodule
