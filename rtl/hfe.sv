// Header Field Extractor (HFE).
//
// First stage of the pipeline. It parses the first beat of every packet and
// extracts the flow-identification fields the later stages work on: an optional
// 802.1Q tag, IPv4 or IPv6 source and destination addresses, protocol,
// TTL/hop limit, IP length and the TCP/UDP ports. The fields are written to the
// packet's metadata (`meta.hdr`); all other metadata fields are cleared.
//
// The document describes the extractor as a parser walking the headers from
// start to end. Because all headers this design uses (Ethernet 14 B, one VLAN
// tag 4 B, IPv4 with options up to 60 B or IPv6 40 B, first 4 bytes of L4) fit
// into the 128-byte first beat, the walk here is a single combinational pass
// over that beat: the VLAN tag selects the IP header offset (14 or 18) and the
// IPv4 IHL selects the L4 offset. `l4_valid` is set for TCP and UDP. Only one
// VLAN tag is recognised and IPv6 extension headers are not walked (the next
// header must be TCP or UDP directly).
//
// Interface: valid/ready streams in and out; one register stage, one beat per
// clock, latency 1 cycle. `in_ready` is `!out_valid || out_ready`. Only the
// header part of the metadata is written here; the filter results in it leave
// as zero and are filled in by the later stages.
module hfe
  import ddos_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  output logic   in_ready,
  input  beat_t  in_beat,
  output logic   out_valid,
  input  logic   out_ready,
  output bus_t   out
);

  hdr_t h;

  always_comb begin
    logic [15:0]       etype;
    logic [DATA_W-1:0] l3;
    logic [DATA_W-1:0] l4;
    logic [7:0]        l4_off;

    h = '0;
    etype = {get_byte(in_beat.data, 12), get_byte(in_beat.data, 13)};
    if (etype == ETH_VLAN) begin
      h.has_vlan = 1'b1;
      h.vlan_id  = in_beat.data[DATA_W-1-8*14-4 -: 12];
      etype      = {get_byte(in_beat.data, 16), get_byte(in_beat.data, 17)};
      h.l3_off   = 7'd18;
    end else begin
      h.l3_off   = 7'd14;
    end
    l3 = in_beat.data << (8 * h.l3_off);
    l4_off = 8'd0;

    if (etype == ETH_IPV4 && l3[DATA_W-1 -: 4] == 4'd4) begin
      h.is_ip4 = 1'b1;
      h.ihl    = l3[DATA_W-5 -: 4];
      h.ip_len = {get_byte(l3, 2), get_byte(l3, 3)};
      h.ttl    = get_byte(l3, 8);
      h.proto  = get_byte(l3, 9);
      h.src_ip = {96'd0, get_byte(l3, 12), get_byte(l3, 13), get_byte(l3, 14), get_byte(l3, 15)};
      h.dst_ip = {96'd0, get_byte(l3, 16), get_byte(l3, 17), get_byte(l3, 18), get_byte(l3, 19)};
      l4_off   = {2'd0, h.ihl, 2'd0};
    end else if (etype == ETH_IPV6 && l3[DATA_W-1 -: 4] == 4'd6) begin
      h.is_ip6 = 1'b1;
      h.ip_len = {get_byte(l3, 4), get_byte(l3, 5)} + 16'd40;
      h.proto  = get_byte(l3, 6);
      h.ttl    = get_byte(l3, 7);
      h.src_ip = l3[DATA_W-1-8*8  -: 128];
      h.dst_ip = l3[DATA_W-1-8*24 -: 128];
      l4_off   = 8'd40;
    end

    l4 = l3 << (8 * l4_off);
    if ((h.is_ip4 || h.is_ip6) && (h.proto == PROTO_TCP || h.proto == PROTO_UDP) &&
        ({1'b0, h.l3_off} + l4_off + 8'd4 <= 8'(BYTES))) begin
      h.l4_valid = 1'b1;
      h.src_port = l4[DATA_W-1  -: 16];
      h.dst_port = l4[DATA_W-17 -: 16];
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else if (in_ready) begin
      out_valid     <= in_valid;
      out.beat      <= in_beat;
      out.meta      <= '0;
      out.meta.hdr  <= in_beat.sop ? h : '0;
    end
  end

endmodule
