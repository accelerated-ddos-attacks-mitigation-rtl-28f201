// Forwarding Filter.
//
// Longest-prefix-match lookup of the destination address, giving the next hop
// (destination MAC address and optional VLAN ID) that the MAC & VLAN editor
// writes into the packet. The route table holds ENTRIES prefixes of either IP
// version; every valid route of the packet's version is compared in parallel
// and the longest matching prefix wins (the lowest index on equal lengths). A
// prefix of length 0 is a default route. IP packets without a route are
// dropped as whole packets and counted; non-IP packets pass without a next hop.
//
// From the document: an LPM IP lookup that determines the next hop. The
// parallel-compare organisation, table size and route format are this design's
// choices (the simplest form of LPM).
//
// Software writes routes through `cfg_*`; all routes are invalid after reset.
// Interface: valid/ready streams; one register stage, one beat per clock.
module fwd_filter
  import ddos_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  bus_t                       in,
  output logic                       out_valid,
  input  logic                       out_ready,
  output bus_t                       out,
  input  logic                       cfg_wr,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  fwd_route_t                 cfg_route,
  output logic [31:0]                cnt_noroute
);

  fwd_route_t routes [ENTRIES];
  logic       is_ip, hit, drop_now, drop_q;
  logic [7:0] best_len;
  nh_t        best_nh;

  assign is_ip = in.meta.hdr.is_ip4 || in.meta.hdr.is_ip6;

  always_comb begin
    logic [127:0] addr, mask;
    // IPv4 addresses are moved to the top of the 128-bit field so that both
    // versions compare against a left-aligned prefix mask.
    addr     = in.meta.hdr.is_ip6 ? in.meta.hdr.dst_ip : {in.meta.hdr.dst_ip[31:0], 96'd0};
    hit      = 1'b0;
    best_len = '0;
    best_nh  = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      mask = (routes[i].plen == 8'd0) ? 128'd0 : ~(128'd0) << (8'd128 - routes[i].plen);
      if (routes[i].valid && routes[i].v6 == in.meta.hdr.is_ip6 &&
          ((addr ^ (routes[i].v6 ? routes[i].prefix : {routes[i].prefix[31:0], 96'd0})) & mask) == '0 &&
          (!hit || routes[i].plen > best_len)) begin
        hit      = 1'b1;
        best_len = routes[i].plen;
        best_nh  = routes[i].nh;
      end
    end
    if (!is_ip) hit = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(ENTRIES); i++) routes[i] <= '0;
    end else if (cfg_wr) begin
      routes[cfg_idx] <= cfg_route;
    end
  end

  assign drop_now = in.beat.sop ? (is_ip && !hit) : drop_q;
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      out         <= '0;
      drop_q      <= 1'b0;
      cnt_noroute <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid && !drop_now;
      out       <= in;
      if (in.beat.sop) begin
        out.meta.nh_hit <= hit;
        out.meta.nh     <= hit ? best_nh : '0;
      end
      if (in_valid) begin
        drop_q <= drop_now && !in.beat.eop;
        if (in.beat.sop && is_ip && !hit) cnt_noroute <= cnt_noroute + 1'b1;
      end
    end
  end

endmodule
