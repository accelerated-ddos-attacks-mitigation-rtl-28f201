// Unified Header (UH) generator.
//
// For every packet whose selection rule asks for it (`sel_act.uh_to_sw`), this
// stage packs the parsed header fields and the filter results into one fixed
// 48-byte record (`uh_t`: addresses, ports, protocol, IP length, TTL, selection
// rule number, VLAN ID and flags, including whether the source is in the
// blocking table) and hands it to the software RX DMA path as a one-beat packet
// (`sop = eop = 1`, `empty = 16`). Only these few bytes per packet then cross
// PCI Express instead of the whole packet.
//
// The packet stream itself passes through unchanged in one register stage.
// UHs are made for blocked packets too, so software sees the full volume of the
// traffic it protects; this stage sits ahead of the check & drop stage.
//
// The document gives the purpose of the UH and that it is filled with parsed
// headers; its field layout is this design's own.
//
// Interface: valid/ready main stream in and out, valid/ready UH stream out. A
// packet needing a UH waits while the previous UH has not been taken. The UH
// beat always has sop = eop = 1 and a fixed `empty`, and its bytes past the
// record are zero, so those outputs are constant.
module uh_gen
  import ddos_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  output logic  in_ready,
  input  bus_t  in,
  output logic  out_valid,
  input  logic  out_ready,
  output bus_t  out,
  output logic  uh_valid,
  input  logic  uh_ready,
  output beat_t uh_beat
);

  logic need_uh, main_free, uh_free;
  uh_t  uh;

  assign need_uh   = in.beat.sop && in.meta.sel_hit && in.meta.sel_act.uh_to_sw;
  assign main_free = !out_valid || out_ready;
  assign uh_free   = !uh_valid || uh_ready;
  assign in_ready  = main_free && (!need_uh || uh_free);

  always_comb begin
    uh.src_ip   = in.meta.hdr.src_ip;
    uh.dst_ip   = in.meta.hdr.dst_ip;
    uh.src_port = in.meta.hdr.src_port;
    uh.dst_port = in.meta.hdr.dst_port;
    uh.proto    = in.meta.hdr.proto;
    uh.ip_len   = in.meta.hdr.ip_len;
    uh.ttl      = in.meta.hdr.ttl;
    uh.sel_rule = in.meta.sel_rule;
    uh.vlan_id  = in.meta.hdr.vlan_id;
    uh.is_ip6   = in.meta.hdr.is_ip6;
    uh.has_vlan = in.meta.hdr.has_vlan;
    uh.l4_valid = in.meta.hdr.l4_valid;
    uh.blk_hit  = in.meta.blk_hit;
    uh.rsvd     = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
      uh_valid  <= 1'b0;
      uh_beat   <= '0;
    end else begin
      if (main_free) begin
        out_valid <= in_valid && in_ready;
        out       <= in;
      end
      if (uh_free) begin
        uh_valid <= in_valid && in_ready && need_uh;
        uh_beat.sop   <= 1'b1;
        uh_beat.eop   <= 1'b1;
        uh_beat.empty <= EMPTY_W'(BYTES - UH_BYTES);
        uh_beat.data  <= {uh, {(DATA_W - $bits(uh_t)){1'b0}}};
      end
    end
  end

endmodule
