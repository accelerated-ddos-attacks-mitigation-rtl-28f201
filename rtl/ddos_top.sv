// DDoS mitigation data plane: top level of the FPGA firmware.
//
// One 100 GbE packet stream runs through the stages below, one 1024-bit
// beat per clock:
//
//   RX MAC -> hfe -> sel_filter -> blk_filter -> uh_gen -> pkt_check_drop
//          -> rx_dma_mux -> ttl_dec -> fwd_filter -> mac_vlan_edit -> tx_mux -> TX MAC
//
// The header field extractor parses each packet; the selection filter matches
// it against software rules that say whether software gets the packet, a
// Unified Header (UH), or nothing, and whether the blocking table applies; the
// blocking filter looks the source address up in a cuckoo hash table held in two
// external memories; the UH generator emits the per-packet records; check & drop
// removes blocked and malformed packets; the RX DMA multiplexer copies selected
// packets and merges them with the UHs towards software; TTL decrement,
// forwarding (longest prefix match) and the MAC & VLAN editor turn the cleansed
// traffic into routed traffic; the output multiplexer merges it with packets
// sent by software.
//
// The stage order and connections follow the firmware block diagram of the
// document. This design places the UH generator before check & drop so that
// software also sees blocked traffic in UHs, while whole-packet copies are
// taken after check & drop as the diagram shows.
//
// Everything outside the FPGA is reached through ports: the MAC streams, the
// two DMA streams, the external memories of the blocking table (read data
// MEM_RD_LAT cycles after the request) and the software access to the three
// tables, the blocking statistics and the drop counters.
// All streams are valid/ready with a beat transferred when both are high.
module ddos_top
  import ddos_pkg::*;
#(
  parameter int unsigned SEL_ENTRIES = 16,
  parameter int unsigned FWD_ENTRIES = 32,
  parameter int unsigned MEM_RD_LAT  = 4
) (
  input  logic                           clk,
  input  logic                           rst,
  // RX MAC
  input  logic                           rx_valid,
  output logic                           rx_ready,
  input  beat_t                          rx_beat,
  // TX MAC
  output logic                           tx_valid,
  input  logic                           tx_ready,
  output beat_t                          tx_beat,
  // software RX DMA (packet copies and Unified Headers)
  output logic                           dma_rx_valid,
  input  logic                           dma_rx_ready,
  output beat_t                          dma_rx_beat,
  // software TX DMA
  input  logic                           dma_tx_valid,
  output logic                           dma_tx_ready,
  input  beat_t                          dma_tx_beat,
  // external memories of the blocking table
  output logic                           mem_rd_en   [2],
  output logic [BLK_AW-1:0]              mem_rd_addr [2],
  input  blk_slot_t                      mem_rd_data [2],
  output logic                           mem_wr_en   [2],
  output logic [BLK_AW-1:0]              mem_wr_addr [2],
  output blk_slot_t                      mem_wr_data [2],
  // software access and control
  input  logic                           sel_cfg_wr,
  input  logic [$clog2(SEL_ENTRIES)-1:0] sel_cfg_idx,
  input  sel_rule_t                      sel_cfg_rule,
  input  logic                           fwd_cfg_wr,
  input  logic [$clog2(FWD_ENTRIES)-1:0] fwd_cfg_idx,
  input  fwd_route_t                     fwd_cfg_route,
  input  logic                           blk_cfg_wr,
  output logic                           blk_cfg_ready,
  input  logic                           blk_cfg_bank,
  input  logic [BLK_AW-1:0]              blk_cfg_addr,
  input  blk_entry_t                     blk_cfg_entry,
  input  logic                           blk_st_rd,
  input  logic [BLK_AW:0]                blk_st_addr,
  output logic                           blk_st_valid,
  output logic [31:0]                    blk_st_pkts,
  output logic [47:0]                    blk_st_bytes,
  output logic [31:0]                    cnt_blocked,
  output logic [31:0]                    cnt_invalid,
  output logic [31:0]                    cnt_expired,
  output logic [31:0]                    cnt_noroute
);

  logic  v1, r1, v2, r2, v3, r3, v4, r4, v5, r5, v6, r6, v7, r7, v8, r8, v9, r9;
  bus_t  b1, b2, b3, b4, b5, b6, b7, b8;
  beat_t b9;
  logic  uh_valid, uh_ready;
  beat_t uh_beat;

  hfe u_hfe (
    .clk, .rst, .in_valid(rx_valid), .in_ready(rx_ready), .in_beat(rx_beat),
    .out_valid(v1), .out_ready(r1), .out(b1)
  );

  sel_filter #(.ENTRIES(SEL_ENTRIES)) u_sel (
    .clk, .rst, .in_valid(v1), .in_ready(r1), .in(b1),
    .out_valid(v2), .out_ready(r2), .out(b2),
    .cfg_wr(sel_cfg_wr), .cfg_idx(sel_cfg_idx), .cfg_rule(sel_cfg_rule)
  );

  blk_filter #(.RD_LAT(MEM_RD_LAT)) u_blk (
    .clk, .rst, .in_valid(v2), .in_ready(r2), .in(b2),
    .out_valid(v3), .out_ready(r3), .out(b3),
    .mem_rd_en, .mem_rd_addr, .mem_rd_data, .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .cfg_wr(blk_cfg_wr), .cfg_ready(blk_cfg_ready), .cfg_bank(blk_cfg_bank),
    .cfg_addr(blk_cfg_addr), .cfg_entry(blk_cfg_entry),
    .st_rd(blk_st_rd), .st_addr(blk_st_addr), .st_valid(blk_st_valid),
    .st_pkts(blk_st_pkts), .st_bytes(blk_st_bytes)
  );

  uh_gen u_uh (
    .clk, .rst, .in_valid(v3), .in_ready(r3), .in(b3),
    .out_valid(v4), .out_ready(r4), .out(b4),
    .uh_valid, .uh_ready, .uh_beat
  );

  pkt_check_drop u_pcd (
    .clk, .rst, .in_valid(v4), .in_ready(r4), .in(b4),
    .out_valid(v5), .out_ready(r5), .out(b5),
    .cnt_blocked, .cnt_invalid
  );

  rx_dma_mux u_rxm (
    .clk, .rst, .in_valid(v5), .in_ready(r5), .in(b5),
    .out_valid(v6), .out_ready(r6), .out(b6),
    .uh_valid, .uh_ready, .uh_beat,
    .dma_valid(dma_rx_valid), .dma_ready(dma_rx_ready), .dma_beat(dma_rx_beat)
  );

  ttl_dec u_ttl (
    .clk, .rst, .in_valid(v6), .in_ready(r6), .in(b6),
    .out_valid(v7), .out_ready(r7), .out(b7), .cnt_expired
  );

  fwd_filter #(.ENTRIES(FWD_ENTRIES)) u_fwd (
    .clk, .rst, .in_valid(v7), .in_ready(r7), .in(b7),
    .out_valid(v8), .out_ready(r8), .out(b8),
    .cfg_wr(fwd_cfg_wr), .cfg_idx(fwd_cfg_idx), .cfg_route(fwd_cfg_route), .cnt_noroute
  );

  mac_vlan_edit u_mve (
    .clk, .rst, .in_valid(v8), .in_ready(r8), .in(b8),
    .out_valid(v9), .out_ready(r9), .out(b9)
  );

  tx_mux u_txm (
    .clk, .rst, .a_valid(v9), .a_ready(r9), .a_beat(b9),
    .b_valid(dma_tx_valid), .b_ready(dma_tx_ready), .b_beat(dma_tx_beat),
    .out_valid(tx_valid), .out_ready(tx_ready), .out(tx_beat)
  );

endmodule
