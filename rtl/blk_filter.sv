// Blocking Filter.
//
// Exact-match table of blocked source addresses, organised as a cuckoo hash
// table over two banks held in external memories (one bank per memory, 2^BLK_AW
// slots each). A source address can sit in slot h0(key) of bank 0 or slot
// h1(key) of bank 1, so a lookup is one read of each bank, issued in the same
// clock, and a compare of both returned entries with the key. h0 and h1 are
// CRC-32 and CRC-32C of the key, truncated to BLK_AW bits. Insertion, including
// cuckoo relocation of an entry to its other bank, is left to software, which
// writes slots through the `cfg_*` port.
//
// The lookup runs for the first beat of IP packets whose selection rule has
// `blk_en` set. While the memories answer (RD_LAT cycles), the packet's beats
// wait in a data FIFO and the lookups move down a delay line; results go into a
// result FIFO in packet order, and a packet leaves only when its result is there.
// On a hit the packet's metadata gets `blk_hit` and the slot number; the packet
// is dropped later by the check & drop stage.
//
// Each slot also holds the packet (32-bit) and byte (48-bit) counters of its
// source, in the same external memory word (`blk_slot_t`). A hit writes the
// slot back with both counters incremented in the clock the read data arrives.
// A slot read in flight does not yet see writes issued during its RD_LAT
// cycles, so the last RD_LAT writes of each bank are kept in a small window and
// the youngest one to the same slot replaces the memory data; back-to-back hits
// on one slot therefore count correctly, and a slot rewritten by software while
// a lookup of it is in flight is seen as rewritten. The byte count is the frame
// length without FCS (IP header offset + IP length). Writing a slot through
// `cfg_*` clears its counters.
//
// Software reads a slot's counters with `st_rd`/`st_addr` ({bank, slot}); the
// read uses the memory read port, so the input is held for that one clock, and
// `st_valid` comes RD_LAT clocks later with the data.
//
// From the document: the exact-match cuckoo table, external memories, a total
// capacity over 250 000 rules and the per-address packet/byte statistics.
// This design's choices: two banks of 2^18 slots, the hash functions, the memory
// read latency, counter widths, and keeping the counters in the table's words.
//
// Memory interface (per bank): `mem_rd_en`/`mem_rd_addr` in one cycle,
// `mem_rd_data` valid exactly RD_LAT cycles later; separate write port, as on
// QDR SRAM. A slot write is a request: `cfg_wr` is held until a clock in which
// `cfg_ready` is high, and the write happens in that clock. `cfg_ready` is low
// while a hit writes counters back; because no packet is taken in while
// `cfg_wr` is high, pending hits drain and the write waits at most RD_LAT + 1
// clocks, even under a flood of blocked packets.
// Throughput: one beat per clock while the FIFOs do not fill and no
// statistics read or slot write is made.
module blk_filter
  import ddos_pkg::*;
#(
  parameter int unsigned RD_LAT      = 4,
  parameter int unsigned DFIFO_DEPTH = 64,
  parameter int unsigned RFIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  bus_t              in,
  output logic              out_valid,
  input  logic              out_ready,
  output bus_t              out,
  // external memories, one per bank
  output logic              mem_rd_en   [2],
  output logic [BLK_AW-1:0] mem_rd_addr [2],
  input  blk_slot_t         mem_rd_data [2],
  output logic              mem_wr_en   [2],
  output logic [BLK_AW-1:0] mem_wr_addr [2],
  output blk_slot_t         mem_wr_data [2],
  // software: slot writes
  input  logic              cfg_wr,
  output logic              cfg_ready,
  input  logic              cfg_bank,
  input  logic [BLK_AW-1:0] cfg_addr,
  input  blk_entry_t        cfg_entry,
  // software: statistics reads
  input  logic              st_rd,
  input  logic [BLK_AW:0]   st_addr,
  output logic              st_valid,
  output logic [31:0]       st_pkts,
  output logic [47:0]       st_bytes
);

  localparam int unsigned RCW    = $clog2(RFIFO_DEPTH) + 1;

  typedef struct packed {
    logic            hit;
    logic [BLK_AW:0] slot;
  } res_t;

  // ---------------- input side ----------------
  logic             d_full, accept, accept_sop, do_lookup;
  logic [$clog2(DFIFO_DEPTH):0] d_count;
  logic [$clog2(RFIFO_DEPTH):0] r_count;
  logic [RCW-1:0]   res_pending;  // packets accepted whose result is not yet consumed
  blk_key_t         key;
  logic [15:0]      frame_len;

  assign d_full     = d_count == ($clog2(DFIFO_DEPTH)+1)'(DFIFO_DEPTH);
  assign in_ready   = !d_full && (res_pending != RCW'(RFIFO_DEPTH)) && !st_rd && !cfg_wr;
  assign accept     = in_valid && in_ready;
  assign accept_sop = accept && in.beat.sop;
  assign do_lookup  = accept_sop && (in.meta.hdr.is_ip4 || in.meta.hdr.is_ip6) &&
                      in.meta.sel_hit && in.meta.sel_act.blk_en;
  assign key.v6     = in.meta.hdr.is_ip6;
  assign key.ip     = in.meta.hdr.src_ip;
  assign frame_len  = in.meta.hdr.ip_len + 16'(in.meta.hdr.l3_off);

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      mem_rd_en[b]   = do_lookup || (st_rd && st_addr[BLK_AW] == b[0]);
      mem_rd_addr[b] = st_rd ? st_addr[BLK_AW-1:0] : blk_hash(key, b[0]);
    end
  end

  // ---------------- lookup delay line ----------------
  logic              dl_v   [RD_LAT];
  logic              dl_lk  [RD_LAT];
  blk_key_t          dl_key [RD_LAT];
  logic [15:0]       dl_len [RD_LAT];
  logic [BLK_AW-1:0] dl_a0  [RD_LAT];
  logic [BLK_AW-1:0] dl_a1  [RD_LAT];
  logic              dl_st  [RD_LAT];   // statistics read in flight
  logic              dl_sb  [RD_LAT];   // its bank

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < RD_LAT; i++) begin
        dl_v[i]  <= 1'b0;
        dl_lk[i] <= 1'b0;
        dl_st[i] <= 1'b0;
      end
    end else begin
      dl_v[0]  <= accept_sop;
      dl_lk[0] <= do_lookup;
      dl_st[0] <= st_rd;
      for (int i = 1; i < RD_LAT; i++) begin
        dl_v[i]  <= dl_v[i-1];
        dl_lk[i] <= dl_lk[i-1];
        dl_st[i] <= dl_st[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    dl_key[0] <= key;
    dl_len[0] <= frame_len;
    dl_a0[0]  <= mem_rd_addr[0];
    dl_a1[0]  <= mem_rd_addr[1];
    dl_sb[0]  <= st_addr[BLK_AW];
    for (int i = 1; i < RD_LAT; i++) begin
      dl_sb[i]  <= dl_sb[i-1];
      dl_key[i] <= dl_key[i-1];
      dl_len[i] <= dl_len[i-1];
      dl_a0[i]  <= dl_a0[i-1];
      dl_a1[i]  <= dl_a1[i-1];
    end
  end

  // ---------------- write window and compare ----------------
  // Last RD_LAT writes of each bank, index 0 the youngest.
  logic              wq_v    [2][RD_LAT];
  logic [BLK_AW-1:0] wq_addr [2][RD_LAT];
  blk_slot_t         wq_data [2][RD_LAT];
  blk_slot_t         cur [2];             // memory data with the window applied
  logic [BLK_AW-1:0] cur_a [2];

  assign cur_a[0] = dl_a0[RD_LAT-1];
  assign cur_a[1] = dl_a1[RD_LAT-1];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      cur[b] = mem_rd_data[b];
      for (int i = RD_LAT - 1; i >= 0; i--)
        if (wq_v[b][i] && wq_addr[b][i] == cur_a[b]) cur[b] = wq_data[b][i];
    end
  end

  logic hit0, hit1;
  res_t res;
  assign hit0     = dl_lk[RD_LAT-1] && cur[0].ent.valid && cur[0].ent.key == dl_key[RD_LAT-1];
  assign hit1     = dl_lk[RD_LAT-1] && cur[1].ent.valid && cur[1].ent.key == dl_key[RD_LAT-1];
  assign res.hit  = hit0 || hit1;
  assign res.slot = hit0 ? {1'b0, dl_a0[RD_LAT-1]} : {1'b1, dl_a1[RD_LAT-1]};

  // ---------------- FIFOs and output ----------------
  bus_t d_head;
  res_t r_head;
  logic pop;

  sync_fifo #(.WIDTH($bits(bus_t)), .DEPTH(DFIFO_DEPTH)) u_dfifo (
    .clk, .rst, .wr_en(accept), .wr_data(in), .rd_en(pop), .rd_data(d_head), .count(d_count)
  );

  sync_fifo #(.WIDTH($bits(res_t)), .DEPTH(RFIFO_DEPTH)) u_rfifo (
    .clk, .rst, .wr_en(dl_v[RD_LAT-1]), .wr_data(res), .rd_en(pop && d_head.beat.sop),
    .rd_data(r_head), .count(r_count)
  );

  assign pop = (d_count != '0) && (!d_head.beat.sop || r_count != '0) && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      out         <= '0;
      res_pending <= '0;
    end else begin
      res_pending <= res_pending + RCW'(accept_sop) - RCW'(pop && d_head.beat.sop);
      if (!out_valid || out_ready) begin
        out_valid <= pop;
        out       <= d_head;
        if (d_head.beat.sop) begin
          out.meta.blk_hit  <= r_head.hit;
          out.meta.blk_slot <= r_head.hit ? r_head.slot : '0;
        end
      end
    end
  end

  // ---------------- memory writes: counter updates and software ----------------
  logic      hit_wr [2];
  blk_slot_t upd [2];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      hit_wr[b]      = (b == 0) ? hit0 : (hit1 && !hit0);
      upd[b]         = cur[b];
      upd[b].pkts    = cur[b].pkts + 32'd1;
      upd[b].bytes   = cur[b].bytes + 48'(dl_len[RD_LAT-1]);
    end
  end

  assign cfg_ready = !res.hit;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      mem_wr_en[b] = hit_wr[b] || (cfg_wr && cfg_ready && (cfg_bank == b[0]));
      if (hit_wr[b]) begin
        mem_wr_addr[b] = cur_a[b];
        mem_wr_data[b] = upd[b];
      end else begin
        mem_wr_addr[b] = cfg_addr;
        mem_wr_data[b] = '{ent: cfg_entry, pkts: '0, bytes: '0};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < RD_LAT; i++) wq_v[b][i] <= 1'b0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        wq_v[b][0] <= mem_wr_en[b];
        for (int i = 1; i < RD_LAT; i++) wq_v[b][i] <= wq_v[b][i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 2; b++) begin
      wq_addr[b][0] <= mem_wr_addr[b];
      wq_data[b][0] <= mem_wr_data[b];
      for (int i = 1; i < RD_LAT; i++) begin
        wq_addr[b][i] <= wq_addr[b][i-1];
        wq_data[b][i] <= wq_data[b][i-1];
      end
    end
  end

  // ---------------- statistics read results ----------------
  always_comb begin
    st_valid = dl_st[RD_LAT-1];
    st_pkts  = dl_sb[RD_LAT-1] ? cur[1].pkts  : cur[0].pkts;
    st_bytes = dl_sb[RD_LAT-1] ? cur[1].bytes : cur[0].bytes;
  end

endmodule
