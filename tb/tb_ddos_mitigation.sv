// Closed-loop test of the mitigation principle on the whole data plane at its
// default sizes.
//
// A protected network (198.51.100.0/24) receives legitimate UDP traffic from
// many sources, one packet each, in every interval. In intervals 2 to 5 a
// reflection attack adds large UDP packets from source port 53 of ten
// reflectors with unequal volumes. A selection rule asks for a Unified Header
// of every packet to the protected network and enables blocking for it.
//
// A small controller model in this testbench plays the software part. At the
// end of each interval it sums the bytes that were let through, per source,
// from the UHs alone. If the total exceeds LIMIT, it blocks the biggest
// sources, largest first, until the rest is at most OPTIMAL, and writes them
// into the blocking table through the configuration port (bank 0 slot, or
// bank 1 when that slot is taken).
//
// Checks:
//  - every legitimate packet is delivered, and no legitimate source is ever
//    blocked;
//  - a reflector's packets reach the output exactly while it is not blocked;
//  - after the first blocking decision, the forwarded bytes of every interval
//    stay at or below LIMIT;
//  - the drop counter, and the per-slot packet and byte counters read back,
//    match the blocked traffic that was sent.
module tb_ddos_mitigation;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  localparam int INTERVALS = 8;
  localparam int NLEGIT    = 40;      // legitimate packets per interval
  localparam int NREFL     = 10;      // reflectors
  localparam int LIMIT     = 30000;   // bytes per interval
  localparam int OPTIMAL   = 24000;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic rx_valid, rx_ready, tx_valid, tx_ready, dma_rx_valid, dma_rx_ready;
  logic dma_tx_valid, dma_tx_ready;
  beat_t rx_beat, tx_beat, dma_rx_beat, dma_tx_beat;
  logic mem_rd_en [2], mem_wr_en [2];
  logic [BLK_AW-1:0] mem_rd_addr [2], mem_wr_addr [2];
  blk_slot_t mem_rd_data [2], mem_wr_data [2];
  logic sel_cfg_wr, fwd_cfg_wr, blk_cfg_wr, blk_cfg_ready, blk_cfg_bank, blk_st_rd, blk_st_valid;
  logic [3:0] sel_cfg_idx;
  logic [4:0] fwd_cfg_idx;
  sel_rule_t sel_cfg_rule;
  fwd_route_t fwd_cfg_route;
  logic [BLK_AW-1:0] blk_cfg_addr;
  blk_entry_t blk_cfg_entry;
  logic [BLK_AW:0] blk_st_addr;
  logic [31:0] blk_st_pkts, cnt_blocked, cnt_invalid, cnt_expired, cnt_noroute;
  logic [47:0] blk_st_bytes;

  ddos_top dut (.*);

  for (genvar b = 0; b < 2; b++) begin : g_mem
    qdr_model #(.AW(BLK_AW), .RD_LAT(4)) u_mem (
      .clk, .rd_en(mem_rd_en[b]), .rd_addr(mem_rd_addr[b]), .rd_data(mem_rd_data[b]),
      .wr_en(mem_wr_en[b]), .wr_addr(mem_wr_addr[b]), .wr_data(mem_wr_data[b])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ drivers
  beat_t rx_q[$];
  always @(posedge clk)
    if (!rst && rx_valid && rx_ready) void'(rx_q.pop_front());
  always @(negedge clk) begin
    rx_valid     <= !rst && rx_q.size() > 0;
    rx_beat      <= rx_q.size() > 0 ? rx_q[0] : '0;
    tx_ready     <= (rnd() % 100) >= 10;
    dma_rx_ready <= (rnd() % 100) >= 10;
  end
  assign dma_tx_valid = 1'b0;
  assign dma_tx_beat  = '0;

  // ------------------------------------------------------------------ monitors
  // Per-interval accounting, indexed by source address (IPv4).
  longint uh_bytes[bit [31:0]];      // bytes seen in UHs and not marked blocked
  longint fwd_bytes = 0;             // bytes leaving on the TX side this interval
  int     legit_rx = 0, refl_rx[NREFL];
  bytes_t cur_tx, cur_dma;

  always @(posedge clk) begin
    if (!rst && tx_valid && tx_ready) begin
      if (tx_beat.sop) cur_tx = {};
      add_beat(cur_tx, tx_beat);
      if (tx_beat.eop) begin
        fwd_bytes += cur_tx.size();
        if (cur_tx[26] == 8'd100) legit_rx++;
        else if (cur_tx[26] == 8'd203) refl_rx[cur_tx[29] - 1]++;
      end
    end
    if (!rst && dma_rx_valid && dma_rx_ready) begin
      if (dma_rx_beat.sop) cur_dma = {};
      add_beat(cur_dma, dma_rx_beat);
      if (dma_rx_beat.eop && cur_dma.size() == 48) begin
        bit [31:0] src;
        bit [15:0] len;
        src = {cur_dma[12], cur_dma[13], cur_dma[14], cur_dma[15]};
        len = {cur_dma[37], cur_dma[38]};
        if (!cur_dma[42][0]) uh_bytes[src] += 64'(len) + 14;
      end
    end
  end

  // ------------------------------------------------------------------ controller model
  bit [31:0] blk_src[$];
  int        blk_bank[$], blk_idx[$];
  bit        refl_blocked[NREFL];
  longint    exp_blk_pk = 0, exp_blk_by = 0;

  task automatic block(bit [31:0] src);
    bit [128:0] k;
    bit [31:0]  h;
    int bank, idx;
    k = {1'b0, 96'd0, src};
    bank = 0;
    h = ref_crc(k, 32'h04C11DB7);
    idx = int'(h[BLK_AW-1:0]);
    foreach (blk_src[i]) if (blk_bank[i] == 0 && blk_idx[i] == idx) bank = 1;
    if (bank == 1) begin
      h = ref_crc(k, 32'h1EDC6F41);
      idx = int'(h[BLK_AW-1:0]);
    end
    @(negedge clk);
    blk_cfg_wr = 1; blk_cfg_bank = bank[0]; blk_cfg_addr = idx[BLK_AW-1:0];
    blk_cfg_entry.valid = 1; blk_cfg_entry.key = k;
    while (!blk_cfg_ready) @(negedge clk);
    @(negedge clk);
    blk_cfg_wr = 0;
    blk_src.push_back(src); blk_bank.push_back(bank); blk_idx.push_back(idx);
    if (src[31:8] == {8'd203, 8'd0, 8'd113}) refl_blocked[src[7:0] - 1] = 1;
  endtask

  // Returns the number of sources blocked.
  task automatic decide(output int nblk);
    longint total, sorted_b[$];
    bit [31:0] sorted_s[$];
    total = 0;
    nblk  = 0;
    foreach (uh_bytes[s]) total += uh_bytes[s];
    if (total <= LIMIT) return;
    foreach (uh_bytes[s]) begin
      int pos;
      pos = 0;
      while (pos < sorted_b.size() && sorted_b[pos] >= uh_bytes[s]) pos++;
      sorted_b.insert(pos, uh_bytes[s]);
      sorted_s.insert(pos, s);
    end
    for (int i = 0; i < sorted_s.size() && total > OPTIMAL; i++) begin
      block(sorted_s[i]);
      total -= sorted_b[i];
      nblk++;
    end
  endtask

  // ------------------------------------------------------------------ stimulus
  function automatic bytes_t make_pkt(bit [31:0] src, bit [15:0] sport, int paylen);
    desc_t d;
    d = rand_desc();
    d.ip6 = 0; d.nonip = 0; d.vlan = 0; d.proto = 17; d.ttl = 64; d.bad_csum = 0;
    d.src = {96'd0, src};
    d.dst = {96'd0, 8'd198, 8'd51, 8'd100, 8'(rnd())};
    d.sport = sport;
    d.paylen = paylen;
    return build(d);
  endfunction

  initial begin
    int legit_tx, refl_exp[NREFL], first_block, nblk;
    bytes_t b;
    sel_cfg_wr = 0; fwd_cfg_wr = 0; blk_cfg_wr = 0; blk_st_rd = 0;
    sel_cfg_idx = 0; fwd_cfg_idx = 0; sel_cfg_rule = '0; fwd_cfg_route = '0;
    blk_cfg_bank = 0; blk_cfg_addr = 0; blk_cfg_entry = '0; blk_st_addr = 0;
    legit_tx = 0;
    first_block = -1;
    foreach (refl_exp[r]) begin refl_exp[r] = 0; refl_rx[r] = 0; refl_blocked[r] = 0; end
    repeat (5) @(posedge clk);
    rst = 0;

    // rule 0: everything to the protected network, UH + blocking
    @(negedge clk);
    sel_cfg_wr = 1; sel_cfg_idx = 0;
    sel_cfg_rule.valid = 1;
    sel_cfg_rule.mask.v6 = 1;
    sel_cfg_rule.value.dst_ip = {96'd0, 32'hC633_6400};
    sel_cfg_rule.mask.dst_ip  = {96'd0, 32'hFFFF_FF00};
    sel_cfg_rule.act.uh_to_sw = 1; sel_cfg_rule.act.blk_en = 1;
    @(negedge clk);
    sel_cfg_wr = 0;
    // default IPv4 route
    fwd_cfg_wr = 1; fwd_cfg_idx = 0;
    fwd_cfg_route.valid = 1; fwd_cfg_route.plen = 0; fwd_cfg_route.nh.dmac = 48'hAA0000000001;
    @(negedge clk);
    fwd_cfg_wr = 0;

    for (int t = 0; t < INTERVALS; t++) begin
      longint offered;
      offered = 0;
      uh_bytes.delete();
      fwd_bytes = 0;
      for (int i = 0; i < NLEGIT; i++) begin
        beat_t q[$];
        b = make_pkt({8'd100, 24'(rnd())}, 16'(1024 + rnd() % 60000), 60 + rnd() % 400);
        offered += b.size();
        q = {};
        to_beats(b, q);
        foreach (q[j]) rx_q.push_back(q[j]);
        legit_tx++;
        if (t >= 2 && t <= 5) begin
          // reflector traffic interleaved with the legitimate packets
          for (int r = 0; r < NREFL; r++) begin
            if (i < 6 + (NREFL - r) * 2 && (i % 2 == r % 2)) begin
              beat_t q2[$];
              b = make_pkt({8'd203, 8'd0, 8'd113, 8'(r + 1)}, 16'd53, 1200);
              offered += b.size();
              q2 = {};
              to_beats(b, q2);
              foreach (q2[j]) rx_q.push_back(q2[j]);
              if (refl_blocked[r]) begin
                exp_blk_pk++;
                exp_blk_by += b.size();
              end else refl_exp[r]++;
            end
          end
        end
      end
      while (rx_q.size() != 0) @(posedge clk);
      repeat (200) @(posedge clk);
      if (first_block >= 0)
        check(fwd_bytes <= LIMIT, $sformatf("interval %0d forwarded %0d B over the limit", t, fwd_bytes));
      decide(nblk);
      if (nblk > 0 && first_block < 0) first_block = t;
      $display("interval %0d: offered %6d B, forwarded %6d B, newly blocked %0d, blocked in total %0d",
               t, offered, fwd_bytes, nblk, blk_src.size());
    end

    check(first_block == 2, "attack detected in its first interval");
    check(legit_rx == legit_tx, $sformatf("legitimate packets delivered %0d of %0d", legit_rx, legit_tx));
    foreach (blk_src[i])
      check(blk_src[i][31:8] == {8'd203, 8'd0, 8'd113}, "only reflectors blocked");
    foreach (refl_exp[r])
      check(refl_rx[r] == refl_exp[r], $sformatf("reflector %0d: %0d forwarded, expected %0d", r, refl_rx[r], refl_exp[r]));
    check(exp_blk_pk > 0, "blocked traffic sent");
    check(cnt_blocked == 32'(exp_blk_pk), $sformatf("drop counter %0d, expected %0d", cnt_blocked, exp_blk_pk));
    begin
      longint pk, by;
      pk = 0; by = 0;
      foreach (blk_src[i]) begin
        @(negedge clk);
        blk_st_rd = 1; blk_st_addr = {blk_bank[i][0], blk_idx[i][BLK_AW-1:0]};
        @(negedge clk);
        blk_st_rd = 0;
        repeat (3) @(negedge clk);
        check(blk_st_valid, "statistics answer");
        pk += blk_st_pkts;
        by += blk_st_bytes;
      end
      check(pk == exp_blk_pk && by == exp_blk_by,
            $sformatf("table counters %0d pkts / %0d B, expected %0d / %0d", pk, by, exp_blk_pk, exp_blk_by));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
