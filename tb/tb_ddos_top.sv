// End-to-end test of the mitigation data plane at its default sizes.
//
// Programs selection rules, routes and blocked source addresses (in the slots
// given by the two hash functions, computed here independently), sends a mix
// of IPv4/IPv6, tagged/untagged, TCP/UDP/ICMP and non-IP packets, some from
// blocked sources, some with bad checksums, TTL 1 or no route, while software
// also sends packets through the TX DMA path. A reference model in this file
// predicts the routed output, the packet copies and the Unified Headers sent
// to software, the drop counters and the per-slot statistics. Random
// back-pressure exercises the stalls. A final phase sends back-to-back
// minimum-size frames with every sink ready and checks one beat per clock.
module tb_ddos_top;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  localparam int NPKT = 400;
  localparam int NTHR = 300;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;   // 200 MHz

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

  // ------------------------------------------------------------------ model
  typedef struct { bit v6; bit [127:0] dst; int plen; bit [47:0] dmac; bit vset; bit [11:0] vid; bit strip; } route_m;
  route_m routes[$];
  bit [128:0] blocked[$];          // {v6, ip}
  int         blk_bank[$], blk_idx[$];
  longint     exp_pk[$], exp_by[$];

  bytes_t exp_tx[$], exp_copy[$], exp_uh[$], exp_sw[$];
  int e_blocked = 0, e_invalid = 0, e_expired = 0, e_noroute = 0;
  int n_uh = 0, n_copy = 0, n_vlanrw = 0, n_vlanins = 0, n_vlanstrip = 0;

  function automatic int find_blocked(bit [128:0] k);
    foreach (blocked[i]) if (blocked[i] == k) return i;
    return -1;
  endfunction

  // selection rules of this test: 0) IPv4 dst 10/8 -> UH + block
  // 1) IPv6 any -> packet copy + block   2) IPv4 dst 20/8 -> packet copy
  function automatic int sel_rule_of(desc_t d);
    if (d.nonip) return -1;
    if (!d.ip6 && d.dst[31:24] == 8'd10) return 0;
    if (d.ip6) return 1;
    if (!d.ip6 && d.dst[31:24] == 8'd20) return 2;
    return -1;
  endfunction

  function automatic int lpm(desc_t d);
    int best = -1, bl = -1;
    foreach (routes[i]) begin
      bit [127:0] a = d.ip6 ? d.dst : {d.dst[31:0], 96'd0};
      bit [127:0] p = routes[i].v6 ? routes[i].dst : {routes[i].dst[31:0], 96'd0};
      bit [127:0] m = routes[i].plen == 0 ? '0 : ~(128'd0) << (128 - routes[i].plen);
      if (routes[i].v6 == d.ip6 && ((a ^ p) & m) == 0 && routes[i].plen > bl) begin
        best = i; bl = routes[i].plen;
      end
    end
    return best;
  endfunction

  function automatic bytes_t make_uh(desc_t d, int rule, bit blk);
    bytes_t u;
    uh_t h;
    h = '0;
    h.src_ip = d.src; h.dst_ip = d.dst;
    h.l4_valid = (d.proto == 6 || d.proto == 17);
    h.src_port = h.l4_valid ? d.sport : 16'd0;
    h.dst_port = h.l4_valid ? d.dport : 16'd0;
    h.proto = d.proto;
    h.ip_len = 16'((d.ip6 ? 40 : 20) + 4 + d.paylen);
    h.ttl = d.ttl;
    h.sel_rule = 8'(rule);
    h.vlan_id = d.vlan ? d.vid : 12'd0;
    h.is_ip6 = d.ip6; h.has_vlan = d.vlan; h.blk_hit = blk;
    for (int i = 0; i < 48; i++) u.push_back(h[$bits(uh_t)-1-8*i -: 8]);
    return u;
  endfunction

  task automatic model(desc_t d, bytes_t b);
    int rule = sel_rule_of(d);
    bit blk_en = (rule == 0 || rule == 1);
    int bi = blk_en ? find_blocked({d.ip6, d.src}) : -1;
    bit blk = bi >= 0;
    int l3 = d.vlan ? 18 : 14;
    int r;
    if (rule == 0) begin exp_uh.push_back(make_uh(d, rule, blk)); n_uh++; end
    if (blk) begin
      e_blocked++;
      exp_pk[bi] += 1;
      exp_by[bi] += frame_len(d);
      return;
    end
    if (!d.nonip && !d.ip6 && d.bad_csum) begin e_invalid++; return; end
    if (rule == 1 || rule == 2) begin exp_copy.push_back(b); n_copy++; end
    if (d.nonip) begin exp_tx.push_back(b); return; end
    if (d.ttl <= 1) begin e_expired++; return; end
    r = lpm(d);
    if (r < 0) begin e_noroute++; return; end
    if (!d.ip6) begin
      bit [15:0] ck;
      b[l3+8] = d.ttl - 1;
      b[l3+10] = 0; b[l3+11] = 0;
      ck = ~csum_bytes(b, l3, 20);
      b[l3+10] = ck[15:8]; b[l3+11] = ck[7:0];
    end else begin
      b[l3+7] = d.ttl - 1;
    end
    for (int i = 0; i < 6; i++) b[i] = routes[r].dmac[47-8*i -: 8];
    if (routes[r].vset && d.vlan) begin
      b[14] = {b[14][7:4], routes[r].vid[11:8]};
      b[15] = routes[r].vid[7:0];
      n_vlanrw++;
    end else if (routes[r].vset) begin
      b.insert(12, 8'h81); b.insert(13, 8'h00);
      b.insert(14, {4'h0, routes[r].vid[11:8]}); b.insert(15, routes[r].vid[7:0]);
      n_vlanins++;
    end else if (routes[r].strip && d.vlan) begin
      repeat (4) b.delete(12);
      n_vlanstrip++;
    end
    exp_tx.push_back(b);
  endtask

  // ------------------------------------------------------------------ drivers
  beat_t rx_q[$], sw_q[$];
  int rx_gap_pct = 20, sw_gap_pct = 50, tx_stall_pct = 20, dma_stall_pct = 30;
  int n_stall = 0, n_contend = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (rx_valid && rx_ready) void'(rx_q.pop_front());
      if (dma_tx_valid && dma_tx_ready) void'(sw_q.pop_front());
      if (rx_valid && !rx_ready) n_stall++;
      if (dut.u_txm.a_valid && dut.u_txm.b_valid && !dut.u_txm.locked) n_contend++;
    end
  end

  always @(negedge clk) begin
    rx_valid     <= !rst && rx_q.size() > 0 && ((rnd() % 100) >= rx_gap_pct);
    rx_beat      <= rx_q.size() > 0 ? rx_q[0] : '0;
    dma_tx_valid <= !rst && sw_q.size() > 0 && ((rnd() % 100) >= sw_gap_pct);
    dma_tx_beat  <= sw_q.size() > 0 ? sw_q[0] : '0;
    tx_ready     <= (rnd() % 100) >= tx_stall_pct;
    dma_rx_ready <= (rnd() % 100) >= dma_stall_pct;
  end

  // ------------------------------------------------------------------ monitors
  bytes_t cur_tx, cur_dma;
  int got_tx = 0, got_sw = 0, got_copy = 0, got_uh = 0;
  always @(posedge clk) begin
    if (!rst && tx_valid && tx_ready) begin
      if (tx_beat.sop) cur_tx = {};
      add_beat(cur_tx, tx_beat);
      if (tx_beat.eop) begin
        if (cur_tx[6] == 8'hEE) begin
          check(exp_sw.size() > 0 && cur_tx == exp_sw[0], "sw tx packet");
          if (exp_sw.size() > 0) void'(exp_sw.pop_front());
          got_sw++;
        end else begin
          check(exp_tx.size() > 0 && cur_tx == exp_tx[0], "routed packet");
          if (exp_tx.size() > 0) void'(exp_tx.pop_front());
          got_tx++;
        end
      end
    end
    if (!rst && dma_rx_valid && dma_rx_ready) begin
      if (dma_rx_beat.sop) cur_dma = {};
      add_beat(cur_dma, dma_rx_beat);
      if (dma_rx_beat.eop) begin
        if (cur_dma.size() == 48) begin
          check(exp_uh.size() > 0 && cur_dma == exp_uh[0], "unified header");
          if (exp_uh.size() > 0) void'(exp_uh.pop_front());
          got_uh++;
        end else begin
          check(exp_copy.size() > 0 && cur_dma == exp_copy[0], "packet copy");
          if (exp_copy.size() > 0) void'(exp_copy.pop_front());
          got_copy++;
        end
      end
    end
  end

  // ------------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ config
  task automatic add_route(bit v6, bit [127:0] dst, int plen, bit [47:0] dmac, bit vset, bit [11:0] vid, bit strip = 0);
    route_m r;
    r.v6 = v6; r.dst = dst; r.plen = plen; r.dmac = dmac; r.vset = vset; r.vid = vid; r.strip = strip;
    @(negedge clk);
    fwd_cfg_wr = 1;
    fwd_cfg_idx = 5'(routes.size());
    fwd_cfg_route = '0;
    fwd_cfg_route.valid = 1; fwd_cfg_route.v6 = v6; fwd_cfg_route.prefix = dst;
    fwd_cfg_route.plen = 8'(plen); fwd_cfg_route.nh.dmac = dmac;
    fwd_cfg_route.nh.vlan_set = vset; fwd_cfg_route.nh.vlan_id = vid;
    fwd_cfg_route.nh.vlan_strip = strip;
    routes.push_back(r);
    @(negedge clk);
    fwd_cfg_wr = 0;
  endtask

  task automatic add_rule(int idx, bit v6, bit [127:0] dval, bit [127:0] dmask, bit pkt, bit uh, bit be);
    @(negedge clk);
    sel_cfg_wr = 1;
    sel_cfg_idx = 4'(idx);
    sel_cfg_rule = '0;
    sel_cfg_rule.valid = 1;
    sel_cfg_rule.value.v6 = v6; sel_cfg_rule.mask.v6 = 1;
    sel_cfg_rule.value.dst_ip = dval; sel_cfg_rule.mask.dst_ip = dmask;
    sel_cfg_rule.act.pkt_to_sw = pkt; sel_cfg_rule.act.uh_to_sw = uh; sel_cfg_rule.act.blk_en = be;
    @(negedge clk);
    sel_cfg_wr = 0;
  endtask

  task automatic add_block(bit v6, bit [127:0] ip);
    bit [128:0] k = {v6, ip};
    int bank = blocked.size() % 2;
    bit [31:0] h = ref_crc(k, bank ? 32'h1EDC6F41 : 32'h04C11DB7);
    int idx = int'(h[BLK_AW-1:0]);
    // keep to slots not used yet so that every key is found
    foreach (blocked[i]) if (blk_bank[i] == bank && blk_idx[i] == idx) return;
    @(negedge clk);
    blk_cfg_wr = 1; blk_cfg_bank = bank[0]; blk_cfg_addr = idx[BLK_AW-1:0];
    blk_cfg_entry.valid = 1; blk_cfg_entry.key = k;
    while (!blk_cfg_ready) @(negedge clk);
    blocked.push_back(k); blk_bank.push_back(bank); blk_idx.push_back(idx);
    exp_pk.push_back(0); exp_by.push_back(0);
    @(negedge clk);
    blk_cfg_wr = 0;
  endtask

  // ------------------------------------------------------------------ stimulus
  function automatic desc_t pick(int i);
    desc_t d = rand_desc();
    int c = rnd() % 10;
    if (!d.ip6) begin
      if (c < 4)      d.dst[31:24] = 8'd10;
      else if (c < 5) d.dst[31:16] = 16'h0A01;
      else if (c < 7) d.dst[31:24] = 8'd20;
      else if (c < 8) d.dst[31:24] = 8'd200;   // no route
      else            d.dst[31:24] = 8'(rnd() % 100);
      d.bad_csum = (rnd() % 20) == 0;
    end else if (c < 5) d.dst[127:112] = 16'h2001;
    if (rnd() % 20 == 0) d.ttl = 1;
    if (rnd() % 3 == 0 && blocked.size() > 0) begin
      int k = rnd() % blocked.size();
      if (blocked[k][128] == d.ip6) d.src = blocked[k][127:0];
    end
    return d;
  endfunction

  initial begin
    sel_cfg_wr = 0; fwd_cfg_wr = 0; blk_cfg_wr = 0; blk_st_rd = 0;
    sel_cfg_idx = 0; fwd_cfg_idx = 0; sel_cfg_rule = '0; fwd_cfg_route = '0;
    blk_cfg_bank = 0; blk_cfg_addr = 0; blk_cfg_entry = '0; blk_st_addr = 0;
    repeat (5) @(posedge clk);
    rst = 0;
    add_rule(0, 0, {96'd0, 32'h0A00_0000}, {96'd0, 32'hFF00_0000}, 0, 1, 1);
    add_rule(1, 1, '0, '0, 1, 0, 1);
    add_rule(2, 0, {96'd0, 32'h1400_0000}, {96'd0, 32'hFF00_0000}, 1, 0, 0);
    add_route(0, {96'd0, 32'h0000_0000}, 1, 48'hAA0000000001, 1, 12'h123);
    add_route(0, {96'd0, 32'h0A00_0000}, 8, 48'hAA0000000002, 0, 12'h000, 1);
    add_route(0, {96'd0, 32'h0A01_0000}, 16, 48'hAA0000000003, 1, 12'h456);
    add_route(1, '0, 0, 48'hAA0000000004, 0, 12'h000);
    add_route(1, {16'h2001, 112'd0}, 16, 48'hAA0000000005, 1, 12'h789);
    for (int i = 0; i < 12; i++) add_block(0, {96'd0, 32'(i < 6 ? 32'h0505_0000 + i : rnd())});
    for (int i = 0; i < 6; i++) add_block(1, {rnd(), rnd(), rnd(), rnd()});

    for (int i = 0; i < NPKT; i++) begin
      desc_t d;
      bytes_t b;
      d = pick(i);
      b = build(d);
      model(d, b);
      to_beats(b, rx_q);
      if (i % 10 == 0) begin
        desc_t s;
        bytes_t sb;
        s = rand_desc();
        s.nonip = 1;
        sb = build(s);
        sb[6] = 8'hEE;
        exp_sw.push_back(sb);
        to_beats(sb, sw_q);
      end
    end
    while (rx_q.size() != 0 || sw_q.size() != 0) @(posedge clk);
    repeat (200) @(posedge clk);

    // statistics
    foreach (blocked[i]) begin
      @(negedge clk);
      blk_st_rd = 1; blk_st_addr = {blk_bank[i][0], blk_idx[i][BLK_AW-1:0]};
      @(negedge clk);
      blk_st_rd = 0;
      repeat (3) @(negedge clk);   // data arrives with the memory read latency
      check(blk_st_valid && blk_st_pkts == 32'(exp_pk[i]) && blk_st_bytes == 48'(exp_by[i]),
            $sformatf("stats slot %0d: %0d/%0d vs %0d/%0d", i, blk_st_pkts, blk_st_bytes, exp_pk[i], exp_by[i]));
    end
    check(cnt_blocked == 32'(e_blocked), "blocked counter");
    check(cnt_invalid == 32'(e_invalid), "invalid counter");
    check(cnt_expired == 32'(e_expired), "expired counter");
    check(cnt_noroute == 32'(e_noroute), "no-route counter");
    check(exp_tx.size() == 0 && exp_sw.size() == 0 && exp_uh.size() == 0 && exp_copy.size() == 0,
          "all expected packets seen");

    // throughput: back-to-back 64-byte frames, every sink ready
    rx_gap_pct = 0; sw_gap_pct = 100; tx_stall_pct = 0; dma_stall_pct = 0;
    repeat (20) @(posedge clk);
    begin
      int t0, t1, start_tx;
      for (int i = 0; i < NTHR; i++) begin
        desc_t d;
        bytes_t b;
        d = rand_desc();
        d.ip6 = 0; d.nonip = 0; d.vlan = 0; d.proto = 17; d.ttl = 64; d.bad_csum = 0;
        d.src = {96'd0, 32'h0606_0000 + 32'(i)};
        d.dst = {96'd0, 8'd10, 24'(rnd())};
        d.paylen = 26;   // 14 + 20 + 4 + 26 = 64 bytes
        b = build(d);
        model(d, b);
        to_beats(b, rx_q);
      end
      start_tx = got_tx;
      @(posedge clk iff rx_valid);
      t0 = $time;
      while (got_tx < start_tx + NTHR) @(posedge clk);
      t1 = $time;
      $display("throughput phase: %0d frames in %0d cycles", NTHR, (t1 - t0) / 5);
      check((t1 - t0) / 5 <= NTHR + 40, "one 64-byte frame per clock");
    end
    repeat (50) @(posedge clk);
    check(exp_tx.size() == 0 && exp_uh.size() == 0, "throughput phase complete");

    $display("mechanisms: blocked=%0d invalid=%0d expired=%0d noroute=%0d uh=%0d copy=%0d vlan_rewrite=%0d vlan_insert=%0d vlan_strip=%0d stall=%0d tx_contention=%0d sw_tx=%0d",
             e_blocked, e_invalid, e_expired, e_noroute, n_uh, n_copy, n_vlanrw, n_vlanins, n_vlanstrip, n_stall, n_contend, got_sw);
    check(e_blocked > 0, "blocking happened");
    check(e_invalid > 0, "invalid drop happened");
    check(e_expired > 0, "TTL expiry happened");
    check(e_noroute > 0, "no-route drop happened");
    check(n_uh > 0 && got_uh == n_uh, "unified headers sent");
    check(n_copy > 0 && got_copy == n_copy, "packet copies sent");
    check(n_vlanrw > 0, "VLAN rewrite happened");
    check(n_vlanins > 0, "VLAN insertion happened");
    check(n_vlanstrip > 0, "VLAN removal happened");
    check(n_stall > 0, "input back-pressure happened");
    check(n_contend > 0, "TX multiplexer contention happened");
    check(got_sw > 0, "software TX packets sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
