// Test of the blocking filter with two external-memory models. Blocked source
// addresses (IPv4 and IPv6) are written into the slot given by the bank's hash,
// computed here with an independent CRC. Random traffic, partly from blocked
// sources and partly with the blocking action disabled, must leave in order,
// unchanged, with `blk_hit` and the slot set exactly for blocked sources whose
// rule enables blocking. Per-slot packet and byte counters are read back and
// compared, including runs of back-to-back packets from one source, which the
// filter must count although each read-modify-write of the external memory
// takes longer than the gap between them; statistics reads are also made during
// that traffic. One blocked source is removed by software while lookups of it
// are in flight: its packets must turn from blocked to passed exactly once and
// its slot must stay empty with zero counters. A final phase checks one beat
// per clock with no stalls.
module tb_blk_filter;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  bus_t in, out;
  logic mem_rd_en [2], mem_wr_en [2];
  logic [BLK_AW-1:0] mem_rd_addr [2], mem_wr_addr [2];
  blk_slot_t mem_rd_data [2], mem_wr_data [2];
  logic cfg_wr, cfg_ready, cfg_bank, st_rd, st_valid;
  logic [BLK_AW-1:0] cfg_addr;
  blk_entry_t cfg_entry;
  logic [BLK_AW:0] st_addr;
  logic [31:0] st_pkts;
  logic [47:0] st_bytes;
  int checks = 0, failures = 0, nhit = 0;
  int gap_pct = 30, stall_pct = 30;
  bit loose = 0;
  bit hit_seq[$];

  blk_filter #(.RD_LAT(4)) dut (.*);

  for (genvar b = 0; b < 2; b++) begin : g_mem
    qdr_model #(.AW(BLK_AW), .RD_LAT(4)) u_mem (
      .clk, .rd_en(mem_rd_en[b]), .rd_addr(mem_rd_addr[b]), .rd_data(mem_rd_data[b]),
      .wr_en(mem_wr_en[b]), .wr_addr(mem_wr_addr[b]), .wr_data(mem_wr_data[b])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [128:0] keys[$];
  int kbank[$], kidx[$];
  longint epk[$], eby[$];

  bus_t in_q[$], exp_q[$];
  always @(negedge clk) begin
    in_valid  <= !rst && in_q.size() > 0 && (rnd() % 100) >= gap_pct;
    in        <= in_q.size() > 0 ? in_q[0] : '0;
    out_ready <= (rnd() % 100) >= stall_pct;
  end
  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) void'(in_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      if (loose) begin
        // blocking result left open: everything else must match
        bus_t o, e;
        o = out; e = exp_q.size() > 0 ? exp_q[0] : '0;
        o.meta.blk_hit = 0; o.meta.blk_slot = '0; e.meta.blk_hit = 0; e.meta.blk_slot = '0;
        check(exp_q.size() > 0 && o == e, "packet during slot removal");
        if (out.beat.sop) hit_seq.push_back(out.meta.blk_hit);
      end else
      check(exp_q.size() > 0 && out == exp_q[0], "blocking result");
      if (out.beat.sop && out.meta.blk_hit) nhit++;
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  task automatic install(bit v6, bit [127:0] ip, int bank);
    bit [128:0] k = {v6, ip};
    bit [31:0] h = ref_crc(k, bank ? 32'h1EDC6F41 : 32'h04C11DB7);
    int idx = int'(h[BLK_AW-1:0]);
    foreach (keys[i]) if (kbank[i] == bank && kidx[i] == idx) return;
    @(negedge clk);
    cfg_wr = 1; cfg_bank = bank[0]; cfg_addr = idx[BLK_AW-1:0];
    cfg_entry.valid = 1; cfg_entry.key = k;
    while (!cfg_ready) @(negedge clk);
    @(negedge clk);
    cfg_wr = 0;
    keys.push_back(k); kbank.push_back(bank); kidx.push_back(idx);
    epk.push_back(0); eby.push_back(0);
  endtask

  task automatic add_pkt(desc_t d, bit en);
    bytes_t b;
    meta_t m;
    bus_t w[$];
    int ki = -1;
    b = build(d);
    m = '0; m.hdr = exp_hdr(d);
    m.sel_hit = en; m.sel_act.blk_en = en; m.sel_act.uh_to_sw = rnd() % 2;
    w = {};
    to_bus(b, m, w);
    foreach (w[j]) in_q.push_back(w[j]);
    if (en && !d.nonip) foreach (keys[i]) if (keys[i] == {d.ip6, d.src}) ki = i;
    if (ki >= 0) begin
      w[0].meta.blk_hit = 1;
      w[0].meta.blk_slot = {kbank[ki][0], kidx[ki][BLK_AW-1:0]};
      epk[ki] += 1; eby[ki] += frame_len(d);
    end
    foreach (w[j]) exp_q.push_back(w[j]);
  endtask

  task automatic check_stats();
    foreach (keys[i]) begin
      @(negedge clk);
      st_rd = 1; st_addr = {kbank[i][0], kidx[i][BLK_AW-1:0]};
      @(negedge clk);
      st_rd = 0;
      repeat (3) @(negedge clk);   // data arrives with the memory read latency
      check(st_valid && st_pkts == 32'(epk[i]) && st_bytes == 48'(eby[i]),
            $sformatf("stats %0d: %0d/%0d expected %0d/%0d", i, st_pkts, st_bytes, epk[i], eby[i]));
    end
  endtask

  initial begin
    desc_t d;
    cfg_wr = 0; cfg_bank = 0; cfg_addr = 0; cfg_entry = '0; st_rd = 0; st_addr = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 20; i++) install(0, {96'd0, rnd()}, i % 2);
    for (int i = 0; i < 10; i++) install(1, {rnd(), rnd(), rnd(), rnd()}, i % 2);
    for (int i = 0; i < 400; i++) begin
      d = rand_desc();
      if (rnd() % 2) begin
        int k;
        k = rnd() % keys.size();
        if (keys[k][128] == d.ip6) d.src = keys[k][127:0];
      end
      add_pkt(d, rnd() % 4 != 0);
    end
    while (exp_q.size() != 0) @(posedge clk);
    // back-to-back minimum frames from one blocked source, no gaps or stalls
    gap_pct = 0; stall_pct = 0;
    for (int i = 0; i < 40; i++) begin
      d = rand_desc();
      d.ip6 = 0; d.nonip = 0; d.vlan = 0; d.paylen = 26;
      d.src = keys[(i / 10) % 2 == 0 ? 0 : 2][127:0];
      add_pkt(d, 1);
    end
    // statistics reads in the middle of that traffic: each holds the input for
    // one clock and must answer exactly four clocks later
    fork
      while (exp_q.size() != 0) @(posedge clk);
      for (int n = 0; n < 4; n++) begin
        repeat (5) @(negedge clk);
        st_rd = 1; st_addr = {kbank[n][0], kidx[n][BLK_AW-1:0]};
        @(negedge clk);
        st_rd = 0;
        check(!st_valid, "no early statistics answer");
        repeat (3) @(negedge clk);
        check(st_valid, "statistics answer during traffic");
        @(negedge clk);
        check(!st_valid, "statistics answer lasts one clock");
      end
    join
    gap_pct = 30; stall_pct = 30;
    check_stats();
    check(nhit > 50, "blocked packets seen");

    // software removes a blocked source while lookups of it are in flight:
    // the packets must turn from hit to miss exactly once, and no lookup that
    // read the old entry may write it back
    gap_pct = 0; stall_pct = 0; loose = 1;
    for (int i = 0; i < 30; i++) begin
      d = rand_desc();
      d.ip6 = 0; d.nonip = 0; d.vlan = 0; d.paylen = 26;
      d.src = keys[4][127:0];
      add_pkt(d, 1);
    end
    @(posedge clk iff in_valid);
    repeat (12) @(negedge clk);
    cfg_wr = 1; cfg_bank = kbank[4][0]; cfg_addr = kidx[4][BLK_AW-1:0]; cfg_entry = '0;
    begin
      int wait_clk;
      wait_clk = 0;
      while (!cfg_ready) begin @(negedge clk); wait_clk++; end
      check(wait_clk <= 5, $sformatf("slot write waited %0d clocks under a flood of hits", wait_clk));
    end
    @(negedge clk);
    cfg_wr = 0;
    while (exp_q.size() != 0) @(posedge clk);
    loose = 0;
    begin
      int first_miss, bad;
      first_miss = -1; bad = 0;
      foreach (hit_seq[i]) begin
        if (!hit_seq[i] && first_miss < 0) first_miss = i;
        if (hit_seq[i] && first_miss >= 0) bad++;
      end
      check(first_miss > 0 && bad == 0,
            $sformatf("hits end at the removal (first miss %0d, hits after it %0d)", first_miss, bad));
    end
    keys[4] = '1;             // no longer in the table; never sent again
    epk[4] = 0; eby[4] = 0;   // removal cleared the counters
    for (int i = 0; i < 5; i++) begin
      d = rand_desc();
      d.ip6 = 0; d.nonip = 0; d.vlan = 0; d.paylen = 26;
      d.src = keys[4 + 1][127:0];
      add_pkt(d, 1);
      d.src = {96'd0, 32'(rnd())};
      add_pkt(d, 1);
    end
    while (exp_q.size() != 0) @(posedge clk);
    gap_pct = 30; stall_pct = 30;
    check_stats();

    // rate: 200 one-beat packets, no gaps, no stalls
    gap_pct = 0; stall_pct = 0;
    repeat (4) @(posedge clk);
    begin
      int t0, t1;
      for (int i = 0; i < 200; i++) begin
        d = rand_desc();
        d.ip6 = 0; d.nonip = 0; d.vlan = 0; d.paylen = 26;
        add_pkt(d, 1);
      end
      @(posedge clk iff in_valid);
      t0 = $time;
      while (exp_q.size() != 0) @(posedge clk);
      t1 = $time;
      $display("rate phase: 200 beats in %0d cycles", (t1 - t0) / 5);
      check((t1 - t0) / 5 <= 200 + 4 + 6, "one beat per clock");
    end
    check_stats();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
