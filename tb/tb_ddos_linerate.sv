// Line-rate test of the whole data plane at its default sizes: for Ethernet
// frame lengths from 64 to 1518 bytes, back-to-back frames are offered with
// every sink ready, a quarter of them from blocked sources, all selected for
// Unified Headers and blocking. For each length the test measures the clocks the
// pipeline needs to accept the frames and checks it against the time the same
// frames take on a 100 Gb/s link (frame + 20 bytes of preamble and inter-frame
// gap) at a 200 MHz clock. It also checks that every unblocked frame leaves
// on the TX side and every frame produces a UH.
module tb_ddos_linerate;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  localparam int NF = 100;   // frames per length

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  beat_t rx_q[$];
  int n_tx = 0, n_uh = 0, n_acc = 0, n_stall = 0;
  always @(negedge clk) begin
    rx_valid <= !rst && rx_q.size() > 0;
    rx_beat  <= rx_q.size() > 0 ? rx_q[0] : '0;
  end
  always @(posedge clk) begin
    if (!rst && rx_valid && rx_ready) begin void'(rx_q.pop_front()); n_acc++; end
    if (!rst && rx_valid && !rx_ready) n_stall++;
    if (!rst && tx_valid && tx_ready && tx_beat.eop) n_tx++;
    if (!rst && dma_rx_valid && dma_rx_ready && dma_rx_beat.eop) n_uh++;
  end

  int lens[] = '{64, 65, 96, 104, 128, 129, 192, 256, 257, 384, 512, 640, 1024, 1025, 1280, 1500, 1518};

  initial begin
    desc_t d;
    bytes_t b;
    bit [127:0] blocked_ip;
    bit [31:0] h0;
    tx_ready = 1; dma_rx_ready = 1; dma_tx_valid = 0; dma_tx_beat = '0;
    sel_cfg_wr = 0; fwd_cfg_wr = 0; blk_cfg_wr = 0; blk_st_rd = 0;
    sel_cfg_idx = 0; fwd_cfg_idx = 0; sel_cfg_rule = '0; fwd_cfg_route = '0;
    blk_cfg_bank = 0; blk_cfg_addr = 0; blk_cfg_entry = '0; blk_st_addr = 0;
    repeat (5) @(posedge clk);
    rst = 0;
    @(negedge clk);
    sel_cfg_wr = 1;
    sel_cfg_rule.valid = 1; sel_cfg_rule.mask.v6 = 1;
    sel_cfg_rule.act.uh_to_sw = 1; sel_cfg_rule.act.blk_en = 1;
    fwd_cfg_wr = 1;
    fwd_cfg_route.valid = 1; fwd_cfg_route.plen = 0; fwd_cfg_route.nh.dmac = 48'hAA0000000001;
    blocked_ip = {96'd0, 32'hC633_6401};
    blk_cfg_wr = 1; blk_cfg_bank = 0;
    h0 = ref_crc({1'b0, blocked_ip}, 32'h04C11DB7);
    blk_cfg_addr = h0[BLK_AW-1:0];
    blk_cfg_entry.valid = 1; blk_cfg_entry.key = {1'b0, blocked_ip};
    @(negedge clk);
    sel_cfg_wr = 0; fwd_cfg_wr = 0; blk_cfg_wr = 0;
    repeat (5) @(negedge clk);

    foreach (lens[li]) begin
      int L, beats, t0, t1, cyc, tx0, uh0, blk0, nblk;
      real line_ns, bus_ns;
      L = lens[li];
      beats = 0; nblk = 0;
      tx0 = n_tx; uh0 = n_uh; blk0 = int'(cnt_blocked);
      for (int i = 0; i < NF; i++) begin
        d = rand_desc();
        d.ip6 = 0; d.nonip = 0; d.vlan = 0; d.proto = 17; d.ttl = 64; d.bad_csum = 0;
        d.paylen = L - 14 - 20 - 4;
        if (i % 4 == 0) begin d.src = blocked_ip; nblk++; end
        b = build(d);
        beats += (b.size() + BYTES - 1) / BYTES;
        to_beats(b, rx_q);
      end
      @(posedge clk iff (rx_valid && rx_ready));
      t0 = $time;
      n_acc = 1;
      while (n_acc < beats) @(posedge clk);
      t1 = $time;
      cyc = (t1 - t0) / 5 + 1;
      line_ns = real'(NF) * real'(L + 20) * 8.0 / 100.0;
      bus_ns  = real'(cyc) * 5.0;
      $display("frame %4d B: %0d beats accepted in %0d cycles (%0.0f ns), 100 Gb/s line needs %0.0f ns",
               L, beats, cyc, bus_ns, line_ns);
      check(cyc == beats, $sformatf("one beat per clock at %0d B", L));
      check(bus_ns <= line_ns, $sformatf("line rate at %0d B", L));
      repeat (60) @(posedge clk);
      check(n_tx - tx0 == NF - nblk, $sformatf("unblocked frames forwarded at %0d B", L));
      check(n_uh - uh0 == NF, $sformatf("UH per frame at %0d B", L));
      check(int'(cnt_blocked) - blk0 == nblk, $sformatf("blocked frames dropped at %0d B", L));
    end
    check(n_stall == 0, "input never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
