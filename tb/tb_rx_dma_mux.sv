// Test of the software RX DMA multiplexer: random packets, some selected for a
// whole-packet copy, and a separate stream of one-beat UH records. The packet
// path must carry every packet unchanged; the DMA stream must carry exactly the
// selected packets, each contiguous and in order, and all UH records in order,
// never inside a packet copy. All outputs are stalled at random.
module tb_rx_dma_mux;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, uh_valid, uh_ready, dma_valid, dma_ready;
  bus_t in, out;
  beat_t uh_beat, dma_beat;
  int checks = 0, failures = 0, ncopy = 0, nuh = 0;

  rx_dma_mux dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bus_t in_q[$], exp_q[$];
  beat_t uh_q[$], exp_uh[$], exp_copy[$];
  bit in_pkt = 0;
  always @(negedge clk) begin
    in_valid  <= !rst && in_q.size() > 0 && (rnd() % 100) >= 25;
    in        <= in_q.size() > 0 ? in_q[0] : '0;
    uh_valid  <= !rst && uh_q.size() > 0 && (rnd() % 100) >= 50;
    uh_beat   <= uh_q.size() > 0 ? uh_q[0] : '0;
    out_ready <= (rnd() % 100) >= 25;
    dma_ready <= (rnd() % 100) >= 30;
  end
  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) void'(in_q.pop_front());
    if (!rst && uh_valid && uh_ready) void'(uh_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out == exp_q[0], "packet path");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (!rst && dma_valid && dma_ready) begin
      // a UH beat is a lone sop/eop beat with data tag 0xA5
      if (!in_pkt && dma_beat.sop && dma_beat.eop && dma_beat.data[DATA_W-1 -: 8] == 8'hA5) begin
        check(exp_uh.size() > 0 && dma_beat == exp_uh[0], "UH on DMA");
        if (exp_uh.size() > 0) void'(exp_uh.pop_front());
      end else begin
        check(exp_copy.size() > 0 && dma_beat == exp_copy[0] && (in_pkt != dma_beat.sop), "copy on DMA");
        if (exp_copy.size() > 0) void'(exp_copy.pop_front());
        in_pkt = !dma_beat.eop;
      end
    end
  end

  initial begin
    desc_t d;
    bytes_t b;
    meta_t m;
    beat_t u;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      d = rand_desc();
      d.dmac[47:40] = 8'h02;
      b = build(d);
      m = '0; m.hdr = exp_hdr(d);
      m.sel_hit = rnd() % 3 != 0;
      m.sel_act.pkt_to_sw = rnd() % 2;
      to_bus(b, m, in_q);
      to_bus(b, m, exp_q);
      if (m.sel_hit && m.sel_act.pkt_to_sw) begin to_beats(b, exp_copy); ncopy++; end
      if (rnd() % 2) begin
        u = '0; u.sop = 1; u.eop = 1; u.empty = EMPTY_W'(BYTES - 48);
        u.data = {8'hA5, 24'(i), rnd(), (DATA_W - 64)'(0)};
        uh_q.push_back(u); exp_uh.push_back(u); nuh++;
      end
    end
    while (exp_q.size() != 0 || exp_uh.size() != 0 || exp_copy.size() != 0) @(posedge clk);
    check(ncopy > 50 && nuh > 50, "both sources exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
