// Test of the output multiplexer: two sources of multi-beat packets (pipeline
// and software) with random gaps and a randomly stalled output. Every packet of
// each source must come out whole (no interleaving), unchanged and in its
// source's order; both sources must win arbitration while the other waits.
module tb_tx_mux;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic a_valid, a_ready, b_valid, b_ready, out_valid, out_ready;
  beat_t a_beat, b_beat, out;
  int checks = 0, failures = 0, na = 0, nb = 0, contend = 0;

  tx_mux dut (.*);

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

  beat_t a_q[$], b_q[$], ea[$], eb[$];
  int cur = -1;   // source of the packet being output
  always @(negedge clk) begin
    a_valid   <= !rst && a_q.size() > 0 && (rnd() % 100) >= 20;
    a_beat    <= a_q.size() > 0 ? a_q[0] : '0;
    b_valid   <= !rst && b_q.size() > 0 && (rnd() % 100) >= 40;
    b_beat    <= b_q.size() > 0 ? b_q[0] : '0;
    out_ready <= (rnd() % 100) >= 25;
  end
  always @(posedge clk) begin
    if (!rst && a_valid && b_valid) contend++;
    if (!rst && a_valid && a_ready) void'(a_q.pop_front());
    if (!rst && b_valid && b_ready) void'(b_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      int src;
      src = (cur >= 0) ? cur : (out.data[DATA_W-1 -: 8] == 8'hBB);
      if (src == 1) begin
        check(eb.size() > 0 && out == eb[0] && out.data[DATA_W-1 -: 8] == 8'hBB, "software packet beat");
        if (eb.size() > 0) void'(eb.pop_front());
        if (out.eop) nb++;
      end else begin
        check(ea.size() > 0 && out == ea[0] && out.data[DATA_W-1 -: 8] == 8'hAA, "pipeline packet beat");
        if (ea.size() > 0) void'(ea.pop_front());
        if (out.eop) na++;
      end
      cur = out.eop ? -1 : src;
    end
  end

  initial begin
    desc_t d;
    bytes_t p;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      d = rand_desc();
      p = build(d);
      // tag every byte-0 of every beat with the source
      for (int k = 0; k < p.size(); k += BYTES) p[k] = 8'hAA;
      to_beats(p, a_q); to_beats(p, ea);
      if (i % 2 == 0) begin
        d = rand_desc();
        p = build(d);
        for (int k = 0; k < p.size(); k += BYTES) p[k] = 8'hBB;
        to_beats(p, b_q); to_beats(p, eb);
      end
    end
    while (ea.size() != 0 || eb.size() != 0) @(posedge clk);
    check(na == 300 && nb == 150, "all packets delivered");
    check(contend > 0, "both sources competed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
