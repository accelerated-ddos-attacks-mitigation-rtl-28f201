// Test of the Unified Header generator: random packets with random selection
// results; the packet stream must pass unchanged and in order, and exactly the
// packets whose rule asks for a UH must produce one, whose 48 bytes are
// assembled here field by field from the packet descriptor. Both outputs are
// stalled at random so that a pending UH holds the next UH-carrying packet.
module tb_uh_gen;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, uh_valid, uh_ready;
  bus_t in, out;
  beat_t uh_beat;
  int checks = 0, failures = 0, nuh = 0, nwait = 0;

  uh_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bus_t in_q[$], exp_q[$];
  bytes_t uh_q[$];
  always @(negedge clk) begin
    in_valid  <= !rst && in_q.size() > 0 && (rnd() % 100) >= 20;
    in        <= in_q.size() > 0 ? in_q[0] : '0;
    out_ready <= (rnd() % 100) >= 20;
    uh_ready  <= (rnd() % 100) >= 60;
  end
  always @(posedge clk) begin
    if (!rst && in_valid && !in_ready && out_ready) nwait++;
    if (!rst && in_valid && in_ready) void'(in_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out == exp_q[0], "packet passes unchanged");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (!rst && uh_valid && uh_ready) begin
      bytes_t u;
      u = {};
      add_beat(u, uh_beat);
      check(uh_beat.sop && uh_beat.eop && uh_q.size() > 0 && u == uh_q[0], "unified header");
      if (uh_q.size() > 0) void'(uh_q.pop_front());
      nuh++;
    end
  end

  function automatic bytes_t ref_uh(desc_t d, int rule, bit blk);
    bytes_t u;
    bit l4 = !d.nonip && (d.proto == 6 || d.proto == 17);
    bit [15:0] len = d.nonip ? 16'd0 : 16'((d.ip6 ? 40 : 20) + 4 + d.paylen);
    bit [127:0] s = d.nonip ? '0 : d.src, t = d.nonip ? '0 : d.dst;
    for (int i = 15; i >= 0; i--) u.push_back(s[8*i +: 8]);
    for (int i = 15; i >= 0; i--) u.push_back(t[8*i +: 8]);
    u.push_back(l4 ? d.sport[15:8] : 0); u.push_back(l4 ? d.sport[7:0] : 0);
    u.push_back(l4 ? d.dport[15:8] : 0); u.push_back(l4 ? d.dport[7:0] : 0);
    u.push_back(d.nonip ? 0 : d.proto);
    u.push_back(len[15:8]); u.push_back(len[7:0]);
    u.push_back(d.nonip ? 0 : d.ttl);
    u.push_back(8'(rule));
    begin
      bit [11:0] v = d.vlan ? d.vid : 12'd0;
      u.push_back(v[11:4]);
      u.push_back({v[3:0], d.ip6 && !d.nonip, d.vlan, l4, blk});
    end
    for (int i = 0; i < 5; i++) u.push_back(0);
    return u;
  endfunction

  initial begin
    desc_t d;
    bytes_t b;
    meta_t m;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      d = rand_desc();
      b = build(d);
      m = '0; m.hdr = exp_hdr(d);
      m.sel_hit = rnd() % 4 != 0;
      m.sel_rule = m.sel_hit ? 8'(rnd() % 16) : 8'd0;
      m.sel_act = m.sel_hit ? 3'(rnd()) : 3'd0;
      m.blk_hit = rnd() % 3 == 0;
      to_bus(b, m, in_q);
      to_bus(b, m, exp_q);
      if (m.sel_hit && m.sel_act.uh_to_sw) uh_q.push_back(ref_uh(d, m.sel_rule, m.blk_hit));
    end
    while (exp_q.size() != 0 || uh_q.size() != 0) @(posedge clk);
    check(nuh > 50, "UHs produced");
    check(nwait > 0, "packet waited for a pending UH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
