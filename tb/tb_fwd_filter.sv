// Test of the forwarding filter: nested IPv4 and IPv6 prefixes of random
// lengths, including host routes and, in a later phase, default routes.
// Destinations are drawn mostly from inside the prefixes. The expected next hop
// is found by a reference longest-prefix search; IP packets with no route must
// be dropped and counted; non-IP packets pass with no next hop.
module tb_fwd_filter;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  localparam int N = 32;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, cfg_wr;
  bus_t in, out;
  logic [4:0] cfg_idx;
  fwd_route_t cfg_route;
  logic [31:0] cnt_noroute;
  int checks = 0, failures = 0, e_nr = 0, nhits = 0;

  fwd_filter #(.ENTRIES(N)) dut (.*);

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

  fwd_route_t rt [N];

  function automatic int ref_lpm(bit v6, bit [127:0] dst);
    int best = -1, bl = -1;
    for (int i = 0; i < N; i++) begin
      int w = v6 ? 128 : 32;
      bit ok = rt[i].valid && rt[i].v6 == v6;
      for (int k = 0; k < int'(rt[i].plen) && ok; k++)
        if (dst[w-1-k] != rt[i].prefix[w-1-k]) ok = 0;
      if (ok && int'(rt[i].plen) > bl) begin best = i; bl = rt[i].plen; end
    end
    return best;
  endfunction

  bus_t in_q[$], exp_q[$];
  always @(negedge clk) begin
    in_valid  <= !rst && in_q.size() > 0 && (rnd() % 100) >= 25;
    in        <= in_q.size() > 0 ? in_q[0] : '0;
    out_ready <= (rnd() % 100) >= 25;
  end
  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) void'(in_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out == exp_q[0], "forwarding result");
      if (out.beat.sop && out.meta.nh_hit) nhits++;
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  task automatic write_route(int i, fwd_route_t r);
    @(negedge clk);
    cfg_wr = 1; cfg_idx = 5'(i); cfg_route = r;
    @(negedge clk);
    cfg_wr = 0;
    rt[i] = r;
  endtask

  task automatic send(int n);
    desc_t d;
    bytes_t b;
    meta_t m;
    bus_t w[$];
    int r;
    for (int k = 0; k < n; k++) begin
      d = rand_desc();
      if (!d.nonip && rnd() % 4 != 0) begin
        int j;
        j = rnd() % N;
        if (rt[j].v6 == d.ip6) begin
          bit [127:0] p;
          p = d.ip6 ? rt[j].prefix : {96'd0, rt[j].prefix[31:0]};
          for (int q = 0; q < int'(rt[j].plen); q++) d.dst[(d.ip6 ? 127 : 31) - q] = p[(d.ip6 ? 127 : 31) - q];
        end
      end
      b = build(d);
      m = '0; m.hdr = exp_hdr(d); m.sel_hit = rnd() % 2;
      w = {};
      to_bus(b, m, w);
      foreach (w[j]) in_q.push_back(w[j]);
      r = d.nonip ? -1 : ref_lpm(d.ip6, d.dst);
      if (!d.nonip && r < 0) e_nr++;
      else begin
        if (r >= 0) begin w[0].meta.nh_hit = 1; w[0].meta.nh = rt[r].nh; end
        foreach (w[j]) exp_q.push_back(w[j]);
      end
    end
    while (exp_q.size() != 0 || in_q.size() != 0) @(posedge clk);
  endtask

  initial begin
    fwd_route_t r;
    cfg_wr = 0; cfg_idx = 0; cfg_route = '0;
    for (int i = 0; i < N; i++) rt[i] = '0;
    repeat (4) @(posedge clk);
    rst = 0;
    send(20);                                       // empty table: all IP dropped
    for (int i = 0; i < N; i++) begin
      r = '0;
      r.valid = 1;
      r.v6 = i % 3 == 0;
      r.plen = r.v6 ? 8'(8 + rnd() % 121) : 8'(4 + rnd() % 29);
      r.prefix = r.v6 ? {rnd(), rnd(), rnd(), rnd()} : {96'd0, rnd()};
      if (i >= 4 && i % 4 == 1) begin               // nest inside an earlier route
        r.v6 = rt[i-4].v6;
        r.prefix = rt[i-4].prefix;
        r.prefix[r.v6 ? 100 : 10] ^= 1'b1;
        r.plen = r.v6 ? 8'(102 + rnd() % 27) : 8'(12 + rnd() % 21);
        if (rnd() % 2) r.prefix[r.v6 ? 100 : 10] ^= 1'b1;
        r.plen = (r.plen > rt[i-4].plen) ? r.plen : rt[i-4].plen + 8'd1;
      end
      r.nh.dmac = {16'hAA00, rnd()};
      r.nh.vlan_set = rnd() % 2;
      r.nh.vlan_id = 12'(rnd());
      write_route(i, r);
    end
    send(300);
    r = '0; r.valid = 1; r.v6 = 0; r.plen = 0; r.nh.dmac = 48'hDEF4; write_route(0, r);
    r.v6 = 1; r.nh.dmac = 48'hDEF6; write_route(3, r);
    send(300);
    repeat (5) @(posedge clk);
    check(cnt_noroute == 32'(e_nr) && e_nr > 0, "no-route counter");
    check(nhits > 200, "routes hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
