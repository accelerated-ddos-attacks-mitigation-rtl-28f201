// Test of the selection filter: 16 ternary rules (prefix masks on addresses,
// exact protocol or port matches, catch-all, one invalid rule) programmed and
// later partly rewritten, random traffic partly derived from the rules. The
// expected rule is found by a field-by-field reference match, lowest index
// first; beats and other metadata must pass unchanged.
module tb_sel_filter;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  localparam int N = 16;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, cfg_wr;
  bus_t in, out;
  logic [3:0] cfg_idx;
  sel_rule_t cfg_rule;
  int checks = 0, failures = 0, hits = 0;
  int gap_pct = 30, stall_pct = 30;

  sel_filter #(.ENTRIES(N)) dut (.*);

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

  sel_rule_t rules [N];
  desc_t     tmpl  [N];

  function automatic bit fmatch(sel_rule_t r, hdr_t h);
    if (!r.valid || !(h.is_ip4 || h.is_ip6)) return 0;
    if (((r.value.v6 ^ h.is_ip6) & r.mask.v6) != 0) return 0;
    if (((r.value.src_ip ^ h.src_ip) & r.mask.src_ip) != 0) return 0;
    if (((r.value.dst_ip ^ h.dst_ip) & r.mask.dst_ip) != 0) return 0;
    if (((r.value.proto ^ h.proto) & r.mask.proto) != 0) return 0;
    if (((r.value.src_port ^ h.src_port) & r.mask.src_port) != 0) return 0;
    if (((r.value.dst_port ^ h.dst_port) & r.mask.dst_port) != 0) return 0;
    return 1;
  endfunction

  function automatic bus_t expect_word(bus_t w);
    bus_t e = w;
    if (w.beat.sop) begin
      for (int i = 0; i < N; i++)
        if (fmatch(rules[i], w.meta.hdr)) begin
          e.meta.sel_hit = 1; e.meta.sel_rule = 8'(i); e.meta.sel_act = rules[i].act;
          return e;
        end
    end
    return e;
  endfunction

  bus_t in_q[$], exp_q[$];
  always @(negedge clk) begin
    in_valid  <= !rst && in_q.size() > 0 && (rnd() % 100) >= gap_pct;
    in        <= in_q.size() > 0 ? in_q[0] : '0;
    out_ready <= (rnd() % 100) >= stall_pct;
  end
  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) void'(in_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out == exp_q[0], "selection result");
      if (out.beat.sop && out.meta.sel_hit) hits++;
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  task automatic write_rule(int i, sel_rule_t r);
    @(negedge clk);
    cfg_wr = 1; cfg_idx = 4'(i); cfg_rule = r;
    @(negedge clk);
    cfg_wr = 0;
    rules[i] = r;
  endtask

  function automatic sel_rule_t make_rule(int i, desc_t t);
    sel_rule_t r = '0;
    r.valid = (i != 7);
    r.value.v6 = t.ip6; r.mask.v6 = 1;
    r.value.src_ip = t.src; r.value.dst_ip = t.dst;
    r.value.proto = t.proto; r.value.src_port = t.sport; r.value.dst_port = t.dport;
    case (i % 4)
      0: r.mask.dst_ip = t.ip6 ? {16'hFFFF, 112'd0} : {96'd0, 32'hFF00_0000};
      1: begin r.mask.src_ip = t.ip6 ? {32'hFFFF_FFFF, 96'd0} : {96'd0, 32'hFFFF_0000}; r.mask.proto = '1; end
      2: begin r.mask.dst_port = '1; r.mask.proto = '1; end
      default: begin r.mask.dst_ip = '1; r.mask.src_ip = '1; end
    endcase
    if (i == 15) r.mask = '0;          // catch-all
    r.act = 3'(rnd());
    return r;
  endfunction

  task automatic send(int n);
    desc_t d;
    bytes_t b;
    meta_t m;
    bus_t w[$];
    for (int k = 0; k < n; k++) begin
      d = rand_desc();
      if (rnd() % 2) begin
        desc_t t = tmpl[rnd() % (N - 1)];
        d.ip6 = t.ip6; d.nonip = 0;
        d.src = t.src; d.dst = t.dst; d.proto = t.proto; d.sport = t.sport; d.dport = t.dport;
        if (rnd() % 2) d.dst[7:0] = 8'(rnd());
      end
      b = build(d);
      m = '0; m.hdr = exp_hdr(d); m.blk_hit = rnd() % 2;
      w = {};
      to_bus(b, m, w);
      foreach (w[j]) begin in_q.push_back(w[j]); exp_q.push_back(expect_word(w[j])); end
    end
    while (exp_q.size() != 0) @(posedge clk);
  endtask

  initial begin
    cfg_wr = 0; cfg_idx = 0; cfg_rule = '0;
    for (int i = 0; i < N; i++) rules[i] = '0;
    repeat (4) @(posedge clk);
    rst = 0;
    send(20);                                   // empty table: nothing matches
    for (int i = 0; i < N; i++) begin tmpl[i] = rand_desc(); tmpl[i].nonip = 0; write_rule(i, make_rule(i, tmpl[i])); end
    send(300);
    write_rule(15, '0);                         // remove the catch-all
    for (int i = 0; i < 4; i++) write_rule(i, make_rule(i + 1, tmpl[i]));
    send(300);
    check(hits > 100, "rules matched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
