// Test of Packet Check & Drop: random packets, some marked as blocked, some
// IPv4 packets with a corrupted header checksum, an IHL below 5 or a total
// length shorter than the header. Exactly the good, unblocked packets must come
// out, unchanged and in order, and both drop counters must match.
module tb_pkt_check_drop;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  bus_t in, out;
  logic [31:0] cnt_blocked, cnt_invalid;
  int checks = 0, failures = 0, e_blk = 0, e_inv = 0;

  pkt_check_drop dut (.*);

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
  always @(negedge clk) begin
    in_valid  <= !rst && in_q.size() > 0 && (rnd() % 100) >= 25;
    in        <= in_q.size() > 0 ? in_q[0] : '0;
    out_ready <= (rnd() % 100) >= 25;
  end
  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) void'(in_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out == exp_q[0], "surviving packet");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    desc_t d;
    bytes_t b;
    meta_t m;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      int kind;
      bit bad;
      kind = rnd() % 10;
      bad = 0;
      d = rand_desc();
      d.bad_csum = !d.ip6 && kind == 0;
      b = build(d);
      m = '0; m.hdr = exp_hdr(d);
      m.blk_hit = !d.nonip && kind == 1;
      if (!d.ip6 && !d.nonip && kind == 2) begin       // IHL 4, checksum fixed up
        int l3;
        bit [15:0] ck;
        l3 = d.vlan ? 18 : 14;
        b[l3] = 8'h44; b[l3+10] = 0; b[l3+11] = 0;
        ck = ~csum_bytes(b, l3, 16);
        b[l3+10] = ck[15:8]; b[l3+11] = ck[7:0];
        m.hdr.ihl = 4;
        bad = 1;
      end
      if (!d.ip6 && !d.nonip && kind == 3) begin       // total length 16 < 20
        int l3;
        bit [15:0] ck;
        l3 = d.vlan ? 18 : 14;
        b[l3+2] = 0; b[l3+3] = 16; b[l3+10] = 0; b[l3+11] = 0;
        ck = ~csum_bytes(b, l3, 20);
        b[l3+10] = ck[15:8]; b[l3+11] = ck[7:0];
        m.hdr.ip_len = 16;
        bad = 1;
      end
      to_bus(b, m, in_q);
      if (m.blk_hit) e_blk++;
      else if (!d.nonip && !d.ip6 && (d.bad_csum || bad)) e_inv++;
      else to_bus(b, m, exp_q);
    end
    while (exp_q.size() != 0 || in_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(cnt_blocked == 32'(e_blk) && e_blk > 0, "blocked drop counter");
    check(cnt_invalid == 32'(e_inv) && e_inv > 0, "invalid drop counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
