// Test of TTL Decrement: random IPv4/IPv6/non-IP packets with TTLs from 0 up,
// under random gaps and stalls. IP packets arriving with TTL 0 or 1 must be
// dropped and counted; others must leave with TTL/Hop Limit one lower and, for
// IPv4, a header checksum recomputed here from scratch. Non-IP packets pass.
module tb_ttl_dec;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  bus_t in, out;
  logic [31:0] cnt_expired;
  int checks = 0, failures = 0, e_exp = 0;

  ttl_dec dut (.*);

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
      check(exp_q.size() > 0 && out == exp_q[0], "decremented packet");
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
      d = rand_desc();
      d.ttl = (rnd() % 4 == 0) ? 8'(rnd() % 2) : 8'(rnd());
      b = build(d);
      m = '0; m.hdr = exp_hdr(d);
      to_bus(b, m, in_q);
      if (!d.nonip && d.ttl <= 1) e_exp++;
      else begin
        if (!d.nonip) begin
          int l3;
          l3 = d.vlan ? 18 : 14;
          if (!d.ip6) begin
            bit [15:0] ck;
            b[l3+8] = d.ttl - 1; b[l3+10] = 0; b[l3+11] = 0;
            ck = ~csum_bytes(b, l3, 20);
            b[l3+10] = ck[15:8]; b[l3+11] = ck[7:0];
          end else b[l3+7] = d.ttl - 1;
          m.hdr.ttl = d.ttl - 1;
        end
        to_bus(b, m, exp_q);
      end
    end
    while (exp_q.size() != 0 || in_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(cnt_expired == 32'(e_exp) && e_exp > 0, "expired counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
