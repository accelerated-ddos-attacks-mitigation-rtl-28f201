// Test of the MAC & VLAN editor: random packets with random next-hop results.
// Packets with a next hop must leave with the next hop's destination MAC and,
// when asked, the new VLAN ID: rewritten in an existing tag (priority bits
// kept) or in a tag inserted into an untagged packet, which shifts the rest of
// the packet by 4 bytes; or, when untagged output is asked for, without the
// tag of a tagged packet. All other bytes and packets must be unchanged, and the
// beat framing must match the new length. Payload lengths cover every tail
// case, including packets that need one beat more after the insertion.
module tb_mac_vlan_edit;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  bus_t in;
  beat_t out;
  int checks = 0, failures = 0, nmac = 0, nvlan = 0, nins = 0, nextra = 0, nstrip = 0, nshrink = 0;

  mac_vlan_edit dut (.*);

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

  bus_t in_q[$];
  beat_t exp_q[$];
  always @(negedge clk) begin
    in_valid  <= !rst && in_q.size() > 0 && (rnd() % 100) >= 25;
    in        <= in_q.size() > 0 ? in_q[0] : '0;
    out_ready <= (rnd() % 100) >= 25;
  end
  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) void'(in_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out == exp_q[0], "edited beat");
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
      if (i % 4 == 0) d.paylen = (i / 4) % 140;
      b = build(d);
      m = '0; m.hdr = exp_hdr(d);
      m.nh_hit = rnd() % 4 != 0;
      m.nh.dmac = {rnd(), rnd()};
      m.nh.vlan_set = rnd() % 2;
      m.nh.vlan_strip = rnd() % 2;
      m.nh.vlan_id = 12'(rnd());
      to_bus(b, m, in_q);
      if (m.nh_hit) begin
        for (int k = 0; k < 6; k++) b[k] = m.nh.dmac[47-8*k -: 8];
        nmac++;
        if (m.nh.vlan_set && d.vlan) begin
          b[14][3:0] = m.nh.vlan_id[11:8];
          b[15] = m.nh.vlan_id[7:0];
          nvlan++;
        end else if (m.nh.vlan_set) begin
          b.insert(12, 8'h81); b.insert(13, 8'h00);
          b.insert(14, {4'h0, m.nh.vlan_id[11:8]}); b.insert(15, m.nh.vlan_id[7:0]);
          nins++;
          if (b.size() % BYTES > 0 && b.size() % BYTES <= 4) nextra++;
        end else if (m.nh.vlan_strip && d.vlan) begin
          if (b.size() % BYTES > 0 && b.size() % BYTES <= 4) nshrink++;
          repeat (4) b.delete(12);
          nstrip++;
        end
      end
      to_beats(b, exp_q);
    end
    while (exp_q.size() != 0 || in_q.size() != 0) @(posedge clk);
    check(nmac > 0 && nvlan > 0 && nins > 0 && nextra > 0 && nstrip > 0 && nshrink > 0, "edits exercised");
    $display("mac=%0d vlan_rewrite=%0d vlan_insert=%0d extra_beat=%0d vlan_strip=%0d shorter=%0d", nmac, nvlan, nins, nextra, nstrip, nshrink);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
