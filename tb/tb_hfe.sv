// Test of the header field extractor: random IPv4/IPv6/non-IP packets, with and
// without a VLAN tag, TCP/UDP/ICMP, with random input gaps and output stalls.
// Every output beat must equal the input beat, and the first beat must carry
// the header fields predicted from the packet descriptor. Also checks the
// one-cycle latency with no stalls.
module tb_hfe;
  timeunit 1ns;
  timeprecision 1ps;
  import ddos_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  beat_t in_beat;
  bus_t out;
  int checks = 0, failures = 0;
  int gap_pct = 30, stall_pct = 30;

  hfe dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  beat_t in_q[$];
  bus_t exp_q[$];
  always @(negedge clk) begin
    in_valid  <= !rst && in_q.size() > 0 && (rnd() % 100) >= gap_pct;
    in_beat   <= in_q.size() > 0 ? in_q[0] : '0;
    out_ready <= (rnd() % 100) >= stall_pct;
  end
  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) void'(in_q.pop_front());
    if (!rst && out_valid && out_ready) begin
      check(exp_q.size() > 0 && out == exp_q[0], "hfe output word");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    desc_t d;
    bytes_t b;
    meta_t m;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      d = rand_desc();
      b = build(d);
      m = '0;
      m.hdr = exp_hdr(d);
      to_beats(b, in_q);
      to_bus(b, m, exp_q);
    end
    while (exp_q.size() != 0) @(posedge clk);
    // latency: with no gaps or stalls a beat offered at one edge appears after it
    gap_pct = 0; stall_pct = 0;
    repeat (3) @(posedge clk);
    d = rand_desc(); b = build(d); m = '0; m.hdr = exp_hdr(d);
    to_beats(b, in_q); to_bus(b, m, exp_q);
    @(posedge clk iff (in_valid && in_ready));
    @(posedge clk);
    check(out_valid && out.beat.sop, "latency of one cycle");
    while (exp_q.size() != 0) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
