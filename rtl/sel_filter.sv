// Selection Filter.
//
// A ternary match-action table over the flow fields found by the header field
// extractor: source and destination address, IP version, protocol and ports.
// Each rule holds a value, a mask (1 = bit must match) and its actions:
// `pkt_to_sw` (copy the packet to software), `uh_to_sw` (send a Unified Header
// to software) and `blk_en` (the traffic matched by this rule is protected: the
// blocking filter is applied to it). The lowest-numbered matching valid rule
// wins. Non-IP packets never match.
//
// The document gives the ternary match and the choice of "in which form and which
// packets" go to software; the table size, rule format, the priority order and
// the `blk_en` action are this design's choices.
//
// Software writes rules through `cfg_*` (one rule per clock). All rules are
// invalid after reset. One register stage, one beat per clock, latency 1.
module sel_filter
  import ddos_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  bus_t                       in,
  output logic                       out_valid,
  input  logic                       out_ready,
  output bus_t                       out,
  input  logic                       cfg_wr,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  sel_rule_t                  cfg_rule
);

  sel_rule_t rules [ENTRIES];
  sel_key_t  key;
  logic               hit;
  logic [SEL_IDW-1:0] hit_idx;
  sel_act_t           hit_act;

  always_comb begin
    key.v6       = in.meta.hdr.is_ip6;
    key.src_ip   = in.meta.hdr.src_ip;
    key.dst_ip   = in.meta.hdr.dst_ip;
    key.proto    = in.meta.hdr.proto;
    key.src_port = in.meta.hdr.src_port;
    key.dst_port = in.meta.hdr.dst_port;
    hit     = 1'b0;
    hit_idx = '0;
    hit_act = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (rules[i].valid && ((key ^ rules[i].value) & rules[i].mask) == '0) begin
        hit     = 1'b1;
        hit_idx = SEL_IDW'(i);
        hit_act = rules[i].act;
      end
    end
    if (!(in.meta.hdr.is_ip4 || in.meta.hdr.is_ip6)) hit = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) rules[i] <= '0;
    end else if (cfg_wr) begin
      rules[cfg_idx] <= cfg_rule;
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      out       <= in;
      if (in.beat.sop) begin
        out.meta.sel_hit  <= hit;
        out.meta.sel_rule <= hit ? hit_idx : '0;
        out.meta.sel_act  <= hit ? hit_act : '0;
      end
    end
  end

endmodule
