// Packet Check & Drop.
//
// Removes from the stream, as whole packets, those the blocking filter marked
// (`blk_hit`) and invalid IPv4 packets: version 4 with an IHL below 5, an IP
// total length shorter than the header, or a header checksum that does not sum
// to 0xFFFF. The checksum is summed over the whole IPv4 header, which always
// lies within the first 128-byte beat. Two counters report how many packets
// were dropped for each reason.
//
// From the document: dropping the packets the blocking filter marked and
// checking for invalid packets "(invalid checksums, etc.)". The exact set of
// checks is this design's choice.
//
// Interface: valid/ready streams; one register stage, one beat per clock. The
// decision is taken on the first beat and applied to all beats of the packet.
module pkt_check_drop
  import ddos_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  bus_t        in,
  output logic        out_valid,
  input  logic        out_ready,
  output bus_t        out,
  output logic [31:0] cnt_blocked,
  output logic [31:0] cnt_invalid
);

  logic        bad_hdr, drop_sop, drop_now, drop_q;
  logic [15:0] csum;

  always_comb begin
    logic [DATA_W-1:0] l3;
    l3      = in.beat.data << (8 * in.meta.hdr.l3_off);
    csum    = 16'd0;
    for (int w = 0; w < 30; w++) begin
      if (w < 2 * int'(in.meta.hdr.ihl)) csum = oc_add(csum, l3[DATA_W-1-16*w -: 16]);
    end
    bad_hdr = 1'b0;
    if (in.meta.hdr.is_ip4) begin
      if (in.meta.hdr.ihl < 4'd5) bad_hdr = 1'b1;
      else if (in.meta.hdr.ip_len < {10'd0, in.meta.hdr.ihl, 2'd0}) bad_hdr = 1'b1;
      else if (csum != 16'hFFFF) bad_hdr = 1'b1;
    end
  end

  assign drop_sop = in.meta.blk_hit || bad_hdr;
  assign drop_now = in.beat.sop ? drop_sop : drop_q;
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      out         <= '0;
      drop_q      <= 1'b0;
      cnt_blocked <= '0;
      cnt_invalid <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid && !drop_now;
      out       <= in;
      if (in_valid) begin
        drop_q <= drop_now && !in.beat.eop;
        if (in.beat.sop && in.meta.blk_hit)       cnt_blocked <= cnt_blocked + 1'b1;
        else if (in.beat.sop && bad_hdr)          cnt_invalid <= cnt_invalid + 1'b1;
      end
    end
  end

endmodule
