// MAC & VLAN Editor.
//
// Last editing stage. On the first beat of a packet that has a next hop, it
// overwrites the destination MAC address (bytes 0..5) with the next hop's MAC.
// When the next hop asks for an output VLAN (`vlan_set`):
//   - a packet that already carries an 802.1Q tag gets the 12-bit VLAN ID in
//     that tag replaced (priority and DEI bits are kept);
//   - an untagged packet gets a tag 0x8100 / PCP 0 / DEI 0 / VLAN ID inserted
//     after the source MAC (bytes 12..15). Every following byte moves 4 places
//     down: each output beat is the 4 bytes carried over from the previous input
//     beat followed by the first 124 bytes of the current one. When the last
//     input beat has fewer than 4 unused bytes, one extra output beat carries
//     the remaining bytes; the input is held for that one clock.
// When the next hop asks for untagged output (`vlan_strip`, with `vlan_set`
// clear), a tagged packet loses its tag: every byte after the source MAC moves
// 4 places up. An output beat then needs the first 4 bytes of the next input
// beat, so each beat of such a packet is held for one clock and completed by
// the next one; the packet's last held beat is sent in an extra clock in which
// no input is taken (the packet may also end one beat shorter).
// Other beats and packets without a next hop pass unchanged. The packet leaves
// as a plain beat stream.
//
// From the document: replacing the destination MAC and, optionally, the output
// VLAN tag. The inserted tag's priority of 0 and the one-clock stalls for the
// extra beats are this design's choices.
//
// Interface: valid/ready streams; one register stage, one beat per clock
// except for the extra clocks described above.
module mac_vlan_edit
  import ddos_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  output logic  in_ready,
  input  bus_t  in,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out
);

  logic [DATA_W-1:0] new_data, sh_data;
  logic [31:0]       carry_q, new_carry;
  logic              ins_q, ins_sop, shifting, need_extra, extra_q, stage_free;
  logic [EMPTY_W-1:0] extra_empty_q;
  beat_t             nb;
  // tag removal
  logic              strip_sop, strip_cont;
  logic              hold_v, hold_sop, hold_last;
  logic [EMPTY_W-1:0] hold_empty;
  logic [DATA_W-1:0] hold;
  logic [8:0]        in_n;   // valid bytes of the input beat

  assign ins_sop  = in.beat.sop && in.meta.nh_hit && in.meta.nh.vlan_set && !in.meta.hdr.has_vlan;
  assign shifting = ins_sop || (!in.beat.sop && ins_q);

  always_comb begin
    new_data = in.beat.data;
    if (in.beat.sop && in.meta.nh_hit) begin
      new_data[DATA_W-1 -: 48] = in.meta.nh.dmac;
      if (in.meta.nh.vlan_set && in.meta.hdr.has_vlan)
        new_data[DATA_W-1-8*14-4 -: 12] = in.meta.nh.vlan_id;
    end
    if (ins_sop)
      sh_data = {new_data[DATA_W-1 -: 96], 16'h8100, 4'h0, in.meta.nh.vlan_id,
                 new_data[DATA_W-97 : 32]};
    else
      sh_data = {carry_q, new_data[DATA_W-1 : 32]};
    new_carry  = new_data[31:0];
    need_extra = shifting && in.beat.eop && (in.beat.empty < EMPTY_W'(4));

    nb = in.beat;
    if (shifting) begin
      nb.data = sh_data;
      if (need_extra) begin
        nb.eop   = 1'b0;
        nb.empty = '0;
      end else if (in.beat.eop) begin
        nb.empty = in.beat.empty - EMPTY_W'(4);
      end
    end else begin
      nb.data = new_data;
    end
  end

  assign strip_sop  = in.beat.sop && in.meta.nh_hit && !in.meta.nh.vlan_set &&
                      in.meta.nh.vlan_strip && in.meta.hdr.has_vlan;
  assign strip_cont = hold_v && !hold_last && !in.beat.sop;
  assign in_n       = in.beat.eop ? 9'(BYTES) - 9'(in.beat.empty) : 9'(BYTES);

  assign stage_free = !out_valid || out_ready;
  assign in_ready   = stage_free && !extra_q && !(hold_v && hold_last);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid     <= 1'b0;
      out           <= '0;
      ins_q         <= 1'b0;
      extra_q       <= 1'b0;
      carry_q       <= '0;
      extra_empty_q <= '0;
      hold_v        <= 1'b0;
      hold_sop      <= 1'b0;
      hold_last     <= 1'b0;
      hold_empty    <= '0;
      hold          <= '0;
    end else if (stage_free) begin
      if (hold_v && hold_last) begin
        // last held beat of a packet whose tag was removed
        out_valid <= 1'b1;
        out       <= '0;
        out.sop   <= hold_sop;
        out.eop   <= 1'b1;
        out.empty <= hold_empty;
        out.data  <= hold;
        hold_v    <= 1'b0;
      end else if (extra_q) begin
        out_valid  <= 1'b1;
        out        <= '0;
        out.eop    <= 1'b1;
        out.empty  <= extra_empty_q;
        out.data   <= {carry_q, {(DATA_W-32){1'b0}}};
        extra_q    <= 1'b0;
      end else if (in_valid && strip_sop) begin
        // first beat without the 4 tag bytes; completed by the next beat
        out_valid  <= 1'b0;
        hold_v     <= 1'b1;
        hold_sop   <= 1'b1;
        hold_last  <= in.beat.eop;
        hold_empty <= in.beat.empty + EMPTY_W'(4);
        hold       <= {new_data[DATA_W-1 -: 96], new_data[DATA_W-129 : 0], 32'd0};
      end else if (in_valid && strip_cont) begin
        out_valid <= 1'b1;
        out       <= '0;
        out.sop   <= hold_sop;
        out.data  <= {hold[DATA_W-1 : 32], in.beat.data[DATA_W-1 -: 32]};
        hold_sop  <= 1'b0;
        if (in.beat.eop && in_n <= 9'd4) begin
          out.eop   <= 1'b1;
          out.empty <= EMPTY_W'(9'd4 - in_n);
          hold_v    <= 1'b0;
        end else begin
          hold       <= {in.beat.data[DATA_W-33 : 0], 32'd0};
          hold_last  <= in.beat.eop;
          hold_empty <= in.beat.empty + EMPTY_W'(4);
        end
      end else begin
        out_valid <= in_valid;
        out       <= nb;
        if (in_valid) begin
          ins_q <= shifting && !in.beat.eop;
          if (shifting) carry_q <= new_carry;
          extra_q       <= need_extra;
          extra_empty_q <= EMPTY_W'(BYTES - 4) + in.beat.empty;
        end
      end
    end
  end

endmodule
