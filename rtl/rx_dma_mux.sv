// Software RX DMA multiplexer.
//
// Sits on the packet path right after the check & drop stage. Packets whose
// selection rule asks for whole packets (`sel_act.pkt_to_sw`) are copied, beat
// by beat, to the software RX DMA stream while they continue down the pipeline.
// The same DMA stream also carries the one-beat Unified Headers from the UH
// generator. A packet copy, once started, owns the DMA stream until its last
// beat; between packets a waiting UH goes first.
//
// From the document: the tap point after check & drop and the two kinds of data
// (whole packets or UHs) merged towards the RX DMA. The arbitration order is
// this design's own.
//
// Interface: valid/ready main stream in and out, valid/ready UH stream in,
// valid/ready DMA stream out; both outputs are registered. A main beat that must
// be copied moves only when both its outputs can take it, so a slow DMA stream
// slows the packet path only for the packets being copied.
module rx_dma_mux
  import ddos_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  output logic  in_ready,
  input  bus_t  in,
  output logic  out_valid,
  input  logic  out_ready,
  output bus_t  out,
  input  logic  uh_valid,
  output logic  uh_ready,
  input  beat_t uh_beat,
  output logic  dma_valid,
  input  logic  dma_ready,
  output beat_t dma_beat
);

  logic in_copy;     // a packet copy is in progress
  logic need_copy, main_free, dma_free, grant_uh, take;

  assign need_copy = in.beat.sop ? (in.meta.sel_hit && in.meta.sel_act.pkt_to_sw) : in_copy;
  assign main_free = !out_valid || out_ready;
  assign dma_free  = !dma_valid || dma_ready;
  assign grant_uh  = uh_valid && dma_free && !in_copy;
  assign take      = in_valid && main_free && (!need_copy || (dma_free && !grant_uh));
  assign in_ready  = main_free && (!need_copy || (dma_free && !grant_uh));
  assign uh_ready  = grant_uh;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
      dma_valid <= 1'b0;
      dma_beat  <= '0;
      in_copy   <= 1'b0;
    end else begin
      if (main_free) begin
        out_valid <= take;
        out       <= in;
      end
      if (dma_free) begin
        dma_valid <= grant_uh || (take && need_copy);
        dma_beat  <= grant_uh ? uh_beat : in.beat;
      end
      if (take && need_copy) in_copy <= !in.beat.eop;
    end
  end

endmodule
