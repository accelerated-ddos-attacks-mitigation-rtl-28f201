// Output (TX MAC) multiplexer.
//
// Merges the packets leaving the processing pipeline with the packets software
// sends through the TX DMA into the one stream towards the TX MAC. Packets are
// never interleaved: the source that starts a packet keeps the output until its
// last beat. Between packets the two sources alternate (round robin) when both
// have a packet waiting.
//
// From the document: the two sources merged at the output. The round-robin
// arbitration is this design's choice.
//
// Interface: two valid/ready beat streams in, one registered valid/ready beat
// stream out, one beat per clock.
module tx_mux
  import ddos_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  a_valid,   // from the pipeline
  output logic  a_ready,
  input  beat_t a_beat,
  input  logic  b_valid,   // from software (TX DMA)
  output logic  b_ready,
  input  beat_t b_beat,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out
);

  logic locked, owner, last;  // owner: 0 = a, 1 = b; last: source of the previous packet
  logic sel, free, take;
  beat_t sel_beat;

  assign free = !out_valid || out_ready;

  always_comb begin
    if (locked)                sel = owner;
    else if (a_valid && b_valid) sel = !last;
    else                       sel = b_valid;
  end

  assign sel_beat = sel ? b_beat : a_beat;
  assign take     = free && (sel ? b_valid : a_valid);
  assign a_ready  = free && !sel;
  assign b_ready  = free && sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
      locked    <= 1'b0;
      owner     <= 1'b0;
      last      <= 1'b1;
    end else begin
      if (free) begin
        out_valid <= take;
        out       <= sel_beat;
      end
      if (take) begin
        locked <= !sel_beat.eop;
        owner  <= sel;
        if (sel_beat.eop) last <= sel;
      end
    end
  end

endmodule
