// Behavioural model of one external QDR-style SRAM holding a bank of the
// blocking table (entry and counters per slot): separate read and write ports,
// reads answered exactly RD_LAT clock cycles after the request, writes take
// effect at the clock edge, so a read returns the contents from before any
// write issued in the same or a later clock. All slots start invalid. Not synthesizable as a memory device; testbench use only.
module qdr_model
  import ddos_pkg::*;
#(
  parameter int unsigned AW     = BLK_AW,
  parameter int unsigned RD_LAT = 4
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output blk_slot_t    rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  blk_slot_t    wr_data
);

  blk_slot_t mem [2**AW];
  blk_slot_t pipe [RD_LAT];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always @(posedge clk) begin
    pipe[0] <= rd_en ? mem[rd_addr] : '0;
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = pipe[RD_LAT-1];

endmodule
