// ftcp_ram: data memory of the FTCP system.
//
// ! and @ carry a 13-bit data address, so data memory (shared with memory-
// mapped I/O in the description) spans 8K words. This model is a 2**AW x 16
// array on the processor's bus strobes: while memrq_n is low it is selected;
// with rd_wr_n low the word on wdata is written at the rising clock edge, with
// rd_wr_n high rdata shows the addressed word in the same cycle (asynchronous
// read, so a fetch completes in the cycle it is requested). The bus timing is
// this design's choice; the description fixes only that the access happens
// in the first of the two cycles of ! and @. Contents are not reset.
module ftcp_ram #(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic          memrq_n,
  input  logic          rd_wr_n,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata
);

  logic [15:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!memrq_n && !rd_wr_n) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
