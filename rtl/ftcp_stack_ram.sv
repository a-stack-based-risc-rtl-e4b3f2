// ftcp_stack_ram: the RAM that holds the stack words below the on-chip top
// registers (TOS/SOS for the data stack, TOR for the return stack).
//
// The processor's description leaves these RAMs off chip unless the stacks are
// shallow, and gives no timing for them. This design models each as a
// 2**AW x 16 array with one synchronous write port (written on the rising
// clock edge when we is high) and one asynchronous read port, so that a pop
// can move the word below the top registers up in a single cycle. The RAM is
// not reset; a word is only read after it has been written.
module ftcp_stack_ram #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
