// ftcp_rom: program memory of the FTCP system.
//
// The processor addresses program memory through the common address bus and
// reads instructions from the instruction bus. The description calls this
// memory a ROM, external to the processor chip, sized by the 16-bit address:
// main program in the lower 32K words, subroutines in the upper 32K. Here it
// is a 2**AW x 16 array with an asynchronous read port (ib follows addr in the
// same cycle, as the one-stage pipeline needs) and a synchronous load port
// (load_we, load_addr, load_data) through which the program is placed before
// the processor is released from reset - this design's stand-in for
// programming the ROM. Contents are not reset.
module ftcp_rom #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [15:0]   ib,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [15:0]   load_data
);

  logic [15:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign ib = mem[addr];

endmodule
