// ftcp_system: an FTCP processor with its program memory and data memory on
// the common address bus - the system of the processor's block diagram.
//
// The processor core drives one address bus that serves program memory, data
// memory and memory-mapped I/O. Program memory answers every cycle on the
// instruction bus; data memory is selected by memrq_n during the first cycle
// of ! and @. The word the core reads on its data input is the data memory
// output during a memory request and the external interrupt vector input
// otherwise; the interrupting device is expected to present its vector while
// intack_n is low. The bus (address, data out, strobes) is brought out so
// that memory-mapped devices outside this module can watch it.
//
// Ports: clk; rst_n (active low, asynchronous); load_* write a word into
// program memory (used with rst_n low to place a program); int_n /
// int_vector / intack_n form the interrupt interface; stack status flags.
// Sizes: 64K-word program memory (16-bit addresses), 8K-word data memory
// (13-bit data address), 64K-word stack RAMs.
module ftcp_system
  import ftcp_pkg::*;
#(
  parameter int unsigned ROM_AW    = 16,
  parameter int unsigned RAM_AW    = DADDR_W,
  parameter int unsigned DSTACK_AW = 16,
  parameter int unsigned RSTACK_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_we,
  input  logic [ROM_AW-1:0] load_addr,
  input  word_t             load_data,
  input  logic              int_n,
  input  word_t             int_vector,
  output logic              intack_n,
  output word_t             bus_addr,
  output word_t             bus_dout,
  output logic              memrq_n,
  output logic              rd_wr_n,
  output logic              int_enabled,
  output logic              ds_overflow,
  output logic              ds_underflow,
  output logic              rs_overflow,
  output logic              rs_underflow
);

  word_t ib, din, ram_q;

  ftcp_core #(.DSTACK_AW(DSTACK_AW), .RSTACK_AW(RSTACK_AW)) u_core (
    .clk, .rst_n, .addr(bus_addr), .ib, .din, .dout(bus_dout),
    .memrq_n, .rd_wr_n, .int_n, .intack_n, .int_enabled,
    .ds_overflow, .ds_underflow, .rs_overflow, .rs_underflow
  );

  ftcp_rom #(.AW(ROM_AW)) u_rom (
    .clk, .addr(bus_addr[ROM_AW-1:0]), .ib,
    .load_we, .load_addr, .load_data
  );

  ftcp_ram #(.AW(RAM_AW)) u_ram (
    .clk, .memrq_n, .rd_wr_n, .addr(bus_addr[RAM_AW-1:0]),
    .wdata(bus_dout), .rdata(ram_q)
  );

  assign din = !memrq_n ? ram_q : int_vector;

endmodule
