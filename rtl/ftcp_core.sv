// ftcp_core: the FTCP processor - a 16-bit, two-stack processor whose 27
// instructions are a core subset of Forth, meant for real-time control.
//
// Structure (after the processor's block diagram): the control logic with its
// control register and NOP register; the PC unit (PC, PCS, +1, offset adder,
// five-way next-PC mux); the ALU working on TOS and SOS; the data stack (TOS,
// SOS, stack RAM, SP); the return stack (TOR, -1, stack RAM, RSP); and an
// internal data bus (DB) that connects them to each other and to the pins.
// Every result is latched on the rising clock edge.
//
// External bus (one common address bus for program memory, data memory and
// memory-mapped I/O):
//   addr      PC, or during the first cycle of ! / @ the 13-bit data address
//   ib        instruction bus: program memory word at addr
//   din       data read from memory/I/O, or the interrupt vector while
//             intack_n is low
//   dout      internal data bus; carries TOS during a store
//   memrq_n   low during the first cycle of ! and @ (memory request)
//   rd_wr_n   high = read, low = write; valid while memrq_n is low
//   int_n     interrupt request, active low, level; intack_n acknowledge
// Status outputs report refused pushes and pops of either stack, and the
// interrupt enable (IS) flip-flop.
//
// Timing: every instruction takes one cycle except !, @ and ENTER, which take
// two. IF and LOOP must be followed by a NOP. Reset (rst_n low, asynchronous)
// clears PC, PCS, SP, RSP, TOS, SOS and TOR, as the processor description
// lists; the control register resets to NOP and IS to "disabled" (this
// design's choice). After reset the first instruction is fetched from 0.
// The stack RAMs are on chip here; their depth (2**STACK_AW words, one of
// them unusable) follows the 16-bit pointer of the stack controller the
// description builds on.
// The core reads only the datapath fields of the control word; the branch,
// two-cycle and EI/DI fields are used inside the control block. The stack
// pointers, interrupt state and branch-taken outputs of the sub-blocks are
// observation points for their own testbenches and are left open here.
module ftcp_core
  import ftcp_pkg::*;
#(
  parameter int unsigned DSTACK_AW = 16,
  parameter int unsigned RSTACK_AW = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  output word_t      addr,
  input  word_t      ib,
  input  word_t      din,
  output word_t      dout,
  output logic       memrq_n,
  output logic       rd_wr_n,
  input  logic       int_n,
  output logic       intack_n,
  output logic       int_enabled,
  output logic       ds_overflow,
  output logic       ds_underflow,
  output logic       rs_overflow,
  output logic       rs_underflow
);

  ctrl_t      ex;
  pc_sel_e    pc_sel;
  word_t      pc_offset, pc, pcs;
  word_t      tos, sos, tor, tor_next, alu_y, db;
  logic       tor_zero;

  ftcp_control u_control (
    .clk, .rst_n, .ib,
    .tos_zero(tos == '0), .tor_zero,
    .int_n, .ex, .pc_sel, .pc_offset, .intack_n,
    .ie(int_enabled), .int_state(), .cr_branch_taken()
  );

  ftcp_pc_unit u_pc (
    .clk, .rst_n, .sel(pc_sel), .offset(pc_offset),
    .tor(tor_next), .db, .ib, .pc, .pcs
  );

  // Internal data bus.
  always_comb begin
    unique case (ex.db_sel)
      DB_TOS:  db = tos;
      DB_TOR:  db = tor;
      DB_PCS:  db = pcs;
      DB_PC:   db = pc;
      DB_IB:   db = ib;
      default: db = din;
    endcase
  end

  ftcp_alu u_alu (.op(ex.alu_op), .a(sos), .b(tos), .y(alu_y));

  ftcp_data_stack #(.AW(DSTACK_AW)) u_dstack (
    .clk, .rst_n, .op(ex.ds_op), .tos_sel(ex.tos_sel), .alu_y, .db,
    .tos, .sos, .sp(), .overflow(ds_overflow), .underflow(ds_underflow)
  );

  ftcp_return_stack #(.AW(RSTACK_AW)) u_rstack (
    .clk, .rst_n, .op(ex.rs_op), .db,
    .tor, .tor_next, .tor_zero, .rsp(),
    .overflow(rs_overflow), .underflow(rs_underflow)
  );

  // Shared address bus and memory strobes, all decoded from the control
  // register.
  assign addr    = ex.mem ? word_t'(ex.daddr) : pc;
  assign memrq_n = !ex.mem;
  assign rd_wr_n = ex.mem ? ex.mem_read : 1'b1;
  assign dout    = db;

endmodule
