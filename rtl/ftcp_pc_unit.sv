// ftcp_pc_unit: program counter (PC), program counter save register (PCS),
// the +1 incrementer and the offset adder of the FTCP.
//
// On every rising clock edge the PC is loaded from one of five sources:
//
//   PC_INC     PC + 1                normal program flow
//   PC_OFFSET  PC + offset           IF / LOOP branches; a zero offset holds
//                                    the PC (two-cycle instructions, interrupt)
//   PC_TOR     top of return stack   RETURN
//   PC_DB      data bus              interrupt vector
//   PC_IB      instruction bus       CALL (the op-code is the target address)
//
// PCS is loaded with the incrementer output, PC + 1, on every edge. In
// straight-line code it is therefore a copy of the PC; after a CALL it holds
// the return address while the PC already holds the subroutine address; while
// the PC is held it is one more than the PC. These are the sources and the
// behaviour of PCS given in the processor description. The offset arrives
// already sign-extended to 16 bits. Both registers are cleared by the
// active-low asynchronous reset.
module ftcp_pc_unit
  import ftcp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  pc_sel_e sel,
  input  word_t   offset,
  input  word_t   tor,
  input  word_t   db,
  input  word_t   ib,
  output word_t   pc,
  output word_t   pcs
);

  word_t pc_inc, pc_next;

  assign pc_inc = pc + 1'b1;

  always_comb begin
    unique case (sel)
      PC_OFFSET: pc_next = pc + offset;
      PC_TOR:    pc_next = tor;
      PC_DB:     pc_next = db;
      PC_IB:     pc_next = ib;
      default:   pc_next = pc_inc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= '0;
      pcs <= '0;
    end else begin
      pc  <= pc_next;
      pcs <= pc_inc;
    end
  end

endmodule
