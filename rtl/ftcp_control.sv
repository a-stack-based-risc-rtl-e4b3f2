// ftcp_control: control logic and control register of the FTCP.
//
// The processor has a one-stage pipeline. In each cycle the control logic
// decodes the word it is given (CL input) while the control register holds
// the control word of the instruction being executed; on the rising clock
// edge the new control word is latched and the executing instruction's
// register transfers happen together. Almost all control comes from this
// register. The exceptions are CALL and RETURN: they are recognised in the CL
// input and steer the next-PC multiplexer directly (to the instruction bus,
// or to TOR), so the PC holds the target by the time the CALL or RETURN
// reaches the control register and neither costs an extra cycle.
//
// The CL input is the instruction bus, except that the NOP register (NR) is
// chosen instead
//  - after the first cycle of !, @ and ENTER, whose second cycle is a NOP
//    (the shared address bus is busy with the data address, or the bus word
//    is the ENTER literal), and
//  - while the interrupt state machine empties the pipeline.
//
// Next-PC selection, highest priority first: interrupt vector (data bus);
// interrupt PC inhibit (offset 0); the executing IF (branch if TOS = 0) or
// LOOP (branch while TOR is non-zero, decrementing it; at zero TOR is popped);
// the first cycle of ! and @ (offset 0, the PC is held); CALL / RETURN in the
// CL input; otherwise PC + 1. Branch offsets are the 11-bit field, sign
// extended, added to the PC, which at that point addresses the instruction
// after the IF/LOOP (that slot must hold a NOP). ENTER lets the PC advance
// past its literal. This follows the processor's description; the exact
// priority order and the PC-relative origin are this design's reading of it.
//
// Outputs: ex is the control word of the executing instruction with the
// interrupt sequence's return-stack push and the LOOP decision merged in.
module ftcp_control
  import ftcp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      ib,        // instruction bus
  input  logic       tos_zero,
  input  logic       tor_zero,
  input  logic       int_n,
  output ctrl_t      ex,
  output pc_sel_e    pc_sel,
  output word_t      pc_offset,
  output logic       intack_n,
  output logic       ie,
  output int_state_e int_state,
  output logic       cr_branch_taken  // executing IF/LOOP redirects the PC
);

  ctrl_t cr, cl_ctrl;
  word_t cl_instr;
  logic  cl_call, cl_return, cl_branch;
  logic  use_nr, inhibit_pc, save_pc, load_vector;
  word_t branch_off;

  // NR register content is the NOP op-code.
  assign cl_instr = (cr.two_cycle || use_nr) ? OP_NOP : ib;

  ftcp_decode u_decode (
    .instr(cl_instr), .ctrl(cl_ctrl),
    .is_call(cl_call), .is_return(cl_return), .is_branch(cl_branch)
  );

  ftcp_int_fsm u_int (
    .clk, .rst_n, .int_n,
    .ei(cr.ei), .di(cr.di), .cl_is_branch(cl_branch),
    .state(int_state), .ie, .use_nr, .inhibit_pc, .save_pc, .load_vector,
    .intack_n
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cr <= '0;   // the all-zero control word is a NOP
    else        cr <= cl_ctrl;
  end

  assign branch_off = {{(W-OFFSET_W){cr.offset[OFFSET_W-1]}}, cr.offset};

  always_comb begin
    cr_branch_taken = ((cr.branch == BR_IF)   &&  tos_zero) ||
                      ((cr.branch == BR_LOOP) && !tor_zero);

    ex = cr;
    if (cr.branch == BR_LOOP) ex.rs_op = tor_zero ? RS_POP : RS_DEC;
    if (save_pc) begin
      ex.rs_op  = RS_PUSH;
      ex.db_sel = DB_PC;
    end

    pc_offset = '0;
    if (load_vector) begin
      pc_sel = PC_DB;
    end else if (inhibit_pc && !cr.is_enter) begin
      pc_sel = PC_OFFSET;
    end else if (cr.branch != BR_NONE) begin
      pc_sel    = cr_branch_taken ? PC_OFFSET : PC_INC;
      pc_offset = cr_branch_taken ? branch_off : '0;
    end else if (cr.mem) begin
      pc_sel = PC_OFFSET;
    end else if (cl_call) begin
      pc_sel = PC_IB;
    end else if (cl_return) begin
      pc_sel = PC_TOR;
    end else begin
      pc_sel = PC_INC;
    end
  end

endmodule
