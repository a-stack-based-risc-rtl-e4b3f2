// ftcp_int_fsm: interrupt state machine and interrupt status flip-flop (IS)
// of the FTCP control logic.
//
// INT is an active-low, level-sensitive request. While IS is set (EI sets it,
// DI clears it, reset clears it) and the machine is in normal processing, a
// low INT starts the entry sequence below. One state lasts one clock cycle;
// the encodings are those of the processor's register-transfer description.
//
//   000 NORMAL   normal processing. With INT low and IS set, the instruction
//                now entering the control register is examined: an IF or
//                LOOP leads to WAIT, anything else to INHIBIT.
//   001 WAIT     the IF/LOOP executes (it needs the offset adder); its
//                following NOP is discarded. Next: INHIBIT.
//   010 INHIBIT  the last instruction executes; the PC is inhibited and the
//                pipeline is emptied. Next: SAVE.
//   011 SAVE     PC -> data bus -> return stack (the return address). Next:
//                VECTOR.
//   111 VECTOR   INTACK is low; the interrupting device drives the vector on
//                the data bus and it is latched into the PC. Next: NORMAL.
//
// This cycle-by-cycle placement reproduces the processor's timing diagrams
// for an uninhibited and an inhibited interrupt: INTACK low for one cycle, the
// return address on the data bus the cycle before, the vector in the PC the
// cycle after. That the IF/LOOP test is made on the instruction entering the
// control register during the cycle INT is first seen, and that IS is not
// cleared on entry, are this design's reading; the service routine may DI.
//
// Outputs: use_nr asks the control logic to load the NOP register instead of
// the instruction bus (pipeline emptied); inhibit_pc, save_pc and load_vector
// steer the PC and data bus; intack_n is a registered output.
module ftcp_int_fsm
  import ftcp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       int_n,
  input  logic       ei,            // executing instruction is EI
  input  logic       di,            // executing instruction is DI
  input  logic       cl_is_branch,  // instruction entering the control register is IF/LOOP
  output int_state_e state,
  output logic       ie,            // IS flip-flop
  output logic       use_nr,
  output logic       inhibit_pc,
  output logic       save_pc,
  output logic       load_vector,
  output logic       intack_n
);

  int_state_e next;

  always_comb begin
    next = state;
    unique case (state)
      IS_NORMAL:  if (!int_n && ie) next = cl_is_branch ? IS_WAIT : IS_INHIBIT;
      IS_WAIT:    next = IS_INHIBIT;
      IS_INHIBIT: next = IS_SAVE;
      IS_SAVE:    next = IS_VECTOR;
      IS_VECTOR:  next = IS_NORMAL;
      default:    next = IS_NORMAL;
    endcase
  end

  assign use_nr      = (state != IS_NORMAL);
  assign inhibit_pc  = (state == IS_INHIBIT) || (state == IS_SAVE);
  assign save_pc     = (state == IS_SAVE);
  assign load_vector = (state == IS_VECTOR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IS_NORMAL;
      ie       <= 1'b0;
      intack_n <= 1'b1;
    end else begin
      state    <= next;
      intack_n <= !(next == IS_VECTOR);
      if (ei)      ie <= 1'b1;
      else if (di) ie <= 1'b0;
    end
  end

  a_intack_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !intack_n |=> intack_n);

endmodule
