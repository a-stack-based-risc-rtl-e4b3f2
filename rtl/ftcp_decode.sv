// ftcp_decode: instruction decoder of the FTCP control logic.
//
// Combinational. It turns one 16-bit op-code into the control word that the
// control register holds while the instruction executes, and flags the three
// instructions the control logic must see before they reach that register:
// CALL and RETURN (which steer the next PC directly so that they take a single
// cycle) and IF/LOOP (which make an arriving interrupt wait one cycle).
//
// Op-code formats follow the processor's sample op-code assignment:
//   1AAA AAAA AAAA AAAA  CALL; the op-code itself is the subroutine address
//   010A AAAA AAAA AAAA  !  (store TOS at data address A)
//   011A AAAA AAAA AAAA  @  (fetch data address A)
//   0001 1JJJ JJJJ JJJJ  IF,  J = two's complement offset
//   0001 0JJJ JJJJ JJJJ  LOOP
//   other fixed codes as listed in ftcp_pkg.
// Each instruction's register transfers follow the processor's register-
// transfer description; how they are split into stack, bus and branch fields
// is this design's own. Op-codes that the assignment leaves unused decode as
// NOP (this design's choice).
module ftcp_decode
  import ftcp_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl,
  output logic  is_call,
  output logic  is_return,
  output logic  is_branch   // IF or LOOP
);

  always_comb begin
    ctrl          = '0;
    ctrl.ds_op    = DS_HOLD;
    ctrl.tos_sel  = TS_ALU;
    ctrl.alu_op   = ALU_ADD;
    ctrl.rs_op    = RS_HOLD;
    ctrl.db_sel   = DB_EXT;
    ctrl.branch   = BR_NONE;
    is_call       = 1'b0;
    is_return     = 1'b0;
    is_branch     = 1'b0;

    if (instr[15]) begin
      // CALL: PCS (return address) -> data bus -> TOR, push return stack.
      is_call      = 1'b1;
      ctrl.rs_op   = RS_PUSH;
      ctrl.db_sel  = DB_PCS;
    end else if (instr[15:13] == PFX_STORE || instr[15:13] == PFX_FETCH) begin
      ctrl.mem       = 1'b1;
      ctrl.two_cycle = 1'b1;
      ctrl.daddr     = instr[DADDR_W-1:0];
      if (instr[13]) begin
        // @: data bus (memory) -> TOS, push data stack.
        ctrl.mem_read = 1'b1;
        ctrl.ds_op    = DS_PUSH;
        ctrl.tos_sel  = TS_DB;
        ctrl.db_sel   = DB_EXT;
      end else begin
        // !: TOS -> data bus -> memory, pop data stack.
        ctrl.ds_op    = DS_DROP;
        ctrl.db_sel   = DB_TOS;
      end
    end else if (instr[15:11] == PFX_IF || instr[15:11] == PFX_LOOP) begin
      is_branch   = 1'b1;
      ctrl.offset = instr[OFFSET_W-1:0];
      if (instr[15:11] == PFX_IF) begin
        ctrl.branch = BR_IF;      // test and drop TOS
        ctrl.ds_op  = DS_DROP;
      end else begin
        ctrl.branch = BR_LOOP;    // rs_op chosen by the loop test
      end
    end else begin
      unique case (instr)
        OP_DUP:    begin ctrl.ds_op = DS_PUSH; ctrl.tos_sel = TS_TOS; end
        OP_DROP:   ctrl.ds_op = DS_DROP;
        OP_SWAP:   ctrl.ds_op = DS_SWAP;
        OP_TOR, OP_DO: begin
          ctrl.ds_op  = DS_DROP;
          ctrl.rs_op  = RS_PUSH;
          ctrl.db_sel = DB_TOS;
        end
        OP_FROMR: begin
          ctrl.ds_op   = DS_PUSH;
          ctrl.tos_sel = TS_DB;
          ctrl.db_sel  = DB_TOR;
          ctrl.rs_op   = RS_POP;
        end
        OP_ADD:    begin ctrl.ds_op = DS_POP;  ctrl.alu_op = ALU_ADD;    end
        OP_SUB:    begin ctrl.ds_op = DS_POP;  ctrl.alu_op = ALU_SUB;    end
        OP_MUL2:   begin ctrl.ds_op = DS_LOAD; ctrl.alu_op = ALU_MUL2;   end
        OP_DIV2:   begin ctrl.ds_op = DS_LOAD; ctrl.alu_op = ALU_DIV2;   end
        OP_SHIFTR: begin ctrl.ds_op = DS_LOAD; ctrl.alu_op = ALU_SHIFTR; end
        OP_NOT:    begin ctrl.ds_op = DS_LOAD; ctrl.alu_op = ALU_NOT;    end
        OP_NAND:   begin ctrl.ds_op = DS_POP;  ctrl.alu_op = ALU_NAND;   end
        OP_XOR:    begin ctrl.ds_op = DS_POP;  ctrl.alu_op = ALU_XOR;    end
        OP_GT:     begin ctrl.ds_op = DS_POP;  ctrl.alu_op = ALU_GT;     end
        OP_LT:     begin ctrl.ds_op = DS_POP;  ctrl.alu_op = ALU_LT;     end
        OP_EQ:     begin ctrl.ds_op = DS_POP;  ctrl.alu_op = ALU_EQ;     end
        OP_RETURN: begin ctrl.rs_op = RS_POP;  is_return = 1'b1;         end
        OP_EI:     ctrl.ei = 1'b1;
        OP_DI:     ctrl.di = 1'b1;
        OP_ENTER: begin
          // Next program word -> instruction bus -> data bus -> TOS.
          ctrl.ds_op     = DS_PUSH;
          ctrl.tos_sel   = TS_DB;
          ctrl.db_sel    = DB_IB;
          ctrl.two_cycle = 1'b1;
          ctrl.is_enter  = 1'b1;
        end
        default: ;  // NOP and unused codes
      endcase
    end
  end

endmodule
