// tb_ftcp_decode: checks the decoded fields of every fixed op-code against a
// table written from the instruction descriptions, the field extraction of
// CALL, !, @, IF and LOOP for random fields, and that unused op-codes decode
// as NOP.
module tb_ftcp_decode;
  import ftcp_pkg::*;
  import ftcp_tb_pkg::*;

  logic [15:0] instr;
  ctrl_t ctrl;
  logic is_call, is_return, is_branch;
  int checks = 0, failures = 0;
  logic clk = 0;
  localparam logic [15:0] UNUSED [5] = '{16'h0006, 16'h0016, 16'h00FF, 16'h0401, 16'h0800};

  ftcp_decode dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (instr %h)", s, instr); end
  endtask

  // Expected data stack effect, TOS source, ALU op, return stack effect and
  // data bus source of each fixed op-code.
  task automatic fixed(input logic [15:0] op, input ds_op_e ds, input tos_sel_e ts,
                       input alu_op_e alu, input rs_op_e rs, input db_sel_e dbs, input string name);
    instr = op; #1;
    chk(ctrl.ds_op == ds, {name, " data stack"});
    if (ds == DS_PUSH || ds == DS_POP || ds == DS_LOAD) chk(ctrl.tos_sel == ts, {name, " TOS source"});
    if (ts == TS_ALU && (ds == DS_POP || ds == DS_LOAD)) chk(ctrl.alu_op == alu, {name, " ALU op"});
    chk(ctrl.rs_op == rs, {name, " return stack"});
    if (rs == RS_PUSH || ds == DS_PUSH && ts == TS_DB || dbs == DB_TOS) chk(ctrl.db_sel == dbs, {name, " data bus"});
    chk(!is_call && !is_branch && ctrl.branch == BR_NONE && !ctrl.mem, {name, " not call/branch/mem"});
  endtask

  initial begin
    fixed(T_DUP,   DS_PUSH, TS_TOS, ALU_ADD, RS_HOLD, DB_EXT, "DUP");
    fixed(T_DROP,  DS_DROP, TS_ALU, ALU_ADD, RS_HOLD, DB_EXT, "DROP");
    fixed(T_SWAP,  DS_SWAP, TS_ALU, ALU_ADD, RS_HOLD, DB_EXT, "SWAP");
    fixed(T_TOR,   DS_DROP, TS_ALU, ALU_ADD, RS_PUSH, DB_TOS, ">R");
    fixed(T_FROMR, DS_PUSH, TS_DB,  ALU_ADD, RS_POP,  DB_TOR, "R>");
    fixed(T_ADD,   DS_POP,  TS_ALU, ALU_ADD, RS_HOLD, DB_EXT, "+");
    fixed(T_SUB,   DS_POP,  TS_ALU, ALU_SUB, RS_HOLD, DB_EXT, "-");
    fixed(T_MUL2,  DS_LOAD, TS_ALU, ALU_MUL2, RS_HOLD, DB_EXT, "2*");
    fixed(T_DIV2,  DS_LOAD, TS_ALU, ALU_DIV2, RS_HOLD, DB_EXT, "2/");
    fixed(T_SHIFTR,DS_LOAD, TS_ALU, ALU_SHIFTR, RS_HOLD, DB_EXT, "SHIFTR");
    fixed(T_NOT,   DS_LOAD, TS_ALU, ALU_NOT, RS_HOLD, DB_EXT, "NOT");
    fixed(T_NAND,  DS_POP,  TS_ALU, ALU_NAND, RS_HOLD, DB_EXT, "NAND");
    fixed(T_XOR,   DS_POP,  TS_ALU, ALU_XOR, RS_HOLD, DB_EXT, "XOR");
    fixed(T_GT,    DS_POP,  TS_ALU, ALU_GT, RS_HOLD, DB_EXT, ">");
    fixed(T_LT,    DS_POP,  TS_ALU, ALU_LT, RS_HOLD, DB_EXT, "<");
    fixed(T_EQ,    DS_POP,  TS_ALU, ALU_EQ, RS_HOLD, DB_EXT, "=");
    fixed(T_RETURN,DS_HOLD, TS_ALU, ALU_ADD, RS_POP, DB_EXT, "RETURN");
    chk(is_return, "RETURN flagged");
    fixed(T_DO,    DS_DROP, TS_ALU, ALU_ADD, RS_PUSH, DB_TOS, "DO");
    fixed(T_EI,    DS_HOLD, TS_ALU, ALU_ADD, RS_HOLD, DB_EXT, "EI");
    chk(ctrl.ei && !ctrl.di, "EI bit");
    fixed(T_DI,    DS_HOLD, TS_ALU, ALU_ADD, RS_HOLD, DB_EXT, "DI");
    chk(ctrl.di && !ctrl.ei, "DI bit");
    fixed(T_ENTER, DS_PUSH, TS_DB, ALU_ADD, RS_HOLD, DB_IB, "ENTER");
    chk(ctrl.two_cycle && ctrl.is_enter, "ENTER takes two cycles");
    instr = T_NOP; #1;
    chk(ctrl == '0 && !is_call && !is_return && !is_branch, "NOP is the all-zero control word");
    // Unused op-codes behave as NOP.
    for (int i = 0; i < 5; i++) begin
      instr = UNUSED[i]; #1;
      chk(ctrl == '0 && !is_call && !is_return && !is_branch, "unused op-code is NOP");
    end
    repeat (300) begin
      logic [15:0] f;
      f = 16'($urandom);
      instr = t_call(f); #1;
      chk(is_call && ctrl.rs_op == RS_PUSH && ctrl.db_sel == DB_PCS && !ctrl.two_cycle, "CALL");
      instr = t_store(f[12:0]); #1;
      chk(ctrl.mem && !ctrl.mem_read && ctrl.daddr == f[12:0] && ctrl.two_cycle &&
          ctrl.ds_op == DS_DROP && ctrl.db_sel == DB_TOS && !is_call, "!");
      instr = t_fetch(f[12:0]); #1;
      chk(ctrl.mem && ctrl.mem_read && ctrl.daddr == f[12:0] && ctrl.two_cycle &&
          ctrl.ds_op == DS_PUSH && ctrl.tos_sel == TS_DB && ctrl.db_sel == DB_EXT, "@");
      instr = t_if(int'($signed(f[10:0]))); #1;
      chk(is_branch && ctrl.branch == BR_IF && ctrl.offset == f[10:0] && ctrl.ds_op == DS_DROP, "IF");
      instr = t_loop(int'($signed(f[10:0]))); #1;
      chk(is_branch && ctrl.branch == BR_LOOP && ctrl.offset == f[10:0] && ctrl.ds_op == DS_HOLD, "LOOP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
