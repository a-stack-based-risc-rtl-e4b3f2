// tb_ftcp_control: drives the instruction bus of the control logic directly
// and checks, cycle by cycle, the next-PC selection and the executing control
// word: CALL and RETURN steer the PC in the cycle they are on the bus; the
// first cycle of ! / @ holds the PC and the following control word is a NOP
// whatever the bus carries; ENTER puts the bus on the data bus and is followed
// by a NOP; IF and LOOP branch with the sign-extended offset; and the
// interrupt entry inhibits the PC, pushes it and loads the vector, after one
// wait cycle when an IF or LOOP is entering the control register.
module tb_ftcp_control;
  import ftcp_pkg::*;
  import ftcp_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] ib = '0;
  logic tos_zero = 0, tor_zero = 0, int_n = 1;
  ctrl_t ex;
  pc_sel_e pc_sel;
  logic [15:0] pc_offset;
  logic intack_n, ie, cr_branch_taken;
  int_state_e int_state;
  int checks = 0, failures = 0;

  ftcp_control dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (pc_sel %0d)", s, pc_sel); end
  endtask

  // Put a word on the instruction bus for one cycle; checks run before the edge.
  task automatic cyc(input logic [15:0] w);
    ib = w;
    #1;
  endtask
  task automatic tick();
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(ex == '0, "reset: NOP in control register");
    rst_n = 1;
    // Plain instruction: PC + 1.
    cyc(T_DUP); chk(pc_sel == PC_INC, "DUP: PC + 1"); tick();
    chk(ex.ds_op == DS_PUSH, "DUP executing");
    // CALL: steered from the bus in the same cycle, pushes PCS when executing.
    cyc(t_call(16'h8123)); chk(pc_sel == PC_IB, "CALL selects instruction bus"); tick();
    chk(ex.rs_op == RS_PUSH && ex.db_sel == DB_PCS, "CALL pushes PCS");
    // RETURN.
    cyc(T_RETURN); chk(pc_sel == PC_TOR, "RETURN selects TOR"); tick();
    chk(ex.rs_op == RS_POP, "RETURN pops");
    // @: PC held in the first cycle; a CALL pattern on the bus is ignored.
    cyc(t_fetch(13'h1ABC)); tick();
    cyc(t_call(16'h8001));
    chk(ex.mem && ex.mem_read && ex.daddr == 13'h1ABC, "@ executing with its address");
    chk(pc_sel == PC_OFFSET && pc_offset == 0, "@ holds the PC");
    tick();
    chk(ex == '0, "second cycle of @ is a NOP");
    // !.
    cyc(t_store(13'h0042)); tick();
    cyc(T_DUP);
    chk(ex.mem && !ex.mem_read && ex.db_sel == DB_TOS, "! drives TOS");
    chk(pc_sel == PC_OFFSET && pc_offset == 0, "! holds the PC");
    tick();
    chk(ex == '0, "second cycle of ! is a NOP");
    // ENTER.
    cyc(T_ENTER); tick();
    cyc(16'h8ABC);   // the literal, looks like a CALL
    chk(ex.db_sel == DB_IB && ex.ds_op == DS_PUSH, "ENTER puts the bus on TOS");
    chk(pc_sel == PC_INC, "ENTER steps past the literal");
    tick();
    chk(ex == '0, "second cycle of ENTER is a NOP");
    // IF taken (TOS = 0), offset -5.
    cyc(t_if(-5)); tick();
    cyc(T_NOP); tos_zero = 1; #1;
    chk(pc_sel == PC_OFFSET && pc_offset == 16'hFFFB && cr_branch_taken, "IF taken: PC - 5");
    chk(ex.ds_op == DS_DROP, "IF drops TOS");
    tick();
    // IF not taken.
    cyc(t_if(300)); tick();
    cyc(T_NOP); tos_zero = 0; #1;
    chk(pc_sel == PC_INC && !cr_branch_taken, "IF not taken: PC + 1");
    tick();
    // LOOP with a non-zero count: branch and decrement.
    cyc(t_loop(-3)); tick();
    cyc(T_NOP); tor_zero = 0; #1;
    chk(pc_sel == PC_OFFSET && pc_offset == 16'hFFFD && ex.rs_op == RS_DEC, "LOOP back");
    tick();
    // LOOP at zero: fall through and pop.
    cyc(t_loop(-3)); tick();
    cyc(T_NOP); tor_zero = 1; #1;
    chk(pc_sel == PC_INC && ex.rs_op == RS_POP, "LOOP exit");
    tick();
    // Interrupt: EI, then a request with a plain instruction on the bus.
    cyc(T_EI); tick();
    cyc(T_NOP); tick();
    chk(ie, "interrupts enabled");
    int_n = 0;
    cyc(T_DUP); tick();                    // DUP enters, state -> 010
    cyc(t_call(16'h8555));
    chk(int_state == IS_INHIBIT && ex.ds_op == DS_PUSH, "last instruction executes");
    chk(pc_sel == PC_OFFSET && pc_offset == 0, "PC inhibited");
    tick();
    chk(ex.rs_op == RS_PUSH && ex.db_sel == DB_PC, "PC pushed onto return stack");
    chk(pc_sel == PC_OFFSET && pc_offset == 0, "PC still held");
    tick();
    chk(!intack_n && pc_sel == PC_DB, "INTACK low, vector from data bus");
    int_n = 1;
    tick();
    cyc(T_NOP);
    chk(intack_n && int_state == IS_NORMAL && ex == '0 && pc_sel == PC_INC, "back to normal");
    tick();
    // Interrupt that arrives with a LOOP on the bus: one wait cycle, during
    // which the LOOP uses the offset adder, then the same entry sequence.
    tor_zero = 0;
    int_n = 0;
    cyc(t_loop(-4)); tick();               // LOOP enters, state -> 001
    cyc(T_DUP);
    chk(int_state == IS_WAIT && ex.branch == BR_LOOP, "entry waits for the LOOP");
    chk(pc_sel == PC_OFFSET && pc_offset == 16'hFFFC && ex.rs_op == RS_DEC, "LOOP still branches");
    tick();
    cyc(T_DUP);
    chk(int_state == IS_INHIBIT && ex.ds_op == DS_HOLD, "word after LOOP not executed");
    chk(pc_sel == PC_OFFSET && pc_offset == 0, "PC inhibited after the wait");
    tick();
    chk(int_state == IS_SAVE && ex.rs_op == RS_PUSH && ex.db_sel == DB_PC, "branch target pushed");
    tick();
    chk(!intack_n && pc_sel == PC_DB, "INTACK low, vector loaded");
    int_n = 1;
    tick();
    cyc(T_NOP);
    chk(intack_n && int_state == IS_NORMAL, "back to normal after inhibited entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
