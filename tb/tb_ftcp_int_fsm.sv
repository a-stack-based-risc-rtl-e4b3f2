// tb_ftcp_int_fsm: walks the interrupt state machine through an uninhibited
// entry (000 -> 010 -> 011 -> 111 -> 000), an inhibited one (000 -> 001 ->
// 010 -> 011 -> 111 -> 000), a request ignored while interrupts are disabled
// and the EI/DI flip-flop, checking state, strobes and INTACK every cycle.
module tb_ftcp_int_fsm;
  import ftcp_pkg::*;
  logic clk = 0, rst_n = 0, int_n = 1, ei = 0, di = 0, cl_is_branch = 0;
  int_state_e state;
  logic ie, use_nr, inhibit_pc, save_pc, load_vector, intack_n;
  int checks = 0, failures = 0;

  ftcp_int_fsm dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %b)", s, state); end
  endtask

  // Checks the state and its outputs during one cycle, then lets it pass.
  task automatic expect_state(input logic [2:0] s, input bit ack_low);
    chk(state == int_state_e'(s), $sformatf("state %b", s));
    chk(use_nr      == (s != 3'b000), "use_nr");
    chk(inhibit_pc  == (s == 3'b010 || s == 3'b011), "inhibit_pc");
    chk(save_pc     == (s == 3'b011), "save_pc");
    chk(load_vector == (s == 3'b111), "load_vector");
    chk(intack_n    == !ack_low, "INTACK");
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!ie && state == IS_NORMAL, "reset: disabled, normal");
    // Disabled: a request is ignored.
    int_n = 0;
    repeat (4) expect_state(3'b000, 0);
    int_n = 1;
    // EI.
    ei = 1; @(negedge clk); ei = 0;
    chk(ie, "EI sets IS");
    // Uninhibited.
    int_n = 0;
    expect_state(3'b000, 0);
    int_n = 1;  // device holds INT until it sees INTACK; releasing early is fine too
    expect_state(3'b010, 0);
    expect_state(3'b011, 0);
    expect_state(3'b111, 1);
    expect_state(3'b000, 0);
    // Inhibited: an IF/LOOP is entering the control register.
    int_n = 0; cl_is_branch = 1;
    expect_state(3'b000, 0);
    cl_is_branch = 0;
    expect_state(3'b001, 0);
    expect_state(3'b010, 0);
    expect_state(3'b011, 0);
    expect_state(3'b111, 1);
    int_n = 1;
    expect_state(3'b000, 0);
    // DI.
    di = 1; @(negedge clk); di = 0;
    chk(!ie, "DI clears IS");
    int_n = 0;
    repeat (3) expect_state(3'b000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
