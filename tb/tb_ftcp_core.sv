// tb_ftcp_core: runs small Forth-style programs on the processor core with
// program and data memory modelled in the testbench, and shallow stacks
// (16-word RAMs):
//   - Fibonacci by DO ... LOOP with >R / R> inside the loop body,
//   - a subroutine that multiplies by shift-and-add with IF, 2*, SHIFTR,
//     NAND/NOT, called twice,
//   - an interrupt whose vector comes from the data input while INTACK is low.
// Results are read from the stores on the bus and compared with values
// computed in the testbench.
module tb_ftcp_core;
  import ftcp_tb_pkg::*;

  logic clk = 0, rst_n = 0, int_n = 1;
  logic [15:0] addr, ib, din, dout;
  logic memrq_n, rd_wr_n, intack_n, int_enabled;
  logic ds_overflow, ds_underflow, rs_overflow, rs_underflow;
  logic [15:0] rom [logic [15:0]];
  logic [15:0] ram [logic [15:0]];
  logic [15:0] at = 0;
  int checks = 0, failures = 0;

  ftcp_core #(.DSTACK_AW(4), .RSTACK_AW(4)) dut (.*);

  always #5 clk = ~clk;
  assign ib  = rom.exists(addr) ? rom[addr] : 16'h0000;
  assign din = !memrq_n ? (ram.exists(addr) ? ram[addr] : 16'h0000) : 16'hA000;
  always @(posedge clk) if (rst_n && !memrq_n && !rd_wr_n) ram[addr] = dout;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic put(input logic [15:0] w); rom[at] = w; at++; endtask
  task automatic lit(input logic [15:0] v); put(T_ENTER); put(v); endtask

  function automatic logic [15:0] fib(input int n);
    logic [15:0] a = 0, b = 1, t;
    for (int i = 0; i < n; i++) begin t = a + b; a = b; b = t; end
    return a;
  endfunction

  logic [15:0] mul_lp, mul_done, body, h;

  initial begin
    // ---- main
    at = 0;
    put(T_EI);
    lit(0); lit(1); lit(9); put(T_DO);          // 10 iterations: [F10 F11]
    body = at;
    put(T_DUP); put(T_TOR); put(T_ADD); put(T_FROMR); put(T_SWAP);
    put(t_loop(int'(body) - int'(at + 1))); put(T_NOP);
    put(t_store(13'h10));                         // F11
    put(t_store(13'h11));                         // F10
    lit(16'd123); lit(16'd45); put(t_call(16'h8000)); put(t_store(13'h12));
    lit(16'd7);   lit(16'd300); put(t_call(16'h8000)); put(t_store(13'h13));
    h = at;
    lit(0); put(t_if(int'(h) - int'(at + 1))); put(T_NOP);  // idle loop
    // ---- 8000: ( a b -- a*b ) shift-and-add, 16 steps
    at = 16'h8000;
    put(t_store(13'h20));                         // b -> m[20]
    put(t_store(13'h21));                         // a -> m[21]
    lit(0); put(t_store(13'h22));                 // product
    lit(15); put(T_DO);
    mul_lp = at;
    put(t_fetch(13'h20)); lit(1); put(T_NAND); put(T_NOT);   // b & 1
    put(t_if(5)); put(T_NOP);                     // skip the add when 0
    put(t_fetch(13'h22)); put(t_fetch(13'h21)); put(T_ADD); put(t_store(13'h22));
    mul_done = at;
    put(t_fetch(13'h21)); put(T_MUL2); put(t_store(13'h21));
    put(t_fetch(13'h20)); put(T_SHIFTR); put(t_store(13'h20));
    put(t_loop(int'(mul_lp) - int'(at + 1))); put(T_NOP);
    put(t_fetch(13'h22));
    put(T_RETURN);
    // ---- A000: interrupt service routine
    at = 16'hA000;
    put(t_fetch(13'h30)); lit(1); put(T_ADD); put(t_store(13'h30));
    put(T_RETURN);
    ram[16'h30] = 0;

    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (250) @(negedge clk);
    int_n = 0;
    while (intack_n) @(negedge clk);
    int_n = 1;
    repeat (1500) @(negedge clk);
    chk(ram.exists(16'h10) && ram[16'h10] == fib(11), "Fibonacci F11");
    chk(ram.exists(16'h11) && ram[16'h11] == fib(10), "Fibonacci F10");
    chk(ram.exists(16'h12) && ram[16'h12] == 16'(123 * 45), "123 * 45");
    chk(ram.exists(16'h13) && ram[16'h13] == 16'(7 * 300), "7 * 300");
    chk(ram[16'h30] == 1, "interrupt serviced once");
    chk(!ds_overflow && !rs_overflow, "no overflow");
    chk(dut.u_dstack.sp <= 1 && dut.u_rstack.rsp == 0, "stacks balanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
