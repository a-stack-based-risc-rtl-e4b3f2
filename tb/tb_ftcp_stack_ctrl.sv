// tb_ftcp_stack_ctrl: fills a small stack pointer controller (AW = 3, seven
// words) to overflow and empties it to underflow, checking the pointer, the
// RAM addresses and the flags against a counter model on every cycle, then
// runs random push/pop traffic.
module tb_ftcp_stack_ctrl;
  localparam int AW = 3;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [AW-1:0] ptr, wr_addr, rd_addr;
  logic wr_en, rd_valid, overflow, underflow;
  int checks = 0, failures = 0;
  int model = 0;
  int n_ovf = 0, n_unf = 0;

  ftcp_stack_ctrl #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (model %0d ptr %0d)", s, model, ptr); end
  endtask

  task automatic step(input bit pu, input bit po);
    @(negedge clk);
    push = pu; pop = po;
    #1;
    chk(ptr == AW'(model), "pointer");
    chk(overflow  == (pu && model == 7), "overflow flag");
    chk(underflow == (po && model == 0), "underflow flag");
    chk(wr_en == (pu && model < 7), "write enable");
    chk(rd_valid == (po && model > 0), "read valid");
    if (pu && model < 7) chk(wr_addr == AW'(model), "write address");
    if (po && model > 0) chk(rd_addr == AW'(model - 1), "read address");
    if (overflow) n_ovf++;
    if (underflow) n_unf++;
    @(posedge clk);
    if (pu && model < 7) model++;
    else if (po && model > 0) model--;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (9) step(1, 0);
    repeat (9) step(0, 1);
    repeat (300) begin
      bit r;
      r = $urandom_range(0, 1) == 1;
      step(r, !r);
    end
    step(0, 0);
    chk(n_ovf >= 2 && n_unf >= 2, "overflow and underflow were seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
