// tb_ftcp_pc_unit: drives every next-PC source with random values and checks
// PC and PCS after each edge: PC follows the chosen source, PCS is always the
// old PC plus one (a copy of the PC in straight-line code, the return address
// after a CALL, PC + 1 while the PC is held).
module tb_ftcp_pc_unit;
  import ftcp_pkg::*;
  logic clk = 0, rst_n = 0;
  pc_sel_e sel = PC_INC;
  logic [15:0] offset = '0, tor = '0, db = '0, ib = '0, pc, pcs;
  int checks = 0, failures = 0;

  ftcp_pc_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(pc == 0 && pcs == 0, "reset");
    rst_n = 1;
    // Straight line: PCS is a copy of PC.
    repeat (5) begin
      @(negedge clk); sel = PC_INC;
      @(posedge clk); #1;
      chk(pcs == pc, "PCS copies PC in straight-line code");
    end
    repeat (2000) begin
      logic [15:0] old, exp;
      @(negedge clk);
      sel = pc_sel_e'($urandom_range(0, 4));
      offset = ($urandom_range(0, 3) == 0) ? 16'd0 : {{5{1'b0}}, 11'($urandom)} - 16'd1024;
      tor = 16'($urandom); db = 16'($urandom); ib = 16'($urandom);
      old = pc;
      case (sel)
        PC_INC:    exp = old + 16'd1;
        PC_OFFSET: exp = old + offset;
        PC_TOR:    exp = tor;
        PC_DB:     exp = db;
        default:   exp = ib;
      endcase
      @(posedge clk); #1;
      chk(pc == exp, $sformatf("PC %h expected %h (sel %0d)", pc, exp, sel));
      chk(pcs == old + 16'd1, "PCS = old PC + 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
