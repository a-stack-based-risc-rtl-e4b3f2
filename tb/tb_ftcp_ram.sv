// tb_ftcp_ram: random bus cycles on the data memory (8K words, its full
// size): writes only with memrq_n and rd_wr_n low, reads in the same cycle,
// no write without a memory request, checked against a model.
module tb_ftcp_ram;
  localparam int AW = 13;
  logic clk = 0, memrq_n = 1, rd_wr_n = 1;
  logic [AW-1:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [logic [AW-1:0]];
  int checks = 0, failures = 0;

  ftcp_ram dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 2);
      addr = AW'($urandom_range(0, 63));
      wdata = 16'($urandom);
      memrq_n = (r == 2);
      rd_wr_n = (r == 1) || (r == 2 && $urandom_range(0, 1) == 1);
      #1;
      if (!memrq_n && rd_wr_n && model.exists(addr)) begin
        checks++;
        if (rdata != model[addr]) begin failures++; $display("FAIL: read %0d", addr); end
      end
      if (!memrq_n && !rd_wr_n) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
