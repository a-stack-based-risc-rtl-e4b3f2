// tb_ftcp_stack_ram: writes random words to random addresses of a stack RAM
// and reads them back through the asynchronous port against a model array.
module tb_ftcp_stack_ram;
  localparam int AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [2**AW];
  bit written [2**AW];
  int checks = 0, failures = 0;

  ftcp_stack_ram #(.AW(AW), .DW(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 16'($urandom);
      model[i] = wdata; written[i] = 1;
    end
    repeat (2000) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      waddr = AW'($urandom); wdata = 16'($urandom);
      raddr = AW'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", raddr, rdata, model[raddr]);
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
