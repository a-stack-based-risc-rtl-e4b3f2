// tb_ftcp_rom: loads a pattern through the load port and reads it back on the
// instruction bus, which must follow the address in the same cycle.
module tb_ftcp_rom;
  localparam int AW = 8;
  logic clk = 0, load_we = 0;
  logic [AW-1:0] addr = '0, load_addr = '0;
  logic [15:0] load_data = '0, ib;
  int checks = 0, failures = 0;

  ftcp_rom #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pat(input int a);
    return 16'(a * 16'h9E37 + 16'h1234);
  endfunction

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(a); load_data = pat(a);
    end
    @(negedge clk); load_we = 0;
    repeat (600) begin
      int a;
      a = $urandom_range(0, 2**AW - 1);
      addr = AW'(a);
      #1;
      checks++;
      if (ib != pat(a)) begin failures++; $display("FAIL: addr %0d", a); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
