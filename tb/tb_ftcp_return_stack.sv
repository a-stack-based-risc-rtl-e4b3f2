// tb_ftcp_return_stack: random return stack operations (push from the data
// bus, pop, decrement) on a small stack (AW = 3) checked every cycle against
// a queue model of TOR and the words below it; tor_next and tor_zero are
// checked before each edge.
module tb_ftcp_return_stack;
  import ftcp_pkg::*;
  localparam int AW = 3;
  localparam int CAP = 2**AW - 1;

  logic clk = 0, rst_n = 0;
  rs_op_e op = RS_HOLD;
  logic [15:0] db = '0, tor, tor_next;
  logic tor_zero;
  logic [AW-1:0] rsp;
  logic overflow, underflow;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;
  logic [15:0] m_tor = 0;
  logic [15:0] m_ram [$];

  ftcp_return_stack #(.AW(AW)) dut (.*);

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
    rst_n = 1;
    chk(tor == 0 && rsp == 0, "reset clears TOR and RSP");
    for (int i = 0; i < 3000; i++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 99);
      if ((i / 300) % 2 == 0) op = (r < 60) ? RS_PUSH : rs_op_e'($urandom_range(0, 3));
      else                    op = (r < 60) ? RS_POP  : rs_op_e'($urandom_range(0, 3));
      db = (r % 7 == 0) ? 16'd0 : 16'($urandom_range(0, 3));
      #1;
      chk(tor_zero == (m_tor == 0), "tor_zero");
      chk(overflow  == (op == RS_PUSH && m_ram.size() == CAP), "overflow flag");
      chk(underflow == (op == RS_POP && m_ram.size() == 0), "underflow flag");
      if (overflow) n_ovf++;
      if (underflow) n_unf++;
      case (op)
        RS_PUSH: begin
          if (m_ram.size() < CAP) m_ram.push_back(m_tor);
          m_tor = db;
        end
        RS_POP: if (m_ram.size() > 0) m_tor = m_ram.pop_back();
        RS_DEC: m_tor = m_tor - 16'd1;
        default: ;
      endcase
      chk(tor_next == m_tor, "tor_next");
      @(posedge clk); #1;
      chk(tor == m_tor, $sformatf("TOR %h expected %h", tor, m_tor));
      chk(int'(rsp) == m_ram.size(), "RSP");
    end
    chk(n_ovf > 0 && n_unf > 0, "both limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
