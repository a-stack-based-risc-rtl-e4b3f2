// tb_ftcp_data_stack: random data stack operations on a small stack
// (AW = 3: TOS, SOS and seven RAM words) checked every cycle against a
// queue-based model of TOS, SOS and the words below them, including refused
// pushes at full and refused pops at empty.
module tb_ftcp_data_stack;
  import ftcp_pkg::*;
  localparam int AW = 3;
  localparam int CAP = 2**AW - 1;

  logic clk = 0, rst_n = 0;
  ds_op_e op = DS_HOLD;
  tos_sel_e tos_sel = TS_ALU;
  logic [15:0] alu_y = '0, db = '0, tos, sos;
  logic [AW-1:0] sp;
  logic overflow, underflow;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;

  logic [15:0] m_tos = 0, m_sos = 0;
  logic [15:0] m_ram [$];

  ftcp_data_stack #(.AW(AW)) dut (.*);

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
    chk(tos == 0 && sos == 0 && sp == 0, "reset clears TOS, SOS, SP");
    repeat (3000) begin
      logic [15:0] nv;
      int r;
      @(negedge clk);
      r = $urandom_range(0, 99);
      // Bias towards pushes or pops in phases so both limits are reached.
      if ((checks / 400) % 2 == 0) op = (r < 60) ? DS_PUSH : ds_op_e'($urandom_range(0, 5));
      else                         op = (r < 60) ? ((r < 30) ? DS_POP : DS_DROP) : ds_op_e'($urandom_range(0, 5));
      tos_sel = tos_sel_e'($urandom_range(0, 2));
      alu_y = 16'($urandom); db = 16'($urandom);
      #1;
      nv = (tos_sel == TS_ALU) ? alu_y : (tos_sel == TS_DB) ? db : m_tos;
      chk(overflow  == (op == DS_PUSH && m_ram.size() == CAP), "overflow flag");
      chk(underflow == ((op == DS_POP || op == DS_DROP) && m_ram.size() == 0), "underflow flag");
      if (overflow) n_ovf++;
      if (underflow) n_unf++;
      case (op)
        DS_LOAD: m_tos = nv;
        DS_PUSH: begin
          if (m_ram.size() < CAP) m_ram.push_back(m_sos);
          m_sos = m_tos; m_tos = nv;
        end
        DS_POP: begin
          m_tos = nv;
          if (m_ram.size() > 0) m_sos = m_ram.pop_back();
        end
        DS_DROP: begin
          m_tos = m_sos;
          if (m_ram.size() > 0) m_sos = m_ram.pop_back();
        end
        DS_SWAP: begin
          logic [15:0] t;
          t = m_tos;
          m_tos = m_sos; m_sos = t;
        end
        default: ;
      endcase
      @(posedge clk); #1;
      chk(tos == m_tos, $sformatf("TOS %h expected %h", tos, m_tos));
      chk(sos == m_sos, $sformatf("SOS %h expected %h", sos, m_sos));
      chk(int'(sp) == m_ram.size(), "SP");
    end
    chk(n_ovf > 0 && n_unf > 0, "both limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
