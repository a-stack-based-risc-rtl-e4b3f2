// tb_ftcp_alu: random and corner-case test of the FTCP ALU against a
// reference written from the instruction definitions (a = SOS, b = TOS).
module tb_ftcp_alu;
  import ftcp_pkg::*;

  alu_op_e     op;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 0;

  ftcp_alu dut (.op, .a, .b, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_y(input alu_op_e o, input logic [15:0] sa, sb);
    int ia = int'($signed(sa)), ib = int'($signed(sb));
    case (o)
      ALU_ADD:    return 16'(ia + ib);
      ALU_SUB:    return 16'(ia - ib);
      ALU_MUL2:   return (sb & 16'h8000) | ((sb << 1) & 16'h7FFF);
      ALU_DIV2:   return 16'(ib >>> 1);
      ALU_SHIFTR: return sb >> 1;
      ALU_NOT:    return 16'hFFFF ^ sb;
      ALU_NAND:   return 16'hFFFF ^ (sa & sb);
      ALU_XOR:    return sa ^ sb;
      ALU_GT:     return (ia > ib)  ? 16'hFFFF : 16'h0000;
      ALU_LT:     return (ia < ib)  ? 16'hFFFF : 16'h0000;
      ALU_EQ:     return (ia == ib) ? 16'hFFFF : 16'h0000;
      default:    return 16'h0000;
    endcase
  endfunction

  task automatic apply(input alu_op_e o, input logic [15:0] sa, sb);
    logic [15:0] e;
    op = o; a = sa; b = sb;
    #1;
    e = ref_y(o, sa, sb);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL: op=%0d a=%h b=%h y=%h expected %h", o, sa, sb, y, e);
    end
  endtask

  localparam logic [15:0] CORNER [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h4000};

  initial begin
    for (int o = 0; o <= int'(ALU_EQ); o++) begin
      foreach (CORNER[i]) foreach (CORNER[j]) apply(alu_op_e'(o), CORNER[i], CORNER[j]);
      repeat (500) apply(alu_op_e'(o), 16'($urandom), 16'($urandom));
    end
    // Hand-worked cases from the instruction descriptions.
    apply(ALU_MUL2, 16'h0000, 16'hFFFD);   // -3 * 2 = -6
    checks++; if (y != 16'hFFFA) failures++;
    apply(ALU_DIV2, 16'h0000, 16'hFFF9);   // -7 / 2 -> -4 (arithmetic)
    checks++; if (y != 16'hFFFC) failures++;
    apply(ALU_SUB,  16'd10, 16'd3);        // SOS - TOS
    checks++; if (y != 16'd7) failures++;
    apply(ALU_GT,   16'hFFFF, 16'h0001);   // -1 > 1 is false
    checks++; if (y != 16'h0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
