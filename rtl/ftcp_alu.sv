// ftcp_alu: the arithmetic and logic unit of the FTCP.
//
// Purely combinational. It works on the two top words of the data stack, TOS
// (operand b) and SOS (operand a), in 16-bit two's complement, and its result
// is written back into TOS by the data stack in the same clock edge.
//
//   ADD    a + b               SUB    a - b (SOS minus TOS)
//   MUL2   {b[15], b[13:0], 0} (2*: the sign bit is kept, bits shift up)
//   DIV2   {b[15], b[15:1]}    (2/: arithmetic shift right)
//   SHIFTR {0, b[15:1]}        (logical shift right)
//   NOT    ~b                  NAND ~(a & b)         XOR a ^ b
//   GT/LT/EQ  a > b, a < b, a == b, signed; -1 when true, 0 when false
//
// The operations and their bit-level definitions follow the processor's
// instruction set and register-transfer description; that 2* keeps the sign
// bit follows the register-transfer description of that instruction. The
// comparisons are signed because all arithmetic is stated to be two's
// complement; the encoding of the operation select is this design's own.
module ftcp_alu
  import ftcp_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,   // SOS
  input  word_t   b,   // TOS
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_MUL2:   y = {b[W-1], b[W-3:0], 1'b0};
      ALU_DIV2:   y = {b[W-1], b[W-1:1]};
      ALU_SHIFTR: y = {1'b0, b[W-1:1]};
      ALU_NOT:    y = ~b;
      ALU_NAND:   y = ~(a & b);
      ALU_XOR:    y = a ^ b;
      ALU_GT:     y = ($signed(a) >  $signed(b)) ? '1 : '0;
      ALU_LT:     y = ($signed(a) <  $signed(b)) ? '1 : '0;
      ALU_EQ:     y = (a == b) ? '1 : '0;
      default:    y = '0;
    endcase
  end

endmodule
