// ftcp_tb_pkg: op-code builders shared by the FTCP testbenches.
//
// Each function returns the 16-bit op-code of one instruction with its field
// filled in, written out from the op-code formats independently of the RTL
// decoder: CALL = 1AAA..., ! = 010A..., @ = 011A..., IF = 0001 1J...,
// LOOP = 0001 0J..., ENTER = 0000 0100 0000 0000 followed by its literal.
package ftcp_tb_pkg;

  function automatic logic [15:0] t_call(input logic [15:0] target);
    return {1'b1, target[14:0]};
  endfunction

  function automatic logic [15:0] t_store(input logic [12:0] a);
    return {3'b010, a};
  endfunction

  function automatic logic [15:0] t_fetch(input logic [12:0] a);
    return {3'b011, a};
  endfunction

  // Offsets are counted from the word after the IF/LOOP (its NOP slot).
  function automatic logic [15:0] t_if(input int off);
    logic [10:0] j = 11'(off);
    return {5'b00011, j};
  endfunction

  function automatic logic [15:0] t_loop(input int off);
    logic [10:0] j = 11'(off);
    return {5'b00010, j};
  endfunction

  localparam logic [15:0] T_NOP    = 16'h0000;
  localparam logic [15:0] T_DUP    = 16'h0001;
  localparam logic [15:0] T_DROP   = 16'h0002;
  localparam logic [15:0] T_SWAP   = 16'h0003;
  localparam logic [15:0] T_TOR    = 16'h0004;
  localparam logic [15:0] T_FROMR  = 16'h0005;
  localparam logic [15:0] T_ADD    = 16'h0007;
  localparam logic [15:0] T_SUB    = 16'h0008;
  localparam logic [15:0] T_MUL2   = 16'h0009;
  localparam logic [15:0] T_DIV2   = 16'h000A;
  localparam logic [15:0] T_SHIFTR = 16'h000B;
  localparam logic [15:0] T_NOT    = 16'h000C;
  localparam logic [15:0] T_NAND   = 16'h000D;
  localparam logic [15:0] T_XOR    = 16'h000E;
  localparam logic [15:0] T_GT     = 16'h000F;
  localparam logic [15:0] T_LT     = 16'h0010;
  localparam logic [15:0] T_EQ     = 16'h0011;
  localparam logic [15:0] T_RETURN = 16'h0012;
  localparam logic [15:0] T_DO     = 16'h0013;
  localparam logic [15:0] T_EI     = 16'h0014;
  localparam logic [15:0] T_DI     = 16'h0015;
  localparam logic [15:0] T_ENTER  = 16'h0400;

endpackage
