// ftcp_stack_ctrl: pointer controller for one of the FTCP's two RAM stacks.
//
// The register-transfer description keeps a pointer for each stack (SP for
// the data stack, RSP for the return stack) that is incremented on a push,
// decremented on a pop, cleared by reset and used to sense overflow and
// underflow. A stack controller designed for the processor writes the RAM on
// a push, reads it on a pop, and refuses a push to a full stack (raising
// overflow) or a pop from an empty one (raising underflow). This module is a
// compact re-implementation of that behaviour.
//
// Convention (this design's choice): ptr counts the words held in the RAM. A
// push writes RAM[ptr] and increments ptr; a pop reads RAM[ptr-1] (the RAM
// read is asynchronous, so the word is available in the same cycle) and
// decrements ptr. The stack is full at ptr = 2**AW - 1, as in the controller
// this follows, whose 16-bit address counts to FFFF.
//
// Timing: push and pop are sampled on the rising clock edge. wr_en, wr_addr,
// rd_addr, overflow and underflow are combinational from the request and the
// pointer, so they are valid in the cycle of the request. rst_n is an
// asynchronous active-low reset of the pointer to zero.
module ftcp_stack_ctrl #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic          pop,
  output logic [AW-1:0] ptr,
  output logic          wr_en,      // write RAM[wr_addr] this edge
  output logic [AW-1:0] wr_addr,
  output logic [AW-1:0] rd_addr,    // word that a pop returns
  output logic          rd_valid,   // a pop is being carried out
  output logic          overflow,   // push refused: stack full
  output logic          underflow   // pop refused: stack empty
);

  logic full, empty;

  assign full      = (ptr == {AW{1'b1}});
  assign empty     = (ptr == '0);
  assign overflow  = push && full;
  assign underflow = pop && empty;
  assign wr_en     = push && !full;
  assign rd_valid  = pop && !empty;
  assign wr_addr   = ptr;
  assign rd_addr   = ptr - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ptr <= '0;
    else if (wr_en)    ptr <= ptr + 1'b1;
    else if (rd_valid) ptr <= ptr - 1'b1;
  end

  // The processor never pushes and pops the same stack in one cycle.
  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
