// ftcp_return_stack: the FTCP return stack - the on-chip top-of-return-stack
// register (TOR) with its decrementer, the return stack RAM below it and its
// pointer RSP.
//
// The return stack keeps subroutine and interrupt return addresses, serves as
// temporary storage (>R, R>) and as the down-counter of DO ... LOOP. Its
// operations, carried out on the rising clock edge:
//
//   RS_HOLD  nothing changes
//   RS_PUSH  RAM <= TOR, TOR <= data bus   (CALL, >R, DO, interrupt entry)
//   RS_POP   TOR <= RAM                    (RETURN, R>, LOOP at count zero)
//   RS_DEC   TOR <= TOR - 1                (LOOP with a non-zero count)
//
// TOR is loaded only from the data bus and feeds the data bus, the next-PC
// multiplexer and the loop test, as in the processor's block diagram. TOR
// and RSP are cleared by the active-low asynchronous reset. A refused push
// (overflow) or pop (underflow) leaves the RAM and RSP alone; on a refused
// pop TOR keeps its value. Those two details are this design's choice, as is
// the tor_next output: the value TOR will hold after the current edge, which
// the PC logic uses for a RETURN that directly follows an instruction that
// changes TOR (for example R> RETURN).
module ftcp_return_stack
  import ftcp_pkg::*;
#(
  parameter int unsigned AW = 16   // stack RAM holds 2**AW - 1 words
) (
  input  logic          clk,
  input  logic          rst_n,
  input  rs_op_e        op,
  input  word_t         db,
  output word_t         tor,
  output word_t         tor_next,  // value TOR takes at the next edge
  output logic          tor_zero,
  output logic [AW-1:0] rsp,
  output logic          overflow,
  output logic          underflow
);

  word_t ram_q;
  logic push, pop, we, rd_valid;
  logic [AW-1:0] waddr, raddr;

  assign push     = (op == RS_PUSH);
  assign pop      = (op == RS_POP);
  assign tor_zero = (tor == '0);

  ftcp_stack_ctrl #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .push, .pop,
    .ptr(rsp), .wr_en(we), .wr_addr(waddr), .rd_addr(raddr), .rd_valid,
    .overflow, .underflow
  );

  ftcp_stack_ram #(.AW(AW), .DW(W)) u_ram (
    .clk, .we, .waddr, .wdata(tor), .raddr, .rdata(ram_q)
  );

  always_comb begin
    unique case (op)
      RS_PUSH: tor_next = db;
      RS_POP:  tor_next = rd_valid ? ram_q : tor;
      RS_DEC:  tor_next = tor - 1'b1;
      default: tor_next = tor;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tor <= '0;
    else        tor <= tor_next;
  end

endmodule
