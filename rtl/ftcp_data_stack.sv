// ftcp_data_stack: the FTCP data stack - the on-chip top-of-stack (TOS) and
// second-of-stack (SOS) registers, the stack RAM below them and its pointer SP.
//
// The ALU reads TOS and SOS; every data stack effect of the instruction set is
// one of these operations, carried out on the rising clock edge:
//
//   DS_HOLD  nothing changes
//   DS_LOAD  TOS <= new                      (2*, 2/, SHIFTR, NOT)
//   DS_PUSH  RAM <= SOS, SOS <= TOS, TOS <= new  (DUP, R>, @, ENTER)
//   DS_POP   TOS <= new, SOS <= RAM          (+, -, NAND, XOR, comparisons)
//   DS_DROP  TOS <= SOS, SOS <= RAM          (DROP, >R, DO, IF, !)
//   DS_SWAP  TOS <-> SOS                     (SWAP)
//
// "new" is chosen by tos_sel: the ALU result, the internal data bus, or TOS
// itself (DUP). TOS, SOS and SP are cleared by the active-low asynchronous
// reset, as the processor's reset description requires.
//
// The split of every instruction into these six operations is this design's
// reading of the register-transfer description. A push onto a full RAM or a
// pop from an empty one is refused by the pointer controller (overflow /
// underflow pulse for that cycle): the RAM and SP are left as they are, the
// registers still move (on a refused pop SOS keeps its value), and it is up to
// the program to avoid it, as the description leaves overflow to be sensed.
module ftcp_data_stack
  import ftcp_pkg::*;
#(
  parameter int unsigned AW = 16   // stack RAM holds 2**AW - 1 words
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ds_op_e        op,
  input  tos_sel_e      tos_sel,
  input  word_t         alu_y,
  input  word_t         db,
  output word_t         tos,
  output word_t         sos,
  output logic [AW-1:0] sp,
  output logic          overflow,
  output logic          underflow
);

  word_t new_tos, ram_q;
  logic push, pop, we, rd_valid;
  logic [AW-1:0] waddr, raddr;

  always_comb begin
    unique case (tos_sel)
      TS_ALU:  new_tos = alu_y;
      TS_DB:   new_tos = db;
      default: new_tos = tos;
    endcase
  end

  assign push = (op == DS_PUSH);
  assign pop  = (op == DS_POP) || (op == DS_DROP);

  ftcp_stack_ctrl #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .push, .pop,
    .ptr(sp), .wr_en(we), .wr_addr(waddr), .rd_addr(raddr), .rd_valid,
    .overflow, .underflow
  );

  ftcp_stack_ram #(.AW(AW), .DW(W)) u_ram (
    .clk, .we, .waddr, .wdata(sos), .raddr, .rdata(ram_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos <= '0;
      sos <= '0;
    end else begin
      unique case (op)
        DS_LOAD: tos <= new_tos;
        DS_PUSH: begin
          tos <= new_tos;
          sos <= tos;
        end
        DS_POP: begin
          tos <= new_tos;
          if (rd_valid) sos <= ram_q;
        end
        DS_DROP: begin
          tos <= sos;
          if (rd_valid) sos <= ram_q;
        end
        DS_SWAP: begin
          tos <= sos;
          sos <= tos;
        end
        default: ;
      endcase
    end
  end

endmodule
