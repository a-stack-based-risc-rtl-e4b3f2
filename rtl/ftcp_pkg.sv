// ftcp_pkg: shared widths, op-codes and control-word types of the FTCP, a
// 16-bit dual-stack processor that executes a core subset of Forth.
//
// The op-code map is the sample assignment given for the processor: bit 15 set
// marks a subroutine call whose 16-bit op-code is itself the (upper-half)
// subroutine address, 010/011 in bits 15..13 mark store/fetch with a 13-bit
// data address, 0001 in bits 15..12 marks LOOP (bit 11 = 0) and IF (bit 11 = 1)
// with an 11-bit two's complement offset, and the remaining instructions are
// small constants. The control-word layout below is this design's own: it is
// what the control register holds for the instruction being executed.
package ftcp_pkg;

  localparam int unsigned W        = 16;  // datapath and op-code width
  localparam int unsigned DADDR_W  = 13;  // data address field of ! and @
  localparam int unsigned OFFSET_W = 11;  // IF/LOOP offset field

  typedef logic [W-1:0] word_t;

  // Fixed op-codes (everything but CALL, !, @, IF, LOOP).
  localparam word_t OP_NOP    = 16'h0000;
  localparam word_t OP_DUP    = 16'h0001;
  localparam word_t OP_DROP   = 16'h0002;
  localparam word_t OP_SWAP   = 16'h0003;
  localparam word_t OP_TOR    = 16'h0004;  // >R
  localparam word_t OP_FROMR  = 16'h0005;  // R>
  localparam word_t OP_ADD    = 16'h0007;
  localparam word_t OP_SUB    = 16'h0008;
  localparam word_t OP_MUL2   = 16'h0009;  // 2*
  localparam word_t OP_DIV2   = 16'h000A;  // 2/
  localparam word_t OP_SHIFTR = 16'h000B;
  localparam word_t OP_NOT    = 16'h000C;
  localparam word_t OP_NAND   = 16'h000D;
  localparam word_t OP_XOR    = 16'h000E;
  localparam word_t OP_GT     = 16'h000F;
  localparam word_t OP_LT     = 16'h0010;
  localparam word_t OP_EQ     = 16'h0011;
  localparam word_t OP_RETURN = 16'h0012;
  localparam word_t OP_DO     = 16'h0013;
  localparam word_t OP_EI     = 16'h0014;
  localparam word_t OP_DI     = 16'h0015;
  localparam word_t OP_ENTER  = 16'h0400;

  // Format prefixes of the instructions that carry a field.
  localparam logic [2:0] PFX_STORE = 3'b010;  // 010A AAAA AAAA AAAA
  localparam logic [2:0] PFX_FETCH = 3'b011;  // 011A AAAA AAAA AAAA
  localparam logic [4:0] PFX_LOOP  = 5'b00010; // 0001 0JJJ JJJJ JJJJ
  localparam logic [4:0] PFX_IF    = 5'b00011; // 0001 1JJJ JJJJ JJJJ

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_MUL2, ALU_DIV2, ALU_SHIFTR,
    ALU_NOT, ALU_NAND, ALU_XOR, ALU_GT, ALU_LT, ALU_EQ
  } alu_op_e;

  // Data stack operation on TOS/SOS and the stack RAM below them.
  typedef enum logic [2:0] {
    DS_HOLD,  // nothing changes
    DS_LOAD,  // TOS <= new value, depth unchanged
    DS_PUSH,  // SOS -> RAM, TOS -> SOS, new value -> TOS
    DS_POP,   // new value -> TOS, RAM -> SOS
    DS_DROP,  // SOS -> TOS, RAM -> SOS
    DS_SWAP   // TOS <-> SOS
  } ds_op_e;

  // Source of the new TOS value.
  typedef enum logic [1:0] { TS_ALU, TS_DB, TS_TOS } tos_sel_e;

  // Return stack operation on TOR and the return stack RAM.
  typedef enum logic [1:0] {
    RS_HOLD,
    RS_PUSH,  // TOR -> RAM, data bus -> TOR
    RS_POP,   // RAM -> TOR
    RS_DEC    // TOR - 1 -> TOR
  } rs_op_e;

  // Driver of the internal data bus.
  typedef enum logic [2:0] { DB_EXT, DB_TOS, DB_TOR, DB_PCS, DB_PC, DB_IB } db_sel_e;

  // Next-PC sources; PC_OFFSET with a zero offset holds the PC.
  typedef enum logic [2:0] { PC_INC, PC_OFFSET, PC_TOR, PC_DB, PC_IB } pc_sel_e;

  // Branch kind of the executing instruction.
  typedef enum logic [1:0] { BR_NONE, BR_IF, BR_LOOP } br_e;

  // Interrupt state machine, encodings as in the register-transfer description
  // (normal processing is 000).
  typedef enum logic [2:0] {
    IS_NORMAL = 3'b000,  // normal processing
    IS_WAIT   = 3'b001,  // IF/LOOP in the pipeline: wait one cycle
    IS_INHIBIT= 3'b010,  // empty the pipeline, inhibit the PC
    IS_SAVE   = 3'b011,  // push PC onto the return stack
    IS_VECTOR = 3'b111   // INTACK low, latch the vector from the data bus
  } int_state_e;

  // Control word held in the control register for the executing instruction.
  typedef struct packed {
    ds_op_e             ds_op;
    tos_sel_e           tos_sel;
    alu_op_e            alu_op;
    rs_op_e             rs_op;     // for LOOP the control picks POP or DEC
    db_sel_e            db_sel;
    br_e                branch;
    logic [OFFSET_W-1:0] offset;
    logic               mem;       // ! or @: first cycle drives the data address
    logic               mem_read;  // @ (1) or ! (0)
    logic [DADDR_W-1:0] daddr;
    logic               two_cycle; // !, @, ENTER: next control word comes from NR
    logic               is_enter;
    logic               ei;
    logic               di;
  } ctrl_t;

endpackage
