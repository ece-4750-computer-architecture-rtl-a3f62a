// Shared types and constants of the register-renaming cores.
//
// The cores execute a three-instruction subset of RV32: add, addi and mul
// (the low 32 bits of the product). add and addi run in the single-cycle X
// pipe, mul in the four-stage Y pipe. Architectural register x0 reads as zero
// and is never renamed; an instruction whose destination is x0 still flows
// through the pipeline and the ROB but allocates no physical register.
// The instruction encodings are the standard RV32I/RV32M ones; the
// instruction subset and the X/Y pipe split follow the lecture's design.
package rr_pkg;

  localparam int XLEN   = 32;
  localparam int NAREGS = 32;

  // Cycles from the I stage to the W stage for each pipe: I -> X -> W and
  // I -> Y0 -> Y1 -> Y2 -> Y3 -> W.
  localparam int LAT_X = 2;
  localparam int LAT_Y = 5;

  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,
    OP_ADDI = 2'd1,
    OP_MUL  = 2'd2,
    OP_NONE = 2'd3
  } op_e;

  // RV32 encodings
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;
  localparam logic [6:0] F7_ADD     = 7'b0000000;
  localparam logic [6:0] F7_MULDIV  = 7'b0000001;

  typedef struct packed {
    logic             valid;    // a supported instruction
    op_e              op;
    logic             imm_v;    // second operand is the immediate
    logic [XLEN-1:0]  imm;
    logic             dest_v;   // writes a register (rd != x0)
    logic [4:0]       rd;
    logic             src0_v;   // reads rs1 (rs1 != x0)
    logic [4:0]       rs1;
    logic             src1_v;   // reads rs2 (register form, rs2 != x0)
    logic [4:0]       rs2;
  } dec_t;

  function automatic logic is_y_op(op_e op);
    return op == OP_MUL;
  endfunction

endpackage
