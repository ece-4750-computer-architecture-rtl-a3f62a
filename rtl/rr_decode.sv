// D-stage instruction decoder.
//
// Recognises RV32 add (R-type, funct7 0000000, funct3 000), addi (I-type,
// funct3 000) and mul (R-type, funct7 0000001, funct3 000) and produces the
// fields the rename logic needs: operation, immediate, destination and
// source specifiers with valid bits. Sources and destinations that name x0
// are marked not valid, so x0 is never renamed and always reads as zero.
// Anything else decodes with valid = 0. Purely combinational.
// The instruction subset is the lecture's; the use of the standard RV32
// encodings and the x0 handling are this design's choice.
module rr_decode
  import rr_pkg::*;
(
  input  logic [31:0] inst,
  output dec_t        dec
);
  logic [6:0] opc, f7;
  logic [2:0] f3;

  always_comb begin
    opc = inst[6:0];
    f3  = inst[14:12];
    f7  = inst[31:25];
    dec        = '0;
    dec.op     = OP_NONE;
    dec.rd     = inst[11:7];
    dec.rs1    = inst[19:15];
    dec.rs2    = inst[24:20];
    dec.imm    = {{20{inst[31]}}, inst[31:20]};
    if (opc == OPC_OP && f3 == 3'b000 && f7 == F7_ADD) begin
      dec.valid = 1'b1;  dec.op = OP_ADD;
    end else if (opc == OPC_OP && f3 == 3'b000 && f7 == F7_MULDIV) begin
      dec.valid = 1'b1;  dec.op = OP_MUL;
    end else if (opc == OPC_OP_IMM && f3 == 3'b000) begin
      dec.valid = 1'b1;  dec.op = OP_ADDI;  dec.imm_v = 1'b1;
    end
    dec.dest_v = dec.valid && (dec.rd  != 5'd0);
    dec.src0_v = dec.valid && (dec.rs1 != 5'd0);
    dec.src1_v = dec.valid && !dec.imm_v && (dec.rs2 != 5'd0);
    if (!dec.imm_v) dec.imm = '0;
  end
endmodule
