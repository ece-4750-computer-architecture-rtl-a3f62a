// Testbench of rr_decode: random add, addi and mul words and unsupported
// words; each decoded field is compared with the value taken directly from
// the generator's choices.
module rr_decode_tb;
  import rr_pkg::*;
  import rr_tb_pkg::*;
  logic [31:0] inst;
  dec_t        dec;
  int checks = 0, failures = 0;
  rr_decode dut (.inst, .dec);

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s inst=%h", what, inst); end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int k, rd, rs1, rs2, imm;
      k = $urandom_range(3); rd = $urandom_range(31); rs1 = $urandom_range(31);
      rs2 = $urandom_range(31); imm = int'($urandom_range(4095)) - 2048;
      case (k)
        0: inst = enc_add(rd, rs1, rs2);
        1: inst = enc_addi(rd, rs1, imm);
        2: inst = enc_mul(rd, rs1, rs2);
        default: inst = {7'b0100000, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011}; // sub
      endcase
      #1;
      chk(dec.valid == (k != 3), "valid");
      if (k != 3) begin
        chk(dec.op == (k == 0 ? OP_ADD : k == 1 ? OP_ADDI : OP_MUL), "op");
        chk(dec.rd == 5'(rd) && dec.dest_v == (rd != 0), "rd");
        chk(dec.rs1 == 5'(rs1) && dec.src0_v == (rs1 != 0), "rs1");
        chk(dec.imm_v == (k == 1), "imm_v");
        if (k == 1) chk(dec.imm == 32'(imm) && !dec.src1_v, "imm");
        else        chk(dec.rs2 == 5'(rs2) && dec.src1_v == (rs2 != 0), "rs2");
      end else begin
        chk(!dec.dest_v && !dec.src0_v && !dec.src1_v, "unsupported has no registers");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
