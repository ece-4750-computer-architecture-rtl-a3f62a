// Testbench helpers: RV32 encoders for add, addi and mul, a sequential
// reference model of the three instructions, and program generators.
// The reference model executes one instruction at a time in program order,
// so it shows what the architectural registers must hold after the cores,
// which issue and write back out of order, have committed everything.
package rr_tb_pkg;

  function automatic logic [31:0] enc_add(int rd, int rs1, int rs2);
    return {7'b0000000, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] enc_mul(int rd, int rs1, int rs2);
    return {7'b0000001, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] enc_addi(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), 7'b0010011};
  endfunction

  // Reference model: one architectural register file.
  class ref_model;
    logic [31:0] x [32];
    function new();
      foreach (x[i]) x[i] = '0;
    endfunction
    function void exec(logic [31:0] inst);
      logic [4:0]  rd, rs1, rs2;
      logic [31:0] a, b, r;
      logic        ok;
      rd  = inst[11:7];  rs1 = inst[19:15];  rs2 = inst[24:20];
      a   = x[rs1];      b   = x[rs2];
      ok  = 1'b1;
      if (inst[6:0] == 7'b0010011 && inst[14:12] == 3'b000)
        r = a + {{20{inst[31]}}, inst[31:20]};
      else if (inst[6:0] == 7'b0110011 && inst[14:12] == 3'b000 && inst[31:25] == 7'b0)
        r = a + b;
      else if (inst[6:0] == 7'b0110011 && inst[14:12] == 3'b000 && inst[31:25] == 7'b1)
        r = 32'(64'(a) * 64'(b));
      else
        ok = 1'b0;
      if (ok && rd != 0) x[rd] = r;
    endfunction
  endclass

  // The lecture's example: x2=1, x3=2, x5=4, x7=5 set up with addi, then
  //   a: mul x1,x2,x3   b: mul x4,x1,x5   c: addi x6,x4,1   d: addi x4,x7,1
  function automatic void example_prog(ref logic [31:0] p [$]);
    p.push_back(enc_addi(2, 0, 1));
    p.push_back(enc_addi(3, 0, 2));
    p.push_back(enc_addi(5, 0, 4));
    p.push_back(enc_addi(7, 0, 5));
    p.push_back(enc_mul (1, 2, 3));
    p.push_back(enc_mul (4, 1, 5));
    p.push_back(enc_addi(6, 4, 1));
    p.push_back(enc_addi(4, 7, 1));
  endfunction

  // Random instructions over registers x0..x(nregs-1), so that RAW, WAW and
  // WAR hazards are frequent; one in twenty words is not a supported
  // instruction and must be ignored.
  function automatic void random_prog(ref logic [31:0] p [$], input int n, input int nregs);
    for (int i = 0; i < n; i++) begin
      int rd, rs1, rs2, k;
      rd  = $urandom_range(nregs - 1);
      rs1 = $urandom_range(nregs - 1);
      rs2 = $urandom_range(nregs - 1);
      k   = $urandom_range(19);
      if (k == 0)      p.push_back(32'h0000_6033);          // funct3 110: unsupported
      else if (k < 8)  p.push_back(enc_mul(rd, rs1, rs2));
      else if (k < 14) p.push_back(enc_add(rd, rs1, rs2));
      else             p.push_back(enc_addi(rd, rs1, int'($urandom_range(4095)) - 2048));
    end
  endfunction

endpackage
