// Testbench of rr_rename_table: reset mapping xi -> p(i-1) with nothing
// pending; then random renames and writebacks are mirrored in a model.
// Checked every cycle: both source lookups (pending bit and preg, with a
// same-cycle writeback already seen as done) and old_preg.
module rr_rename_table_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [4:0] rs1, rs2, ren_areg;
  logic       src0_p, src1_p, ren_en = 1'b0, wb_en = 1'b0;
  logic [5:0] src0_preg, src1_preg, ren_preg, old_preg, wb_preg;
  logic [31:0] pend_bits;
  logic       mp [32];
  logic [5:0] mpreg [32];
  int checks = 0, failures = 0, n_fwd = 0;
  rr_rename_table #(.NUM_PREGS(64)) dut (.clk, .rst, .rs1, .rs2, .src0_p, .src0_preg,
    .src1_p, .src1_preg, .ren_en, .ren_areg, .ren_preg, .old_preg, .wb_en, .wb_preg, .pend_bits);

  function automatic logic exp_p(logic [4:0] a);
    return mp[a] && !(wb_en && wb_preg == mpreg[a]);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 32; i++) begin mp[i] = 1'b0; mpreg[i] = (i == 0) ? 6'd0 : 6'(i - 1); end
    for (int i = 0; i < 3000; i++) begin
      ren_en = $urandom_range(1); ren_areg = 5'($urandom_range(1, 7)); ren_preg = 6'($urandom);
      rs1 = 5'($urandom_range(7)); rs2 = 5'($urandom_range(7));
      wb_en = $urandom_range(1);
      wb_preg = mpreg[$urandom_range(1, 7)];      // mostly a mapped register
      #1;
      checks += 3;
      if (src0_p != exp_p(rs1) || src0_preg != mpreg[rs1]) begin failures++; $display("FAIL src0 x%0d", rs1); end
      if (src1_p != exp_p(rs2) || src1_preg != mpreg[rs2]) begin failures++; $display("FAIL src1 x%0d", rs2); end
      if (old_preg != mpreg[ren_areg]) begin failures++; $display("FAIL old_preg"); end
      n_fwd += int'(mp[rs1] && !exp_p(rs1));
      @(posedge clk);
      for (int a = 1; a < 32; a++) if (wb_en && mpreg[a] == wb_preg) mp[a] = 1'b0;
      if (ren_en) begin mp[ren_areg] = 1'b1; mpreg[ren_areg] = ren_preg; end
      #1;
    end
    checks++;
    if (n_fwd == 0) begin failures++; $display("FAIL no same-cycle writeback seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
