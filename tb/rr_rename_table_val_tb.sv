// Testbench of rr_rename_table_val: after reset no entry is valid; random
// renames, writebacks and commits are mirrored in a model (rename wins over
// both; writeback clears p and commit clears v only where the entry still
// points at that ROB id). Both source lookups are checked every cycle.
module rr_rename_table_val_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [4:0] rs1, rs2, ren_areg, cm_areg;
  logic       src0_v, src0_p, src1_v, src1_p;
  logic       ren_en = 1'b0, wb_en = 1'b0, cm_en = 1'b0;
  logic [1:0] src0_tag, src1_tag, ren_tag, wb_tag, cm_tag;
  logic       mv [32], mp [32];
  logic [1:0] mt [32];
  int checks = 0, failures = 0, n_clear = 0;
  rr_rename_table_val #(.ROB_ENTRIES(4)) dut (.clk, .rst, .rs1, .rs2, .src0_v, .src0_p,
    .src0_tag, .src1_v, .src1_p, .src1_tag, .ren_en, .ren_areg, .ren_tag, .wb_en, .wb_tag,
    .cm_en, .cm_areg, .cm_tag);

  task automatic chk(logic [4:0] a, logic v, logic p, logic [1:0] t);
    logic ev, ep;
    ev = mv[a] && a != 0;
    ep = mp[a] && !(wb_en && wb_tag == mt[a]);
    checks++;
    if (v != ev || (ev && (p != ep || t != mt[a]))) begin
      failures++; $display("FAIL x%0d: v%0d p%0d t%0d", a, v, p, t);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 32; i++) begin mv[i] = 1'b0; mp[i] = 1'b0; mt[i] = '0; end
    for (int i = 0; i < 3000; i++) begin
      ren_en = $urandom_range(1); ren_areg = 5'($urandom_range(1, 6)); ren_tag = 2'($urandom);
      wb_en = $urandom_range(1);  wb_tag = 2'($urandom);
      cm_en = $urandom_range(1);  cm_areg = 5'($urandom_range(1, 6)); cm_tag = mt[cm_areg] ^ 2'($urandom_range(1) * 2);
      rs1 = 5'($urandom_range(6)); rs2 = 5'($urandom_range(6));
      #1;
      chk(rs1, src0_v, src0_p, src0_tag);
      chk(rs2, src1_v, src1_p, src1_tag);
      @(posedge clk);
      for (int a = 1; a < 32; a++) if (wb_en && mv[a] && mt[a] == wb_tag) mp[a] = 1'b0;
      if (cm_en && mv[cm_areg] && mt[cm_areg] == cm_tag) begin mv[cm_areg] = 1'b0; n_clear++; end
      if (ren_en) begin mv[ren_areg] = 1'b1; mp[ren_areg] = 1'b1; mt[ren_areg] = ren_tag; end
      #1;
    end
    checks++;
    if (n_clear == 0) begin failures++; $display("FAIL no commit clear"); end
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
