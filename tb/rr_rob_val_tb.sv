// Testbench of rr_rob_val: random allocation, out-of-order writeback of
// values and in-order commit, checked against a queue model: the head
// commits in allocation order with its areg, dest_v and the value written
// back, its index is the id handed out at allocation, and the read ports
// return the value written back into an entry.
module rr_rob_val_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        alloc = 1'b0, alloc_dest_v, full, wb_en = 1'b0, commit, empty;
  logic        head_ready, head_dest_v;
  logic [4:0]  alloc_areg, head_areg;
  logic [1:0]  alloc_idx, wb_idx, head_idx;
  logic [31:0] wb_value, head_value;
  logic [1:0]  rd_idx [2];
  logic [31:0] rd_value [2];
  typedef struct { logic [1:0] idx; logic dv; logic [4:0] a; logic done; logic [31:0] v; } e_t;
  e_t q [$];
  int checks = 0, failures = 0, n_commit = 0, n_rd = 0;
  rr_rob_val #(.ROB_ENTRIES(4)) dut (.clk, .rst, .alloc, .alloc_dest_v, .alloc_areg, .full,
    .alloc_idx, .wb_en, .wb_idx, .wb_value, .rd_idx, .rd_value, .head_ready, .head_dest_v,
    .head_areg, .head_value, .head_idx, .commit, .empty);
  logic cm_en;
  assign commit = head_ready && cm_en;

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 3000; i++) begin
      int pend [$];
      logic [1:0] aidx;
      pend.delete();
      alloc = !full && ($urandom_range(2) != 0);
      alloc_dest_v = $urandom_range(1); alloc_areg = 5'($urandom);
      foreach (q[k]) if (!q[k].done) pend.push_back(k);
      wb_en = pend.size() > 0 && ($urandom_range(1) == 1);
      wb_value = $urandom;
      if (wb_en) wb_idx = q[pend[$urandom_range(pend.size() - 1)]].idx;
      cm_en = ($urandom_range(3) != 0);
      rd_idx[0] = 2'($urandom); rd_idx[1] = 2'($urandom);
      #1;
      checks++;
      if (full != (q.size() == 4) || empty != (q.size() == 0)) begin failures++; $display("FAIL full/empty"); end
      foreach (q[k]) for (int r = 0; r < 2; r++)
        if (q[k].done && q[k].idx == rd_idx[r]) begin
          checks++; n_rd++;
          if (rd_value[r] != q[k].v) begin failures++; $display("FAIL read port"); end
        end
      if (q.size() > 0) begin
        checks++;
        if (head_ready != q[0].done || head_idx != q[0].idx) begin failures++; $display("FAIL head"); end
        else if (head_ready && (head_value != q[0].v || head_areg != q[0].a || head_dest_v != q[0].dv)) begin
          failures++; $display("FAIL head fields");
        end
      end
      aidx = alloc_idx;
      @(posedge clk);
      if (commit) begin void'(q.pop_front()); n_commit++; end
      foreach (q[k]) if (wb_en && q[k].idx == wb_idx) begin q[k].done = 1'b1; q[k].v = wb_value; end
      if (alloc) q.push_back('{aidx, alloc_dest_v, alloc_areg, 1'b0, 32'd0});
      #1;
    end
    checks++;
    if (n_commit < 100 || n_rd == 0) begin failures++; $display("FAIL too few commits or reads"); end
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
