// Testbench of rr_rob_ptr: random allocation (when not full), writeback of
// random pending entries in any order, and commit whenever the head is
// ready. A queue model checks that entries commit in allocation order with
// the preg, areg, ppreg and dest_v they were given, that the head is never
// ready before its writeback, and that full and empty match the count.
module rr_rob_ptr_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic       alloc = 1'b0, alloc_dest_v, full, wb_en = 1'b0, commit, empty;
  logic       head_ready, head_dest_v;
  logic [5:0] alloc_preg, alloc_ppreg, head_preg, head_ppreg;
  logic [4:0] alloc_areg, head_areg;
  logic [1:0] alloc_idx, wb_idx;
  typedef struct { logic [1:0] idx; logic dv; logic [5:0] p, pp; logic [4:0] a; logic done; } e_t;
  e_t q [$];
  int checks = 0, failures = 0, n_commit = 0, n_full = 0;
  rr_rob_ptr #(.ROB_ENTRIES(4), .NUM_PREGS(64)) dut (.clk, .rst, .alloc, .alloc_dest_v,
    .alloc_preg, .alloc_areg, .alloc_ppreg, .full, .alloc_idx, .wb_en, .wb_idx,
    .head_ready, .head_dest_v, .head_preg, .head_areg, .head_ppreg, .commit, .empty);
  assign commit = head_ready;

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 3000; i++) begin
      int pend [$];
      logic [1:0] aidx;
      pend.delete();
      alloc = !full && ($urandom_range(2) != 0);
      alloc_dest_v = $urandom_range(1); alloc_preg = 6'($urandom);
      alloc_areg = 5'($urandom); alloc_ppreg = 6'($urandom);
      foreach (q[k]) if (!q[k].done) pend.push_back(k);
      wb_en = pend.size() > 0 && ($urandom_range(1) == 1);
      if (wb_en) wb_idx = q[pend[$urandom_range(pend.size() - 1)]].idx;
      #1;
      checks += 2;
      n_full += int'(full);
      if (full != (q.size() == 4) || empty != (q.size() == 0)) begin
        failures++; $display("FAIL full/empty with %0d entries", q.size());
      end
      if (q.size() > 0) begin
        if (head_ready != q[0].done) begin failures++; $display("FAIL head_ready"); end
        else if (head_ready && (head_preg != q[0].p || head_ppreg != q[0].pp ||
                 head_areg != q[0].a || head_dest_v != q[0].dv)) begin
          failures++; $display("FAIL head fields");
        end
      end else if (head_ready) begin failures++; $display("FAIL ready when empty"); end
      aidx = alloc_idx;
      @(posedge clk);
      if (commit) begin void'(q.pop_front()); n_commit++; end
      foreach (q[k]) if (wb_en && q[k].idx == wb_idx) q[k].done = 1'b1;
      if (alloc) q.push_back('{aidx, alloc_dest_v, alloc_preg, alloc_ppreg, alloc_areg, 1'b0});
      #1;
    end
    checks++;
    if (n_commit < 100 || n_full == 0) begin failures++; $display("FAIL too few commits or never full"); end
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
