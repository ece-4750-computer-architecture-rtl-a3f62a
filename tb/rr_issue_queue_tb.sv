// Testbench of rr_issue_queue in its value-capturing configuration (as in
// the value-based core) with four tags. Random allocation, random "tag in
// W" vectors, random W-port availability and random wakeups are applied
// and mirrored in an age-ordered model. Checked every cycle: full/empty,
// that the offered entry is the oldest ready one, its fields and bypass
// flags; after each wakeup the captured value is checked when the entry is
// issued. It counts out-of-order issues, entries held back by the W port
// and captured values, and fails if any of them never happens.
module rr_issue_queue_tb;
  import rr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        alloc = 1'b0, full, empty, alloc_imm_v, alloc_dest_v;
  op_e         alloc_op;
  logic [31:0] alloc_imm;
  logic [1:0]  alloc_dest, alloc_rob, alloc_src_v, alloc_src_p;
  logic [31:0] alloc_src [2];
  logic [3:0]  tag_in_w, tag_in_w_next;
  logic        wport_free_x, wport_free_y, sel_val, sel_imm_v, sel_dest_v;
  logic        issue = 1'b0;
  logic [2:0]  sel_idx;
  op_e         sel_op;
  logic [31:0] sel_imm;
  logic [1:0]  sel_dest, sel_rob, sel_src_v, sel_byp, sel_bypx;
  logic [31:0] sel_src [2];
  logic        wb_en = 1'b0;
  logic [1:0]  wb_tag;
  logic [31:0] wb_value;

  rr_issue_queue #(.IQ_ENTRIES(4), .NUM_TAGS(4), .ROB_W(2), .SRC_W(32), .CAPTURE(1'b1)) dut (
    .clk, .rst, .alloc, .alloc_op, .alloc_imm_v, .alloc_imm, .alloc_dest_v, .alloc_dest,
    .alloc_rob, .alloc_src_v, .alloc_src_p, .alloc_src, .full, .empty, .tag_in_w, .tag_in_w_next,
    .wport_free_x, .wport_free_y, .sel_val, .sel_idx, .sel_op, .sel_imm_v, .sel_imm,
    .sel_dest_v, .sel_dest, .sel_rob, .sel_src_v, .sel_byp, .sel_bypx, .sel_src, .issue,
    .wb_en, .wb_tag, .wb_value);

  typedef struct {
    op_e op; logic imm_v; logic [31:0] imm; logic dest_v; logic [1:0] dest, rob;
    logic [1:0] sv, sp; logic [31:0] src [2];
  } e_t;
  e_t q [$];
  int checks = 0, failures = 0, n_ooo = 0, n_wblock = 0, n_capt = 0;

  function automatic logic ready(e_t e, output logic [1:0] byp, output logic [1:0] bypx);
    logic r;
    r = 1'b1;
    for (int s = 0; s < 2; s++) begin
      byp[s]  = e.sv[s] && e.sp[s] && tag_in_w[e.src[s][1:0]];
      bypx[s] = e.sv[s] && e.sp[s] && tag_in_w_next[e.src[s][1:0]];
      if (e.sv[s] && e.sp[s] && !byp[s] && !bypx[s]) r = 1'b0;
    end
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 4000; i++) begin
      int   exp_i;
      logic [1:0] eb, b, ebx, bx;
      logic opr;
      alloc = !full && ($urandom_range(1) == 1);
      alloc_op = op_e'($urandom_range(2)); alloc_imm_v = (alloc_op == OP_ADDI);
      alloc_imm = $urandom; alloc_dest_v = $urandom_range(1);
      alloc_dest = 2'($urandom); alloc_rob = 2'($urandom);
      alloc_src_v = 2'($urandom); alloc_src_p = 2'($urandom);
      for (int s = 0; s < 2; s++) alloc_src[s] = alloc_src_p[s] ? 32'($urandom_range(3)) : $urandom;
      tag_in_w = ($urandom_range(2) == 0) ? 4'(1 << $urandom_range(3)) : 4'b0;
      tag_in_w_next = ($urandom_range(2) == 0) ? 4'(1 << $urandom_range(3)) & ~tag_in_w : 4'b0;
      wport_free_x = ($urandom_range(3) != 0); wport_free_y = ($urandom_range(3) != 0);
      wb_en = $urandom_range(1); wb_tag = 2'($urandom); wb_value = $urandom;
      issue = 1'b0;
      // model: oldest ready entry
      exp_i = -1; eb = '0; ebx = '0; opr = 1'b0;
      foreach (q[k]) if (exp_i < 0) begin
        if (ready(q[k], b, bx)) begin
          opr = 1'b1;
          if ((q[k].op == OP_MUL) ? wport_free_y : wport_free_x) begin exp_i = k; eb = b; ebx = bx; end
        end
      end
      if (opr && exp_i < 0) n_wblock++;
      #1;
      issue = sel_val && ($urandom_range(3) != 0);
      #1;
      checks += 2;
      if (full != (q.size() == 4) || empty != (q.size() == 0)) begin failures++; $display("FAIL full/empty"); end
      if (sel_val != (exp_i >= 0) || (exp_i >= 0 && 32'(sel_idx) != 32'(exp_i))) begin
        failures++; $display("FAIL select %0d/%0d expected %0d", sel_val, sel_idx, exp_i);
      end else if (exp_i >= 0) begin
        e_t e;
        e = q[exp_i];
        checks++;
        if (sel_op != e.op || sel_imm_v != e.imm_v || (e.imm_v && sel_imm != e.imm) ||
            sel_dest_v != e.dest_v || sel_dest != e.dest || sel_rob != e.rob ||
            sel_src_v != e.sv || sel_byp != eb || sel_bypx != ebx) begin
          failures++; $display("FAIL fields");
        end
        for (int s = 0; s < 2; s++) if (e.sv[s]) begin
          checks++;
          if (e.sp[s] ? sel_src[s][1:0] != e.src[s][1:0] : sel_src[s] != e.src[s]) begin
            failures++; $display("FAIL src%0d", s);
          end
        end
        if (issue) n_ooo += int'(exp_i != 0);
      end
      @(posedge clk);
      if (issue && exp_i >= 0) q.delete(exp_i);
      foreach (q[k]) for (int s = 0; s < 2; s++)
        if (wb_en && q[k].sv[s] && q[k].sp[s] && q[k].src[s][1:0] == wb_tag) begin
          q[k].sp[s] = 1'b0; q[k].src[s] = wb_value; n_capt++;
        end
      if (alloc) q.push_back('{alloc_op, alloc_imm_v, alloc_imm, alloc_dest_v, alloc_dest,
                               alloc_rob, alloc_src_v, alloc_src_p & alloc_src_v,
                               '{alloc_src[0], alloc_src[1]}});
      #1;
    end
    checks++;
    if (n_ooo == 0 || n_wblock == 0 || n_capt == 0) begin
      failures++; $display("FAIL ooo=%0d wblock=%0d capture=%0d", n_ooo, n_wblock, n_capt);
    end
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
