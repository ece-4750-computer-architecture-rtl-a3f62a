// Issue queue (IQ) of the renaming cores.
//
// IQ_ENTRIES entries, each with op, an immediate with valid bit, a
// destination tag with valid bit, the ROB entry it belongs to, and two
// sources, each with a valid bit v, a pending bit p and a source field.
// D appends entries in program order. The queue is kept compacted, so entry
// 0 is always the oldest. Each cycle the I stage is offered the oldest
// entry that can go: every valid source is either not pending or its tag
// is in W this cycle or the next (taken from the W bypass in I or in X/Y0,
// flagged on sel_byp and sel_bypx), and
// the W port is free in the cycle this entry's pipe would reach it. issue
// removes the offered entry and the younger ones move down. When a result
// is written back, every pending source waiting on its tag clears p; with
// CAPTURE=1 (value-based renaming) it also takes the value, so its source
// field changes from a tag into a value. A source field holds a tag in its
// low TAG_W bits while pending and, with CAPTURE=1, a value once not
// pending. Fields and the D-alloc / I-issue use follow the lecture; the
// compacting organisation and oldest-first selection are this design's
// choices.
module rr_issue_queue
  import rr_pkg::*;
#(
  parameter int IQ_ENTRIES = 4,
  parameter int NUM_TAGS   = 64,
  parameter int ROB_W      = 2,
  parameter int SRC_W      = 6,
  parameter bit CAPTURE    = 1'b0,
  localparam int TAG_W = $clog2(NUM_TAGS),
  localparam int CW    = $clog2(IQ_ENTRIES + 1)
) (
  input  logic                clk,
  input  logic                rst,
  // D: allocate
  input  logic                alloc,
  input  op_e                 alloc_op,
  input  logic                alloc_imm_v,
  input  logic [XLEN-1:0]     alloc_imm,
  input  logic                alloc_dest_v,
  input  logic [TAG_W-1:0]    alloc_dest,
  input  logic [ROB_W-1:0]    alloc_rob,
  input  logic [1:0]          alloc_src_v,
  input  logic [1:0]          alloc_src_p,
  input  logic [SRC_W-1:0]    alloc_src [2],
  output logic                full,
  output logic                empty,
  // I: select and issue
  input  logic [NUM_TAGS-1:0] tag_in_w,
  input  logic [NUM_TAGS-1:0] tag_in_w_next,
  input  logic                wport_free_x,
  input  logic                wport_free_y,
  output logic                sel_val,
  output logic [CW-1:0]       sel_idx,      // position in age order, 0 = oldest
  output op_e                 sel_op,
  output logic                sel_imm_v,
  output logic [XLEN-1:0]     sel_imm,
  output logic                sel_dest_v,
  output logic [TAG_W-1:0]    sel_dest,
  output logic [ROB_W-1:0]    sel_rob,
  output logic [1:0]          sel_src_v,
  output logic [1:0]          sel_byp,      // source taken from W now, in I
  output logic [1:0]          sel_bypx,     // source taken from W next cycle, in X/Y0
  output logic [SRC_W-1:0]    sel_src [2],
  input  logic                issue,
  // W: wakeup
  input  logic                wb_en,
  input  logic [TAG_W-1:0]    wb_tag,
  input  logic [XLEN-1:0]     wb_value
);
  typedef struct packed {
    op_e              op;
    logic             imm_v;
    logic [XLEN-1:0]  imm;
    logic             dest_v;
    logic [TAG_W-1:0] dest;
    logic [ROB_W-1:0] rob;
    logic [1:0]       src_v;
    logic [1:0]       src_p;
    logic [1:0][SRC_W-1:0] src;
  } ent_t;

  ent_t          ent_q [IQ_ENTRIES];
  logic [CW-1:0] cnt_q;
  logic [IQ_ENTRIES-1:0] rdy;
  logic [1:0]    byp [IQ_ENTRIES];
  logic [1:0]    bypx [IQ_ENTRIES];

  assign full  = cnt_q == CW'(IQ_ENTRIES);
  assign empty = cnt_q == '0;

  // readiness of each entry
  always_comb begin
    for (int e = 0; e < IQ_ENTRIES; e++) begin
      rdy[e] = CW'(e) < cnt_q;
      for (int s = 0; s < 2; s++) begin
        byp[e][s]  = ent_q[e].src_v[s] && ent_q[e].src_p[s]
                     && tag_in_w[ent_q[e].src[s][TAG_W-1:0]];
        bypx[e][s] = ent_q[e].src_v[s] && ent_q[e].src_p[s]
                     && tag_in_w_next[ent_q[e].src[s][TAG_W-1:0]];
        if (ent_q[e].src_v[s] && ent_q[e].src_p[s] && !byp[e][s] && !bypx[e][s]) rdy[e] = 1'b0;
      end
      if (is_y_op(ent_q[e].op) ? !wport_free_y : !wport_free_x) rdy[e] = 1'b0;
    end
  end

  // oldest ready entry
  always_comb begin
    sel_val = 1'b0;
    sel_idx = '0;
    for (int e = IQ_ENTRIES - 1; e >= 0; e--)
      if (rdy[e]) begin
        sel_val = 1'b1;
        sel_idx = CW'(e);
      end
  end

  always_comb begin
    ent_t s;
    s          = ent_q[sel_idx[$clog2(IQ_ENTRIES)-1:0]];
    sel_op     = s.op;
    sel_imm_v  = s.imm_v;
    sel_imm    = s.imm;
    sel_dest_v = s.dest_v;
    sel_dest   = s.dest;
    sel_rob    = s.rob;
    sel_src_v  = s.src_v;
    sel_src[0] = s.src[0];
    sel_src[1] = s.src[1];
    sel_byp    = byp[sel_idx[$clog2(IQ_ENTRIES)-1:0]];
    sel_bypx   = bypx[sel_idx[$clog2(IQ_ENTRIES)-1:0]];
  end

  // next state: remove the issued entry, wake up, append the new one
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q <= '0;
      for (int e = 0; e < IQ_ENTRIES; e++) ent_q[e] <= '0;
    end else begin
      ent_t          nxt [IQ_ENTRIES];
      logic [CW-1:0] n;
      logic          rm;
      rm = issue && sel_val;
      n  = cnt_q;
      for (int e = 0; e < IQ_ENTRIES; e++) begin
        if (rm && CW'(e) >= sel_idx && e + 1 < IQ_ENTRIES) nxt[e] = ent_q[e + 1];
        else                                                nxt[e] = ent_q[e];
        for (int s = 0; s < 2; s++)
          if (wb_en && nxt[e].src_p[s] && nxt[e].src[s][TAG_W-1:0] == wb_tag) begin
            nxt[e].src_p[s] = 1'b0;
            if (CAPTURE) nxt[e].src[s] = SRC_W'(wb_value);
          end
      end
      if (rm) n = n - 1'b1;
      if (alloc && !full) begin
        nxt[n[$clog2(IQ_ENTRIES)-1:0]] = '{op: alloc_op, imm_v: alloc_imm_v, imm: alloc_imm,
                     dest_v: alloc_dest_v, dest: alloc_dest, rob: alloc_rob,
                     src_v: alloc_src_v, src_p: alloc_src_p & alloc_src_v,
                     src: {alloc_src[1], alloc_src[0]}};
        n = n + 1'b1;
      end
      cnt_q <= n;
      for (int e = 0; e < IQ_ENTRIES; e++) ent_q[e] <= nxt[e];
    end
  end

  a_alloc_full: assert property (@(posedge clk) disable iff (rst) alloc |-> !full);
  a_issue_val:  assert property (@(posedge clk) disable iff (rst) issue |-> sel_val);
endmodule
