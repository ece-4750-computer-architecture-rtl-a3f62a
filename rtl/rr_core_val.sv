// IO2L core with value-based register renaming.
//
// Same pipeline as the pointer-based core (F, D, IQ, I, X or Y0..Y3, W,
// ROB, C; out-of-order issue and writeback, in-order commit), but results
// waiting to commit are kept in the reorder buffer itself instead of a
// physical register file. A "physical register" is therefore the id of a
// ROB entry, allocated and released with the ROB entry, so no free list is
// needed.
//
// D renames the destination to the new ROB entry (rename table: v=1, p=1,
// preg = ROB id). For each source it looks up the rename table: if the
// entry is not valid the value is read from the ARF; if it is valid and
// pending the IQ gets the ROB id with p set; if it is valid and complete
// the value is read from the ROB (or taken from W when written back in the
// same cycle). So an IQ source field holds either a ROB id or a value.
// I issues the oldest ready entry; a source still pending when it issues
// is taken from the W stage's result bus, in I if the producer is in W now
// or in X/Y0 if it reaches W in the next cycle. W writes the value into the ROB, clears the rename
// table's pending bit and hands the value to waiting IQ entries. C copies
// the head's value into the ARF and clears the rename table entry if it
// still points at that ROB entry.
//
// Interface and timing are the same as the pointer-based core: inst_val /
// inst_rdy / inst from F, dbg_areg / dbg_value for committed state, idle;
// issue in t gives W in t+2 (add, addi) or t+5 (mul); a consumer can issue
// one cycle before its producer reaches W. D stalls when the IQ
// or ROB is full; unsupported instruction words are discarded in D.
// The data structures and their use per stage follow the lecture, and the
// lecture's example runs with the timing of its example table; bypass
// only from W (into I and X/Y0), the value capture in the IQ, oldest-first issue and an all-zero reset state are this
// design's choices.
module rr_core_val
  import rr_pkg::*;
#(
  parameter int ROB_ENTRIES = 4,
  parameter int IQ_ENTRIES  = 4,
  localparam int RW = $clog2(ROB_ENTRIES)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            inst_val,
  output logic            inst_rdy,
  input  logic [31:0]     inst,
  output logic            idle,
  input  logic [4:0]      dbg_areg,
  output logic [XLEN-1:0] dbg_value
);
  // ------------------------------------------------------------------ D
  dec_t          dec;
  logic          iq_full, iq_empty, rob_full, rob_empty;
  logic [RW-1:0] rob_idx;
  logic          d_fire, stall_iq, stall_rob;
  logic [1:0]    rt_v, rt_p;
  logic [RW-1:0] rt_tag [2];
  logic [1:0]    d_src_v, d_src_p;
  logic [XLEN-1:0] d_src [2];

  rr_decode u_dec (.inst, .dec);

  assign stall_iq  = inst_val && dec.valid && iq_full;
  assign stall_rob = inst_val && dec.valid && rob_full;
  assign d_fire    = inst_val && dec.valid && !stall_iq && !stall_rob;
  assign inst_rdy  = d_fire || !dec.valid;

  // W and C
  logic            w_val, w_dest_v;
  logic [RW-1:0]   w_rob;
  logic [XLEN-1:0] w_value;
  logic            c_commit, c_dest_v;
  logic [4:0]      c_areg;
  logic [XLEN-1:0] c_value;
  logic [RW-1:0]   c_idx;

  rr_rename_table_val #(.ROB_ENTRIES(ROB_ENTRIES)) u_rt (
    .clk, .rst,
    .rs1(dec.rs1), .rs2(dec.rs2),
    .src0_v(rt_v[0]), .src0_p(rt_p[0]), .src0_tag(rt_tag[0]),
    .src1_v(rt_v[1]), .src1_p(rt_p[1]), .src1_tag(rt_tag[1]),
    .ren_en(d_fire && dec.dest_v), .ren_areg(dec.rd), .ren_tag(rob_idx),
    .wb_en(w_val && w_dest_v), .wb_tag(w_rob),
    .cm_en(c_commit && c_dest_v), .cm_areg(c_areg), .cm_tag(c_idx)
  );

  logic [XLEN-1:0] rob_rd [2];
  rr_rob_val #(.ROB_ENTRIES(ROB_ENTRIES)) u_rob (
    .clk, .rst,
    .alloc(d_fire), .alloc_dest_v(dec.dest_v), .alloc_areg(dec.rd),
    .full(rob_full), .alloc_idx(rob_idx),
    .wb_en(w_val), .wb_idx(w_rob), .wb_value(w_value),
    .rd_idx(rt_tag), .rd_value(rob_rd),
    .head_ready(c_commit), .head_dest_v(c_dest_v), .head_areg(c_areg),
    .head_value(c_value), .head_idx(c_idx), .commit(c_commit), .empty(rob_empty)
  );

  // ARF: ports 0,1 read by D, port 2 reads committed state out
  logic [4:0]      arf_raddr [3];
  logic [XLEN-1:0] arf_rdata [3];
  logic            arf_we    [1];
  logic [4:0]      arf_waddr [1];
  logic [XLEN-1:0] arf_wdata [1];
  assign arf_raddr[0] = dec.rs1;
  assign arf_raddr[1] = dec.rs2;
  assign arf_raddr[2] = dbg_areg;
  assign arf_we[0]    = c_commit && c_dest_v;
  assign arf_waddr[0] = c_areg;
  assign arf_wdata[0] = c_value;

  rr_regfile #(.DEPTH(NAREGS), .NREAD(3), .NWRITE(1)) u_arf (
    .clk, .rst, .raddr(arf_raddr), .rdata(arf_rdata),
    .we(arf_we), .waddr(arf_waddr), .wdata(arf_wdata)
  );
  assign dbg_value = (dbg_areg == 5'd0) ? '0 : arf_rdata[2];

  // source operands for the IQ: ARF value, ROB id, ROB value or W value
  always_comb begin
    d_src_v = {dec.src1_v, dec.src0_v};
    for (int s = 0; s < 2; s++) begin
      d_src_p[s] = 1'b0;
      d_src[s]   = '0;
      if (!d_src_v[s])        d_src[s] = '0;
      else if (!rt_v[s])      d_src[s] = arf_rdata[s];
      else if (rt_p[s]) begin d_src_p[s] = 1'b1; d_src[s] = XLEN'(rt_tag[s]); end
      else if (w_val && w_dest_v && w_rob == rt_tag[s]) d_src[s] = w_value;
      else                    d_src[s] = rob_rd[s];
    end
  end

  // ------------------------------------------------------------------ IQ / I
  logic [ROB_ENTRIES-1:0] sb_in_w, sb_in_w_next;
  logic                   wfree_x, wfree_y, i_val;
  logic [$clog2(IQ_ENTRIES+1)-1:0] i_idx;
  op_e                    i_op;
  logic                   i_imm_v, i_dest_v;
  logic [XLEN-1:0]        i_imm;
  logic [RW-1:0]          i_dest, i_rob;
  logic [1:0]             i_src_v, i_byp, i_bypx;
  logic [XLEN-1:0]        i_src [2];

  rr_issue_queue #(.IQ_ENTRIES(IQ_ENTRIES), .NUM_TAGS(ROB_ENTRIES), .ROB_W(RW),
                   .SRC_W(XLEN), .CAPTURE(1'b1)) u_iq (
    .clk, .rst,
    .alloc(d_fire), .alloc_op(dec.op), .alloc_imm_v(dec.imm_v), .alloc_imm(dec.imm),
    .alloc_dest_v(dec.dest_v), .alloc_dest(rob_idx), .alloc_rob(rob_idx),
    .alloc_src_v(d_src_v), .alloc_src_p(d_src_p), .alloc_src(d_src),
    .full(iq_full), .empty(iq_empty),
    .tag_in_w(sb_in_w), .tag_in_w_next(sb_in_w_next), .wport_free_x(wfree_x), .wport_free_y(wfree_y),
    .sel_val(i_val), .sel_idx(i_idx), .sel_op(i_op), .sel_imm_v(i_imm_v), .sel_imm(i_imm),
    .sel_dest_v(i_dest_v), .sel_dest(i_dest), .sel_rob(i_rob), .sel_src_v(i_src_v),
    .sel_byp(i_byp), .sel_bypx(i_bypx), .sel_src(i_src), .issue(i_val),
    .wb_en(w_val && w_dest_v), .wb_tag(w_rob), .wb_value(w_value)
  );

  rr_scoreboard #(.NUM_TAGS(ROB_ENTRIES)) u_sb (
    .clk, .rst,
    .issue(i_val), .issue_y(is_y_op(i_op)), .issue_dest_v(i_dest_v), .issue_tag(i_dest),
    .wport_free_x(wfree_x), .wport_free_y(wfree_y), .in_w(sb_in_w), .in_w_next(sb_in_w_next), .pending()
  );

  logic [XLEN-1:0] opnd [2];
  always_comb
    for (int s = 0; s < 2; s++)
      opnd[s] = !i_src_v[s] ? '0 : i_byp[s] ? w_value : i_src[s];

  // ------------------------------------------------------------------ X / Y
  logic [1:0]           bypx_q;
  localparam int TAG_W = 1 + RW;
  logic             x_val_q, xw_val_q, y_in_val_q, y_out_val;
  logic [TAG_W-1:0] x_tag_q, xw_tag_q, y_in_tag_q, y_out_tag;
  logic [XLEN-1:0]  x_a_q, x_b_q, x_sum, xw_data_q, y_a_q, y_b_q, y_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_val_q    <= 1'b0;
      y_in_val_q <= 1'b0;
      xw_val_q   <= 1'b0;
    end else begin
      x_val_q    <= i_val && !is_y_op(i_op);
      y_in_val_q <= i_val &&  is_y_op(i_op);
      xw_val_q   <= x_val_q;
    end
    x_tag_q    <= {i_dest_v, i_rob};
    y_in_tag_q <= {i_dest_v, i_rob};
    x_a_q      <= opnd[0];
    x_b_q      <= i_imm_v ? i_imm : opnd[1];
    y_a_q      <= opnd[0];
    y_b_q      <= opnd[1];
    bypx_q     <= i_bypx;
    xw_tag_q   <= x_tag_q;
    xw_data_q  <= x_sum;
  end

  // W bypass into X and Y0 for operands whose producer was one cycle from W
  // when this instruction issued
  logic [XLEN-1:0] x_a, x_b, y_a, y_b;
  assign x_a = bypx_q[0] ? w_value : x_a_q;
  assign x_b = bypx_q[1] ? w_value : x_b_q;
  assign y_a = bypx_q[0] ? w_value : y_a_q;
  assign y_b = bypx_q[1] ? w_value : y_b_q;

  rr_x_unit u_x (.a(x_a), .b(x_b), .y(x_sum));

  rr_y_unit #(.TAG_W(TAG_W)) u_y (
    .clk, .rst, .in_val(y_in_val_q), .in_tag(y_in_tag_q), .a(y_a), .b(y_b),
    .out_val(y_out_val), .out_tag(y_out_tag), .y(y_out)
  );

  // ------------------------------------------------------------------ W
  always_comb begin
    w_val = xw_val_q || y_out_val;
    {w_dest_v, w_rob} = xw_val_q ? xw_tag_q : y_out_tag;
    w_value = xw_val_q ? xw_data_q : y_out;
  end

  a_one_writer: assert property (@(posedge clk) disable iff (rst) !(xw_val_q && y_out_val));

  assign idle = rob_empty && iq_empty && !inst_val;
endmodule
