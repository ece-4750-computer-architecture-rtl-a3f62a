// IO2L core with pointer-based register renaming.
//
// IO2L: in-order front end (F, D), out-of-order issue from the issue queue
// (I), out-of-order writeback (W) from two pipes of different length, and
// in-order commit (C) through the reorder buffer:
//
//   F -> D -> IQ -> I -+-> X ---------------+-> W -> ROB -> C
//                      +-> Y0 -> Y1 -> Y2 -> Y3 -+
//
// Renaming removes the WAW and WAR name hazards: every instruction that
// writes a register gets a fresh physical register in D from the free
// list, the rename table maps architectural to physical registers, and the
// I, X, Y and W stages work on physical registers only. Sources are
// renamed in D and written into the IQ as physical register specifiers
// with a pending bit. I issues the oldest IQ entry whose operands are
// available: read from the physical register file (PRF), or taken from the
// W stage's result bus, either in I (producer in W now) or in X/Y0
// (producer in W next cycle). The scoreboard tells which producer reaches
// W when and keeps an add and a mul from reaching the single W port in the
// same cycle. W writes the PRF, marks the ROB entry complete, clears the
// rename table's pending bit and wakes up waiting IQ entries. C retires the oldest instruction once complete
// and frees the physical register its destination used to map to (ppreg):
// no older reader of it can still be in flight.
//
// UNIFIED = 0: separate PRF and architectural register file (ARF); C copies
//   the value from the PRF into the ARF.
// UNIFIED = 1: one unified register file (URF) and an architectural rename
//   table (ART); C copies only the preg pointer into the ART.
//
// Interface: instructions arrive from F on inst_val/inst_rdy/inst (inst_rdy
// may depend combinationally on inst). dbg_areg/dbg_value read committed
// architectural state; idle is high when no instruction is in flight.
// Timing: an instruction issued in cycle t is in X at t+1 and W at t+2, or
// in Y0..Y3 at t+1..t+4 and W at t+5; a consumer can issue one cycle
// before its producer's W cycle. The lecture's example (mul, mul, addi,
// addi) commits in cycles 8, 12, 13 and 14 as in its example table.
// D dispatches at most one instruction per cycle and stalls when the IQ or
// ROB is full or no physical register is free.
// Unsupported instruction words are discarded in D.
// Stage structure, data structures and their use per stage follow the
// lecture. Bypassing only from W (into I and X/Y0), oldest-first
// selection, W waking up the IQ, the ROB index carried with each
// instruction and the reset state (xi in p(i-1), all zero) are this
// design's choices.
module rr_core_ptr
  import rr_pkg::*;
#(
  parameter int NUM_PREGS   = 64,
  parameter int ROB_ENTRIES = 4,
  parameter int IQ_ENTRIES  = 4,
  parameter bit UNIFIED     = 1'b0,
  localparam int PW = $clog2(NUM_PREGS),
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
  logic          fl_ok, iq_full, iq_empty, rob_full, rob_empty;
  logic [PW-1:0] fl_preg, old_preg;
  logic          src0_p, src1_p;
  logic [PW-1:0] src0_preg, src1_preg;
  logic [RW-1:0] rob_idx;
  logic          d_fire;
  // stall causes, for observation
  logic          stall_iq, stall_rob, stall_fl;

  rr_decode u_dec (.inst, .dec);

  assign stall_iq  = inst_val && dec.valid && iq_full;
  assign stall_rob = inst_val && dec.valid && rob_full;
  assign stall_fl  = inst_val && dec.valid && dec.dest_v && !fl_ok;
  assign d_fire    = inst_val && dec.valid && !stall_iq && !stall_rob && !stall_fl;
  assign inst_rdy  = d_fire || !dec.valid;

  // ------------------------------------------------------------------ W
  logic            w_val, w_dest_v;
  logic [PW-1:0]   w_dest;
  logic [RW-1:0]   w_rob;
  logic [XLEN-1:0] w_value;

  // ------------------------------------------------------------------ C
  logic          c_commit, c_dest_v;
  logic [PW-1:0] c_preg, c_ppreg;
  logic [4:0]    c_areg;

  rr_free_list #(.NUM_PREGS(NUM_PREGS), .NUM_RESERVED(NAREGS - 1)) u_fl (
    .clk, .rst,
    .alloc(d_fire && dec.dest_v), .alloc_ok(fl_ok), .alloc_preg(fl_preg),
    .free_en(c_commit && c_dest_v), .free_preg(c_ppreg), .free_bits()
  );

  rr_rename_table #(.NUM_PREGS(NUM_PREGS)) u_rt (
    .clk, .rst,
    .rs1(dec.rs1), .rs2(dec.rs2),
    .src0_p, .src0_preg, .src1_p, .src1_preg,
    .ren_en(d_fire && dec.dest_v), .ren_areg(dec.rd), .ren_preg(fl_preg), .old_preg,
    .wb_en(w_val && w_dest_v), .wb_preg(w_dest), .pend_bits()
  );

  rr_rob_ptr #(.ROB_ENTRIES(ROB_ENTRIES), .NUM_PREGS(NUM_PREGS)) u_rob (
    .clk, .rst,
    .alloc(d_fire), .alloc_dest_v(dec.dest_v), .alloc_preg(fl_preg),
    .alloc_areg(dec.rd), .alloc_ppreg(old_preg), .full(rob_full), .alloc_idx(rob_idx),
    .wb_en(w_val), .wb_idx(w_rob),
    .head_ready(c_commit), .head_dest_v(c_dest_v), .head_preg(c_preg),
    .head_areg(c_areg), .head_ppreg(c_ppreg), .commit(c_commit), .empty(rob_empty)
  );

  // ------------------------------------------------------------------ IQ / I
  logic [NUM_PREGS-1:0] sb_in_w, sb_in_w_next;
  logic                 wfree_x, wfree_y;
  logic                 i_val;
  logic [$clog2(IQ_ENTRIES+1)-1:0] i_idx;
  op_e                  i_op;
  logic                 i_imm_v, i_dest_v;
  logic [XLEN-1:0]      i_imm;
  logic [PW-1:0]        i_dest;
  logic [RW-1:0]        i_rob;
  logic [1:0]           i_src_v, i_byp, i_bypx;
  logic [PW-1:0]        i_src [2];
  logic [PW-1:0]        d_src [2];

  assign d_src[0] = src0_preg;
  assign d_src[1] = src1_preg;

  rr_issue_queue #(.IQ_ENTRIES(IQ_ENTRIES), .NUM_TAGS(NUM_PREGS), .ROB_W(RW),
                   .SRC_W(PW), .CAPTURE(1'b0)) u_iq (
    .clk, .rst,
    .alloc(d_fire), .alloc_op(dec.op), .alloc_imm_v(dec.imm_v), .alloc_imm(dec.imm),
    .alloc_dest_v(dec.dest_v), .alloc_dest(fl_preg), .alloc_rob(rob_idx),
    .alloc_src_v({dec.src1_v, dec.src0_v}), .alloc_src_p({src1_p, src0_p}),
    .alloc_src(d_src), .full(iq_full), .empty(iq_empty),
    .tag_in_w(sb_in_w), .tag_in_w_next(sb_in_w_next), .wport_free_x(wfree_x), .wport_free_y(wfree_y),
    .sel_val(i_val), .sel_idx(i_idx), .sel_op(i_op), .sel_imm_v(i_imm_v), .sel_imm(i_imm),
    .sel_dest_v(i_dest_v), .sel_dest(i_dest), .sel_rob(i_rob), .sel_src_v(i_src_v),
    .sel_byp(i_byp), .sel_bypx(i_bypx), .sel_src(i_src), .issue(i_val),
    .wb_en(w_val && w_dest_v), .wb_tag(w_dest), .wb_value(w_value)
  );

  rr_scoreboard #(.NUM_TAGS(NUM_PREGS)) u_sb (
    .clk, .rst,
    .issue(i_val), .issue_y(is_y_op(i_op)), .issue_dest_v(i_dest_v), .issue_tag(i_dest),
    .wport_free_x(wfree_x), .wport_free_y(wfree_y), .in_w(sb_in_w), .in_w_next(sb_in_w_next), .pending()
  );

  // register file: ports 0,1 for I, 2 for C (separate ARF), 3 for reading out
  localparam int NRP = 4;
  logic [PW-1:0]   rf_raddr [NRP];
  logic [XLEN-1:0] rf_rdata [NRP];
  logic            rf_we    [1];
  logic [PW-1:0]   rf_waddr [1];
  logic [XLEN-1:0] rf_wdata [1];
  logic [PW-1:0]   art_preg;

  assign rf_raddr[0] = i_src[0];
  assign rf_raddr[1] = i_src[1];
  assign rf_raddr[2] = c_preg;
  assign rf_raddr[3] = art_preg;
  assign rf_we[0]    = w_val && w_dest_v;
  assign rf_waddr[0] = w_dest;
  assign rf_wdata[0] = w_value;

  rr_regfile #(.DEPTH(NUM_PREGS), .NREAD(NRP), .NWRITE(1)) u_prf (
    .clk, .rst, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  // operand read with W bypass
  logic [XLEN-1:0] opnd [2];
  always_comb
    for (int s = 0; s < 2; s++)
      opnd[s] = !i_src_v[s] ? '0 : i_byp[s] ? w_value : rf_rdata[s];

  // ------------------------------------------------------------------ X / Y
  logic [1:0]           bypx_q;
  localparam int TAG_W = 1 + PW + RW;
  logic                 x_val_q, xw_val_q;
  logic [TAG_W-1:0]     x_tag_q, xw_tag_q;
  logic [XLEN-1:0]      x_a_q, x_b_q, x_sum, xw_val_data_q;
  logic                 y_in_val_q, y_out_val;
  logic [TAG_W-1:0]     y_in_tag_q, y_out_tag;
  logic [XLEN-1:0]      y_a_q, y_b_q, y_out;

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
    x_tag_q       <= {i_dest_v, i_dest, i_rob};
    y_in_tag_q    <= {i_dest_v, i_dest, i_rob};
    x_a_q         <= opnd[0];
    x_b_q         <= i_imm_v ? i_imm : opnd[1];
    y_a_q         <= opnd[0];
    y_b_q         <= opnd[1];
    bypx_q        <= i_bypx;
    xw_tag_q      <= x_tag_q;
    xw_val_data_q <= x_sum;
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
    {w_dest_v, w_dest, w_rob} = xw_val_q ? xw_tag_q : y_out_tag;
    w_value = xw_val_q ? xw_val_data_q : y_out;
  end

  a_one_writer: assert property (@(posedge clk) disable iff (rst) !(xw_val_q && y_out_val));
  a_sb_matches: assert property (@(posedge clk) disable iff (rst)
                                 (w_val && w_dest_v) |-> sb_in_w[w_dest]);

  // ------------------------------------------------------------------ C
  generate
    if (UNIFIED) begin : g_urf
      // the ART holds the committed mapping; committed values stay in the URF
      rr_art #(.NUM_PREGS(NUM_PREGS)) u_art (
        .clk, .rst, .we(c_commit && c_dest_v), .waddr(c_areg), .wpreg(c_preg),
        .raddr(dbg_areg), .rpreg(art_preg)
      );
      assign dbg_value = (dbg_areg == 5'd0) ? '0 : rf_rdata[3];
    end else begin : g_arf
      // the ARF receives a copy of the value at commit
      logic [4:0]      arf_raddr [1];
      logic [XLEN-1:0] arf_rdata [1];
      logic            arf_we    [1];
      logic [4:0]      arf_waddr [1];
      logic [XLEN-1:0] arf_wdata [1];
      assign arf_raddr[0] = dbg_areg;
      assign arf_we[0]    = c_commit && c_dest_v;
      assign arf_waddr[0] = c_areg;
      assign arf_wdata[0] = rf_rdata[2];
      assign art_preg     = '0;
      rr_regfile #(.DEPTH(NAREGS), .NREAD(1), .NWRITE(1)) u_arf (
        .clk, .rst, .raddr(arf_raddr), .rdata(arf_rdata),
        .we(arf_we), .waddr(arf_waddr), .wdata(arf_wdata)
      );
      assign dbg_value = (dbg_areg == 5'd0) ? '0 : arf_rdata[0];
    end
  endgenerate

  assign idle = rob_empty && iq_empty && !inst_val;
endmodule
