// Reorder buffer (ROB) of the pointer-based renaming cores.
//
// A circular buffer of ROB_ENTRIES entries, allocated in program order in D
// and released in program order in C. Each entry has a valid bit v, a
// pending bit p (result not yet written back), and three pointers: preg
// (physical register holding the result), areg (architectural destination)
// and ppreg (the physical register areg mapped to before this instruction,
// freed when this instruction commits). dest_v marks instructions that have
// a destination at all. W clears p of the entry it names; the head may
// commit once it is valid and not pending. Fields follow the lecture; the
// circular organisation and dest_v are this design's choices.
module rr_rob_ptr #(
  parameter int ROB_ENTRIES = 4,
  parameter int NUM_PREGS   = 64,
  localparam int RW = $clog2(ROB_ENTRIES),
  localparam int PW = $clog2(NUM_PREGS)
) (
  input  logic          clk,
  input  logic          rst,
  // D
  input  logic          alloc,
  input  logic          alloc_dest_v,
  input  logic [PW-1:0] alloc_preg,
  input  logic [4:0]    alloc_areg,
  input  logic [PW-1:0] alloc_ppreg,
  output logic          full,
  output logic [RW-1:0] alloc_idx,
  // W
  input  logic          wb_en,
  input  logic [RW-1:0] wb_idx,
  // C
  output logic          head_ready,
  output logic          head_dest_v,
  output logic [PW-1:0] head_preg,
  output logic [4:0]    head_areg,
  output logic [PW-1:0] head_ppreg,
  input  logic          commit,
  output logic          empty
);
  typedef struct packed {
    logic          v;
    logic          p;
    logic          dest_v;
    logic [PW-1:0] preg;
    logic [4:0]    areg;
    logic [PW-1:0] ppreg;
  } ent_t;

  ent_t          ent_q [ROB_ENTRIES];
  logic [RW-1:0] head_q, tail_q;

  assign full        = ent_q[tail_q].v;
  assign empty       = !ent_q[head_q].v;
  assign alloc_idx   = tail_q;
  assign head_ready  = ent_q[head_q].v && !ent_q[head_q].p;
  assign head_dest_v = ent_q[head_q].dest_v;
  assign head_preg   = ent_q[head_q].preg;
  assign head_areg   = ent_q[head_q].areg;
  assign head_ppreg  = ent_q[head_q].ppreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      head_q <= '0;
      tail_q <= '0;
      for (int i = 0; i < ROB_ENTRIES; i++) ent_q[i] <= '0;
    end else begin
      if (wb_en) ent_q[wb_idx].p <= 1'b0;
      if (commit) begin
        ent_q[head_q].v <= 1'b0;
        head_q <= RW'((32'(head_q) + 1) % ROB_ENTRIES);
      end
      if (alloc) begin
        ent_q[tail_q] <= '{v: 1'b1, p: 1'b1, dest_v: alloc_dest_v, preg: alloc_preg,
                           areg: alloc_areg, ppreg: alloc_ppreg};
        tail_q <= RW'((32'(tail_q) + 1) % ROB_ENTRIES);
      end
    end
  end

  a_alloc_full: assert property (@(posedge clk) disable iff (rst) alloc |-> !full);
  a_commit_rdy: assert property (@(posedge clk) disable iff (rst) commit |-> head_ready);
  a_wb_pending: assert property (@(posedge clk) disable iff (rst)
                                 wb_en |-> ent_q[wb_idx].v && ent_q[wb_idx].p);
endmodule
