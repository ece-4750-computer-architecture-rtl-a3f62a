// Reorder buffer (ROB) of the value-based renaming core.
//
// Results live here between writeback and commit: each entry has a pending
// bit p, a valid bit v, the result value and the architectural destination
// areg (dest_v marks instructions that have one). The entry's index is the
// "physical register" the rename table and IQ refer to. Entries are
// allocated in program order in D, W writes the value and clears p, and C
// releases the head once it is complete, handing its value to the ARF. Two
// combinational read ports let D pick up values of completed but not yet
// committed producers. Fields follow the lecture; the circular organisation
// and the read ports are this design's choices.
module rr_rob_val
  import rr_pkg::*;
#(
  parameter int ROB_ENTRIES = 4,
  localparam int RW = $clog2(ROB_ENTRIES)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            alloc,
  input  logic            alloc_dest_v,
  input  logic [4:0]      alloc_areg,
  output logic            full,
  output logic [RW-1:0]   alloc_idx,
  input  logic            wb_en,
  input  logic [RW-1:0]   wb_idx,
  input  logic [XLEN-1:0] wb_value,
  input  logic [RW-1:0]   rd_idx   [2],
  output logic [XLEN-1:0] rd_value [2],
  output logic            head_ready,
  output logic            head_dest_v,
  output logic [4:0]      head_areg,
  output logic [XLEN-1:0] head_value,
  output logic [RW-1:0]   head_idx,
  input  logic            commit,
  output logic            empty
);
  typedef struct packed {
    logic            p;
    logic            v;
    logic            dest_v;
    logic [XLEN-1:0] value;
    logic [4:0]      areg;
  } ent_t;

  ent_t          ent_q [ROB_ENTRIES];
  logic [RW-1:0] head_q, tail_q;

  assign full        = ent_q[tail_q].v;
  assign empty       = !ent_q[head_q].v;
  assign alloc_idx   = tail_q;
  assign head_idx    = head_q;
  assign head_ready  = ent_q[head_q].v && !ent_q[head_q].p;
  assign head_dest_v = ent_q[head_q].dest_v;
  assign head_areg   = ent_q[head_q].areg;
  assign head_value  = ent_q[head_q].value;
  assign rd_value[0] = ent_q[rd_idx[0]].value;
  assign rd_value[1] = ent_q[rd_idx[1]].value;

  always_ff @(posedge clk) begin
    if (rst) begin
      head_q <= '0;
      tail_q <= '0;
      for (int i = 0; i < ROB_ENTRIES; i++) ent_q[i] <= '0;
    end else begin
      if (wb_en) begin
        ent_q[wb_idx].p     <= 1'b0;
        ent_q[wb_idx].value <= wb_value;
      end
      if (commit) begin
        ent_q[head_q].v <= 1'b0;
        head_q <= RW'((32'(head_q) + 1) % ROB_ENTRIES);
      end
      if (alloc) begin
        ent_q[tail_q] <= '{p: 1'b1, v: 1'b1, dest_v: alloc_dest_v, value: '0,
                           areg: alloc_areg};
        tail_q <= RW'((32'(tail_q) + 1) % ROB_ENTRIES);
      end
    end
  end

  a_alloc_full: assert property (@(posedge clk) disable iff (rst) alloc |-> !full);
  a_commit_rdy: assert property (@(posedge clk) disable iff (rst) commit |-> head_ready);
  a_wb_pending: assert property (@(posedge clk) disable iff (rst)
                                 wb_en |-> ent_q[wb_idx].v && ent_q[wb_idx].p);
endmodule
