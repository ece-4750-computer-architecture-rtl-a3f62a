// Rename table (RT) of the value-based renaming core.
//
// For every architectural register the table holds a valid bit v, a pending
// bit p and a "physical register", which in this scheme is the id of the
// ROB entry that will hold the value. An entry is valid only while an
// instruction writing that register is in flight. D looks up two sources
// and renames the destination (v=1, p=1, new ROB id). W clears p when the
// written-back ROB id is still the mapping. C clears v when the committing
// ROB entry is still the mapping, after which the value is read from the
// ARF. A rename in the same cycle wins over both. Lookups see a same-cycle
// writeback as already done. Fields and stage use follow the lecture; the
// priorities and the forwarding are this design's choices.
module rr_rename_table_val
  import rr_pkg::*;
#(
  parameter int ROB_ENTRIES = 4,
  localparam int TW = $clog2(ROB_ENTRIES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [4:0]    rs1,
  input  logic [4:0]    rs2,
  output logic          src0_v,
  output logic          src0_p,
  output logic [TW-1:0] src0_tag,
  output logic          src1_v,
  output logic          src1_p,
  output logic [TW-1:0] src1_tag,
  input  logic          ren_en,
  input  logic [4:0]    ren_areg,
  input  logic [TW-1:0] ren_tag,
  input  logic          wb_en,
  input  logic [TW-1:0] wb_tag,
  input  logic          cm_en,
  input  logic [4:0]    cm_areg,
  input  logic [TW-1:0] cm_tag
);
  logic          v_q   [NAREGS];
  logic          p_q   [NAREGS];
  logic [TW-1:0] tag_q [NAREGS];

  function automatic logic lookup_p(logic [4:0] a);
    return p_q[a] && !(wb_en && wb_tag == tag_q[a]);
  endfunction

  assign src0_v   = v_q[rs1] && rs1 != 5'd0;
  assign src0_p   = lookup_p(rs1);
  assign src0_tag = tag_q[rs1];
  assign src1_v   = v_q[rs2] && rs2 != 5'd0;
  assign src1_p   = lookup_p(rs2);
  assign src1_tag = tag_q[rs2];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NAREGS; i++) begin
        v_q[i] <= 1'b0;  p_q[i] <= 1'b0;  tag_q[i] <= '0;
      end
    end else begin
      for (int i = 1; i < NAREGS; i++)
        if (wb_en && v_q[i] && tag_q[i] == wb_tag) p_q[i] <= 1'b0;
      if (cm_en && v_q[cm_areg] && tag_q[cm_areg] == cm_tag) v_q[cm_areg] <= 1'b0;
      if (ren_en && ren_areg != 5'd0) begin
        v_q[ren_areg]   <= 1'b1;
        p_q[ren_areg]   <= 1'b1;
        tag_q[ren_areg] <= ren_tag;
      end
    end
  end
endmodule
