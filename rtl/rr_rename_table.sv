// Rename table (RT) of the pointer-based renaming cores.
//
// For every architectural register x1..x31 the table holds a pending bit p
// (a write to this register is in flight) and the physical register it
// maps to. Entries are always valid. After reset xi maps to p(i-1) with p
// clear. D looks up the two sources (combinational read ports) and renames
// the destination: the entry gets the new physical register with p set and
// the previous mapping is returned on old_preg for the ROB's ppreg field.
// W clears p of the entry that still maps to the physical register written
// back (an associative match on preg, so W needs no areg). A source lookup in the same cycle as a matching writeback
// already sees p clear, so an instruction entering the IQ cannot miss its
// wakeup. x0 is not renamed. Fields and stage use follow the lecture; the
// reset mapping and the same-cycle forwarding are this design's choices.
module rr_rename_table
  import rr_pkg::*;
#(
  parameter int NUM_PREGS = 64,
  localparam int PW = $clog2(NUM_PREGS)
) (
  input  logic          clk,
  input  logic          rst,
  // D: source lookups
  input  logic [4:0]    rs1,
  input  logic [4:0]    rs2,
  output logic          src0_p,
  output logic [PW-1:0] src0_preg,
  output logic          src1_p,
  output logic [PW-1:0] src1_preg,
  // D: destination rename
  input  logic          ren_en,
  input  logic [4:0]    ren_areg,
  input  logic [PW-1:0] ren_preg,
  output logic [PW-1:0] old_preg,
  // W: writeback
  input  logic          wb_en,
  input  logic [PW-1:0] wb_preg,
  // read-out of the whole table (diagnostics)
  output logic [NAREGS-1:0] pend_bits
);
  logic          p_q    [NAREGS];
  logic [PW-1:0] preg_q [NAREGS];

  function automatic logic lookup_p(logic [4:0] a);
    return p_q[a] && !(wb_en && wb_preg == preg_q[a]);
  endfunction

  assign src0_p    = lookup_p(rs1);
  assign src0_preg = preg_q[rs1];
  assign src1_p    = lookup_p(rs2);
  assign src1_preg = preg_q[rs2];
  assign old_preg  = preg_q[ren_areg];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NAREGS; i++) begin
        p_q[i]    <= 1'b0;
        preg_q[i] <= (i == 0) ? '0 : PW'(i - 1);
      end
    end else begin
      for (int i = 1; i < NAREGS; i++)
        if (wb_en && preg_q[i] == wb_preg) p_q[i] <= 1'b0;
      if (ren_en && ren_areg != 5'd0) begin   // rename wins over writeback
        p_q[ren_areg]    <= 1'b1;
        preg_q[ren_areg] <= ren_preg;
      end
    end
  end

  always_comb for (int i = 0; i < NAREGS; i++) pend_bits[i] = p_q[i];
endmodule
