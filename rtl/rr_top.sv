// Three IO2L register-renaming cores side by side.
//
// All three run the same add/addi/mul subset through the same pipeline
// (F, D, I, X or Y0..Y3, W, C with an issue queue between D and I and a
// reorder buffer between W and C) and differ only in how they rename:
//   core 0: pointer-based renaming, physical register file plus a separate
//           architectural register file that receives values at commit;
//   core 1: pointer-based renaming with one unified register file and an
//           architectural rename table that receives pointers at commit;
//   core 2: value-based renaming, results held in the reorder buffer until
//           commit copies them to the architectural register file.
// Each core has its own F stage and instruction memory, loaded through
// imem_we[i] / imem_waddr / imem_wdata. A start pulse makes every core
// fetch num_insts instructions from address 0; done[i] rises when core i has
// fetched and committed all of them. dbg_areg selects an architectural
// register whose committed value each core shows on dbg_value[i].
// Parameter defaults are the sizes of the lecture's examples.
module rr_top
  import rr_pkg::*;
#(
  parameter int NUM_PREGS   = 64,
  parameter int ROB_ENTRIES = 4,
  parameter int IQ_ENTRIES  = 4,
  parameter int IMEM_WORDS  = 64,
  localparam int AW = $clog2(IMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [2:0]      imem_we,
  input  logic [AW-1:0]   imem_waddr,
  input  logic [31:0]     imem_wdata,
  input  logic            start,
  input  logic [AW:0]     num_insts,
  output logic [2:0]      done,
  input  logic [4:0]      dbg_areg,
  output logic [XLEN-1:0] dbg_value [3]
);
  logic        inst_val [3];
  logic        inst_rdy [3];
  logic [31:0] inst     [3];
  logic        fetch_done [3];
  logic        idle     [3];

  for (genvar c = 0; c < 3; c++) begin : g_fetch
    rr_fetch #(.IMEM_WORDS(IMEM_WORDS)) u_fetch (
      .clk, .rst, .imem_we(imem_we[c]), .imem_waddr, .imem_wdata,
      .start, .num_insts, .inst_val(inst_val[c]), .inst_rdy(inst_rdy[c]),
      .inst(inst[c]), .fetch_done(fetch_done[c])
    );
    assign done[c] = fetch_done[c] && idle[c];
  end

  rr_core_ptr #(.NUM_PREGS(NUM_PREGS), .ROB_ENTRIES(ROB_ENTRIES),
                .IQ_ENTRIES(IQ_ENTRIES), .UNIFIED(1'b0)) u_ptr (
    .clk, .rst, .inst_val(inst_val[0]), .inst_rdy(inst_rdy[0]), .inst(inst[0]),
    .idle(idle[0]), .dbg_areg, .dbg_value(dbg_value[0])
  );

  rr_core_ptr #(.NUM_PREGS(NUM_PREGS), .ROB_ENTRIES(ROB_ENTRIES),
                .IQ_ENTRIES(IQ_ENTRIES), .UNIFIED(1'b1)) u_urf (
    .clk, .rst, .inst_val(inst_val[1]), .inst_rdy(inst_rdy[1]), .inst(inst[1]),
    .idle(idle[1]), .dbg_areg, .dbg_value(dbg_value[1])
  );

  rr_core_val #(.ROB_ENTRIES(ROB_ENTRIES), .IQ_ENTRIES(IQ_ENTRIES)) u_val (
    .clk, .rst, .inst_val(inst_val[2]), .inst_rdy(inst_rdy[2]), .inst(inst[2]),
    .idle(idle[2]), .dbg_areg, .dbg_value(dbg_value[2])
  );
endmodule
