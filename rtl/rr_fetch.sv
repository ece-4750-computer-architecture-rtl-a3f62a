// F stage: program counter and instruction memory.
//
// The instruction memory (IMEM_WORDS 32-bit words) is loaded through a
// write port while the core is idle. A start pulse sets the PC to 0 and the
// stage then fetches num_insts consecutive words, one per cycle, into the
// F/D pipeline register (inst_val, inst). The register holds its
// instruction while D does not take it (inst_rdy low). fetch_done is set
// once every instruction has been handed to D. The lecture names the F
// stage only; this straight-line fetch without branches matches its
// add/addi/mul-only instruction set and is otherwise this design's choice.
module rr_fetch #(
  parameter int IMEM_WORDS = 64,
  localparam int AW = $clog2(IMEM_WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          imem_we,
  input  logic [AW-1:0] imem_waddr,
  input  logic [31:0]   imem_wdata,
  input  logic          start,
  input  logic [AW:0]   num_insts,
  output logic          inst_val,
  input  logic          inst_rdy,
  output logic [31:0]   inst,
  output logic          fetch_done
);
  logic [31:0] imem_q [IMEM_WORDS];
  logic [AW:0] pc_q, num_q;
  logic        run_q;

  always_ff @(posedge clk) begin
    if (imem_we) imem_q[imem_waddr] <= imem_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q     <= '0;
      num_q    <= '0;
      run_q    <= 1'b0;
      inst_val <= 1'b0;
      inst     <= '0;
    end else if (start) begin
      pc_q     <= '0;
      num_q    <= num_insts;
      run_q    <= 1'b1;
      inst_val <= 1'b0;
    end else if (!inst_val || inst_rdy) begin
      if (run_q && pc_q < num_q) begin
        inst_val <= 1'b1;
        inst     <= imem_q[pc_q[AW-1:0]];
        pc_q     <= pc_q + 1'b1;
      end else begin
        inst_val <= 1'b0;
      end
    end
  end

  assign fetch_done = run_q && pc_q == num_q && !inst_val;
endmodule
