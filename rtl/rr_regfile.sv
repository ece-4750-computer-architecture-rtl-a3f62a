// Register file used as PRF, ARF and unified register file.
//
// DEPTH words of XLEN bits, all cleared by reset. NREAD combinational read
// ports and NWRITE write ports that take effect at the clock edge; a later
// write port wins over an earlier one on the same address. A read in the
// same cycle as a write returns the old value; the cores bypass from the W
// stage themselves. Reset to zero and the port counts are this design's
// choices.
module rr_regfile
  import rr_pkg::*;
#(
  parameter int DEPTH  = 64,
  parameter int NREAD  = 2,
  parameter int NWRITE = 1,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [AW-1:0]   raddr [NREAD],
  output logic [XLEN-1:0] rdata [NREAD],
  input  logic            we    [NWRITE],
  input  logic [AW-1:0]   waddr [NWRITE],
  input  logic [XLEN-1:0] wdata [NWRITE]
);
  logic [XLEN-1:0] mem_q [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      for (int w = 0; w < NWRITE; w++)
        if (we[w]) mem_q[waddr[w]] <= wdata[w];
    end
  end

  always_comb for (int r = 0; r < NREAD; r++) rdata[r] = mem_q[raddr[r]];
endmodule
