// Architectural rename table (ART) of the unified-register-file core.
//
// Holds, for every architectural register, the physical register of the
// unified register file that holds its committed value. The C stage copies
// the committing instruction's preg pointer into the entry of its
// destination register instead of copying a value. After reset xi maps to
// p(i-1), matching the rename table. One write port, two combinational read
// ports (one is used to read committed state out of the core). The ART's
// role follows the lecture; the reset mapping and port count are this
// design's choices.
module rr_art
  import rr_pkg::*;
#(
  parameter int NUM_PREGS = 64,
  localparam int PW = $clog2(NUM_PREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [4:0]    waddr,
  input  logic [PW-1:0] wpreg,
  input  logic [4:0]    raddr,
  output logic [PW-1:0] rpreg
);
  logic [PW-1:0] map_q [NAREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NAREGS; i++) map_q[i] <= (i == 0) ? '0 : PW'(i - 1);
    end else if (we && waddr != 5'd0) begin
      map_q[waddr] <= wpreg;
    end
  end

  assign rpreg = map_q[raddr];
endmodule
