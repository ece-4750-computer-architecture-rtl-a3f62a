// Free list (FL) of the pointer-based renaming cores.
//
// One "free" bit per physical register. In the D stage a priority encoder
// offers the lowest-numbered free register (alloc_preg, valid when
// alloc_ok); asserting alloc clears its bit at the clock edge. In the C
// stage free_en sets the bit of free_preg again, so a register freed in a
// cycle can be allocated from the next cycle on. After reset registers
// 0 .. NUM_RESERVED-1 are in use (they hold the initial architectural
// mapping) and the rest are free. The free bits and the priority encoder
// follow the lecture; the reset split is this design's choice.
module rr_free_list #(
  parameter int NUM_PREGS    = 64,
  parameter int NUM_RESERVED = 31,
  localparam int PW = $clog2(NUM_PREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          alloc,
  output logic          alloc_ok,
  output logic [PW-1:0] alloc_preg,
  input  logic          free_en,
  input  logic [PW-1:0] free_preg,
  output logic [NUM_PREGS-1:0] free_bits
);
  logic [NUM_PREGS-1:0] free_q;

  always_comb begin
    alloc_ok   = 1'b0;
    alloc_preg = '0;
    for (int i = NUM_PREGS - 1; i >= 0; i--)
      if (free_q[i]) begin
        alloc_ok   = 1'b1;
        alloc_preg = PW'(i);
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_PREGS; i++) free_q[i] <= (i >= NUM_RESERVED);
    end else begin
      if (alloc && alloc_ok) free_q[alloc_preg] <= 1'b0;
      if (free_en)           free_q[free_preg]  <= 1'b1;
    end
  end

  assign free_bits = free_q;

  // A register is never freed while it is still free, nor allocated
  // when none is free.
  a_free_busy: assert property (@(posedge clk) disable iff (rst)
                                free_en |-> !free_q[free_preg]);
  a_alloc_ok:  assert property (@(posedge clk) disable iff (rst)
                                alloc |-> alloc_ok);
endmodule
