// Y pipe functional unit: a four-stage pipelined multiplier (stages Y0..Y3)
// returning the low 32 bits of a*b, as RV32 mul. One operation can enter
// every cycle; its result appears on out_* exactly four cycles after it was
// presented on in_*, together with the tag that travelled with it. The
// product is formed in Y0 from two 16-bit halves of b and summed in Y1;
// Y2 and Y3 only carry it, so the unit has the lecture's four-stage
// latency. How the multiply is split across the stages is this design's
// choice; the lecture gives only the number of stages.
module rr_y_unit
  import rr_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_val,
  input  logic [TAG_W-1:0] in_tag,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic             out_val,
  output logic [TAG_W-1:0] out_tag,
  output logic [XLEN-1:0]  y
);
  logic [3:0]             val_q;
  logic [TAG_W-1:0]       tag_q [4];
  logic [XLEN-1:0]        lo_q, hi_q;     // Y0 -> Y1 partial products
  logic [XLEN-1:0]        prod_q [3];     // Y1 -> Y2 -> Y3 -> out

  always_ff @(posedge clk) begin
    if (rst) val_q <= '0;
    else     val_q <= {val_q[2:0], in_val};
    tag_q[0]  <= in_tag;
    tag_q[1]  <= tag_q[0];
    tag_q[2]  <= tag_q[1];
    tag_q[3]  <= tag_q[2];
    // Y0: partial products of a with the two halves of b
    lo_q      <= a * {16'd0, b[15:0]};
    hi_q      <= (a * {16'd0, b[31:16]}) << 16;
    // Y1: sum; Y2, Y3: carry
    prod_q[0] <= lo_q + hi_q;
    prod_q[1] <= prod_q[0];
    prod_q[2] <= prod_q[1];
  end

  assign out_val = val_q[3];
  assign out_tag = tag_q[3];
  assign y       = prod_q[2];
endmodule
