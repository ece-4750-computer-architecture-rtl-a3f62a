// Scoreboard (SB), read and written in the I stage.
//
// Indexed by tag (physical register, or ROB entry id in the value-based
// core). For each tag it records whether a result is on its way through X
// or Y and how many cycles remain until it reaches W. in_w[t] is set while
// tag t is in the W stage and in_w_next[t] the cycle before: a consumer
// issued in either cycle can take the value from the W bypass (into I, or
// into X/Y0 one cycle later). Separately it keeps a reservation bit for each of the next
// LAT_Y cycles saying whether the single W port is already claimed, so that
// an add (reaching W two cycles after issue) is never issued into the same
// W cycle as an earlier mul (five cycles after issue). Every issued
// instruction claims its W slot, also one with no destination. The lecture
// places a scoreboard indexed by physical register in I; its exact fields
// are this design's choice.
module rr_scoreboard
  import rr_pkg::*;
#(
  parameter int NUM_TAGS = 64,
  localparam int TW = $clog2(NUM_TAGS)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                issue,
  input  logic                issue_y,      // 1: Y pipe, 0: X pipe
  input  logic                issue_dest_v,
  input  logic [TW-1:0]       issue_tag,
  output logic                wport_free_x, // W free LAT_X cycles from now
  output logic                wport_free_y, // W free LAT_Y cycles from now
  output logic [NUM_TAGS-1:0] in_w,
  output logic [NUM_TAGS-1:0] in_w_next,
  output logic [NUM_TAGS-1:0] pending
);
  logic [NUM_TAGS-1:0] pend_q;
  logic [2:0]          cnt_q [NUM_TAGS];
  logic [LAT_Y:1]      res_q;            // res_q[k]: W busy k cycles from now

  assign wport_free_x = !res_q[LAT_X];
  assign wport_free_y = !res_q[LAT_Y];

  always_comb
    for (int t = 0; t < NUM_TAGS; t++) begin
      in_w[t]      = pend_q[t] && cnt_q[t] == 3'd0;
      in_w_next[t] = pend_q[t] && cnt_q[t] == 3'd1;
    end
  assign pending = pend_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q <= '0;
      res_q  <= '0;
      for (int t = 0; t < NUM_TAGS; t++) cnt_q[t] <= '0;
    end else begin
      res_q <= {1'b0, res_q[LAT_Y:2]};
      for (int t = 0; t < NUM_TAGS; t++)
        if (pend_q[t]) begin
          if (cnt_q[t] == 3'd0) pend_q[t] <= 1'b0;
          else                  cnt_q[t]  <= cnt_q[t] - 3'd1;
        end
      if (issue) begin
        res_q[issue_y ? LAT_Y - 1 : LAT_X - 1] <= 1'b1;
        if (issue_dest_v) begin
          pend_q[issue_tag] <= 1'b1;
          cnt_q[issue_tag]  <= issue_y ? 3'(LAT_Y - 1) : 3'(LAT_X - 1);
        end
      end
    end
  end

  a_wport: assert property (@(posedge clk) disable iff (rst)
                            issue |-> (issue_y ? wport_free_y : wport_free_x));
endmodule
