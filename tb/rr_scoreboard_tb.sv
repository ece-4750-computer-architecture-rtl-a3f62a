// Testbench of rr_scoreboard: random issues into the X and Y pipes, only
// when the scoreboard says the W slot is free. A model records the cycle
// each issue reaches W; checked every cycle: the W-slot answers for X
// (two cycles ahead) and Y (five cycles ahead) and that in_w is set for
// exactly the tag whose result is in W this cycle, and in_w_next for the
// tag that reaches W in the next cycle. It also checks that an
// X issue is refused at least once because of an earlier Y issue.
module rr_scoreboard_tb;
  import rr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic       issue = 1'b0, issue_y, issue_dest_v;
  logic [5:0] issue_tag;
  logic       wport_free_x, wport_free_y;
  logic [63:0] in_w, in_w_next, pending;
  int checks = 0, failures = 0, cycle = 0, n_refused = 0;
  int   wslot_busy [int];          // cycle -> 1
  int   wslot_tag  [int];          // cycle -> tag or -1
  rr_scoreboard #(.NUM_TAGS(64)) dut (.clk, .rst, .issue, .issue_y, .issue_dest_v, .issue_tag,
    .wport_free_x, .wport_free_y, .in_w, .in_w_next, .pending);

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] exp_w, exp_wn;
      logic fx, fy;
      fx = !wslot_busy.exists(cycle + LAT_X);
      fy = !wslot_busy.exists(cycle + LAT_Y);
      exp_w = '0;
      if (wslot_tag.exists(cycle) && wslot_tag[cycle] >= 0) exp_w[wslot_tag[cycle]] = 1'b1;
      exp_wn = '0;
      if (wslot_tag.exists(cycle + 1) && wslot_tag[cycle + 1] >= 0) exp_wn[wslot_tag[cycle + 1]] = 1'b1;
      issue_y = $urandom_range(1); issue_dest_v = ($urandom_range(7) != 0);
      issue_tag = 6'(i % 64);
      issue = ($urandom_range(3) != 0) && (issue_y ? fy : fx);
      n_refused += int'(!fx && fy);
      #1;
      checks += 4;
      if (in_w_next != exp_wn) begin failures++; $display("FAIL in_w_next at %0d", cycle); end
      if (wport_free_x != fx) begin failures++; $display("FAIL free_x at %0d", cycle); end
      if (wport_free_y != fy) begin failures++; $display("FAIL free_y at %0d", cycle); end
      if (in_w != exp_w)      begin failures++; $display("FAIL in_w at %0d", cycle); end
      if (issue) begin
        int wc;
        wc = cycle + (issue_y ? LAT_Y : LAT_X);
        wslot_busy[wc] = 1;
        wslot_tag[wc]  = issue_dest_v ? int'(issue_tag) : -1;
      end
      @(posedge clk);
      cycle++;
      #1;
    end
    checks++;
    if (n_refused == 0) begin failures++; $display("FAIL no W port conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
