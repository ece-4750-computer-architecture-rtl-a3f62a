// Testbench of rr_regfile: after reset every word reads zero; random writes
// on two write ports (the later port winning on equal addresses) are
// mirrored in an array and every read port is compared with it each cycle.
module rr_regfile_tb;
  import rr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [5:0]  raddr [3];
  logic [31:0] rdata [3];
  logic        we    [2];
  logic [5:0]  waddr [2];
  logic [31:0] wdata [2];
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  rr_regfile #(.DEPTH(64), .NREAD(3), .NWRITE(2)) dut (.clk, .rst, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    we = '{default: 1'b0};
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 64; i++) begin
      raddr[0] = 6'(i); #1; checks++;
      if (rdata[0] != 0) begin failures++; $display("FAIL reset %0d", i); end
    end
    for (int i = 0; i < 2000; i++) begin
      for (int w = 0; w < 2; w++) begin
        we[w] = $urandom_range(1); waddr[w] = 6'($urandom); wdata[w] = $urandom;
      end
      if (i % 5 == 0) waddr[1] = waddr[0];
      for (int r = 0; r < 3; r++) raddr[r] = 6'($urandom);
      #1;
      for (int r = 0; r < 3; r++) begin
        checks++;
        if (rdata[r] != model[raddr[r]]) begin failures++; $display("FAIL read %0d", raddr[r]); end
      end
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (we[w]) model[waddr[w]] = wdata[w];
      #1;
    end
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
