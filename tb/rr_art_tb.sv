// Testbench of rr_art: reset mapping xi -> p(i-1); random commits are
// mirrored and read back; x0 is never written.
module rr_art_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic       we = 1'b0;
  logic [4:0] waddr, raddr;
  logic [5:0] wpreg, rpreg;
  logic [5:0] model [32];
  int checks = 0, failures = 0;
  rr_art #(.NUM_PREGS(64)) dut (.clk, .rst, .we, .waddr, .wpreg, .raddr, .rpreg);
  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 32; i++) model[i] = (i == 0) ? 6'd0 : 6'(i - 1);
    for (int i = 0; i < 2000; i++) begin
      we = $urandom_range(1); waddr = 5'($urandom); wpreg = 6'($urandom); raddr = 5'($urandom);
      #1;
      checks++;
      if (rpreg != model[raddr]) begin failures++; $display("FAIL x%0d -> p%0d", raddr, rpreg); end
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wpreg;
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
