// Testbench of rr_fetch: loads a program through the write port, starts the
// stage and consumes instructions with a randomly stalling D; the words
// must arrive in order, each exactly once, one per cycle while D accepts
// (checked with an always-ready D), and fetch_done must rise after the last.
module rr_fetch_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        imem_we = 1'b0, start = 1'b0, inst_val, inst_rdy = 1'b0, fetch_done;
  logic [5:0]  imem_waddr;
  logic [31:0] imem_wdata, inst;
  logic [6:0]  num_insts;
  logic [31:0] prog [64];
  int checks = 0, failures = 0;
  rr_fetch #(.IMEM_WORDS(64)) dut (.clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .start,
    .num_insts, .inst_val, .inst_rdy, .inst, .fetch_done);

  task automatic run(int n, bit stall);
    int got, cyc;
    num_insts = 7'(n);
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    got = 0; cyc = 0;
    while (!fetch_done && cyc < 1000) begin
      inst_rdy = stall ? ($urandom_range(2) == 0) : 1'b1;
      #1;
      if (inst_val && inst_rdy) begin
        checks++;
        if (inst != prog[got]) begin failures++; $display("FAIL word %0d", got); end
        got++;
      end
      @(posedge clk); #1; cyc++;
    end
    checks += 2;
    if (got != n) begin failures++; $display("FAIL %0d of %0d words", got, n); end
    if (!stall && cyc != n + 1) begin failures++; $display("FAIL %0d cycles for %0d words", cyc, n); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int i = 0; i < 64; i++) begin
      prog[i] = $urandom;
      imem_we = 1'b1; imem_waddr = 6'(i); imem_wdata = prog[i];
      @(posedge clk); #1;
    end
    imem_we = 1'b0;
    run(64, 1'b0);
    run(40, 1'b1);
    run(1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
