// End-to-end testbench of rr_top at its default sizes. Programs are loaded
// into each core's instruction memory through the top's write port, started
// with a start pulse and run until all three cores report done; then every
// architectural register of every core is compared with the reference
// model. Programs: the lecture's example (checked also against its known
// results x1=2, x4=6, x6=9), the four-add sequence used to explain when a
// physical register may be freed, and then random add/addi/mul programs that
// fill the instruction memory. It counts, for each core, out-of-order
// issues, W bypasses (into I or X/Y0), D stalls on a full ROB, W port conflicts and commits,
// and the value core's uses of ROB-held values in D; a mechanism that never
// occurs is a failure. It also checks that the example takes the same
// number of cycles on all three cores, since they differ only in renaming.
module rr_top_tb;
  import rr_pkg::*;
  import rr_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [2:0]      imem_we = '0;
  logic [5:0]      imem_waddr;
  logic [31:0]     imem_wdata;
  logic            start = 1'b0;
  logic [6:0]      num_insts;
  logic [2:0]      done;
  logic [4:0]      dbg_areg = '0;
  logic [XLEN-1:0] dbg_value [3];

  rr_top dut (.clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .start, .num_insts,
              .done, .dbg_areg, .dbg_value);

  int checks = 0, failures = 0;
  int n_ooo [3], n_byp [3], n_stall [3], n_wconf [3], n_commit [3], n_robsrc = 0;
  int done_cyc [3];
  logic [31:0] prog [$];

`define RR_COUNT(D, C) \
    n_ooo[C]    += int'(D.i_val && D.i_idx != 0); \
    n_byp[C]    += int'(D.i_val && (D.i_byp != 0 || D.i_bypx != 0)); \
    n_stall[C]  += int'(D.stall_rob); \
    n_commit[C] += int'(D.c_commit); \
    n_wconf[C]  += int'(D.u_iq.cnt_q != 0 && !D.u_iq.rdy[0] \
        && !(D.u_iq.ent_q[0].src_v[0] && D.u_iq.ent_q[0].src_p[0] && !D.u_iq.byp[0][0]) \
        && !(D.u_iq.ent_q[0].src_v[1] && D.u_iq.ent_q[0].src_p[1] && !D.u_iq.byp[0][1]));

  always @(posedge clk) if (!rst) begin
    `RR_COUNT(dut.u_ptr, 0)
    `RR_COUNT(dut.u_urf, 1)
    `RR_COUNT(dut.u_val, 2)
    for (int k = 0; k < 2; k++)
      n_robsrc += int'(dut.u_val.d_fire && dut.u_val.d_src_v[k] && dut.u_val.rt_v[k]
                       && !dut.u_val.rt_p[k]);
  end

  task automatic run_prog(input string name);
    ref_model m;
    int t;
    m = new();
    foreach (prog[i]) m.exec(prog[i]);
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    foreach (prog[i]) begin
      imem_we = 3'b111; imem_waddr = 6'(i); imem_wdata = prog[i];
      @(posedge clk);
    end
    imem_we = '0;
    num_insts = 7'(prog.size());
    start = 1'b1;
    @(posedge clk);
    start = 1'b0;
    t = 0;
    done_cyc = '{default: -1};
    while (done != 3'b111 && t < 5000) begin
      @(posedge clk); t++;
      for (int c = 0; c < 3; c++) if (done[c] && done_cyc[c] < 0) done_cyc[c] = t;
    end
    checks++;
    if (done != 3'b111) begin failures++; $display("FAIL %s: not done", name); end
    for (int r = 0; r < 32; r++) begin
      dbg_areg = 5'(r);
      #1;
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (dbg_value[c] != m.x[r]) begin
          failures++;
          $display("FAIL %s core%0d x%0d = %0d, expected %0d", name, c, r, dbg_value[c], m.x[r]);
        end
      end
    end
    $display("%s: %0d instructions, done after %0d/%0d/%0d cycles", name, prog.size(),
             done_cyc[0], done_cyc[1], done_cyc[2]);
  endtask

  initial begin
    example_prog(prog);
    run_prog("example");
    checks += 4;
    dbg_areg = 5'd1; #1; if (dbg_value[2] != 2) failures++;
    dbg_areg = 5'd4; #1; if (dbg_value[2] != 6) failures++;
    dbg_areg = 5'd6; #1; if (dbg_value[2] != 9) failures++;
    if (done_cyc[0] != done_cyc[1] || done_cyc[1] != done_cyc[2]) begin
      failures++; $display("FAIL cores differ in cycle count");
    end
    // the freeing example: r1's first physical register may only be freed
    // when the second writer of r1 commits, after its reader has issued
    prog.delete();
    for (int r = 2; r <= 10; r++) prog.push_back(enc_addi(r, 0, 10 * r));
    prog.push_back(enc_add(1, 2, 3));
    prog.push_back(enc_add(4, 1, 5));
    prog.push_back(enc_add(1, 6, 7));
    prog.push_back(enc_add(8, 9, 10));
    run_prog("freeing");
    checks += 2;
    dbg_areg = 5'd4; #1; if (dbg_value[0] != 100 || dbg_value[1] != 100) failures++;
    dbg_areg = 5'd1; #1; if (dbg_value[0] != 130 || dbg_value[1] != 130) failures++;
    for (int k = 0; k < 6; k++) begin
      prog.delete();
      random_prog(prog, 64, 4 + k);
      run_prog($sformatf("random%0d", k));
    end
    for (int c = 0; c < 3; c++) begin
      $display("core%0d: ooo=%0d bypass=%0d rob_stall=%0d wport_conflict=%0d commits=%0d",
               c, n_ooo[c], n_byp[c], n_stall[c], n_wconf[c], n_commit[c]);
      checks += 5;
      if (n_ooo[c] == 0)    begin failures++; $display("FAIL core%0d: no out-of-order issue", c); end
      if (n_byp[c] == 0)    begin failures++; $display("FAIL core%0d: no W bypass", c); end
      if (n_stall[c] == 0)  begin failures++; $display("FAIL core%0d: no ROB-full stall", c); end
      if (n_wconf[c] == 0)  begin failures++; $display("FAIL core%0d: no W port conflict", c); end
      if (n_commit[c] == 0) begin failures++; $display("FAIL core%0d: no commit", c); end
    end
    checks++;
    if (n_robsrc == 0) begin failures++; $display("FAIL value core never read a ROB value in D"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
