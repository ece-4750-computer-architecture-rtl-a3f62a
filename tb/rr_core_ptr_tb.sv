// Testbench of the pointer-based IO2L core, in both organisations
// (separate PRF/ARF and unified register file with ART), plus a
// small-sized copy that can run out of physical registers and IQ entries. Each core runs the
// lecture's four-instruction example and then a random program; afterwards
// every architectural register is compared with the reference model. While
// running it checks that every add/addi reaches W two cycles and every mul
// five cycles after issue, and counts the mechanisms that must occur:
// out-of-order issue, W bypass, D stalls on a full IQ, a full ROB and an
// empty free list, W port conflicts, and physical registers freed at commit.
module rr_core_ptr_tb;
  import rr_pkg::*;
  import rr_tb_pkg::*;

  localparam int NCORE = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  logic [31:0] prog [$];

  logic            inst_val [NCORE];
  logic            inst_rdy [NCORE];
  logic [31:0]     inst     [NCORE];
  logic            idle     [NCORE];
  logic [4:0]      dbg_areg;
  logic [XLEN-1:0] dbg_value [NCORE];
  int              pc [NCORE];
  logic            run = 1'b0;

  // core 0: PRF + ARF, core 1: URF + ART, both at the lecture's sizes;
  // core 2: PRF + ARF with only three spare physical registers and a ROB
  // larger than the IQ, so that D also stalls on the free list and the IQ.
  rr_core_ptr #(.UNIFIED(1'b0)) dut0 (.clk, .rst, .inst_val(inst_val[0]), .inst_rdy(inst_rdy[0]),
    .inst(inst[0]), .idle(idle[0]), .dbg_areg, .dbg_value(dbg_value[0]));
  rr_core_ptr #(.UNIFIED(1'b1)) dut1 (.clk, .rst, .inst_val(inst_val[1]), .inst_rdy(inst_rdy[1]),
    .inst(inst[1]), .idle(idle[1]), .dbg_areg, .dbg_value(dbg_value[1]));
  rr_core_ptr #(.UNIFIED(1'b0), .NUM_PREGS(34), .ROB_ENTRIES(8), .IQ_ENTRIES(4)) dut2 (
    .clk, .rst, .inst_val(inst_val[2]), .inst_rdy(inst_rdy[2]),
    .inst(inst[2]), .idle(idle[2]), .dbg_areg, .dbg_value(dbg_value[2]));

  for (genvar c = 0; c < NCORE; c++) begin : g_feed
    assign inst_val[c] = run && pc[c] < prog.size();
    assign inst[c]     = (pc[c] < prog.size()) ? prog[pc[c]] : 32'h0;
    always_ff @(posedge clk) if (!run) pc[c] <= 0;
                             else if (inst_val[c] && inst_rdy[c]) pc[c] <= pc[c] + 1;
  end

  // mechanism counters, summed over the cores
  int n_bypx = 0;
  int n_ooo = 0, n_byp = 0, n_st_iq = 0, n_st_rob = 0, n_st_fl = 0, n_wconf = 0, n_free = 0;
  int issue_cyc [NCORE][8];

`define RR_PROBE(D, C) \
    n_ooo    += int'(D.i_val && D.i_idx != 0); \
    n_byp    += int'(D.i_val && D.i_byp != 0); \
    n_bypx   += int'(D.i_val && D.i_bypx != 0); \
    n_st_iq  += int'(D.stall_iq && !D.stall_rob); \
    n_st_rob += int'(D.stall_rob); \
    n_st_fl  += int'(D.stall_fl); \
    n_free   += int'(D.c_commit && D.c_dest_v); \
    if (D.u_iq.cnt_q != 0 && !D.u_iq.rdy[0] \
        && !(D.u_iq.ent_q[0].src_v[0] && D.u_iq.ent_q[0].src_p[0] && !D.u_iq.byp[0][0]) \
        && !(D.u_iq.ent_q[0].src_v[1] && D.u_iq.ent_q[0].src_p[1] && !D.u_iq.byp[0][1])) \
      n_wconf++; \
    if (D.i_val) issue_cyc[C][D.i_rob] = cycle; \
    if (D.w_val) begin \
      checks++; \
      if (cycle - issue_cyc[C][D.w_rob] != (D.y_out_val ? LAT_Y : LAT_X)) begin \
        failures++; $display("FAIL core%0d issue-to-W latency, ROB entry %0d", C, D.w_rob); \
      end \
    end

  always @(posedge clk) if (!rst) begin
    cycle++;
    `RR_PROBE(dut0, 0)
    `RR_PROBE(dut1, 1)
    `RR_PROBE(dut2, 2)
  end

  ref_model m;

  // Renaming trace of core 0 during the example: per dispatched instruction
  // the new preg, source pregs with pending bits and ppreg; and the pregs
  // freed at commit. Checked against the structure of the lecture's
  // example table: b waits on a's preg, c on b's, d's ppreg is b's preg,
  // and the freed registers are a, b, c's ppregs followed by b's preg.
  logic [31:0] tr_prog [$];
  logic        tracing = 1'b0;

  // Stage timing of the example on core 0, in cycles counted from the
  // cycle before a is in D, as in the lecture's example table:
  //        D   I   W   C
  //   a    1   2   7   8    mul: I, Y0..Y3, W
  //   b    2   6  11  12    issues while a is in Y3, takes a's result from W in Y0
  //   c    3  10  12  13    issues while b is in Y3
  //   d    4   7   9  14    the W port is a's in cycle 7, so d issues in 7
  int tr_t0 = -1, tr_n = 0;
  int tr_cyc [4][4];
  int tr_of_rob [8];
  localparam int EXP_CYC [4][4] = '{'{1, 2, 7, 8}, '{2, 6, 11, 12}, '{3, 10, 12, 13}, '{4, 7, 9, 14}};
  always @(posedge clk) if (tracing) begin
    if (tr_t0 < 0) tr_t0 = cycle - 1;
    if (dut0.d_fire && tr_n < 4) begin tr_of_rob[dut0.rob_idx] = tr_n; tr_cyc[tr_n][0] = cycle - tr_t0; tr_n++; end
    if (dut0.i_val)    tr_cyc[tr_of_rob[dut0.i_rob]][1] = cycle - tr_t0;
    if (dut0.w_val)    tr_cyc[tr_of_rob[dut0.w_rob]][2] = cycle - tr_t0;
    if (dut0.c_commit) tr_cyc[tr_of_rob[dut0.u_rob.head_q]][3] = cycle - tr_t0;
  end

  task automatic check_timing();
    for (int i = 0; i < 4; i++) begin
      $display("example %s: D %0d I %0d W %0d C %0d", i == 0 ? "a" : i == 1 ? "b" : i == 2 ? "c" : "d",
               tr_cyc[i][0], tr_cyc[i][1], tr_cyc[i][2], tr_cyc[i][3]);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (tr_cyc[i][k] != EXP_CYC[i][k]) begin failures++; $display("FAIL example timing %0d/%0d", i, k); end
      end
    end
  endtask
  typedef struct { int dest, s0, s1, pp; bit p0, p1; } ren_t;
  ren_t ren [$];
  int   freed [$];
  always @(posedge clk) if (tracing) begin
    if (dut0.d_fire) ren.push_back('{int'(dut0.fl_preg), int'(dut0.src0_preg), int'(dut0.src1_preg),
                                     int'(dut0.old_preg), dut0.src0_p, dut0.src1_p});
    if (dut0.c_commit && dut0.c_dest_v) freed.push_back(int'(dut0.c_ppreg));
  end

  // No register on the free list may still be mapped by the rename table
  // or waited on by an IQ entry.
  always @(posedge clk) if (!rst) begin
    for (int a = 1; a < 32; a++)
      if (dut0.u_fl.free_q[dut0.u_rt.preg_q[a]]) begin failures++; $display("FAIL mapped preg is free"); end
    for (int e = 0; e < 4; e++)
      if (32'(e) < 32'(dut0.u_iq.cnt_q))
        for (int k = 0; k < 2; k++)
          if (dut0.u_iq.ent_q[e].src_v[k] && dut0.u_fl.free_q[dut0.u_iq.ent_q[e].src[k]]) begin
            failures++; $display("FAIL IQ source preg is free");
          end
  end

  task automatic check_trace();
    checks += 8;
    if (ren.size() != 4 || freed.size() != 4) begin failures++; $display("FAIL trace length"); return; end
    // a: mul x1,x2,x3 -- both sources committed, not pending
    if (ren[0].p0 || ren[0].p1) begin failures++; $display("FAIL a sources pending"); end
    // b: mul x4,x1,x5 -- src0 is a's preg, pending
    if (ren[1].s0 != ren[0].dest || !ren[1].p0 || ren[1].p1) begin failures++; $display("FAIL b sources"); end
    // c: addi x6,x4,1 -- src0 is b's preg, pending
    if (ren[2].s0 != ren[1].dest || !ren[2].p0) begin failures++; $display("FAIL c source"); end
    // d: addi x4,x7,1 -- independent; its ppreg is b's preg (WAW on x4)
    if (ren[3].p0 || ren[3].pp != ren[1].dest) begin failures++; $display("FAIL d rename"); end
    // new pregs are handed out lowest first
    if (!(ren[0].dest < ren[1].dest && ren[1].dest < ren[2].dest && ren[2].dest < ren[3].dest)) begin
      failures++; $display("FAIL allocation order");
    end
    // freed at commit, in program order: a's, b's and c's ppreg, then b's preg
    if (freed[0] != ren[0].pp || freed[1] != ren[1].pp || freed[2] != ren[2].pp) begin
      failures++; $display("FAIL freed ppregs");
    end
    if (freed[3] != ren[1].dest) begin failures++; $display("FAIL b's preg not freed by d"); end
    checks++;
    if (ren[0].s0 == ren[0].dest) failures++;
  endtask

  // keep = 1 continues from the committed state of the previous program
  task automatic run_prog(input string name, input bit keep = 1'b0);
    int t;
    if (!keep) m = new();
    foreach (prog[i]) m.exec(prog[i]);
    run = 1'b0;
    if (!keep) begin
      rst = 1'b1;
      repeat (2) @(posedge clk);
      rst = 1'b0;
    end
    @(posedge clk);
    run = 1'b1;
    t = 0;
    while (!(idle[0] && idle[1] && idle[2] && pc[0] == prog.size() && pc[1] == prog.size()
             && pc[2] == prog.size()) && t < 20000) begin
      @(posedge clk); t++;
    end
    run = 1'b0;
    #1;
    for (int r = 0; r < 32; r++) begin
      dbg_areg = 5'(r);
      #1;
      for (int c = 0; c < NCORE; c++) begin
        checks++;
        if (dbg_value[c] !== m.x[r]) begin
          failures++;
          $display("FAIL %s core%0d x%0d = %0d, expected %0d", name, c, r, dbg_value[c], m.x[r]);
        end
      end
    end
  endtask

  initial begin
    // the lecture's example, started from committed register values
    example_prog(prog);
    tr_prog = prog[4:7];
    prog = prog[0:3];
    run_prog("setup");
    prog = tr_prog;
    tracing = 1'b1;
    run_prog("example", 1'b1);
    tracing = 1'b0;
    check_trace();
    check_timing();
    // the lecture's results: x1 = 2, x4 = 6 (WAW with b resolved), x6 = 9
    dbg_areg = 5'd6; #1; checks++; if (dbg_value[0] != 9 || dbg_value[1] != 9 || dbg_value[2] != 9) failures++;
    for (int k = 0; k < 4; k++) begin
      prog.delete();
      random_prog(prog, 300, (k == 0) ? 4 : 8);
      run_prog($sformatf("random%0d", k));
    end
    // the free list runs dry only when many registers are renamed at once:
    // a long chain of muls with independent adds behind it
    prog.delete();
    for (int i = 0; i < 40; i++) prog.push_back(enc_mul(1, 1, 1));
    run_prog("chain");
    $display("bypass into X/Y0=%0d", n_bypx);
    $display("ooo=%0d bypass=%0d stall_iq=%0d stall_rob=%0d stall_fl=%0d wconf=%0d freed=%0d",
             n_ooo, n_byp, n_st_iq, n_st_rob, n_st_fl, n_wconf, n_free);
    checks += 7;
    if (n_ooo == 0)   begin failures++; $display("FAIL no out-of-order issue"); end
    if (n_byp == 0)   begin failures++; $display("FAIL no W bypass into I"); end
    checks++;
    if (n_bypx == 0)  begin failures++; $display("FAIL no W bypass into X/Y0"); end
    if (n_st_iq == 0) begin failures++; $display("FAIL no IQ stall"); end
    if (n_st_fl == 0) begin failures++; $display("FAIL no free-list stall"); end
    if (n_st_rob == 0) begin failures++; $display("FAIL no ROB stall"); end
    if (n_wconf == 0) begin failures++; $display("FAIL no W port conflict"); end
    if (n_free == 0)  begin failures++; $display("FAIL no preg freed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
