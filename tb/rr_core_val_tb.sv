// Testbench of the value-based IO2L core, at the lecture's sizes and in a
// copy whose ROB is larger than its IQ, so that the IQ can fill up. Each core runs the
// lecture's four-instruction example and then a random program; afterwards
// every architectural register is compared with the reference model. While
// running it checks that every add/addi reaches W two cycles and every mul
// five cycles after issue, and counts the mechanisms that must occur:
// out-of-order issue, W bypass, D stalls on a full IQ, a full ROB and an
// W port conflicts, commits, and the three places D takes a source from:
// the ARF, a completed ROB entry, and a ROB id that the IQ later fills in.
module rr_core_val_tb;
  import rr_pkg::*;
  import rr_tb_pkg::*;

  localparam int NCORE = 2;
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

  rr_core_val dut0 (.clk, .rst, .inst_val(inst_val[0]), .inst_rdy(inst_rdy[0]),
    .inst(inst[0]), .idle(idle[0]), .dbg_areg, .dbg_value(dbg_value[0]));
  rr_core_val #(.ROB_ENTRIES(8), .IQ_ENTRIES(4)) dut1 (.clk, .rst, .inst_val(inst_val[1]),
    .inst_rdy(inst_rdy[1]), .inst(inst[1]), .idle(idle[1]), .dbg_areg, .dbg_value(dbg_value[1]));

  for (genvar c = 0; c < NCORE; c++) begin : g_feed
    assign inst_val[c] = run && pc[c] < prog.size();
    assign inst[c]     = (pc[c] < prog.size()) ? prog[pc[c]] : 32'h0;
    always_ff @(posedge clk) if (!run) pc[c] <= 0;
                             else if (inst_val[c] && inst_rdy[c]) pc[c] <= pc[c] + 1;
  end

  // mechanism counters, summed over the cores
  int n_src_arf = 0, n_src_rob = 0, n_src_tag = 0;
  int n_bypx = 0;
  int n_ooo = 0, n_byp = 0, n_st_iq = 0, n_st_rob = 0, n_st_fl = 0, n_wconf = 0, n_free = 0;
  int issue_cyc [NCORE][8];

`define RR_PROBE(D, C) \
    n_ooo    += int'(D.i_val && D.i_idx != 0); \
    n_byp    += int'(D.i_val && D.i_byp != 0); \
    n_bypx   += int'(D.i_val && D.i_bypx != 0); \
    n_st_iq  += int'(D.stall_iq && !D.stall_rob); \
    n_st_rob += int'(D.stall_rob); \
    for (int k = 0; k < 2; k++) if (D.d_fire && D.d_src_v[k]) begin \
      n_src_arf += int'(!D.rt_v[k]); \
      n_src_rob += int'(D.rt_v[k] && !D.rt_p[k]); \
      n_src_tag += int'(D.rt_v[k] && D.rt_p[k]); \
    end \
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
  end

  ref_model m;

  // IQ and ROB contents of core 0 as the example is dispatched, checked
  // against the lecture's example table: a gets ROB entry 0 with values
  // 1 and 2 from the ARF, b entry 1 waiting on entry 0 with value 4, c
  // entry 2 waiting on entry 1, d entry 3 with value 5; the ROB aregs are
  // x1, x4, x6, x4.
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
    if (dut0.c_commit) tr_cyc[tr_of_rob[dut0.c_idx]][3] = cycle - tr_t0;
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
  typedef struct { int dest; logic [31:0] s0, s1; bit p0, p1; int areg; } iq_t;
  iq_t ent [$];
  always @(posedge clk) if (tracing && dut0.d_fire)
    ent.push_back('{int'(dut0.rob_idx), dut0.d_src[0], dut0.d_src[1],
                    dut0.d_src_p[0], dut0.d_src_p[1], int'(dut0.dec.rd)});

  task automatic check_trace();
    checks += 5;
    if (ent.size() != 4) begin failures++; $display("FAIL trace length"); return; end
    if (ent[0].dest != 0 || ent[0].p0 || ent[0].p1 || ent[0].s0 != 1 || ent[0].s1 != 2 || ent[0].areg != 1) begin
      failures++; $display("FAIL a: p0 / x2=1 / x3=2");
    end
    if (ent[1].dest != 1 || !ent[1].p0 || ent[1].s0 != 0 || ent[1].p1 || ent[1].s1 != 4 || ent[1].areg != 4) begin
      failures++; $display("FAIL b: p1 / p0* / x5=4");
    end
    if (ent[2].dest != 2 || !ent[2].p0 || ent[2].s0 != 1 || ent[2].areg != 6) begin
      failures++; $display("FAIL c: p2 / p1*");
    end
    if (ent[3].dest != 3 || ent[3].p0 || ent[3].s0 != 5 || ent[3].areg != 4) begin
      failures++; $display("FAIL d: p3 / x7=5");
    end
    if (dut0.u_rt.v_q[4] || dut0.u_rt.v_q[1]) begin failures++; $display("FAIL RT entries not cleared at commit"); end
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
    while (!(idle[0] && idle[1] && pc[0] == prog.size() && pc[1] == prog.size()) && t < 20000) begin
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
    dbg_areg = 5'd6; #1; checks++; if (dbg_value[0] != 9 || dbg_value[1] != 9) failures++;
    for (int k = 0; k < 4; k++) begin
      prog.delete();
      random_prog(prog, 300, (k == 0) ? 4 : 8);
      run_prog($sformatf("random%0d", k));
    end
    // a long dependence chain
    prog.delete();
    for (int i = 0; i < 40; i++) prog.push_back(enc_mul(1, 1, 1));
    run_prog("chain");
    $display("bypass into X/Y0=%0d", n_bypx);
    $display("ooo=%0d bypass=%0d stall_iq=%0d stall_rob=%0d wconf=%0d commits=%0d src arf/rob/tag=%0d/%0d/%0d",
             n_ooo, n_byp, n_st_iq, n_st_rob, n_wconf, n_free, n_src_arf, n_src_rob, n_src_tag);
    checks += 7;
    if (n_ooo == 0)   begin failures++; $display("FAIL no out-of-order issue"); end
    if (n_byp == 0)   begin failures++; $display("FAIL no W bypass into I"); end
    checks++;
    if (n_bypx == 0)  begin failures++; $display("FAIL no W bypass into X/Y0"); end
    if (n_st_iq == 0) begin failures++; $display("FAIL no IQ stall"); end
    if (n_src_arf == 0 || n_src_rob == 0 || n_src_tag == 0) begin
      failures++; $display("FAIL a source path in D never used");
    end
    if (n_st_rob == 0) begin failures++; $display("FAIL no ROB stall"); end
    if (n_wconf == 0) begin failures++; $display("FAIL no W port conflict"); end
    if (n_free == 0)  begin failures++; $display("FAIL nothing committed"); end
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
