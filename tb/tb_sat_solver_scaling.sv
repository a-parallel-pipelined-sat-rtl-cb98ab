// tb_sat_solver_scaling: the same instances on solvers with 1, 2, 4, 8, 16,
// 32 and 64 pipes and the same 128 clause slots in all (128 slots of one
// pipe down to 2 slots in each of 64 pipes), 64 variables in words of 8.
// This is the experiment behind the published speed-up table: only the
// number of pipes changes. Checked for every instance:
//   * every solver gives the same answer, the same numbers of decisions and
//     backtracks, and the same assignment, which satisfies every clause;
//   * the answer agrees with the planted solution (satisfiable instances) or
//     the instance is the unsatisfiable pigeonhole hole4.
// Printed: cycles per solver and the speed-up over the single pipe.
module tb_sat_solver_scaling;
  import sat_pkg::*;
  localparam int NV = 64, BW = 8, ML = 4, TOTAL = 128, NCFG = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, start;
  int   cfg_i;
  lit_t [ML-1:0] cfg_lits;
  logic [NCFG-1:0] done, sat;
  logic [NV-1:0][1:0] asg [NCFG];
  logic [31:0] dec [NCFG], bt [NCFG], cyc [NCFG];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int P = 1 << g, C = TOTAL >> g;
    localparam int PW = (P > 1) ? $clog2(P) : 1, AW = $clog2(C);
    logic [PW-1:0] cp;
    logic [AW-1:0] cc;
    logic [31:0] mg, it, ps;
    logic busy;
    assign cp = PW'(cfg_i % P);
    assign cc = AW'(cfg_i / P);
    sat_solver_top #(.BUS_W(BW), .NUM_VARS(NV), .MAX_LITS(ML),
                     .CLAUSES_PER_PIPE(C), .NUM_PIPES(P)) dut (
      .clk, .rst_n, .cfg_we, .cfg_pipe(cp), .cfg_clause(cc), .cfg_lits,
      .start, .busy_o(busy), .done_o(done[g]), .sat_o(sat[g]), .assign_o(asg[g]),
      .cnt_decisions(dec[g]), .cnt_backtracks(bt[g]), .cnt_merges(mg),
      .cnt_iterations(it), .cnt_passes(ps), .cnt_cycles(cyc[g]));
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  lit_t [ML-1:0] cls [TOTAL];
  int n_cls;

  function automatic bit clause_sat(lit_t [ML-1:0] c, logic [NV-1:0][1:0] a);
    for (int k = 0; k < ML; k++)
      if (c[k].en && a[c[k].var_idx] == (c[k].neg ? VAL_0 : VAL_1)) return 1;
    return 0;
  endfunction

  task automatic run(string name, bit expect_sat);
    int t;
    string line;
    for (int i = 0; i < TOTAL; i++) begin
      @(negedge clk); cfg_we = 1; cfg_i = i; cfg_lits = (i < n_cls) ? cls[i] : '0;
    end
    @(negedge clk); cfg_we = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 0;
    while (!(&done) && t < 3_000_000) begin @(negedge clk); t++; end
    check(&done, {name, ": all solvers finish"});
    for (int g = 0; g < NCFG; g++) begin
      check(sat[g] == expect_sat, $sformatf("%s: answer with %0d pipes", name, 1 << g));
      check(dec[g] == dec[0] && bt[g] == bt[0],
            $sformatf("%s: %0d pipes make the same decisions and backtracks", name, 1 << g));
      if (sat[g]) begin
        bit ok = 1;
        check(asg[g] == asg[0], $sformatf("%s: same assignment with %0d pipes", name, 1 << g));
        for (int i = 0; i < n_cls; i++) ok &= clause_sat(cls[i], asg[g]);
        check(ok, $sformatf("%s: assignment satisfies all clauses", name));
      end
    end
    line = $sformatf("%s: decisions=%0d backtracks=%0d | pipes:cycles(speed-up)", name, dec[0], bt[0]);
    for (int g = 0; g < NCFG; g++)
      line = {line, $sformatf(" %0d:%0d(%.2f)", 1 << g, cyc[g], real'(cyc[0]) / real'(cyc[g]))};
    $display("%s", line);
  endtask

  task automatic make_planted(int nv, int nc);
    logic [NV-1:0] hidden;
    n_cls = nc;
    for (int v = 0; v < NV; v++) hidden[v] = 1'($urandom_range(1));
    for (int i = 0; i < nc; i++) begin
      int a, b, c;
      bit ok;
      do begin
        a = $urandom_range(nv - 1); b = $urandom_range(nv - 1); c = $urandom_range(nv - 1);
      end while (a == b || b == c || a == c);
      do begin
        cls[i] = '0;
        cls[i][0] = '{en: 1, neg: 1'($urandom_range(1)), var_idx: 16'(a)};
        cls[i][1] = '{en: 1, neg: 1'($urandom_range(1)), var_idx: 16'(b)};
        cls[i][2] = '{en: 1, neg: 1'($urandom_range(1)), var_idx: 16'(c)};
        ok = (hidden[a] != cls[i][0].neg) || (hidden[b] != cls[i][1].neg) || (hidden[c] != cls[i][2].neg);
      end while (!ok);
    end
  endtask

  task automatic make_hole4();
    n_cls = 0;
    for (int p = 0; p < 5; p++) begin
      cls[n_cls] = '0;
      for (int h = 0; h < 4; h++) cls[n_cls][h] = '{en: 1, neg: 0, var_idx: 16'(p * 4 + h)};
      n_cls++;
    end
    for (int h = 0; h < 4; h++)
      for (int p = 0; p < 5; p++)
        for (int q = p + 1; q < 5; q++) begin
          cls[n_cls] = '0;
          cls[n_cls][0] = '{en: 1, neg: 1, var_idx: 16'(p * 4 + h)};
          cls[n_cls][1] = '{en: 1, neg: 1, var_idx: 16'(q * 4 + h)};
          n_cls++;
        end
  endtask

  initial begin
    cfg_we = 0; start = 0; cfg_i = 0; cfg_lits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_hole4();
    run("hole4", 0);
    make_planted(50, 80);     // the size of aim-50-1_6
    run("planted-50-80", 1);
    make_planted(50, 100);    // the size of aim-50-2_0
    run("planted-50-100", 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
