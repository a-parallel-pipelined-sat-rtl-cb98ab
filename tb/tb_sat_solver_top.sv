// tb_sat_solver_top: end-to-end test of the parallel pipelined solver.
//
// Two solvers hold the same random CNF instances: one with 4 pipes of 8
// clause slots, one with a single pipe of 32 slots. Every instance is also
// solved here by trying all 2^12 assignments. Checked for each instance:
//   * both solvers give the brute-force answer (SAT / UNSAT);
//   * a reported assignment leaves no variable open and satisfies every clause;
//   * the multi-pipe solver makes exactly the decisions and backtracks of the
//     single pipe and ends on the same assignment (the pipes only change
//     where implications are found, not which ones);
//   * fewer cycles per decision are not required, but the cycle count of a
//     run must match the model: each pass, merge and load costs what the
//     design says (checked in aggregate as a lower bound).
// The instances mix 2- and 3-literal random clauses with the pigeonhole
// instance of 4 pigeons in 3 holes (UNSAT). The test counts how often each
// mechanism happened: decisions, backtracks, pipe conflicts (abort of all
// pipes), merge conflicts, merges that changed a pipe's set (re-iteration),
// repeated passes inside one pipe, pending flags, SAT and UNSAT results.
module tb_sat_solver_top;
  import sat_pkg::*;

  localparam int BW = 4, NV = 12, ML = 3, NP = 4, CP = 8, NC = NP * CP;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- two solvers ----
  logic cfg_we4, cfg_we1, start;
  logic [1:0] cfg_pipe4;
  logic [2:0] cfg_clause4;
  logic [4:0] cfg_clause1;
  lit_t [ML-1:0] cfg_lits;
  logic busy4, done4, sat4, busy1, done1, sat1;
  logic [NV-1:0][1:0] asg4, asg1;
  logic [31:0] dec4, bt4, mg4, it4, ps4, cy4, dec1, bt1, mg1, it1, ps1, cy1;

  sat_solver_top #(.BUS_W(BW), .NUM_VARS(NV), .MAX_LITS(ML),
                   .CLAUSES_PER_PIPE(CP), .NUM_PIPES(NP)) dut4 (
    .clk, .rst_n, .cfg_we(cfg_we4), .cfg_pipe(cfg_pipe4), .cfg_clause(cfg_clause4),
    .cfg_lits, .start, .busy_o(busy4), .done_o(done4), .sat_o(sat4), .assign_o(asg4),
    .cnt_decisions(dec4), .cnt_backtracks(bt4), .cnt_merges(mg4),
    .cnt_iterations(it4), .cnt_passes(ps4), .cnt_cycles(cy4));

  sat_solver_top #(.BUS_W(BW), .NUM_VARS(NV), .MAX_LITS(ML),
                   .CLAUSES_PER_PIPE(NC), .NUM_PIPES(1)) dut1 (
    .clk, .rst_n, .cfg_we(cfg_we1), .cfg_pipe(1'b0), .cfg_clause(cfg_clause1),
    .cfg_lits, .start, .busy_o(busy1), .done_o(done1), .sat_o(sat1), .assign_o(asg1),
    .cnt_decisions(dec1), .cnt_backtracks(bt1), .cnt_merges(mg1),
    .cnt_iterations(it1), .cnt_passes(ps1), .cnt_cycles(cy1));

  // ---- mechanism counters (observed inside the 4-pipe solver) ----
  int n_abort = 0, n_mconf = 0, n_mchange = 0, n_repass = 0, n_clause_confl = 0, n_pending = 0;
  int n_sat = 0, n_unsat = 0, n_dec = 0, n_bt = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut4.abort_iter) n_abort++;
    if (dut4.u_ctrl.state == 4'd5 && dut4.u_ctrl.cnt == 0) begin
      if (dut4.u_ctrl.mconf) n_mconf++;
      else if (|dut4.p_changed) n_mchange++;
    end
    if (dut4.g_pipe[0].u_pipe.u_vmem.state == 3'd2 && dut4.g_pipe[0].u_pipe.u_vmem.pass_changed &&
        !dut4.g_pipe[0].u_pipe.u_vmem.pass_conflict) n_repass++;
    if (dut4.g_pipe[0].u_pipe.from_hdr.valid && dut4.g_pipe[0].u_pipe.from_hdr.conflict)
      n_clause_confl++;
    if (dut4.g_pipe[0].u_pipe.from_hdr.valid && dut4.g_pipe[0].u_pipe.from_hdr.pending)
      n_pending++;
  end

  // ---- instance store ----
  lit_t [ML-1:0] cls [NC];
  int n_cls;

  function automatic bit clause_sat(lit_t [ML-1:0] c, logic [NV-1:0] a);
    for (int k = 0; k < ML; k++)
      if (c[k].en && (a[c[k].var_idx] != c[k].neg)) return 1;
    return 0;
  endfunction

  function automatic bit brute_sat();
    for (int a = 0; a < (1 << NV); a++) begin
      bit ok = 1;
      for (int i = 0; i < n_cls && ok; i++) ok = clause_sat(cls[i], NV'(a));
      if (ok) return 1;
    end
    return 0;
  endfunction

  task automatic load_all();
    for (int i = 0; i < NC; i++) begin
      @(negedge clk);
      cfg_lits    = (i < n_cls) ? cls[i] : '0;
      // clause i goes to pipe i % NP, slot i / NP in the 4-pipe solver
      cfg_we4 = 1; cfg_pipe4 = 2'(i % NP); cfg_clause4 = 3'(i / NP);
      cfg_we1 = 1; cfg_clause1 = 5'(i);
    end
    @(negedge clk); cfg_we4 = 0; cfg_we1 = 0;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_assign(logic [NV-1:0][1:0] asg, string who);
    logic [NV-1:0] a;
    bit open = 0;
    for (int v = 0; v < NV; v++) begin
      if (asg[v] != VAL_0 && asg[v] != VAL_1) open = 1;
      a[v] = (asg[v] == VAL_1);
    end
    check(!open, {who, ": assignment complete"});
    for (int i = 0; i < n_cls; i++) check(clause_sat(cls[i], a), {who, ": clause satisfied"});
  endtask

  task automatic run_instance(string name);
    bit expect_sat;
    int t;
    load_all();
    expect_sat = brute_sat();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 0;
    while (!(done4 && done1) && t < 400000) begin @(negedge clk); t++; end
    check(done4 && done1, {name, ": both solvers finish"});
    check(sat4 == expect_sat, {name, ": 4-pipe answer"});
    check(sat1 == expect_sat, {name, ": 1-pipe answer"});
    check(dec4 == dec1 && bt4 == bt1, {name, ": same decisions and backtracks"});
    if (sat4) begin
      check_assign(asg4, {name, " 4-pipe"});
      check(asg4 == asg1, {name, ": same assignment"});
      n_sat++;
    end else n_unsat++;
    // every iteration makes at least one pass of W + CP + 1 cycles, every
    // merge takes log2(NP) + W cycles
    check(cy4 >= it4 * (NV / BW + CP + 1) + mg4 * (2 + NV / BW), {name, ": cycle lower bound"});
    check(ps4 >= it4, {name, ": at least one pass per iteration"});
    n_dec += dec4; n_bt += bt4;
    $display("%s: sat=%0d dec=%0d bt=%0d merges=%0d iters=%0d cycles4=%0d cycles1=%0d",
             name, sat4, dec4, bt4, mg4, it4, cy4, cy1);
  endtask

  // Random clause with nl distinct variables.
  function automatic lit_t [ML-1:0] rand_clause(int nl);
    lit_t [ML-1:0] c = '0;
    int used[$];
    for (int k = 0; k < nl; k++) begin
      int v;
      do v = $urandom_range(NV - 1); while (v inside {used});
      used.push_back(v);
      c[k].en = 1; c[k].neg = 1'($urandom_range(1)); c[k].var_idx = 16'(v);
    end
    return c;
  endfunction

  // Pigeonhole: 4 pigeons, 3 holes; variable p*3+h = pigeon p in hole h.
  task automatic make_hole3();
    n_cls = 0;
    for (int p = 0; p < 4; p++) begin
      cls[n_cls] = '0;
      for (int h = 0; h < 3; h++) begin
        cls[n_cls][h].en = 1; cls[n_cls][h].neg = 0; cls[n_cls][h].var_idx = 16'(p * 3 + h);
      end
      n_cls++;
    end
    for (int h = 0; h < 3; h++)
      for (int p = 0; p < 4; p++)
        for (int q = p + 1; q < 4; q++) begin
          cls[n_cls] = '0;
          cls[n_cls][0] = '{en: 1, neg: 1, var_idx: 16'(p * 3 + h)};
          cls[n_cls][1] = '{en: 1, neg: 1, var_idx: 16'(q * 3 + h)};
          n_cls++;
        end
  endtask

  initial begin
    cfg_we4 = 0; cfg_we1 = 0; start = 0; cfg_lits = '0; cfg_pipe4 = 0; cfg_clause4 = 0; cfg_clause1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    make_hole3();
    run_instance("hole3");
    check(!sat4, "hole3 is unsatisfiable");

    for (int r = 0; r < 24; r++) begin
      n_cls = 10 + $urandom_range(NC - 10);
      for (int i = 0; i < n_cls; i++)
        cls[i] = rand_clause(($urandom_range(9) < 3) ? 2 : 3);
      if (r % 6 == 5) cls[$urandom_range(n_cls - 1)] = rand_clause(1);  // a unit clause
      run_instance($sformatf("rand%0d", r));
    end

    $display("mechanisms: decisions=%0d backtracks=%0d pipe_aborts=%0d merge_conflicts=%0d merge_changes=%0d repeated_passes=%0d clause_conflicts=%0d pending_flags=%0d sat=%0d unsat=%0d",
             n_dec, n_bt, n_abort, n_mconf, n_mchange, n_repass, n_clause_confl, n_pending, n_sat, n_unsat);
    check(n_pending > 0, "a clause asked for another pass (pending)");
    check(n_dec > 0, "decisions happened");
    check(n_bt > 0, "backtracks happened");
    check(n_abort > 0, "pipe conflict aborted all pipes");
    check(n_mconf > 0, "merge found a conflict");
    check(n_mchange > 0, "merge changed a pipe's set");
    check(n_repass > 0, "a pipe repeated a pass");
    check(n_clause_confl > 0, "a clause raised a conflict");
    check(n_sat > 0 && n_unsat > 0, "both answers seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
