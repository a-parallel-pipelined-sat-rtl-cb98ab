// tb_sat_solver_full: the solver at its default size (8 pipes of 64 clause
// slots, 128 variables, 8 variables per bus word, 6-literal clauses) solves
// complete instances of the sizes of the benchmark families it is meant for:
//   * hole5: 6 pigeons in 5 holes, 30 variables, 81 clauses of up to 5
//     literals, unsatisfiable (the pigeonhole family, generated here). Set
//     HOLE_PIGEONS to 7 for hole6 (42 variables, 133 clauses of up to 6
//     literals): about 2.6 million cycles, several minutes of simulation;
//   * a random 3-SAT instance with 100 variables and 340 clauses, built
//     around a hidden assignment so it is satisfiable (the size of
//     aim-100-3_4; the aim generator itself is not reproduced).
// Clause i is loaded into pipe i mod 8, slot i div 8. Every result is
// checked against a software search that uses the same decision order,
// unit propagation and chronological backtracking: the answer, the number
// of decisions and backtracks, and the final assignment must all be equal;
// a satisfying assignment must also satisfy every clause.
module tb_sat_solver_full;
  import sat_pkg::*;
  localparam int NV = 128, ML = 6, NP = 8, CP = 64, NC = NP * CP;
  localparam int HOLE_PIGEONS = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, start, busy, done, sat;
  logic [2:0] cfg_pipe;
  logic [5:0] cfg_clause;
  lit_t [ML-1:0] cfg_lits;
  logic [NV-1:0][1:0] asg;
  logic [31:0] c_dec, c_bt, c_mg, c_it, c_ps, c_cy;
  int checks = 0, failures = 0;

  sat_solver_top dut (
    .clk, .rst_n, .cfg_we, .cfg_pipe, .cfg_clause, .cfg_lits,
    .start, .busy_o(busy), .done_o(done), .sat_o(sat), .assign_o(asg),
    .cnt_decisions(c_dec), .cnt_backtracks(c_bt), .cnt_merges(c_mg),
    .cnt_iterations(c_it), .cnt_passes(c_ps), .cnt_cycles(c_cy));

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  lit_t [ML-1:0] cls [NC];
  int n_cls, n_vars;

  // ---- software reference search ----
  logic [1:0] sv_val [NV];
  int         sv_tag [NV];
  int         sv_stk [NV];
  bit         sv_flp [NV];
  int         sv_dec, sv_bt;
  bit         sv_sat;

  function automatic bit sw_propagate(int level);
    bit again = 1;
    while (again) begin
      again = 0;
      for (int i = 0; i < n_cls; i++) begin
        int open = 0, last = -1;
        bit s = 0;
        for (int k = 0; k < ML; k++) if (cls[i][k].en) begin
          logic [1:0] x;
          x = sv_val[cls[i][k].var_idx];
          if (x == (cls[i][k].neg ? VAL_0 : VAL_1)) s = 1;
          else if (x == VAL_U) begin open++; last = k; end
        end
        if (s) continue;
        if (open == 0) return 1;
        if (open == 1) begin
          sv_val[cls[i][last].var_idx] = cls[i][last].neg ? VAL_0 : VAL_1;
          sv_tag[cls[i][last].var_idx] = level;
          again = 1;
        end
      end
    end
    return 0;
  endfunction

  task automatic sw_solve();
    int level = 0;
    for (int v = 0; v < NV; v++) begin sv_val[v] = VAL_U; sv_tag[v] = 0; end
    sv_dec = 0; sv_bt = 0;
    forever begin
      if (sw_propagate(level)) begin
        while (level > 0 && sv_flp[level - 1]) level--;
        if (level == 0) begin sv_sat = 0; return; end
        sv_flp[level - 1] = 1;
        for (int v = 0; v < NV; v++) if (sv_tag[v] >= level) sv_val[v] = VAL_U;
        sv_val[sv_stk[level - 1]] = VAL_1;
        sv_bt++;
      end else begin
        int f = -1;
        for (int v = NV - 1; v >= 0; v--) if (sv_val[v] == VAL_U) f = v;
        if (f < 0) begin sv_sat = 1; return; end
        sv_stk[level] = f; sv_flp[level] = 0;
        level++;
        sv_val[f] = VAL_0; sv_tag[f] = level;
        sv_dec++;
      end
    end
  endtask

  function automatic bit clause_sat(lit_t [ML-1:0] c, logic [NV-1:0][1:0] a);
    for (int k = 0; k < ML; k++)
      if (c[k].en && a[c[k].var_idx] == (c[k].neg ? VAL_0 : VAL_1)) return 1;
    return 0;
  endfunction

  task automatic run(string name);
    int t;
    for (int i = 0; i < NC; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_pipe = 3'(i % NP); cfg_clause = 6'(i / NP);
      cfg_lits = (i < n_cls) ? cls[i] : '0;
    end
    @(negedge clk); cfg_we = 0;
    sw_solve();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 0;
    while (!done && t < 20_000_000) begin @(negedge clk); t++; end
    check(done, {name, ": finishes"});
    check(sat == sv_sat, {name, ": answer"});
    check(c_dec == 32'(sv_dec), $sformatf("%s: decisions %0d, reference %0d", name, c_dec, sv_dec));
    check(c_bt == 32'(sv_bt), $sformatf("%s: backtracks %0d, reference %0d", name, c_bt, sv_bt));
    if (sat) begin
      bit same = 1;
      for (int v = 0; v < n_vars; v++) same &= (asg[v] == sv_val[v]);
      check(same, {name, ": same assignment as reference"});
      for (int i = 0; i < n_cls; i++) check(clause_sat(cls[i], asg), {name, ": clause satisfied"});
    end
    $display("%s: sat=%0d decisions=%0d backtracks=%0d merges=%0d iterations=%0d passes(pipe0)=%0d cycles=%0d",
             name, sat, c_dec, c_bt, c_mg, c_it, c_ps, c_cy);
  endtask

  // Pigeonhole: np pigeons, np-1 holes; variable p*(np-1)+h.
  task automatic make_hole(int np);
    int nh = np - 1;
    n_cls = 0; n_vars = np * nh;
    for (int p = 0; p < np; p++) begin
      cls[n_cls] = '0;
      for (int h = 0; h < nh; h++) cls[n_cls][h] = '{en: 1, neg: 0, var_idx: 16'(p * nh + h)};
      n_cls++;
    end
    for (int h = 0; h < nh; h++)
      for (int p = 0; p < np; p++)
        for (int q = p + 1; q < np; q++) begin
          cls[n_cls] = '0;
          cls[n_cls][0] = '{en: 1, neg: 1, var_idx: 16'(p * nh + h)};
          cls[n_cls][1] = '{en: 1, neg: 1, var_idx: 16'(q * nh + h)};
          n_cls++;
        end
  endtask

  // Random 3-SAT satisfied by a hidden assignment.
  task automatic make_planted(int nv, int nc);
    logic [NV-1:0] hidden;
    n_vars = nv; n_cls = nc;
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

  initial begin
    cfg_we = 0; start = 0; cfg_pipe = 0; cfg_clause = 0; cfg_lits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_hole(HOLE_PIGEONS);
    run($sformatf("hole%0d", HOLE_PIGEONS - 1));
    check(!sat, "pigeonhole instance is unsatisfiable");
    make_planted(100, 340);
    run("planted-100-340");
    check(sat, "planted instance is satisfiable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
