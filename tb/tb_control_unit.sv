// tb_control_unit: the control unit drives two modelled pipes. Each model
// keeps its own copy of 8 variables (words of 4), obeys the broadcast bus,
// and on start_iter waits a random time, then applies unit propagation over
// its own half of the clauses and reports done or conflict; on merge_start it
// streams its set, and a modelled one-level merge tree ORs the two streams.
// For random CNF instances the test checks against exhaustive search that the
// unit answers SAT or UNSAT correctly and that a reported assignment is
// complete and satisfies every clause. It also checks the control protocol:
// abort follows every pipe conflict, nothing is broadcast while a pipe is
// iterating, and the counters agree with the events seen on the bus.
module tb_control_unit;
  import sat_pkg::*;
  localparam int BW = 4, NV = 8, NP = 2, W = NV / BW, ML = 3, NC = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, sat;
  logic [NP-1:0] p_done, p_conf, p_chg;
  logic start_iter, abort_iter, merge_start;
  logic mv;
  logic [15:0] midx;
  logic [BW-1:0][1:0] mdata;
  bus_cmd_e bus_cmd;
  logic [15:0] bus_idx, bus_dvar;
  logic [BW-1:0][1:0] bus_data;
  logic [1:0] bus_dval;
  logic [NV-1:0][1:0] asg;
  logic [31:0] c_dec, c_bt, c_mg, c_it, c_cy;
  int checks = 0, failures = 0;

  control_unit #(.BUS_W(BW), .NUM_VARS(NV), .NUM_PIPES(NP)) dut (
    .clk, .rst_n, .start, .busy_o(busy), .done_o(done), .sat_o(sat),
    .pipe_done(p_done), .pipe_conflict(p_conf), .pipe_changed(p_chg),
    .start_iter, .abort_iter, .merge_start,
    .merge_valid_i(mv), .merge_idx_i(midx), .merge_data_i(mdata),
    .bus_cmd, .bus_idx, .bus_data, .bus_dvar, .bus_dval,
    .assign_o(asg), .cnt_decisions(c_dec), .cnt_backtracks(c_bt),
    .cnt_merges(c_mg), .cnt_iterations(c_it), .cnt_cycles(c_cy));

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  lit_t [ML-1:0] cls [NC];
  int n_cls;

  // ---- pipe models ----
  logic [NV-1:0][1:0] pset [NP];
  int  pstate [NP];           // 0 idle, 1 iterating, 2 done, 3 conflict
  int  pdelay [NP];
  int  mcnt   [NP];
  logic [BW-1:0][1:0] mword [NP];
  logic mword_v;
  logic [15:0] mword_i;

  function automatic bit propagate(int p, inout logic [NV-1:0][1:0] v);
    bit again = 1;
    while (again) begin
      again = 0;
      for (int i = p; i < n_cls; i += NP) begin
        int open = 0, last = -1;
        bit s = 0;
        for (int k = 0; k < ML; k++) if (cls[i][k].en) begin
          logic [1:0] x;
          x = v[cls[i][k].var_idx];
          if (x == (cls[i][k].neg ? VAL_0 : VAL_1)) s = 1;
          else if (x == VAL_U) begin open++; last = k; end
        end
        if (s) continue;
        if (open == 0) return 1;
        if (open == 1) begin v[cls[i][last].var_idx] = cls[i][last].neg ? VAL_0 : VAL_1; again = 1; end
      end
    end
    return 0;
  endfunction

  int n_abort = 0, n_conf_seen = 0, n_bus_in_iter = 0, n_dec_bus = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin pstate[p] = 0; pset[p] = '0; mcnt[p] = W; p_chg[p] = 0; end
      mword_v <= 0;
    end else begin
      if (abort_iter) n_abort++;
      if (|p_conf && !abort_iter) n_conf_seen++;
      if (bus_cmd == BUS_DECIDE) n_dec_bus++;
      for (int p = 0; p < NP; p++) begin
        if (bus_cmd != BUS_NOP && pstate[p] == 1) n_bus_in_iter++;
        case (bus_cmd)
          BUS_LOAD:   pset[p][bus_idx*BW +: BW] = bus_data;
          BUS_MERGE: begin
            if (pset[p][bus_idx*BW +: BW] != bus_data) p_chg[p] = 1;
            pset[p][bus_idx*BW +: BW] = bus_data;
          end
          BUS_DECIDE: pset[p][bus_dvar] = bus_dval;
          default: ;
        endcase
        if (abort_iter) pstate[p] = 0;
        else if (start_iter) begin pstate[p] = 1; pdelay[p] = $urandom_range(12); end
        else if (pstate[p] == 1) begin
          if (pdelay[p] > 0) pdelay[p]--;
          else pstate[p] = propagate(p, pset[p]) ? 3 : 2;
        end
        if (merge_start) begin mcnt[p] = 0; p_chg[p] = 0; end
      end
      // stream and merge (one register level)
      mword_v <= 0;
      if (mcnt[0] < W) begin
        mword_v <= 1;
        mword_i <= 16'(mcnt[0]);
        mdata   <= pset[0][mcnt[0]*BW +: BW] | pset[1][mcnt[0]*BW +: BW];
        for (int p = 0; p < NP; p++) mcnt[p]++;
      end
    end
  end
  assign mv = mword_v;
  assign midx = mword_i;
  always_comb for (int p = 0; p < NP; p++) begin
    p_done[p] = (pstate[p] == 2);
    p_conf[p] = (pstate[p] == 3);
  end

  function automatic bit clause_sat(lit_t [ML-1:0] c, logic [NV-1:0] a);
    for (int k = 0; k < ML; k++) if (c[k].en && (a[c[k].var_idx] != c[k].neg)) return 1;
    return 0;
  endfunction

  int n_sat = 0, n_unsat = 0, tot_bt = 0;
  initial begin
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 80; r++) begin
      bit exp;
      int t, d0;
      n_cls = 4 + $urandom_range(NC - 4);
      for (int i = 0; i < n_cls; i++) begin
        int nl, used[$];
        used.delete(); cls[i] = '0;
        nl = ($urandom_range(1) == 0) ? 2 : 3;
        for (int k = 0; k < nl; k++) begin
          int v;
          do v = $urandom_range(NV - 1); while (v inside {used});
          used.push_back(v);
          cls[i][k] = '{en: 1, neg: 1'($urandom_range(1)), var_idx: 16'(v)};
        end
      end
      exp = 0;
      for (int a = 0; a < (1 << NV); a++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < n_cls; i++) ok &= clause_sat(cls[i], NV'(a));
        if (ok) exp = 1;
      end
      d0 = n_dec_bus;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 0;
      while (!done && t < 20000) begin @(negedge clk); t++; end
      check(done, "search ends");
      check(sat == exp, $sformatf("run %0d answer %0d expected %0d", r, sat, exp));
      check(c_dec == 32'(n_dec_bus - d0), "decision counter matches broadcasts");
      if (sat) begin
        logic [NV-1:0] a;
        bit complete;
        complete = 1;
        for (int v = 0; v < NV; v++) begin
          complete &= (asg[v] == VAL_0 || asg[v] == VAL_1);
          a[v] = (asg[v] == VAL_1);
        end
        check(complete, "assignment complete");
        for (int i = 0; i < n_cls; i++) check(clause_sat(cls[i], a), "clause satisfied");
        n_sat++;
      end else n_unsat++;
      tot_bt += c_bt;
    end
    check(n_abort == n_conf_seen, "every pipe conflict is answered by one abort");
    check(n_bus_in_iter == 0, "no broadcast while pipes iterate");
    check(n_sat > 0 && n_unsat > 0 && tot_bt > 0, "both answers and backtracks seen");
    $display("sat=%0d unsat=%0d aborts=%0d backtracks=%0d", n_sat, n_unsat, n_abort, tot_bt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
