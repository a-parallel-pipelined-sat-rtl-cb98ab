// tb_sat_pipe: one pipe (16 variables in words of 4, 16 clause slots) holds
// random clauses of one to three literals. A random partial assignment is
// loaded, the pipe iterates, and the result is compared with unit
// propagation to a fixed point computed here clause by clause: a conflict
// must be reported exactly when propagation runs into an all-false clause,
// and otherwise the pipe's final set, read through its merge port, must equal
// the propagated one. The number of passes must be at least one more than
// the number of passes that changed something.
module tb_sat_pipe;
  import sat_pkg::*;
  localparam int BW = 4, NV = 16, ML = 3, CP = 16, W = NV / BW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, start_iter, abort_iter, merge_start, done, conflict, changed;
  logic [3:0] cfg_addr;
  lit_t [ML-1:0] cfg_lits;
  logic [31:0] passes;
  bus_cmd_e bus_cmd;
  logic [15:0] bus_idx, bus_dvar;
  logic [BW-1:0][1:0] bus_data;
  logic [1:0] bus_dval;
  logic mv;
  logic [15:0] midx;
  logic [BW-1:0][1:0] mdata;
  int checks = 0, failures = 0, n_conf = 0, n_multi = 0;

  sat_pipe #(.BUS_W(BW), .NUM_VARS(NV), .MAX_LITS(ML), .CLAUSES_PER_PIPE(CP)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_lits,
    .start_iter, .abort_iter, .merge_start,
    .done_o(done), .conflict_o(conflict), .changed_o(changed), .pass_cnt_o(passes),
    .bus_cmd, .bus_idx, .bus_data, .bus_dvar, .bus_dval,
    .merge_valid_o(mv), .merge_idx_o(midx), .merge_data_o(mdata));

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  lit_t [ML-1:0] cls [CP];
  logic [NV-1:0][1:0] val, got;

  // Unit propagation to a fixed point; returns 1 on conflict.
  function automatic bit propagate(ref logic [NV-1:0][1:0] v);
    bit again = 1;
    while (again) begin
      again = 0;
      for (int i = 0; i < CP; i++) begin
        int open = 0, last = -1;
        bit sat = 0;
        for (int k = 0; k < ML; k++) if (cls[i][k].en) begin
          logic [1:0] x = v[cls[i][k].var_idx];
          if (x == (cls[i][k].neg ? VAL_0 : VAL_1)) sat = 1;
          else if (x == VAL_U) begin open++; last = k; end
        end
        if (sat || cls[i] == '0) continue;
        if (open == 0) return 1;
        if (open == 1) begin
          v[cls[i][last].var_idx] = cls[i][last].neg ? VAL_0 : VAL_1;
          again = 1;
        end
      end
    end
    return 0;
  endfunction

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_lits = '0; start_iter = 0; abort_iter = 0; merge_start = 0;
    bus_cmd = BUS_NOP; bus_idx = 0; bus_data = '0; bus_dvar = 0; bus_dval = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int r = 0; r < 60; r++) begin
      bit exp_conf;
      int t, changes;
      logic [NV-1:0][1:0] ref_v;
      // instance
      for (int i = 0; i < CP; i++) begin
        int nl, used[$];
        cls[i] = '0; used.delete();
        nl = ($urandom_range(7) == 0) ? 1 : ($urandom_range(2) == 0 ? 3 : 2);
        if ($urandom_range(9) == 0) nl = 0;                  // empty slot
        for (int k = 0; k < nl; k++) begin
          int v;
          do v = $urandom_range(NV - 1); while (v inside {used});
          used.push_back(v);
          cls[i][k] = '{en: 1, neg: 1'($urandom_range(1)), var_idx: 16'(v)};
        end
        @(negedge clk); cfg_we = 1; cfg_addr = 4'(i); cfg_lits = cls[i];
      end
      @(negedge clk); cfg_we = 0;
      // start set: a few decided variables
      val = '0;
      for (int v = 0; v < NV; v++)
        if ($urandom_range(4) == 0) val[v] = $urandom_range(1) ? VAL_1 : VAL_0;
      for (int w = 0; w < W; w++) begin
        @(negedge clk); bus_cmd = BUS_LOAD; bus_idx = 16'(w); bus_data = val[w*BW +: BW];
      end
      @(negedge clk); bus_cmd = BUS_NOP;
      ref_v = val;
      exp_conf = propagate(ref_v);
      changes = passes;
      @(negedge clk); start_iter = 1; @(negedge clk); start_iter = 0;
      t = 0;
      while (!done && !conflict && t < 2000) begin @(negedge clk); t++; end
      check(t < 2000, "pipe stops");
      if (conflict != exp_conf) begin
        for (int i = 0; i < CP; i++) $display("cls %0d: %p", i, cls[i]);
        $display("val %p", val); $display("ref %p", ref_v);
      end
      check(conflict == exp_conf, $sformatf("run %0d: conflict %0d expected %0d", r, conflict, exp_conf));
      if (exp_conf) n_conf++;
      if (passes - changes > 1) n_multi++;
      if (!exp_conf) begin
        int n;
        n = 0;
        @(negedge clk); merge_start = 1; @(negedge clk); merge_start = 0;
        while (n < W) begin
          @(negedge clk);
          if (mv) begin got[midx*BW +: BW] = mdata; n++; end
        end
        if (got != ref_v) begin
          for (int i = 0; i < CP; i++) $display("cls %0d: %p", i, cls[i]);
          $display("val %p", val); $display("ref %p", ref_v); $display("got %p", got);
          $display("cur %p passes %0d", dut.u_vmem.cur, passes - changes);
        end
        check(got == ref_v, $sformatf("run %0d: fixed point matches propagation", r));
      end
      @(negedge clk); abort_iter = 1; @(negedge clk); abort_iter = 0;
    end
    check(n_conf > 0 && n_conf < 60, "both outcomes seen");
    check(n_multi > 0, "some runs needed several passes");
    $display("conflicts=%0d multi-pass runs=%0d", n_conf, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
