// tb_variable_memory: the variable memory of one pipe (16 variables in words
// of 4) with its clause chain replaced by a delay line of 5 cycles that can
// change words on their way round. Checked:
//   * a set loaded over the bus is what the memory streams out;
//   * an implication made on the first pass causes exactly one more pass,
//     then done; passes follow each other every W + L + 2 cycles
//     (W = 4 words, L = 5 chain stages) and the pass counter counts them;
//   * the merge stream carries the updated set, one word per cycle;
//   * a merged word that differs raises changed, an equal one does not;
//   * a decision sets one variable;
//   * a conflict flag or a conflicting value on the ring gives conflict,
//     and abort returns the pipe to idle and flushes the chain.
module tb_variable_memory;
  import sat_pkg::*;
  localparam int BW = 4, NV = 16, W = NV / BW, L = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_iter, abort_iter, merge_start, done, conflict, changed, flush;
  logic [31:0] passes;
  bus_cmd_e bus_cmd;
  logic [15:0] bus_idx, bus_dvar;
  logic [BW-1:0][1:0] bus_data;
  logic [1:0] bus_dval;
  pipe_hdr_t to_hdr, from_hdr;
  logic [BW-1:0][1:0] to_data, from_data;
  logic mv;
  logic [15:0] midx;
  logic [BW-1:0][1:0] mdata;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  variable_memory #(.BUS_W(BW), .NUM_VARS(NV)) dut (
    .clk, .rst_n, .start_iter, .abort_iter, .merge_start,
    .done_o(done), .conflict_o(conflict), .changed_o(changed), .pass_cnt_o(passes),
    .bus_cmd, .bus_idx, .bus_data, .bus_dvar, .bus_dval,
    .pipe_hdr_o(to_hdr), .pipe_data_o(to_data), .flush_o(flush),
    .pipe_hdr_i(from_hdr), .pipe_data_i(from_data),
    .merge_valid_o(mv), .merge_idx_o(midx), .merge_data_o(mdata));

  // ---- fake chain: L-stage delay line with a programmable change ----
  pipe_hdr_t          dh [L];
  logic [BW-1:0][1:0] dd [L];
  int  mode = 0;        // 0 pass through, 1 imply var 6 = 1, 2 raise conflict flag, 3 make var 9 conflicting
  int  first_sends [$];
  always @(posedge clk) begin
    pipe_hdr_t h;
    logic [BW-1:0][1:0] d;
    h = to_hdr; d = to_data;
    if (h.valid && h.idx == 0) first_sends.push_back(cyc);
    if (h.valid && mode == 1 && h.idx == 1 && d[2] == VAL_U) d[2] = VAL_1;
    if (h.valid && mode == 2 && h.idx == 2) h.conflict = 1;
    if (h.valid && mode == 3 && h.idx == 2) d[1] = VAL_C;
    for (int i = L - 1; i > 0; i--) begin dh[i] <= flush ? '0 : dh[i-1]; dd[i] <= dd[i-1]; end
    dh[0] <= flush ? '0 : h; dd[0] <= d;
  end
  assign from_hdr  = dh[L-1];
  assign from_data = dd[L-1];

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(bus_cmd_e c, int idx, logic [BW-1:0][1:0] d);
    @(negedge clk); bus_cmd = c; bus_idx = 16'(idx); bus_data = d;
    @(negedge clk); bus_cmd = BUS_NOP;
  endtask

  logic [W-1:0][BW-1:0][1:0] ref_set, got;
  task automatic read_merge();
    int n = 0, tprev = -1;
    @(negedge clk); merge_start = 1; @(negedge clk); merge_start = 0;
    while (n < W) begin
      @(negedge clk);
      if (mv) begin
        check(32'(midx) == n, "merge words in order");
        if (tprev >= 0) check(cyc == tprev + 1, "one merge word per cycle");
        tprev = cyc; got[midx] = mdata; n++;
      end
    end
  endtask

  task automatic wait_state(string what);
    int t = 0;
    while (!done && !conflict && t < 200) begin @(negedge clk); t++; end
    check(t < 200, what);
  endtask

  initial begin
    start_iter = 0; abort_iter = 0; merge_start = 0; bus_cmd = BUS_NOP;
    bus_idx = 0; bus_data = '0; bus_dvar = 0; bus_dval = 0;
    for (int i = 0; i < L; i++) begin dh[i] = '0; dd[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // load a set
    ref_set = '0;
    ref_set[0][0] = VAL_1; ref_set[3][2] = VAL_0;
    for (int w = 0; w < W; w++) bus(BUS_LOAD, w, ref_set[w]);
    read_merge();
    check(got == ref_set, "loaded set streams out");

    // one implication -> two passes
    mode = 1; first_sends.delete();
    @(negedge clk); start_iter = 1; @(negedge clk); start_iter = 0;
    wait_state("pipe finishes");
    check(done && !conflict, "done after the implication settles");
    check(passes == 2, $sformatf("two passes (got %0d)", passes));
    check(first_sends.size() == 2 && first_sends[1] - first_sends[0] == W + L + 2,
          "pass period W + L + 2 cycles");
    ref_set[1][2] = VAL_1;
    read_merge();
    check(got == ref_set, "implied value kept");

    // merged words: changed only for a differing word
    @(negedge clk); merge_start = 1; @(negedge clk); merge_start = 0;
    bus(BUS_MERGE, 0, ref_set[0]);
    repeat (2) @(negedge clk);
    check(!changed, "equal merged word leaves changed low");
    begin
      logic [BW-1:0][1:0] m;
      m = ref_set[2]; m[3] = VAL_0;
      bus(BUS_MERGE, 2, m);
      ref_set[2] = m;
    end
    repeat (2) @(negedge clk);
    check(changed, "differing merged word raises changed");

    // decision
    @(negedge clk); bus_cmd = BUS_DECIDE; bus_dvar = 16'd13; bus_dval = VAL_1;
    @(negedge clk); bus_cmd = BUS_NOP;
    ref_set[3][1] = VAL_1;
    read_merge();
    check(got == ref_set, "decision applied");
    check(!changed, "merge start clears changed");

    // conflict flag, then abort
    mode = 2;
    @(negedge clk); start_iter = 1; @(negedge clk); start_iter = 0;
    wait_state("conflict reported");
    check(conflict && !done, "clause conflict reported");
    @(negedge clk); abort_iter = 1;
    #1 check(flush, "abort flushes the chain");
    @(negedge clk); abort_iter = 0;
    check(!conflict && !done, "abort returns to idle");

    // conflicting value
    mode = 3;
    @(negedge clk); start_iter = 1; @(negedge clk); start_iter = 0;
    wait_state("conflicting value reported");
    check(conflict, "conflicting value gives conflict");

    // abort in the middle of a pass: nothing stale comes back
    mode = 0;
    @(negedge clk); abort_iter = 1; @(negedge clk); abort_iter = 0;
    @(negedge clk); start_iter = 1; @(negedge clk); start_iter = 0;
    repeat (3) @(negedge clk);
    abort_iter = 1; @(negedge clk); abort_iter = 0;
    repeat (L + 3) @(negedge clk);
    check(!done && !conflict, "aborted pass does not finish");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
