// tb_clause_module: random clauses of one to three literals over 16
// variables (4 words of 4 variables) meet random passes of variable words.
// The expected output of every word is worked out here from the definition:
// a literal is implied in the word that holds its variable if it is
// undecided there, the clause is not yet satisfied in this pass, and every
// other literal lies in this or an earlier word and is false; a conflict is
// flagged once every literal has been seen false. Words arrive with random
// gaps, must come out one cycle later, and incoming conflict and pending
// flags must be passed on. At the last word of a pass the pending flag must
// rise exactly when the clause is unsatisfied with one literal not false. Also checked: an empty clause slot passes words unchanged and
// flush drops the word in the stage.
module tb_clause_module;
  import sat_pkg::*;
  localparam int BW = 4, NV = 16, ML = 3, W = NV / BW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, flush;
  lit_t [ML-1:0] cfg_lits;
  pipe_hdr_t in_hdr, out_hdr;
  logic [BW-1:0][1:0] in_data, out_data;
  int checks = 0, failures = 0;
  int n_imp = 0, n_conf = 0, n_pend = 0;

  clause_module #(.BUS_W(BW), .NUM_VARS(NV), .MAX_LITS(ML)) dut (
    .clk, .rst_n, .cfg_we, .cfg_lits, .flush_i(flush),
    .in_hdr, .in_data, .out_hdr, .out_data);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit lit_is_true(lit_t l, logic [1:0] v);
    return v == (l.neg ? VAL_0 : VAL_1);
  endfunction
  function automatic bit lit_is_false(lit_t l, logic [1:0] v);
    return v == (l.neg ? VAL_1 : VAL_0);
  endfunction

  logic [W-1:0][BW-1:0][1:0] set;

  // Send one word and compare what comes out one cycle later.
  task automatic send(int w, bit first, bit cin, logic [BW-1:0][1:0] exp_data, bit exp_conf,
                      bit pin = 0, bit exp_pend = 0);
    @(negedge clk);
    in_hdr = '0; in_hdr.valid = 1; in_hdr.first = first; in_hdr.idx = 16'(w);
    in_hdr.last = (w == W - 1); in_hdr.pending = pin;
    in_hdr.conflict = cin; in_data = set[w];
    @(negedge clk);
    in_hdr = '0;
    check(out_hdr.valid && out_hdr.idx == 16'(w) && out_hdr.first == first, "word out after one cycle");
    check(out_data == exp_data, $sformatf("data of word %0d", w));
    check(out_hdr.conflict == exp_conf, $sformatf("conflict flag of word %0d", w));
    check(out_hdr.pending == exp_pend, $sformatf("pending flag of word %0d", w));
    repeat ($urandom_range(2)) @(negedge clk);   // random gap
  endtask

  task automatic run_pass(lit_t [ML-1:0] c);
    bit imp_before = 0;
    for (int w = 0; w < W; w++) begin
      logic [BW-1:0][1:0] e = set[w];
      bit sat = imp_before, all_false = 1, any = 0, cin, pin, pend;
      for (int k = 0; k < ML; k++) if (c[k].en) begin
        any = 1;
        if (32'(c[k].var_idx) / BW <= w) begin
          if (lit_is_true(c[k], set[32'(c[k].var_idx) / BW][32'(c[k].var_idx) % BW])) sat = 1;
          if (!lit_is_false(c[k], set[32'(c[k].var_idx) / BW][32'(c[k].var_idx) % BW])) all_false = 0;
        end else all_false = 0;
      end
      if (!sat)
        for (int k = 0; k < ML; k++) if (c[k].en && 32'(c[k].var_idx) / BW == w &&
                                         set[w][32'(c[k].var_idx) % BW] == VAL_U) begin
          bit others = 1;
          for (int j = 0; j < ML; j++) if (j != k && c[j].en)
            if (!(32'(c[j].var_idx) / BW <= w &&
                  lit_is_false(c[j], set[32'(c[j].var_idx) / BW][32'(c[j].var_idx) % BW]))) others = 0;
          if (others) begin
            e[32'(c[k].var_idx) % BW] = c[k].neg ? VAL_0 : VAL_1;
            imp_before = 1; n_imp++;
          end
        end
      cin = ($urandom_range(19) == 0);
      pin = ($urandom_range(19) == 0);
      // pending: after the last word, unsatisfied with exactly one literal not false
      pend = 0;
      if (w == W - 1 && any && !sat && !imp_before) begin
        int n_open = 0;
        for (int k = 0; k < ML; k++)
          if (c[k].en && !lit_is_false(c[k], set[32'(c[k].var_idx) / BW][32'(c[k].var_idx) % BW])) n_open++;
        pend = (n_open == 1);
        if (pend) n_pend++;
      end
      if (any && all_false && !sat) n_conf++;
      send(w, w == 0, cin, e, cin || (any && all_false && !sat), pin, pin || pend);
    end
  endtask

  initial begin
    lit_t [ML-1:0] c;
    cfg_we = 0; cfg_lits = '0; flush = 0; in_hdr = '0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // empty slot: words pass unchanged
    for (int w = 0; w < W; w++) set[w] = {$urandom} & 32'h5555_5555;
    for (int w = 0; w < W; w++) send(w, w == 0, 0, set[w], 0);

    repeat (400) begin
      int nl;
      int used[$];
      nl = 1 + $urandom_range(ML - 1);
      used.delete();
      c = '0;
      for (int k = 0; k < nl; k++) begin
        int v;
        do v = $urandom_range(NV - 1); while (v inside {used});
        used.push_back(v);
        c[k] = '{en: 1, neg: 1'($urandom_range(1)), var_idx: 16'(v)};
      end
      @(negedge clk); cfg_we = 1; cfg_lits = c; @(negedge clk); cfg_we = 0;
      repeat (3) begin
        for (int w = 0; w < W; w++)
          for (int l = 0; l < BW; l++)
            set[w][l] = ($urandom_range(2) == 0) ? VAL_U : ($urandom_range(1) ? VAL_0 : VAL_1);
        run_pass(c);
      end
    end

    // flush drops the word
    @(negedge clk);
    in_hdr = '0; in_hdr.valid = 1; in_hdr.first = 1; flush = 1;
    @(negedge clk);
    in_hdr = '0; flush = 0;
    check(!out_hdr.valid, "flush drops the word");

    check(n_imp > 50 && n_conf > 20 && n_pend > 20, "implications, conflicts and pending flags exercised");
    $display("implications=%0d conflicts=%0d pending=%0d", n_imp, n_conf, n_pend);
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
