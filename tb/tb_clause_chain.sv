// tb_clause_chain: a chain of four clause slots, 16 variables in words of 4.
// Three binary clauses x0 -> x5 -> x10 -> x15 (written as (!x0 | x5) and so
// on) are loaded in chain order: with x0 = 1 one pass must imply x5, x10 and
// x15, because each stage sees the words already changed upstream. Loaded in
// the reverse order, one pass implies only x5. Checked too: every word leaves
// exactly 4 cycles after it entered, other variables are untouched, a
// conflict flag raised by a stage travels to the end, and flush empties the
// chain.
module tb_clause_chain;
  import sat_pkg::*;
  localparam int BW = 4, NV = 16, ML = 3, CP = 4, W = NV / BW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, flush;
  logic [1:0] cfg_addr;
  lit_t [ML-1:0] cfg_lits;
  pipe_hdr_t in_hdr, out_hdr;
  logic [BW-1:0][1:0] in_data, out_data;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  clause_chain #(.BUS_W(BW), .NUM_VARS(NV), .MAX_LITS(ML), .CLAUSES_PER_PIPE(CP)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_lits, .flush_i(flush),
    .in_hdr, .in_data, .out_hdr, .out_data);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(int slot, int a, int b);   // clause (!x_a | x_b), or empty if a < 0
    @(negedge clk);
    cfg_we = 1; cfg_addr = 2'(slot); cfg_lits = '0;
    if (a >= 0) begin
      cfg_lits[0] = '{en: 1, neg: 1, var_idx: 16'(a)};
      cfg_lits[1] = '{en: 1, neg: 0, var_idx: 16'(b)};
    end
    @(negedge clk); cfg_we = 0;
  endtask

  logic [W-1:0][BW-1:0][1:0] sent, got;
  bit got_conf;

  // One pass; collects the returned set and checks the latency.
  task automatic pass();
    int t0 [W];
    int n = 0;
    got_conf = 0;
    fork
      for (int w = 0; w < W; w++) begin
        @(negedge clk);
        in_hdr = '0; in_hdr.valid = 1; in_hdr.first = (w == 0); in_hdr.idx = 16'(w);
        in_data = sent[w]; t0[w] = cyc;
        if (w == W - 1) begin @(negedge clk); in_hdr = '0; end
      end
      while (n < W) begin
        @(negedge clk);
        if (out_hdr.valid) begin
          check(cyc - t0[out_hdr.idx] == CP, "latency of CLAUSES_PER_PIPE cycles");
          got[out_hdr.idx] = out_data;
          got_conf |= out_hdr.conflict;
          n++;
        end
      end
    join
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_lits = '0; flush = 0; in_hdr = '0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // forward order: the whole chain in one pass
    load(0, 0, 5); load(1, 5, 10); load(2, 10, 15); load(3, -1, 0);
    sent = '0; sent[0][0] = VAL_1; sent[0][3] = VAL_0;
    pass();
    check(got[1][1] == VAL_1 && got[2][2] == VAL_1 && got[3][3] == VAL_1, "forward chain fully implied");
    check(got[0] == sent[0], "word 0 unchanged");
    check(!got_conf, "no conflict");

    // reverse order: only the first link per pass
    load(0, 10, 15); load(1, 5, 10); load(2, 0, 5);
    pass();
    check(got[1][1] == VAL_1 && got[2][2] == VAL_U && got[3][3] == VAL_U, "reverse chain: one link per pass");
    sent = got;
    pass();
    check(got[2][2] == VAL_1 && got[3][3] == VAL_U, "reverse chain: second link on the next pass");

    // conflict: x0 = 1, x5 = 0 violates (!x0 | x5) in slot 2
    sent = '0; sent[0][0] = VAL_1; sent[1][1] = VAL_0;
    pass();
    check(got_conf, "conflict flag reaches the end");

    // flush empties the chain
    @(negedge clk);
    in_hdr = '0; in_hdr.valid = 1; in_hdr.first = 1;
    @(negedge clk); in_hdr = '0;
    @(negedge clk); flush = 1;
    @(negedge clk); flush = 0;
    begin
      bit seen = 0;
      repeat (CP + 2) begin @(negedge clk); seen |= out_hdr.valid; end
      check(!seen, "flushed word does not come out");
    end

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
