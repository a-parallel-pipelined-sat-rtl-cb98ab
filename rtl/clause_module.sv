// clause_module: one clause of the SAT instance, one stage of a pipe's ring.
//
// Variable words stream through the stage, BUS_W variables per word, one word
// per cycle, and leave it one cycle later. For every literal the module keeps
// the fact "seen false" and, for the whole clause, "satisfied". Within one
// iteration (the passes between two broadcasts) values only ever go from
// undecided to decided, so these facts stay true from pass to pass; they are
// cleared by the first word of an iteration's first pass.
//
// While a word is in the stage the module looks at the literals whose
// variables lie in that word:
//   * implication: the clause is not satisfied, every other literal is known
//     false, and this literal's variable is undecided -> the variable is set
//     to the value that makes the literal true in the outgoing word;
//   * conflict: every literal is known false -> the word's conflict flag is
//     set and travels on to the variable memory;
//   * pending: at the last word of a pass, the clause is unsatisfied with
//     exactly one literal not known false. Its variable passed before the
//     others were known, so the implication can only be made in the next
//     pass; the pending flag asks the variable memory for that pass.
// Implications thus ripple through the ring over several passes, which is
// why the solver iterates passes until nothing changes.
//
// Interface: cfg_we loads the clause (cfg_lits, MAX_LITS literal slots; a
// slot with en=0 is unused, a clause with no used slot passes words through
// unchanged). flush_i drops the word held in the stage. Latency: one cycle.
// Reset (rst_n) is synchronous and active low, as everywhere in this design.
//
// The behaviour (take a set of variables, imply or raise a conflict, produce
// the output set in one cycle) follows the solver's description. The per-pass
// state bits, the configuration register standing for reconfiguration, and
// the literal limit are this design's choices. A clause must not name the
// same variable twice.
module clause_module
  import sat_pkg::*;
#(
  parameter int unsigned BUS_W    = 8,
  parameter int unsigned NUM_VARS = 128,
  parameter int unsigned MAX_LITS = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  lit_t      [MAX_LITS-1:0]  cfg_lits,
  input  logic                      flush_i,
  input  pipe_hdr_t                 in_hdr,
  input  logic      [BUS_W-1:0][1:0] in_data,
  output pipe_hdr_t                 out_hdr,
  output logic      [BUS_W-1:0][1:0] out_data
);

  lit_t [MAX_LITS-1:0] lits;
  logic [MAX_LITS-1:0] seen_false_q;
  logic                sat_q;

  // Per-literal view of the current word.
  logic [MAX_LITS-1:0] in_word, is_true, is_false, is_undec, known_false, imply;
  logic [MAX_LITS-1:0][1:0] lit_val;
  logic                sat_now, all_false, clause_used, one_open;
  int unsigned         n_open;
  logic [BUS_W-1:0][1:0] data_nxt;

  always_comb begin
    clause_used = 1'b0;
    for (int k = 0; k < MAX_LITS; k++) begin
      clause_used  |= lits[k].en;
      in_word[k]    = in_hdr.valid && lits[k].en &&
                      (32'(lits[k].var_idx) / BUS_W == 32'(in_hdr.idx));
      lit_val[k]    = in_data[32'(lits[k].var_idx) % BUS_W];
      is_true[k]    = in_word[k] && (lit_val[k] == lit_true_val(lits[k].neg));
      is_false[k]   = in_word[k] && (lit_val[k] == lit_true_val(!lits[k].neg));
      is_undec[k]   = in_word[k] && (lit_val[k] == VAL_U);
      // Unused slots count as false literals.
      known_false[k] = !lits[k].en || is_false[k] ||
                       (!in_hdr.first && seen_false_q[k]);
    end
    sat_now   = (!in_hdr.first && sat_q) || (|is_true);
    all_false = &known_false;
    n_open    = 0;
    for (int k = 0; k < MAX_LITS; k++) n_open += 32'(!known_false[k]);
    one_open  = (n_open == 1);
    data_nxt  = in_data;
    for (int k = 0; k < MAX_LITS; k++) begin
      imply[k] = clause_used && !sat_now && is_undec[k];
      for (int j = 0; j < MAX_LITS; j++)
        if (j != k) imply[k] &= known_false[j];
      if (imply[k])
        data_nxt[32'(lits[k].var_idx) % BUS_W] = lit_true_val(lits[k].neg);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lits         <= '0;
      seen_false_q <= '0;
      sat_q        <= 1'b0;
      out_hdr      <= '0;
      out_data     <= '0;
    end else begin
      if (cfg_we) lits <= cfg_lits;
      if (in_hdr.valid) begin
        for (int k = 0; k < MAX_LITS; k++)
          seen_false_q[k] <= known_false[k] && lits[k].en;
        sat_q <= sat_now || (|imply);
      end
      out_hdr          <= flush_i ? '0 : in_hdr;
      out_hdr.conflict <= !flush_i && in_hdr.valid &&
                          (in_hdr.conflict || (clause_used && all_false && !sat_now));
      out_hdr.pending  <= !flush_i && in_hdr.valid &&
                          (in_hdr.pending || (in_hdr.last && clause_used && one_open &&
                                              !sat_now && !(|imply)));
      out_data         <= data_nxt;
    end
  end

  // A loaded literal must name an existing variable.
  for (genvar k = 0; k < MAX_LITS; k++) begin : g_chk
    a_var_range: assert property (@(posedge clk) disable iff (!rst_n)
      cfg_we && cfg_lits[k].en |-> 32'(cfg_lits[k].var_idx) < NUM_VARS);
  end

endmodule
