// clause_chain: the clause pipeline of one pipe.
//
// CLAUSES_PER_PIPE clause modules are connected in series; a variable word
// entering at word_i leaves at word_o CLAUSES_PER_PIPE cycles later, carrying
// every implication and conflict the clauses along the way produced. Because
// each stage sees the words already changed by the stages before it, a chain
// of implications can run through several clauses in one pass, provided the
// clauses appear in the chain in the order of the chain of implications.
//
// Clause slots are loaded through cfg_we/cfg_addr/cfg_lits. Unloaded slots
// pass words through unchanged, so clauses can be added later to free slots.
// flush_i empties every stage in one cycle (used when another pipe reports a
// conflict and the pass is abandoned).
//
// The chain of clause modules follows the solver's description; the slot
// addressing is this design's choice.
module clause_chain
  import sat_pkg::*;
#(
  parameter int unsigned BUS_W            = 8,
  parameter int unsigned NUM_VARS         = 128,
  parameter int unsigned MAX_LITS         = 6,
  parameter int unsigned CLAUSES_PER_PIPE = 64,
  localparam int unsigned AW = (CLAUSES_PER_PIPE > 1) ? $clog2(CLAUSES_PER_PIPE) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_we,
  input  logic      [AW-1:0]         cfg_addr,
  input  lit_t      [MAX_LITS-1:0]   cfg_lits,
  input  logic                       flush_i,
  input  pipe_hdr_t                  in_hdr,
  input  logic      [BUS_W-1:0][1:0] in_data,
  output pipe_hdr_t                  out_hdr,
  output logic      [BUS_W-1:0][1:0] out_data
);

  pipe_hdr_t                  hdr  [CLAUSES_PER_PIPE+1];
  logic      [BUS_W-1:0][1:0] data [CLAUSES_PER_PIPE+1];

  assign hdr[0]  = in_hdr;
  assign data[0] = in_data;

  for (genvar i = 0; i < CLAUSES_PER_PIPE; i++) begin : g_stage
    clause_module #(
      .BUS_W(BUS_W), .NUM_VARS(NUM_VARS), .MAX_LITS(MAX_LITS)
    ) u_clause (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg_we   (cfg_we && (32'(cfg_addr) == i)),
      .cfg_lits (cfg_lits),
      .flush_i  (flush_i),
      .in_hdr   (hdr[i]),
      .in_data  (data[i]),
      .out_hdr  (hdr[i+1]),
      .out_data (data[i+1])
    );
  end

  assign out_hdr  = hdr[CLAUSES_PER_PIPE];
  assign out_data = data[CLAUSES_PER_PIPE];

endmodule
