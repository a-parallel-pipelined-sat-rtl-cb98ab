// sat_solver_top: parallel pipelined SAT solver.
//
// The clauses of a CNF instance are split over NUM_PIPES pipes. Each pipe is
// a ring of CLAUSES_PER_PIPE clause modules and a variable memory that cycles
// all NUM_VARS variables round the ring, BUS_W variables per word, until its
// clauses imply nothing more. The pipes' sets are then OR-merged in a tree of
// merge units and the merged set is broadcast back to every pipe; the pipes
// iterate until the merge changes nothing, and then a control unit makes the
// next decision, or backtracks when any pipe or the merge finds a conflict.
// Shorter pipes make a pass cheaper (NUM_VARS/BUS_W + CLAUSES_PER_PIPE + 2
// cycles) at the price of merges (log2 NUM_PIPES + NUM_VARS/BUS_W cycles).
//
// Interface: load clauses with cfg_we / cfg_pipe / cfg_clause / cfg_lits (one
// clause per cycle, into a slot of a pipe; unused slots are empty), then
// pulse start. done_o rises when the search ends; sat_o tells the answer and
// assign_o holds a satisfying assignment (2-bit codes of sat_pkg, undecided
// variables never remain when sat_o is set). The cnt_* outputs count the last
// run's decisions, backtracks, merges, iterations, passes of pipe 0 and
// cycles. The clause port stands for the host link; clauses may also be
// written into free slots between runs.
//
// The pipes, merge tree and control unit follow the solver's description;
// the default sizes (8 pipes of 64 clauses, 128 variables, 8 variables per
// bus word, clauses of up to 6 literals) are this design's choice.
module sat_solver_top
  import sat_pkg::*;
#(
  parameter int unsigned BUS_W            = 8,
  parameter int unsigned NUM_VARS         = 128,
  parameter int unsigned MAX_LITS         = 6,
  parameter int unsigned CLAUSES_PER_PIPE = 64,
  parameter int unsigned NUM_PIPES        = 8,
  localparam int unsigned AW = (CLAUSES_PER_PIPE > 1) ? $clog2(CLAUSES_PER_PIPE) : 1,
  localparam int unsigned PW = (NUM_PIPES > 1) ? $clog2(NUM_PIPES) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // clause loading
  input  logic                       cfg_we,
  input  logic [PW-1:0]              cfg_pipe,
  input  logic [AW-1:0]              cfg_clause,
  input  lit_t [MAX_LITS-1:0]        cfg_lits,
  // run
  input  logic                       start,
  output logic                       busy_o,
  output logic                       done_o,
  output logic                       sat_o,
  output logic [NUM_VARS-1:0][1:0]   assign_o,
  // statistics
  output logic [31:0]                cnt_decisions,
  output logic [31:0]                cnt_backtracks,
  output logic [31:0]                cnt_merges,
  output logic [31:0]                cnt_iterations,
  output logic [31:0]                cnt_passes,
  output logic [31:0]                cnt_cycles
);

  logic                                 start_iter, abort_iter, merge_start;
  logic [NUM_PIPES-1:0]                 p_done, p_conflict, p_changed;
  logic [31:0]                          p_passes [NUM_PIPES];  // only pipe 0's is reported
  logic [NUM_PIPES-1:0]                 m_valid;
  logic [NUM_PIPES-1:0][15:0]           m_idx;
  logic [NUM_PIPES-1:0][BUS_W-1:0][1:0] m_data;
  logic                                 t_valid;
  logic [15:0]                          t_idx;
  logic [BUS_W-1:0][1:0]                t_data;

  bus_cmd_e              bus_cmd;
  logic [15:0]           bus_idx, bus_dvar;
  logic [BUS_W-1:0][1:0] bus_data;
  logic [1:0]            bus_dval;

  for (genvar p = 0; p < NUM_PIPES; p++) begin : g_pipe
    sat_pipe #(
      .BUS_W(BUS_W), .NUM_VARS(NUM_VARS), .MAX_LITS(MAX_LITS),
      .CLAUSES_PER_PIPE(CLAUSES_PER_PIPE)
    ) u_pipe (
      .clk, .rst_n,
      .cfg_we        (cfg_we && (NUM_PIPES == 1 || 32'(cfg_pipe) == p)),
      .cfg_addr      (cfg_clause),
      .cfg_lits      (cfg_lits),
      .start_iter, .abort_iter, .merge_start,
      .done_o        (p_done[p]),
      .conflict_o    (p_conflict[p]),
      .changed_o     (p_changed[p]),
      .pass_cnt_o    (p_passes[p]),
      .bus_cmd, .bus_idx, .bus_data, .bus_dvar, .bus_dval,
      .merge_valid_o (m_valid[p]),
      .merge_idx_o   (m_idx[p]),
      .merge_data_o  (m_data[p])
    );
  end

  merge_tree #(.BUS_W(BUS_W), .NUM_PIPES(NUM_PIPES)) u_tree (
    .clk, .rst_n,
    .valid_i (m_valid),
    .idx_i   (m_idx),
    .data_i  (m_data),
    .valid_o (t_valid),
    .idx_o   (t_idx),
    .data_o  (t_data)
  );

  control_unit #(.BUS_W(BUS_W), .NUM_VARS(NUM_VARS), .NUM_PIPES(NUM_PIPES)) u_ctrl (
    .clk, .rst_n,
    .start, .busy_o, .done_o, .sat_o,
    .pipe_done     (p_done),
    .pipe_conflict (p_conflict),
    .pipe_changed  (p_changed),
    .start_iter, .abort_iter, .merge_start,
    .merge_valid_i (t_valid),
    .merge_idx_i   (t_idx),
    .merge_data_i  (t_data),
    .bus_cmd, .bus_idx, .bus_data, .bus_dvar, .bus_dval,
    .assign_o,
    .cnt_decisions, .cnt_backtracks, .cnt_merges, .cnt_iterations, .cnt_cycles
  );

  // Passes made by pipe 0 during the last run. Pipes start together but each
  // stops when its own clauses imply nothing more, so other pipes may differ.
  logic [31:0] pass_base;
  always_ff @(posedge clk) begin
    if (!rst_n)     pass_base <= '0;
    else if (start) pass_base <= p_passes[0];
  end
  assign cnt_passes = p_passes[0] - pass_base;

  a_pow2: assert property (@(posedge clk) (NUM_PIPES & (NUM_PIPES - 1)) == 0);

endmodule
