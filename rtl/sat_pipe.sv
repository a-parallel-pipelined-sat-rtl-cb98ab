// sat_pipe: one pipe of the solver, a variable memory and its clause chain
// closed into a ring.
//
// The variable memory sends its set round the chain pass after pass until the
// pass changes nothing (done_o) or a clause reports a conflict (conflict_o).
// Between passes the pipe takes broadcasts from the control unit and can
// stream its set out to the merge tree. One pass takes
// NUM_VARS/BUS_W + CLAUSES_PER_PIPE + 2 cycles.
//
// The ring of a variable memory and clause modules follows the solver's
// description; the port set is this design's choice (see variable_memory and
// clause_chain for the command and configuration details).
module sat_pipe
  import sat_pkg::*;
#(
  parameter int unsigned BUS_W            = 8,
  parameter int unsigned NUM_VARS         = 128,
  parameter int unsigned MAX_LITS         = 6,
  parameter int unsigned CLAUSES_PER_PIPE = 64,
  localparam int unsigned AW = (CLAUSES_PER_PIPE > 1) ? $clog2(CLAUSES_PER_PIPE) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // clause loading
  input  logic                      cfg_we,
  input  logic [AW-1:0]             cfg_addr,
  input  lit_t [MAX_LITS-1:0]       cfg_lits,
  // control
  input  logic                      start_iter,
  input  logic                      abort_iter,
  input  logic                      merge_start,
  output logic                      done_o,
  output logic                      conflict_o,
  output logic                      changed_o,
  output logic [31:0]               pass_cnt_o,
  // broadcast bus
  input  bus_cmd_e                  bus_cmd,
  input  logic [15:0]               bus_idx,
  input  logic [BUS_W-1:0][1:0]     bus_data,
  input  logic [15:0]               bus_dvar,
  input  logic [1:0]                bus_dval,
  // to the merge tree
  output logic                      merge_valid_o,
  output logic [15:0]               merge_idx_o,
  output logic [BUS_W-1:0][1:0]     merge_data_o
);

  pipe_hdr_t               to_hdr, from_hdr;
  logic [BUS_W-1:0][1:0]   to_data, from_data;
  logic                    flush;

  variable_memory #(.BUS_W(BUS_W), .NUM_VARS(NUM_VARS)) u_vmem (
    .clk, .rst_n,
    .start_iter, .abort_iter, .merge_start,
    .done_o, .conflict_o, .changed_o, .pass_cnt_o,
    .bus_cmd, .bus_idx, .bus_data, .bus_dvar, .bus_dval,
    .pipe_hdr_o  (to_hdr),
    .pipe_data_o (to_data),
    .flush_o     (flush),
    .pipe_hdr_i  (from_hdr),
    .pipe_data_i (from_data),
    .merge_valid_o, .merge_idx_o, .merge_data_o
  );

  clause_chain #(
    .BUS_W(BUS_W), .NUM_VARS(NUM_VARS), .MAX_LITS(MAX_LITS),
    .CLAUSES_PER_PIPE(CLAUSES_PER_PIPE)
  ) u_chain (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_lits,
    .flush_i  (flush),
    .in_hdr   (to_hdr),
    .in_data  (to_data),
    .out_hdr  (from_hdr),
    .out_data (from_data)
  );

endmodule
