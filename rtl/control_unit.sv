// control_unit: runs the search for all pipes.
//
// The unit keeps the global variable set, a decision level tag per variable
// and a decision stack, and sequences the pipes through the search:
//
//   LOAD      broadcast the global set to every variable memory, one word of
//             BUS_W variables per cycle
//   ITER      let every pipe make passes. The first pipe to report a conflict
//             makes the unit stop all pipes (abort) and backtrack. When every
//             pipe is done a merge starts.
//   MERGE     every pipe streams its set through the merge tree; each merged
//             word is written into the global set (variables that become
//             assigned get the current level) and broadcast back to all pipes
//             one cycle later. A conflicting value means backtrack; a merged
//             word that differs from some pipe's own word means the pipes
//             iterate again on the merged set; otherwise the set is
//             consistent and the next decision is made.
//   DECIDE    the lowest-numbered undecided variable is set to 0 at a new
//             level and the decision is broadcast. No undecided variable
//             left: the instance is satisfiable and the global set is a
//             satisfying assignment.
//   BACKTRACK levels whose decision has tried both values are popped; the
//             top decision is flipped to 1, every variable tagged with that
//             level or a deeper one is cleared, and the set is reloaded.
//             Nothing left to pop: the instance is unsatisfiable.
// Before the first decision one iteration and merge run at level 0.
//
// Interface: pulse start after the clauses are loaded; done_o and sat_o are
// then held until the next start, assign_o holds the global set. The
// counters give decisions, backtracks (flips), merges, iterations (rounds of
// passes started) and cycles of the last run, the quantities behind the
// solver's unit-propagation-time model.
//
// The iterate / merge / re-iterate / decide / backtrack flow follows the
// solver's description. The decision order, chronological backtracking with
// level tags, and the broadcast protocol are this design's choices.
module control_unit
  import sat_pkg::*;
#(
  parameter int unsigned BUS_W     = 8,
  parameter int unsigned NUM_VARS  = 128,
  parameter int unsigned NUM_PIPES = 8,
  localparam int unsigned W  = NUM_VARS / BUS_W,
  localparam int unsigned LW = $clog2(NUM_VARS + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy_o,
  output logic                          done_o,
  output logic                          sat_o,
  // pipe status and commands
  input  logic [NUM_PIPES-1:0]          pipe_done,
  input  logic [NUM_PIPES-1:0]          pipe_conflict,
  input  logic [NUM_PIPES-1:0]          pipe_changed,
  output logic                          start_iter,
  output logic                          abort_iter,
  output logic                          merge_start,
  // merge tree output
  input  logic                          merge_valid_i,
  input  logic [15:0]                   merge_idx_i,
  input  logic [BUS_W-1:0][1:0]         merge_data_i,
  // broadcast bus
  output bus_cmd_e                      bus_cmd,
  output logic [15:0]                   bus_idx,
  output logic [BUS_W-1:0][1:0]         bus_data,
  output logic [15:0]                   bus_dvar,
  output logic [1:0]                    bus_dval,
  // result and statistics
  output logic [NUM_VARS-1:0][1:0]      assign_o,
  output logic [31:0]                   cnt_decisions,
  output logic [31:0]                   cnt_backtracks,
  output logic [31:0]                   cnt_merges,
  output logic [31:0]                   cnt_iterations,
  output logic [31:0]                   cnt_cycles
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_GO, S_ITER, S_MERGE, S_MCHECK, S_DECIDE, S_BACKTRACK, S_DONE
  } state_e;
  state_e state;

  logic [W-1:0][BUS_W-1:0][1:0] gset;            // global variable set
  logic [NUM_VARS-1:0][LW-1:0]  tag;             // decision level of each variable
  logic [NUM_VARS-1:0][15:0]    stk_var;         // decision stack
  logic [NUM_VARS-1:0]          stk_flipped;
  logic [LW-1:0]                level;
  logic [15:0]                  cnt;             // word counter / settle timer
  logic                         settle;
  logic                         mconf;

  assign assign_o = gset;

  // Lowest-numbered undecided variable.
  logic        free_found;
  logic [15:0] free_var;
  always_comb begin
    free_found = 1'b0;
    free_var   = '0;
    for (int v = NUM_VARS - 1; v >= 0; v--)
      if (gset[v / BUS_W][v % BUS_W] == VAL_U) begin
        free_found = 1'b1;
        free_var   = 16'(v);
      end
  end

  logic [15:0] top_var;
  logic        top_flipped;
  assign top_var     = stk_var[level - 1];
  assign top_flipped = stk_flipped[level - 1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      gset           <= '0;
      tag            <= '0;
      stk_var        <= '0;
      stk_flipped    <= '0;
      level          <= '0;
      cnt            <= '0;
      settle         <= 1'b0;
      mconf          <= 1'b0;
      done_o         <= 1'b0;
      sat_o          <= 1'b0;
      start_iter     <= 1'b0;
      abort_iter     <= 1'b0;
      merge_start    <= 1'b0;
      bus_cmd        <= BUS_NOP;
      bus_idx        <= '0;
      bus_data       <= '0;
      bus_dvar       <= '0;
      bus_dval       <= '0;
      cnt_decisions  <= '0;
      cnt_backtracks <= '0;
      cnt_merges     <= '0;
      cnt_iterations <= '0;
      cnt_cycles     <= '0;
    end else begin
      start_iter  <= 1'b0;
      abort_iter  <= 1'b0;
      merge_start <= 1'b0;
      bus_cmd     <= BUS_NOP;
      if (state != S_IDLE && state != S_DONE) cnt_cycles <= cnt_cycles + 1;

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state          <= S_LOAD;
            gset           <= '0;
            tag            <= '0;
            level          <= '0;
            cnt            <= '0;
            done_o         <= 1'b0;
            sat_o          <= 1'b0;
            cnt_decisions  <= '0;
            cnt_backtracks <= '0;
            cnt_merges     <= '0;
            cnt_iterations <= '0;
            cnt_cycles     <= '0;
          end
        end

        S_LOAD: begin
          bus_cmd  <= BUS_LOAD;
          bus_idx  <= cnt;
          bus_data <= gset[cnt];
          cnt      <= cnt + 1;
          if (32'(cnt) == W - 1) state <= S_GO;
        end

        S_GO: begin
          start_iter     <= 1'b1;
          settle         <= 1'b1;
          cnt_iterations <= cnt_iterations + 1;
          state          <= S_ITER;
        end

        S_ITER: begin
          // The pipes see start_iter one cycle late: skip the status of that cycle.
          settle <= 1'b0;
          if (!settle && !start_iter) begin
            if (|pipe_conflict) begin
              abort_iter <= 1'b1;
              state      <= S_BACKTRACK;
            end else if (&pipe_done) begin
              merge_start <= 1'b1;
              cnt_merges  <= cnt_merges + 1;
              mconf       <= 1'b0;
              state       <= S_MERGE;
            end
          end
        end

        S_MERGE: begin
          if (merge_valid_i) begin
            bus_cmd  <= BUS_MERGE;
            bus_idx  <= merge_idx_i;
            bus_data <= merge_data_i;
            gset[merge_idx_i] <= merge_data_i;
            for (int b = 0; b < BUS_W; b++) begin
              if (merge_data_i[b] == VAL_C) mconf <= 1'b1;
              if (gset[merge_idx_i][b] == VAL_U && merge_data_i[b] != VAL_U)
                tag[32'(merge_idx_i) * BUS_W + b] <= level;
            end
            if (32'(merge_idx_i) == W - 1) begin
              cnt   <= 16'd2;            // let the pipes compare the last word
              state <= S_MCHECK;
            end
          end
        end

        S_MCHECK: begin
          if (cnt != 0) cnt <= cnt - 1;
          else if (mconf) state <= S_BACKTRACK;
          else if (|pipe_changed) state <= S_GO;
          else state <= S_DECIDE;
        end

        S_DECIDE: begin
          if (!free_found) begin
            sat_o  <= 1'b1;
            done_o <= 1'b1;
            state  <= S_DONE;
          end else begin
            stk_var[32'(level)]     <= free_var;
            stk_flipped[32'(level)] <= 1'b0;
            level              <= level + 1;
            tag[free_var]      <= level + 1;
            gset[32'(free_var) / BUS_W][32'(free_var) % BUS_W] <= VAL_0;
            bus_cmd            <= BUS_DECIDE;
            bus_dvar           <= free_var;
            bus_dval           <= VAL_0;
            cnt_decisions      <= cnt_decisions + 1;
            state              <= S_GO;
          end
        end

        S_BACKTRACK: begin
          if (level == 0) begin
            sat_o  <= 1'b0;
            done_o <= 1'b1;
            state  <= S_DONE;
          end else if (top_flipped) begin
            level <= level - 1;
          end else begin
            stk_flipped[level - 1] <= 1'b1;
            for (int v = 0; v < NUM_VARS; v++)
              if (tag[v] >= level) gset[v / BUS_W][v % BUS_W] <= VAL_U;
            gset[32'(top_var) / BUS_W][32'(top_var) % BUS_W] <= VAL_1;
            cnt_backtracks <= cnt_backtracks + 1;
            cnt            <= '0;
            state          <= S_LOAD;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE) && (state != S_DONE);

  // A level is only ever deepened by a decision on an undecided variable.
  a_decide_free: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_DECIDE && free_found |-> gset[32'(free_var) / BUS_W][32'(free_var) % BUS_W] == VAL_U);
  a_level_range: assert property (@(posedge clk) disable iff (!rst_n)
    32'(level) <= NUM_VARS);

endmodule
