// variable_memory: one pipe's copy of every variable's value and its pass
// sequencer.
//
// The memory holds two sets of NUM_VARS two-bit values. The current set is
// streamed into the pipe's clause chain, BUS_W variables per word, words
// 0..W-1 on consecutive cycles (W = NUM_VARS/BUS_W). The words coming back,
// CLAUSES_PER_PIPE cycles later, are written into the second set. The first
// word of the first pass after start_iter is marked so that the clause
// modules start afresh; later passes build on what they learned. After the
// last word is back the second set becomes the current one and the pass is
// judged:
//   * a returned word carried a conflict flag or a conflicting (11) value:
//     the pipe reports conflict_o and stops;
//   * some returned word differs from what was sent (an implication was
//     made), or the last word carries a clause's pending flag (an
//     implication is due on a variable that had already passed the clause):
//     another pass follows;
//   * nothing changed: every implication this pipe can find is found; the
//     pipe reports done_o and waits.
// Passes start every W + CLAUSES_PER_PIPE + 2 cycles.
//
// Commands, all from the control unit:
//   start_iter   begin passes on the current set
//   abort_iter   stop at once and flush the chain (another pipe conflicted)
//   merge_start  stream the current set to the merge tree, one word per cycle
//   bus_*        broadcast: BUS_LOAD overwrites a word, BUS_MERGE overwrites
//                a word and raises changed_o if it differs from the pipe's own
//                word, BUS_DECIDE sets one variable. Bus commands are only
//                sent while the pipe is not making passes.
//
// The value store, the repeat-until-no-change passes and the report to the
// other pipes follow the solver's description; how the two register sets are
// used and the command set are this design's choices. Reset is synchronous,
// active low, and clears every variable to undecided.
module variable_memory
  import sat_pkg::*;
#(
  parameter int unsigned BUS_W    = 8,
  parameter int unsigned NUM_VARS = 128,
  localparam int unsigned W       = NUM_VARS / BUS_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
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
  // ring through the clause chain
  output pipe_hdr_t                 pipe_hdr_o,
  output logic [BUS_W-1:0][1:0]     pipe_data_o,
  output logic                      flush_o,     // same cycle as abort_iter
  input  pipe_hdr_t                 pipe_hdr_i,
  input  logic [BUS_W-1:0][1:0]     pipe_data_i,
  // into the merge tree
  output logic                      merge_valid_o,
  output logic [15:0]               merge_idx_o,
  output logic [BUS_W-1:0][1:0]     merge_data_o
);

  typedef enum logic [2:0] {S_IDLE, S_CYCLE, S_END, S_DONE, S_CONFL} state_e;
  state_e state;

  logic [W-1:0][BUS_W-1:0][1:0] cur, nxt;
  logic [15:0] send_cnt;
  logic        pass_changed, pass_conflict, first_pass;
  logic        mrg_active;
  logic [15:0] mrg_cnt;

  logic ret_valid, ret_changed, ret_conflict;
  always_comb begin
    ret_valid    = (state == S_CYCLE) && pipe_hdr_i.valid;
    ret_changed  = ret_valid && (pipe_data_i != cur[pipe_hdr_i.idx] || pipe_hdr_i.pending);
    ret_conflict = ret_valid && pipe_hdr_i.conflict;
    for (int b = 0; b < BUS_W; b++)
      if (ret_valid && pipe_data_i[b] == VAL_C) ret_conflict = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cur           <= '0;
      nxt           <= '0;
      send_cnt      <= '0;
      pass_changed  <= 1'b0;
      pass_conflict <= 1'b0;
      first_pass    <= 1'b0;
      changed_o     <= 1'b0;
      pass_cnt_o    <= '0;
      pipe_hdr_o    <= '0;
      pipe_data_o   <= '0;
      mrg_active    <= 1'b0;
      mrg_cnt       <= '0;
      merge_valid_o <= 1'b0;
      merge_idx_o   <= '0;
      merge_data_o  <= '0;
    end else begin
      pipe_hdr_o <= '0;

      // ---- pass sequencer ----
      unique case (state)
        S_IDLE, S_DONE, S_CONFL: begin
          if (start_iter) begin
            state         <= S_CYCLE;
            send_cnt      <= '0;
            pass_changed  <= 1'b0;
            pass_conflict <= 1'b0;
            first_pass    <= 1'b1;
            pass_cnt_o    <= pass_cnt_o + 1;
          end
        end
        S_CYCLE: begin
          if (32'(send_cnt) < W) begin
            pipe_hdr_o.valid <= 1'b1;
            pipe_hdr_o.first <= (send_cnt == 0) && first_pass;
            pipe_hdr_o.last  <= (32'(send_cnt) == W - 1);
            pipe_hdr_o.idx   <= send_cnt;
            pipe_data_o      <= cur[send_cnt];
            send_cnt         <= send_cnt + 1;
          end
          if (ret_valid) begin
            nxt[pipe_hdr_i.idx] <= pipe_data_i;
            if (ret_changed)  pass_changed  <= 1'b1;
            if (ret_conflict) pass_conflict <= 1'b1;
            if (32'(pipe_hdr_i.idx) == W - 1) state <= S_END;
          end
        end
        S_END: begin
          cur <= nxt;
          if (pass_conflict)
            state <= S_CONFL;
          else if (pass_changed) begin
            state         <= S_CYCLE;
            send_cnt      <= '0;
            pass_changed  <= 1'b0;
            first_pass    <= 1'b0;
            pass_cnt_o    <= pass_cnt_o + 1;
          end else
            state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase

      if (abort_iter) begin
        state         <= S_IDLE;
        pipe_hdr_o    <= '0;
        pass_conflict <= 1'b0;
      end

      // ---- broadcast bus (only while no pass is running) ----
      unique case (bus_cmd)
        BUS_LOAD:   cur[bus_idx] <= bus_data;
        BUS_MERGE: begin
          cur[bus_idx] <= bus_data;
          if (bus_data != cur[bus_idx]) changed_o <= 1'b1;
        end
        BUS_DECIDE: cur[32'(bus_dvar) / BUS_W][32'(bus_dvar) % BUS_W] <= bus_dval;
        default: ;
      endcase

      // ---- stream out to the merge tree ----
      merge_valid_o <= 1'b0;
      if (merge_start) begin
        mrg_active <= 1'b1;
        mrg_cnt    <= '0;
        changed_o  <= 1'b0;
      end else if (mrg_active) begin
        merge_valid_o <= 1'b1;
        merge_idx_o   <= mrg_cnt;
        merge_data_o  <= cur[mrg_cnt];
        mrg_cnt       <= mrg_cnt + 1;
        if (32'(mrg_cnt) == W - 1) mrg_active <= 1'b0;
      end
    end
  end

  assign flush_o    = abort_iter;
  assign done_o     = (state == S_DONE);
  assign conflict_o = (state == S_CONFL);

  // The control unit must not broadcast into a pipe that is making passes.
  a_no_bus_in_pass: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CYCLE || state == S_END) |-> bus_cmd == BUS_NOP);
  a_var_split: assert property (@(posedge clk) disable iff (!rst_n)
    W * BUS_W == NUM_VARS);

endmodule
