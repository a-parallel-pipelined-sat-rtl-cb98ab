// merge_tree: merges one word from every pipe into the global word.
//
// NUM_PIPES words (a power of two) enter together, one per pipe, all for the
// same word index. They are reduced pairwise by merge units in a binary tree
// of log2(NUM_PIPES) levels with a register after each level, so a merged
// word leaves log2(NUM_PIPES) cycles after its inputs and a new word can enter
// every cycle: merging a whole set takes log2(NUM_PIPES) + NUM_VARS/BUS_W
// cycles. The tree uses NUM_PIPES-1 merge units. With one pipe the word passes
// straight through.
//
// The tree of OR merge units and its log p depth follow the solver's
// description; the register after every level is this design's choice.
module merge_tree #(
  parameter int unsigned BUS_W     = 8,
  parameter int unsigned NUM_PIPES = 8,
  localparam int unsigned LEVELS   = (NUM_PIPES > 1) ? $clog2(NUM_PIPES) : 0
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NUM_PIPES-1:0]                   valid_i,
  input  logic [NUM_PIPES-1:0][15:0]             idx_i,
  input  logic [NUM_PIPES-1:0][BUS_W-1:0][1:0]   data_i,
  output logic                                   valid_o,
  output logic [15:0]                            idx_o,
  output logic [BUS_W-1:0][1:0]                  data_o
);

  // Level l holds NUM_PIPES >> l words; level 0 is the input.
  logic [NUM_PIPES-1:0]                 lv_valid [LEVELS+1];
  logic [15:0]                          lv_idx   [LEVELS+1];
  logic [NUM_PIPES-1:0][BUS_W-1:0][1:0] lv_data  [LEVELS+1];

  assign lv_valid[0] = valid_i;
  assign lv_idx[0]   = idx_i[0];
  assign lv_data[0]  = data_i;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned N = NUM_PIPES >> (l + 1);
    logic [N-1:0][BUS_W-1:0][1:0] y;
    for (genvar n = 0; n < N; n++) begin : g_unit
      merge_unit #(.BUS_W(BUS_W)) u_merge (
        .a_i (lv_data[l][2*n]),
        .b_i (lv_data[l][2*n+1]),
        .y_o (y[n])
      );
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        lv_valid[l+1] <= '0;
        lv_idx[l+1]   <= '0;
        lv_data[l+1]  <= '0;
      end else begin
        lv_valid[l+1]        <= '0;
        lv_valid[l+1][0]     <= lv_valid[l][0];
        lv_idx[l+1]          <= lv_idx[l];
        lv_data[l+1]         <= '0;
        lv_data[l+1][N-1:0]  <= y;
      end
    end
  end

  assign valid_o = lv_valid[LEVELS][0];
  assign idx_o   = lv_idx[LEVELS];
  assign data_o  = lv_data[LEVELS][0];

  // All pipes stream their sets in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    valid_i[0] |-> (&valid_i) && (idx_i == {NUM_PIPES{idx_i[0]}}));

endmodule
