// tb_merge_tree: streams random sets from 8 pipes (16 words of 8 variables)
// through the merge tree, back to back, and checks every merged word against
// a merge computed here variable by variable, its word index, and that it
// leaves exactly log2(8) = 3 cycles after it entered.
module tb_merge_tree;
  import sat_pkg::*;
  localparam int BW = 8, NP = 8, W = 16, LAT = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0]                 vin;
  logic [NP-1:0][15:0]           iin;
  logic [NP-1:0][BW-1:0][1:0]    din;
  logic                          vout;
  logic [15:0]                   iout;
  logic [BW-1:0][1:0]            dout;
  int checks = 0, failures = 0;

  merge_tree #(.BUS_W(BW), .NUM_PIPES(NP)) dut (
    .clk, .rst_n, .valid_i(vin), .idx_i(iin), .data_i(din),
    .valid_o(vout), .idx_o(iout), .data_o(dout));

  logic [BW-1:0][1:0] expect_q [$];
  int                 sent_at  [$];
  int                 cyc = 0;
  always @(posedge clk) cyc++;

  function automatic logic [1:0] merge_ref(logic [1:0] x, logic [1:0] z);
    if (x == VAL_U) return z;
    if (z == VAL_U || x == z) return x;
    return VAL_C;
  endfunction

  int got = 0;
  always @(negedge clk) if (rst_n && vout) begin
    logic [BW-1:0][1:0] e;
    int t;
    e = expect_q.pop_front();
    t = sent_at.pop_front();
    checks += 3;
    if (dout != e) begin failures++; $display("FAIL data word %0d", iout); end
    if (32'(iout) != got % W) begin failures++; $display("FAIL index %0d", iout); end
    if (cyc - t != LAT) begin failures++; $display("FAIL latency %0d", cyc - t); end
    got++;
  end

  initial begin
    vin = '0; iin = '0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++)
      for (int w = 0; w < W; w++) begin
        logic [BW-1:0][1:0] e;
        e = '0;
        vin = '1;
        for (int p = 0; p < NP; p++) begin
          iin[p] = 16'(w);
          for (int l = 0; l < BW; l++) begin
            // mostly undecided, some values, so both agreement and clashes occur
            int r;
            r = $urandom_range(15);
            din[p][l] = (r < 11) ? VAL_U : (r < 13) ? VAL_0 : (r < 15) ? VAL_1 : VAL_C;
            e[l] = merge_ref(e[l], din[p][l]);
          end
        end
        expect_q.push_back(e);
        sent_at.push_back(cyc);
        @(negedge clk);
      end
    vin = '0;
    repeat (6) @(negedge clk);
    checks++;
    if (got != 4 * W) begin failures++; $display("FAIL got %0d words", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
