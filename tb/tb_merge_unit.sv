// tb_merge_unit: checks the two-pipe merge of variable values against the
// merge table written out value by value (U with x gives x, equal values
// stay, 0 with 1 gives conflicting, conflicting absorbs everything), for all
// sixteen value pairs in every lane and for random words.
module tb_merge_unit;
  import sat_pkg::*;
  localparam int BW = 8;
  logic [BW-1:0][1:0] a, b, y;
  int checks = 0, failures = 0;

  merge_unit #(.BUS_W(BW)) dut (.a_i(a), .b_i(b), .y_o(y));

  function automatic logic [1:0] merge_ref(logic [1:0] x, logic [1:0] z);
    if (x == VAL_C || z == VAL_C) return VAL_C;
    if (x == VAL_U) return z;
    if (z == VAL_U) return x;
    if (x == z) return x;
    return VAL_C;                      // 0 against 1
  endfunction

  task automatic check_word();
    #1;
    for (int l = 0; l < BW; l++) begin
      checks++;
      if (y[l] != merge_ref(a[l], b[l])) begin
        failures++;
        $display("FAIL lane %0d: %b merge %b -> %b", l, a[l], b[l], y[l]);
      end
    end
  endtask

  initial begin
    for (int x = 0; x < 4; x++)
      for (int z = 0; z < 4; z++) begin
        for (int l = 0; l < BW; l++) begin a[l] = 2'(x); b[l] = 2'(z); end
        check_word();
      end
    repeat (200) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      check_word();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
