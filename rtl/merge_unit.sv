// merge_unit: combines two pipes' views of the same BUS_W variables.
//
// With the two-bit code of sat_pkg (U=00, 0=01, 1=10, conflicting=11) the
// merge of two views is a bitwise OR: a value merged with undecided keeps the
// value, equal values stay, and 0 merged with 1 becomes conflicting. The unit
// is purely combinational: BUS_W two-bit OR gates, as the solver's
// description counts them.
module merge_unit #(
  parameter int unsigned BUS_W = 8
) (
  input  logic [BUS_W-1:0][1:0] a_i,
  input  logic [BUS_W-1:0][1:0] b_i,
  output logic [BUS_W-1:0][1:0] y_o
);

  always_comb
    for (int b = 0; b < BUS_W; b++)
      y_o[b] = a_i[b] | b_i[b];

endmodule
