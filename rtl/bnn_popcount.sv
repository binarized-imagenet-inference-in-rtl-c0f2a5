// bnn_popcount: POPCOUNT engine of a processing element.
// Counts the ones in an N-bit vector. The vector is cut into 64-bit groups;
// each group is counted separately and the group counts are added, which
// synthesis turns into an adder tree (one multi-operand adder cell per
// engine). Purely combinational: the count is valid in the same
// cycle as the input. The grouping is this design's choice; the document
// only names the engine.
module bnn_popcount #(
  parameter int unsigned N  = 363,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits_i,
  output logic [CW-1:0] count_o
);

  localparam int unsigned G  = 64;
  localparam int unsigned NG = (N + G - 1) / G;

  logic [NG*G-1:0] padded;
  logic [6:0]      group_cnt [NG];

  assign padded = (NG*G)'(bits_i);

  always_comb begin
    for (int unsigned g = 0; g < NG; g++) begin
      group_cnt[g] = 7'($countones(padded[g*G +: G]));
    end
    count_o = '0;
    for (int unsigned g = 0; g < NG; g++) count_o = count_o + CW'(group_cnt[g]);
  end

endmodule
