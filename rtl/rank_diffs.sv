// rank_diffs: differences of neighbouring ranks of the sorted window.
//
// For an ascending sorted vector ranks[0..N-1], d[i] = ranks[i+1] - ranks[i]
// for i = 0..N-2; every difference is non-negative because the input is in
// order, so W bits suffice. d[N-2] is the step between the maximum and the
// next value in order. Combinational: the differences are valid in the same
// clock as the sorted vector that feeds them.
//
// Forming the differences of signals with neighbouring ranks alongside the
// ranks themselves follows the original description; computing all N-1 of them
// in parallel, next to the two selectable outputs, is this design's choice.
module rank_diffs #(
  parameter int unsigned N = 9,
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] ranks [N],
  output logic [W-1:0] d     [N-1]
);
  always_comb
    for (int unsigned i = 0; i + 1 < N; i++) d[i] = ranks[i+1] - ranks[i];
endmodule
