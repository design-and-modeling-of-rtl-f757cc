// rank_mux: output switch that selects one signal of the sorted vector by its
// rank.
//
// `ranks` is the sorting unit's output in ascending order (rank 0 = minimum,
// rank N-1 = maximum). `sel` picks the rank; a code above N-1 is clamped to
// N-1 (the maximum), so every code gives a defined output. Combinational.
// Selecting by rank with a multiplexer follows the original description; the
// clamping of out-of-range codes is this design's choice.
module rank_mux #(
  parameter int unsigned N     = 9,
  parameter int unsigned W     = 8,
  parameter int unsigned SEL_W = 8
) (
  input  logic [W-1:0]     ranks [N],
  input  logic [SEL_W-1:0] sel,
  output logic [W-1:0]     y
);
  always_comb begin
    y = ranks[N-1];
    for (int unsigned i = 0; i < N; i++)
      if (32'(sel) == i) y = ranks[i];
  end
endmodule
