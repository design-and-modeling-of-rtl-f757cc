// cmp_swap: one digital comparison-switching circuit, the cell from which the
// sorting unit's layers are built.
//
// A magnitude comparator drives a 2x2 switch: the smaller of the two inputs
// leaves on `lo`, the larger on `hi`. Equal inputs pass straight through.
// Purely combinational; the sorting unit places the pipeline registers.
module cmp_swap #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] lo,
  output logic [W-1:0] hi
);
  logic swap;

  always_comb begin
    swap = a > b;
    lo   = swap ? b : a;
    hi   = swap ? a : b;
  end
endmodule
