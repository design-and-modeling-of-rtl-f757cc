// rdiff_wsel: weighting-selecting adder of rank differences, the processor's
// second output.
//
// The sorted window x(0) <= x(1) <= ... <= x(N-1) and the two reference
// levels 0 and D split the range [0, D] into N+1 consecutive differences:
//   e(0) = x(0) - 0,  e(i) = x(i) - x(i-1) for i = 1..N-1,  e(N) = D - x(N-1).
// The output is the sum of the differences whose bit in the selection vector
// `dsel` is set. Because the e(i) add up to D, every selection gives a value in
// [0, D] and a wide family of functions comes from one adder:
//   dsel = bits 0..r          -> rank x(r)           (bit 0 only: minimum)
//   dsel = bits r+1..N        -> complement D - x(r)
//   dsel = bits a+1..b        -> difference x(b) - x(a)
//   dsel = bit i              -> one neighbouring-rank difference
// The inputs are the sorted extremes and the N-1 neighbouring differences
// from rank_diffs. The sum is registered: y and out_valid follow the inputs by
// one clock, which keeps it in step with the first output (wsel_unit).
//
// Processing ranks through their differences, weighted by selection under a
// control vector, with complements against the reference D, follows the
// original description; the exact formulation (the N+1 differences including
// the two reference terms and one selection bit per difference) is this
// design's.
module rdiff_wsel #(
  parameter int unsigned N      = 9,
  parameter int unsigned W      = 8,
  parameter int unsigned DSEL_W = 16,
  parameter logic [W-1:0] D     = '1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      lo,            // x(0), the minimum
  input  logic [W-1:0]      hi,            // x(N-1), the maximum
  input  logic [W-1:0]      diffs [N-1],   // x(i+1) - x(i)
  input  logic [DSEL_W-1:0] dsel,
  output logic              out_valid,
  output logic [W-1:0]      y
);
  localparam int unsigned SW = W + $clog2(N + 1);

  logic [W-1:0]  e [N+1];
  logic [SW-1:0] sum;

  always_comb begin
    e[0] = lo;
    for (int unsigned i = 1; i < N; i++) e[i] = diffs[i-1];
    e[N] = D - hi;
    sum  = '0;
    for (int unsigned i = 0; i <= N; i++)
      if (dsel[i]) sum = sum + SW'(e[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= sum[W-1:0];
    end
  end

  // The differences of an ordered vector between 0 and D never add past D.
  a_sum_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> sum <= SW'(D))
    else $error("rdiff_wsel: selected differences exceed D (input not sorted?)");
endmodule
