// wsel_unit: weighting-selecting unit that forms the processor's first output
// from the two signals chosen by the rank switches.
//
// From a (switch 1) and b (switch 2) it selects, by the function code `fn`,
// one of: a, b, the bounded difference max(a-b,0), the nonequivalence |a-b|,
// the complement D-a, the complement of the nonequivalence D-|a-b|, the sum
// a+b or the mean (a+b)/2, with D the reference level (255, full scale). The
// selected value is then weighted: multiplied by `gain` (unsigned, GAIN_FRAC
// fraction bits, so GAIN_ONE = 4 is unity) and limited to D. The result is
// registered: y and out_valid follow a, b and in_valid by one clock.
//
// Differences of ranks, bounded difference, nonequivalence, complement against
// the reference D, selection, weighting and addition are the functions the
// original description names; the exact list of codes, the gain format and the
// limiting to D are this design's choices.
module wsel_unit
  import dmip_pkg::*;
#(
  parameter int unsigned W = PIX_W,
  parameter logic [W-1:0] D = W'(D_REF)   // reference level
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  input  fn_e               fn,
  input  logic [GAIN_W-1:0] gain,
  output logic              out_valid,
  output logic [W-1:0]      y
);
  localparam logic [W:0] DMAX = {1'b0, D};

  logic [W:0]          diff_ab, absdiff, sum_ab, f;
  logic [W+GAIN_W:0]   prod;
  logic [W+GAIN_W:0]   scaled;
  logic [W-1:0]        y_nxt;

  always_comb begin
    diff_ab = {1'b0, a} - {1'b0, b};
    absdiff = (a >= b) ? diff_ab : ({1'b0, b} - {1'b0, a});
    sum_ab  = {1'b0, a} + {1'b0, b};
    unique case (fn)
      FN_RANK_A: f = {1'b0, a};
      FN_RANK_B: f = {1'b0, b};
      FN_BDIFF:  f = (a > b) ? diff_ab : '0;
      FN_NONEQ:  f = absdiff;
      FN_COMPL:  f = DMAX - {1'b0, a};
      FN_CDIFF:  f = DMAX - absdiff;
      FN_SUM:    f = sum_ab;
      FN_MEAN:   f = {1'b0, sum_ab[W:1]};
      default:   f = '0;
    endcase
    prod   = (W + GAIN_W + 1)'(f) * (W + GAIN_W + 1)'(gain);
    scaled = prod >> GAIN_FRAC;
    y_nxt  = (scaled > (W + GAIN_W + 1)'(DMAX)) ? DMAX[W-1:0] : scaled[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= y_nxt;
    end
  end
endmodule
