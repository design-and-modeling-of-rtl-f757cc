// dmip_pkg: types and constants shared by the blocks of the multifunctional
// rank image processor.
//
// Pixels are unsigned 8-bit samples (0..255). The reference level D equals
// full scale (255), so "D minus a signal" is that signal's complement, as the
// processor's complement function defines it. The control vector Y selects the
// two ranks that the two output switches take from the sorted window and the
// function the weighting-selecting unit forms from them. The function codes,
// the field widths of Y and the 2-bit fractional gain are this design's own
// encoding; the set of functions (rank, difference of ranks, bounded
// difference, nonequivalence, complement, addition, weighting) follows the
// processor's description.
package dmip_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned D_REF  = 255;
  localparam int unsigned SEL_W  = 8;   // rank-select code width (ranks 0..255)
  localparam int unsigned GAIN_W = 4;   // weighting gain, unsigned, 2 fraction bits
  localparam int unsigned GAIN_FRAC = 2;
  localparam int unsigned DSEL_W = 16;  // rank-difference selection vector (N+1 <= 16)
  localparam logic [GAIN_W-1:0] GAIN_ONE = GAIN_W'(1 << GAIN_FRAC);

  typedef logic [PIX_W-1:0] pix_t;

  // Output functions of the weighting-selecting unit (a = first switch,
  // b = second switch).
  typedef enum logic [2:0] {
    FN_RANK_A = 3'd0,  // a
    FN_RANK_B = 3'd1,  // b
    FN_BDIFF  = 3'd2,  // bounded difference a (-) b = max(a-b, 0)
    FN_NONEQ  = 3'd3,  // nonequivalence |a-b|
    FN_COMPL  = 3'd4,  // complement D - a
    FN_CDIFF  = 3'd5,  // complement of the nonequivalence D - |a-b|
    FN_SUM    = 3'd6,  // addition a + b
    FN_MEAN   = 3'd7   // (a + b) / 2
  } fn_e;

  // Control vector Y.
  typedef struct packed {
    logic [SEL_W-1:0]  sel_a;  // rank taken by switch 1 (0 = minimum)
    logic [SEL_W-1:0]  sel_b;  // rank taken by switch 2
    fn_e               fn;     // output function
    logic [GAIN_W-1:0] gain;   // weight, GAIN_ONE = unity
    logic [DSEL_W-1:0] dsel;   // rank differences summed on the second output
  } ctrl_t;

endpackage
