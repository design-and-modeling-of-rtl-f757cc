// dmip3: digital multifunctional image processor with serial pixel input,
// register window memory, a pipelined sorting unit and two rank outputs whose
// signals and their difference are processed by a weighting-selecting unit.
//
// Data path: window_mem forms the K x K window around each raster position
// (A1..A9 for K = 3); sort_mchws orders the K*K samples in N = K*K pipelined
// comparison-switching layers; rank_diffs forms the N-1 differences of
// neighbouring ranks; two rank_mux switches take the ranks chosen by the
// control vector Y (rank 0 = minimum, rank N-1 = maximum); wsel_unit forms the
// first output from them (a rank, a difference of ranks, a complement, a sum,
// weighted); rdiff_wsel forms the second output, the sum of the rank
// differences (including the steps from 0 to the minimum and from the maximum
// to D) selected by Y, which gives any rank, complement of a rank or
// difference of two ranks. With a single switch and function FN_RANK_A it is a
// plain rank filter (minimum = erosion, maximum = dilation, middle rank =
// median).
//
// Interface: one 8-bit pixel per clock when pix_valid is high, rows of IMG_W
// pixels, pix_sof on the first pixel of a frame. Y (ctrl) is a static
// configuration: change it only while no valid window is in flight. Outputs:
// the full sorted vector and its neighbouring-rank differences (ranks,
// rank_diff, ranks_valid), the two switched ranks out_a and out_b, the two
// processed outputs out_y and out_d, and the image position (row, column)
// of the bottom-right pixel of the window that produced them.
//
// Timing: throughput one window per clock. A pixel accepted at clock edge t
// produces ranks at edge t+N and out_y/out_d/out_a/out_b at edge t+N+1 (10
// clocks for the 3x3 window); windows not wholly inside the image give no
// output.
//
// The structure (serial input, register memory, sorting unit, two switches,
// weighting-selecting of ranks and rank differences under a control vector,
// 64x64 image, 3x3 window) follows the original description; latencies,
// encodings and border handling are this design's choices.
module dmip3
  import dmip_pkg::*;
#(
  parameter int unsigned IMG_W = 64,
  parameter int unsigned IMG_H = 64,
  parameter int unsigned K     = 3,
  localparam int unsigned N    = K * K,
  localparam int unsigned CW   = $clog2(IMG_W),
  localparam int unsigned RW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // serial pixel input
  input  logic          pix_valid,
  input  logic          pix_sof,
  input  pix_t          pix,
  // control vector Y
  input  ctrl_t         ctrl,
  // sorted window (rank outputs of the sorting unit)
  output logic          ranks_valid,
  output pix_t          ranks [N],
  output pix_t          rank_diff [N-1],  // ranks[i+1] - ranks[i]
  // processed outputs
  output logic          out_valid,
  output pix_t          out_y,
  output pix_t          out_a,
  output pix_t          out_b,
  output pix_t          out_d,            // selected rank differences, summed
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col
);
  pix_t          win [N];
  logic          win_valid;
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;
  pix_t          sel_a, sel_b;
  logic          d_valid;

  window_mem #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .W(PIX_W)) u_win (
    .clk, .rst_n,
    .pix_valid, .pix_sof, .pix,
    .win, .win_valid, .win_row, .win_col
  );

  sort_mchws #(.N(N), .W(PIX_W)) u_sort (
    .clk, .rst_n,
    .in_valid (win_valid),
    .x        (win),
    .out_valid(ranks_valid),
    .y        (ranks)
  );

  rank_diffs #(.N(N), .W(PIX_W)) u_diffs (
    .ranks, .d(rank_diff)
  );

  rank_mux #(.N(N), .W(PIX_W), .SEL_W(SEL_W)) u_sw_a (
    .ranks, .sel(ctrl.sel_a), .y(sel_a)
  );

  rank_mux #(.N(N), .W(PIX_W), .SEL_W(SEL_W)) u_sw_b (
    .ranks, .sel(ctrl.sel_b), .y(sel_b)
  );

  wsel_unit #(.W(PIX_W)) u_wsel (
    .clk, .rst_n,
    .in_valid (ranks_valid),
    .a        (sel_a),
    .b        (sel_b),
    .fn       (ctrl.fn),
    .gain     (ctrl.gain),
    .out_valid,
    .y        (out_y)
  );

  rdiff_wsel #(.N(N), .W(PIX_W), .DSEL_W(DSEL_W), .D(PIX_W'(D_REF))) u_rdiff (
    .clk, .rst_n,
    .in_valid (ranks_valid),
    .lo       (ranks[0]),
    .hi       (ranks[N-1]),
    .diffs    (rank_diff),
    .dsel     (ctrl.dsel),
    .out_valid(d_valid),
    .y        (out_d)
  );

  // Both output stages are one clock behind the sorter, so they stay in step.
  a_outputs_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid == d_valid)
    else $error("dmip3: output stages out of step");

  // Position tags and switched ranks travel beside the data path.
  logic [RW-1:0] row_pipe [N+1];
  logic [CW-1:0] col_pipe [N+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_pipe <= '{default: '0};
      col_pipe <= '{default: '0};
      out_a    <= '0;
      out_b    <= '0;
    end else begin
      row_pipe[0] <= win_row;
      col_pipe[0] <= win_col;
      for (int unsigned i = 1; i <= N; i++) begin
        row_pipe[i] <= row_pipe[i-1];
        col_pipe[i] <= col_pipe[i-1];
      end
      out_a <= sel_a;
      out_b <= sel_b;
    end
  end

  assign out_row = row_pipe[N];
  assign out_col = col_pipe[N];
endmodule
