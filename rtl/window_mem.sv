// window_mem: register memory that turns a serial raster pixel stream into the
// vector of K x K window samples handed to the sorting unit.
//
// Pixels arrive one per accepted clock (pix_valid), row by row, IMG_W pixels
// per row. They shift through a register chain (K-1) rows plus K pixels long;
// chain[0] is the newest pixel. Window sample A(r*K+c+1), i.e. win[r*K+c], is
// chain[r*IMG_W + c]: row r back and column c back from the newest pixel, so
// A1, A2, A3 are the newest three pixels of the current row and each shifts
// into the next one on every accepted pixel. A window is valid only when it
// lies wholly inside the image (newest pixel at column >= K-1 and row >= K-1);
// windows that would wrap across a row edge or reach into the previous frame
// are marked invalid, so every valid output comes from one frame. pix_sof on
// an accepted pixel marks it as pixel (0,0) of a new frame and restarts the
// position counters; without it the counters wrap after IMG_W x IMG_H pixels.
//
// Timing: the window ending at a pixel appears, with win_valid high for one
// clock, on the clock edge that accepts that pixel. win_row/win_col give the
// position of that pixel (the window's bottom-right corner).
//
// Serial input, register memory and the automatic scan of windows follow the
// original description (image 64x64, window 3x3); the chain layout, the border
// rule and the start-of-frame input are this design's choices.
module window_mem #(
  parameter int unsigned IMG_W = 64,
  parameter int unsigned IMG_H = 64,
  parameter int unsigned K     = 3,
  parameter int unsigned W     = 8,
  localparam int unsigned NWIN = K * K,
  localparam int unsigned LEN  = (K - 1) * IMG_W + K,
  localparam int unsigned CW   = $clog2(IMG_W),
  localparam int unsigned RW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  logic          pix_sof,
  input  logic [W-1:0]  pix,
  output logic [W-1:0]  win [NWIN],
  output logic          win_valid,
  output logic [RW-1:0] win_row,
  output logic [CW-1:0] win_col
);
  logic [W-1:0]  chain [LEN];
  logic [CW-1:0] col, c_cur;
  logic [RW-1:0] row, r_cur;

  always_comb begin
    c_cur = pix_sof ? '0 : col;
    r_cur = pix_sof ? '0 : row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain     <= '{default: '0};
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
      win_row   <= '0;
      win_col   <= '0;
    end else begin
      win_valid <= 1'b0;
      if (pix_valid) begin
        chain[0] <= pix;
        for (int unsigned i = 1; i < LEN; i++) chain[i] <= chain[i-1];
        win_valid <= (32'(c_cur) >= K - 1) && (32'(r_cur) >= K - 1);
        win_row   <= r_cur;
        win_col   <= c_cur;
        if (32'(c_cur) == IMG_W - 1) begin
          col <= '0;
          row <= (32'(r_cur) == IMG_H - 1) ? '0 : r_cur + 1'b1;
        end else begin
          col <= c_cur + 1'b1;
          row <= r_cur;
        end
      end
    end
  end

  for (genvar r = 0; r < K; r++) begin : g_row
    for (genvar c = 0; c < K; c++) begin : g_col
      assign win[r*K + c] = chain[r*IMG_W + c];
    end
  end
endmodule
