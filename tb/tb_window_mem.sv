// tb_window_mem: streams several small frames (7 x 5 pixels, 3x3 window)
// through the window memory with random idle clocks, and one frame restarted
// part-way by a start-of-frame pulse. For every accepted pixel it predicts,
// from its own copy of the image, whether a window must appear on the next
// clock edge, its nine samples (A1 = newest pixel, A1..A3 the current row,
// A4..A6 the row above, A7..A9 two rows up) and its position.
module tb_window_mem;
  localparam int IW = 7, IH = 5, K = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_valid = 0, n_border = 0;

  logic       pix_valid, pix_sof;
  logic [7:0] pix;
  logic [7:0] win [K*K];
  logic       win_valid;
  logic [2:0] win_row, win_col;

  window_mem #(.IMG_W(IW), .IMG_H(IH), .K(K), .W(8)) dut (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix, .win, .win_valid, .win_row, .win_col);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [IH][IW];
  int r = 0, c = 0;

  task automatic send(logic [7:0] p, logic sof);
    // optional idle clocks before the pixel
    while ($urandom_range(0, 2) == 0) begin
      pix_valid = 0; pix = 8'($urandom); pix_sof = 1'($urandom);
      @(posedge clk); #1;
      checks++;
      if (win_valid) begin failures++; $display("FAIL: window on idle clock"); end
    end
    pix_valid = 1; pix = p; pix_sof = sof;
    if (sof) begin r = 0; c = 0; end
    img[r][c] = p;
    @(posedge clk); #1;
    checks++;
    if (r >= K - 1 && c >= K - 1) begin
      n_valid++;
      if (!win_valid || win_row != 3'(r) || win_col != 3'(c)) begin
        failures++;
        $display("FAIL: window at (%0d,%0d): valid=%b pos=(%0d,%0d)", r, c, win_valid, win_row, win_col);
      end
      for (int rr = 0; rr < K; rr++)
        for (int cc = 0; cc < K; cc++) begin
          checks++;
          if (win[rr*K + cc] != img[r-rr][c-cc]) begin
            failures++;
            $display("FAIL: (%0d,%0d) A%0d=%0d exp %0d", r, c, rr*K+cc+1, win[rr*K+cc], img[r-rr][c-cc]);
          end
        end
    end else begin
      n_border++;
      if (win_valid) begin failures++; $display("FAIL: border window at (%0d,%0d)", r, c); end
    end
    pix_valid = 0; pix_sof = 0;
    c++;
    if (c == IW) begin c = 0; r = (r == IH - 1) ? 0 : r + 1; end
  endtask

  initial begin
    pix_valid = 0; pix_sof = 0; pix = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // frame 1 with sof, frame 2 by wrap-around, frame 3 restarted part-way
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < IW * IH; i++) send(8'($urandom), f == 0 && i == 0);
    for (int i = 0; i < IW * 2 + 3; i++) send(8'($urandom), i == 0);
    for (int i = 0; i < IW * IH; i++) send(8'($urandom), i == 0);
    checks++;
    if (n_valid != 3 * (IW - 2) * (IH - 2) + 1) begin
      failures++; $display("FAIL: %0d windows", n_valid);
    end
    $display("windows=%0d border positions=%0d", n_valid, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
