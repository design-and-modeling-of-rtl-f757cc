// tb_dmip3_rank_images: image workload at the default size. A 64 x 64 test
// image (a bright disc on a ramp, with salt-and-pepper noise) is processed
// once for each of the ranks 0, 1, 2, 3, 7 and 8, and once for the
// difference of ranks 3 and 2, with every parameter of the processor at its
// default. Each rank is formed on both outputs at once, by the switch
// (out_y, FN_RANK_A) and by summing the rank differences 0..r (out_d), and
// both must equal a software order statistic of the window. Across ranks the
// results must never decrease at any pixel, the rank-0 and rank-8 images must
// bound the input window, and the difference image must equal
// rank 3 minus rank 2 pixel by pixel.
module tb_dmip3_rank_images;
  import dmip_pkg::*;

  localparam int IW = 64, IH = 64, N = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       pix_valid, pix_sof;
  pix_t       pix;
  ctrl_t      ctrl;
  logic       ranks_valid, out_valid;
  pix_t       ranks [N];
  pix_t       rank_diff [N-1];
  pix_t       out_y, out_a, out_b, out_d;
  logic [5:0] out_row, out_col;

  dmip3 dut (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix, .ctrl,
    .ranks_valid, .ranks, .rank_diff, .out_valid, .out_y, .out_a, .out_b, .out_d,
    .out_row, .out_col);

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NRUN = 7;              // ranks 0,1,2,3,7,8 then x(3)-x(2)
  int   rank_of [NRUN] = '{0, 1, 2, 3, 7, 8, -1};
  pix_t img [IH][IW];
  pix_t res_y [NRUN][IH][IW];
  pix_t res_d [NRUN][IH][IW];
  int   n_out [NRUN];
  int   run = 0;

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      res_y[run][out_row][out_col] = out_y;
      res_d[run][out_row][out_col] = out_d;
      n_out[run]++;
    end
  end

  function automatic int order_stat(int rr, int cc, int k);
    int v [9];
    int t;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) v[i*3 + j] = int'(img[rr-i][cc-j]);
    for (int i = 1; i < 9; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin
        t = v[j]; v[j] = v[j-1]; v[j-1] = t;
      end
    return v[k];
  endfunction

  initial begin
    foreach (n_out[i]) n_out[i] = 0;
    // test image
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) begin
        int v;
        v = 40 + c;
        if ((r - 30) * (r - 30) + (c - 34) * (c - 34) < 300) v = 200;
        case ($urandom_range(0, 19))
          0: v = 255;
          1: v = 0;
          default: ;
        endcase
        img[r][c] = 8'(v);
      end
    pix_valid = 0; pix_sof = 0; pix = 0;
    ctrl = '{sel_a: 8'd0, sel_b: 8'd0, fn: FN_RANK_A, gain: GAIN_ONE, dsel: 16'h0001};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (run = 0; run < NRUN; run++) begin
      @(negedge clk);
      if (rank_of[run] >= 0) begin
        ctrl.sel_a = 8'(rank_of[run]);
        ctrl.fn    = FN_RANK_A;
        ctrl.dsel  = 16'((1 << (rank_of[run] + 1)) - 1);   // steps 0..r
      end else begin
        ctrl.sel_a = 8'd3;
        ctrl.sel_b = 8'd2;
        ctrl.fn    = FN_BDIFF;
        ctrl.dsel  = 16'h0008;                              // step 3 = x(3)-x(2)
      end
      for (int i = 0; i < IW * IH; i++) begin
        pix_valid = 1; pix_sof = (i == 0); pix = img[i / IW][i % IW];
        @(negedge clk);
      end
      pix_valid = 0; pix_sof = 0;
      repeat (N + 4) @(negedge clk);
    end

    for (int k = 0; k < NRUN; k++) begin
      checks++;
      if (n_out[k] != (IW - 2) * (IH - 2)) begin
        failures++; $display("FAIL run %0d: %0d outputs", k, n_out[k]);
      end
    end
    for (int r = 2; r < IH; r++)
      for (int c = 2; c < IW; c++) begin
        for (int k = 0; k < NRUN; k++) begin
          int e;
          e = (rank_of[k] >= 0) ? order_stat(r, c, rank_of[k])
                                : order_stat(r, c, 3) - order_stat(r, c, 2);
          checks++;
          if (int'(res_y[k][r][c]) != e || int'(res_d[k][r][c]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL run %0d (%0d,%0d): y=%0d d=%0d exp %0d",
                                        k, r, c, res_y[k][r][c], res_d[k][r][c], e);
          end
          if (k > 0 && k < NRUN - 1) begin
            checks++;
            if (res_y[k][r][c] < res_y[k-1][r][c]) begin
              failures++; $display("FAIL: rank image not monotonic at (%0d,%0d)", r, c);
            end
          end
        end
        checks++;
        if (int'(res_y[NRUN-1][r][c]) != int'(res_y[3][r][c]) - int'(res_y[2][r][c])) begin
          failures++; $display("FAIL: difference image at (%0d,%0d)", r, c);
        end
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            checks++;
            if (img[r-i][c-j] < res_y[0][r][c] || img[r-i][c-j] > res_y[5][r][c]) begin
              failures++; $display("FAIL: min/max do not bound the window at (%0d,%0d)", r, c);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
