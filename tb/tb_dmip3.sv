// tb_dmip3: end-to-end test of the processor at its default size (64 x 64
// image, 3 x 3 window, 9-input sorting unit), with no parameter overrides.
// It streams whole frames, one per setting of the control vector Y, covering
// every function of the first output, rank pairs in both orders, sums of
// selected rank differences on the second output (ranks, complements,
// differences of ranks, arbitrary selections), a rank code above the maximum,
// gains below and above unity, random idle input clocks and one frame broken
// off and restarted by a start-of-frame pulse. A software model (sort the
// window, pick the ranks, apply the function and gain, limit to 255, sum the
// selected differences) predicts every output. It also checks the sorted rank
// vector, the neighbouring-rank differences, the output position and the
// latency: ranks N clocks and outputs N+1 clocks after the pixel that closes
// the window. It counts how often each mechanism occurred and fails if one
// never did.
module tb_dmip3;
  import dmip_pkg::*;

  localparam int IW = 64, IH = 64, K = 3, N = K * K;
  localparam int LAT = N + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

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
    .ranks_valid, .ranks, .rank_diff, .out_valid, .out_y, .out_a, .out_b, .out_d, .out_row, .out_col);

  // mechanism counters
  int n_win = 0, n_border = 0, n_idle = 0, n_sof_restart = 0;
  int n_fn [8];
  int n_dsum = 0, n_clamp = 0, n_limit = 0, n_bdiff_zero = 0, n_gain_lt1 = 0, n_gain_gt1 = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [N-1:0][7:0] vec_t;
  typedef struct {
    vec_t   sorted;
    int     y, a, b, d, row, col;
    longint due;
  } exp_t;
  exp_t exp_q [$];
  exp_t rank_q [$];

  pix_t img [IH][IW];
  int   r = 0, c = 0;

  function automatic vec_t sort_vec(vec_t v);
    for (int i = 1; i < N; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin
        logic [7:0] t = v[j]; v[j] = v[j-1]; v[j-1] = t;
      end
    return v;
  endfunction

  function automatic int fn_model(int fa, int fb, int f, int g);
    int v;
    case (f)
      0: v = fa;
      1: v = fb;
      2: v = (fa > fb) ? fa - fb : 0;
      3: v = (fa > fb) ? fa - fb : fb - fa;
      4: v = 255 - fa;
      5: v = 255 - ((fa > fb) ? fa - fb : fb - fa);
      6: v = fa + fb;
      default: v = (fa + fb) / 2;
    endcase
    return (v * g) / 4;
  endfunction

  // image content: random noise over a gradient, with flat patches
  function automatic pix_t gen_pix(int fr, int rr, int cc);
    int base = (rr * 3 + cc * 2 + fr * 17) % 256;
    if (((rr / 8) + (cc / 8)) % 4 == 0) return 8'(base);
    if ($urandom_range(0, 9) == 0) return ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
    return 8'((base + $urandom_range(0, 60)) % 256);
  endfunction

  task automatic send(pix_t p, logic sof);
    while ($urandom_range(0, 7) == 0) begin
      pix_valid = 0; pix_sof = 0; pix = 8'($urandom);
      n_idle++;
      @(negedge clk);
    end
    pix_valid = 1; pix = p; pix_sof = sof;
    if (sof) begin r = 0; c = 0; end
    img[r][c] = p;
    if (r >= K - 1 && c >= K - 1) begin
      exp_t e;
      vec_t w;
      int sa, sb, fa, fb, v;
      for (int rr = 0; rr < K; rr++)
        for (int cc = 0; cc < K; cc++) w[rr*K + cc] = img[r-rr][c-cc];
      e.sorted = sort_vec(w);
      sa = (int'(ctrl.sel_a) < N) ? int'(ctrl.sel_a) : N - 1;
      sb = (int'(ctrl.sel_b) < N) ? int'(ctrl.sel_b) : N - 1;
      fa = int'(e.sorted[sa]);
      fb = int'(e.sorted[sb]);
      v  = fn_model(fa, fb, int'(ctrl.fn), int'(ctrl.gain));
      if (v > 255) begin v = 255; n_limit++; end
      if (ctrl.fn == FN_BDIFF && fa < fb) n_bdiff_zero++;
      e.y = v; e.a = fa; e.b = fb; e.row = r; e.col = c;
      // second output: sum of the selected rank differences
      e.d = 0;
      for (int i = 0; i <= N; i++)
        if (ctrl.dsel[i])
          e.d += (i == 0) ? int'(e.sorted[0]) :
                 (i == N) ? 255 - int'(e.sorted[N-1]) :
                            int'(e.sorted[i]) - int'(e.sorted[i-1]);
      if (e.d != 0 && e.d != 255) n_dsum++;
      // accepted at the next rising edge (cycle+1)
      e.due = cycle + 1 + longint'(LAT);
      exp_q.push_back(e);
      e.due = cycle + 1 + longint'(N);
      rank_q.push_back(e);
      n_win++;
      n_fn[int'(ctrl.fn)]++;
    end else n_border++;
    @(negedge clk);
    pix_valid = 0; pix_sof = 0;
    c++;
    if (c == IW) begin c = 0; r = (r == IH - 1) ? 0 : r + 1; end
  endtask

  task automatic drain();
    repeat (LAT + 4) @(negedge clk);
  endtask

  // output monitors
  always @(posedge clk) begin
    #1;
    if (ranks_valid) begin
      checks++;
      if (rank_q.size() == 0) begin
        failures++; $display("FAIL: unexpected ranks_valid");
      end else begin
        exp_t e;
        vec_t got;
        e = rank_q.pop_front();
        foreach (ranks[i]) got[i] = ranks[i];
        for (int i = 0; i < N - 1; i++) begin
          checks++;
          if (rank_diff[i] != e.sorted[i+1] - e.sorted[i]) begin
            failures++;
            if (failures < 10) $display("FAIL rank_diff[%0d]=%0d", i, rank_diff[i]);
          end
        end
        if (got != e.sorted || e.due != cycle) begin
          failures++;
          if (failures < 10) $display("FAIL ranks (%0d,%0d) at %0d due %0d: %h exp %h",
                                      e.row, e.col, cycle, e.due, got, e.sorted);
        end
      end
    end
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected out_valid");
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (int'(out_y) != e.y || int'(out_a) != e.a || int'(out_b) != e.b || int'(out_d) != e.d ||
            int'(out_row) != e.row || int'(out_col) != e.col || e.due != cycle) begin
          failures++;
          if (failures < 10)
            $display("FAIL out (%0d,%0d) at %0d due %0d: y=%0d a=%0d b=%0d d=%0d pos=(%0d,%0d) exp y=%0d a=%0d b=%0d d=%0d",
                     e.row, e.col, cycle, e.due, out_y, out_a, out_b, out_d, out_row, out_col, e.y, e.a, e.b, e.d);
        end
      end
    end
  end

  // one frame per control setting: {sel_a, sel_b, fn, gain, dsel}
  // dsel examples: 001F = rank 4 (median), 0200 = D - max, 0180 = x(8) - x(6),
  // 03E0 = D - x(4), 00FE = x(7) - x(0), 0001 = min, 01FF = max, 03FF = D
  ctrl_t settings [10];

  initial begin
    settings[0] = '{sel_a: 8'd4, sel_b: 8'd0, fn: FN_RANK_A, gain: GAIN_ONE, dsel: 16'h001F};   // median
    settings[1] = '{sel_a: 8'd0, sel_b: 8'd8, fn: FN_RANK_B, gain: GAIN_ONE, dsel: 16'h0200};   // max (dilation)
    settings[2] = '{sel_a: 8'd7, sel_b: 8'd6, fn: FN_BDIFF,  gain: 4'd12, dsel: 16'h0180};      // rank difference x3
    settings[3] = '{sel_a: 8'd2, sel_b: 8'd6, fn: FN_BDIFF,  gain: GAIN_ONE, dsel: 16'h03E0};   // always 0
    settings[4] = '{sel_a: 8'd1, sel_b: 8'd5, fn: FN_NONEQ,  gain: 4'd8, dsel: 16'h00FE};
    settings[5] = '{sel_a: 8'd200, sel_b: 8'd3, fn: FN_COMPL, gain: GAIN_ONE, dsel: 16'h0200};  // clamped code -> max
    settings[6] = '{sel_a: 8'd8, sel_b: 8'd0, fn: FN_CDIFF,  gain: 4'd3, dsel: 16'h0001};
    settings[7] = '{sel_a: 8'd4, sel_b: 8'd8, fn: FN_SUM,    gain: 4'd2, dsel: 16'h01FF};
    settings[8] = '{sel_a: 8'd0, sel_b: 8'd8, fn: FN_MEAN,   gain: 4'd15, dsel: 16'h03FF};
    settings[9] = '{sel_a: 8'd5, sel_b: 8'd3, fn: FN_SUM,    gain: GAIN_ONE, dsel: 16'h5A5A};

    foreach (n_fn[i]) n_fn[i] = 0;
    pix_valid = 0; pix_sof = 0; pix = 0; ctrl = settings[0];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int f = 0; f < 10; f++) begin
      ctrl = settings[f];
      if (int'(ctrl.sel_a) >= N || int'(ctrl.sel_b) >= N) n_clamp++;
      if (ctrl.gain < GAIN_ONE) n_gain_lt1++;
      if (ctrl.gain > GAIN_ONE) n_gain_gt1++;
      if (f == 9) begin
        // a frame broken off after a few rows, then restarted
        for (int i = 0; i < IW * 5 + 9; i++) send(gen_pix(f, i / IW, i % IW), i == 0);
        n_sof_restart++;
      end
      for (int i = 0; i < IW * IH; i++) send(gen_pix(f, i / IW, i % IW), i == 0);
      drain();
    end

    checks++;
    if (exp_q.size() != 0 || rank_q.size() != 0) begin
      failures++; $display("FAIL: %0d outputs never came", exp_q.size());
    end

    // every mechanism must have happened
    begin
      int mech [string];
      mech["window"] = n_win; mech["border_skip"] = n_border; mech["idle_input"] = n_idle;
      mech["sof_restart"] = n_sof_restart; mech["rank_clamp"] = n_clamp;
      mech["rank_diff_sum"] = n_dsum;
      mech["limit_to_D"] = n_limit; mech["bdiff_zero"] = n_bdiff_zero;
      mech["gain_below_1"] = n_gain_lt1; mech["gain_above_1"] = n_gain_gt1;
      foreach (n_fn[i]) mech[$sformatf("fn%0d", i)] = n_fn[i];
      foreach (mech[k]) begin
        $display("mechanism %-13s %0d", k, mech[k]);
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL: mechanism %s never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
