// tb_sort_mchws: drives the sorting unit with random 9-sample vectors (and an
// 8-lane instance, to cover both lane parities) on random clocks, including
// back-to-back vectors, repeated values and extreme values. Each output vector
// is compared with a software sort of the matching input, and each must leave
// exactly N clocks after it entered (one vector per clock throughput).
module tb_sort_mchws;
  localparam int N9 = 9;
  localparam int N8 = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  logic       v9_in, v9_out, v8_in, v8_out;
  logic [7:0] x9 [N9], y9 [N9];
  logic [7:0] x8 [N8], y8 [N8];

  sort_mchws #(.N(N9), .W(8)) dut9 (.clk, .rst_n, .in_valid(v9_in), .x(x9),
                                    .out_valid(v9_out), .y(y9));
  sort_mchws #(.N(N8), .W(8)) dut8 (.clk, .rst_n, .in_valid(v8_in), .x(x8),
                                    .out_valid(v8_out), .y(y8));

  typedef logic [N9-1:0][7:0] v9_t;   // packed, element i = rank i
  typedef logic [N8-1:0][7:0] v8_t;

  // reference: insertion sort, ascending
  function automatic v9_t ref_sort9(logic [7:0] v [N9]);
    v9_t r;
    for (int i = 0; i < N9; i++) begin
      int j = i;
      r[i] = v[i];
      while (j > 0 && r[j-1] > r[j]) begin
        logic [7:0] t = r[j]; r[j] = r[j-1]; r[j-1] = t; j--;
      end
    end
    return r;
  endfunction
  function automatic v8_t ref_sort8(logic [7:0] v [N8]);
    v8_t r;
    for (int i = 0; i < N8; i++) begin
      int j = i;
      r[i] = v[i];
      while (j > 0 && r[j-1] > r[j]) begin
        logic [7:0] t = r[j]; r[j] = r[j-1]; r[j-1] = t; j--;
      end
    end
    return r;
  endfunction
  function automatic v9_t pack9(logic [7:0] v [N9]);
    foreach (v[i]) pack9[i] = v[i];
  endfunction
  function automatic v8_t pack8(logic [7:0] v [N8]);
    foreach (v[i]) pack8[i] = v[i];
  endfunction
  v9_t    exp9 [$];
  v8_t    exp8 [$];
  longint t9   [$];
  longint t8   [$];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rnd_pix(int mode);
    case (mode)
      0: return 8'($urandom_range(0, 3));       // many repeats
      1: return ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
      default: return 8'($urandom);
    endcase
  endfunction

  // drive on negedge, sample on posedge
  initial begin
    v9_in = 0; v8_in = 0;
    x9 = '{default: 0}; x8 = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      v9_in = ($urandom_range(0, 3) != 0);
      v8_in = ($urandom_range(0, 3) != 0);
      begin
        int mode;
        v9_t s9;
        v8_t s8;
        mode = $urandom_range(0, 5);
        foreach (x9[i]) x9[i] = rnd_pix(mode);
        foreach (x8[i]) x8[i] = rnd_pix(mode);
        s9 = ref_sort9(x9);
        s8 = ref_sort8(x8);
        if (v9_in) begin exp9.push_back(s9); t9.push_back(cycle + longint'(N9)); end
        if (v8_in) begin exp8.push_back(s8); t8.push_back(cycle + longint'(N8)); end
      end
    end
    @(negedge clk);
    v9_in = 0; v8_in = 0;
    repeat (N9 + 4) @(negedge clk);
    checks++;
    if (exp9.size() != 0 || exp8.size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d vectors never came out", exp9.size(), exp8.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (v9_out) begin
      checks++;
      if (exp9.size() == 0) begin
        failures++; $display("FAIL: unexpected output (N=9)");
      end else begin
        v9_t e;
        longint t;
        e = exp9.pop_front();
        t = t9.pop_front();
        if (pack9(y9) != e || t != cycle) begin
          failures++;
          if (failures < 10) $display("FAIL N=9 at cycle %0d (expected %0d): got %h exp %h", cycle, t, pack9(y9), e);
        end
      end
    end
    if (v8_out) begin
      checks++;
      if (exp8.size() == 0) begin
        failures++; $display("FAIL: unexpected output (N=8)");
      end else begin
        v8_t e;
        longint t;
        e = exp8.pop_front();
        t = t8.pop_front();
        if (pack8(y8) != e || t != cycle) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 at cycle %0d (expected %0d): got %h exp %h", cycle, t, pack8(y8), e);
        end
      end
    end
  end
endmodule
