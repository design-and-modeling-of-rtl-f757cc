// tb_rank_diffs: feeds random ascending 9-sample vectors (with repeated values
// and the full 0..255 span) and checks each of the eight neighbouring
// differences against ranks[i+1] - ranks[i] computed in integers.
module tb_rank_diffs;
  localparam int N = 9;
  logic [7:0] ranks [N];
  logic [7:0] d [N-1];
  int checks = 0, failures = 0;

  rank_diffs #(.N(N), .W(8)) dut (.ranks, .d);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [N];
    for (int t = 0; t < 5000; t++) begin
      v[0] = (t % 7 == 0) ? 0 : $urandom_range(0, 40);
      for (int i = 1; i < N; i++) begin
        v[i] = v[i-1] + (($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 60));
        if (v[i] > 255) v[i] = 255;
      end
      if (t % 5 == 0) v[N-1] = 255;
      foreach (ranks[i]) ranks[i] = 8'(v[i]);
      #1;
      for (int i = 0; i < N - 1; i++) begin
        checks++;
        if (int'(d[i]) != v[i+1] - v[i]) begin
          failures++;
          if (failures < 10) $display("FAIL d[%0d]=%0d exp %0d", i, d[i], v[i+1] - v[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
