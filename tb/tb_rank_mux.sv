// tb_rank_mux: for random sorted 9-sample vectors, checks that every select
// code 0..255 returns the sample of that rank, and that codes above 8 return
// the maximum (rank 8).
module tb_rank_mux;
  localparam int N = 9;
  logic [7:0] ranks [N];
  logic [7:0] sel, y;
  int checks = 0, failures = 0;

  rank_mux #(.N(N), .W(8), .SEL_W(8)) dut (.ranks, .sel, .y);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      // distinct ascending values so each rank is recognisable
      ranks[0] = 8'($urandom_range(0, 20));
      for (int i = 1; i < N; i++) ranks[i] = ranks[i-1] + 8'($urandom_range(1, 25));
      for (int s = 0; s < 256; s++) begin
        sel = 8'(s);
        #1;
        checks++;
        if (y != ranks[(s < N) ? s : N - 1]) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d y=%0d", s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
