// tb_rdiff_wsel: drives the rank-difference adder with random sorted
// 9-sample vectors (their extremes and neighbouring differences) and random
// selection vectors, plus the structured selections that give a rank, a
// complement and a difference of two ranks. Each registered output is
// compared, one clock later, with the sum of the selected differences
// computed from the sorted values in integers.
module tb_rdiff_wsel;
  localparam int N = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rank = 0, n_compl = 0, n_diff = 0, n_rand = 0;

  logic        in_valid, out_valid;
  logic [7:0]  lo, hi, y;
  logic [7:0]  diffs [N-1];
  logic [15:0] dsel;

  rdiff_wsel #(.N(N), .W(8), .DSEL_W(16), .D(8'd255)) dut (
    .clk, .rst_n, .in_valid, .lo, .hi, .diffs, .dsel, .out_valid, .y);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [N];
    int e [N+1];
    int expv, kind, ra, rb;
    in_valid = 0; lo = 0; hi = 0; dsel = 0;
    foreach (diffs[i]) diffs[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      x[0] = $urandom_range(0, 60);
      for (int i = 1; i < N; i++) begin
        x[i] = x[i-1] + (($urandom_range(0, 3) == 0) ? 0 : $urandom_range(0, 40));
        if (x[i] > 255) x[i] = 255;
      end
      lo = 8'(x[0]);
      hi = 8'(x[N-1]);
      for (int i = 0; i < N - 1; i++) diffs[i] = 8'(x[i+1] - x[i]);
      e[0] = x[0];
      for (int i = 1; i < N; i++) e[i] = x[i] - x[i-1];
      e[N] = 255 - x[N-1];
      ra = $urandom_range(0, N - 1);
      rb = $urandom_range(ra, N - 1);
      kind = $urandom_range(0, 3);
      dsel = '0;
      case (kind)
        0: begin for (int i = 0; i <= ra; i++) dsel[i] = 1'b1; n_rank++;  expv = x[ra]; end
        1: begin for (int i = ra + 1; i <= N; i++) dsel[i] = 1'b1; n_compl++; expv = 255 - x[ra]; end
        2: begin for (int i = ra + 1; i <= rb; i++) dsel[i] = 1'b1; n_diff++; expv = x[rb] - x[ra]; end
        default: begin
          dsel = 16'($urandom);
          n_rand++;
          expv = 0;
          for (int i = 0; i <= N; i++) if (dsel[i]) expv += e[i];
        end
      endcase
      in_valid = 1'($urandom);
      @(posedge clk); #1;
      checks++;
      if (int'(y) != expv || out_valid != in_valid) begin
        failures++;
        if (failures < 10) $display("FAIL kind=%0d ra=%0d rb=%0d dsel=%h y=%0d exp %0d", kind, ra, rb, dsel, y, expv);
      end
    end
    checks++;
    if (n_rank == 0 || n_compl == 0 || n_diff == 0 || n_rand == 0) begin
      failures++; $display("FAIL: a selection kind was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
