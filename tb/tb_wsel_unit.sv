// tb_wsel_unit: checks every output function of the weighting-selecting unit
// against an integer model, for random and corner inputs and all gains,
// including results that must be limited to D = 255 and bounded differences
// that must stop at 0. Also checks the one-clock latency of y and out_valid.
module tb_wsel_unit;
  import dmip_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clip = 0, n_zero = 0;

  logic              in_valid, out_valid;
  logic [7:0]        a, b, y;
  fn_e               fn;
  logic [GAIN_W-1:0] gain;

  wsel_unit #(.W(8)) dut (.clk, .rst_n, .in_valid, .a, .b, .fn, .gain, .out_valid, .y);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int fa, int fb, int f, int g);
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
    v = (v * g) / 4;
    return (v > 255) ? 255 : v;
  endfunction

  initial begin
    int exp_y;
    logic exp_v;
    in_valid = 0; a = 0; b = 0; fn = FN_RANK_A; gain = GAIN_ONE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      case ($urandom_range(0, 4))
        0: begin a = 8'd255; b = 8'($urandom); end
        1: begin a = 8'($urandom); b = a; end
        default: begin a = 8'($urandom); b = 8'($urandom); end
      endcase
      fn       = fn_e'($urandom_range(0, 7));
      gain     = ($urandom_range(0, 1) != 0) ? GAIN_ONE : GAIN_W'($urandom);
      in_valid = 1'($urandom);
      exp_y    = model(int'(a), int'(b), int'(fn), int'(gain));
      exp_v    = in_valid;
      if (exp_y == 255 && gain > GAIN_ONE) n_clip++;
      if (fn == FN_BDIFF && a < b) n_zero++;
      @(posedge clk); #1;
      checks++;
      if (out_valid != exp_v || int'(y) != exp_y) begin
        failures++;
        if (failures < 10)
          $display("FAIL fn=%0d a=%0d b=%0d gain=%0d: y=%0d exp %0d valid=%b", fn, a, b, gain, y, exp_y, out_valid);
      end
    end
    checks++;
    if (n_clip == 0 || n_zero == 0) begin
      failures++; $display("FAIL: limiting (%0d) or zero difference (%0d) never exercised", n_clip, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
