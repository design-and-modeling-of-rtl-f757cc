// tb_cmp_swap: exhaustive check of the comparison-switching cell for 8-bit
// inputs: lo must be min(a,b) and hi max(a,b) for all 65536 input pairs.
module tb_cmp_swap;
  logic [7:0] a, b, lo, hi;
  int checks = 0, failures = 0;

  cmp_swap #(.W(8)) dut (.a, .b, .lo, .hi);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (lo != 8'((i < j) ? i : j) || hi != 8'((i < j) ? j : i)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d lo=%0d hi=%0d", a, b, lo, hi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
