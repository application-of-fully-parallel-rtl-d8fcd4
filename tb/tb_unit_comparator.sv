// tb_unit_comparator: exhaustive check of the unit comparator for all pairs of
// 5-bit units against |a - b| computed with integers.
module tb_unit_comparator;
  localparam int N = 5;
  logic [N-1:0] stored, search, abs_diff;
  int checks = 0, failures = 0;

  unit_comparator #(.N(N)) dut (.stored, .search, .abs_diff);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << N); a++)
      for (int b = 0; b < (1 << N); b++) begin
        int expd;
        stored = N'(a);
        search = N'(b);
        #1;
        expd = (a > b) ? a - b : b - a;
        checks++;
        if (int'(abs_diff) != expd) begin
          failures++;
          $display("FAIL |%0d-%0d| = %0d, expected %0d", a, b, abs_diff, expd);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
