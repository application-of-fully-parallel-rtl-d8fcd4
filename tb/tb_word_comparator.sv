// tb_word_comparator: random and corner unit-distance vectors under both
// metrics, compared with sums computed with integers.
module tb_word_comparator;
  import am_pkg::*;
  localparam int W = 16, N = 5;
  localparam int DW = dist_width(W, N);
  logic [W-1:0][N-1:0] unit_dist;
  metric_e metric;
  logic [DW-1:0] word_dist;
  int checks = 0, failures = 0;

  word_comparator #(.W(W), .N(N)) dut (.unit_dist, .metric, .word_dist);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int e_sq = 0, e_abs = 0;
    for (int u = 0; u < W; u++) begin
      e_sq  += int'(unit_dist[u]) * int'(unit_dist[u]);
      e_abs += int'(unit_dist[u]);
    end
    metric = METRIC_EUCLIDEAN;
    #1;
    checks++;
    if (int'(word_dist) != e_sq) begin
      failures++;
      $display("FAIL euclidean %0d expected %0d", word_dist, e_sq);
    end
    metric = METRIC_MANHATTAN;
    #1;
    checks++;
    if (int'(word_dist) != e_abs) begin
      failures++;
      $display("FAIL manhattan %0d expected %0d", word_dist, e_abs);
    end
  endtask

  initial begin
    unit_dist = '0;  check_one();
    unit_dist = '1;  check_one();   // largest distance, 16 * 31^2
    for (int i = 0; i < 500; i++) begin
      for (int u = 0; u < W; u++) unit_dist[u] = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
