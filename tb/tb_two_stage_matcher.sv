// tb_two_stage_matcher: end-to-end test of the two-stage matcher at its
// default size (64 rows, 16 x 5-bit main words, 16 x 5-bit feature words).
//
// Every round writes new main and feature reference data, then runs searches
// with several k and both distance measures in each stage. A reference model
// sorts the rows by main distance, keeps the k nearest, and sorts those by
// feature distance, of which the first k2 are the final winners. Checked: the
// stream of first-stage winners, the stream of final winners with their
// distances and stored words, the activated candidate rows, the cycle count
// from start to done, and that feature writes offered during a search are
// ignored.
// Mechanisms counted (each must occur): multi-winner first stage, a final
// winner other than the first-stage best, first stage running out of rows
// (k > rows), k = 0, a blocked feature write, equal distances in the first
// stage, each metric in each stage, several sorted final winners, and the
// second stage running out of activated rows (k2 > k).
module tb_two_stage_matcher;
  import am_pkg::*;
  localparam int R = AM_ROWS, W1 = AM_UNITS, N1 = AM_BITS, W2 = AM_UNITS, N2 = AM_BITS;
  localparam int AW = addr_width(R), KW = $clog2(R + 1);
  localparam int DW1 = dist_width(W1, N1), DW2 = dist_width(W2, N2);

  logic clk = 1'b0, rst_n = 1'b1;
  logic am1_wr_en = 1'b0, am2_wr_en = 1'b0, start = 1'b0;
  logic [AW-1:0] am1_wr_row = '0, am2_wr_row = '0, feat_rd_row = '0;
  logic [W1-1:0] am1_wr_mask = '1;
  logic [W2-1:0] am2_wr_mask = '1;
  logic [W1-1:0][N1-1:0] am1_wr_data = '0, main_sd = '0, s1_data, final_data;
  logic [W2-1:0][N2-1:0] am2_wr_data = '0, feat_sd = '0, feat_rd_data, final_feat;
  logic [KW-1:0] k = '0, k2 = '0;
  metric_e metric1 = METRIC_EUCLIDEAN, metric2 = METRIC_EUCLIDEAN;
  logic busy, s1_valid, final_valid, done, final_found;
  logic [AW-1:0] s1_addr, final_addr;
  logic [DW1-1:0] s1_dist;
  logic [DW2-1:0] final_dist;
  logic [R-1:0] s1_match, cand_rows, final_match;

  logic [R-1:0][W1-1:0][N1-1:0] main_m;
  logic [R-1:0][W2-1:0][N2-1:0] feat_m;
  int checks = 0, failures = 0;
  int n_sorted = 0, n_exhaust2 = 0, n_multi = 0, n_rerank = 0, n_exhaust = 0, n_k0 = 0, n_blocked = 0, n_tie = 0;
  int n_m1[2] = '{0, 0}, n_m2[2] = '{0, 0};

  two_stage_matcher dut (
    .clk, .rst_n,
    .am1_wr_en, .am1_wr_row, .am1_wr_mask, .am1_wr_data,
    .am2_wr_en, .am2_wr_row, .am2_wr_mask, .am2_wr_data,
    .start, .k, .k2, .main_sd, .feat_sd, .metric1, .metric2,
    .busy, .feat_rd_row, .feat_rd_data,
    .s1_valid, .s1_addr, .s1_dist, .s1_match, .s1_data, .cand_rows,
    .final_valid, .done, .final_found, .final_addr, .final_dist, .final_match, .final_data, .final_feat
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dist1(int r, metric_e m);
    int s = 0;
    for (int u = 0; u < W1; u++) begin
      int d = int'(main_m[r][u]) - int'(main_sd[u]);
      if (d < 0) d = -d;
      s += (m == METRIC_EUCLIDEAN) ? d * d : d;
    end
    return s;
  endfunction

  function automatic int dist2(int r, metric_e m);
    int s = 0;
    for (int u = 0; u < W2; u++) begin
      int d = int'(feat_m[r][u]) - int'(feat_sd[u]);
      if (d < 0) d = -d;
      s += (m == METRIC_EUCLIDEAN) ? d * d : d;
    end
    return s;
  endfunction

  task automatic load_data(int range);
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      am1_wr_en = 1'b1; am1_wr_row = AW'(r);
      am2_wr_en = 1'b1; am2_wr_row = AW'(r);
      for (int u = 0; u < W1; u++) am1_wr_data[u] = N1'($urandom % range);
      for (int u = 0; u < W2; u++) am2_wr_data[u] = N2'($urandom % range);
      main_m[r] = am1_wr_data;
      feat_m[r] = am2_wr_data;
    end
    @(negedge clk);
    am1_wr_en = 1'b0; am2_wr_en = 1'b0;
  endtask

  task automatic run_search(int kk, int kk2, int range);
    int keff, k2eff, exp_list[$], fin_list[$], cycles, got, got2, e1, e2;
    bit taken2[R];
    bit taken[R];
    logic [R-1:0] cand;
    foreach (taken[r]) taken[r] = 0;
    for (int u = 0; u < W1; u++) main_sd[u] = N1'($urandom % range);
    for (int u = 0; u < W2; u++) feat_sd[u] = N2'($urandom % range);
    metric1 = metric_e'($urandom % 2);
    metric2 = metric_e'($urandom % 2);
    n_m1[metric1]++;
    n_m2[metric2]++;

    // reference model
    keff = (kk == 0) ? 1 : kk;
    if (kk == 0) n_k0++;
    if (keff > R) n_exhaust++;
    if (keff > 1) n_multi++;
    cand = '0;
    for (int i = 0; i < keff && i < R; i++) begin
      int best = -1, bd = 0;
      for (int r = 0; r < R; r++)
        if (!taken[r] && (best < 0 || dist1(r, metric1) < bd)) begin best = r; bd = dist1(r, metric1); end
      for (int r = 0; r < R; r++)
        if (!taken[r] && r != best && dist1(r, metric1) == bd) begin n_tie++; break; end
      taken[best] = 1;
      cand[best] = 1'b1;
      exp_list.push_back(best);
    end
    k2eff = (kk2 == 0) ? 1 : kk2;
    foreach (taken2[r]) taken2[r] = 0;
    for (int i = 0; i < k2eff && i < exp_list.size(); i++) begin
      int best = -1, bd = 0;
      for (int r = 0; r < R; r++)
        if (cand[r] && !taken2[r] && (best < 0 || dist2(r, metric2) < bd)) begin
          best = r; bd = dist2(r, metric2);
        end
      taken2[best] = 1;
      fin_list.push_back(best);
    end
    if (fin_list[0] != exp_list[0]) n_rerank++;
    if (fin_list.size() > 1) n_sorted++;
    if (k2eff > exp_list.size()) n_exhaust2++;
    e1 = (keff > R) ? R + 1 : keff;
    e2 = (k2eff > exp_list.size()) ? exp_list.size() + 1 : k2eff;

    // run
    @(negedge clk);
    start = 1'b1; k = KW'(kk); k2 = KW'(kk2);
    @(negedge clk);
    start = 1'b0;
    cycles = 1; got = 0; got2 = 0;
    forever begin
      if (s1_valid) begin
        checks++;
        if (got >= exp_list.size() || int'(s1_addr) != exp_list[got] ||
            int'(s1_dist) != dist1(exp_list[got], metric1) || s1_data != main_m[exp_list[got]]) begin
          failures++;
          $display("FAIL stage-1 winner %0d: row %0d dist %0d", got + 1, s1_addr, s1_dist);
        end
        got++;
      end
      if (final_valid) begin
        int fr;
        fr = (got2 < fin_list.size()) ? fin_list[got2] : 0;
        checks++;
        if (got2 >= fin_list.size() || !final_found || int'(final_addr) != fr ||
            int'(final_dist) != dist2(fr, metric2) || final_data != main_m[fr] ||
            final_feat != feat_m[fr] || final_match != (R'(1) << fr) || cand_rows != cand) begin
          failures++;
          $display("FAIL final winner %0d: row %0d dist %0d, expected row %0d dist %0d",
                   got2 + 1, final_addr, final_dist, fr, dist2(fr, metric2));
        end
        got2++;
      end
      if (done) break;
      // a feature write offered while busy must be ignored
      am2_wr_en = 1'b1; am2_wr_row = AW'($urandom % R); am2_wr_data = ~feat_m[am2_wr_row];
      n_blocked++;
      @(negedge clk);
      am2_wr_en = 1'b0;
      cycles++;
      if (cycles > 4 * R) break;
    end
    checks++;
    if (got != exp_list.size()) begin
      failures++;
      $display("FAIL %0d stage-1 winners, expected %0d", got, exp_list.size());
    end
    checks++;
    if (got2 != fin_list.size() || final_found != (k2eff <= exp_list.size())) begin
      failures++;
      $display("FAIL %0d final winners, expected %0d", got2, fin_list.size());
    end
    // two cycles per enable; a stage that runs out of rows gives one extra
    checks++;
    if (cycles != 2 * (e1 + e2)) begin
      failures++;
      $display("FAIL k=%0d took %0d cycles", kk, cycles);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy after done"); end
  endtask

  task automatic check_features();
    for (int r = 0; r < R; r++) begin
      feat_rd_row = AW'(r);
      #1;
      checks++;
      if (feat_rd_data != feat_m[r]) begin failures++; $display("FAIL feature row %0d changed", r); end
    end
  endtask

  initial begin
    int ks[8] = '{1, 2, 4, 5, 0, 10, 64, 100};
    int k2s[8] = '{1, 3, 1, 0, 2, 4, 1, 5};
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      int range;
      range = (t % 2) ? 32 : 4;
      load_data(range);
      for (int i = 0; i < 8; i++) run_search(ks[i], k2s[i], range);
      for (int i = 0; i < 6; i++) run_search(1 + $urandom % 8, $urandom % 4, range);
      check_features();
    end
    $display("mechanisms: multi-winner=%0d rerank=%0d exhaust=%0d k0=%0d blocked-writes=%0d ties=%0d",
             n_multi, n_rerank, n_exhaust, n_k0, n_blocked, n_tie);
    $display("            sorted-final=%0d stage2-exhaust=%0d", n_sorted, n_exhaust2);
    $display("metrics: stage1 E/M=%0d/%0d stage2 E/M=%0d/%0d", n_m1[0], n_m1[1], n_m2[0], n_m2[1]);
    if (n_multi == 0 || n_rerank == 0 || n_exhaust == 0 || n_k0 == 0 || n_blocked == 0 ||
        n_tie == 0 || n_sorted == 0 || n_exhaust2 == 0 || n_m1[0] == 0 || n_m1[1] == 0 || n_m2[0] == 0 || n_m2[1] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
