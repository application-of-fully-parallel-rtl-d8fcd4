// tb_char_recognition: character-recognition workload on the two-stage
// matcher at its default size.
//
// The reference set is 26 character classes, one row each (rows 0..25), plus
// 26 rows of a second reference writer (rows 26..51). A class's main word is
// 16 zone densities of 5 bits (a 4 x 4 grid over the character); its feature
// word holds six 5-bit moment features (mass, centroid x and y, eccentricity,
// orientation, skewness) and zeros. Classes come in look-alike pairs whose
// zone densities differ only slightly but whose features differ clearly, the
// case a single nearest-match search gets wrong.
// Test samples: 4 writers x 2 test sets x 26 characters = 208 searches with
// k = 4. Each sample is its class's reference with writer noise added. Every
// search is checked against a reference model of both stages; the testbench
// also reports how many samples the first-stage best match and the final
// winner assign to the wrong class. The data are synthetic, so those rates
// only show the mechanism, not the recognition rate of real handwriting.
module tb_char_recognition;
  import am_pkg::*;
  localparam int R = AM_ROWS, W = AM_UNITS, N = AM_BITS, AW = addr_width(R), KW = $clog2(R + 1);
  localparam int DW = dist_width(W, N);
  localparam int CLASSES = 26, REF_WRITERS = 2, NREF = CLASSES * REF_WRITERS, K = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic am1_wr_en = 1'b0, am2_wr_en = 1'b0, start = 1'b0;
  logic [AW-1:0] am1_wr_row = '0, am2_wr_row = '0, feat_rd_row = '0;
  logic [W-1:0] am1_wr_mask = '1, am2_wr_mask = '1;
  logic [W-1:0][N-1:0] am1_wr_data = '0, am2_wr_data = '0, main_sd = '0, feat_sd = '0;
  logic [W-1:0][N-1:0] s1_data, final_data, feat_rd_data, final_feat;
  logic [KW-1:0] k = KW'(K), k2 = KW'(1);
  logic busy, s1_valid, final_valid, done, final_found;
  logic [AW-1:0] s1_addr, final_addr;
  logic [DW-1:0] s1_dist, final_dist;
  logic [R-1:0] s1_match, cand_rows, final_match;

  logic [NREF-1:0][W-1:0][N-1:0] main_m, feat_m;
  int checks = 0, failures = 0, miss1 = 0, miss2 = 0, n_corrected = 0;

  two_stage_matcher dut (
    .clk, .rst_n,
    .am1_wr_en, .am1_wr_row, .am1_wr_mask, .am1_wr_data,
    .am2_wr_en, .am2_wr_row, .am2_wr_mask, .am2_wr_data,
    .start, .k, .k2, .main_sd, .feat_sd, .metric1(METRIC_EUCLIDEAN), .metric2(METRIC_MANHATTAN),
    .busy, .feat_rd_row, .feat_rd_data,
    .s1_valid, .s1_addr, .s1_dist, .s1_match, .s1_data, .cand_rows,
    .final_valid, .done, .final_found, .final_addr, .final_dist, .final_match, .final_data, .final_feat
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] sat(int v);
    return N'((v < 0) ? 0 : (v > 31) ? 31 : v);
  endfunction

  function automatic int vdist(logic [W-1:0][N-1:0] a, logic [W-1:0][N-1:0] b, bit sq);
    int s = 0;
    for (int u = 0; u < W; u++) begin
      int d = int'(a[u]) - int'(b[u]);
      if (d < 0) d = -d;
      s += sq ? d * d : d;
    end
    return s;
  endfunction

  initial begin
    logic [CLASSES-1:0][W-1:0][N-1:0] base_main, base_feat;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Class prototypes: class 2j+1 is a look-alike of class 2j.
    for (int c = 0; c < CLASSES; c += 2) begin
      for (int u = 0; u < W; u++) base_main[c][u] = N'(4 + $urandom % 24);
      base_main[c + 1] = base_main[c];
      base_main[c + 1][$urandom % W] = sat(int'(base_main[c][0]) + 3);
      base_feat[c] = '0; base_feat[c + 1] = '0;
      for (int u = 0; u < 6; u++) begin
        base_feat[c][u]     = N'(4 + $urandom % 24);
        base_feat[c + 1][u] = sat(int'(base_feat[c][u]) + (((u % 2) == 0) ? 6 : -6));
      end
    end
    // Reference rows: two reference writers, small writer offsets.
    for (int wr = 0; wr < REF_WRITERS; wr++)
      for (int c = 0; c < CLASSES; c++) begin
        int row;
        row = wr * CLASSES + c;
        for (int u = 0; u < W; u++) main_m[row][u] = sat(int'(base_main[c][u]) + int'($urandom % 3) - 1);
        feat_m[row] = '0;
        for (int u = 0; u < 6; u++) feat_m[row][u] = sat(int'(base_feat[c][u]) + int'($urandom % 3) - 1);
        @(negedge clk);
        am1_wr_en = 1'b1; am1_wr_row = AW'(row); am1_wr_data = main_m[row];
        am2_wr_en = 1'b1; am2_wr_row = AW'(row); am2_wr_data = feat_m[row];
      end
    // Rows 52..63 hold blank words far from every character.
    for (int row = NREF; row < R; row++) begin
      @(negedge clk);
      am1_wr_en = 1'b1; am1_wr_row = AW'(row); am1_wr_data = '1;
      am2_wr_en = 1'b1; am2_wr_row = AW'(row); am2_wr_data = '1;
    end
    @(negedge clk);
    am1_wr_en = 1'b0; am2_wr_en = 1'b0;

    for (int writer = 0; writer < 4; writer++)
      for (int set = 0; set < 2; set++)
        for (int c = 0; c < CLASSES; c++) begin
          int best1, final_row, fd, exp_s1[$];
          bit taken[R];
          logic [R-1:0] cand;
          for (int u = 0; u < W; u++) main_sd[u] = sat(int'(base_main[c][u]) + int'($urandom % 7) - 3);
          feat_sd = '0;
          for (int u = 0; u < 6; u++) feat_sd[u] = sat(int'(base_feat[c][u]) + int'($urandom % 5) - 2);
          // reference model: k nearest by squared Euclidean, then Manhattan on features
          exp_s1.delete();
          foreach (taken[r]) taken[r] = 0;
          cand = '0;
          for (int i = 0; i < K; i++) begin
            int b, bd;
            b = -1; bd = 0;
            for (int r = 0; r < NREF; r++)
              if (!taken[r] && (b < 0 || vdist(main_m[r], main_sd, 1) < bd)) begin
                b = r; bd = vdist(main_m[r], main_sd, 1);
              end
            taken[b] = 1; cand[b] = 1'b1; exp_s1.push_back(b);
          end
          best1 = exp_s1[0];
          final_row = -1; fd = 0;
          for (int r = 0; r < NREF; r++)
            if (cand[r] && (final_row < 0 || vdist(feat_m[r], feat_sd, 0) < fd)) begin
              final_row = r; fd = vdist(feat_m[r], feat_sd, 0);
            end
          // run the search
          @(negedge clk); start = 1'b1;
          @(negedge clk); start = 1'b0;
          begin
            int got;
            got = 0;
            while (!done) begin
              if (s1_valid) begin
                checks++;
                if (got >= K || int'(s1_addr) != exp_s1[got]) begin
                  failures++;
                  $display("FAIL writer %0d char %0d: stage-1 winner %0d is row %0d", writer, c, got, s1_addr);
                end
                got++;
              end
              @(negedge clk);
            end
          end
          checks++;
          if (!final_found || int'(final_addr) != final_row || int'(final_dist) != fd) begin
            failures++;
            $display("FAIL writer %0d char %0d: final row %0d, expected %0d", writer, c, final_addr, final_row);
          end
          if (best1 % CLASSES != c) miss1++;
          if (final_row % CLASSES != c) miss2++;
          if (best1 % CLASSES != c && final_row % CLASSES == c) n_corrected++;
          @(negedge clk);
        end
    $display("misclassified: single-stage %0d of 208, two-stage %0d of 208 (%0d corrected by stage 2)",
             miss1, miss2, n_corrected);
    if (n_corrected == 0) begin
      failures++;
      $display("FAIL the second stage never corrected a first-stage miss");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
