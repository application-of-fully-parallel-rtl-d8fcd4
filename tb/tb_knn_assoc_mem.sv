// tb_knn_assoc_mem: k-nearest-match search of the full 64 x 16 x 5-bit memory.
//
// 1. The four-winner scenario: four rows lie at Euclidean distance 1, 2, 3 and
//    4 from the search data, all others far away; four enables must return
//    them in that order, each one cycle after its enable.
//    The same search is repeated with enables on consecutive cycles.
// 2. Random contents (some with few distinct values, to force equal
//    distances), both metrics and random row_active masks: every enable is
//    compared with a reference that sorts the eligible rows by (distance,
//    row number), until the memory reports that no row is left.
module tb_knn_assoc_mem;
  import am_pkg::*;
  localparam int R = 64, W = 16, N = 5, AW = 6, DW = dist_width(W, N);

  logic clk = 1'b0, rst_n = 1'b1;
  logic wr_en = 1'b0, load = 1'b0, en = 1'b0;
  logic [AW-1:0] wr_row = '0, rd_row = '0;
  logic [W-1:0] wr_mask = '1;
  logic [W-1:0][N-1:0] wr_data = '0, rd_data, sd = '0, res_data;
  logic [R-1:0] row_active = '1, match;
  metric_e metric = METRIC_EUCLIDEAN;
  logic res_valid, res_found;
  logic [AW-1:0] res_addr;
  logic [DW-1:0] res_dist;

  logic [R-1:0][W-1:0][N-1:0] model;
  int rows_b2b[4];
  int checks = 0, failures = 0;

  knn_assoc_mem #(.R(R), .W(W), .N(N)) dut (
    .clk, .rst_n, .wr_en, .wr_row, .wr_mask, .wr_data, .rd_row, .rd_data,
    .row_active, .load, .sd, .metric, .en,
    .res_valid, .res_found, .match, .res_addr, .res_dist, .res_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // res_valid may only follow an enable, by exactly one cycle.
  logic en_d = 1'b0;
  always @(posedge clk) begin
    en_d <= en && !load;
    if (rst_n && res_valid != en_d) begin
      failures++;
      $display("FAIL res_valid=%0d one cycle after enable=%0d", res_valid, en_d);
    end
  end

  function automatic int ref_dist(int r, metric_e m);
    int s = 0;
    for (int u = 0; u < W; u++) begin
      int d = int'(model[r][u]) - int'(sd[u]);
      if (d < 0) d = -d;
      s += (m == METRIC_EUCLIDEAN) ? d * d : d;
    end
    return s;
  endfunction

  task automatic write_row(int r, logic [W-1:0][N-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_row = AW'(r); wr_data = d; wr_mask = '1;
    model[r] = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic do_load();
    @(negedge clk); load = 1'b1;
    @(negedge clk); load = 1'b0;
  endtask

  // One enable; returns the winner reported.
  task automatic enable(output logic found, output int addr, output int d);
    @(negedge clk); en = 1'b1;
    @(negedge clk); en = 1'b0;
    checks++;
    if (!res_valid) begin failures++; $display("FAIL no result one cycle after enable"); end
    found = res_found; addr = int'(res_addr); d = int'(res_dist);
  endtask

  // Full sorted search with the reference model.
  task automatic search_all(int limit);
    bit taken[R];
    logic f; int a, d;
    foreach (taken[r]) taken[r] = 0;
    do_load();
    for (int i = 0; i <= limit; i++) begin
      int best = -1, bd = 0;
      for (int r = 0; r < R; r++)
        if (row_active[r] && !taken[r]) begin
          int rd = ref_dist(r, metric);
          if (best < 0 || rd < bd) begin best = r; bd = rd; end
        end
      enable(f, a, d);
      checks++;
      if (best < 0) begin
        if (f) begin failures++; $display("FAIL winner %0d reported after all rows", a); end
        break;
      end
      if (!f || a != best || d != bd || res_data != model[best] || match != (R'(1) << best)) begin
        failures++;
        $display("FAIL winner %0d: got row %0d dist %0d, expected row %0d dist %0d",
                 i + 1, a, d, best, bd);
      end
      taken[best] = 1;
    end
  endtask

  function automatic logic [W-1:0][N-1:0] rnd_word(int range);
    logic [W-1:0][N-1:0] w;
    for (int u = 0; u < W; u++) w[u] = N'($urandom % range);
    return w;
  endfunction

  initial begin
    logic f; int a, d;
    #1 rst_n = 1'b0;   // asynchronous reset, released after two clocks
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Scenario 1: distances 1, 2, 3, 4 (squared: 1, 4, 9, 16).
    sd = rnd_word(16) + {W{N'(8)}};   // units in 8..23, room for +-4
    for (int r = 0; r < R; r++) begin
      logic [W-1:0][N-1:0] w;
      for (int u = 0; u < W; u++) w[u] = N'(int'(sd[u]) + ((u % 2) ? 6 : -6)); // far
      write_row(r, w);
    end
    begin
      rows_b2b = '{41, 7, 63, 22};
      for (int j = 0; j < 4; j++) begin
        logic [W-1:0][N-1:0] w;
        w = sd;
        w[j + 3] = N'(int'(sd[j + 3]) + j + 1);
        write_row(rows_b2b[j], w);
      end
      metric = METRIC_EUCLIDEAN;
      row_active = '1;
      do_load();
      for (int j = 0; j < 4; j++) begin
        enable(f, a, d);
        checks++;
        if (!f || a != rows_b2b[j] || d != (j + 1) * (j + 1)) begin
          failures++;
          $display("FAIL winner #%0d: row %0d dist %0d, expected row %0d dist %0d",
                   j + 1, a, d, rows_b2b[j], (j + 1) * (j + 1));
        end
      end
    end

    // Scenario 1b: the same four winners with enables on consecutive cycles.
    do_load();
    @(negedge clk);
    en = 1'b1;
    for (int j = 0; j < 4; j++) begin
      @(negedge clk);
      if (j == 3) en = 1'b0;
      checks++;
      if (!res_valid || !res_found || int'(res_addr) != rows_b2b[j]) begin
        failures++;
        $display("FAIL back-to-back winner #%0d: row %0d", j + 1, res_addr);
      end
    end

    // Scenario 2: random contents, both metrics, random eligibility.
    for (int t = 0; t < 8; t++) begin
      int range;
      range = (t % 2) ? 32 : 3;
      for (int r = 0; r < R; r++) write_row(r, rnd_word(range));
      sd = rnd_word(range);
      metric = (t % 4 < 2) ? METRIC_EUCLIDEAN : METRIC_MANHATTAN;
      row_active = (t < 4) ? '1 : {$urandom, $urandom};
      search_all(R);
    end

    // Read port.
    for (int r = 0; r < R; r++) begin
      rd_row = AW'(r);
      #1;
      checks++;
      if (rd_data != model[r]) begin failures++; $display("FAIL read row %0d", r); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
