// tb_feature_assoc_mem: the second-stage memory.
//
// Feature words are written in write mode. In search mode a random set of
// rows is activated through the winner-address input; writes attempted in
// search mode and winner addresses offered in write mode must have no effect.
// Enables must then return only activated rows, nearest first, and report no
// winner once all activated rows are returned.
module tb_feature_assoc_mem;
  import am_pkg::*;
  localparam int R = 64, W = 16, N = 5, AW = 6, DW = dist_width(W, N);

  logic clk = 1'b0, rst_n = 1'b1;
  logic search = 1'b0, wr_en = 1'b0, act_clear = 1'b0, win_valid = 1'b0;
  logic load = 1'b0, en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_row = '0, win_addr = '0;
  logic [W-1:0] wr_mask = '1;
  logic [W-1:0][N-1:0] wr_data = '0, rd_data, sd = '0, res_data;
  logic [R-1:0] active, match;
  metric_e metric = METRIC_EUCLIDEAN;
  logic res_valid, res_found;
  logic [AW-1:0] res_addr;
  logic [DW-1:0] res_dist;

  logic [R-1:0][W-1:0][N-1:0] model;
  logic [R-1:0] act_model;
  int checks = 0, failures = 0;

  feature_assoc_mem #(.R(R), .W(W), .N(N)) dut (
    .clk, .rst_n, .search, .wr_en, .wr_addr, .wr_mask, .wr_data, .rd_row, .rd_data,
    .act_clear, .win_valid, .win_addr, .active,
    .load, .sd, .metric, .en,
    .res_valid, .res_found, .match, .res_addr, .res_dist, .res_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0][N-1:0] rnd_word();
    logic [W-1:0][N-1:0] w;
    for (int u = 0; u < W; u++) w[u] = N'($urandom);
    return w;
  endfunction

  function automatic int ref_dist(int r);
    int s = 0;
    for (int u = 0; u < W; u++) begin
      int d = int'(model[r][u]) - int'(sd[u]);
      s += d * d;
    end
    return s;
  endfunction

  task automatic check_store();
    for (int r = 0; r < R; r++) begin
      rd_row = AW'(r);
      #1;
      checks++;
      if (rd_data != model[r]) begin failures++; $display("FAIL stored row %0d", r); end
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 6; t++) begin
      // write mode: store features; a winner address offered now is ignored
      search = 1'b0;
      @(negedge clk);
      act_clear = 1'b1;
      @(negedge clk);
      act_clear = 1'b0;
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_addr = AW'(r); wr_data = rnd_word(); model[r] = wr_data;
        win_valid = 1'b1; win_addr = AW'(R - 1 - r);
      end
      @(negedge clk);
      wr_en = 1'b0; win_valid = 1'b0;
      checks++;
      if (active != '0) begin failures++; $display("FAIL rows activated in write mode: %h", active); end
      check_store();

      // search mode: activate random rows; writes must be blocked
      search = 1'b1;
      act_model = '0;
      for (int i = 0; i < 1 + t * 3; i++) begin
        @(negedge clk);
        win_valid = 1'b1; win_addr = AW'($urandom % R);
        act_model[win_addr] = 1'b1;
        wr_en = 1'b1; wr_addr = AW'($urandom % R); wr_data = rnd_word();
      end
      @(negedge clk);
      win_valid = 1'b0; wr_en = 1'b0;
      checks++;
      if (active != act_model) begin
        failures++;
        $display("FAIL active=%h expected %h", active, act_model);
      end
      check_store();

      // final winner search among the activated rows, in sorted order
      sd = rnd_word();
      metric = METRIC_EUCLIDEAN;
      @(negedge clk); load = 1'b1;
      @(negedge clk); load = 1'b0;
      begin
        logic [R-1:0] left;
        left = act_model;
        for (int i = 0; i <= $countones(act_model); i++) begin
          int best, bd;
          best = -1; bd = 0;
          for (int r = 0; r < R; r++)
            if (left[r] && (best < 0 || ref_dist(r) < bd)) begin best = r; bd = ref_dist(r); end
          @(negedge clk); en = 1'b1;
          @(negedge clk); en = 1'b0;
          checks++;
          if (!res_valid || res_found != (best >= 0) ||
              (best >= 0 && (int'(res_addr) != best || int'(res_dist) != bd ||
                             res_data != model[best]))) begin
            failures++;
            $display("FAIL enable %0d: found=%0d row %0d dist %0d, expected row %0d dist %0d",
                     i, res_found, res_addr, res_dist, best, bd);
          end
          if (best >= 0) left[best] = 1'b0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
