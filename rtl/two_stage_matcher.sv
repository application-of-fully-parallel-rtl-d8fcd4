// two_stage_matcher: cascaded associative memories with two-stage winner
// search.
//
// A single nearest-match search on the main reference data alone misclassifies
// often when patterns are similar. This design first asks the main memory
// (AM1) for its k nearest rows, and then lets a second memory (AM2), which
// holds additional features of every reference pattern, choose the final
// winner among exactly those k rows.
//
// Operation, controlled by a small state machine:
//   1. IDLE: both memories can be written (am1_wr_*, am2_wr_*). A start pulse
//      latches the main search data into AM1 and the feature search data into
//      AM2, clears AM2's activation flags and records k.
//   2. STAGE1: k enables are given to AM1, one every two cycles (enable, then
//      result). Each winner is reported on s1_* and its address goes through
//      AM2's write/search multiplexer to activate that row in AM2. The stage
//      ends early if AM1 runs out of rows.
//   3. STAGE2: enables to AM2 search the final winners among the active rows,
//      nearest first: k2 of them (k2 = 0 counts as 1), or fewer if the active
//      rows run out. Each is reported with a final_valid pulse on final_*;
//      final_data is AM1's stored word of that row and final_feat its feature
//      word. done pulses with the last one. Then back to IDLE.
// s1_data is the stored word of each first-stage winner, cand_rows the set of
// rows activated in AM2 so far. feat_rd_row/feat_rd_data read AM2 at any time.
// Each AM enable costs two cycles (enable, result): done rises 2(e1 + e2) - 1
// clock edges after the edge that takes start, with e1 and e2 the enables
// given to AM1 and AM2 (e1 = k and e2 = k2 unless a stage runs out of rows,
// which costs one extra enable reporting no row).
// The cascade, the address multiplexer in front of AM2's row decoder and the
// activation of the stage-1 rows follow the original architecture; the
// controller, its two-cycle-per-winner timing, the k = 0 and k2 = 0 rules and blocking
// AM2 writes during a search are choices of this design.
// k = 0 is treated as k = 1. AM2 writes are ignored while busy (its multiplexer
// is in search mode). Both stages keep their own run-time distance measure.
module two_stage_matcher #(
  parameter int unsigned R   = am_pkg::AM_ROWS,
  parameter int unsigned W1  = am_pkg::AM_UNITS,
  parameter int unsigned N1  = am_pkg::AM_BITS,
  parameter int unsigned W2  = am_pkg::AM_UNITS,
  parameter int unsigned N2  = am_pkg::AM_BITS,
  parameter int unsigned AW  = am_pkg::addr_width(R),
  parameter int unsigned KW  = $clog2(R + 1),
  parameter int unsigned DW1 = am_pkg::dist_width(W1, N1),
  parameter int unsigned DW2 = am_pkg::dist_width(W2, N2)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AM1 (main reference data) write port
  input  logic                  am1_wr_en,
  input  logic [AW-1:0]         am1_wr_row,
  input  logic [W1-1:0]         am1_wr_mask,
  input  logic [W1-1:0][N1-1:0] am1_wr_data,
  // AM2 (feature reference data) write port, honoured while idle
  input  logic                  am2_wr_en,
  input  logic [AW-1:0]         am2_wr_row,
  input  logic [W2-1:0]         am2_wr_mask,
  input  logic [W2-1:0][N2-1:0] am2_wr_data,
  // search request
  input  logic                  start,
  input  logic [KW-1:0]         k,
  input  logic [KW-1:0]         k2,
  input  logic [W1-1:0][N1-1:0] main_sd,
  input  logic [W2-1:0][N2-1:0] feat_sd,
  input  am_pkg::metric_e       metric1,
  input  am_pkg::metric_e       metric2,
  // status
  output logic                  busy,
  // read of a feature word, any time
  input  logic [AW-1:0]         feat_rd_row,
  output logic [W2-1:0][N2-1:0] feat_rd_data,
  // first-stage winners, in order of increasing distance
  output logic                  s1_valid,
  output logic [AW-1:0]         s1_addr,
  output logic [DW1-1:0]        s1_dist,
  output logic [R-1:0]          s1_match,
  output logic [W1-1:0][N1-1:0] s1_data,
  output logic [R-1:0]          cand_rows,
  // final winners, in order of increasing feature distance
  output logic                  final_valid,
  output logic                  done,
  output logic                  final_found,
  output logic [AW-1:0]         final_addr,
  output logic [DW2-1:0]        final_dist,
  output logic [R-1:0]          final_match,
  output logic [W1-1:0][N1-1:0] final_data,
  output logic [W2-1:0][N2-1:0] final_feat
);
  typedef enum logic [2:0] {
    ST_IDLE, ST_S1_EN, ST_S1_WAIT, ST_S2_EN, ST_S2_WAIT
  } state_e;

  state_e          state;
  logic [KW-1:0]   k_q, cnt, k2_q, cnt2;
  logic            search_mode, load, am1_en, am2_en;
  logic            am1_res_valid, am1_res_found, am2_res_valid;
  logic [AW-1:0]   am1_res_addr;
  logic [DW1-1:0]  am1_res_dist;
  logic            stage1_last, stage2_last;

  assign search_mode = (state != ST_IDLE);
  assign busy        = search_mode;
  assign load        = (state == ST_IDLE) && start;
  assign am1_en      = (state == ST_S1_EN);
  assign am2_en      = (state == ST_S2_EN);
  assign stage1_last = !am1_res_found || (cnt == k_q);
  assign stage2_last = !final_found || (cnt2 == k2_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      k_q   <= '0;
      cnt   <= '0;
      k2_q  <= '0;
      cnt2  <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          k_q   <= (k == '0) ? KW'(1) : k;
          k2_q  <= (k2 == '0) ? KW'(1) : k2;
          cnt   <= '0;
          cnt2  <= '0;
          state <= ST_S1_EN;
        end
        ST_S1_EN: begin
          cnt   <= cnt + 1'b1;
          state <= ST_S1_WAIT;
        end
        ST_S1_WAIT: if (am1_res_valid) state <= stage1_last ? ST_S2_EN : ST_S1_EN;
        ST_S2_EN: begin
          cnt2  <= cnt2 + 1'b1;
          state <= ST_S2_WAIT;
        end
        ST_S2_WAIT: if (am2_res_valid) state <= stage2_last ? ST_IDLE : ST_S2_EN;
        default:    state <= ST_IDLE;
      endcase
    end
  end

  knn_assoc_mem #(.R(R), .W(W1), .N(N1), .AW(AW), .DW(DW1)) u_am1 (
    .clk, .rst_n,
    .wr_en(am1_wr_en), .wr_row(am1_wr_row), .wr_mask(am1_wr_mask), .wr_data(am1_wr_data),
    .rd_row(final_addr), .rd_data(final_data),
    .row_active('1), .load, .sd(main_sd), .metric(metric1), .en(am1_en),
    .res_valid(am1_res_valid), .res_found(am1_res_found), .match(s1_match),
    .res_addr(am1_res_addr), .res_dist(am1_res_dist), .res_data(s1_data)
  );

  feature_assoc_mem #(.R(R), .W(W2), .N(N2), .AW(AW), .DW(DW2)) u_am2 (
    .clk, .rst_n, .search(search_mode),
    .wr_en(am2_wr_en), .wr_addr(am2_wr_row), .wr_mask(am2_wr_mask), .wr_data(am2_wr_data),
    .rd_row(feat_rd_row), .rd_data(feat_rd_data),
    .act_clear(load), .win_valid(am1_res_valid && am1_res_found), .win_addr(am1_res_addr),
    .active(cand_rows),
    .load, .sd(feat_sd), .metric(metric2), .en(am2_en),
    .res_valid(am2_res_valid), .res_found(final_found), .match(final_match),
    .res_addr(final_addr), .res_dist(final_dist), .res_data(final_feat)
  );

  assign s1_valid = am1_res_valid && am1_res_found;
  assign s1_addr  = am1_res_addr;
  assign s1_dist  = am1_res_dist;
  assign final_valid = am2_res_valid && final_found;
  assign done        = am2_res_valid && stage2_last;
endmodule
