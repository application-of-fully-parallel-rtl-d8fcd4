// knn_assoc_mem: fully parallel associative memory with k-nearest-match search.
//
// Each enable returns the next nearest stored row to the search data: the
// first enable gives the best match, the second the second best, and so on,
// for as many enables as the user wants (k is freely choosable).
//
// How it works: the memory field presents all R x W stored units at once.
// Every unit has a unit comparator (|stored - search|) and every row a word
// comparator that adds the unit distances into the word distance C_i
// (squared Euclidean or Manhattan). The winner-take-all stage picks the
// smallest C_i among the eligible rows: rows enabled on row_active that the
// feedback path has not yet marked as previous winners. When a winner is
// taken, its feedback flag is set, so on the next enable that row is a loser
// and the next nearest row wins. The priority encoder turns the match signals
// into the winner's address and the output selector reads out its word.
//
// The structure (unit and word comparators per row, winner-take-all with a
// feedback path per row, priority encoder) follows the original mixed-signal
// memory; the analog summation and decision are exact digital arithmetic
// here, and the load/en/res_valid handshake is this design's own.
//
// Interface and timing (all on the rising edge of clk, rst_n asynchronous):
//   wr_*      write port of the memory field (see am_memory_field)
//   rd_row/rd_data  plain read of any row, combinational
//   load      latches sd and metric and clears the feedback flags: a new search
//   en        takes one winner; one cycle later res_valid pulses and
//             match/res_* hold the result until the next enable. en in the
//             same cycle as load is ignored.
//   res_found low means every eligible row has already been returned.
// The row distances follow the stored data combinationally, so a write
// between enables affects the next winner; searching and writing are meant to
// be kept apart.
module knn_assoc_mem #(
  parameter int unsigned R  = am_pkg::AM_ROWS,
  parameter int unsigned W  = am_pkg::AM_UNITS,
  parameter int unsigned N  = am_pkg::AM_BITS,
  parameter int unsigned AW = am_pkg::addr_width(R),
  parameter int unsigned DW = am_pkg::dist_width(W, N)
) (
  input  logic                clk,
  input  logic                rst_n,
  // write / read periphery
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_row,
  input  logic [W-1:0]        wr_mask,
  input  logic [W-1:0][N-1:0] wr_data,
  input  logic [AW-1:0]       rd_row,
  output logic [W-1:0][N-1:0] rd_data,
  // search
  input  logic [R-1:0]        row_active,
  input  logic                load,
  input  logic [W-1:0][N-1:0] sd,
  input  am_pkg::metric_e     metric,
  input  logic                en,
  // result of the last enable
  output logic                res_valid,
  output logic                res_found,
  output logic [R-1:0]        match,
  output logic [AW-1:0]       res_addr,
  output logic [DW-1:0]       res_dist,
  output logic [W-1:0][N-1:0] res_data
);
  logic [R-1:0][W-1:0][N-1:0] cells;
  logic [W-1:0][N-1:0]        sd_q;
  am_pkg::metric_e            metric_q;
  logic [R-1:0][W-1:0][N-1:0] unit_dist;
  logic [R-1:0][DW-1:0]       word_dist;
  logic [R-1:0]               lost, eligible, wta_match;
  logic                       wta_found, take, pe_valid;
  logic [DW-1:0]              wta_dist;

  am_memory_field #(.R(R), .W(W), .N(N), .AW(AW)) u_field (
    .clk, .wr_en, .wr_row, .wr_mask, .wr_data, .rd_row, .rd_data, .cells
  );

  // Search-data register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd_q     <= '0;
      metric_q <= am_pkg::METRIC_EUCLIDEAN;
    end else if (load) begin
      sd_q     <= sd;
      metric_q <= metric;
    end
  end

  // Unit and word comparators of every row, all in parallel.
  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar u = 0; u < W; u++) begin : g_unit
      unit_comparator #(.N(N)) u_uc (
        .stored(cells[r][u]), .search(sd_q[u]), .abs_diff(unit_dist[r][u])
      );
    end
    word_comparator #(.W(W), .N(N), .DW(DW)) u_wc (
      .unit_dist(unit_dist[r]), .metric(metric_q), .word_dist(word_dist[r])
    );
  end

  assign eligible = row_active & ~lost;
  assign take     = en && !load;

  winner_take_all #(.R(R), .DW(DW)) u_wta (
    .dists(word_dist), .eligible, .match(wta_match), .found(wta_found), .win_dist(wta_dist)
  );

  winner_feedback #(.R(R)) u_fb (
    .clk, .rst_n, .clear(load), .take, .match(wta_match), .lost
  );

  // Result registers: the decided match signals and the winner distance.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_found <= 1'b0;
      match     <= '0;
      res_dist  <= '0;
    end else begin
      res_valid <= take;
      if (take) begin
        res_found <= wta_found;
        match     <= wta_match;
        res_dist  <= wta_dist;
      end
    end
  end

  priority_encoder #(.R(R), .AW(AW)) u_pe (
    .match, .valid(pe_valid), .addr(res_addr)
  );

  output_selector #(.R(R), .W(W), .N(N)) u_osel (
    .match, .rows(cells), .data(res_data)
  );

  // A found winner always has exactly one match signal high.
  always_ff @(posedge clk) if (res_valid) assert (pe_valid == res_found)
    else $error("knn_assoc_mem: match signals disagree with res_found");
endmodule
