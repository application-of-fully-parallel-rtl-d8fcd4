// feature_assoc_mem: second associative memory of the two-stage matcher.
//
// It stores, for every reference row of the first memory, a word of
// additional features of the same pattern, and searches the final winner only
// among the rows the first memory selected.
//
// How it works: a write/search multiplexer sits in front of the row decoder.
// In write mode (search low) it passes the external write address, and the
// feature word is stored. In search mode it passes each winner address the
// first memory reports; the decoded row sets that row's activation flag.
// The search core is the same k-nearest-match memory as the first stage, with
// row_active driven by the activation flags, so only the k activated rows
// can win and further enables return them in sorted order.
//
// Interface and timing (rising edge of clk, rst_n asynchronous, active low):
//   search     0: write mode, 1: search mode
//   wr_*       feature write port, used in write mode only
//   act_clear  clears all activation flags (start of a new two-stage search)
//   win_valid/win_addr  a first-stage winner; in search mode it is activated
//                       at the clock edge
//   load/sd/metric/en/res_*  as in knn_assoc_mem
//   active     the activation flags
// The activation decoder is a second instance of the row decoder beside the
// one inside the memory field: both decode the same multiplexed address, one
// for writing and one for activation.
module feature_assoc_mem #(
  parameter int unsigned R  = am_pkg::AM_ROWS,
  parameter int unsigned W  = am_pkg::AM_UNITS,
  parameter int unsigned N  = am_pkg::AM_BITS,
  parameter int unsigned AW = am_pkg::addr_width(R),
  parameter int unsigned DW = am_pkg::dist_width(W, N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                search,
  // feature write port
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic [W-1:0]        wr_mask,
  input  logic [W-1:0][N-1:0] wr_data,
  input  logic [AW-1:0]       rd_row,
  output logic [W-1:0][N-1:0] rd_data,
  // row activation from the first stage
  input  logic                act_clear,
  input  logic                win_valid,
  input  logic [AW-1:0]       win_addr,
  output logic [R-1:0]        active,
  // final winner search
  input  logic                load,
  input  logic [W-1:0][N-1:0] sd,
  input  am_pkg::metric_e     metric,
  input  logic                en,
  output logic                res_valid,
  output logic                res_found,
  output logic [R-1:0]        match,
  output logic [AW-1:0]       res_addr,
  output logic [DW-1:0]       res_dist,
  output logic [W-1:0][N-1:0] res_data
);
  logic          dec_en;
  logic [AW-1:0] dec_addr;
  logic [R-1:0]  act_sel;

  write_search_mux #(.AW(AW)) u_mux (
    .search, .wr_en, .wr_addr, .win_valid, .win_addr, .dec_en, .dec_addr
  );

  row_decoder #(.R(R), .AW(AW)) u_act_dec (
    .en(dec_en && search), .addr(dec_addr), .sel(act_sel)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         active <= '0;
    else if (act_clear) active <= '0;
    else                active <= active | act_sel;
  end

  knn_assoc_mem #(.R(R), .W(W), .N(N), .AW(AW), .DW(DW)) u_core (
    .clk, .rst_n,
    .wr_en(dec_en && !search), .wr_row(dec_addr), .wr_mask, .wr_data,
    .rd_row, .rd_data,
    .row_active(active), .load, .sd, .metric, .en,
    .res_valid, .res_found, .match, .res_addr, .res_dist, .res_data
  );
endmodule
