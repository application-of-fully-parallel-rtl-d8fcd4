// am_memory_field: storage-cell array of an associative memory with its
// row decoder and column read/write periphery.
//
// R rows of W units, each unit n bits (default 64 x 16 x 5, as in the
// mixed-signal macro this design is modelled on). Every stored bit is visible at once on the cells output,
// which feeds the unit comparators of all rows in parallel; that is what makes
// the memory fully parallel. Writing: on the rising edge with wr_en high, the
// units of row wr_row whose bit in wr_mask is set take the matching units of
// wr_data (the column decoder picks units; a full-word write sets every mask
// bit). Reading: rd_data is the word of row rd_row, combinationally.
// Like an SRAM the cells have no reset; a row must be written before it is
// searched.
module am_memory_field #(
  parameter int unsigned R  = am_pkg::AM_ROWS,
  parameter int unsigned W  = am_pkg::AM_UNITS,
  parameter int unsigned N  = am_pkg::AM_BITS,
  parameter int unsigned AW = am_pkg::addr_width(R)
) (
  input  logic                       clk,
  input  logic                       wr_en,
  input  logic [AW-1:0]              wr_row,
  input  logic [W-1:0]               wr_mask,
  input  logic [W-1:0][N-1:0]        wr_data,
  input  logic [AW-1:0]              rd_row,
  output logic [W-1:0][N-1:0]        rd_data,
  output logic [R-1:0][W-1:0][N-1:0] cells
);
  logic [R-1:0] row_sel;

  row_decoder #(.R(R), .AW(AW)) u_row_dec (
    .en(wr_en), .addr(wr_row), .sel(row_sel)
  );

  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < R; r++)
      for (int unsigned u = 0; u < W; u++)
        if (row_sel[r] && wr_mask[u]) cells[r][u] <= wr_data[u];
  end

  assign rd_data = (32'(rd_row) < R) ? cells[rd_row] : '0;
endmodule
