// write_search_mux: address multiplexer in front of the second memory's row
// decoder.
//
// In write mode the external address is passed to the row decoder, so feature
// words can be stored. In search mode the address of a row chosen by the first
// associative memory is passed, so that row can be activated for the final
// winner search. The decoder enable follows the same selection: the write
// strobe in write mode, the first memory's result strobe in search mode.
// Purely combinational.
//
// Ports: search     - 0: write mode, 1: search mode
//        wr_en      - write strobe, external address valid
//        wr_addr    - external write address
//        win_valid  - a first-stage winner address is presented
//        win_addr   - first-stage winner address
//        dec_en     - enable for the row decoder
//        dec_addr   - address for the row decoder
module write_search_mux #(
  parameter int unsigned AW = am_pkg::addr_width(am_pkg::AM_ROWS)
) (
  input  logic          search,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic          win_valid,
  input  logic [AW-1:0] win_addr,
  output logic          dec_en,
  output logic [AW-1:0] dec_addr
);
  always_comb begin
    if (search) begin
      dec_en   = win_valid;
      dec_addr = win_addr;
    end else begin
      dec_en   = wr_en;
      dec_addr = wr_addr;
    end
  end
endmodule
