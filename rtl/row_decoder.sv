// row_decoder: decodes a binary row address into a one-hot row select.
//
// The select is all zero while en is low. Purely combinational.
//
// Ports: en   - decoder enable
//        addr - binary row address (addresses >= R select nothing)
//        sel  - one-hot row select, R bits
module row_decoder #(
  parameter int unsigned R  = am_pkg::AM_ROWS,
  parameter int unsigned AW = am_pkg::addr_width(R)
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [R-1:0]  sel
);
  always_comb begin
    sel = '0;
    for (int unsigned r = 0; r < R; r++)
      sel[r] = en && (addr == AW'(r));
  end
endmodule
