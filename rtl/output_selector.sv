// output_selector: reads out the stored word of the winning row.
//
// The one-hot match signals select a row of the memory field; the selected
// word is the nearest-match data. An AND-OR selector is used, so an all-zero
// match vector gives an all-zero word. Purely combinational.
//
// Ports: match - R one-hot match signals
//        rows  - the stored words of all R rows (W units of n bits)
//        data  - word of the selected row
module output_selector #(
  parameter int unsigned R = am_pkg::AM_ROWS,
  parameter int unsigned W = am_pkg::AM_UNITS,
  parameter int unsigned N = am_pkg::AM_BITS
) (
  input  logic [R-1:0]                match,
  input  logic [R-1:0][W-1:0][N-1:0]  rows,
  output logic [W-1:0][N-1:0]         data
);
  always_comb begin
    data = '0;
    for (int unsigned r = 0; r < R; r++)
      if (match[r]) data = data | rows[r];
  end
endmodule
