// priority_encoder: turns the row match signals M into the winner's address.
//
// The lowest-numbered asserted match line wins; valid is low when no line is
// asserted. With the one-hot match signals of the winner-take-all stage this
// is the plain binary encoding of the winning row. Purely combinational.
//
// Ports: match - R match signals (M_1 .. M_R)
//        valid - at least one match signal is high
//        addr  - address of the lowest asserted row
module priority_encoder #(
  parameter int unsigned R  = am_pkg::AM_ROWS,
  parameter int unsigned AW = am_pkg::addr_width(R)
) (
  input  logic [R-1:0]  match,
  output logic          valid,
  output logic [AW-1:0] addr
);
  always_comb begin
    valid = 1'b0;
    addr  = '0;
    for (int r = int'(R) - 1; r >= 0; r--) begin
      if (match[r]) begin
        valid = 1'b1;
        addr  = AW'(r);
      end
    end
  end
endmodule
