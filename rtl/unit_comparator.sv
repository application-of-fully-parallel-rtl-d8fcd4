// unit_comparator: unit distance |a - b| of one stored unit and one search unit.
//
// As in the original mixed-signal memory, the unit comparison is digital: a subtraction followed
// by an absolute value. The (n+1)-bit difference is formed; when it is
// negative it is two's-complement negated. Purely combinational.
//
// Ports: stored  - n-bit unit held in the storage cell
//        search  - n-bit unit of the search data
//        abs_diff    - n-bit absolute difference
module unit_comparator #(
  parameter int unsigned N = am_pkg::AM_BITS
) (
  input  logic [N-1:0] stored,
  input  logic [N-1:0] search,
  output logic [N-1:0] abs_diff
);
  logic [N:0] diff;

  always_comb begin
    diff = {1'b0, stored} - {1'b0, search};
    if (diff[N]) abs_diff = N'(-diff);
    else         abs_diff = diff[N-1:0];
  end
endmodule
