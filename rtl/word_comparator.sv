// word_comparator: word distance C_i of one row from its W unit distances.
//
// In the original mixed-signal memory each unit distance drives a current converter and, for the
// Euclidean distance, an analog current squarer; the currents of all units are
// added on the match line. Here the same quantity is computed exactly in
// binary: each unit distance is squared (Euclidean metric) or taken as it is
// (Manhattan metric), and the W terms are summed. The result is the squared
// Euclidean distance, which orders rows the same way as the Euclidean
// distance itself. Purely combinational.
//
// Ports: unit_dist - W unit distances of n bits (from the unit comparators)
//        metric    - distance measure, see am_pkg::metric_e
//        word_dist - word distance, DW bits wide
module word_comparator #(
  parameter int unsigned W  = am_pkg::AM_UNITS,
  parameter int unsigned N  = am_pkg::AM_BITS,
  parameter int unsigned DW = am_pkg::dist_width(W, N)
) (
  input  logic [W-1:0][N-1:0] unit_dist,
  input  am_pkg::metric_e     metric,
  output logic [DW-1:0]       word_dist
);
  always_comb begin
    logic [2*N-1:0] term;
    word_dist = '0;
    for (int unsigned u = 0; u < W; u++) begin
      if (metric == am_pkg::METRIC_EUCLIDEAN)
        term = (2*N)'(unit_dist[u]) * (2*N)'(unit_dist[u]);
      else
        term = (2*N)'(unit_dist[u]);
      word_dist = word_dist + DW'(term);
    end
  end
endmodule
