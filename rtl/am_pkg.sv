// am_pkg: types and sizing helpers shared by the associative-memory blocks.
//
// The defaults describe the memory macro of the design: 64 reference rows,
// each of 16 units ("binaries") of 5 bits. A row distance is either the
// squared Euclidean distance (sum of squared unit differences) or the
// Manhattan distance (sum of absolute unit differences); the metric is chosen
// at run time, per memory, so the two stages may use different measures.
package am_pkg;

  // Default geometry of one associative memory.
  localparam int unsigned AM_ROWS  = 64;  // reference words (rows)
  localparam int unsigned AM_UNITS = 16;  // units per word
  localparam int unsigned AM_BITS  = 5;   // bits per unit

  // Distance measure used by the word comparators.
  typedef enum logic {
    METRIC_EUCLIDEAN = 1'b0,  // sum of squared unit distances
    METRIC_MANHATTAN = 1'b1   // sum of absolute unit distances
  } metric_e;

  // Width of a word distance: W units, each at most (2^n - 1)^2.
  function automatic int unsigned dist_width(int unsigned units, int unsigned bits);
    longint unsigned max_d;
    max_d = longint'(units) * ((longint'(1) << bits) - 1) * ((longint'(1) << bits) - 1);
    return $clog2(max_d + 1);
  endfunction

  // Width of a row address (at least 1 bit).
  function automatic int unsigned addr_width(int unsigned rows);
    return (rows > 1) ? $clog2(rows) : 1;
  endfunction

endpackage
