// winner_take_all: nearest-match decision over all rows in parallel.
//
// Digital counterpart of the winner line-up amplifier, the winner-take-all
// network and the decision inverters that follow it: among the eligible rows
// it finds the smallest word distance and raises the match signal of exactly
// one row ("1" for the winner, "0" for every loser). Rows that are not
// eligible (not activated, or turned into losers by the feedback path) can
// never win. On equal distances the lowest-numbered row wins, a choice of this
// design: an analog winner-take-all has no defined behaviour for exact ties.
// Purely combinational.
//
// Ports: dists     - R word distances C_1 .. C_R
//        eligible - rows taking part in the search
//        match    - one-hot match signals M_1 .. M_R (all zero if none eligible)
//        found    - some row won
//        win_dist - distance of the winning row
module winner_take_all #(
  parameter int unsigned R  = am_pkg::AM_ROWS,
  parameter int unsigned DW = am_pkg::dist_width(am_pkg::AM_UNITS, am_pkg::AM_BITS)
) (
  input  logic [R-1:0][DW-1:0] dists,
  input  logic [R-1:0]         eligible,
  output logic [R-1:0]         match,
  output logic                 found,
  output logic [DW-1:0]        win_dist
);
  always_comb begin
    found    = 1'b0;
    win_dist = '1;
    match    = '0;
    // Strict "<" keeps the first (lowest-numbered) row of equal distance.
    for (int unsigned r = 0; r < R; r++) begin
      if (eligible[r] && (!found || dists[r] < win_dist)) begin
        found    = 1'b1;
        win_dist = dists[r];
        match    = '0;
        match[r] = 1'b1;
      end
    end
    if (!found) win_dist = '0;
  end

  // The decision stage must never report two winners.
  always_comb assert ($onehot0(match)) else $error("winner_take_all: several winners");
endmodule
