// winner_feedback: the per-row feedback elements from the winner-take-all
// outputs back to the match lines.
//
// Each row keeps a "lost" flag. When a winner is taken (take high), the row
// whose match signal is high gets its flag set, so at the next enable it
// behaves as a loser and the next nearest row wins. This is how the memory
// returns the 1st, 2nd, ... k-th nearest match one enable after the other.
// clear (start of a new search) resets every flag; clear has priority over
// take. Flags change on the rising clock edge; rst_n is asynchronous and
// active low.
//
// Ports: clear - start of a new search
//        take  - a winner is being taken this cycle
//        match - one-hot match signals of that winner
//        lost  - rows already returned by the current search
module winner_feedback #(
  parameter int unsigned R = am_pkg::AM_ROWS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         take,
  input  logic [R-1:0] match,
  output logic [R-1:0] lost
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     lost <= '0;
    else if (clear) lost <= '0;
    else if (take)  lost <= lost | match;
  end
endmodule
