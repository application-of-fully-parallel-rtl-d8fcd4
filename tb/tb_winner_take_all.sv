// tb_winner_take_all: random row distances (narrow ranges to force ties) and
// random eligibility; the expected winner is the first eligible row of the
// smallest distance.
module tb_winner_take_all;
  localparam int R = 64, DW = 14;
  logic [R-1:0][DW-1:0] dists;
  logic [R-1:0] eligible, match;
  logic found;
  logic [DW-1:0] win_dist;
  int checks = 0, failures = 0;

  winner_take_all #(.R(R), .DW(DW)) dut (.dists, .eligible, .match, .found, .win_dist);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int best = -1;
    logic [R-1:0] e_match = '0;
    for (int r = 0; r < R; r++)
      if (eligible[r] && (best < 0 || dists[r] < dists[best])) best = r;
    if (best >= 0) e_match[best] = 1'b1;
    #1;
    checks++;
    if (found != (best >= 0) || match != e_match ||
        (best >= 0 && win_dist != dists[best])) begin
      failures++;
      $display("FAIL found=%0d match=%h expected row %0d", found, match, best);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int range;
      range = (i % 4 == 0) ? 8 : (1 << DW);
      for (int r = 0; r < R; r++) dists[r] = DW'($urandom % range);
      case (i % 5)
        0:       eligible = '1;
        1:       eligible = '0;
        2:       begin eligible = '0; eligible[$urandom % R] = 1'b1; end
        default: eligible = {$urandom, $urandom};
      endcase
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
