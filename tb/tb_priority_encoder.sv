// tb_priority_encoder: one-hot, multi-hot and empty match vectors; the
// expected address is the lowest set bit found by a scan.
module tb_priority_encoder;
  localparam int R = 64, AW = 6;
  logic [R-1:0] match;
  logic valid;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  priority_encoder #(.R(R)) dut (.match, .valid, .addr);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int low = -1;
    for (int r = R - 1; r >= 0; r--) if (match[r]) low = r;
    #1;
    checks++;
    if (valid != (low >= 0) || (low >= 0 && int'(addr) != low)) begin
      failures++;
      $display("FAIL match=%h valid=%0d addr=%0d expected %0d", match, valid, addr, low);
    end
  endtask

  initial begin
    match = '0; check_one();
    for (int r = 0; r < R; r++) begin
      match = '0; match[r] = 1'b1; check_one();
    end
    for (int i = 0; i < 300; i++) begin
      match = {$urandom, $urandom};
      if (i % 3 == 0) match = match & (match << (i % 17));  // sparser vectors
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
